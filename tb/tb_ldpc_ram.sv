// tb_ldpc_ram: self-checking test of the sub-RAM message memory.
//
// A small memory (8 words, 2 lanes, 3 sub-RAMs of 4 messages) is written with
// random words under random sub-RAM enables, then read back and compared with
// a copy kept here. Also checked: a disabled sub-RAM ignores writes and reads
// as zero, and a read of the word being written returns the old contents.
module tb_ldpc_ram;
  localparam int DEPTH = 8, LANES = 2, NSUB = 3, SUB = 4, W = 7;

  logic           clk = 0;
  logic [NSUB-1:0] sub_en;
  logic           we;
  logic [2:0]     waddr, raddr;
  logic [W-1:0]   wdata [LANES][NSUB][SUB];
  logic [W-1:0]   rdata [LANES][NSUB][SUB];
  logic [W-1:0]   model [DEPTH][LANES][NSUB][SUB];
  int checks = 0, failures = 0;

  ldpc_ram #(.DEPTH(DEPTH), .LANES(LANES), .NSUB(NSUB), .SUB(SUB), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare(input int a, input logic [NSUB-1:0] en);
    for (int l = 0; l < LANES; l++)
      for (int s = 0; s < NSUB; s++)
        for (int i = 0; i < SUB; i++) begin
          logic [W-1:0] e;
          e = en[s] ? model[a][l][s][i] : '0;
          checks++;
          if (rdata[l][s][i] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL addr %0d l%0d s%0d i%0d got %0d exp %0d", a, l, s, i, rdata[l][s][i], e);
          end
        end
  endtask

  initial begin
    we = 0; sub_en = '1; waddr = 0; raddr = 0;
    // initialise every word with all sub-RAMs on
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 3'(a);
      for (int l = 0; l < LANES; l++) for (int s = 0; s < NSUB; s++) for (int i = 0; i < SUB; i++) begin
        wdata[l][s][i] = W'($urandom); model[a][l][s][i] = wdata[l][s][i];
      end
    end
    // random writes with random enables, reads of the written word before the edge
    for (int n = 0; n < 200; n++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(0, DEPTH - 1);
      sub_en = NSUB'($urandom_range(1, 7));
      we = $urandom_range(0, 1); waddr = 3'(a); raddr = 3'(a);
      for (int l = 0; l < LANES; l++) for (int s = 0; s < NSUB; s++) for (int i = 0; i < SUB; i++)
        wdata[l][s][i] = W'($urandom);
      #1 compare(a, sub_en);   // old contents before the write
      @(posedge clk);
      if (we) for (int l = 0; l < LANES; l++) for (int s = 0; s < NSUB; s++) if (sub_en[s])
        for (int i = 0; i < SUB; i++) model[a][l][s][i] = wdata[l][s][i];
      #1 compare(a, sub_en);   // new contents after the write
    end
    // final read-back of everything, all sub-RAMs on
    @(negedge clk); we = 0; sub_en = '1;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 3'(a); #1 compare(a, sub_en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
