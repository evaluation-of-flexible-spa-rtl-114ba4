// tb_ldpc_ctrl: self-checking test of the decoder controller with the H ROM.
//
// The check node pipeline is modelled as a delay: a row issued on G
// consecutive cycles returns G + 2 cycles later (the decoder's register in
// front of the CNUs plus the CNU's two-cycle latency). The test checks, for
// three iterations at CNU rate 4:
//  * every issued group: row, group, '-' mask and shifts against the base
//    matrix, first-iteration flag, previous-sum buffer select;
//  * every returned group: reverse group order, mask and shifts recalled for
//    the inverse permutation, current-sum buffer select, first-contribution
//    flags per column;
//  * the output pass (G groups, final-sum buffer) and the done pulse;
//  * the cycle count from start to done: ITER * (MB*G + G + 2) + G + 1.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  localparam int R = 4, ITER = 3, G = NB / R;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done;
  logic [ROM_AW-1:0] rom_addr [R];
  hrom_word_t        rom_data [R];
  logic iss_valid, iss_first_iter, rd_buf, out_phase, cnu_valid, wr_buf;
  logic [1:0] iss_row, wr_row;
  logic [2:0] rd_grp, wr_grp;
  logic [R-1:0] iss_mask, wr_mask, wr_first_touch;
  logic [SHIFT_BITS-1:0] iss_shift [R];
  logic [SHIFT_BITS-1:0] wr_shift  [R];
  logic [7:0] iteration;
  logic [G+1:0] dly;
  int checks = 0, failures = 0;

  h_rom #(.NPORTS(R)) u_rom (.addr(rom_addr), .data(rom_data));
  ldpc_ctrl #(.RATE(R), .ITERATIONS(ITER)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dly <= '0;
    else        dly <= {dly[G:0], iss_valid};
  assign cnu_valid = dly[G+1];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s (iter %0d)", what, iteration);
    end
  endtask

  int it_issue = 0, exp_row = 0, exp_grp = 0;
  int wexp_row = 0, wexp_grp = G - 1;
  int issues [ITER];
  bit seen [NB];
  int outs = 0, dones = 0, cyc = 0, t_start = 0, t_done = 0;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (iss_valid) begin
      automatic int it = int'(iteration);
      issues[it]++;
      chk(int'(iss_row) == exp_row && int'(rd_grp) == exp_grp, "issue order");
      chk(iss_first_iter == (it == 0), "first-iteration flag");
      chk(rd_buf == ~iteration[0], "previous-sum buffer");
      for (int j = 0; j < R; j++) begin
        automatic int h = HBASE[exp_row*NB + exp_grp*R + j];
        chk(iss_mask[j] == (h >= 0), "issue mask");
        if (h >= 0) chk(int'(iss_shift[j]) == h, "issue shift");
      end
      if (exp_grp == G - 1) begin exp_grp = 0; exp_row = (exp_row + 1) % MB; end
      else exp_grp++;
    end
    if (cnu_valid) begin
      chk(int'(wr_row) == wexp_row && int'(wr_grp) == wexp_grp, "write-back order");
      chk(wr_buf == iteration[0], "current-sum buffer");
      if (wexp_row == 0 && wexp_grp == G - 1) for (int c = 0; c < NB; c++) seen[c] = 0;
      for (int j = 0; j < R; j++) begin
        automatic int c = wexp_grp*R + j;
        automatic int h = HBASE[wexp_row*NB + c];
        chk(wr_mask[j] == (h >= 0), "write mask");
        if (h >= 0) begin
          chk(int'(wr_shift[j]) == h, "write shift");
          chk(wr_first_touch[j] == !seen[c], "first contribution flag");
          seen[c] = 1;
        end
      end
      if (wexp_grp == 0) begin wexp_grp = G - 1; wexp_row = (wexp_row + 1) % MB; end
      else wexp_grp--;
    end
    if (out_phase) begin
      chk(int'(rd_grp) == outs && rd_buf == ((ITER - 1) % 2 == 1), "output pass");
      outs++;
    end
    if (done) begin dones++; t_done = cyc; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; t_start = cyc;
    wait (done);
    repeat (5) @(negedge clk);
    for (int i = 0; i < ITER; i++) chk(issues[i] == MB * G, "issue cycles per iteration");
    chk(outs == G, "output groups");
    chk(dones == 1, "single done pulse");
    chk(!busy, "idle after done");
    $display("start to done: %0d cycles, expected %0d", t_done - t_start, ITER * (MB*G + G + 2) + G + 1);
    chk(t_done - t_start == ITER * (MB*G + G + 2) + G + 1, "cycle count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
