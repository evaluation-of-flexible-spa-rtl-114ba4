// tb_h_rom: self-checking test of the base-matrix ROM.
//
// The test holds its own copy of the 802.11n n = 1944, rate 5/6 base matrix.
// It reads all ROM words through several ports, expands them back into the 96
// base-matrix positions using the skip counts, and compares shift values and
// '-' positions with that copy. It also checks the word count (79) and that
// addresses past the end read zero.
module tb_h_rom;
  import ldpc_pkg::*;
  localparam int NP = 3;

  // '-' written as -1
  localparam int REF [96] = '{
    13, 48, 80, 66,  4, 74,  7, 30, 76, 52, 37, 60, -1, 49, 73, 31, 74, 73, 23, -1,  1,  0, -1, -1,
    69, 63, 74, 56, 64, 77, 57, 65,  6, 16, 51, -1, 64, -1, 68,  9, 48, 62, 54, 27, -1,  0,  0, -1,
    51, 15,  0, 80, 24, 25, 42, 54, 44, 71, 71,  9, 67, 35, -1, 58, -1, 29, -1, 53,  0, -1,  0,  0,
    16, 29, 36, 41, 44, 56, 59, 37, 50, 24, -1, 65,  4, 65, 52, -1,  4, -1, 73, 52,  1, -1, -1,  0};

  logic [ROM_AW-1:0] addr [NP];
  hrom_word_t        data [NP];
  int checks = 0, failures = 0;
  int pos [96];

  h_rom #(.NPORTS(NP)) dut (.addr(addr), .data(data));

  initial begin
    int p, words;
    p = 0; words = 0;
    checks++;
    if (H_ENTRIES != 79) failures++;
    for (int a = 0; a < 96; a += NP) begin
      for (int k = 0; k < NP; k++) addr[k] = ROM_AW'(a + k);
      #1;
      for (int k = 0; k < NP; k++) begin
        if (a + k < 79) begin
          words++;
          if (p < 96) pos[p] = int'(data[k].shift);
          p++;
          for (int s = 0; s < int'(data[k].skip); s++) begin
            if (p < 96) pos[p] = -1;
            p++;
          end
        end else begin
          checks++;
          if (data[k] != '0) failures++;
        end
      end
    end
    checks++;
    if (p != 96) begin failures++; $display("FAIL expanded to %0d positions", p); end
    for (int i = 0; i < 96; i++) begin
      checks++;
      if (pos[i] != REF[i]) begin
        failures++;
        if (failures < 10) $display("FAIL position %0d got %0d exp %0d", i, pos[i], REF[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
