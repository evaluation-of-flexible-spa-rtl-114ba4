// tb_softxor_cri: exhaustive self-checking test of the CRI soft-XOR cell.
//
// Every pair of 6-bit magnitudes and every sign combination is applied. The
// expected result is worked out here from the approximation
//   |y| = min(|a|, |b|, (|a|+|b|)/2 - 0.8), sign(y) = sign(a) xor sign(b),
// where the third term only counts when it is not negative. A second set of
// checks compares the cell with the exact soft-XOR
//   2 atanh(tanh(a/2) tanh(b/2))
// and requires the error to stay within 0.55 (LLR units) over the range.
module tb_softxor_cri;
  localparam int MB  = 6;
  localparam int OFF = 13;

  logic          a_s, b_s, y_s;
  logic [MB-1:0] a_m, b_m, y_m;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  softxor_cri #(.MAG_BITS(MB), .OFFSET(OFF)) dut (
    .a_sign(a_s), .a_mag(a_m), .b_sign(b_s), .b_mag(b_m), .y_sign(y_s), .y_mag(y_m));

  function automatic int expect_mag(int a, int b);
    int m = (a < b) ? a : b;
    int l = (a + b) / 2 - OFF;
    if (l >= 0 && l < m) m = l;
    return m;
  endfunction

  function automatic real exact(real a, real b);
    real t = ((1.0 - $exp(-a)) / (1.0 + $exp(-a))) * ((1.0 - $exp(-b)) / (1.0 + $exp(-b)));
    return $ln((1.0 + t) / (1.0 - t));
  endfunction

  initial begin
    #1;
    for (int sa = 0; sa < 2; sa++)
      for (int sb = 0; sb < 2; sb++)
        for (int a = 0; a < 64; a++)
          for (int b = 0; b < 64; b++) begin
            a_s = sa[0]; b_s = sb[0]; a_m = MB'(a); b_m = MB'(b);
            #1;
            checks++;
            if (int'(y_m) != expect_mag(a, b) || y_s != (sa[0] ^ sb[0])) begin
              failures++;
              if (failures < 10)
                $display("FAIL a=%0d%0d b=%0d%0d got %0d%0d exp %0d", sa, a, sb, b, y_s, y_m, expect_mag(a, b));
            end
            if (sa == 0 && sb == 0) begin
              real e;
              e = real'(y_m) / 16.0 - exact(real'(a) / 16.0, real'(b) / 16.0);
              if (e < 0) e = -e;
              if (e > max_err) max_err = e;
            end
          end
    checks++;
    if (max_err > 0.55) failures++;
    $display("max |error| against exact soft-XOR: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
