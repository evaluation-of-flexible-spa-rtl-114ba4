// tb_cnu_fb: self-checking test of the forward-backward check node unit at
// CNU rates 1, 4 and 8 (see cnu_fb_checker). Rows follow each other back to
// back and with gaps, with random unconnected positions; outputs, their order,
// flags and latency are all checked.
module tb_cnu_fb;
  logic clk = 0, rst_n = 0;
  int c1, f1, b1, m1, c4, f4, b4, m4, c8, f8, b8, m8;
  logic d1, d4, d8;
  int checks, failures;

  always #5 clk = ~clk;

  cnu_fb_checker #(.RATE(1)) u_r1 (.clk, .rst_n, .checks(c1), .failures(f1), .back_to_back(b1), .masked(m1), .finished(d1));
  cnu_fb_checker #(.RATE(4)) u_r4 (.clk, .rst_n, .checks(c4), .failures(f4), .back_to_back(b4), .masked(m4), .finished(d4));
  cnu_fb_checker #(.RATE(8)) u_r8 (.clk, .rst_n, .checks(c8), .failures(f8), .back_to_back(b8), .masked(m8), .finished(d8));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d1 && d4 && d8);
    checks   = c1 + c4 + c8 + 3;
    failures = f1 + f4 + f8;
    // the mechanisms must have occurred: back-to-back rows and '-' positions
    if (b1 == 0 || b4 == 0 || b8 == 0) failures++;
    if (m1 == 0 || m4 == 0 || m8 == 0) failures++;
    if (c1 < 1000 || c4 < 1000) failures++;
    $display("back-to-back rows: %0d %0d %0d, unconnected positions: %0d %0d %0d", b1, b4, b8, m1, m4, m8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c4 + c8, f1 + f4 + f8 + 1);
    $finish;
  end
endmodule
