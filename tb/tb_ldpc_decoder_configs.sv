// tb_ldpc_decoder_configs: end-to-end tests of the decoder in the other
// configurations it is meant to be built in: CNU rate 1 and 8 (7-bit
// messages, 10 iterations), and 6-bit and 5-bit messages (3 and 2 fraction
// bits, always 2 integer bits) with 12 iterations at CNU rate 4.
//
// Each configuration is a separate ldpc_decoder_checker running in parallel
// with the others on the same clock; the test waits for all of them and adds
// up their checks and failures. At rate 1 an iteration takes 4*24 + 24 + 2 =
// 122 cycles, at rate 8 4*3 + 3 + 2 = 17 cycles.
module tb_ldpc_decoder_configs;
  localparam int NCFG = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  int   chk  [NCFG];
  int   fail [NCFG];
  logic fin  [NCFG];

  ldpc_decoder_checker #(.R(1), .W(7), .FRAC(4), .ITER(10)) u_rate1 (
    .clk, .checks(chk[0]), .failures(fail[0]), .finished(fin[0]));
  ldpc_decoder_checker #(.R(8), .W(7), .FRAC(4), .ITER(10)) u_rate8 (
    .clk, .checks(chk[1]), .failures(fail[1]), .finished(fin[1]));
  ldpc_decoder_checker #(.R(4), .W(6), .FRAC(3), .ITER(12)) u_bits6 (
    .clk, .checks(chk[2]), .failures(fail[2]), .finished(fin[2]));
  ldpc_decoder_checker #(.R(4), .W(5), .FRAC(2), .ITER(12)) u_bits5 (
    .clk, .checks(chk[3]), .failures(fail[3]), .finished(fin[3]));

  int checks, failures;

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
  endfunction

  initial begin
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
