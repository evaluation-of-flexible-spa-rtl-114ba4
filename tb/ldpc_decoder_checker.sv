// ldpc_decoder_checker: drives one ldpc_decoder with the given parameters
// through three frames and checks it against a reference decoder written
// here (same fixed-point rules as in tb_ldpc_decoder).
//
// Frames: random channel LLRs over the full W-bit range, then two noisy
// all-zero codewords (BPSK over AWGN, sigma 0.49 and 0.55, LLRs scaled by
// 2^FRAC and saturated). Every output LLR and hard decision is compared, the
// number of output words must be G = 24 / R, and the start-to-done time must
// be ITER * (4G + G + 2) + G cycles. The same mechanism counters as in the
// full-size test are kept (row overlap in the CNUs, '-' positions, VNU
// bypass, both sum buffers, rotations, corrected errors); one that never
// happens counts a failure. Ports: the clock in; checks, failures and
// finished out. The checker resets its decoder itself.
module ldpc_decoder_checker #(
  parameter int R    = 4,
  parameter int W    = 7,
  parameter int FRAC = 4,
  parameter int ITER = 10
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  import ldpc_pkg::*;
  localparam int G   = NB / R;
  localparam int GW  = (G > 1) ? $clog2(G) : 1;
  localparam int SW  = W;
  localparam int OFF = softxor_offset(FRAC);
  localparam int MAXM = (1 << (W - 1)) - 1;

  logic rst_n = 0;
  logic load_valid = 0, start = 0;
  logic [GW-1:0] load_addr = '0;
  logic [W-1:0] load_llr [R][Z];
  logic busy, done, out_valid;
  logic [GW-1:0] out_addr;
  logic [W-1:0] out_llr [R][Z];
  logic [R-1:0][Z-1:0] out_hard;

  ldpc_decoder #(.CNU_RATE(R), .NOF_BITS(W), .FRAC_BITS(FRAC), .SUM_BITS(SW), .ITERATIONS(ITER))
    dut (.*);

  initial begin checks = 0; failures = 0; finished = 0; end
  int n_overlap = 0, n_masked = 0, n_bypass = 0, n_buf0 = 0, n_buf1 = 0, n_rot = 0, n_corrected = 0;

  // ---------------------------------------------------------- reference
  int ch   [NB][Z];
  int c2v  [MB][NB][Z];
  int prev [NB][Z];
  int cur  [NB][Z];
  int app  [NB][Z];

  function automatic int sat(int x, int bits);
    int mx = (1 << (bits - 1)) - 1;
    int mn = -(1 << (bits - 1));
    return (x > mx) ? mx : (x < mn) ? mn : x;
  endfunction

  function automatic int sxor(int a, int b);
    int ma = (a < 0) ? -a : a;
    int mb = (b < 0) ? -b : b;
    int m  = (ma < mb) ? ma : mb;
    int l  = (ma + mb) / 2 - OFF;
    if (l >= 0 && l < m) m = l;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  function automatic int clip(int v);
    return (v < -MAXM) ? -MAXM : v;
  endfunction

  // loop bounds held in variables so the reference loops stay loops
  int nb_v = NB, mb_v = MB, z_v = Z, it_v = ITER;

  task automatic reference();
    bit touched [NB];
    int v2c [NB][Z];
    for (int it = 0; it < it_v; it++) begin
      for (int c = 0; c < nb_v; c++) touched[c] = 0;
      for (int r = 0; r < mb_v; r++) begin
        int nw [NB][Z];
        for (int c = 0; c < nb_v; c++)
          if (HBASE[r*NB + c] >= 0)
            for (int n = 0; n < z_v; n++)
              v2c[c][n] = (it == 0) ? ch[c][n] : sat(ch[c][n] + prev[c][n] - c2v[r][c][n], W);
        for (int i = 0; i < z_v; i++) begin
          int vals [NB];
          for (int c = 0; c < nb_v; c++)
            if (HBASE[r*NB + c] >= 0) vals[c] = clip(v2c[c][(i + HBASE[r*NB + c]) % Z]);
          for (int p = 0; p < nb_v; p++) if (HBASE[r*NB + p] >= 0) begin
            bit hl = 0, hr = 0;
            int lv = 0, rv = 0, o;
            for (int q = 0; q < p; q++) if (HBASE[r*NB + q] >= 0) begin
              lv = hl ? sxor(lv, vals[q]) : vals[q]; hl = 1;
            end
            for (int q = nb_v - 1; q > p; q--) if (HBASE[r*NB + q] >= 0) begin
              rv = hr ? sxor(vals[q], rv) : vals[q]; hr = 1;
            end
            o = (hl && hr) ? sxor(lv, rv) : hl ? lv : hr ? rv : 0;
            nw[p][(i + HBASE[r*NB + p]) % Z] = o;
          end
        end
        for (int c = 0; c < nb_v; c++) if (HBASE[r*NB + c] >= 0) begin
          for (int n = 0; n < z_v; n++) begin
            cur[c][n] = sat((touched[c] ? cur[c][n] : 0) + nw[c][n], SW);
            c2v[r][c][n] = nw[c][n];
          end
          touched[c] = 1;
        end
      end
      prev = cur;
    end
    for (int c = 0; c < nb_v; c++)
      for (int n = 0; n < z_v; n++) app[c][n] = sat(ch[c][n] + prev[c][n], W);
  endtask

  // ---------------------------------------------------------- channel
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // ---------------------------------------------------------- monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.cnu_in_valid && dut.cnu_valid) n_overlap++;
    if (dut.iss_valid && dut.iss_mask != '1) n_masked++;
    if (dut.iss_valid && dut.iss_first_iter) n_bypass++;
    if (dut.cnu_valid && !dut.wr_buf) n_buf0++;
    if (dut.cnu_valid &&  dut.wr_buf) n_buf1++;
    if (dut.iss_valid && dut.iss_shift[0] != '0) n_rot++;
  end

  int outs;
  always @(negedge clk) if (out_valid) begin
    outs++;
    for (int l = 0; l < R; l++) begin
      automatic int c = int'(out_addr) * R + l;
      for (int n = 0; n < Z; n++) begin
        checks += 2;
        if ($signed(out_llr[l][n]) != app[c][n]) begin
          failures++;
          if (failures < 10) $display("FAIL column %0d vn %0d: llr %0d expected %0d", c, n, $signed(out_llr[l][n]), app[c][n]);
        end
        if (out_hard[l][n] != (app[c][n] < 0)) failures++;
      end
    end
  end

  task automatic run_frame(input int kind, input real sigma);
    int errs_in, errs_out, t0, t1;
    errs_in = 0; errs_out = 0;
    for (int c = 0; c < nb_v; c++)
      for (int n = 0; n < z_v; n++) begin
        if (kind == 0) ch[c][n] = $urandom_range(0, 2 * MAXM + 1) - (MAXM + 1);
        else begin
          real y = 1.0 + sigma * gauss();
          real llr = 2.0 * y / (sigma * sigma) * real'(1 << FRAC);
          ch[c][n] = sat(int'(llr), W);
        end
        if (ch[c][n] < 0) errs_in++;
      end
    reference();
    for (int c = 0; c < nb_v; c++) for (int n = 0; n < z_v; n++) if (app[c][n] < 0) errs_out++;
    if (kind != 0) begin
      $display("R=%0d W=%0d ITER=%0d frame sigma=%f: %0d channel bit errors, %0d after decoding", R, W, ITER, sigma, errs_in, errs_out);
      if (errs_out < errs_in) n_corrected += errs_in - errs_out;
    end
    // load
    for (int g = 0; g < G; g++) begin
      @(negedge clk);
      load_valid = 1; load_addr = GW'(g);
      for (int l = 0; l < R; l++) for (int n = 0; n < z_v; n++) load_llr[l][n] = W'(ch[g*R + l][n]);
    end
    @(negedge clk); load_valid = 0;
    outs = 0;
    start = 1; @(posedge clk); t0 = $time; @(negedge clk); start = 0;
    @(posedge done); t1 = $time;
    repeat (3) @(negedge clk);
    checks += 2;
    if (outs != G) begin failures++; $display("FAIL %0d output words", outs); end
    if ((t1 - t0) / 10 != ITER * (MB*G + G + 2) + G) begin
      failures++;
      $display("FAIL start to done %0d cycles", (t1 - t0) / 10);
    end
    $display("R=%0d W=%0d ITER=%0d start to done: %0d cycles (%0d per iteration)", R, W, ITER, (t1 - t0) / 10, MB*G + G + 2);
  endtask

  initial begin
    for (int l = 0; l < R; l++) for (int n = 0; n < Z; n++) load_llr[l][n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0, 0.0);
    run_frame(1, 0.49);
    run_frame(1, 0.55);
    $display("R=%0d W=%0d ITER=%0d overlap=%0d masked=%0d bypass=%0d buf0=%0d buf1=%0d rot=%0d corrected=%0d",
             R, W, ITER, n_overlap, n_masked, n_bypass, n_buf0, n_buf1, n_rot, n_corrected);
    checks += 7;
    if (n_overlap == 0) failures++;
    if (n_masked == 0) failures++;
    if (n_bypass == 0) failures++;
    if (n_buf0 == 0) failures++;
    if (n_buf1 == 0) failures++;
    if (n_rot == 0) failures++;
    if (n_corrected == 0) failures++;
    finished = 1;
  end
endmodule
