// tb_ldpc_decoder: end-to-end test of the decoder at its default parameters
// (CNU rate 4, 7-bit messages, 10 iterations, 802.11n n = 1944 rate 5/6).
//
// Three frames are decoded: one of random channel LLRs (exercises saturation
// and every sign pattern) and two noisy transmissions of the all-zero
// codeword over a BPSK/AWGN channel at different noise levels. For each frame
// a reference flooding decoder written here, with the same fixed-point rules
// (VN message sat(ch + sum - c2v), CRI soft-XOR folded left-to-right before a
// position and right-to-left after it, column sums accumulated row by row
// with saturation), computes the a-posteriori LLRs, and every output LLR and
// hard decision must match. The start-to-done cycle count must be
// ITER * (MB*G + G + 2) + G.
//
// Mechanisms that must each occur at least once: a row entering the CNUs while
// the previous row is leaving them, unconnected ('-') positions being
// skipped, the first-iteration bypass of the VNU, both column-sum buffers
// being accumulated, a non-zero rotation, and channel errors corrected.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  localparam int R = CNU_RATE_DEF, W = NOF_BITS_DEF, SW = NOF_BITS_DEF;
  localparam int ITER = ITERATIONS_DEF, G = NB / R;
  localparam int OFF = 13;

  logic clk = 0, rst_n = 0;
  logic load_valid = 0, start = 0;
  logic [$clog2(G)-1:0] load_addr = '0;
  logic [W-1:0] load_llr [R][Z];
  logic busy, done, out_valid;
  logic [$clog2(G)-1:0] out_addr;
  logic [W-1:0] out_llr [R][Z];
  logic [R-1:0][Z-1:0] out_hard;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
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
    return (v < -63) ? -63 : v;
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
        if (kind == 0) ch[c][n] = $urandom_range(0, 127) - 64;
        else begin
          real y = 1.0 + sigma * gauss();
          real llr = 2.0 * y / (sigma * sigma) * 16.0;
          ch[c][n] = sat(int'(llr), W);
        end
        if (ch[c][n] < 0) errs_in++;
      end
    reference();
    for (int c = 0; c < nb_v; c++) for (int n = 0; n < z_v; n++) if (app[c][n] < 0) errs_out++;
    if (kind != 0) begin
      $display("frame sigma=%f: %0d channel bit errors, %0d after decoding", sigma, errs_in, errs_out);
      if (errs_out < errs_in) n_corrected += errs_in - errs_out;
    end
    // load
    for (int g = 0; g < G; g++) begin
      @(negedge clk);
      load_valid = 1; load_addr = $clog2(G)'(g);
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
    $display("start to done: %0d cycles (%0d per iteration)", (t1 - t0) / 10, MB*G + G + 2);
  endtask

  initial begin
    for (int l = 0; l < R; l++) for (int n = 0; n < Z; n++) load_llr[l][n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0, 0.0);
    run_frame(1, 0.49);
    run_frame(1, 0.55);
    $display("overlap=%0d masked=%0d bypass=%0d buf0=%0d buf1=%0d rot=%0d corrected=%0d",
             n_overlap, n_masked, n_bypass, n_buf0, n_buf1, n_rot, n_corrected);
    checks += 7;
    if (n_overlap == 0) failures++;
    if (n_masked == 0) failures++;
    if (n_bypass == 0) failures++;
    if (n_buf0 == 0) failures++;
    if (n_buf1 == 0) failures++;
    if (n_rot == 0) failures++;
    if (n_corrected == 0) failures++;
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
