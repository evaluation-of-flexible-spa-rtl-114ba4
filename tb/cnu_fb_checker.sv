// cnu_fb_checker: drives one cnu_fb instance with random check node rows and
// compares every output with a reference computed here.
//
// Rows of ROW_LEN random 7-bit messages with random '-' positions (at least
// two connected positions per row) are sent one group per cycle, mostly back
// to back and sometimes with idle cycles in between. For every connected
// position the expected output is the CRI soft-XOR of all other connected
// messages of the row, folded left-to-right for the positions before it and
// right-to-left for the positions after it. The checker also expects the
// groups of a row in reverse order on consecutive cycles, the first of them in
// the second cycle after the row's last input group, with out_last on the
// first group out and out_first on the last.
module cnu_fb_checker #(
  parameter int RATE = 1,
  parameter int ROWS = 60
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   back_to_back,
  output int   masked,
  output logic finished
);
  localparam int ROW_LEN = 24;
  localparam int G       = ROW_LEN / RATE;
  localparam int W       = 7;
  localparam int OFF     = 13;

  logic                in_valid;
  logic [RATE-1:0]     in_mask;
  logic signed [W-1:0] in_msg [RATE];
  logic                out_valid, out_first, out_last;
  logic signed [W-1:0] out_msg [RATE];

  cnu_fb #(.RATE(RATE), .ROW_LEN(ROW_LEN), .W(W), .FRAC_BITS(4)) dut (.*);

  typedef struct {
    int exp_val [ROW_LEN];
    bit msk     [ROW_LEN];
    int end_cyc;
  } row_t;

  row_t pending [$];
  int   cyc;

  function automatic int sx_mag(int a, int b);
    int m = (a < b) ? a : b;
    int l = (a + b) / 2 - OFF;
    if (l >= 0 && l < m) m = l;
    return m;
  endfunction

  // soft-XOR on signed integers (sign-magnitude inside)
  function automatic int sxor(int a, int b);
    int ma = (a < 0) ? -a : a;
    int mb = (b < 0) ? -b : b;
    int m  = sx_mag(ma, mb);
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // message as the CNU sees it: magnitude saturated to 63
  function automatic int clip(int v);
    return (v < -63) ? -63 : v;
  endfunction

  function automatic row_t make_row(input int vals [ROW_LEN], input bit msk [ROW_LEN]);
    row_t r;
    for (int p = 0; p < ROW_LEN; p++) begin
      bit hl = 0, hr = 0;
      int lv = 0, rv = 0;
      for (int q = 0; q < p; q++) if (msk[q]) begin
        lv = hl ? sxor(lv, clip(vals[q])) : clip(vals[q]); hl = 1;
      end
      for (int q = ROW_LEN - 1; q > p; q--) if (msk[q]) begin
        rv = hr ? sxor(clip(vals[q]), rv) : clip(vals[q]); hr = 1;
      end
      r.exp_val[p] = (hl && hr) ? sxor(lv, rv) : hl ? lv : hr ? rv : 0;
      r.msk[p]     = msk[p];
    end
    r.end_cyc = 0;
    return r;
  endfunction

  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // driver
  initial begin
    int vals [ROW_LEN];
    bit msk [ROW_LEN];
    row_t r;
    checks = 0; failures = 0; back_to_back = 0; masked = 0; finished = 0;
    in_valid = 0; in_mask = '0;
    for (int j = 0; j < RATE; j++) in_msg[j] = '0;
    @(posedge rst_n);
    for (int n = 0; n < ROWS; n++) begin
      int nv;
      bit gap;
      gap = ($urandom_range(0, 3) == 0);
      if (gap) repeat ($urandom_range(1, 5)) begin
        @(negedge clk); in_valid = 0;
      end else if (n > 0) back_to_back++;
      nv = 0;
      for (int p = 0; p < ROW_LEN; p++) begin
        // mostly full-scale values, sometimes small ones
        vals[p] = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 20) - 10 : $urandom_range(0, 127) - 64;
        msk[p]  = ($urandom_range(0, 5) != 0);
        nv += msk[p];
      end
      if (nv < 2) begin msk[0] = 1; msk[ROW_LEN-1] = 1; end
      for (int p = 0; p < ROW_LEN; p++) masked += !msk[p];
      r = make_row(vals, msk);
      for (int g = 0; g < G; g++) begin
        @(negedge clk);
        in_valid = 1;
        for (int j = 0; j < RATE; j++) begin
          in_msg[j]  = W'(vals[g*RATE + j]);
          in_mask[j] = msk[g*RATE + j];
        end
      end
      @(posedge clk);
      r.end_cyc = cyc;   // value of cyc before this edge updates it
      pending.push_back(r);
    end
    @(negedge clk); in_valid = 0;
    repeat (G + 5) @(negedge clk);
    checks++;
    if (pending.size() != 0) begin failures++; $display("FAIL rate %0d: %0d rows missing", RATE, pending.size()); end
    finished = 1;
  end

  // monitor: sample after each edge
  always @(negedge clk) if (rst_n) begin
    int t;
    bit expect_v;
    expect_v = 0; t = 0;
    if (pending.size() > 0) begin
      t = cyc - pending[0].end_cyc - 2;
      expect_v = (t >= 0 && t < G);
    end
    checks++;
    if (out_valid != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL rate %0d: out_valid=%0d expected %0d at cycle %0d", RATE, out_valid, expect_v, cyc);
    end
    if (expect_v && out_valid) begin
      int g;
      g = G - 1 - t;
      checks += 2;
      if (out_last != (t == 0)) failures++;
      if (out_first != (g == 0)) failures++;
      for (int j = 0; j < RATE; j++) if (pending[0].msk[g*RATE + j]) begin
        checks++;
        if (int'(out_msg[j]) != pending[0].exp_val[g*RATE + j]) begin
          failures++;
          if (failures < 10) $display("FAIL rate %0d: pos %0d got %0d exp %0d", RATE, g*RATE + j, out_msg[j], pending[0].exp_val[g*RATE + j]);
        end
      end
      if (t == G - 1) void'(pending.pop_front());
    end
  end
endmodule
