// cnu_fb: pipelined forward-backward check node unit for the sum-product
// algorithm, built from CRI soft-XOR cells (softxor_cri).
//
// One check node row of ROW_LEN positions arrives as ROW_LEN/RATE groups of
// RATE messages, one group per cycle while in_valid is high (RATE is the
// "CNU rate"). A position whose in_mask bit is low is a '-' (unconnected)
// entry of the base matrix; it is treated as the neutral element of the
// soft-XOR and its output is meaningless.
//
// Forward stage: a chain of RATE soft-XORs computes the running prefix
// f_i = u_1 [+] ... [+] u_i. For every position the incoming message u_i and
// the prefix of the positions before it (f_{i-1}) are stored in a buffer of
// G = ROW_LEN/RATE entries.
//
// Backward and merge stage: after the last group of a row, the buffer is read
// back in reverse group order, one group per cycle. A chain of RATE backward
// soft-XORs builds the suffix b_i = u_i [+] ... [+] u_last, and RATE merge
// soft-XORs form the extrinsic output f_{i-1} [+] b_{i+1} of each position.
//
// The buffer is shared by two rows: the next row is written into exactly the
// entry the backward stage reads in the same cycle, so the write direction
// alternates from row to row. Rows can therefore follow each other with no
// gap, and the unit holds one row of inputs plus one row of prefixes plus the
// running suffix register.
//
// Timing: the output group for the last input group of a row is valid two
// cycles after that group was presented; the G output groups of a row follow
// on consecutive cycles in reverse order. out_last marks the group holding
// the row's last position (the first group out), out_first the group holding
// position 0 (the last group out). Lanes within a group keep their order.
//
// The forward/backward/merge split, the reverse output order, the first/last
// flags and the RATE parameter follow the source design. The alternating
// buffer addressing, the handling of '-' positions through a mask, and the
// two-cycle latency are this design's choices.
//
// rst_n is both the asynchronous reset and the disable condition of the
// assertion; lint reports that mixed use, and it is intended.
module cnu_fb #(
  parameter int RATE      = ldpc_pkg::CNU_RATE_DEF,
  parameter int ROW_LEN   = ldpc_pkg::NB,
  parameter int W         = ldpc_pkg::NOF_BITS_DEF,
  parameter int FRAC_BITS = ldpc_pkg::FRAC_BITS_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [RATE-1:0]     in_mask,
  input  logic signed [W-1:0] in_msg  [RATE],
  output logic                out_valid,
  output logic                out_first,
  output logic                out_last,
  output logic signed [W-1:0] out_msg [RATE]
);

  localparam int G   = ROW_LEN / RATE;
  localparam int GW  = (G > 1) ? $clog2(G) : 1;
  localparam int MW  = W - 1;
  localparam int OFF = ldpc_pkg::softxor_offset(FRAC_BITS);

  // Sign-magnitude value; has = 0 marks the neutral element (no operand yet)
  typedef struct packed {
    logic          has;
    logic          s;
    logic [MW-1:0] m;
  } sm_t;

  typedef struct packed {
    logic [RATE-1:0] mask;
    sm_t  [RATE-1:0] u;    // incoming messages
    sm_t  [RATE-1:0] fp;   // prefix of all positions before this one
  } entry_t;

  function automatic sm_t to_sm(logic signed [W-1:0] x);
    sm_t r;
    r.has = 1'b1;
    r.s   = x[W-1];
    if (!x[W-1])                     r.m = x[MW-1:0];
    else if (x == {1'b1, {MW{1'b0}}}) r.m = {MW{1'b1}};   // saturate -2^(W-1)
    else                             r.m = MW'(-x);
    return r;
  endfunction

  // the 'has' flag is not needed to convert back, so lint reports it unused
  function automatic logic signed [W-1:0] to_tc(sm_t v);
    logic signed [W-1:0] mag;
    mag = {1'b0, v.m};
    return v.s ? -mag : mag;
  endfunction

  // ---------------------------------------------------------------- forward
  logic [GW-1:0] in_cnt;
  logic          dir_q;       // write direction of the row being received
  sm_t           f_q;         // prefix carried between groups
  entry_t        buf_q [G];

  sm_t pre [RATE+1];
  sm_t val [RATE];
  sm_t fx  [RATE];
  logic          fx_s [RATE];
  logic [MW-1:0] fx_m [RATE];

  assign pre[0] = (in_cnt == '0) ? '0 : f_q;

  for (genvar j = 0; j < RATE; j++) begin : g_fwd
    assign val[j] = to_sm(in_msg[j]);
    softxor_cri #(.MAG_BITS(MW), .OFFSET(OFF)) u_sx (
      .a_sign(pre[j].s), .a_mag(pre[j].m),
      .b_sign(val[j].s), .b_mag(val[j].m),
      .y_sign(fx_s[j]),  .y_mag(fx_m[j])
    );
    assign fx[j] = '{has: 1'b1, s: fx_s[j], m: fx_m[j]};
    assign pre[j+1] = !in_mask[j] ? pre[j] : (pre[j].has ? fx[j] : val[j]);
  end

  entry_t        wentry;
  logic [GW-1:0] waddr;

  always_comb begin
    wentry.mask = in_mask;
    for (int j = 0; j < RATE; j++) begin
      wentry.u[j]  = val[j];
      wentry.fp[j] = pre[j];
    end
    waddr = dir_q ? in_cnt : GW'(G - 1 - int'(in_cnt));
  end

  // ------------------------------------------------------ backward and merge
  logic          bw_act;
  logic [GW-1:0] bw_cnt;
  logic          bw_dir;      // direction the row being read was written in
  sm_t           b_q;         // suffix carried between groups
  logic [GW-1:0] raddr;
  entry_t        rentry;

  sm_t suf [RATE+1];
  sm_t bx  [RATE];
  sm_t mx  [RATE];
  logic          bx_s [RATE], mx_s [RATE];
  logic [MW-1:0] bx_m [RATE], mx_m [RATE];
  sm_t res [RATE];

  assign raddr     = bw_dir ? GW'(G - 1 - int'(bw_cnt)) : bw_cnt;
  assign rentry    = buf_q[raddr];
  assign suf[RATE] = (bw_cnt == '0) ? '0 : b_q;

  for (genvar j = RATE - 1; j >= 0; j--) begin : g_bwd
    softxor_cri #(.MAG_BITS(MW), .OFFSET(OFF)) u_sx_b (
      .a_sign(rentry.u[j].s), .a_mag(rentry.u[j].m),
      .b_sign(suf[j+1].s),    .b_mag(suf[j+1].m),
      .y_sign(bx_s[j]),       .y_mag(bx_m[j])
    );
    softxor_cri #(.MAG_BITS(MW), .OFFSET(OFF)) u_sx_m (
      .a_sign(rentry.fp[j].s), .a_mag(rentry.fp[j].m),
      .b_sign(suf[j+1].s),     .b_mag(suf[j+1].m),
      .y_sign(mx_s[j]),        .y_mag(mx_m[j])
    );
    assign bx[j] = '{has: 1'b1, s: bx_s[j], m: bx_m[j]};
    assign mx[j] = '{has: 1'b1, s: mx_s[j], m: mx_m[j]};
    assign suf[j] = !rentry.mask[j] ? suf[j+1]
                  : (suf[j+1].has ? bx[j] : rentry.u[j]);
    always_comb begin
      if (rentry.fp[j].has && suf[j+1].has) res[j] = mx[j];
      else if (rentry.fp[j].has)            res[j] = rentry.fp[j];
      else if (suf[j+1].has)                res[j] = suf[j+1];
      else                                  res[j] = '0;
    end
  end

  // ------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt    <= '0;
      dir_q     <= 1'b1;
      bw_act    <= 1'b0;
      bw_cnt    <= '0;
      bw_dir    <= 1'b1;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= bw_act;
      if (bw_act) begin
        out_last  <= (bw_cnt == '0);
        out_first <= (int'(bw_cnt) == G - 1);
        if (int'(bw_cnt) == G - 1) begin
          bw_act <= 1'b0;
          bw_cnt <= '0;
        end else begin
          bw_cnt <= bw_cnt + 1'b1;
        end
      end
      if (in_valid) begin
        if (int'(in_cnt) == G - 1) begin
          in_cnt <= '0;
          dir_q  <= ~dir_q;
          bw_act <= 1'b1;
          bw_cnt <= '0;
          bw_dir <= dir_q;
        end else begin
          in_cnt <= in_cnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      buf_q[waddr] <= wentry;
      f_q          <= pre[RATE];
    end
    if (bw_act) b_q <= suf[0];
    for (int j = 0; j < RATE; j++) out_msg[j] <= to_tc(res[j]);
  end

  // A new row may only finish after the previous row has been read back
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n)
      (in_valid && int'(in_cnt) == G - 1 && bw_act) |-> (int'(bw_cnt) == G - 1);
  endproperty
  a_no_overrun: assert property (p_no_overrun);

endmodule
