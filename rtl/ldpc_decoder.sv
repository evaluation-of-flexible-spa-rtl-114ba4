// ldpc_decoder: flooding sum-product (SPA) LDPC decoder for the IEEE 802.11n
// code with block length 1944 and rate 5/6, using CRI-approximated soft-XOR
// check node units in a forward-backward arrangement.
//
// Data path (one decoding iteration):
//   memories -> VNU (ch + sum_prev - c2v_old) -> permutation network ->
//   Z check node units -> inverse permutation network -> memories (c2v) and
//   VNU accumulators (column sums)
//
// Memories (register-bank arrays, each split into three 27-message sub-RAMs):
//   R0  channel LLRs, G words of CNU_RATE column blocks; loaded before start
//       and unchanged while decoding (single-port use).
//   R1  last check-to-variable message of every base-matrix position, in
//       variable node order; MB*G words.
//   R2, R3  column sums of check-to-variable messages; one is written
//       (accumulated) in an iteration while the other, holding the previous
//       iteration's sums, is read. They swap every iteration.
// The base matrix comes from h_rom; ldpc_ctrl sequences everything.
//
// Every cycle of an iteration, CNU_RATE base-matrix positions of one row are
// issued. A variable-to-check message is ch in the first iteration and
// sat(ch + sum_prev - c2v_old) after that; it is rotated into check node
// order, registered, and enters the Z check node units (one per check node
// of the 81-row block). Each CNU returns its row reversed, two cycles after
// the row's last group; results are rotated back, written to R1 and added to
// the column sums. An iteration takes MB*G issue cycles plus the time for the
// last row to leave the CNUs.
//
// Interface:
//   load_valid/load_addr/load_llr  write channel LLRs (G words of CNU_RATE x Z
//                                  messages, column block g*CNU_RATE + l in
//                                  lane l) while not busy.
//   start                          begin decoding (ITERATIONS iterations).
//   busy, done                     done pulses after the last output word.
//   out_valid/out_addr/out_llr/out_hard
//                                  G words of a-posteriori LLRs
//                                  sat(ch + sum) and their hard decisions
//                                  (1 = negative LLR = bit 1), one per cycle.
// Messages are NOF_BITS-bit two's complement with FRAC_BITS fraction bits.
//
// The architecture (Z CNUs in three banks of 27, two permutation networks,
// four RAMs of which two alternate as accumulators, ROM-driven control, fixed
// iteration count, flooding schedule) follows the source design. The
// pipeline register in front of the CNUs, the drain between iterations, the
// output pass and the load/start/done interface are this design's choices.
// The decoder supports the one code whose base matrix is in ldpc_pkg; the
// sub-RAM enables are all on for Z = 81.
//
// rst_n is both the asynchronous reset of the flip-flops and the disable
// condition of the assertions; lint reports that mixed use, and it is
// intended.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int CNU_RATE   = CNU_RATE_DEF,
  parameter int NOF_BITS   = NOF_BITS_DEF,
  parameter int FRAC_BITS  = FRAC_BITS_DEF,
  parameter int SUM_BITS   = NOF_BITS_DEF,
  parameter int ITERATIONS = ITERATIONS_DEF,
  localparam int R         = CNU_RATE,
  localparam int G         = NB / CNU_RATE,
  localparam int GW        = (G > 1) ? $clog2(G) : 1,
  localparam int RW        = (MB > 1) ? $clog2(MB) : 1,
  localparam int W         = NOF_BITS,
  localparam int SW        = SUM_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  // channel LLR load
  input  logic         load_valid,
  input  logic [GW-1:0] load_addr,
  input  logic [W-1:0] load_llr [R][Z],
  // control
  input  logic         start,
  output logic         busy,
  output logic         done,
  // a-posteriori output
  output logic         out_valid,
  output logic [GW-1:0] out_addr,
  output logic [W-1:0] out_llr  [R][Z],
  output logic [R-1:0][Z-1:0] out_hard
);

  localparam logic [NSUB-1:0] SUB_ON = '1;

  // ------------------------------------------------------------ control
  logic [ROM_AW-1:0]     rom_addr [R];
  hrom_word_t            rom_data [R];
  logic                  iss_valid, iss_first_iter, rd_buf, out_phase;
  logic [RW-1:0]         iss_row, wr_row;
  logic [GW-1:0]         rd_grp, wr_grp;
  logic [R-1:0]          iss_mask, wr_mask, wr_first_touch;
  logic [SHIFT_BITS-1:0] iss_shift [R];
  logic [SHIFT_BITS-1:0] wr_shift  [R];
  logic                  wr_buf, cnu_valid;
  logic [7:0]            iteration;

  h_rom #(.NPORTS(R)) u_rom (.addr(rom_addr), .data(rom_data));

  ldpc_ctrl #(.RATE(R), .ITERATIONS(ITERATIONS)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .rom_addr, .rom_data,
    .iss_valid, .iss_row, .rd_grp, .iss_mask, .iss_shift, .iss_first_iter,
    .rd_buf, .out_phase,
    .cnu_valid, .wr_row, .wr_grp, .wr_mask, .wr_shift, .wr_first_touch,
    .wr_buf, .iteration
  );

  // ------------------------------------------------------------ memories
  logic [W-1:0]  r0_wdata [R][NSUB][SUB];
  logic [W-1:0]  r0_rdata [R][NSUB][SUB];
  logic [W-1:0]  r1_wdata [R][NSUB][SUB];
  logic [W-1:0]  r1_rdata [R][NSUB][SUB];
  logic [SW-1:0] sum_wdata [R][NSUB][SUB];
  logic [SW-1:0] r2_rdata  [R][NSUB][SUB];
  logic [SW-1:0] r3_rdata  [R][NSUB][SUB];

  logic [GW-1:0] r0_addr;
  assign r0_addr = busy ? rd_grp : load_addr;

  ldpc_ram #(.DEPTH(G), .LANES(R), .W(W)) u_r0 (
    .clk, .sub_en(SUB_ON), .we(load_valid && !busy),
    .waddr(r0_addr), .wdata(r0_wdata), .raddr(r0_addr), .rdata(r0_rdata)
  );

  localparam int R1_DEPTH = MB * G;
  localparam int R1_AW    = (R1_DEPTH > 1) ? $clog2(R1_DEPTH) : 1;
  logic [R1_AW-1:0] r1_raddr, r1_waddr;
  assign r1_raddr = R1_AW'(int'(iss_row) * G + int'(rd_grp));
  assign r1_waddr = R1_AW'(int'(wr_row) * G + int'(wr_grp));

  ldpc_ram #(.DEPTH(R1_DEPTH), .LANES(R), .W(W)) u_r1 (
    .clk, .sub_en(SUB_ON), .we(cnu_valid),
    .waddr(r1_waddr), .wdata(r1_wdata), .raddr(r1_raddr), .rdata(r1_rdata)
  );

  // R2 and R3: the buffer being read for the previous sums is addressed by
  // the read side, the one being accumulated by the write side.
  logic [GW-1:0] r2_raddr, r3_raddr;
  assign r2_raddr = (rd_buf == 1'b0) ? rd_grp : wr_grp;
  assign r3_raddr = (rd_buf == 1'b1) ? rd_grp : wr_grp;

  ldpc_ram #(.DEPTH(G), .LANES(R), .W(SW)) u_r2 (
    .clk, .sub_en(SUB_ON), .we(cnu_valid && wr_buf == 1'b0),
    .waddr(wr_grp), .wdata(sum_wdata), .raddr(r2_raddr), .rdata(r2_rdata)
  );

  ldpc_ram #(.DEPTH(G), .LANES(R), .W(SW)) u_r3 (
    .clk, .sub_en(SUB_ON), .we(cnu_valid && wr_buf == 1'b1),
    .waddr(wr_grp), .wdata(sum_wdata), .raddr(r3_raddr), .rdata(r3_rdata)
  );

  // ------------------------------------------------------------ datapath
  logic [W-1:0] v2c     [R][Z];   // variable node order
  logic [W-1:0] v2c_rot [R][Z];   // check node order
  logic [W-1:0] cnu_in  [R][Z];
  logic [R-1:0] cnu_mask;
  logic         cnu_in_valid;
  logic [W-1:0] c2v_rot [R][Z];   // check node order
  logic [W-1:0] c2v     [R][Z];   // variable node order

  for (genvar l = 0; l < R; l++) begin : g_lane
    for (genvar i = 0; i < Z; i++) begin : g_vn
      localparam int S = i / SUB;
      localparam int K = i % SUB;
      logic [SW-1:0] acc_new;

      assign r0_wdata[l][S][K] = load_llr[l][i];
      assign r1_wdata[l][S][K] = c2v[l][i];
      assign sum_wdata[l][S][K] = wr_mask[l] ? acc_new
                                : (wr_buf ? r3_rdata[l][S][K] : r2_rdata[l][S][K]);

      vnu #(.W(W), .SUM_W(SW)) u_vnu (
        .first_iter (iss_first_iter && !out_phase),
        .ch         (r0_rdata[l][S][K]),
        .sum_prev   (rd_buf ? r3_rdata[l][S][K] : r2_rdata[l][S][K]),
        .c2v_old    (out_phase ? '0 : r1_rdata[l][S][K]),
        .v2c        (v2c[l][i]),
        .first_touch(wr_first_touch[l]),
        .acc_old    (wr_buf ? r3_rdata[l][S][K] : r2_rdata[l][S][K]),
        .c2v_new    (c2v[l][i]),
        .acc_new    (acc_new)
      );
    end

    perm_net #(.Z(Z), .W(W), .INVERSE(1'b0)) u_perm_fwd (
      .shift(iss_shift[l]), .din(v2c[l]), .dout(v2c_rot[l])
    );

    perm_net #(.Z(Z), .W(W), .INVERSE(1'b1)) u_perm_inv (
      .shift(wr_shift[l]), .din(c2v_rot[l]), .dout(c2v[l])
    );
  end

  // pipeline register between the permutation network and the CNUs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnu_in_valid <= 1'b0;
    else        cnu_in_valid <= iss_valid;
  end

  always_ff @(posedge clk) begin
    cnu_in   <= v2c_rot;
    cnu_mask <= iss_mask;
  end

  // Z check node units (three banks of 27)
  logic [Z-1:0] cnu_out_valid, cnu_out_first, cnu_out_last;

  for (genvar i = 0; i < Z; i++) begin : g_cnu
    logic signed [W-1:0] in_msg  [R];
    logic signed [W-1:0] out_msg [R];
    for (genvar l = 0; l < R; l++) begin : g_l
      assign in_msg[l]     = cnu_in[l][i];
      assign c2v_rot[l][i] = out_msg[l];
    end
    cnu_fb #(.RATE(R), .ROW_LEN(NB), .W(W), .FRAC_BITS(FRAC_BITS)) u_cnu (
      .clk, .rst_n,
      .in_valid(cnu_in_valid), .in_mask(cnu_mask), .in_msg(in_msg),
      .out_valid(cnu_out_valid[i]), .out_first(cnu_out_first[i]), .out_last(cnu_out_last[i]),
      .out_msg(out_msg)
    );
  end

  // all CNUs run in lock step
  assign cnu_valid = cnu_out_valid[0];

  // ------------------------------------------------------------ output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= out_phase;
  end

  always_ff @(posedge clk) begin
    out_addr <= rd_grp;
    out_llr  <= v2c;
    for (int l = 0; l < R; l++)
      for (int i = 0; i < Z; i++) out_hard[l][i] <= v2c[l][i][W-1];
  end

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    ((cnu_out_valid == '0) || (cnu_out_valid == '1)) &&
    ((cnu_out_first == '0) || (cnu_out_first == '1)) &&
    ((cnu_out_last  == '0) || (cnu_out_last  == '1)));

  // the CNU's row framing agrees with the controller's group count
  a_row_last: assert property (@(posedge clk) disable iff (!rst_n)
    cnu_valid |-> (cnu_out_last[0] == (int'(wr_grp) == G - 1)));
  a_row_first: assert property (@(posedge clk) disable iff (!rst_n)
    cnu_valid |-> (cnu_out_first[0] == (wr_grp == '0)));

  a_iter_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (int'(iteration) < ITERATIONS));

endmodule
