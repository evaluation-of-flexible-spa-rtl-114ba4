// ldpc_ctrl: controller of the flooding SPA decoder.
//
// Sequencing. After start, the controller runs ITERATIONS decoding
// iterations and then one output pass:
//   RUN    issue the base matrix row by row, RATE positions (one group) per
//          cycle, MB * G cycles (G = NB / RATE groups per row);
//   DRAIN  wait until the check node results of the last row have been
//          written back, so that the next iteration reads only complete
//          column sums (flooding schedule);
//   OUTPUT read the channel LLRs and final column sums, one group per cycle,
//          for the a-posteriori output; then pulse done.
//
// Read side. For every issued group it walks the H ROM: it looks at the next
// RATE ROM words and fills the RATE lanes; a word's skip count leaves that
// many following positions empty (mask bit low, '-' entries). It tells the
// datapath whether this is the first iteration (channel LLRs go straight to
// the check nodes) and which column-sum buffer holds the previous iteration.
//
// Write side. The check node unit returns each row as G groups in reverse
// order. The controller counts them, recalls the mask and shifts it stored
// for that group at issue time (needed by the inverse permutation), selects
// the column-sum buffer of the current iteration, and marks the first
// contribution to each column in the iteration (the sum then starts at zero).
// The two column-sum buffers swap roles every iteration.
//
// The schedule (fixed iteration count, row-wise processing, alternating sum
// buffers, ROM with skip bits) follows the source design; the drain phase,
// the output pass and the handshake (start/busy/done) are this design's.
//
// rst_n is both the asynchronous reset and the disable condition of the
// assertion; lint reports that mixed use, and it is intended.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int RATE       = CNU_RATE_DEF,
  parameter int ITERATIONS = ITERATIONS_DEF,
  localparam int G         = NB / RATE,
  localparam int GW        = (G > 1) ? $clog2(G) : 1,
  localparam int RW        = (MB > 1) ? $clog2(MB) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // H ROM
  output logic [ROM_AW-1:0]     rom_addr [RATE],
  input  hrom_word_t            rom_data [RATE],
  // read side
  output logic                  iss_valid,
  output logic [RW-1:0]         iss_row,
  output logic [GW-1:0]         rd_grp,
  output logic [RATE-1:0]       iss_mask,
  output logic [SHIFT_BITS-1:0] iss_shift [RATE],
  output logic                  iss_first_iter,
  output logic                  rd_buf,
  output logic                  out_phase,
  // write side
  input  logic                  cnu_valid,
  output logic [RW-1:0]         wr_row,
  output logic [GW-1:0]         wr_grp,
  output logic [RATE-1:0]       wr_mask,
  output logic [SHIFT_BITS-1:0] wr_shift [RATE],
  output logic [RATE-1:0]       wr_first_touch,
  output logic                  wr_buf,
  output logic [7:0]            iteration
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_OUTPUT} state_t;
  state_t state;

  logic [RW-1:0]         row_q;
  logic [GW-1:0]         grp_q;
  logic [ROM_AW-1:0]     ptr_q;
  logic [SKIP_BITS-1:0]  pend_q;
  logic [ROM_AW-1:0]     ptr_n;
  logic [SKIP_BITS-1:0]  pend_n;
  logic [7:0]            iter_q;
  logic [NB-1:0]         touched;
  logic                  rows_done;

  typedef struct packed {
    logic [RATE-1:0]                  mask;
    logic [RATE-1:0][SHIFT_BITS-1:0] shift;
  } grp_ctl_t;

  grp_ctl_t ctl_tab [MB*G];
  grp_ctl_t ctl_wr;

  // ------------------------------------------------------------ ROM walk
  for (genvar k = 0; k < RATE; k++) begin : g_rom
    assign rom_addr[k] = ptr_q + ROM_AW'(k);
  end

  always_comb begin
    int idx;
    logic [SKIP_BITS-1:0] pend;
    idx  = 0;
    pend = pend_q;
    for (int j = 0; j < RATE; j++) begin
      if (pend != '0) begin
        iss_mask[j]  = 1'b0;
        iss_shift[j] = '0;
        pend         = pend - 1'b1;
      end else begin
        iss_mask[j]  = 1'b1;
        iss_shift[j] = rom_data[idx].shift;
        pend         = rom_data[idx].skip;
        idx          = idx + 1;
      end
    end
    ptr_n  = ptr_q + ROM_AW'(idx);
    pend_n = pend;
  end

  // ------------------------------------------------------------ read side
  assign iss_valid      = (state == S_RUN);
  assign iss_row        = row_q;
  assign rd_grp         = grp_q;
  assign iss_first_iter = (iter_q == '0);
  assign out_phase      = (state == S_OUTPUT);
  // previous iteration's sums while running, final sums in the output pass
  assign rd_buf         = (state == S_OUTPUT) ? iter_q[0] : ~iter_q[0];
  assign busy           = (state != S_IDLE);
  assign iteration      = iter_q;

  always_comb begin
    for (int j = 0; j < RATE; j++) ctl_wr.shift[j] = iss_shift[j];
    ctl_wr.mask = iss_mask;
  end

  // ------------------------------------------------------------ write side
  grp_ctl_t ctl_rd;
  assign ctl_rd  = ctl_tab[int'(wr_row) * G + int'(wr_grp)];
  assign wr_mask = ctl_rd.mask;
  assign wr_buf  = iter_q[0];

  for (genvar j = 0; j < RATE; j++) begin : g_wr
    assign wr_shift[j]       = ctl_rd.shift[j];
    assign wr_first_touch[j] = ~touched[int'(wr_grp) * RATE + j];
  end

  assign rows_done = cnu_valid && (wr_grp == '0) && (int'(wr_row) == MB - 1);

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      row_q   <= '0;
      grp_q   <= '0;
      ptr_q   <= '0;
      pend_q  <= '0;
      iter_q  <= '0;
      wr_row  <= '0;
      wr_grp  <= GW'(G - 1);
      touched <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;

      // write side bookkeeping
      if (cnu_valid) begin
        for (int j = 0; j < RATE; j++)
          if (wr_mask[j]) touched[int'(wr_grp) * RATE + j] <= 1'b1;
        if (wr_grp == '0) begin
          wr_grp <= GW'(G - 1);
          wr_row <= (int'(wr_row) == MB - 1) ? '0 : wr_row + 1'b1;
        end else begin
          wr_grp <= wr_grp - 1'b1;
        end
      end

      unique case (state)
        S_IDLE: begin
          if (start) begin
            state   <= S_RUN;
            iter_q  <= '0;
            row_q   <= '0;
            grp_q   <= '0;
            ptr_q   <= '0;
            pend_q  <= '0;
            touched <= '0;
          end
        end
        S_RUN: begin
          ptr_q  <= ptr_n;
          pend_q <= pend_n;
          if (int'(grp_q) == G - 1) begin
            grp_q <= '0;
            if (int'(row_q) == MB - 1) begin
              row_q <= '0;
              state <= S_DRAIN;
            end else begin
              row_q <= row_q + 1'b1;
            end
          end else begin
            grp_q <= grp_q + 1'b1;
          end
        end
        S_DRAIN: begin
          if (rows_done) begin
            ptr_q   <= '0;
            pend_q  <= '0;
            touched <= '0;
            if (int'(iter_q) == ITERATIONS - 1) begin
              state <= S_OUTPUT;
            end else begin
              iter_q <= iter_q + 1'b1;
              state  <= S_RUN;
            end
          end
        end
        S_OUTPUT: begin
          if (int'(grp_q) == G - 1) begin
            grp_q <= '0;
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            grp_q <= grp_q + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_RUN) ctl_tab[int'(row_q) * G + int'(grp_q)] <= ctl_wr;
  end

  // The check node unit only returns results while an iteration is running
  a_no_stray_result: assert property (
    @(posedge clk) disable iff (!rst_n) cnu_valid |-> (state == S_RUN || state == S_DRAIN));

endmodule
