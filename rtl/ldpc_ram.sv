// ldpc_ram: message memory built from NSUB sub-RAMs of equal width.
//
// Each word of the decoder's memories holds LANES column blocks of Z
// messages. The memory is split along the sub-block dimension into NSUB
// sub-RAMs of SUB messages each (three sub-RAMs of 27 for Z = 81), so that
// for the smaller 802.11n sub-block sizes (27, 54) the unused sub-RAMs can be
// switched off through sub_en. A disabled sub-RAM ignores writes and reads
// as zero.
//
// One write port and one read port. Writes take effect at the clock edge;
// the read is asynchronous (register-bank style), so a write and a read of
// the same word in one cycle return the old contents. A single-port use ties
// the two addresses together.
//
// Data layout: wdata/rdata[l][s][i] is lane l, sub-RAM s, message i, which is
// message s*SUB + i of column block l of the word.
//
// The split into three sub-RAMs follows the source design; the port
// structure, asynchronous read and zero read of a disabled sub-RAM are this
// design's choices. Contents are not reset.
module ldpc_ram #(
  parameter int DEPTH = ldpc_pkg::NB,
  parameter int LANES = ldpc_pkg::CNU_RATE_DEF,
  parameter int NSUB  = ldpc_pkg::NSUB,
  parameter int SUB   = ldpc_pkg::SUB,
  parameter int W     = ldpc_pkg::NOF_BITS_DEF,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic [NSUB-1:0]     sub_en,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic [W-1:0]        wdata [LANES][NSUB][SUB],
  input  logic [AW-1:0]       raddr,
  output logic [W-1:0]        rdata [LANES][NSUB][SUB]
);

  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    logic [LANES*SUB*W-1:0] mem [DEPTH];
    logic [LANES*SUB*W-1:0] wflat, rflat;

    for (genvar l = 0; l < LANES; l++) begin : g_lane
      for (genvar i = 0; i < SUB; i++) begin : g_msg
        assign wflat[(l*SUB+i)*W +: W] = wdata[l][s][i];
        assign rdata[l][s][i]          = sub_en[s] ? rflat[(l*SUB+i)*W +: W] : '0;
      end
    end

    always_ff @(posedge clk) begin
      if (we && sub_en[s]) mem[waddr] <= wflat;
    end

    assign rflat = mem[raddr];
  end

endmodule
