// h_rom: read-only store of the base parity check matrix.
//
// Only the non-zero entries of the base matrix are stored, in row-major
// order (79 words for the 802.11n n = 1944, rate 5/6 code). Each word holds
// the 7-bit right-rotation of the identity block and 2 extra bits that count
// the '-' (all-zero) positions following the entry, so the controller knows
// how many positions to leave empty before it takes the next word.
//
// NPORTS independent asynchronous read ports let the controller look at the
// next NPORTS words in one cycle (one per CNU lane). An address beyond the
// last word reads as zero. The image is computed at elaboration from the base
// matrix in ldpc_pkg.
//
// Storing only the non-zero entries plus skip bits follows the source design;
// the exact meaning of the skip field and the multiple read ports are this
// design's choices.
module h_rom
  import ldpc_pkg::*;
#(
  parameter int NPORTS = CNU_RATE_DEF
) (
  input  logic [ROM_AW-1:0] addr [NPORTS],
  output hrom_word_t        data [NPORTS]
);

  localparam hrom_image_t IMAGE = build_hrom();

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    assign data[p] = (int'(addr[p]) < H_ENTRIES) ? hrom_word_t'(IMAGE[addr[p]]) : '0;
  end

endmodule
