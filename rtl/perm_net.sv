// perm_net: cyclic-shift permutation network (barrel shifter) for one
// sub-block of Z messages.
//
// A base-matrix entry with shift s stands for the Z x Z identity rotated right
// by s: check node i of the block is connected to variable node (i + s) mod Z.
// In the forward direction (INVERSE = 0) the network routes variable node
// messages to check node order, out[i] = in[(i + s) mod Z]; with INVERSE = 1 it
// routes check node results back, out[(i + s) mod Z] = in[i].
//
// The rotation is built as SHIFT_BITS stages of 2:1 multiplexers; stage k
// rotates by 2^k mod Z when bit k of the shift is set, and all multiplexers of
// a stage share that select bit. For Z = 81 this gives 7 stages of 81
// multiplexers per message bit. Shift values must be below Z.
//
// Purely combinational. The staged multiplexer structure and the 7-bit
// control follow the source design; the direction convention of the rotation
// is taken from the IEEE 802.11n definition of the base matrix.
module perm_net #(
  parameter int Z          = ldpc_pkg::Z,
  parameter int W          = ldpc_pkg::NOF_BITS_DEF,
  parameter int SHIFT_BITS = ldpc_pkg::SHIFT_BITS,
  parameter bit INVERSE    = 1'b0
) (
  input  logic [SHIFT_BITS-1:0] shift,
  input  logic [W-1:0]          din  [Z],
  output logic [W-1:0]          dout [Z]
);

  // source index of output i for a rotation by 2^k mod Z
  function automatic int src_idx(int i, int k);
    int step = (1 << k) % Z;
    return INVERSE ? (i - step + Z) % Z : (i + step) % Z;
  endfunction

  always_comb begin
    logic [W-1:0] cur [Z];
    logic [W-1:0] nxt [Z];
    cur = din;
    for (int k = 0; k < SHIFT_BITS; k++) begin
      for (int i = 0; i < Z; i++) nxt[i] = shift[k] ? cur[src_idx(i, k)] : cur[i];
      cur = nxt;
    end
    dout = cur;
  end

endmodule
