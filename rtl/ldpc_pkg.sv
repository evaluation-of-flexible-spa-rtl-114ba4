// ldpc_pkg: constants and types shared by the flooding SPA LDPC decoder.
//
// The decoder targets the IEEE 802.11n quasi-cyclic code with block length
// 1944 and code rate 5/6: a base matrix of MB x NB = 4 x 24 entries, each
// entry a right-rotated Z x Z identity (Z = 81) or an all-zero block ('-').
// HBASE below is that base matrix (shift value, or -1 for '-').
//
// Messages are NOF_BITS-wide two's complement fixed point numbers with
// FRAC_BITS fraction bits (7 bits: sign, 2 integer bits, 4 fraction bits).
// The soft-XOR offset 0.8 is rounded to that fraction resolution.
//
// The H ROM does not hold the '-' entries: it holds one word per non-zero
// entry, a 7-bit shift and a 2-bit count of the '-' positions that follow
// that entry in row-major order. The ROM image is computed here from HBASE.
package ldpc_pkg;

  // Code structure (802.11n, n = 1944, rate 5/6)
  localparam int Z          = 81;   // sub-block size
  localparam int SUB        = 27;   // width of one sub-RAM / CNU bank, in VNs
  localparam int NSUB       = Z / SUB;
  localparam int MB         = 4;    // base-matrix rows (check node groups)
  localparam int NB         = 24;   // base-matrix columns (variable node groups)
  localparam int SHIFT_BITS = 7;    // enough for shifts 0..80 (barrel shifter on 128)
  localparam int SKIP_BITS  = 2;    // '-' entries skipped after a ROM word

  // Default datapath configuration
  localparam int NOF_BITS_DEF   = 7;
  localparam int FRAC_BITS_DEF  = 4;
  localparam int CNU_RATE_DEF   = 4;
  localparam int ITERATIONS_DEF = 10;

  typedef int hbase_t [MB*NB];

  localparam hbase_t HBASE = '{
    13, 48, 80, 66,  4, 74,  7, 30, 76, 52, 37, 60, -1, 49, 73, 31, 74, 73, 23, -1,  1,  0, -1, -1,
    69, 63, 74, 56, 64, 77, 57, 65,  6, 16, 51, -1, 64, -1, 68,  9, 48, 62, 54, 27, -1,  0,  0, -1,
    51, 15,  0, 80, 24, 25, 42, 54, 44, 71, 71,  9, 67, 35, -1, 58, -1, 29, -1, 53,  0, -1,  0,  0,
    16, 29, 36, 41, 44, 56, 59, 37, 50, 24, -1, 65,  4, 65, 52, -1,  4, -1, 73, 52,  1, -1, -1,  0
  };

  // Number of non-zero base-matrix entries (79 for this code)
  function automatic int count_entries();
    int n = 0;
    for (int i = 0; i < MB*NB; i++) if (HBASE[i] >= 0) n++;
    return n;
  endfunction

  localparam int H_ENTRIES = count_entries();
  localparam int ROM_AW    = $clog2(H_ENTRIES + 1);

  typedef struct packed {
    logic [SKIP_BITS-1:0]  skip;   // '-' positions following this entry
    logic [SHIFT_BITS-1:0] shift;  // right-rotation of the identity
  } hrom_word_t;

  typedef logic [H_ENTRIES-1:0][SKIP_BITS+SHIFT_BITS-1:0] hrom_image_t;

  // ROM image: one word per non-zero entry, in row-major order.
  function automatic hrom_image_t build_hrom();
    hrom_image_t img;
    hrom_word_t  w;
    int k = -1;
    img = '0;
    w   = '0;
    for (int i = 0; i < MB*NB; i++) begin
      if (HBASE[i] >= 0) begin
        if (k >= 0) img[k] = w;
        k++;
        w.shift = SHIFT_BITS'(HBASE[i]);
        w.skip  = '0;
      end else begin
        w.skip = w.skip + 1'b1;
      end
    end
    img[k] = w;
    return img;
  endfunction

  // Soft-XOR offset 0.8 in units of 2^-frac, rounded to nearest
  function automatic int softxor_offset(int frac);
    return (8 * (1 << frac) + 5) / 10;
  endfunction

endpackage
