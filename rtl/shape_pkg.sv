// shape_pkg: types, constants and sizing functions shared by the alpha-plane
// transfer and storage blocks of the MPEG-4 binary shape encoder front end.
//
// A binary alpha block (BAB) is 16x16 one-bit pixels; one BAB row is packed
// into a 16-bit word with the leftmost pixel in bit 15 and opaque = 1
// (the packing of the run 0x3FFF for a row of two transparent pixels followed
// by fourteen opaque ones).
//
// Sizing follows the index-table arithmetic: for a maximum VOP of
// 16P x 16Q pixels the index table holds P*Q entries of
// 1 + ceil(log2(P*Q/2)) bits, and the compressed alpha frame memory holds
// P*Q/2 tiles of 16 words x 16 bits (boundary BABs never exceed half of a
// VOP). The bank address of a tile row is (tile >> 2) * 16 + row and the bank
// number is the two LSBs of the tile index.
package shape_pkg;

  localparam int unsigned BAB_SIZE = 16;             // pixels per BAB side
  typedef logic [BAB_SIZE-1:0] bab_row_t;            // one packed BAB row
  typedef bab_row_t [BAB_SIZE-1:0] bab_t;           // a whole BAB, row 0 in bab[0]

  localparam bab_row_t ROW_TRANSPARENT = '0;
  localparam bab_row_t ROW_OPAQUE      = '1;

  // BAB class kept in the index table and produced by mode decision.
  typedef enum logic [1:0] {
    BAB_TRANSPARENT = 2'd0,
    BAB_OPAQUE      = 2'd1,
    BAB_BOUNDARY    = 2'd2
  } bab_class_e;

  // bab_type codes of the non-boundary coding modes (MPEG-4 BAB coding modes).
  localparam logic [2:0] BAB_TYPE_TRANSPARENT = 3'd2;
  localparam logic [2:0] BAB_TYPE_OPAQUE      = 3'd3;

  // Memory map of the shape encoder bus slave (offsets inside its 1 KiB
  // slot). A run with length L is written to LEN_OFF + L, L = 1..16.
  localparam int unsigned SLOT_BITS = 10;
  localparam logic [SLOT_BITS-1:0] CTRL_OFF = 10'h000;  // VOP start / size
  localparam logic [SLOT_BITS-1:0] LEN_OFF  = 10'h100;  // base for run lengths

  // ceil(log2(x)) for x >= 1, at least 1 so that widths are never zero.
  function automatic int unsigned clog2_min1(input int unsigned x);
    int unsigned r;
    r = 0;
    while ((64'd1 << r) < 64'(x)) r++;
    return (r == 0) ? 1 : r;
  endfunction

  // Number of tiles the compressed memory must hold for a P x Q BAB VOP.
  function automatic int unsigned num_tiles(input int unsigned p, input int unsigned q);
    return (p * q) / 2;
  endfunction

  // Minimum number of banks for a BME array of n processing elements, which
  // reads 16+n-1 reference bits per cycle that may straddle several BABs.
  function automatic int unsigned min_banks(input int unsigned n);
    int unsigned l;
    l = BAB_SIZE + n - 1;
    if ((l % BAB_SIZE) == 0 || (l % BAB_SIZE) == 1) return l / BAB_SIZE + 1;
    else return l / BAB_SIZE + 2;
  endfunction

endpackage
