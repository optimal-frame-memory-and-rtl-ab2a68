// index_table: one entry per BAB of the largest VOP, giving the BAB's class
// and, for a boundary BAB, the tile of the alpha frame memory that holds it.
//
// Entry format (1 + TILE_W bits, TILE_W = ceil(log2(P*Q/2))):
//   boundary BAB      {1'b1, tile index}
//   non-boundary BAB  {1'b0, O/T, zeros}  with O/T = 0 for opaque, 1 for
//                                        transparent
// For the 1920x1088 maximum VOP (P=120, Q=68) this is 8160 entries of
// 13 bits; for QCIF (11x9) it would be 99 entries of 7 bits.
//
// Interface: one write port and one read port. The table encodes and decodes
// the entry itself, so users see a class and a tile index. Timing: writes
// take effect at the clock edge; reads are synchronous, rcls/rtile are valid
// the cycle after re. The format, sizes and the O/T coding follow the index
// table as described; the two-port organisation is this design's choice.
module index_table
  import shape_pkg::*;
#(
  parameter int unsigned P_MAX = 120,
  parameter int unsigned Q_MAX = 68,
  localparam int unsigned ENTRIES = P_MAX * Q_MAX,
  localparam int unsigned IDX_W   = clog2_min1(ENTRIES),
  localparam int unsigned TILE_W  = clog2_min1(num_tiles(P_MAX, Q_MAX)),
  localparam int unsigned ENTRY_W = 1 + TILE_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [IDX_W-1:0]  waddr,
  input  bab_class_e        wcls,
  input  logic [TILE_W-1:0] wtile,
  input  logic              re,
  input  logic [IDX_W-1:0]  raddr,
  output bab_class_e        rcls,
  output logic [TILE_W-1:0] rtile
);

  logic [ENTRY_W-1:0] mem [ENTRIES];
  logic [ENTRY_W-1:0] wentry, rentry;

  always_comb begin
    unique case (wcls)
      BAB_BOUNDARY:    wentry = {1'b1, wtile};
      BAB_OPAQUE:      wentry = {2'b00, {(ENTRY_W-2){1'b0}}};
      default:         wentry = {2'b01, {(ENTRY_W-2){1'b0}}};
    endcase
  end

  always_ff @(posedge clk) begin
    if (we && waddr < IDX_W'(ENTRIES)) mem[waddr] <= wentry;
    if (re) rentry <= mem[raddr];
  end

  always_comb begin
    rtile = rentry[TILE_W-1:0];
    if (rentry[ENTRY_W-1])        rcls = BAB_BOUNDARY;
    else if (rentry[ENTRY_W-2])   rcls = BAB_TRANSPARENT;
    else                          rcls = BAB_OPAQUE;
  end

endmodule
