// alpha_frame_memory: the banked alpha frame memory.
//
// NUM_BANKS banks of 16-bit words, each with its own address and data bus, so
// that one row of up to NUM_BANKS different tiles can be read in the same
// cycle. A BAB row (16 one-bit pixels) is one word and a BAB occupies one
// tile of 16 consecutive words. Horizontally adjacent BABs sit in different
// banks, which lets a reference row that straddles two or three BABs be read
// in a single cycle.
//
// Size: with the compression of the alpha frame buffer only boundary BABs are
// stored, and they never exceed half of the BABs of a VOP, so the memory holds
// P*Q/2 tiles: for a 1920x1088 maximum VOP 4080 tiles, 1020 per bank,
// 16320 words per bank, half of an uncompressed alpha plane.
//
// Interface: per-bank arrays en/we/addr/wdata/rdata. Timing: as alpha_bank,
// reads return the cycle after the request. Four banks and the 16-bit width
// follow the design; the per-bank single port is this design's choice.
module alpha_frame_memory
  import shape_pkg::*;
#(
  parameter int unsigned P_MAX     = 120,
  parameter int unsigned Q_MAX     = 68,
  parameter int unsigned NUM_BANKS = 4,
  localparam int unsigned TILE_W   = clog2_min1(num_tiles(P_MAX, Q_MAX)),
  localparam int unsigned BANK_W   = clog2_min1(NUM_BANKS),
  localparam int unsigned ADDR_W   = TILE_W - BANK_W + 4,
  localparam int unsigned TILES_PER_BANK = (num_tiles(P_MAX, Q_MAX) + NUM_BANKS - 1) / NUM_BANKS,
  localparam int unsigned DEPTH    = TILES_PER_BANK * BAB_SIZE
) (
  input  logic              clk,
  input  logic              en    [NUM_BANKS],
  input  logic              we    [NUM_BANKS],
  input  logic [ADDR_W-1:0] addr  [NUM_BANKS],
  input  bab_row_t          wdata [NUM_BANKS],
  output bab_row_t          rdata [NUM_BANKS]
);
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    alpha_bank #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_bank (
      .clk  (clk),
      .en   (en[b]),
      .we   (we[b]),
      .addr (addr[b]),
      .wdata(wdata[b]),
      .rdata(rdata[b])
    );
  end
endmodule
