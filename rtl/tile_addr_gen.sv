// tile_addr_gen: address generator (AG) of the alpha frame buffer.
//
// A tile is 16 consecutive 16-bit words of one bank and holds one BAB, one
// row per word. The two LSBs of the tile index select the bank and the rest
// give the tile's base address in that bank, (tile >> 2) * 16; adding the row
// number gives the word. With four banks the modulo and the multiplication
// are bit selections, which is why four banks are used where three would do.
//
// The AG serves LANES tile requests at once (one lane per BAB a reference row
// touches: three for a 31-pixel row of a 16-PE motion estimator, one for BAB
// reads and writes). It computes each lane's bank and word address and routes
// it to that bank's address port, so that up to LANES banks are accessed in
// the same cycle; lane_bank tells the data path which bank returns each
// lane's row. If two enabled lanes map to the same bank, conflict is raised
// and the lower lane wins the port. lane_bank is simply the low bits of
// lane_tile; it is an output so that the data path needs no copy of the
// mapping.
//
// Interface and timing: purely combinational. lane_en/lane_tile/row in;
// bank_en/bank_addr per bank, lane_bank per lane and conflict out.
// The tile-to-bank/address mapping follows the design; the lane crossbar
// and conflict flag are this design's way of organising it.
module tile_addr_gen
  import shape_pkg::*;
#(
  parameter int unsigned P_MAX     = 120,
  parameter int unsigned Q_MAX     = 68,
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned LANES     = 3,
  localparam int unsigned TILE_W   = clog2_min1(num_tiles(P_MAX, Q_MAX)),
  localparam int unsigned BANK_W   = clog2_min1(NUM_BANKS),
  localparam int unsigned ADDR_W   = TILE_W - BANK_W + 4
) (
  input  logic              lane_en   [LANES],
  input  logic [TILE_W-1:0] lane_tile [LANES],
  input  logic [3:0]        row,
  output logic              bank_en   [NUM_BANKS],
  output logic [ADDR_W-1:0] bank_addr [NUM_BANKS],
  output logic [BANK_W-1:0] lane_bank [LANES],
  output logic              conflict
);
  initial assert ((1 << BANK_W) == NUM_BANKS && TILE_W > BANK_W)
    else $fatal(1, "NUM_BANKS must be a power of two below the tile count");

  always_comb begin
    conflict = 1'b0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      bank_en[b]   = 1'b0;
      bank_addr[b] = '0;
    end
    // highest lane first, so that a lower lane overrides it on a conflict
    for (int l = LANES - 1; l >= 0; l--) begin
      lane_bank[l] = lane_tile[l][BANK_W-1:0];
      if (lane_en[l]) begin
        if (bank_en[lane_bank[l]]) conflict = 1'b1;
        bank_en[lane_bank[l]]   = 1'b1;
        bank_addr[lane_bank[l]] = {lane_tile[l][TILE_W-1:BANK_W], row};
      end
    end
  end
endmodule
