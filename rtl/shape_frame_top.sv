// shape_frame_top: alpha-plane transfer and storage of an MPEG-4 binary shape
// encoder.
//
// A BAB source (host CPU or DMA side) hands BABs to rlc_tx, which sends
// them over the shared bus as run-length tuples with the run length in the
// address. On the shape encoder side rlc_rx rebuilds each BAB, and its mode
// decision already knows whether the BAB is transparent, opaque or boundary.
// The BAB, its class and its BAB index then go to the compressed alpha frame
// buffer, which keeps an index entry for every BAB and a 16-word tile only for
// boundary BABs, and serves BAB reads and single-cycle cross-BAB row reads to
// the motion estimation side.
//
// The coding engines that use these data (binary motion estimation, size
// conversion, context-based arithmetic coding, variable length coding) are
// not part of this design: their connections are ports. cur_* shows each BAB
// as it is stored, with its coding mode (bab_type 2 or 3 for transparent and
// opaque BABs, whose coding needs nothing else); rd_* and win_* are the
// reference-data ports of the frame buffer.
//
// Timing: the bus moves one tuple per cycle; the bus stalls (bus_stall high)
// while a boundary BAB is being written into the frame memory (16 cycles)
// and the next BAB is already complete. The stored BAB is also taken as the
// reconstructed one (lossless shape coding), which is this design's choice.
module shape_frame_top
  import shape_pkg::*;
#(
  parameter logic [31:0]  SLAVE_BASE = 32'h4000_0000,
  parameter int unsigned  P_MAX      = 120,
  parameter int unsigned  Q_MAX      = 68,
  parameter int unsigned  N_PE       = 16,
  parameter int unsigned  NUM_BANKS  = 4,
  localparam int unsigned IDX_W      = clog2_min1(P_MAX * Q_MAX),
  localparam int unsigned TILE_W     = clog2_min1(num_tiles(P_MAX, Q_MAX)),
  localparam int unsigned WIN_W      = BAB_SIZE + N_PE - 1,
  localparam int unsigned X_W        = clog2_min1(P_MAX * BAB_SIZE),
  localparam int unsigned Y_W        = clog2_min1(Q_MAX * BAB_SIZE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rlc_en,
  // BAB source
  input  logic              vop_valid,
  output logic              vop_ready,
  input  logic [7:0]        vop_width,
  input  logic [7:0]        vop_height,
  input  logic              bab_valid,
  output logic              bab_ready,
  input  bab_t              bab,
  // BABs as they are stored (to the coding engines)
  output logic              cur_valid,
  output bab_t              cur_bab,
  output bab_class_e        cur_class,
  output logic [2:0]        cur_bab_type,
  output logic [IDX_W-1:0]  cur_index,
  // BAB read port of the frame buffer
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [IDX_W-1:0]  rd_index,
  output logic              rd_cls_valid,
  output bab_class_e        rd_cls,
  output logic              rd_row_valid,
  output logic [3:0]        rd_row_num,
  output bab_row_t          rd_row,
  // cross-BAB window port (to motion estimation)
  input  logic              win_valid,
  output logic              win_ready,
  input  logic [X_W-1:0]    win_x,
  input  logic [Y_W-1:0]    win_y,
  input  logic [5:0]        win_rows,
  output logic              win_out_valid,
  output logic [WIN_W-1:0]  win_out_data,
  output logic              win_out_last,
  // status
  output logic              bus_stall,
  output logic              overflow,
  output logic              err_overrun,
  output logic [TILE_W:0]   tiles_used,
  output logic [31:0]       tuples_sent,
  output logic [31:0]       tuples_rcvd,
  output logic [31:0]       babs_rcvd,
  output logic [31:0]       idx_accesses,
  output logic [31:0]       mem_accesses
);

  shape_bus_if #(.ADDR_W(32), .DATA_W(16)) bus (.clk(clk), .rst_n(rst_n));

  rlc_tx #(.SLAVE_BASE(SLAVE_BASE)) u_tx (
    .clk        (clk),
    .rst_n      (rst_n),
    .rlc_en     (rlc_en),
    .vop_valid  (vop_valid),
    .vop_ready  (vop_ready),
    .vop_width  (vop_width),
    .vop_height (vop_height),
    .bab_valid  (bab_valid),
    .bab_ready  (bab_ready),
    .bab        (bab),
    .bus        (bus.master),
    .tuples_sent(tuples_sent)
  );

  logic       rx_vop_start;
  logic [7:0] rx_width, rx_height;
  logic       rx_valid, fb_wr_ready;

  rlc_rx #(.SLAVE_BASE(SLAVE_BASE), .P_MAX(P_MAX), .Q_MAX(Q_MAX)) u_rx (
    .clk         (clk),
    .rst_n       (rst_n),
    .bus         (bus.slave),
    .vop_start   (rx_vop_start),
    .vop_width   (rx_width),
    .vop_height  (rx_height),
    .out_valid   (rx_valid),
    .out_ready   (fb_wr_ready),
    .out_bab     (cur_bab),
    .out_class   (cur_class),
    .out_bab_type(cur_bab_type),
    .out_index   (cur_index),
    .err_overrun (err_overrun),
    .tuples_rcvd (tuples_rcvd),
    .babs_rcvd   (babs_rcvd)
  );

  assign cur_valid = rx_valid && fb_wr_ready;
  assign bus_stall = bus.valid && !bus.ready;

  alpha_frame_buffer #(.P_MAX(P_MAX), .Q_MAX(Q_MAX), .N_PE(N_PE), .NUM_BANKS(NUM_BANKS)) u_afb (
    .clk          (clk),
    .rst_n        (rst_n),
    .vop_start    (rx_vop_start),
    .vop_width    (rx_width),
    .vop_height   (rx_height),
    .wr_valid     (rx_valid),
    .wr_ready     (fb_wr_ready),
    .wr_index     (cur_index),
    .wr_class     (cur_class),
    .wr_bab       (cur_bab),
    .rd_valid     (rd_valid),
    .rd_ready     (rd_ready),
    .rd_index     (rd_index),
    .rd_cls_valid (rd_cls_valid),
    .rd_cls       (rd_cls),
    .rd_row_valid (rd_row_valid),
    .rd_row_num   (rd_row_num),
    .rd_row       (rd_row),
    .win_valid    (win_valid),
    .win_ready    (win_ready),
    .win_x        (win_x),
    .win_y        (win_y),
    .win_rows     (win_rows),
    .win_out_valid(win_out_valid),
    .win_out_data (win_out_data),
    .win_out_last (win_out_last),
    .overflow     (overflow),
    .tiles_used   (tiles_used),
    .idx_accesses (idx_accesses),
    .mem_accesses (mem_accesses)
  );

endmodule
