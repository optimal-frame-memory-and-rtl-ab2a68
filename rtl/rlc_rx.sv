// rlc_rx: bus slave of the shape encoder that receives run-length coded BABs.
//
// The length of a run is not on the data bus: it is the address offset of the
// write. The slave decodes its 1 KiB slot; a write to LEN_OFF + L
// (L = 1..16) means "the next L rows of the current BAB all equal wdata".
// The rows are expanded into a 16-row current-BAB buffer in the cycle of the
// write (any number of rows at once), and when row 16 is filled the BAB is
// handed on together with its class from mode_decision and its BAB index.
// BABs arrive in raster order, so the BAB index is a counter that a write to
// CTRL_OFF ({height, width} in BABs) clears at the start of each VOP.
//
// Interface: shape_bus_if slave; out_* is a valid/ready BAB stream
// (out_bab, out_class, out_bab_type, out_index). vop_start pulses for one
// cycle with the new VOP size. Timing: the slave takes one bus write per
// cycle; it holds ready low (bus stall) while a finished BAB waits for the
// consumer, and for a control write also until the last BAB has left.
// A run that would overflow row 16 is cut at row 16 and sets err_overrun.
//
// The length-in-address decoding and the class decision follow the transfer
// scheme; the slot layout, the control register and the error flag are this
// design's choices.
module rlc_rx
  import shape_pkg::*;
#(
  parameter logic [31:0] SLAVE_BASE = 32'h4000_0000,
  parameter int unsigned P_MAX      = 120,  // max VOP width in BABs
  parameter int unsigned Q_MAX      = 68,   // max VOP height in BABs
  localparam int unsigned IDX_W     = clog2_min1(P_MAX * Q_MAX)
) (
  input  logic             clk,
  input  logic             rst_n,
  shape_bus_if.slave       bus,
  // VOP start
  output logic             vop_start,
  output logic [7:0]       vop_width,
  output logic [7:0]       vop_height,
  // received BABs
  output logic             out_valid,
  input  logic             out_ready,
  output bab_t             out_bab,
  output bab_class_e       out_class,
  output logic [2:0]       out_bab_type,
  output logic [IDX_W-1:0] out_index,
  // status
  output logic             err_overrun,
  output logic [31:0]      tuples_rcvd,
  output logic [31:0]      babs_rcvd
);

  logic [SLOT_BITS-1:0] off;
  logic                 in_slot, is_ctrl, is_run;
  logic [4:0]           len;
  assign off     = bus.addr[SLOT_BITS-1:0];
  assign in_slot = (bus.addr[31:SLOT_BITS] == SLAVE_BASE[31:SLOT_BITS]);
  assign is_ctrl = in_slot && (off == CTRL_OFF);
  assign is_run  = in_slot && (off > LEN_OFF) && (off <= LEN_OFF + SLOT_BITS'(BAB_SIZE));
  assign len     = 5'(off - LEN_OFF);

  assign bus.ready = is_ctrl ? !out_valid : (!out_valid || out_ready);

  logic take_run;
  assign take_run = bus.valid && bus.ready && is_run;

  bab_t             buf_q, buf_d;
  logic [4:0]       filled;          // rows of the current BAB already received
  logic [5:0]       end_row;         // filled + len, before clamping
  logic             done;            // this tuple completes the BAB
  logic [IDX_W-1:0] next_index;

  assign end_row = 6'(filled) + 6'(len);
  assign done    = take_run && (end_row >= 6'(BAB_SIZE));

  always_comb begin
    buf_d = buf_q;
    for (int unsigned i = 0; i < BAB_SIZE; i++)
      if (6'(i) >= 6'(filled) && 6'(i) < end_row) buf_d[i] = bus.wdata;
  end

  bab_class_e md_cls;
  logic [2:0] md_type;
  logic       md_nb;

  mode_decision u_mode (
    .clk         (clk),
    .rst_n       (rst_n),
    .tup_valid   (take_run),
    .tup_first   (filled == 5'd0),
    .tup_run     (bus.wdata),
    .cls         (md_cls),
    .bab_type    (md_type),
    .non_boundary(md_nb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q        <= '0;
      filled       <= '0;
      next_index   <= '0;
      out_valid    <= 1'b0;
      out_bab      <= '0;
      out_class    <= BAB_TRANSPARENT;
      out_bab_type <= '0;
      out_index    <= '0;
      vop_start    <= 1'b0;
      vop_width    <= '0;
      vop_height   <= '0;
      err_overrun  <= 1'b0;
      tuples_rcvd  <= '0;
      babs_rcvd    <= '0;
    end else begin
      vop_start <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;

      if (bus.valid && bus.ready && is_ctrl) begin
        vop_start  <= 1'b1;
        vop_width  <= bus.wdata[7:0];
        vop_height <= bus.wdata[15:8];
        next_index <= '0;
        filled     <= '0;
      end

      if (take_run) begin
        tuples_rcvd <= tuples_rcvd + 32'd1;
        if (done) begin
          if (end_row > 6'(BAB_SIZE)) err_overrun <= 1'b1;
          out_valid    <= 1'b1;
          out_bab      <= buf_d;
          out_class    <= md_cls;
          out_bab_type <= md_type;
          out_index    <= next_index;
          next_index   <= next_index + 1'b1;
          babs_rcvd    <= babs_rcvd + 32'd1;
          filled       <= '0;
          buf_q        <= '0;
        end else begin
          filled <= end_row[4:0];
          buf_q  <= buf_d;
        end
      end
    end
  end

  // md_nb is the same decision as md_cls != BAB_BOUNDARY
  a_nb_consistent: assert property (@(posedge clk) disable iff (!rst_n)
    take_run |-> (md_nb == (md_cls != BAB_BOUNDARY)));

endmodule
