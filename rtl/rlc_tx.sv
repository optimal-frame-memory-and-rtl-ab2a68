// rlc_tx: run-length transmitter of the alpha-plane data transfer scheme.
//
// It takes one BAB at a time and sends it over the shared bus as
// (run, length) tuples: run is a packed 16-bit BAB row, length (1..16) the
// number of consecutive identical rows starting with it. Each tuple is one
// bus write: run goes on the 16-bit data bus and length is carried in the
// address, SLAVE_BASE + LEN_OFF + length, so no extra data bus width and no
// second transfer is spent on it. An all-transparent or all-opaque BAB thus
// costs one transfer instead of sixteen, and no BAB ever costs more than
// sixteen (the worst case equals plain row-by-row transfer).
//
// A VOP start request (VOP width and height in BABs) is sent first as a write
// of {height, width} to SLAVE_BASE + CTRL_OFF.
//
// With rlc_en low every row is sent with length 1, i.e. the plain transfer
// the scheme is compared against; the receiver handles both.
//
// Interface: vop_* and bab_* are valid/ready inputs; the bus port is a
// shape_bus_if master. Timing: one tuple per cycle while the bus is ready,
// starting in the cycle bab_valid rises; the run length of the current row is
// found combinationally (a priority compare over the remaining rows), so a
// BAB takes exactly as many cycles as it has tuples. bab_ready is high in the
// last tuple's cycle; bab must stay unchanged until then.
//
// The row-wise RLC, the length-in-address trick and its address layout follow
// the scheme; the control register, the handshake and the raw mode switch are
// this design's choices.
module rlc_tx
  import shape_pkg::*;
#(
  parameter logic [31:0] SLAVE_BASE = 32'h4000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rlc_en,        // 1: run-length code, 0: one row per transfer
  // VOP start
  input  logic        vop_valid,
  output logic        vop_ready,
  input  logic [7:0]  vop_width,     // VOP width in BABs
  input  logic [7:0]  vop_height,    // VOP height in BABs
  // BAB to send
  input  logic        bab_valid,
  output logic        bab_ready,
  input  bab_t        bab,
  // shared bus
  shape_bus_if.master bus,
  // statistics
  output logic [31:0] tuples_sent
);

  logic [4:0] row;          // next row to send, 0..15; 0 between BABs
  logic [4:0] run_len;      // length of the run starting at row

  // Count identical rows following 'row' (priority: stop at first change).
  always_comb begin
    logic stop;
    run_len = 5'd1;
    stop    = !rlc_en;
    for (int unsigned k = 1; k < BAB_SIZE; k++) begin
      if (!stop && (32'(row) + k < BAB_SIZE)) begin
        if (bab[32'(row) + k] == bab[row[3:0]]) run_len = run_len + 5'd1;
        else stop = 1'b1;
      end
    end
  end

  // A VOP start is sent only between BABs; it goes before a waiting BAB.
  logic send_vop, send_bab, last;
  assign send_vop = (row == 5'd0) && vop_valid;
  assign send_bab = !send_vop && bab_valid;
  assign last     = (row + run_len == 5'(BAB_SIZE));

  always_comb begin
    bus.valid = 1'b0;
    bus.addr  = SLAVE_BASE;
    bus.wdata = '0;
    if (send_vop) begin
      bus.valid = 1'b1;
      bus.addr  = SLAVE_BASE + 32'(CTRL_OFF);
      bus.wdata = {vop_height, vop_width};
    end else if (send_bab) begin
      bus.valid = 1'b1;
      bus.addr  = SLAVE_BASE + 32'(LEN_OFF) + 32'(run_len);
      bus.wdata = bab[row[3:0]];
    end
  end

  assign vop_ready = send_vop && bus.ready;
  assign bab_ready = send_bab && bus.ready && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row         <= '0;
      tuples_sent <= '0;
    end else if (send_bab && bus.ready) begin
      tuples_sent <= tuples_sent + 32'd1;
      row         <= last ? 5'd0 : row + run_len;
    end
  end

endmodule
