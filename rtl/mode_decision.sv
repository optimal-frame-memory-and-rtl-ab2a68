// mode_decision: BAB class decision from the received run-length tuples.
//
// The run-length transfer already tells whether a BAB is a non-boundary one:
// a single tuple (all-0 row, 16) is a transparent BAB, (all-1 row, 16) an
// opaque one, anything else a boundary BAB. This block watches the tuples of
// one BAB as the receiver takes them and keeps two flags, "every run so far
// was all transparent" and "every run so far was all opaque". At the end of
// the BAB they give the class. For run-length coded input this is exactly
// the single-tuple rule; it also classifies correctly a BAB that was sent row
// by row without run-length coding (a choice of this design).
//
// For a non-boundary BAB it also gives the bab_type code (2 transparent,
// 3 opaque), so the coding mode is known as soon as the BAB has arrived.
// bab_type is 3 bits wide like the shape-mode code it feeds (values 0..6);
// the two values produced here leave its top bit at 0.
//
// Interface: tup_valid marks a tuple, tup_first the first tuple of a BAB.
// cls/bab_type are combinational from the flags and the current tuple, so
// they are valid in the cycle of the BAB's last tuple.
module mode_decision
  import shape_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tup_valid,
  input  logic       tup_first,
  input  bab_row_t   tup_run,
  output bab_class_e cls,        // class of the BAB up to and including this tuple
  output logic [2:0] bab_type,   // 2 or 3 for non-boundary, 0 otherwise
  output logic       non_boundary
);

  logic all_t_q, all_o_q;        // state after the previous tuples of this BAB
  logic all_t, all_o;

  always_comb begin
    all_t = (tup_first ? 1'b1 : all_t_q) && (tup_run == ROW_TRANSPARENT);
    all_o = (tup_first ? 1'b1 : all_o_q) && (tup_run == ROW_OPAQUE);
    if (all_t)      cls = BAB_TRANSPARENT;
    else if (all_o) cls = BAB_OPAQUE;
    else            cls = BAB_BOUNDARY;
    non_boundary = all_t || all_o;
    bab_type     = all_t ? BAB_TYPE_TRANSPARENT : (all_o ? BAB_TYPE_OPAQUE : 3'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      all_t_q <= 1'b0;
      all_o_q <= 1'b0;
    end else if (tup_valid) begin
      all_t_q <= all_t;
      all_o_q <= all_o;
    end
  end

endmodule
