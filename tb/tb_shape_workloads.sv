// tb_shape_workloads: frame sequences of the sizes the scheme is evaluated on,
// run through the whole transfer and storage path with every parameter at its
// default. Each sequence is a moving, growing object whose bounding box (the
// VOP) changes size from frame to frame: QCIF (176 x 144 frame), CIF
// (352 x 288 frame) and the 1920 x 1088 maximum. For every frame the VOP is
// sent run-length coded and checked as it is stored, then every BAB is read
// back as a consumer of the reference plane would. Per frame the testbench
// checks
//   - bus transfers = sum over BABs of the number of row runs,
//   - tiles used = boundary BABs,
//   - index-table accesses = BABs and alpha-memory accesses = 16 x boundary
//     BABs, i.e. the memory reference ratio is exactly 17/16 - P_NB.
// It prints, per sequence, the transfer time ratio (transfers against 16 per
// BAB) and the memory reference ratio (accesses against 16 per BAB).
module tb_shape_workloads;
  import shape_pkg::*;
  import shape_tb_pkg::*;

  localparam int P = 120, Q = 68;
  localparam int IDX_W  = $clog2(P * Q);
  localparam int TILE_W = $clog2((P * Q) / 2);
  localparam int X_W    = $clog2(P * 16);
  localparam int Y_W    = $clog2(Q * 16);
  localparam int NTILES = (P * Q) / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rlc_en;
  logic vop_valid, vop_ready;
  logic [7:0] vop_width, vop_height;
  logic bab_valid, bab_ready;
  bab_t bab;
  logic cur_valid;
  bab_t cur_bab;
  bab_class_e cur_class;
  logic [2:0] cur_bab_type;
  logic [IDX_W-1:0] cur_index;
  logic rd_valid, rd_ready;
  logic [IDX_W-1:0] rd_index;
  logic rd_cls_valid;
  bab_class_e rd_cls;
  logic rd_row_valid;
  logic [3:0] rd_row_num;
  bab_row_t rd_row;
  logic win_valid, win_ready;
  logic [X_W-1:0] win_x;
  logic [Y_W-1:0] win_y;
  logic [5:0] win_rows;
  logic win_out_valid;
  logic [30:0] win_out_data;
  logic win_out_last;
  logic bus_stall, overflow, err_overrun;
  logic [TILE_W:0] tiles_used;
  logic [31:0] tuples_sent, tuples_rcvd, babs_rcvd, idx_accesses, mem_accesses;
  int checks = 0, failures = 0;

  shape_frame_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask


  // ------------------------------------------------------------ sink model
  bab_t expq [$];
  int   exp_index;
  always @(posedge clk) begin
    if (rst_n && cur_valid) begin
      bab_t e; bab_class_e c;
      e = expq.pop_front();
      c = class_of(e);
      check(cur_bab == e && cur_class == c && cur_index == IDX_W'(exp_index) &&
            cur_bab_type == (c == BAB_TRANSPARENT ? 3'd2 : c == BAB_OPAQUE ? 3'd3 : 3'd0),
            $sformatf("stored BAB %0d", exp_index));
      exp_index++;
    end
  end

  // The object of frame f: an ellipse-with-hole body (shape_tb_pkg::alpha_px)
  // of ow x oh pixels, plus a round "head" of radius r that moves along the
  // top edge of the bounding box with the frame number.
  function automatic bit obj_px(input int x, input int y, input int ow, input int oh,
                                input int f);
    int hx, hr, dx, dy;
    hr = oh / 6;
    hx = hr + ((f * 23) % (ow - 2 * hr));
    dx = x - hx; dy = y - hr;
    if (x >= ow || y >= oh) return 1'b0;
    if (dx * dx + dy * dy <= hr * hr) return 1'b1;
    if (y < 2 * hr) return 1'b0;
    return alpha_px(x, y - 2 * hr, ow, oh - 2 * hr);
  endfunction

  int   vw, vh;
  bab_t plane [P*Q];

  // totals of the current sequence
  longint s_babs, s_bound, s_xfers, s_refs;

  task automatic run_frame(input int ow, input int oh, input int f);
    int t0, i0, m0, nb, exp_tuples;
    vw = (ow + 15) / 16; vh = (oh + 15) / 16; nb = 0; exp_tuples = 0;
    for (int i = 0; i < vw * vh; i++) begin
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++)
          plane[i][r][15-c] = obj_px((i % vw) * 16 + c, (i / vw) * 16 + r, ow, oh, f);
      if (class_of(plane[i]) == BAB_BOUNDARY) nb++;
      exp_tuples += tuples_of(plane[i]);
    end
    exp_index = 0;
    t0 = int'(tuples_sent);
    @(negedge clk);
    vop_valid = 1; vop_width = 8'(vw); vop_height = 8'(vh);
    do @(posedge clk); while (!vop_ready);
    @(negedge clk);
    vop_valid = 0;
    for (int i = 0; i < vw * vh; i++) begin
      expq.push_back(plane[i]);
      bab_valid = 1; bab = plane[i];
      do @(posedge clk); while (!bab_ready);
      @(negedge clk);
      bab_valid = 0;
    end
    while (expq.size() != 0 || !rd_ready) @(negedge clk);
    check(int'(tuples_sent) - t0 == exp_tuples, $sformatf("frame %0d transfers", f));
    check(!overflow && int'(tiles_used) == nb, $sformatf("frame %0d tiles used", f));

    // read back the whole reference plane
    i0 = int'(idx_accesses); m0 = int'(mem_accesses);
    for (int i = 0; i < vw * vh; i++) begin
      bab_class_e c;
      c = class_of(plane[i]);
      rd_valid = 1; rd_index = IDX_W'(i);
      do @(posedge clk); while (!rd_ready);
      @(negedge clk);
      rd_valid = 0;
      check(rd_cls_valid && rd_cls == c, $sformatf("frame %0d class of BAB %0d", f, i));
      if (c == BAB_BOUNDARY)
        for (int r = 0; r < 16; r++) begin
          @(negedge clk);
          check(rd_row_valid && rd_row == plane[i][r],
                $sformatf("frame %0d BAB %0d row %0d", f, i, r));
        end
    end
    check(int'(idx_accesses) - i0 == vw * vh, $sformatf("frame %0d index accesses", f));
    check(int'(mem_accesses) - m0 == 16 * nb, $sformatf("frame %0d memory accesses", f));
    s_babs  += vw * vh;
    s_bound += nb;
    s_xfers += int'(tuples_sent) - t0;
    s_refs  += (int'(idx_accesses) - i0) + (int'(mem_accesses) - m0);
  endtask

  function automatic string pct(input longint num, input longint den);
    return $sformatf("%0d.%02d %%", (100 * num) / den, ((10000 * num) / den) % 100);
  endfunction

  // frame size fw x fh; the object grows from 1/2 to about 9/10 of the frame
  task automatic run_sequence(input string name, input int fw, input int fh, input int frames);
    s_babs = 0; s_bound = 0; s_xfers = 0; s_refs = 0;
    for (int f = 0; f < frames; f++) begin
      int ow, oh;
      ow = fw / 2 + ((fw * 2 / 5) * f) / (frames > 1 ? frames - 1 : 1);
      oh = fh / 2 + ((fh * 2 / 5) * f) / (frames > 1 ? frames - 1 : 1);
      run_frame(ow, oh, f);
    end
    check(s_bound * 2 <= s_babs, {name, ": at most half boundary BABs"});
    $display("%s: %0d frames, %0d BABs, %0d boundary, transfer time ratio %s, memory reference ratio %s (17/16 - P_NB = %s)",
             name, frames, s_babs, s_bound, pct(s_xfers, 16 * s_babs),
             pct(s_refs, 16 * s_babs), pct(17 * s_babs - 16 * (s_babs - s_bound), 16 * s_babs));
  endtask

  initial begin
    rlc_en = 1; vop_valid = 0; vop_width = 0; vop_height = 0; bab_valid = 0; bab = '0;
    rd_valid = 0; rd_index = '0; win_valid = 0; win_x = '0; win_y = '0; win_rows = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    run_sequence("QCIF 176x144", 176, 144, 10);
    run_sequence("CIF 352x288", 352, 288, 10);
    run_sequence("1920x1088", 1920, 1088, 2);
    check(!err_overrun, "no receiver overrun");
    check(tuples_rcvd == tuples_sent, "every tuple arrived");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
