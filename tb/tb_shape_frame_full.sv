// tb_shape_frame_full: the whole transfer and storage path at its full size
// (maximum VOP 1920 x 1088 pixels, 120 x 68 BABs, 4080 tiles), no parameter
// changed. One complete 1920 x 1088 VOP is sent run-length coded, checked as
// it is stored, every one of its 8160 BABs is read back, and random
// cross-BAB windows are compared with the pixel model. A second VOP of
// random content (more than half boundary BABs) then overflows the tile
// store. It reports the transfer time ratio of the first VOP.
module tb_shape_frame_full;
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

  // mechanism counters
  int n_nb_single = 0, n_merged = 0, n_stall = 0, n_raw = 0, n_vops = 0;
  int n_overflow = 0, n_win_cols = 0, n_win_rows = 0, n_rd_nb = 0, n_rd_b = 0;

  always @(posedge clk) if (rst_n && bus_stall) n_stall++;

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

  // ---------------------------------------------------------- the VOP data
  int   vw, vh;
  bab_t plane [P*Q];

  function automatic bit px(input int x, input int y);
    if (x >= vw * 16 || y >= vh * 16) return 1'b0;
    return plane[(y / 16) * vw + x / 16][y % 16][15 - x % 16];
  endfunction

  // kind 0: ellipse shape; kind 1: random BABs (mostly boundary)
  task automatic send_vop(input int w, input int h, input int kind, input bit rlc);
    int t0, nb, nbab;
    vw = w; vh = h; nb = 0;
    exp_index = 0;
    rlc_en = rlc;
    t0 = int'(tuples_sent);
    @(negedge clk);
    vop_valid = 1; vop_width = 8'(w); vop_height = 8'(h);
    do @(posedge clk); while (!vop_ready);
    @(negedge clk);
    vop_valid = 0;
    n_vops++;
    for (int i = 0; i < w * h; i++) begin
      int tup0;
      plane[i] = (kind == 0) ? make_bab(i % w, i / w, w * 16, h * 16) : random_bab();
      expq.push_back(plane[i]);
      if (class_of(plane[i]) == BAB_BOUNDARY) nb++;
      tup0 = int'(tuples_sent);
      bab_valid = 1; bab = plane[i];
      do @(posedge clk); while (!bab_ready);
      @(negedge clk);
      bab_valid = 0;
      if (!rlc) n_raw++;
      else if (class_of(plane[i]) != BAB_BOUNDARY) begin
        check(int'(tuples_sent) - tup0 == 1, "non-boundary BAB in one transfer");
        n_nb_single++;
      end else if (int'(tuples_sent) - tup0 < 16) n_merged++;
      check(int'(tuples_sent) - tup0 == (rlc ? tuples_of(plane[i]) : 16), "tuples per BAB");
    end
    nbab = w * h;
    // wait until the last BAB is stored
    while (expq.size() != 0 || !rd_ready) @(negedge clk);
    $display("VOP %0dx%0d kind %0d rlc %0d: %0d/%0d boundary, %0d transfers against %0d, ratio %0d.%02d %%",
             w, h, kind, rlc, nb, nbab, int'(tuples_sent) - t0, 16 * nbab,
             (100 * (int'(tuples_sent) - t0)) / (16 * nbab),
             ((10000 * (int'(tuples_sent) - t0)) / (16 * nbab)) % 100);
    if (nb > NTILES) begin
      check(overflow && int'(tiles_used) == NTILES, "overflow with more than half boundary BABs");
      n_overflow++;
    end else begin
      check(!overflow && int'(tiles_used) == nb, "tiles used");
    end
  endtask

  task automatic read_back();
    for (int i = 0; i < vw * vh; i++) begin
      bab_class_e c;
      c = class_of(plane[i]);
      @(negedge clk);
      rd_valid = 1; rd_index = IDX_W'(i);
      do @(posedge clk); while (!rd_ready);
      @(negedge clk);
      rd_valid = 0;
      check(rd_cls_valid && rd_cls == c, $sformatf("class of BAB %0d", i));
      if (c == BAB_BOUNDARY) begin
        n_rd_b++;
        for (int r = 0; r < 16; r++) begin
          @(negedge clk);
          check(rd_row_valid && rd_row == plane[i][r], $sformatf("BAB %0d row %0d", i, r));
        end
      end else n_rd_nb++;
    end
  endtask

  task automatic read_windows(input int n);
    for (int k = 0; k < n; k++) begin
      int x, y, rows, got;
      x = $urandom_range(0, vw * 16 - 1);
      y = $urandom_range(0, vh * 16 - 1);
      rows = $urandom_range(1, 48);
      if (x % 16 != 0) n_win_cols++;
      if ((y % 16) + rows > 16) n_win_rows++;
      @(negedge clk);
      win_valid = 1; win_x = X_W'(x); win_y = Y_W'(y); win_rows = 6'(rows);
      do @(posedge clk); while (!win_ready);
      @(negedge clk);
      win_valid = 0;
      got = 0;
      while (got < rows) begin
        if (win_out_valid) begin
          logic [30:0] e;
          for (int i = 0; i < 31; i++) e[30 - i] = px(x + i, y + got);
          check(win_out_data == e, $sformatf("window (%0d,%0d) row %0d", x, y, got));
          got++;
        end
        @(negedge clk);
      end
    end
  endtask

  initial begin
    rlc_en = 1; vop_valid = 0; vop_width = 0; vop_height = 0; bab_valid = 0; bab = '0;
    rd_valid = 0; rd_index = '0; win_valid = 0; win_x = '0; win_y = '0; win_rows = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    send_vop(P, Q, 0, 1);        // full-size VOP, run-length coded
    read_back();
    read_windows(500);
    send_vop(P, Q, 1, 1);        // random content: more than half boundary
    check(!err_overrun, "no receiver overrun");
    check(tuples_rcvd == tuples_sent, "every tuple arrived");
    $display("mechanisms: nb-single %0d merged %0d stall-cycles %0d raw %0d vops %0d overflow %0d",
             n_nb_single, n_merged, n_stall, n_raw, n_vops, n_overflow);
    $display("            window col-cross %0d row-cross %0d reads nb %0d b %0d",
             n_win_cols, n_win_rows, n_rd_nb, n_rd_b);
    check(n_nb_single > 0, "single-transfer non-boundary BAB happened");
    check(n_merged > 0,    "merged runs in a boundary BAB happened");
    check(n_stall > 0,     "bus stall happened");
    check(n_overflow > 0,  "tile overflow happened");
    check(n_win_cols > 0,  "window across BAB columns happened");
    check(n_win_rows > 0,  "window across BAB rows happened");
    check(n_rd_nb > 0 && n_rd_b > 0, "both kinds of BAB read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
