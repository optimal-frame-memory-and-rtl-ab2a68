// tb_alpha_frame_buffer: the compressed alpha frame buffer at a reduced size
// (8 x 6 BABs, 24 tiles).
//  1. Stores a synthetic VOP in raster order and checks the write time
//     (1 cycle per transparent/opaque BAB, 16 per boundary BAB), the number
//     of tiles used and the index-table and memory access counts.
//  2. Reads every BAB back in random order: class, rows, the latency (class
//     one cycle and first row two cycles after the request) and the access
//     counts (1 per non-boundary BAB, 17 per boundary BAB).
//  3. Reads random cross-BAB windows of 31 pixels and checks every row, one
//     per cycle, against the pixel model, crossing BAB rows and the VOP edge.
//  4. Overflows the tile store with an all-boundary VOP and checks the flag
//     and that the stored BABs are intact.
//  5. Repeats 1-3 for a smaller VOP (5 x 4 BABs).
module tb_alpha_frame_buffer;
  import shape_pkg::*;
  import shape_tb_pkg::*;

  localparam int P = 8, Q = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic vop_start;
  logic [7:0] vop_width, vop_height;
  logic wr_valid, wr_ready;
  logic [5:0] wr_index;
  bab_class_e wr_class;
  bab_t wr_bab;
  logic rd_valid, rd_ready;
  logic [5:0] rd_index;
  logic rd_cls_valid;
  bab_class_e rd_cls;
  logic rd_row_valid;
  logic [3:0] rd_row_num;
  bab_row_t rd_row;
  logic win_valid, win_ready;
  logic [6:0] win_x, win_y;
  logic [5:0] win_rows;
  logic win_out_valid;
  logic [30:0] win_out_data;
  logic win_out_last;
  logic overflow;
  logic [5:0] tiles_used;
  logic [31:0] idx_accesses, mem_accesses;
  int checks = 0, failures = 0;

  alpha_frame_buffer #(.P_MAX(P), .Q_MAX(Q)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int vw, vh;          // VOP size in BABs
  bab_t plane [P*Q];   // what was stored

  function automatic bit px(input int x, input int y);
    if (x >= vw * 16 || y >= vh * 16) return 1'b0;
    return plane[(y / 16) * vw + x / 16][y % 16][15 - x % 16];
  endfunction

  task automatic start_vop(input int w, input int h);
    @(negedge clk);
    vop_start = 1; vop_width = 8'(w); vop_height = 8'(h);
    @(negedge clk);
    vop_start = 0;
    vw = w; vh = h;
  endtask

  task automatic write_bab(input int idx, input bab_t b, output int cyc);
    @(negedge clk);
    wr_valid = 1; wr_index = 6'(idx); wr_class = class_of(b); wr_bab = b;
    do @(posedge clk); while (!wr_ready);
    @(negedge clk);
    wr_valid = 0;
    cyc = 1;
    while (!wr_ready) begin @(negedge clk); cyc++; end
  endtask

  task automatic store_vop(input int w, input int h);
    int nb, i0, m0, cyc;
    nb = 0;
    i0 = int'(idx_accesses); m0 = int'(mem_accesses);
    start_vop(w, h);
    for (int i = 0; i < w * h; i++) begin
      plane[i] = make_bab(i % w, i / w, w * 16, h * 16);
      if (class_of(plane[i]) == BAB_BOUNDARY) nb++;
      write_bab(i, plane[i], cyc);
      check(cyc == (class_of(plane[i]) == BAB_BOUNDARY ? 16 : 1), $sformatf("write time %0d", cyc));
    end
    check(int'(tiles_used) == nb, $sformatf("tiles used %0d, boundary BABs %0d", tiles_used, nb));
    check(int'(idx_accesses) - i0 == w * h, "index accesses on write");
    check(int'(mem_accesses) - m0 == 16 * nb, "memory accesses on write");
    check(!overflow, "no overflow");
    $display("VOP %0dx%0d BABs: %0d boundary", w, h, nb);
  endtask

  task automatic read_all();
    int order [$];
    int i0, m0, nb;
    for (int i = 0; i < vw * vh; i++) order.push_back(i);
    order.shuffle();
    i0 = int'(idx_accesses); m0 = int'(mem_accesses); nb = 0;
    foreach (order[k]) begin
      int i, t;
      bab_class_e c;
      i = order[k];
      c = class_of(plane[i]);
      if (c == BAB_BOUNDARY) nb++;
      @(negedge clk);
      rd_valid = 1; rd_index = 6'(i);
      do @(posedge clk); while (!rd_ready);
      @(negedge clk);
      rd_valid = 0;
      check(rd_cls_valid && rd_cls == c, $sformatf("class of BAB %0d", i));
      if (c == BAB_BOUNDARY) begin
        for (int r = 0; r < 16; r++) begin
          @(negedge clk);
          check(rd_row_valid && rd_row_num == 4'(r) && rd_row == plane[i][r],
                $sformatf("BAB %0d row %0d", i, r));
        end
      end
      @(negedge clk);
      check(!rd_row_valid, "no extra rows");
    end
    check(int'(idx_accesses) - i0 == vw * vh, "index accesses on read");
    check(int'(mem_accesses) - m0 == 16 * nb, "memory accesses on read");
    // total accesses of the compressed buffer against 16 per BAB without it
    $display("read: %0d accesses against %0d uncompressed",
             int'(idx_accesses) - i0 + int'(mem_accesses) - m0, 16 * vw * vh);
  endtask

  int crossings = 0;
  task automatic read_windows(input int n);
    for (int k = 0; k < n; k++) begin
      int x, y, rows, got;
      x = $urandom_range(0, vw * 16 - 1);
      y = $urandom_range(0, vh * 16 - 1);
      rows = $urandom_range(1, 40);
      if ((y % 16) + rows > 16) crossings++;
      @(negedge clk);
      win_valid = 1; win_x = 7'(x); win_y = 7'(y); win_rows = 6'(rows);
      do @(posedge clk); while (!win_ready);
      @(negedge clk);
      win_valid = 0;
      got = 0;
      while (got < rows) begin
        if (win_out_valid) begin
          logic [30:0] e;
          for (int i = 0; i < 31; i++) e[30 - i] = px(x + i, y + got);
          check(win_out_data == e && win_out_last == (got == rows - 1),
                $sformatf("window (%0d,%0d) row %0d: %h / %h", x, y, got, win_out_data, e));
          got++;
        end
        @(negedge clk);
      end
    end
  endtask

  task automatic time_window();
    // a 16-row window inside one BAB row: 3 lookup steps + 1, then 1 row/cycle
    int cyc;
    @(negedge clk);
    win_valid = 1; win_x = 7'd20; win_y = 7'd16; win_rows = 6'd16;
    do @(posedge clk); while (!win_ready);
    @(negedge clk);
    win_valid = 0;
    cyc = 1;
    while (!win_out_last) begin @(negedge clk); cyc++; end
    check(cyc == 5 + 16, $sformatf("window of 16 rows took %0d cycles", cyc));
  endtask

  initial begin
    vop_start = 0; vop_width = 0; vop_height = 0;
    wr_valid = 0; wr_index = 0; wr_class = BAB_TRANSPARENT; wr_bab = '0;
    rd_valid = 0; rd_index = 0; win_valid = 0; win_x = 0; win_y = 0; win_rows = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    store_vop(P, Q);
    read_all();
    read_windows(300);
    time_window();

    // overflow: every BAB a boundary one
    start_vop(P, Q);
    for (int i = 0; i < 30; i++) begin
      int cyc;
      bab_t b;
      b = random_bab();
      b[3] = 16'h0F0F;
      plane[i] = b;
      write_bab(i, b, cyc);
      check(overflow == (i >= 24), $sformatf("overflow flag after %0d boundary BABs", i + 1));
    end
    check(int'(tiles_used) == 24, "all 24 tiles used");
    vw = 6; vh = 4;    // read back only the stored ones (24 BABs)
    read_all();

    store_vop(5, 4);
    check(!overflow, "overflow cleared by VOP start");
    read_all();
    read_windows(200);
    check(crossings > 0, "windows crossed BAB rows");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
