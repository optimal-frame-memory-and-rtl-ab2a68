// alpha_frame_buffer: compressed, tile-based store of one binary alpha plane.
//
// The buffer is an index table, an address generator (AG) and a banked alpha
// frame memory. Every BAB of the VOP has an index-table entry addressed by
// its BAB index (raster order, row * VOP width + column). Only boundary BABs
// are kept in the alpha frame memory: each one gets the next free tile, so
// tile indices rise with BAB index and never exceed it, and at most half of
// the BABs need a tile. Transparent and opaque BABs cost one index-table
// entry and no memory at all.
//
// Operations (valid/ready requests, served one at a time, write first, then
// BAB read, then window read):
//   write   wr_*: index-table entry written; a boundary BAB also gets a tile
//           and its 16 rows are written to one bank, row 0 in the same cycle
//           as the index entry. 1 cycle for a non-boundary BAB, 16 for a
//           boundary BAB. If no tile is left, the BAB is dropped and
//           overflow is set until the next VOP start.
//   read    rd_*: index entry read (class on rd_cls_valid one cycle after
//           the request); for a boundary BAB the 16 rows follow on
//           rd_row_valid, the first two cycles after the request, one per
//           cycle. A non-boundary BAB returns only its class.
//   window  win_*: reference rows for block matching. For pixel (x, y) and a
//           row count it returns, one row per cycle, the WIN_W = 16+N_PE-1
//           pixels x..x+WIN_W-1 of rows y, y+1, ... of the VOP. The LANES
//           BABs under a row are looked up in the index table (one per cycle,
//           repeated whenever the rows cross into the next BAB row); then each
//           row is one parallel access of up to LANES banks. Boundary BABs
//           that are horizontal neighbours have consecutive tile indices and
//           so different banks; non-boundary lanes read as all-0 or all-1
//           without a memory access, and lanes right of or below the VOP as
//           transparent.
// vop_start (with the VOP size in BABs) frees all tiles.
//
// The counters idx_accesses and mem_accesses count index-table and
// alpha-frame-memory word accesses, the two figures the memory-traffic
// estimate 17/16 - P_NB is about.
//
// Follows the design: index-table format, tile allocation, bank/address
// mapping, four banks, half-size memory, single-cycle cross-BAB row reads.
// This design's choices: the request interfaces, the serving order, the
// lookup schedule and what happens on overflow or outside the VOP.
module alpha_frame_buffer
  import shape_pkg::*;
#(
  parameter int unsigned P_MAX     = 120,   // max VOP width in BABs (1920 pixels)
  parameter int unsigned Q_MAX     = 68,    // max VOP height in BABs (1088 pixels)
  parameter int unsigned N_PE      = 16,    // processing elements of the BME array
  parameter int unsigned NUM_BANKS = 4,
  localparam int unsigned IDX_W    = clog2_min1(P_MAX * Q_MAX),
  localparam int unsigned NTILES   = num_tiles(P_MAX, Q_MAX),
  localparam int unsigned TILE_W   = clog2_min1(NTILES),
  localparam int unsigned BANK_W   = clog2_min1(NUM_BANKS),
  localparam int unsigned ADDR_W   = TILE_W - BANK_W + 4,
  localparam int unsigned WIN_W    = BAB_SIZE + N_PE - 1,
  localparam int unsigned LANES    = (WIN_W + 2 * BAB_SIZE - 2) / BAB_SIZE,
  localparam int unsigned X_W      = clog2_min1(P_MAX * BAB_SIZE),
  localparam int unsigned Y_W      = clog2_min1(Q_MAX * BAB_SIZE)
) (
  input  logic              clk,
  input  logic              rst_n,
  // VOP start
  input  logic              vop_start,
  input  logic [7:0]        vop_width,    // in BABs
  input  logic [7:0]        vop_height,   // in BABs
  // write a BAB
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [IDX_W-1:0]  wr_index,
  input  bab_class_e        wr_class,
  input  bab_t              wr_bab,
  // read a BAB
  input  logic              rd_valid,
  output logic              rd_ready,
  input  logic [IDX_W-1:0]  rd_index,
  output logic              rd_cls_valid,
  output bab_class_e        rd_cls,
  output logic              rd_row_valid,
  output logic [3:0]        rd_row_num,
  output bab_row_t          rd_row,
  // read a cross-BAB window
  input  logic              win_valid,
  output logic              win_ready,
  input  logic [X_W-1:0]    win_x,
  input  logic [Y_W-1:0]    win_y,
  input  logic [5:0]        win_rows,     // 1..63 rows
  output logic              win_out_valid,
  output logic [WIN_W-1:0]  win_out_data, // pixel x in the MSB
  output logic              win_out_last,
  // status
  output logic              overflow,
  output logic [TILE_W:0]   tiles_used,
  output logic [31:0]       idx_accesses,
  output logic [31:0]       mem_accesses
);

  initial begin
    assert (NUM_BANKS >= min_banks(N_PE) && NUM_BANKS >= LANES)
      else $fatal(1, "too few banks for the BME array width");
  end

  typedef enum logic [2:0] {S_IDLE, S_WR_ROWS, S_RD_LOOK, S_RD_ROWS, S_WIN_LOOK, S_WIN_ROWS} state_e;
  state_e state;

  // ---------------------------------------------------------------- storage
  logic              it_we, it_re;
  logic [IDX_W-1:0]  it_waddr, it_raddr;
  bab_class_e        it_wcls, it_rcls;
  logic [TILE_W-1:0] it_wtile, it_rtile;

  index_table #(.P_MAX(P_MAX), .Q_MAX(Q_MAX)) u_index (
    .clk(clk), .we(it_we), .waddr(it_waddr), .wcls(it_wcls), .wtile(it_wtile),
    .re(it_re), .raddr(it_raddr), .rcls(it_rcls), .rtile(it_rtile)
  );

  logic              m_en    [NUM_BANKS];
  logic              m_we    [NUM_BANKS];
  logic [ADDR_W-1:0] m_addr  [NUM_BANKS];
  bab_row_t          m_wdata [NUM_BANKS];
  bab_row_t          m_rdata [NUM_BANKS];

  alpha_frame_memory #(.P_MAX(P_MAX), .Q_MAX(Q_MAX), .NUM_BANKS(NUM_BANKS)) u_mem (
    .clk(clk), .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata)
  );

  // ------------------------------------------------------------- registers
  logic [7:0]        width_q, height_q;
  logic [TILE_W:0]   tile_next;           // next free tile
  bab_t              wbuf;                // BAB being written
  logic [TILE_W-1:0] cur_tile;            // tile being written or read
  logic [3:0]        row_cnt;             // row being written or read

  // BAB read output pipeline (bank data arrives one cycle after the request)
  logic              rp_valid;
  logic [3:0]        rp_row;
  logic [BANK_W-1:0] rp_bank;

  // window state
  logic [X_W-1:0]    w_x;
  logic [Y_W-1:0]    w_y;
  logic [5:0]        w_left;              // rows still to issue
  logic [2:0]        w_step;              // lookup step 0..LANES
  bab_class_e        lane_cls  [LANES];
  logic [TILE_W-1:0] lane_tile [LANES];
  logic              lane_inside_q;       // the lane looked up last cycle was inside the VOP

  // window output pipeline
  logic              wp_valid, wp_last;
  logic [3:0]        wp_off;
  bab_class_e        wp_cls  [LANES];
  logic [BANK_W-1:0] wp_bank [LANES];

  // ----------------------------------------------------- address generation
  // One AG lane for BAB writes and reads, LANES lanes for window rows.
  logic              ab_en     [1];
  logic [TILE_W-1:0] ab_tile   [1];
  logic [3:0]        ab_row;
  logic              ab_bank_en   [NUM_BANKS];
  logic [ADDR_W-1:0] ab_bank_addr [NUM_BANKS];
  logic [BANK_W-1:0] ab_lane_bank [1];
  logic              ab_conflict;

  tile_addr_gen #(.P_MAX(P_MAX), .Q_MAX(Q_MAX), .NUM_BANKS(NUM_BANKS), .LANES(1)) u_ag_bab (
    .lane_en(ab_en), .lane_tile(ab_tile), .row(ab_row),
    .bank_en(ab_bank_en), .bank_addr(ab_bank_addr), .lane_bank(ab_lane_bank),
    .conflict(ab_conflict)
  );

  logic              aw_en        [LANES];
  logic              aw_bank_en   [NUM_BANKS];
  logic [ADDR_W-1:0] aw_bank_addr [NUM_BANKS];
  logic [BANK_W-1:0] aw_lane_bank [LANES];
  logic              bank_conflict;

  tile_addr_gen #(.P_MAX(P_MAX), .Q_MAX(Q_MAX), .NUM_BANKS(NUM_BANKS), .LANES(LANES)) u_ag_win (
    .lane_en(aw_en), .lane_tile(lane_tile), .row(w_y[3:0]),
    .bank_en(aw_bank_en), .bank_addr(aw_bank_addr), .lane_bank(aw_lane_bank),
    .conflict(bank_conflict)
  );

  // window geometry of the current row
  logic [X_W-5:0]    w_bx;
  logic [Y_W-5:0]    w_by;
  logic [IDX_W-1:0]  w_base;
  logic [8:0]        w_lane_col;
  logic              w_lane_inside;
  assign w_bx   = w_x[X_W-1:4];
  assign w_by   = w_y[Y_W-1:4];
  assign w_base = IDX_W'(w_by) * IDX_W'(width_q) + IDX_W'(w_bx);
  assign w_lane_col    = 9'(w_bx) + 9'(w_step);
  assign w_lane_inside = (w_lane_col < 9'(width_q)) && (8'(w_by) < height_q);

  // ---------------------------------------------------------- control logic
  logic acc_wr, acc_rd, acc_win;
  assign wr_ready  = (state == S_IDLE);
  assign rd_ready  = (state == S_IDLE) && !wr_valid;
  assign win_ready = (state == S_IDLE) && !wr_valid && !rd_valid;
  assign acc_wr  = wr_valid && wr_ready;
  assign acc_rd  = rd_valid && rd_ready;
  assign acc_win = win_valid && win_ready;

  logic has_tile;
  assign has_tile = (tile_next < (TILE_W+1)'(NTILES));

  logic rd_look_boundary;
  assign rd_look_boundary = (state == S_RD_LOOK) && (it_rcls == BAB_BOUNDARY);

  logic     ab_we;       // the BAB lane writes
  bab_row_t ab_wdata;

  always_comb begin
    it_we    = 1'b0;
    it_waddr = wr_index;
    it_wcls  = wr_class;
    it_wtile = tile_next[TILE_W-1:0];
    it_re    = 1'b0;
    it_raddr = rd_index;
    ab_en[0]   = 1'b0;
    ab_tile[0] = cur_tile;
    ab_row     = row_cnt;
    ab_we      = 1'b0;
    ab_wdata   = wbuf[row_cnt];
    for (int l = 0; l < LANES; l++)
      aw_en[l] = (state == S_WIN_ROWS) && (lane_cls[l] == BAB_BOUNDARY);

    unique case (state)
      S_IDLE: begin
        if (acc_wr) begin
          it_we = (wr_class != BAB_BOUNDARY) || has_tile;
          if (wr_class == BAB_BOUNDARY && has_tile) begin
            // row 0 goes to memory in the same cycle as the index entry
            ab_en[0]   = 1'b1;
            ab_tile[0] = tile_next[TILE_W-1:0];
            ab_row     = 4'd0;
            ab_we      = 1'b1;
            ab_wdata   = wr_bab[0];
          end
        end else if (acc_rd) begin
          it_re = 1'b1;
        end
      end
      S_WR_ROWS: begin
        ab_en[0] = 1'b1;
        ab_we    = 1'b1;
      end
      S_RD_LOOK: begin
        if (rd_look_boundary) begin
          ab_en[0]   = 1'b1;
          ab_tile[0] = it_rtile;
          ab_row     = 4'd0;
        end
      end
      S_RD_ROWS: begin
        ab_en[0] = 1'b1;
      end
      S_WIN_LOOK: begin
        if (w_step < 3'(LANES) && w_lane_inside) begin
          it_re    = 1'b1;
          it_raddr = w_base + IDX_W'(w_step);
        end
      end
      default: ;
    endcase

    // bank ports: window lanes and the BAB lane are never active together
    for (int b = 0; b < NUM_BANKS; b++) begin
      m_en[b]    = ab_bank_en[b] || aw_bank_en[b];
      m_we[b]    = ab_bank_en[b] && ab_we;
      m_addr[b]  = aw_bank_en[b] ? aw_bank_addr[b] : ab_bank_addr[b];
      m_wdata[b] = ab_wdata;
    end
  end

  // number of bank accesses this cycle
  logic [3:0] n_mem;
  always_comb begin
    n_mem = '0;
    for (int b = 0; b < NUM_BANKS; b++) n_mem = n_mem + 4'(m_en[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      width_q       <= '0;
      height_q      <= '0;
      tile_next     <= '0;
      overflow      <= 1'b0;
      wbuf          <= '0;
      cur_tile      <= '0;
      row_cnt       <= '0;
      rp_valid      <= 1'b0;
      rp_row        <= '0;
      rp_bank       <= '0;
      w_x           <= '0;
      w_y           <= '0;
      w_left        <= '0;
      w_step        <= '0;
      lane_inside_q <= 1'b0;
      wp_valid      <= 1'b0;
      wp_last       <= 1'b0;
      wp_off        <= '0;
      idx_accesses  <= '0;
      mem_accesses  <= '0;
      for (int l = 0; l < LANES; l++) begin
        lane_cls[l]  <= BAB_TRANSPARENT;
        lane_tile[l] <= '0;
        wp_cls[l]    <= BAB_TRANSPARENT;
        wp_bank[l]   <= '0;
      end
    end else begin
      rp_valid <= 1'b0;
      wp_valid <= 1'b0;
      wp_last  <= 1'b0;
      idx_accesses <= idx_accesses + 32'(it_we) + 32'(it_re);
      mem_accesses <= mem_accesses + 32'(n_mem);

      if (vop_start) begin
        width_q   <= vop_width;
        height_q  <= vop_height;
        tile_next <= '0;
        overflow  <= 1'b0;
      end

      unique case (state)
        S_IDLE: begin
          if (acc_wr) begin
            if (wr_class == BAB_BOUNDARY) begin
              if (has_tile) begin
                wbuf      <= wr_bab;
                cur_tile  <= tile_next[TILE_W-1:0];
                tile_next <= tile_next + 1'b1;
                row_cnt   <= 4'd1;
                state     <= S_WR_ROWS;
              end else begin
                overflow  <= 1'b1;
              end
            end
          end else if (acc_rd) begin
            state <= S_RD_LOOK;
          end else if (acc_win) begin
            w_x    <= win_x;
            w_y    <= win_y;
            w_left <= win_rows;
            w_step <= '0;
            state  <= (win_rows == 6'd0) ? S_IDLE : S_WIN_LOOK;
          end
        end
        S_WR_ROWS: begin
          row_cnt <= row_cnt + 4'd1;
          if (row_cnt == 4'd15) state <= S_IDLE;
        end
        S_RD_LOOK: begin
          if (rd_look_boundary) begin
            cur_tile <= it_rtile;
            row_cnt  <= 4'd1;
            rp_valid <= 1'b1;
            rp_row   <= 4'd0;
            rp_bank  <= ab_lane_bank[0];
            state    <= S_RD_ROWS;
          end else begin
            state <= S_IDLE;
          end
        end
        S_RD_ROWS: begin
          rp_valid <= 1'b1;
          rp_row   <= row_cnt;
          rp_bank  <= ab_lane_bank[0];
          row_cnt  <= row_cnt + 4'd1;
          if (row_cnt == 4'd15) state <= S_IDLE;
        end
        S_WIN_LOOK: begin
          // capture the lane looked up in the previous step
          if (w_step != 3'd0) begin
            if (lane_inside_q) begin
              lane_cls[w_step-1]  <= it_rcls;
              lane_tile[w_step-1] <= it_rtile;
            end else begin
              lane_cls[w_step-1]  <= BAB_TRANSPARENT;
              lane_tile[w_step-1] <= '0;
            end
          end
          lane_inside_q <= w_lane_inside;
          if (w_step == 3'(LANES)) state <= S_WIN_ROWS;
          else w_step <= w_step + 3'd1;
        end
        S_WIN_ROWS: begin
          wp_valid <= 1'b1;
          wp_last  <= (w_left == 6'd1);
          wp_off   <= w_x[3:0];
          for (int l = 0; l < LANES; l++) begin
            wp_cls[l]  <= lane_cls[l];
            wp_bank[l] <= aw_lane_bank[l];
          end
          w_left <= w_left - 6'd1;
          w_y    <= w_y + 1'b1;
          if (w_left == 6'd1) begin
            state <= S_IDLE;
          end else if (w_y[3:0] == 4'd15) begin
            w_step <= '0;                 // next row is in the next BAB row
            state  <= S_WIN_LOOK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  assign rd_cls_valid = (state == S_RD_LOOK);
  assign rd_cls       = it_rcls;
  assign rd_row_valid = rp_valid;
  assign rd_row_num   = rp_row;
  assign rd_row       = m_rdata[rp_bank];

  // only the top WIN_W bits of the shifted row are the window
  logic [LANES*BAB_SIZE-1:0] w_cat, w_shift;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      unique case (wp_cls[l])
        BAB_BOUNDARY: w_cat[(LANES-1-l)*BAB_SIZE +: BAB_SIZE] = m_rdata[wp_bank[l]];
        BAB_OPAQUE:   w_cat[(LANES-1-l)*BAB_SIZE +: BAB_SIZE] = ROW_OPAQUE;
        default:      w_cat[(LANES-1-l)*BAB_SIZE +: BAB_SIZE] = ROW_TRANSPARENT;
      endcase
    end
    w_shift = w_cat << wp_off;
  end
  assign win_out_valid = wp_valid;
  assign win_out_data  = w_shift[LANES*BAB_SIZE-1 -: WIN_W];
  assign win_out_last  = wp_last;
  assign tiles_used    = tile_next;

  // Boundary lanes of one window row must sit in different banks.
  a_no_bank_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !bank_conflict && !ab_conflict)
    else $error("two window lanes share a bank");

endmodule
