// tb_rlc_tx: sends random BABs through rlc_tx and checks every bus write:
// the address must be SLAVE_BASE + 0x100 + length with length 1..16, the
// rows rebuilt from the tuples must equal the BAB, the number of tuples must
// equal the number of runs of identical rows (16 with run-length coding off),
// and with an always-ready bus a BAB must take exactly one cycle per tuple.
// A VOP start must appear as a write of {height, width} to SLAVE_BASE.
module tb_rlc_tx;
  import shape_pkg::*;
  import shape_tb_pkg::*;

  localparam logic [31:0] BASE = 32'h4000_0000;   // the default slave base

  logic clk = 1'b0, rst_n = 1'b0;
  logic rlc_en;
  logic vop_valid, vop_ready, bab_valid, bab_ready;
  logic [7:0] vop_width, vop_height;
  bab_t bab;
  logic [31:0] tuples_sent;
  int checks = 0, failures = 0;
  bit random_ready;

  shape_bus_if bus (.clk(clk), .rst_n(rst_n));

  rlc_tx dut (
    .clk(clk), .rst_n(rst_n), .rlc_en(rlc_en),
    .vop_valid(vop_valid), .vop_ready(vop_ready), .vop_width(vop_width), .vop_height(vop_height),
    .bab_valid(bab_valid), .bab_ready(bab_ready), .bab(bab),
    .bus(bus.master), .tuples_sent(tuples_sent)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus slave model: rebuild BABs from the writes
  bab_t got;
  int   filled = 0, tuples = 0;
  int   vop_writes = 0, total_tuples = 0;
  logic [15:0] last_ctrl;
  bab_t expq [$];
  bit   exp_rlc [$];

  always @(negedge clk) bus.ready = random_ready ? 1'($urandom_range(0, 1)) : 1'b1;

  always @(posedge clk) begin
    if (rst_n && bus.valid && bus.ready) begin
      if (bus.addr == BASE) begin
        vop_writes++;
        last_ctrl = bus.wdata;
      end else begin
        int len;
        len = int'(bus.addr - BASE - 32'h100);
        checks++;
        if (len < 1 || len > 16 || filled + len > 16) begin
          failures++;
          $display("FAIL bad address %h (filled %0d)", bus.addr, filled);
          len = 1;
        end
        for (int i = 0; i < len; i++) if (filled + i < 16) got[filled + i] = bus.wdata;
        filled += len;
        tuples++;
        total_tuples++;
        if (filled >= 16) begin
          bab_t e; bit r;
          e = expq.pop_front();
          r = exp_rlc.pop_front();
          checks++;
          if (got != e) begin failures++; $display("FAIL rebuilt BAB differs"); end
          checks++;
          if (tuples != (r ? tuples_of(e) : 16)) begin
            failures++; $display("FAIL %0d tuples, expected %0d", tuples, r ? tuples_of(e) : 16);
          end
          filled = 0; tuples = 0;
        end
      end
    end
  end

  task automatic send(input bab_t b);
    int cyc;
    expq.push_back(b);
    exp_rlc.push_back(rlc_en);
    @(negedge clk);
    bab_valid = 1; bab = b;
    cyc = 0;
    forever begin
      @(posedge clk);
      cyc++;
      if (bab_ready) break;
    end
    if (!random_ready) begin
      checks++;
      if (cyc != (rlc_en ? tuples_of(b) : 16)) begin
        failures++; $display("FAIL BAB took %0d cycles", cyc);
      end
    end
    @(negedge clk);
    bab_valid = 0;
  endtask

  initial begin
    rlc_en = 1; vop_valid = 0; bab_valid = 0; bab = '0; vop_width = 0; vop_height = 0;
    random_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // VOP start
    @(negedge clk);
    vop_valid = 1; vop_width = 8'd22; vop_height = 8'd18;
    do @(posedge clk); while (!vop_ready);
    @(negedge clk);
    vop_valid = 0;
    send('0);
    send('1);
    for (int i = 0; i < 300; i++) send(random_bab());
    rlc_en = 0;
    for (int i = 0; i < 50; i++) send(random_bab());
    rlc_en = 1;
    random_ready = 1;
    for (int i = 0; i < 300; i++) send(random_bab());
    repeat (3) @(negedge clk);
    checks++;
    if (vop_writes != 1 || last_ctrl != {8'd18, 8'd22}) begin
      failures++; $display("FAIL VOP control write %0d %h", vop_writes, last_ctrl);
    end
    checks++;
    if (tuples_sent != 32'(total_tuples)) begin
      failures++; $display("FAIL tuple counter %0d, seen %0d", tuples_sent, total_tuples);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d BABs not seen", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
