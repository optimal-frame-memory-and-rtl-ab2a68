// tb_rlc_rx: acts as the bus master in front of rlc_rx. It starts a VOP,
// sends random BABs as (run, length) tuples (length in the address) or row by
// row, with a consumer that is randomly not ready, and checks each BAB that
// comes out (rows, class, bab_type, BAB index), the VOP start pulse and size,
// that the bus is stalled while a finished BAB is not taken, that writes
// outside the slave's slot are ignored and that a run past row 16 sets the
// overrun flag.
module tb_rlc_rx;
  import shape_pkg::*;
  import shape_tb_pkg::*;

  localparam logic [31:0] BASE = 32'h4000_0000;   // the default slave base

  logic clk = 1'b0, rst_n = 1'b0;
  logic vop_start;
  logic [7:0] vop_width, vop_height;
  logic out_valid, out_ready;
  bab_t out_bab;
  bab_class_e out_class;
  logic [2:0] out_bab_type;
  logic [12:0] out_index;
  logic err_overrun;
  logic [31:0] tuples_rcvd, babs_rcvd;
  int checks = 0, failures = 0;
  int stalls = 0, vop_pulses = 0;
  bit random_ready;

  shape_bus_if bus (.clk(clk), .rst_n(rst_n));

  rlc_rx dut (
    .clk(clk), .rst_n(rst_n), .bus(bus.slave),
    .vop_start(vop_start), .vop_width(vop_width), .vop_height(vop_height),
    .out_valid(out_valid), .out_ready(out_ready), .out_bab(out_bab), .out_class(out_class),
    .out_bab_type(out_bab_type), .out_index(out_index), .err_overrun(err_overrun),
    .tuples_rcvd(tuples_rcvd), .babs_rcvd(babs_rcvd)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  // consumer: check each BAB
  bab_t expq [$];
  int   exp_index = 0, sent_tuples = 0;
  always @(posedge clk) begin
    if (rst_n && bus.valid && !bus.ready) stalls++;
    if (rst_n && vop_start) vop_pulses++;
    if (rst_n && out_valid && out_ready) begin
      bab_t e; bab_class_e c;
      e = expq.pop_front();
      c = class_of(e);
      checks++;
      if (out_bab != e || out_class != c || out_index != 13'(exp_index) ||
          out_bab_type != (c == BAB_TRANSPARENT ? 3'd2 : c == BAB_OPAQUE ? 3'd3 : 3'd0)) begin
        failures++;
        $display("FAIL BAB %0d: class %0d/%0d index %0d", exp_index, out_class, c, out_index);
      end
      exp_index++;
    end
  end

  task automatic write(input logic [31:0] a, input logic [15:0] d);
    @(negedge clk);
    bus.valid = 1; bus.addr = a; bus.wdata = d;
    do @(posedge clk); while (!bus.ready);
    @(negedge clk);
    bus.valid = 0;
  endtask

  task automatic send(input bab_t b, input bit rlc);
    int r;
    expq.push_back(b);
    r = 0;
    while (r < 16) begin
      int len;
      len = 1;
      if (rlc) while (r + len < 16 && b[r+len] == b[r]) len++;
      write(BASE + 32'h100 + 32'(len), b[r]);
      sent_tuples++;
      r += len;
    end
  endtask

  initial begin
    bus.valid = 0; bus.addr = '0; bus.wdata = '0; random_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    write(BASE, {8'd9, 8'd11});
    @(negedge clk);
    checks++;
    if (vop_width != 8'd11 || vop_height != 8'd9 || vop_pulses != 1) begin
      failures++; $display("FAIL VOP size %0d x %0d", vop_width, vop_height);
    end
    send('0, 1);
    send('1, 1);
    send('0, 0);
    for (int i = 0; i < 200; i++) send(random_bab(), 1'($urandom_range(0, 1)));
    // writes outside the slot or the run window are ignored
    write(32'h5000_0104, 16'h1234);
    write(BASE + 32'h100, 16'h1234);
    write(BASE + 32'h111, 16'h1234);
    random_ready = 1;
    for (int i = 0; i < 400; i++) send(random_bab(), 1);
    random_ready = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (err_overrun) begin failures++; $display("FAIL overrun flagged"); end
    // new VOP restarts the BAB index
    write(BASE, {8'd2, 8'd3});
    exp_index = 0;
    // overrun: 10 rows then a run of 10 rows
    expq.push_back({{6{16'h00F0}}, {10{16'h0F00}}});
    write(BASE + 32'h10A, 16'h0F00);
    write(BASE + 32'h10A, 16'h00F0);
    repeat (3) @(negedge clk);
    checks++;
    if (!err_overrun) begin failures++; $display("FAIL overrun not flagged"); end
    checks++;
    if (expq.size() != 0 || tuples_rcvd != 32'(sent_tuples + 2) || babs_rcvd != 32'(604)) begin
      failures++;
      $display("FAIL %0d BABs left, tuples %0d/%0d babs %0d", expq.size(), tuples_rcvd, sent_tuples + 2, babs_rcvd);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL bus never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
