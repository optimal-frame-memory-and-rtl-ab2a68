// tb_index_table: writes random classes and tile indices to random entries of
// a full-size (120 x 68 BAB) index table, keeps a model of the table, and
// checks each synchronous read (class and, for boundary BABs, tile index)
// one cycle after the request. Also checks the entry width, 13 bits.
module tb_index_table;
  import shape_pkg::*;

  logic clk = 1'b0;
  logic we, re;
  logic [12:0] waddr, raddr;
  bab_class_e wcls, rcls;
  logic [11:0] wtile, rtile;
  int checks = 0, failures = 0;

  index_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bab_class_e mcls  [8160];
  logic [11:0] mtile [8160];
  bit          known [8160];

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wcls = BAB_TRANSPARENT; wtile = 0;
    checks++;
    if ($bits(dut.mem[0]) != 13) begin failures++; $display("FAIL entry width %0d", $bits(dut.mem[0])); end
    for (int i = 0; i < 8160; i++) known[i] = 0;
    for (int i = 0; i < 20000; i++) begin
      int a;
      @(negedge clk);
      we = $urandom_range(0, 1);
      a = $urandom_range(0, 8159);
      waddr = 13'(a);
      case ($urandom_range(0, 2))
        0: wcls = BAB_TRANSPARENT;
        1: wcls = BAB_OPAQUE;
        default: wcls = BAB_BOUNDARY;
      endcase
      wtile = 12'($urandom_range(0, 4079));
      re = $urandom_range(0, 1);
      raddr = 13'($urandom_range(0, 8159));
      if (i % 4 == 0 && known[a]) raddr = 13'(a);
      @(posedge clk);
      #1;
      if (re && known[raddr]) begin
        checks++;
        if (rcls != mcls[raddr] || (rcls == BAB_BOUNDARY && rtile != mtile[raddr])) begin
          failures++;
          $display("FAIL entry %0d: %0d/%0d tile %0d/%0d", raddr, rcls, mcls[raddr], rtile, mtile[raddr]);
        end
      end
      if (we) begin
        mcls[waddr] = wcls; mtile[waddr] = wtile; known[waddr] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
