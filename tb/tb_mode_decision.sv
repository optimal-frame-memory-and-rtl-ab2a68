// tb_mode_decision: drives the tuples of random BABs (run-length coded and
// row-by-row) into mode_decision and checks the class and bab_type at the
// last tuple of each BAB against the class computed from the whole BAB.
module tb_mode_decision;
  import shape_pkg::*;
  import shape_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tup_valid, tup_first;
  bab_row_t tup_run;
  bab_class_e cls;
  logic [2:0] bab_type;
  logic non_boundary;
  int checks = 0, failures = 0;

  mode_decision dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bab(input bab_t b, input bit rlc);
    int r;
    bab_class_e exp;
    exp = class_of(b);
    r = 0;
    while (r < 16) begin
      int len;
      len = 1;
      if (rlc) while (r + len < 16 && b[r+len] == b[r]) len++;
      @(negedge clk);
      tup_valid = 1; tup_first = (r == 0); tup_run = b[r];
      #1;
      if (r + len == 16) begin
        checks++;
        if (cls !== exp || non_boundary !== (exp != BAB_BOUNDARY) ||
            bab_type !== (exp == BAB_TRANSPARENT ? 3'd2 : exp == BAB_OPAQUE ? 3'd3 : 3'd0)) begin
          failures++;
          $display("FAIL t=%0t class %0d expected %0d (rlc=%0d) r=%0d", $time, cls, exp, rlc, r);
        end
      end
      r += len;
    end
    @(negedge clk);
    tup_valid = 0;
    // idle cycles between BABs
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    tup_valid = 0; tup_first = 0; tup_run = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    send_bab('0, 1);
    send_bab('1, 1);
    send_bab('0, 0);
    send_bab('1, 0);
    begin
      bab_t b; b = '1; b[15] = 16'hFFFE; send_bab(b, 1);
      b = '0; b[0] = 16'h0001; send_bab(b, 0);
    end
    for (int i = 0; i < 2000; i++) send_bab(random_bab(), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
