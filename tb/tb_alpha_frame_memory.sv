// tb_alpha_frame_memory: random reads and writes on all four banks at once
// (each bank with its own address), each read checked against a model at
// the clock edge that completes it; covers the full depth of 16320 words per bank.
module tb_alpha_frame_memory;
  logic clk = 1'b0;
  logic        en    [4];
  logic        we    [4];
  logic [13:0] addr  [4];
  logic [15:0] wdata [4];
  logic [15:0] rdata [4];
  int checks = 0, failures = 0;

  alpha_frame_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] model [4][16320];
  bit          known [4][16320];
  bit          rd_pend [4];
  logic [13:0] rd_addr [4];

  initial begin
    for (int b = 0; b < 4; b++) begin
      en[b] = 0; we[b] = 0; addr[b] = 0; wdata[b] = 0; rd_pend[b] = 0;
      for (int i = 0; i < 16320; i++) known[b][i] = 0;
    end
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        en[b] = $urandom_range(0, 3) != 0;
        we[b] = $urandom_range(0, 1);
        // mostly a small window so that reads hit written words; sometimes the ends
        case ($urandom_range(0, 9))
          0: addr[b] = 14'd16319;
          1: addr[b] = 14'd0;
          default: addr[b] = 14'($urandom_range(0, 255) * 64);
        endcase
        wdata[b] = 16'($urandom);
      end
      @(posedge clk);
      #1;
      for (int b = 0; b < 4; b++) begin
        rd_pend[b] = en[b] && !we[b] && addr[b] < 14'd16320;
        rd_addr[b] = addr[b];
        if (rd_pend[b] && known[b][rd_addr[b]]) begin
          checks++;
          if (rdata[b] != model[b][rd_addr[b]]) begin
            failures++;
            $display("FAIL bank %0d addr %0d: %h / %h", b, rd_addr[b], rdata[b], model[b][rd_addr[b]]);
          end
        end
        if (en[b] && we[b] && addr[b] < 14'd16320) begin
          model[b][addr[b]] = wdata[b];
          known[b][addr[b]] = 1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
