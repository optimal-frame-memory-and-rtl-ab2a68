// alpha_bank: one bank of the alpha frame memory, a single-port 16-bit wide
// synchronous RAM (one BAB row per word).
//
// Interface: en/we/addr/wdata in, rdata out. Timing: a write happens at the
// clock edge when en and we are high; a read (en high, we low) returns the
// word in rdata the next cycle. Written as an array so that a RAM macro can be
// inferred; the single port is this design's choice.
module alpha_bank #(
  parameter int unsigned DEPTH  = 16320,
  parameter int unsigned ADDR_W = 14
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata
);
  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        if (addr < ADDR_W'(DEPTH)) mem[addr] <= wdata;
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
