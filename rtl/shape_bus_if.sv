// shape_bus_if: the write channel of the shared on-chip bus as seen by the
// run-length transfer scheme.
//
// One transfer moves one 16-bit datum and one address in the cycle where
// both valid and ready are high. The scheme needs nothing more from the bus
// than a data bus and an address bus that a slave decodes, so the protocol
// here is a plain valid/ready handshake (this design's choice); an AHB or
// similar bus maps onto it with an address-phase/data-phase adapter.
//
// Rule checked by the assertion: once the master raises valid it keeps valid,
// addr and wdata unchanged until the slave takes the transfer.
interface shape_bus_if #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 16
) (
  input logic clk,
  input logic rst_n
);
  logic              valid;
  logic              ready;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata;

  modport master (input clk, rst_n, ready, output valid, addr, wdata);
  modport slave  (input clk, rst_n, valid, addr, wdata, output ready);

  a_hold_until_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (valid && !ready) |=> (valid && $stable(addr) && $stable(wdata)))
    else $error("bus master changed a pending transfer");
endinterface
