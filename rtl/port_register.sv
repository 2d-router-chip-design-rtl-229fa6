// port_register: the output register of one router port.
//
// It drives the port's data output. When load is high at a rising clock edge
// it takes the packet on d; otherwise it keeps its value, so an output holds
// the last packet read to it until the next read to the same port.
//
// Timing: loaded in cycle n, visible on q from cycle n+1. Reset is synchronous
// and active high and clears the output to zero.
// The register on each output and its reset come from the document; the load
// enable, the reset polarity and synchronous reset are this design's choices.
module port_register
  import router_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset)     q <= '0;
    else if (load) q <= d;
  end

endmodule
