// router_crossbar: the switch between the router's ports and its registers.
//
// The crossbar has two multiplexers steered by the 3-bit port code:
//   - the write side picks the input packet of the selected port and offers it
//     to the data registers (wr_data);
//   - the read side picks the data register of the selected port and offers
//     it to the output port registers (rd_data).
// A code that names no port (101, 110, 111) gives all zeros on both sides.
//
// Combinational, no clock. The crossbar and the multiplexers that feed the
// registers are the document's; steering both sides by the single port code,
// so that a packet leaves by the same direction it entered, is how the chip's
// published simulation behaves and is followed here.
module router_crossbar
  import router_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [SEL_W-1:0]                  selection_logic,
  input  logic [NUM_PORTS-1:0][WIDTH-1:0]   port_in,
  input  logic [NUM_PORTS-1:0][WIDTH-1:0]   reg_q,
  output logic [WIDTH-1:0]                  wr_data,
  output logic [WIDTH-1:0]                  rd_data
);

  always_comb begin
    wr_data = '0;
    rd_data = '0;
    for (int unsigned p = 0; p < NUM_PORTS; p++) begin
      if (selection_logic == SEL_W'(p)) begin
        wr_data = port_in[p];
        rd_data = reg_q[p];
      end
    end
  end

endmodule
