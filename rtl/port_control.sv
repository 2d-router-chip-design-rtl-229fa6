// port_control: the control block of one router port.
//
// Each of the five ports has one of these. It compares the shared port code
// (selection_logic) with its own port number and, on a match, passes the
// global write_logic and read_logic commands on as this port's write enable
// (store the port's input packet into its data register) and read enable
// (copy the data register to the port's output register). Because every
// instance decodes a different code, at most one port is enabled at a time.
//
// Purely combinational: the enables are valid in the same cycle as the
// command and take effect at the next rising clock edge in the registers.
// One control block per port follows the router's block diagram; the
// decoding itself is this design's reading of how selection_logic,
// write_logic and read_logic act in the chip's simulation.
module port_control
  import router_pkg::*;
#(
  parameter port_e PORT_ID = PORT_EAST
) (
  input  logic [SEL_W-1:0] selection_logic,
  input  logic             write_logic,
  input  logic             read_logic,
  output logic             wr_en,
  output logic             rd_en
);

  logic selected;

  always_comb begin
    selected = (selection_logic == PORT_ID);
    wr_en    = selected & write_logic;
    rd_en    = selected & read_logic;
  end

endmodule
