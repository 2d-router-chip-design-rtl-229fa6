// router2d_logic: five-port 2D network-on-chip router chip.
//
// The router connects a node of a 2D mesh to its east, west, north and south
// neighbours and to its local processing element. Every port has a 64-bit
// packet input and a 64-bit packet output. Packets move in two steps, both
// steered by the 3-bit port code selection_logic
// (000 east, 001 west, 010 north, 011 south, 100 local):
//   write: with write_logic high, the packet on the selected input port is
//          stored in that port's data register (r0..r4) at the clock edge;
//   read:  with read_logic high, the selected data register is copied to the
//          selected port's output register, which drives its data output.
// Outputs hold their value between reads. A packet therefore reaches the
// output two clock edges after it was presented: one write, one read.
// Codes 101..111 do nothing. write_logic and read_logic may both be high; the
// read then sees the data register before that edge's write.
//
// Structure: one port_control per port turns the code and commands into that
// port's enables; router_crossbar selects the input packet to write and the
// register to read; data_register_file holds r0..r4; five port_register
// instances drive the outputs. Reset (synchronous, active high) clears the
// data registers and the outputs.
//
// Port names, widths, the port code values and the write/read behaviour are
// those of the published chip; the reset style and what happens for unused
// codes or simultaneous write and read are this design's choices.
module router2d_logic
  import router_pkg::*;
#(
  parameter int unsigned DATA_WIDTH = DATA_W
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic [SEL_W-1:0]      selection_logic,
  input  logic                  write_logic,
  input  logic                  read_logic,
  input  logic [DATA_WIDTH-1:0] East_Data_in,
  input  logic [DATA_WIDTH-1:0] West_Data_in,
  input  logic [DATA_WIDTH-1:0] North_Data_in,
  input  logic [DATA_WIDTH-1:0] South_Data_in,
  input  logic [DATA_WIDTH-1:0] Local_Data_in,
  output logic [DATA_WIDTH-1:0] East_Data_out,
  output logic [DATA_WIDTH-1:0] West_Data_out,
  output logic [DATA_WIDTH-1:0] North_Data_out,
  output logic [DATA_WIDTH-1:0] South_Data_out,
  output logic [DATA_WIDTH-1:0] Local_Data_out
);

  localparam port_e PORTS [NUM_PORTS] = '{PORT_EAST, PORT_WEST, PORT_NORTH,
                                          PORT_SOUTH, PORT_LOCAL};

  logic [NUM_PORTS-1:0][DATA_WIDTH-1:0] port_in;
  logic [NUM_PORTS-1:0][DATA_WIDTH-1:0] port_out;
  logic [NUM_PORTS-1:0][DATA_WIDTH-1:0] reg_q;
  logic [NUM_PORTS-1:0]                 wr_en;
  logic [NUM_PORTS-1:0]                 rd_en;
  logic [DATA_WIDTH-1:0]                wr_data;
  logic [DATA_WIDTH-1:0]                rd_data;

  // Port p of the arrays is the direction whose code is p.
  assign port_in[PORT_EAST]  = East_Data_in;
  assign port_in[PORT_WEST]  = West_Data_in;
  assign port_in[PORT_NORTH] = North_Data_in;
  assign port_in[PORT_SOUTH] = South_Data_in;
  assign port_in[PORT_LOCAL] = Local_Data_in;

  assign East_Data_out  = port_out[PORT_EAST];
  assign West_Data_out  = port_out[PORT_WEST];
  assign North_Data_out = port_out[PORT_NORTH];
  assign South_Data_out = port_out[PORT_SOUTH];
  assign Local_Data_out = port_out[PORT_LOCAL];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    port_control #(.PORT_ID(PORTS[p])) u_control (
      .selection_logic (selection_logic),
      .write_logic     (write_logic),
      .read_logic      (read_logic),
      .wr_en           (wr_en[p]),
      .rd_en           (rd_en[p])
    );

    port_register #(.WIDTH(DATA_WIDTH)) u_port_register (
      .clk   (clk),
      .reset (reset),
      .load  (rd_en[p]),
      .d     (rd_data),
      .q     (port_out[p])
    );
  end

  router_crossbar #(.WIDTH(DATA_WIDTH)) u_crossbar (
    .selection_logic (selection_logic),
    .port_in         (port_in),
    .reg_q           (reg_q),
    .wr_data         (wr_data),
    .rd_data         (rd_data)
  );

  data_register_file #(.WIDTH(DATA_WIDTH)) u_registers (
    .clk     (clk),
    .reset   (reset),
    .wr_en   (wr_en),
    .wr_data (wr_data),
    .q       (reg_q)
  );

endmodule
