// data_register_file: the five data registers r0..r4 of the router.
//
// Register r<p> holds the last packet written from port p (r0 east, r1 west,
// r2 north, r3 south, r4 local). One write data bus is shared by all five
// registers; a one-hot write enable picks the register that loads it at the
// rising clock edge. All registers read out in parallel.
//
// Timing: a write enabled in cycle n is visible on q from cycle n+1.
// Reset is synchronous and active high and clears every register.
// The five 64-bit registers and their names come from the chip's simulation;
// the shared bus, one-hot enable and synchronous reset are this design's
// choices.
module data_register_file
  import router_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic                              clk,
  input  logic                              reset,
  input  logic [NUM_PORTS-1:0]              wr_en,
  input  logic [WIDTH-1:0]                  wr_data,
  output logic [NUM_PORTS-1:0][WIDTH-1:0]   q
);

  logic [NUM_PORTS-1:0][WIDTH-1:0] r;

  always_ff @(posedge clk) begin
    if (reset) begin
      r <= '0;
    end else begin
      for (int unsigned p = 0; p < NUM_PORTS; p++) begin
        if (wr_en[p]) r[p] <= wr_data;
      end
    end
  end

  assign q = r;

  // Only one port is addressed by the port code at a time.
  a_wr_onehot: assert property (@(posedge clk) disable iff (reset) $onehot0(wr_en))
    else $error("data_register_file: more than one write enable");

endmodule
