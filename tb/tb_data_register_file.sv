// tb_data_register_file: checks the five data registers r0..r4.
//
// After reset every register must read zero. Then random single-port writes
// (or idle cycles) are applied; a reference array updated by the testbench
// gives the expected contents, compared on every port after every clock edge.
// Checks that a write shows one edge later and touches no other register, and
// that a mid-run reset clears everything.
module tb_data_register_file;
  import router_pkg::*;

  localparam int unsigned W = 64;

  logic                        clk = 0, reset;
  logic [NUM_PORTS-1:0]        wr_en;
  logic [W-1:0]                wr_data;
  logic [NUM_PORTS-1:0][W-1:0] q;
  logic [W-1:0]                model [NUM_PORTS];
  int checks = 0, failures = 0;

  data_register_file #(.WIDTH(W)) dut (
    .clk(clk), .reset(reset), .wr_en(wr_en), .wr_data(wr_data), .q(q)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int p = 0; p < NUM_PORTS; p++) begin
      checks++;
      if (q[p] !== model[p]) begin
        failures++;
        $display("FAIL %s: r%0d=%h exp %h", what, p, q[p], model[p]);
      end
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    reset = 1; wr_en = '0; wr_data = {$urandom, $urandom};
    @(negedge clk);
    reset = 0;
    foreach (model[p]) model[p] = '0;
    compare("after reset");
  endtask

  initial begin
    reset = 1; wr_en = '0; wr_data = '0;
    do_reset();
    for (int t = 0; t < 400; t++) begin
      int p;
      @(negedge clk);
      p = $urandom_range(0, NUM_PORTS);  // NUM_PORTS means "no write"
      wr_en   = '0;
      wr_data = {$urandom, $urandom};
      if (p < NUM_PORTS) wr_en[p] = 1'b1;
      // Before the edge, nothing may have changed yet.
      compare("before edge");
      @(posedge clk);
      if (p < NUM_PORTS) model[p] = wr_data;
      #1 compare("after edge");
      if (t == 200) do_reset();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
