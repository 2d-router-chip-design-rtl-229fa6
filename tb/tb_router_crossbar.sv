// tb_router_crossbar: checks the two selection paths of the crossbar.
//
// Drives distinct random packets on the five inputs and into the five register
// outputs, then steps the port code through all eight values. For a code that
// names a port, wr_data must equal that port's input packet and rd_data that
// port's register; for the three unused codes both must be zero. Repeated for
// many random data sets.
module tb_router_crossbar;
  import router_pkg::*;

  localparam int unsigned W = 64;

  logic [SEL_W-1:0]             sel;
  logic [NUM_PORTS-1:0][W-1:0]  port_in, reg_q;
  logic [W-1:0]                 wr_data, rd_data;
  int checks = 0, failures = 0;

  router_crossbar #(.WIDTH(W)) dut (
    .selection_logic(sel), .port_in(port_in), .reg_q(reg_q),
    .wr_data(wr_data), .rd_data(rd_data)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_w, exp_r;
    for (int t = 0; t < 50; t++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        port_in[p] = {$urandom, $urandom};
        reg_q[p]   = {$urandom, $urandom};
      end
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        exp_w = (s < 5) ? port_in[s] : '0;
        exp_r = (s < 5) ? reg_q[s]   : '0;
        checks++;
        if (wr_data !== exp_w) begin
          failures++;
          $display("FAIL sel=%0d wr_data=%h exp %h", s, wr_data, exp_w);
        end
        checks++;
        if (rd_data !== exp_r) begin
          failures++;
          $display("FAIL sel=%0d rd_data=%h exp %h", s, rd_data, exp_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
