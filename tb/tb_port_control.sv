// tb_port_control: exhaustive check of the per-port control decoder.
//
// One port_control per port is instantiated. For every port code (all eight
// 3-bit values) and every combination of write_logic and read_logic, each
// instance's write and read enables are compared with the rule: enabled only
// when the code equals the instance's own port number and the command is high.
// Also checks that no two ports are ever enabled together.
module tb_port_control;
  import router_pkg::*;

  logic [SEL_W-1:0]     sel;
  logic                 wr, rd;
  logic [NUM_PORTS-1:0] wr_en, rd_en;
  int checks = 0, failures = 0;

  port_control #(.PORT_ID(PORT_EAST))  u_e (.selection_logic(sel), .write_logic(wr), .read_logic(rd), .wr_en(wr_en[0]), .rd_en(rd_en[0]));
  port_control #(.PORT_ID(PORT_WEST))  u_w (.selection_logic(sel), .write_logic(wr), .read_logic(rd), .wr_en(wr_en[1]), .rd_en(rd_en[1]));
  port_control #(.PORT_ID(PORT_NORTH)) u_n (.selection_logic(sel), .write_logic(wr), .read_logic(rd), .wr_en(wr_en[2]), .rd_en(rd_en[2]));
  port_control #(.PORT_ID(PORT_SOUTH)) u_s (.selection_logic(sel), .write_logic(wr), .read_logic(rd), .wr_en(wr_en[3]), .rd_en(rd_en[3]));
  port_control #(.PORT_ID(PORT_LOCAL)) u_l (.selection_logic(sel), .write_logic(wr), .read_logic(rd), .wr_en(wr_en[4]), .rd_en(rd_en[4]));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_PORTS-1:0] exp_wr, exp_rd;
    for (int s = 0; s < 8; s++) begin
      for (int c = 0; c < 4; c++) begin
        sel = 3'(s);
        wr  = c[0];
        rd  = c[1];
        #1;
        exp_wr = '0;
        exp_rd = '0;
        if (s < 5) begin
          exp_wr[s] = wr;
          exp_rd[s] = rd;
        end
        checks++;
        if (wr_en !== exp_wr || rd_en !== exp_rd) begin
          failures++;
          $display("FAIL sel=%0d wr=%0b rd=%0b: wr_en=%b (exp %b) rd_en=%b (exp %b)",
                   s, wr, rd, wr_en, exp_wr, rd_en, exp_rd);
        end
        checks++;
        if ($countones(wr_en) > 1 || $countones(rd_en) > 1) begin
          failures++;
          $display("FAIL sel=%0d: several ports enabled", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
