// tb_router2d_logic: end-to-end test of the five-port router at full size.
//
// The router is instantiated with its default parameters (64-bit ports).
//
// Part 1 replays the chip's reference test: the 64-bit word
// 64'h005072617465656B (ASCII "Prateek") is presented on the east, west,
// north, south and local inputs in turn. For each port the code is set, one
// write cycle stores the word, and one read cycle sends it out. The test
// checks that the output is still unchanged after the write edge and carries
// the word right after the read edge (two edges from input to output), and
// that no other output moves.
//
// Part 2 runs random commands (any of the eight port codes, any combination
// of write_logic and read_logic, random packets on all inputs, occasional
// reset) against a reference model of the data registers and the outputs,
// comparing all five outputs after every edge.
//
// Every mechanism of the router is counted and must occur at least once:
// a write and a read on each port, a simultaneous write and read, an unused
// code, an idle cycle in which outputs hold, and a reset.
module tb_router2d_logic;
  import router_pkg::*;

  localparam int unsigned W = DATA_W;
  localparam logic [W-1:0] PRATEEK = 64'h0050_7261_7465_656B;

  logic             clk = 0, reset;
  logic [SEL_W-1:0] sel;
  logic             wr, rd;
  logic [W-1:0]     din  [NUM_PORTS];
  logic [W-1:0]     dout [NUM_PORTS];

  logic [W-1:0] m_reg [NUM_PORTS];
  logic [W-1:0] m_out [NUM_PORTS];

  int checks = 0, failures = 0;
  int n_write [NUM_PORTS];
  int n_read  [NUM_PORTS];
  int n_both = 0, n_unused = 0, n_idle = 0, n_reset = 0;

  router2d_logic dut (
    .clk(clk), .reset(reset), .selection_logic(sel),
    .write_logic(wr), .read_logic(rd),
    .East_Data_in(din[0]),  .West_Data_in(din[1]),  .North_Data_in(din[2]),
    .South_Data_in(din[3]), .Local_Data_in(din[4]),
    .East_Data_out(dout[0]),  .West_Data_out(dout[1]),  .North_Data_out(dout[2]),
    .South_Data_out(dout[3]), .Local_Data_out(dout[4])
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string port_name(int p);
    case (p)
      0: return "east";
      1: return "west";
      2: return "north";
      3: return "south";
      default: return "local";
    endcase
  endfunction

  task automatic compare_outputs(string what);
    for (int p = 0; p < NUM_PORTS; p++) begin
      checks++;
      if (dout[p] !== m_out[p]) begin
        failures++;
        $display("FAIL %s: %s_data_out=%h exp %h", what, port_name(p), dout[p], m_out[p]);
      end
    end
  endtask

  // Apply one command at the falling edge, clock it, update the model and
  // compare after the rising edge. Callers may change the input packets just
  // after a rising edge; the router only samples them at the next one.
  task automatic step(logic rst, logic [SEL_W-1:0] s, logic w, logic r);
    int p;
    @(negedge clk);
    reset = rst; sel = s; wr = w; rd = r;
    @(posedge clk);
    p = int'(s);
    if (rst) begin
      n_reset++;
      foreach (m_reg[i]) begin m_reg[i] = '0; m_out[i] = '0; end
    end else begin
      if (p >= NUM_PORTS && (w || r)) n_unused++;
      if (!w && !r) n_idle++;
      if (w && r && p < NUM_PORTS) n_both++;
      // The read sees the register as it was before this edge.
      if (r && p < NUM_PORTS) begin m_out[p] = m_reg[p]; n_read[p]++; end
      if (w && p < NUM_PORTS) begin m_reg[p] = din[p];   n_write[p]++; end
    end
    #1 compare_outputs($sformatf("sel=%0d wr=%0b rd=%0b rst=%0b", s, w, r, rst));
  endtask

  initial begin
    foreach (din[i]) din[i] = '0;
    foreach (n_write[i]) begin n_write[i] = 0; n_read[i] = 0; end
    reset = 1; sel = '0; wr = 0; rd = 0;
    step(1'b1, '0, 1'b0, 1'b0);

    // Part 1: the reference "Prateek" transfer, port after port.
    for (int p = 0; p < NUM_PORTS; p++) begin
      din[p] = PRATEEK;
      step(1'b0, 3'(p), 1'b1, 1'b0);         // write edge
      checks++;
      if (dout[p] !== '0) begin
        failures++;
        $display("FAIL latency: %s output changed on the write edge", port_name(p));
      end
      checks++;
      if (dut.u_registers.q[p] !== PRATEEK) begin
        failures++;
        $display("FAIL register r%0d=%h after write", p, dut.u_registers.q[p]);
      end
      step(1'b0, 3'(p), 1'b0, 1'b1);         // read edge
      checks++;
      if (dout[p] !== PRATEEK) begin
        failures++;
        $display("FAIL %s output %h, expected the word after the read edge", port_name(p), dout[p]);
      end
    end
    for (int p = 0; p < NUM_PORTS; p++) begin
      checks++;
      if (dout[p] !== PRATEEK) begin
        failures++;
        $display("FAIL %s output lost the word", port_name(p));
      end
    end

    // Part 2: random commands against the model.
    for (int t = 0; t < 3000; t++) begin
      foreach (din[i]) din[i] = {$urandom, $urandom};
      step(($urandom_range(0, 199) == 0), 3'($urandom_range(0, 7)),
           1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    end

    for (int p = 0; p < NUM_PORTS; p++) begin
      $display("%s: writes=%0d reads=%0d", port_name(p), n_write[p], n_read[p]);
      checks++;
      if (n_write[p] == 0 || n_read[p] == 0) begin
        failures++;
        $display("FAIL no write or read on %s", port_name(p));
      end
    end
    $display("simultaneous write+read=%0d unused codes=%0d idle=%0d resets=%0d",
             n_both, n_unused, n_idle, n_reset);
    checks++;
    if (n_both == 0 || n_unused == 0 || n_idle == 0 || n_reset < 2) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
