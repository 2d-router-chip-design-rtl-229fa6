// tb_port_register: checks one output port register.
//
// Applies random load and data for many cycles and compares the output after
// each rising edge with a reference value: the data when load was high, the
// previous value otherwise, zero after reset. A reset is also applied while
// load is high, which must win.
module tb_port_register;
  localparam int unsigned W = 64;

  logic         clk = 0, reset, load;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;
  int loads = 0, holds = 0;

  port_register #(.WIDTH(W)) dut (.clk(clk), .reset(reset), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; load = 1; d = '1;
    @(posedge clk); #1;
    model = '0;
    checks++;
    if (q !== model) begin failures++; $display("FAIL reset with load: q=%h", q); end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      reset = (t == 250);
      load  = $urandom_range(0, 1);
      d     = {$urandom, $urandom};
      @(posedge clk);
      if (reset)     model = '0;
      else if (load) begin model = d; loads++; end
      else           holds++;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL t=%0d load=%0b reset=%0b q=%h exp %h", t, load, reset, q, model);
      end
    end
    checks++;
    if (loads == 0 || holds == 0) begin failures++; $display("FAIL no load or no hold seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
