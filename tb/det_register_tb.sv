// det_register_tb: self-checking test of the CO-gated DET output register.
//
// A free-running clock; d changes just after every falling edge and is held
// until the next one, as the counter output does. co is raised for random
// single cycles (changed while clk is low). The register must store d when
// co is high, at the rising edge and again at the falling edge, and must hold
// its value through every cycle in which co is low.
module det_register_tb;
  localparam int unsigned N = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b1;  // dropped at time 1 so the asynchronous reset sees an edge
  logic co = 1'b0;
  logic [N-1:0] d = '0;
  logic [N-1:0] q;

  int checks = 0, failures = 0, captures = 0;

  det_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] model;
    model = '0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk); #1;
      d  = N'($urandom);
      co = ($urandom_range(0, 6) == 0);
      #2;
      checks++;  // clk low: nothing may change before the rising edge
      if (q !== model) begin
        failures++;
        $display("%0t: q=%h exp=%h (low phase)", $time, q, model);
      end
      @(posedge clk); #1;
      if (co) begin
        model = d;
        captures++;
      end
      checks++;
      if (q !== model) begin
        failures++;
        $display("%0t: q=%h exp=%h co=%b", $time, q, model, co);
      end
    end
    checks++;
    if (captures < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
