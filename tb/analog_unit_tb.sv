// analog_unit_tb: self-checking test of the integrator/comparator model.
//
// For random input and reference values it closes the input switch for
// 2**N_BITS steps, holds for a step with both switches open, then closes the
// reference switch and counts the steps until the comparator output rises.
// The count must be ceil(2**N_BITS * vin / vref), worked out here with
// integer arithmetic, and the comparator must stay low whenever the
// reference switch is open.
module analog_unit_tb;
  localparam int unsigned N  = 8;
  localparam int unsigned VW = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b1;  // dropped at time 1 so the asynchronous reset sees an edge
  logic [VW-1:0] vin = '0, vref = '0;
  logic s_in = 1'b0, s_ref = 1'b0;
  logic co;
  logic [VW+N:0] integ;

  int checks = 0, failures = 0;

  analog_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned expect_steps;
    int steps;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      vref = VW'($urandom_range(100, 65535));
      case (n)
        0:       vin = '0;
        1:       vin = vref - VW'(1);
        default: vin = VW'($urandom_range(0, vref - 1));
      endcase
      expect_steps = ((longint'(vin) << N) + vref - 1) / vref;
      @(negedge clk); #1;
      s_in = 1'b1;
      repeat (1 << N) begin
        @(posedge clk);
        checks++;
        if (co) failures++;
        @(negedge clk); #1;
      end
      s_in = 1'b0;
      @(posedge clk);
      checks++;
      if (co || integ != (longint'(vin) << N)) begin
        failures++;
        $display("integrated %0d, exp %0d", integ, longint'(vin) << N);
      end
      @(negedge clk); #1;
      s_ref = 1'b1;
      steps = 0;
      #1;
      while (!co) begin
        @(negedge clk); #1;
        steps++;
      end
      s_ref = 1'b0;
      #1 checks++;
      if (co) failures++;
      checks++;
      if (steps != int'(expect_steps)) begin
        failures++;
        $display("vin=%0d vref=%0d: %0d steps, exp %0d", vin, vref, steps, expect_steps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
