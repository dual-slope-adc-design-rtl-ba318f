// det_ff_tb: self-checking test of the double-edge triggered flip-flop.
//
// Changes d at random times between clock edges (never at an edge) and
// checks that q takes d's value at every rising and every falling edge and
// keeps it, whatever d does, until the next edge.
module det_ff_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d = 1'b0;
  logic q;

  int checks = 0, failures = 0;
  int rise_caps = 0, fall_caps = 0;

  det_ff dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held;
    #3;
    checks++;
    if (q !== 1'b0) failures++;
    rst_n = 1'b1;
    #2;
    for (int n = 0; n < 2000; n++) begin
      // half period of 10 time units: d changes twice inside it
      held = d;
      clk = ~clk;
      #1;
      checks++;
      if (q !== held) begin
        failures++;
        $display("%0t: after %s edge q=%b exp=%b", $time, clk ? "rising" : "falling", q, held);
      end
      if (clk) rise_caps += (held == 1'b1); else fall_caps += (held == 1'b1);
      #3 d = $urandom_range(0, 1);
      #3 checks++;
      if (q !== held) begin
        failures++;
        $display("%0t: q followed d between edges", $time);
      end
      d = $urandom_range(0, 1);
      #3;
    end
    checks++;
    if (rise_caps == 0 || fall_caps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
