// clk_div2_tb: self-checking test of the divide-by-two register clock.
//
// Checks that clk_half is low after reset, toggles at every rising edge of
// clk and nowhere else, so that it has exactly half as many rising edges as
// clk.
module clk_div2_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b1;  // dropped at time 1 so the asynchronous reset sees an edge
  logic clk_half;

  int checks = 0, failures = 0;
  int half_rises = 0;

  clk_div2 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk_half) half_rises++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_level;
    #1 rst_n = 1'b0;
    #2 checks++;
    if (clk_half !== 1'b0) failures++;
    #9 rst_n = 1'b1;
    exp_level = 1'b0;
    half_rises = 0;
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk); #1;
      exp_level = ~exp_level;
      checks++;
      if (clk_half !== exp_level) failures++;
      @(negedge clk); #1;
      checks++;
      if (clk_half !== exp_level) failures++;
    end
    checks++;
    if (half_rises != 500) begin
      failures++;
      $display("clk_half rose %0d times in 1000 clock cycles", half_rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
