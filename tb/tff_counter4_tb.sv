// tff_counter4_tb: self-checking test of the 4-bit T flip-flop counter.
//
// Drives en and clr randomly (changed just after each falling clock edge,
// while clk is low) and compares q and carry with a plain integer count. It
// also counts the falling edges on each stage's gated clock and checks that
// a stage is clocked exactly when it toggles or is cleared, which is the
// clock-gating property of the counter.
module tff_counter4_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b1;  // dropped at time 1 so the asynchronous reset sees an edge
  logic clr = 1'b0, en = 1'b0;
  logic [3:0] q;
  logic carry;

  int checks = 0, failures = 0;
  int edges [4];
  int expected_edges [4];
  int wraps = 0;
  logic started = 1'b0;  // set once reset is over

  tff_counter4 dut (.*);

  always #5 clk = ~clk;

  for (genvar i = 0; i < 4; i++) begin : g_mon
    always @(negedge dut.gck[i]) if (started) edges[i]++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] model;
    model = '0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    started = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk); #1;
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 40) == 0);
      @(posedge clk);
      checks++;
      if (q !== model || carry !== (en && model == 4'hF)) begin
        failures++;
        $display("%0t: q=%h exp=%h carry=%b", $time, q, model, carry);
      end
      // edges the coming falling edge should produce, and the next count
      for (int i = 0; i < 4; i++) begin
        logic t;
        t = en;
        for (int k = 0; k < i; k++) t &= model[k];
        if (clr || t) expected_edges[i]++;
      end
      if (clr) model = '0;
      else if (en) begin
        if (model == 4'hF) wraps++;
        model = model + 4'd1;
      end
    end
    @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (edges[i] != expected_edges[i]) begin
        failures++;
        $display("stage %0d: %0d clock edges, expected %0d", i, edges[i], expected_edges[i]);
      end
    end
    checks++;
    if (wraps < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
