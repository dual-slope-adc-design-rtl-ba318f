// lp_counter_tb: self-checking test of the 8-bit low-power counter.
//
// Drives Sin, Sref, the comparator output and the controller Reset randomly
// (all changed while clk is low) and compares the count and the overflow
// flag with an integer model: the count steps when Sin or Sref is high and
// co is low, clears on Reset even while co is high, and of is high only in
// the Sin phase on the cycle before the count wraps. Long runs with co low
// make the count reach and pass 255 several times.
module lp_counter_tb;
  localparam int unsigned N = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b1;  // dropped at time 1 so the asynchronous reset sees an edge
  logic clr = 1'b0, s_in = 1'b0, s_ref = 1'b0, co = 1'b0;
  logic [N-1:0] q;
  logic of;

  int checks = 0, failures = 0;
  int n_of = 0, n_wrap_ref = 0, n_freeze = 0, n_clr_co = 0;

  lp_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] model;
    logic run, exp_of;
    model = '0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int n = 0; n < 40000; n++) begin
      @(negedge clk); #1;
      // phases of a few hundred cycles, so the count reaches its top
      if ((n % 300) == 0) begin
        s_in  = ((n / 300) % 2 == 0);
        s_ref = !s_in && ($urandom_range(0, 4) != 0);
      end
      co  = ($urandom_range(0, 30) == 0);
      clr = ($urandom_range(0, 500) == 0);
      if ((n % 997) == 0) begin  // a Reset while the comparator output is high
        clr = 1'b1;
        co  = 1'b1;
      end
      @(posedge clk);
      run = (s_in || s_ref) && !co;
      exp_of = s_in && run && (model == '1);
      checks++;
      if (q !== model || of !== exp_of) begin
        failures++;
        $display("%0t: q=%0d exp=%0d of=%b exp=%b", $time, q, model, of, exp_of);
      end
      if (exp_of) n_of++;
      if (s_ref && run && model == '1) n_wrap_ref++;
      if ((s_in || s_ref) && co) n_freeze++;
      if (clr && co) n_clr_co++;
      if (clr) model = '0;
      else if (run) model = model + 1'b1;
    end
    checks++;
    if (n_of == 0 || n_wrap_ref == 0 || n_freeze == 0 || n_clr_co == 0) begin
      failures++;
      $display("not exercised: of=%0d wrap=%0d freeze=%0d clr_co=%0d", n_of, n_wrap_ref, n_freeze, n_clr_co);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
