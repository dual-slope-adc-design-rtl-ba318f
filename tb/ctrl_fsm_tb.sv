// ctrl_fsm_tb: self-checking test of the ADC controller.
//
// Drives the comparator output (co) and counter overflow (of) with random
// waits, changing them just after each falling clock edge, and checks before
// every falling edge that the state and the Reset, Sin and Sref outputs match
// the expected sequence A -(co)-> B -> C -(of)-> D -> A. Inputs that are not
// looked at in a state (co outside A, of outside C) are driven randomly to
// show that they are ignored.
module ctrl_fsm_tb;
  import adc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;  // dropped at time 1 so the asynchronous reset sees an edge
  logic co = 1'b0, of = 1'b0;
  logic cnt_rst, s_in, s_ref;
  ctrl_state_t state;

  int checks = 0, failures = 0;
  int visits [4];

  ctrl_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [1:0] exp_st);
    logic e_rst, e_in, e_ref;
    e_rst = (exp_st == 2'd1) || (exp_st == 2'd3);
    e_in  = (exp_st == 2'd2);
    e_ref = (exp_st == 2'd0);
    checks++;
    if (state != ctrl_state_t'(exp_st) || cnt_rst != e_rst || s_in != e_in || s_ref != e_ref) begin
      failures++;
      $display("%0t: state=%0d exp=%0d rst=%b in=%b ref=%b", $time, state, exp_st, cnt_rst, s_in, s_ref);
    end
  endtask

  initial begin
    logic [1:0] exp_st;
    exp_st = 2'd0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk); #1;
      // random stimulus; a long run of zeros keeps the machine waiting
      co = ($urandom_range(0, 5) == 0);
      of = ($urandom_range(0, 5) == 0);
      @(posedge clk);
      check(exp_st);
      visits[exp_st]++;
      // reference transition taken at the coming falling edge
      case (exp_st)
        2'd0: if (co) exp_st = 2'd1;
        2'd1: exp_st = 2'd2;
        2'd2: if (of) exp_st = 2'd3;
        default: exp_st = 2'd0;
      endcase
    end
    // a reset in the middle of a conversion returns to A
    @(negedge clk); #1;
    co = 1'b1;
    of = 1'b0;
    wait (state == ST_C);
    #1 rst_n = 1'b0;
    #1 checks++;
    if (state != ST_A || !s_ref) failures++;
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (visits[s] < 10) begin
        failures++;
        $display("state %0d visited only %0d times", s, visits[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
