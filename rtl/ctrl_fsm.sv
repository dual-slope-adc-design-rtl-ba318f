// ctrl_fsm: control logic of the dual-slope ADC.
//
// A four-state machine that sequences one conversion:
//   A --CO--> B --> C --OF--> D --> A
// In A the reference switch (s_ref) is closed and the machine waits for the
// comparator output CO, which says the integrator is discharged. B issues
// the counter Reset. C closes the input switch (s_in) so the counter counts a
// fixed period while the input is integrated; it waits for the counter
// overflow OF. D issues Reset again, and A then closes the reference switch
// while the counter measures the de-integration time until CO.
//
// The sequence, the signal names (CO, Reset, Sin, OF, Sref) and which
// transition issues which signal follow the design's state diagram. The
// timing is this design's choice: outputs are Moore outputs of the present
// state, so Reset is a one-cycle pulse in B and D, and the switches are both
// open during those reset cycles. All state flip-flops are D flip-flops that
// change on the falling edge of clk, like the counter, so that every output
// changes while clk is low and can safely gate a clock with an AND gate.
// rst_n is an asynchronous power-on reset into state A.
//
// Interface: co and of are sampled on the falling edge of clk; cnt_rst,
// s_in, s_ref and state are valid one falling edge after the input that
// causes them.
module ctrl_fsm
  import adc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        co,
  input  logic        of,
  output logic        cnt_rst,
  output logic        s_in,
  output logic        s_ref,
  output ctrl_state_t state
);

  ctrl_state_t state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_A:    if (co) state_d = ST_B;
      ST_B:    state_d = ST_C;
      ST_C:    if (of) state_d = ST_D;
      ST_D:    state_d = ST_A;
      default: state_d = ST_A;
    endcase
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= ST_A;
    else        state_q <= state_d;
  end

  assign cnt_rst = (state_q == ST_B) || (state_q == ST_D);
  assign s_in    = (state_q == ST_C);
  assign s_ref   = (state_q == ST_A);
  assign state   = state_q;

endmodule
