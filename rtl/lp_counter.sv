// lp_counter: N_BITS-bit low-power counter of the dual-slope ADC.
//
// The counter is a chain of 4-bit T flip-flop units (tff_counter4). A unit is
// enabled by the AND of all four bits of the unit below it (a 4-input AND
// between units), so the upper unit steps each time the lower one wraps;
// for the default 8 bits that is two units and one such gate.
// The count enable of the lowest unit is the OR of Sin and Sref (the counter
// runs in both phases) ANDed with the inverted comparator output, so the
// clock of every flip-flop is frozen while CO is high and the count holds
// the exact de-integration time. The controller's Reset clears all
// flip-flops through their multiplexers; Reset is not blocked by CO.
//
// Overflow: of is the carry out of the top unit and is only passed on while
// Sin is high. In the fixed phase it ends the phase after 2**N_BITS counts;
// in the reference phase a long de-integration wraps the count silently.
//
// Timing: all flip-flops change on the falling edge of clk. clr, s_in, s_ref
// and co must change only while clk is low. of is combinational and is high
// during the last cycle of the fixed period (count = 2**N_BITS-1).
// The unit structure, the OR, the freeze gating and the reset multiplexers
// follow the design; gating overflow with Sin is how this design reads the
// rule that the counter must not overflow while measuring the input.
module lp_counter #(
  parameter int unsigned N_BITS = adc_pkg::ADC_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              s_in,
  input  logic              s_ref,
  input  logic              co,
  output logic [N_BITS-1:0] q,
  output logic              of
);

  localparam int unsigned UNITS = N_BITS / 4;

  logic [UNITS-1:0] en;
  logic [UNITS-1:0] carry;

  assign en[0] = (s_in | s_ref) & ~co;

  for (genvar u = 0; u < UNITS; u++) begin : g_unit
    tff_counter4 u_cnt (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (clr),
      .en    (en[u]),
      .q     (q[4*u +: 4]),
      .carry (carry[u])
    );
    // 4-input AND of this unit's bits (with its enable) steps the next unit
    if (u + 1 < UNITS) begin : g_chain
      assign en[u+1] = carry[u];
    end
  end

  assign of = s_in & carry[UNITS-1];

  initial begin
    assert (N_BITS % 4 == 0 && N_BITS >= 4)
      else $error("lp_counter: N_BITS must be a positive multiple of 4");
  end

endmodule
