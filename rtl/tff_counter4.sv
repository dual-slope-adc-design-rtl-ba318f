// tff_counter4: 4-bit low-power binary up counter built from T flip-flops.
//
// Each stage i is a toggle flip-flop (D = not Q) whose clock is gated by its
// toggle condition, so a stage that will not change receives no clock edge:
//   T0 = en, T1 = en Q0, T2 = en Q0 Q1, T3 = en Q0 Q1 Q2,   Clk_i = T_i clk.
// With en tied high these are the design's excitation functions of the 4-bit
// T counter (T0 = 1, T1 = Q0, T2 = Q0Q1, T3 = Q0Q1Q2); en is this design's
// addition that lets two units be chained and the count be frozen.
// A 2-to-1 multiplexer in front of each flip-flop selects 0 when clr is high,
// and clr also opens every stage's clock gate, so a clear always reaches all
// four flip-flops.
//
// Timing: the flip-flops trigger on the falling edge of their gated clocks.
// T_i and clr must be stable while clk is high (they change only after a
// falling edge in this design), which keeps the AND-gated clocks free of
// glitches. carry = en & Q0 Q1 Q2 Q3 is high in the cycle before the unit
// wraps from 15 to 0. rst_n clears the unit asynchronously at power-up.
module tff_counter4 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       en,
  output logic [3:0] q,
  output logic       carry
);

  logic [3:0] t;    // toggle conditions T_i
  logic [3:0] gck;  // gated clocks Clk_i

  assign t[0] = en;
  assign t[1] = t[0] & q[0];
  assign t[2] = t[1] & q[1];
  assign t[3] = t[2] & q[2];

  assign carry = t[3] & q[3];

  for (genvar i = 0; i < 4; i++) begin : g_stage
    logic tq;  // the stage's flip-flop

    assign gck[i] = clk & (clr | t[i]);

    always_ff @(negedge gck[i] or negedge rst_n) begin
      if (!rst_n)   tq <= 1'b0;
      else if (clr) tq <= 1'b0;
      else          tq <= ~tq;
    end

    assign q[i] = tq;
  end

endmodule
