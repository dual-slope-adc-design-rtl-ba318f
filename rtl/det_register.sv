// det_register: N_BITS-bit low-power output register of the ADC.
//
// Each bit is a double-edge triggered flip-flop (det_ff) whose clock passes
// through its own 2-input AND gate with the comparator output CO. The
// register is therefore clocked only while CO is high, i.e. when a
// conversion has ended, and then stores the counter on both clock edges;
// at all other times its flip-flops see no clock at all.
//
// In the ADC the counter is frozen while CO is high, so both captures of a
// CO pulse store the same value, the conversion result, which q then holds
// until the next CO pulse. The DET flip-flops and the per-bit AND gates with
// CO follow the design. In the ADC the register is fed half the system clock
// (clk_div2), which the DET flip-flops turn back into one capture per system
// clock cycle.
//
// Timing: a capture happens at every edge of clk that occurs while co is
// high, and also when co rises while clk is high (the gated clock rises) or
// falls while clk is high (it falls). d must be stable at those instants; at
// the last of them it must hold the value to be kept.
module det_register #(
  parameter int unsigned N_BITS = adc_pkg::ADC_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              co,
  input  logic [N_BITS-1:0] d,
  output logic [N_BITS-1:0] q
);

  for (genvar i = 0; i < N_BITS; i++) begin : g_bit
    logic gck;
    assign gck = clk & co;

    det_ff u_ff (
      .clk   (gck),
      .rst_n (rst_n),
      .d     (d[i]),
      .q     (q[i])
    );
  end

endmodule
