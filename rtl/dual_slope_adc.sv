// dual_slope_adc: N_BITS-bit dual-slope (integrating) analog-to-digital
// converter with a low-power digital part.
//
// A conversion integrates the input for a fixed 2**N_BITS clock cycles and
// then de-integrates the reference, counting the cycles until the comparator
// reports that the capacitor is empty. That count, about
// 2**N_BITS * vin / vref, is the result.
//
//   analog_unit  : integrator and comparator (behavioural model)
//   ctrl_fsm     : four-state controller, issues Reset, Sin and Sref
//   lp_counter   : counter of T flip-flops with gated clocks; the same counter
//                  times the fixed phase (its overflow ends it) and measures
//                  the reference phase
//   det_register : double-edge triggered register, clocked only while the
//                  comparator output is high, that stores the result
//   clk_div2     : halves the clock for the register
//
// Low-power clocking. The counter's flip-flops are clocked only when they
// toggle, and are frozen while the comparator output is high. The register is
// clocked only while the comparator output is high, and at half the
// clock frequency: its DET flip-flops act on both edges of clk/2, so within
// the one clock cycle in which the comparator output is high they capture the
// frozen count at least once with settled data. The controller and the
// counter take their clock through one more AND gate with the inverse of
// sleep, so in sleep mode they receive no clock edges and hold their state.
//
// Timing: every flip-flop except the register's and the divider's changes on
// the falling edge of clk, so every clock-gating signal changes while clk is low. sleep must
// likewise change only while clk is low. The analog model keeps running in
// sleep mode, so a conversion interrupted by sleep returns a wrong result;
// the conversion after it is exact. From a comparator pulse seen in state A,
// one conversion takes 2**N_BITS + 3 + dout clock cycles (1 reset cycle,
// 2**N_BITS fixed cycles, 1 reset cycle, dout + 1 cycles of de-integration),
// and dout = ceil(2**N_BITS * vin / vref) for vin < vref; an input at or above
// the reference wraps the result modulo 2**N_BITS.
module dual_slope_adc
  import adc_pkg::*;
#(
  parameter int unsigned N_BITS = adc_pkg::ADC_BITS,
  parameter int unsigned VW     = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sleep,
  input  logic [VW-1:0]     vin,
  input  logic [VW-1:0]     vref,
  output logic [N_BITS-1:0] dout,
  output logic [N_BITS-1:0] count,
  output logic              co,
  output logic              of,
  output logic              cnt_rst,
  output logic              s_in,
  output logic              s_ref,
  output ctrl_state_t       state,
  output logic [VW+N_BITS:0] integ
);

  logic clk_core;  // clock of controller and counter, blocked in sleep mode
  logic clk_half;  // half-rate clock of the DET register

  assign clk_core = clk & ~sleep;

  analog_unit #(.N_BITS(N_BITS), .VW(VW)) u_analog (
    .clk   (clk),
    .rst_n (rst_n),
    .vin   (vin),
    .vref  (vref),
    .s_in  (s_in),
    .s_ref (s_ref),
    .co    (co),
    .integ (integ)
  );

  ctrl_fsm u_ctrl (
    .clk     (clk_core),
    .rst_n   (rst_n),
    .co      (co),
    .of      (of),
    .cnt_rst (cnt_rst),
    .s_in    (s_in),
    .s_ref   (s_ref),
    .state   (state)
  );

  lp_counter #(.N_BITS(N_BITS)) u_counter (
    .clk   (clk_core),
    .rst_n (rst_n),
    .clr   (cnt_rst),
    .s_in  (s_in),
    .s_ref (s_ref),
    .co    (co),
    .q     (count),
    .of    (of)
  );

  clk_div2 u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .clk_half (clk_half)
  );

  det_register #(.N_BITS(N_BITS)) u_register (
    .clk   (clk_half),
    .rst_n (rst_n),
    .co    (co),
    .d     (count),
    .q     (dout)
  );

endmodule
