// analog_unit: behavioural model of the ADC's analog part (integrator and
// comparator). It is not a circuit to synthesize: the real part is an RC
// integrator and a comparator built from two-stage op-amps, with an analog
// switch in front of the integrator.
//
// The model works in discrete time, one step per falling edge of clk, and
// represents voltages as unsigned numbers in any common unit:
//   s_in  closed : the capacitor charge grows by vin per step
//   s_ref closed : the charge falls by vref per step, and stops at zero,
//                  where the capacitor is fully discharged
//   neither      : the charge is held
// co, the comparator output, is high while the reference is applied and the
// charge is zero: it is the "capacitor discharged" pulse that ends a
// de-integration. With the switch driven by Sin for 2**N_BITS steps and then
// by Sref, the number of reference steps is ceil(2**N_BITS * vin / vref).
// Stopping at zero (no overshoot) and the unsigned single-polarity signals
// are simplifications of this model; the design's reference source can have
// either polarity.
//
// Interface: co is combinational from the charge and s_ref, so it changes
// right after a falling edge of clk, like the controller outputs. integ is the
// charge, for observation. rst_n discharges the capacitor.
module analog_unit #(
  parameter int unsigned N_BITS = adc_pkg::ADC_BITS,
  parameter int unsigned VW     = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [VW-1:0]       vin,
  input  logic [VW-1:0]       vref,
  input  logic                s_in,
  input  logic                s_ref,
  output logic                co,
  output logic [VW+N_BITS:0]  integ
);

  localparam int unsigned AW = VW + N_BITS + 1;

  logic [AW-1:0] charge;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)     charge <= '0;
    else if (s_in)  charge <= charge + AW'(vin);
    else if (s_ref) charge <= (charge > AW'(vref)) ? charge - AW'(vref) : '0;
  end

  assign co    = s_ref && (charge == '0);
  assign integ = charge;

endmodule
