// adc_pkg: types and constants shared by the dual-slope ADC.
//
// The converter resolves ADC_BITS = 8 bits, as the design specifies. The
// controller is a four-state machine whose states carry the names A..D of
// its state diagram; the binary encoding below is this design's own choice.
package adc_pkg;

  // Resolution of the converter (counter and register width).
  localparam int unsigned ADC_BITS = 8;

  // Controller states.
  //   ST_A : reference switch closed, waiting for the comparator (end of
  //          de-integration, or the initial discharge after power-up)
  //   ST_B : counter reset before the fixed-time phase
  //   ST_C : input switch closed, counting the fixed period until overflow
  //   ST_D : counter reset before the reference phase
  typedef enum logic [1:0] {
    ST_A = 2'd0,
    ST_B = 2'd1,
    ST_C = 2'd2,
    ST_D = 2'd3
  } ctrl_state_t;

endpackage
