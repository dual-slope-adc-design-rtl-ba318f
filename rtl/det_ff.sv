// det_ff: double-edge triggered flip-flop.
//
// Two transparent latches in parallel share the data input. The upper one is
// transparent while clk is high and holds from the falling edge; the lower
// one is transparent while clk is low and holds from the rising edge. The
// output selects the latch that is currently holding: the lower one while
// clk is high, the upper one while clk is low. The output therefore takes the
// value of d at every rising and every falling edge of clk, which gives the
// data rate of a single-edge flip-flop at half the clock frequency.
//
// This parallel-latch structure is the one the design uses; the locally
// inverted clock of the transistor circuit appears here as the two opposite
// latch enables and the select. The latches are intended: a synthesis tool
// reports them as latches, and that is the circuit. rst_n (asynchronous,
// active low, this design's addition) clears both latches.
//
// Timing: d must be stable around both edges of clk; q changes right after
// each edge.
module det_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic lat_hi;  // transparent while clk = 1
  logic lat_lo;  // transparent while clk = 0

  always_latch begin
    if (!rst_n)   lat_hi = 1'b0;
    else if (clk) lat_hi = d;
  end

  always_latch begin
    if (!rst_n)    lat_lo = 1'b0;
    else if (!clk) lat_lo = d;
  end

  assign q = clk ? lat_lo : lat_hi;

endmodule
