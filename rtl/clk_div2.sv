// clk_div2: divide-by-two clock for the double-edge triggered register.
//
// A single flip-flop toggles on every rising edge of clk, so clk_half has half
// the frequency of clk and an edge at each rising edge of clk. A DET register
// clocked by clk_half captures once per clk cycle, the same rate a
// single-edge register reaches on the full clock. The division is what the
// design's "halved" register clock needs; placing the divider here and
// toggling it on the rising edge of clk (mid-cycle for the falling-edge logic
// of the ADC) is this design's choice. rst_n clears it asynchronously.
module clk_div2 (
  input  logic clk,
  input  logic rst_n,
  output logic clk_half
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clk_half <= 1'b0;
    else        clk_half <= ~clk_half;
  end

endmodule
