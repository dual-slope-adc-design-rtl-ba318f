// dual_slope_adc_tb: end-to-end test of the 8-bit dual-slope ADC at its
// default parameters.
//
// Runs a series of conversions. Each time the controller enters its first
// Reset state (B) the next input voltage is applied; when it next enters B
// the register must hold ceil(256 * vin / vref), computed here with integer
// arithmetic, and the conversion must have taken 259 + result clock cycles
// (1 reset, 256 fixed-phase, 1 reset and result + 1 reference cycles).
// Inputs: zero, full scale less one step, random values, reference values
// of different sizes, and one input above the reference (the count wraps,
// and no overflow may be raised in the reference phase).
// In one conversion sleep is held for 40 cycles; the controller, the counter
// and the register must not move during it, and the result of that
// conversion is not checked (the analog part keeps integrating).
// Monitors check at every clock edge that the register changes only while
// the comparator output is high. Each mechanism (overflow, counter reset,
// count freeze on CO, register capture with the half-rate register clock
// low and high when CO rises, sleep, zero input, over-range wrap)
// is counted, and one that never happens is a failure.
module dual_slope_adc_tb;
  import adc_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned VW = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b1;  // dropped at time 1 so the asynchronous reset sees an edge
  logic sleep = 1'b0;
  logic [VW-1:0] vin = '0, vref = 16'd10000;
  logic [N-1:0] dout, count;
  logic co, of, cnt_rst, s_in, s_ref;
  ctrl_state_t state;
  logic [VW+N:0] integ;

  int checks = 0, failures = 0;
  int n_of = 0, n_rst = 0, n_freeze = 0, n_capture = 0, n_sleep = 0;
  int n_zero = 0, n_wrap = 0, n_of_ref = 0;
  longint cycle = 0;

  dual_slope_adc dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register may only change while the comparator output is high
  always @(dout) begin
    if (rst_n && cycle > 2 && !co) begin
      failures++;
      $display("%0t: register changed without CO", $time);
    end
  end

  // mechanism counters, sampled while clk is high (all signals settled)
  always @(posedge clk) if (rst_n) begin
    if (of) n_of++;
    if (of && s_ref) n_of_ref++;
    if (cnt_rst) n_rst++;
    if (co && s_ref && !sleep) n_freeze++;
  end
  // a capture starts with the half-rate register clock low or high
  int n_cap_lo = 0, n_cap_hi = 0;
  always @(posedge co) begin
    n_capture++;
    if (dut.clk_half) n_cap_hi++; else n_cap_lo++;
  end

  function automatic longint unsigned expected(input logic [VW-1:0] vi, input logic [VW-1:0] vr);
    return (((longint'(vi) << N) + vr - 1) / vr) % (1 << N);
  endfunction

  initial begin
    logic [VW-1:0] vin_now, vref_now;
    longint start;
    bit disturbed, first;
    longint unsigned exp_code;
    first = 1'b1;
    disturbed = 1'b0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int n = 0; n < 260; n++) begin
      wait (state == ST_B);
      // a conversion has just ended: check it
      if (!first && !disturbed) begin
        exp_code = expected(vin_now, vref_now);
        checks++;
        if (longint'(dout) != exp_code) begin
          failures++;
          $display("vin=%0d vref=%0d: dout=%0d exp=%0d", vin_now, vref_now, dout, exp_code);
        end
        checks++;
        if (cycle - start != 259 + longint'((longint'(vin_now) << N) + vref_now - 1) / vref_now) begin
          failures++;
          $display("vin=%0d vref=%0d: %0d cycles", vin_now, vref_now, cycle - start);
        end
        if (vin_now == 0) n_zero++;
        if (vin_now >= vref_now) n_wrap++;
      end
      first = 1'b0;
      disturbed = 1'b0;
      start = cycle;
      // apply the next input while clk is low, before the fixed phase
      @(posedge clk); @(negedge clk); #1;
      if (n % 40 == 0) vref = VW'($urandom_range(300, 65535));
      case (n % 40)
        0: vin = '0;
        1: vin = vref - VW'(1);                       // full scale less one step
        2: vin = VW'(longint'(vref) * 5 / 4);          // over range: wraps
        3: vin = VW'(longint'(vref) / 2);
        default: vin = VW'($urandom_range(0, vref - 1));
      endcase
      if (vin >= vref && longint'(vref) * 5 / 4 > 65535) vin = vref - VW'(2);
      vin_now = vin;
      vref_now = vref;
      // one conversion with sleep in the fixed phase
      if (n == 7) begin
        logic [N-1:0] c0, d0;
        ctrl_state_t s0;
        repeat (30) @(negedge clk);
        #1 sleep = 1'b1;
        c0 = count; d0 = dout; s0 = state;
        repeat (40) begin
          @(negedge clk); #1;
          checks++;
          if (count != c0 || dout != d0 || state != s0) begin
            failures++;
            $display("%0t: state moved during sleep", $time);
          end
        end
        sleep = 1'b0;
        n_sleep++;
        disturbed = 1'b1;
      end
      @(negedge clk);
    end
    checks++;
    if (n_of == 0 || n_rst == 0 || n_freeze == 0 || n_capture == 0 || n_sleep == 0 ||
        n_zero == 0 || n_wrap == 0 || n_of_ref != 0 || n_cap_lo == 0 || n_cap_hi == 0) begin
      failures++;
    end
    $display("overflows=%0d resets=%0d freezes=%0d captures=%0d (half clock low %0d, high %0d) sleeps=%0d zero=%0d wraps=%0d of_in_ref=%0d",
             n_of, n_rst, n_freeze, n_capture, n_cap_lo, n_cap_hi, n_sleep, n_zero, n_wrap, n_of_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
