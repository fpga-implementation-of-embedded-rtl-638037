// regulator_throttle: the Regulator_Throttle of the ICCG, the accelerator command that brings
// the measured speed to the target speed.
//
// The published block is a subtractor (target minus measured speed) followed by a Corrector
// whose law is not given. This design uses a proportional-integral corrector in fixed point
// with FRAC fraction bits:
//   e        = Car_Speed - Car_Speed_Measured                  (km/h, signed)
//   integ'   = sat(integ + KI * e)                              (0 .. 100 % << FRAC)
//   throttle = sat((integ' + KP * e) >> FRAC)                   (0 .. 100 %)
// Both are updated on each tick (the control period); throttle is registered. While hold is
// high (the regulator's output is not in use) the integrator follows the driver's pedal and
// the output equals it, so taking over is bumpless. Gains, widths and saturation are this
// design's own choices. Latency: one clock after a tick.
module regulator_throttle
  import radar_cc_pkg::*;
#(
  parameter int KP   = 32,   // proportional gain, in 1/2^FRAC percent per km/h
  parameter int KI   = 2,    // integral gain, in 1/2^FRAC percent per km/h per tick
  parameter int FRAC = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tick,
  input  logic                hold,
  input  logic [SPEED_W-1:0]  target_speed,      // Car_Speed
  input  logic [SPEED_W-1:0]  measured_speed,    // Car_Speed_Measured
  input  logic [THR_W-1:0]    measured_throttle, // Car_Throttle_Measured (for hold)
  output logic [THR_W-1:0]    throttle           // Car_Throttle_Compute
);
  localparam int IW = 24;
  localparam logic signed [IW-1:0] IMAX = IW'(THR_MAX << FRAC);

  logic signed [IW-1:0] integ, integ_n, sum_n, err;

  function automatic logic signed [IW-1:0] sat(logic signed [IW-1:0] v);
    if (v < 0)    return '0;
    if (v > IMAX) return IMAX;
    return v;
  endfunction

  always_comb begin
    err     = IW'(signed'({1'b0, target_speed})) - IW'(signed'({1'b0, measured_speed}));
    integ_n = sat(integ + IW'(KI) * err);
    sum_n   = sat(integ_n + IW'(KP) * err);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ    <= '0;
      throttle <= '0;
    end else if (tick) begin
      if (hold) begin
        integ    <= IW'(measured_throttle) <<< FRAC;
        throttle <= measured_throttle;
      end else begin
        integ    <= integ_n;
        throttle <= THR_W'(sum_n >>> FRAC);
      end
    end
  end
endmodule
