// mode_computation: the ModeComputation part of the ICCG, turning the automaton state into a
// target speed, a throttle command and driver information.
//
// Target speed (Car_Speed) multiplexer, as in the published figure: Driver_Speed in Cruise,
// MIN(Driver_Speed, GPS_Speed) in Cruise_GPS, Tracking_Speed in Cruise_Tracking, and
// Car_Speed_Measured in the other states (zero error). The regulator computes
// Car_Throttle_Compute. Throttle multiplexer: the computed throttle in the three cruise
// states, the driver's pedal (Car_Throttle_Measured) in the others.
// Limit and Limit_GPS are this design's reading of the text (the figure covers only the cruise
// modes): the target is the limit (Driver_Speed, or MIN with the GPS speed) and the throttle is
// the smaller of the pedal and the computed throttle, so the driver cannot exceed the limit.
// Alarm raises info.alarm while the measured speed is above the GPS speed limit; the car is
// left to the driver. The regulator is held (tracking the pedal) outside the five regulating
// states. Timing: target and multiplexers are combinational; the regulator updates on tick.
module mode_computation
  import radar_cc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tick,
  input  iccg_state_e         state,
  input  logic [SPEED_W-1:0]  driver_speed,
  input  logic [SPEED_W-1:0]  gps_speed,
  input  logic [SPEED_W-1:0]  tracking_speed,
  input  logic [SPEED_W-1:0]  measured_speed,
  input  logic [THR_W-1:0]    measured_throttle,
  output logic [SPEED_W-1:0]  car_speed,      // target speed
  output logic [THR_W-1:0]    car_throttle,
  output logic                alarm,
  output logic                limiting
);
  logic [SPEED_W-1:0] min_speed;
  logic [THR_W-1:0]   thr_compute;
  logic               regulating;

  assign min_speed  = (driver_speed < gps_speed) ? driver_speed : gps_speed;
  assign regulating = is_cruise_state(state) || is_limit_state(state);

  always_comb begin
    case (state)
      ST_CRUISE, ST_LIMIT:         car_speed = driver_speed;
      ST_CRUISE_GPS, ST_LIMIT_GPS: car_speed = min_speed;
      ST_CRUISE_TRACKING:          car_speed = tracking_speed;
      default:                     car_speed = measured_speed;
    endcase
  end

  regulator_throttle u_reg (
    .clk, .rst_n, .tick,
    .hold              (!regulating),
    .target_speed      (car_speed),
    .measured_speed,
    .measured_throttle,
    .throttle          (thr_compute)
  );

  always_comb begin
    limiting = 1'b0;
    if (is_cruise_state(state)) begin
      car_throttle = thr_compute;
    end else if (is_limit_state(state)) begin
      limiting     = thr_compute < measured_throttle;
      car_throttle = limiting ? thr_compute : measured_throttle;
    end else begin
      car_throttle = measured_throttle;
    end
  end

  assign alarm = (state == ST_ALARM) && (measured_speed > gps_speed);
endmodule
