// iccg: Intelligent Cruise Control with GPS. Controls the car speed from the driver's mode
// choice, the GPS speed limit, the radar tracking speed and the measured car state.
//
// It is the control automaton (which mode is active) followed by the mode computation (what
// the active mode does to the accelerator). Inputs are grouped as in the system view: driver,
// GPS, car and cruiseRadar (tracking speed and failure from the processor). Outputs are the
// accelerator command Car_Throttle and the driver information (state, alarm, limiting).
// tick is the regulator's control-period strobe. The state changes one clock after its
// guard; Car_Throttle follows the state combinationally and the regulator on each tick.
module iccg
  import radar_cc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tick,
  input  driver_t        driver,
  input  gps_t           gps,
  input  car_t           car,
  input  cruise_radar_t  cruise_radar,
  output info_driver_t   info_driver,
  output logic [THR_W-1:0] car_throttle
);
  iccg_state_e        state;
  logic [SPEED_W-1:0] car_speed;

  control_automaton u_automaton (
    .clk, .rst_n,
    .mode_req      (driver.mode_req),
    .stdb          (driver.stdb),
    .gps_fail      (gps.fail),
    .tracking_fail (cruise_radar.fail),
    .state
  );

  mode_computation u_modes (
    .clk, .rst_n, .tick, .state,
    .driver_speed      (driver.speed),
    .gps_speed         (gps.speed),
    .tracking_speed    (cruise_radar.speed),
    .measured_speed    (car.speed),
    .measured_throttle (car.throttle),
    .car_speed,
    .car_throttle,
    .alarm             (info_driver.alarm),
    .limiting          (info_driver.limiting)
  );

  assign info_driver.state = state;
endmodule
