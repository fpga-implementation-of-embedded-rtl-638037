// radar_cc_top: the single-FPGA cruise control and anti-collision radar.
//
// Three hardware components, wired as in the system view:
//   * radar_generator - the LFSR reference code (sent to the emitter and to the detector) and
//                       the modulo-1023 time base counter;
//   * hos_detector    - the HOS correlation of the received wave with the reference code and
//                       the peak detector, which raises the obstacle interrupt;
//   * iccg            - the cruise control automaton and mode computation driving the throttle.
// The fourth component, the soft-core processor that turns interrupts into distances, tracks
// obstacles and drives the brake and the display, is software and is not part of this RTL: its
// inputs (obstacle, counter, car state) are outputs here, and what it sends back (the
// cruiseRadar tracking speed and failure, the detection threshold) are inputs.
// One received sample and one code chip per clock; ctrl_tick paces the speed regulator.
module radar_cc_top
  import radar_cc_pkg::*;
#(
  parameter int unsigned N = N_CODE,
  parameter int unsigned L = L_LAGS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ctrl_tick,
  // ICCG side
  input  gps_t                     gps,
  input  driver_t                  driver,
  input  car_t                     car,
  input  cruise_radar_t            cruise_radar,    // from the processor
  output info_driver_t             info_driver,
  output logic [THR_W-1:0]         car_throttle,
  // radar side
  input  logic [Y_W-1:0]           radar_reception,
  output logic                     radar_emission,
  input  logic signed [J_W-1:0]    detect_threshold, // from the processor
  output obstacle_t                obstacle_detection,
  output logic [$clog2(N)-1:0]     counter
);
  logic ref_code;
  logic period_start;

  iccg u_iccg (
    .clk, .rst_n, .tick(ctrl_tick),
    .driver, .gps, .car, .cruise_radar,
    .info_driver, .car_throttle
  );

  radar_generator #(.N(N)) u_gener (
    .clk, .rst_n,
    .ref_code, .radar_emission, .counter, .period_start
  );

  hos_detector #(.N(N), .L(L)) u_detect (
    .clk, .rst_n,
    .y_in      (radar_reception),
    .c_in      (ref_code),
    .threshold (detect_threshold),
    .obstacle  (obstacle_detection),
    .cyc_valid (), .cyc_k (), .cycc_out (), .cycy_out (),
    .j_valid (), .j_i0 (), .j_val ()
  );
endmodule
