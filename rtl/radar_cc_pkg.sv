// Shared types and constants of the cruise-control / anti-collision radar FPGA.
//
// Radar detection sizes: a reference code of N = 1023 chips, L = 150 lags (one lag per metre
// of detection range), 4-bit unsigned received samples, a 15-bit signed Cycc, a 19-bit signed
// Cycy and a 40-bit J32. These numbers follow the published design; the ICCG widths (8-bit
// speeds in km/h, throttle in percent) and the state encoding are this design's own choices.
package radar_cc_pkg;

  // ---------------- radar detection ----------------
  localparam int unsigned N_CODE  = 1023;  // reference code length (samples per frame)
  localparam int unsigned L_LAGS  = 150;   // lags = maximum detection distance in metres
  localparam int unsigned Y_W     = 4;     // received sample width (unsigned)
  localparam int unsigned CYCC_W  = 15;    // signed width of Cycc
  localparam int unsigned CYCY_W  = 19;    // signed width of Cycy
  localparam int unsigned J_W     = 40;    // signed width of J32
  localparam int unsigned LFSR_W  = 10;    // 2^10 - 1 = 1023

  // Result of the peak detector, seen by the processor.
  typedef struct packed {
    logic                irq;       // one-cycle interrupt: obstacle found in this sweep
    logic [7:0]          distance;  // lag index i0 of the peak (metres)
    logic signed [J_W-1:0] peak;    // J32 value at the peak
  } obstacle_t;

  // ---------------- ICCG ----------------
  localparam int unsigned SPEED_W = 8;     // km/h, 0..255
  localparam int unsigned THR_W   = 7;     // throttle, percent 0..100
  localparam int unsigned THR_MAX = 100;

  // Modes the driver can request (the guards in brackets in the automaton figure).
  typedef enum logic [2:0] {
    REQ_NONE           = 3'd0,
    REQ_ALARM          = 3'd1,
    REQ_LIMIT          = 3'd2,
    REQ_CRUISE         = 3'd3,
    REQ_LIMIT_GPS      = 3'd4,
    REQ_CRUISE_GPS     = 3'd5,
    REQ_CRUISE_TRACKING= 3'd6
  } mode_req_e;

  // The fifteen states of the control automaton.
  typedef enum logic [3:0] {
    ST_ALARM                = 4'd0,
    ST_LIMIT                = 4'd1,
    ST_CRUISE               = 4'd2,
    ST_LIMIT_GPS            = 4'd3,
    ST_CRUISE_GPS           = 4'd4,
    ST_CRUISE_TRACKING      = 4'd5,
    ST_ALARM_FAIL           = 4'd6,
    ST_LIMIT_STDB           = 4'd7,
    ST_CRUISE_STDB          = 4'd8,
    ST_LIMIT_GPS_STDB       = 4'd9,
    ST_LIMIT_GPS_FAIL       = 4'd10,
    ST_CRUISE_GPS_STDB      = 4'd11,
    ST_CRUISE_GPS_FAIL      = 4'd12,
    ST_CRUISE_TRACKING_STDB = 4'd13,
    ST_CRUISE_TRACKING_FAIL = 4'd14
  } iccg_state_e;

  typedef struct packed {
    mode_req_e             mode_req;   // mode button pressed this cycle (REQ_NONE if none)
    logic                  stdb;       // StdB condition
    logic [SPEED_W-1:0]    speed;      // Driver_Speed
  } driver_t;

  typedef struct packed {
    logic                  fail;       // GPS_Fail
    logic [SPEED_W-1:0]    speed;      // GPS_Speed (speed limit)
  } gps_t;

  typedef struct packed {
    logic [SPEED_W-1:0]    speed;      // Car_Speed_Measured
    logic [THR_W-1:0]      throttle;   // Car_Throttle_Measured (driver's pedal)
  } car_t;

  typedef struct packed {
    logic                  fail;       // Tracking_Fail
    logic [SPEED_W-1:0]    speed;      // Tracking_Speed
  } cruise_radar_t;

  typedef struct packed {
    iccg_state_e           state;      // current automaton state
    logic                  alarm;      // speed above the GPS limit (Alarm mode)
    logic                  limiting;   // throttle is being cut by a Limit mode
  } info_driver_t;

  function automatic logic is_cruise_state(iccg_state_e s);
    return s inside {ST_CRUISE, ST_CRUISE_GPS, ST_CRUISE_TRACKING};
  endfunction

  function automatic logic is_limit_state(iccg_state_e s);
    return s inside {ST_LIMIT, ST_LIMIT_GPS};
  endfunction

endpackage
