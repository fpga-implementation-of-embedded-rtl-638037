// control_automaton: the ICCG control automaton, choosing which running mode is active.
//
// Six modes are selectable by the driver: Alarm, Limit, Cruise, Limit_GPS, Cruise_GPS and
// Cruise_Tracking. A mode request (the driver pressing a mode button) moves the automaton from
// any of these six to the requested one. Nine safety states protect the modes that depend on
// something that can be lost:
//   Alarm           -> Alarm_Fail on GPS_Fail, back on not GPS_Fail
//   Limit, Cruise   -> *_StdB on StdB, back on not StdB
//   Limit_GPS, Cruise_GPS  -> *_StdB on StdB, *_Fail on GPS_Fail; between the two safety
//                      states and back to the mode on the printed combinations of the two
//   Cruise_Tracking -> *_StdB on StdB, *_Fail on Tracking_Fail; likewise with Tracking_Fail
// The guards are those printed on the published state diagram. Its own choices: the state
// after reset is Alarm (the mode where the driver keeps full control); in a mode, StdB is
// tested first, then the failure, then a mode request; a safety state ignores mode requests.
// Timing: one transition per clock, the state is registered.
module control_automaton
  import radar_cc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mode_req_e   mode_req,
  input  logic        stdb,
  input  logic        gps_fail,
  input  logic        tracking_fail,
  output iccg_state_e state
);
  iccg_state_e nxt;

  function automatic iccg_state_e req_state(mode_req_e r, iccg_state_e cur);
    case (r)
      REQ_ALARM:           return ST_ALARM;
      REQ_LIMIT:           return ST_LIMIT;
      REQ_CRUISE:          return ST_CRUISE;
      REQ_LIMIT_GPS:       return ST_LIMIT_GPS;
      REQ_CRUISE_GPS:      return ST_CRUISE_GPS;
      REQ_CRUISE_TRACKING: return ST_CRUISE_TRACKING;
      default:             return cur;
    endcase
  endfunction

  always_comb begin
    nxt = state;
    case (state)
      ST_ALARM:
        if (gps_fail) nxt = ST_ALARM_FAIL;
        else          nxt = req_state(mode_req, state);
      ST_LIMIT:
        if (stdb)     nxt = ST_LIMIT_STDB;
        else          nxt = req_state(mode_req, state);
      ST_CRUISE:
        if (stdb)     nxt = ST_CRUISE_STDB;
        else          nxt = req_state(mode_req, state);
      ST_LIMIT_GPS:
        if (stdb)          nxt = ST_LIMIT_GPS_STDB;
        else if (gps_fail) nxt = ST_LIMIT_GPS_FAIL;
        else               nxt = req_state(mode_req, state);
      ST_CRUISE_GPS:
        if (stdb)          nxt = ST_CRUISE_GPS_STDB;
        else if (gps_fail) nxt = ST_CRUISE_GPS_FAIL;
        else               nxt = req_state(mode_req, state);
      ST_CRUISE_TRACKING:
        if (stdb)               nxt = ST_CRUISE_TRACKING_STDB;
        else if (tracking_fail) nxt = ST_CRUISE_TRACKING_FAIL;
        else                    nxt = req_state(mode_req, state);

      ST_ALARM_FAIL:  if (!gps_fail) nxt = ST_ALARM;
      ST_LIMIT_STDB:  if (!stdb)     nxt = ST_LIMIT;
      ST_CRUISE_STDB: if (!stdb)     nxt = ST_CRUISE;

      ST_LIMIT_GPS_STDB:
        if (!stdb && !gps_fail)     nxt = ST_LIMIT_GPS;
        else if (!stdb && gps_fail) nxt = ST_LIMIT_GPS_FAIL;
      ST_LIMIT_GPS_FAIL:
        if (!gps_fail && !stdb)     nxt = ST_LIMIT_GPS;
        else if (!gps_fail && stdb) nxt = ST_LIMIT_GPS_STDB;

      ST_CRUISE_GPS_STDB:
        if (!stdb && !gps_fail)     nxt = ST_CRUISE_GPS;
        else if (!stdb && gps_fail) nxt = ST_CRUISE_GPS_FAIL;
      ST_CRUISE_GPS_FAIL:
        if (!gps_fail && !stdb)     nxt = ST_CRUISE_GPS;
        else if (!gps_fail && stdb) nxt = ST_CRUISE_GPS_STDB;

      ST_CRUISE_TRACKING_STDB:
        if (!stdb && !tracking_fail)     nxt = ST_CRUISE_TRACKING;
        else if (!stdb && tracking_fail) nxt = ST_CRUISE_TRACKING_FAIL;
      ST_CRUISE_TRACKING_FAIL:
        if (!tracking_fail && !stdb)     nxt = ST_CRUISE_TRACKING;
        else if (!tracking_fail && stdb) nxt = ST_CRUISE_TRACKING_STDB;

      default: nxt = ST_ALARM;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_ALARM;
    else        state <= nxt;
  end
endmodule
