// tb_control_automaton: walks the ICCG automaton through every transition printed on its
// state diagram and checks the state after each step: all 30 mode-to-mode requests, each
// mode's StdB and failure exits, every move between the safety states, every return, the
// guards that must hold the state, and the state after reset.
module tb_control_automaton;
  import radar_cc_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_req_e mode_req = REQ_NONE;
  logic stdb = 0, gps_fail = 0, tracking_fail = 0;
  iccg_state_e state;
  int checks = 0, failures = 0;

  control_automaton dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply inputs for one clock, then compare the state
  task automatic step(mode_req_e r, bit sb, bit gf, bit tf, iccg_state_e exp_s);
    mode_req = r; stdb = sb; gps_fail = gf; tracking_fail = tf;
    @(posedge clk);
    #1;
    checks++;
    if (state != exp_s) begin
      failures++;
      $display("req=%s stdb=%0b gps_fail=%0b trk_fail=%0b: state %s expected %s",
               r.name(), sb, gf, tf, state.name(), exp_s.name());
    end
    mode_req = REQ_NONE;
  endtask

  task automatic go(iccg_state_e target);  // from any mode, request target mode
    mode_req_e r;
    case (target)
      ST_ALARM: r = REQ_ALARM;
      ST_LIMIT: r = REQ_LIMIT;
      ST_CRUISE: r = REQ_CRUISE;
      ST_LIMIT_GPS: r = REQ_LIMIT_GPS;
      ST_CRUISE_GPS: r = REQ_CRUISE_GPS;
      default: r = REQ_CRUISE_TRACKING;
    endcase
    step(r, 0, 0, 0, target);
  endtask

  initial begin
    static iccg_state_e modes [6] = '{ST_ALARM, ST_LIMIT, ST_CRUISE, ST_LIMIT_GPS, ST_CRUISE_GPS, ST_CRUISE_TRACKING};
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (state != ST_ALARM) begin failures++; $display("reset state %s", state.name()); end
    #1 rst_n = 1;
    step(REQ_NONE, 0, 0, 0, ST_ALARM);
    // every mode to every other mode
    foreach (modes[a]) foreach (modes[b]) if (a != b) begin
      go(modes[a]);
      go(modes[b]);
      step(REQ_NONE, 0, 0, 0, modes[b]);
    end
    // Alarm <-> Alarm_Fail
    go(ST_ALARM);
    step(REQ_NONE, 1, 0, 0, ST_ALARM);            // StdB does not leave Alarm
    step(REQ_NONE, 0, 1, 0, ST_ALARM_FAIL);
    step(REQ_LIMIT, 0, 1, 0, ST_ALARM_FAIL);      // requests ignored in a safety state
    step(REQ_NONE, 0, 0, 0, ST_ALARM);
    // Limit <-> Limit_StdB, Cruise <-> Cruise_StdB
    go(ST_LIMIT);
    step(REQ_NONE, 0, 1, 1, ST_LIMIT);            // failures do not affect Limit
    step(REQ_NONE, 1, 0, 0, ST_LIMIT_STDB);
    step(REQ_NONE, 1, 0, 0, ST_LIMIT_STDB);
    step(REQ_NONE, 0, 0, 0, ST_LIMIT);
    go(ST_CRUISE);
    step(REQ_NONE, 1, 0, 0, ST_CRUISE_STDB);
    step(REQ_CRUISE_GPS, 1, 0, 0, ST_CRUISE_STDB);
    step(REQ_NONE, 0, 1, 0, ST_CRUISE);
    // Limit_GPS and its two safety states
    go(ST_LIMIT_GPS);
    step(REQ_NONE, 1, 1, 0, ST_LIMIT_GPS_STDB);   // StdB first
    step(REQ_NONE, 0, 1, 0, ST_LIMIT_GPS_FAIL);   // GPS_Fail and not StdB
    step(REQ_NONE, 1, 1, 0, ST_LIMIT_GPS_FAIL);   // held
    step(REQ_NONE, 1, 0, 0, ST_LIMIT_GPS_STDB);   // not GPS_Fail and StdB
    step(REQ_NONE, 1, 1, 0, ST_LIMIT_GPS_STDB);   // held
    step(REQ_NONE, 0, 0, 0, ST_LIMIT_GPS);        // not StdB and not GPS_Fail
    step(REQ_NONE, 0, 1, 0, ST_LIMIT_GPS_FAIL);
    step(REQ_NONE, 0, 0, 0, ST_LIMIT_GPS);        // not GPS_Fail and not StdB
    // Cruise_GPS and its two safety states
    go(ST_CRUISE_GPS);
    step(REQ_NONE, 1, 0, 0, ST_CRUISE_GPS_STDB);
    step(REQ_NONE, 0, 1, 0, ST_CRUISE_GPS_FAIL);
    step(REQ_NONE, 1, 0, 0, ST_CRUISE_GPS_STDB);
    step(REQ_NONE, 0, 0, 0, ST_CRUISE_GPS);
    step(REQ_NONE, 0, 1, 0, ST_CRUISE_GPS_FAIL);
    step(REQ_NONE, 0, 0, 0, ST_CRUISE_GPS);
    // Cruise_Tracking and its two safety states
    go(ST_CRUISE_TRACKING);
    step(REQ_NONE, 0, 1, 0, ST_CRUISE_TRACKING);  // GPS failure is irrelevant here
    step(REQ_NONE, 0, 0, 1, ST_CRUISE_TRACKING_FAIL);
    step(REQ_NONE, 1, 1, 1, ST_CRUISE_TRACKING_FAIL);
    step(REQ_NONE, 1, 0, 0, ST_CRUISE_TRACKING_STDB);
    step(REQ_NONE, 0, 0, 1, ST_CRUISE_TRACKING_FAIL);
    step(REQ_NONE, 0, 0, 0, ST_CRUISE_TRACKING);
    step(REQ_NONE, 1, 0, 1, ST_CRUISE_TRACKING_STDB);
    step(REQ_NONE, 0, 0, 0, ST_CRUISE_TRACKING);
    // a request into a mode whose failure holds passes through the mode
    go(ST_ALARM);
    step(REQ_CRUISE_GPS, 0, 0, 0, ST_CRUISE_GPS);
    step(REQ_NONE, 0, 1, 0, ST_CRUISE_GPS_FAIL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
