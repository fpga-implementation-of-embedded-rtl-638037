// tb_radar_cc_top: end-to-end test of the whole FPGA at its default sizes (N = 1023 chips,
// L = 150 lags): the radar loop and the cruise control run side by side.
//
// Radar: the testbench closes the loop between emitter and receiver. The received sample is
// the emitted chip from d clocks earlier (d changes every frame, one frame has no echo at
// all) around mid-scale with noise, clipped to 4 bits. For each frame it evaluates the HOS
// formulas itself and expects an interrupt exactly when the J32 maximum is above the
// threshold, with the distance of that maximum, which must be the echo delay. It also checks
// the emitted chips against the LFSR sequence and the time base counter.
// Cruise control: a car model follows the throttle; the drive goes through Cruise, Cruise_GPS,
// Cruise_Tracking, Limit and Alarm, with StdB, GPS loss and tracking loss.
// Every mechanism (detection, no detection, mode switch, each safety state, alarm, limiting,
// regulation to a target) is counted and must occur at least once.
module tb_radar_cc_top;
  import radar_cc_pkg::*;
  import hos_ref_pkg::*;
  localparam int N = N_CODE, L = L_LAGS, NF = 6;
  localparam int DELAY [NF] = '{12, 0, 149, 60, 100, 33};
  localparam int AMP   [NF] = '{4, 4, 4, 0, 3, 4};

  logic clk = 0, rst_n = 0, ctrl_tick = 0;
  gps_t gps;
  driver_t driver;
  car_t car;
  cruise_radar_t cruise_radar;
  info_driver_t info_driver;
  logic [THR_W-1:0] car_throttle;
  logic [Y_W-1:0] radar_reception;
  logic radar_emission;
  logic signed [J_W-1:0] detect_threshold;
  obstacle_t obstacle_detection;
  logic [9:0] counter;

  radar_cc_top dut (.*);

  bit code [];
  int y [];
  longint gc [], gy [], gj [NF][];
  int gmax [NF];
  bit exp_irq [NF];
  int checks = 0, failures = 0, t = 0, nxt_frame = 0;
  int n_detect = 0, n_quiet = 0, n_switch = 0, n_stdb = 0, n_gpsfail = 0, n_trkfail = 0,
      n_alarm = 0, n_limit = 0, n_settle = 0;
  real v = 40.0;
  iccg_state_e last_state = ST_ALARM;

  always #5 clk = ~clk;

  initial begin
    repeat (200 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("t=%0d: %s", t, msg);
  endtask

  // ---------------- radar loop ----------------
  always @(posedge clk) if (rst_n) begin
    if (t < (NF + 1) * N) begin
      checks += 2;
      if (radar_emission != code[t]) fail("emitted chip differs from the LFSR sequence");
      if (int'(counter) != t % N) fail("time base counter");
    end
    // a frame's interrupt is due 2L+2 edges after its last sample; decide then
    if (nxt_frame < NF && t == (nxt_frame + 1) * N + 2 * L + 2) begin
      checks++;
      if (obstacle_detection.irq != exp_irq[nxt_frame])
        fail($sformatf("frame %0d: irq %0b expected %0b", nxt_frame, obstacle_detection.irq, exp_irq[nxt_frame]));
      if (exp_irq[nxt_frame]) begin
        checks += 2;
        if (int'(obstacle_detection.distance) != gmax[nxt_frame]) fail("distance differs from the reference");
        if (int'(obstacle_detection.distance) != DELAY[nxt_frame]) fail("distance differs from the echo delay");
        if (obstacle_detection.irq) n_detect++;
      end else if (!obstacle_detection.irq) n_quiet++;
      nxt_frame++;
    end else if (obstacle_detection.irq && nxt_frame < NF) fail("interrupt at an unexpected time");
    t++;
    radar_reception <= Y_W'(y[t]);
  end

  // ---------------- cruise control ----------------
  int div = 0;
  always @(posedge clk) begin
    div <= (div + 1) % 4;
    ctrl_tick <= (div == 3);
    if (ctrl_tick) v = v + 0.02 * (real'(car_throttle) - 0.5 * v);
    car.speed <= SPEED_W'(int'(v));
    if (rst_n) begin
      if (info_driver.state != last_state) begin
        case (info_driver.state)
          ST_CRUISE_GPS_STDB, ST_LIMIT_STDB, ST_CRUISE_STDB, ST_LIMIT_GPS_STDB,
          ST_CRUISE_TRACKING_STDB: n_stdb++;
          ST_CRUISE_GPS_FAIL, ST_LIMIT_GPS_FAIL, ST_ALARM_FAIL: n_gpsfail++;
          ST_CRUISE_TRACKING_FAIL: n_trkfail++;
          default: n_switch++;
        endcase
      end
      last_state = info_driver.state;
    end
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) fail($sformatf("%s (state %s, v=%0.1f)", msg, info_driver.state.name(), v));
  endtask

  task automatic press(mode_req_e r);
    driver.mode_req = r;
    @(posedge clk);
    #1 driver.mode_req = REQ_NONE;
    @(posedge clk);
    #1;
  endtask

  task automatic settle(int target);
    repeat (20000) @(posedge clk);
    #1;
    chk(v > real'(target) - 2.0 && v < real'(target) + 2.0, $sformatf("speed not at %0d", target));
    if (v > real'(target) - 2.0 && v < real'(target) + 2.0) n_settle++;
  endtask

  initial begin
    int len;
    len = 205 * N;
    make_code(code, len);
    y = new[len];
    for (int tt = 0; tt < len; tt++) begin
      int f, vv;
      f = (tt / N) < NF ? tt / N : NF - 1;
      vv = 8 + (code[((tt - DELAY[f]) % N + N) % N] ? AMP[f] : -AMP[f]) + int'($urandom_range(6)) - 3;
      y[tt] = vv < 0 ? 0 : (vv > 15 ? 15 : vv);
    end
    detect_threshold = J_W'(64'd60000000);
    for (int f = 0; f < NF; f++) begin
      golden(code, y, f * N, N, L, gc, gy, gj[f]);
      gmax[f] = 0;
      for (int i = 1; i < L; i++) if (gj[f][i] > gj[f][gmax[f]]) gmax[f] = i;
      exp_irq[f] = gj[f][gmax[f]] > 60000000;
    end
    radar_reception = Y_W'(y[0]);
    driver = '{mode_req: REQ_NONE, stdb: 0, speed: 90};
    gps = '{fail: 0, speed: 70};
    car = '{speed: 40, throttle: 60};
    cruise_radar = '{fail: 0, speed: 60};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Alarm mode, driver accelerates past the GPS limit
    settle(120);
    chk(info_driver.alarm, "no overspeed alarm");
    if (info_driver.alarm) n_alarm++;
    press(REQ_CRUISE);          settle(90);
    press(REQ_CRUISE_GPS);      settle(70);
    driver.stdb = 1;  repeat (3) @(posedge clk);
    #1 chk(car_throttle == car.throttle, "StdB must hand the throttle back");
    driver.stdb = 0; gps.fail = 1; repeat (3) @(posedge clk);
    gps.fail = 0; repeat (3) @(posedge clk);
    press(REQ_CRUISE_TRACKING); settle(60);
    cruise_radar.fail = 1; repeat (3) @(posedge clk);
    cruise_radar.fail = 0; repeat (3) @(posedge clk);
    press(REQ_LIMIT);
    driver.speed = 50; car.throttle = 100;
    settle(50);
    chk(info_driver.limiting, "Limit mode does not cut the throttle");
    if (info_driver.limiting) n_limit++;
    wait (nxt_frame == NF);
    checks += 9;
    if (n_detect == 0)  fail("no obstacle detected");
    if (n_quiet == 0)   fail("no frame without detection");
    if (n_switch < 4)   fail("mode switches missing");
    if (n_stdb == 0)    fail("no StdB state");
    if (n_gpsfail == 0) fail("no GPS failure state");
    if (n_trkfail == 0) fail("no tracking failure state");
    if (n_alarm == 0)   fail("no alarm");
    if (n_limit == 0)   fail("no limiting");
    if (n_settle < 4)   fail("regulation did not reach its targets");
    $display("detections %0d, quiet frames %0d, mode switches %0d, StdB %0d, GPS fail %0d, tracking fail %0d, alarm %0d, limiting %0d, settled %0d",
             n_detect, n_quiet, n_switch, n_stdb, n_gpsfail, n_trkfail, n_alarm, n_limit, n_settle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
