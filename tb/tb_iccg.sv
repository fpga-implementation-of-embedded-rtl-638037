// tb_iccg: drives the ICCG with a car model (speed follows throttle against drag) through a
// drive: Alarm with overspeed, Cruise to 90 km/h, Cruise_GPS under a 70 km/h limit, StdB and
// GPS loss (the driver's pedal is passed through), Cruise_Tracking to a lead car's speed and a
// tracking failure, and Limit at 50 km/h overriding a full pedal. Checks the state, the alarm,
// the throttle source and that the car settles within 2 km/h of each target.
module tb_iccg;
  import radar_cc_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  driver_t driver;
  gps_t gps;
  car_t car;
  cruise_radar_t cruise_radar;
  info_driver_t info_driver;
  logic [THR_W-1:0] car_throttle;
  int checks = 0, failures = 0;
  real v = 40.0;

  iccg dut (.*);

  always #5 clk = ~clk;

  // regulator tick every 4 clocks; car model updated on each tick
  int div = 0;
  always @(posedge clk) begin
    div <= (div + 1) % 4;
    tick <= (div == 3);
    if (tick) v = v + 0.02 * (real'(car_throttle) - 0.5 * v);
    car.speed <= SPEED_W'(int'(v));
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("%s (state %s, v=%0.1f, throttle %0d)", msg, info_driver.state.name(), v, car_throttle); end
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
    #1 chk(v > real'(target) - 2.0 && v < real'(target) + 2.0, $sformatf("speed not at %0d", target));
  endtask

  initial begin
    driver = '{mode_req: REQ_NONE, stdb: 0, speed: 90};
    gps = '{fail: 0, speed: 70};
    car = '{speed: 40, throttle: 30};
    cruise_radar = '{fail: 0, speed: 60};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Alarm: driver drives; alarm only above the GPS limit
    @(posedge clk); #1;
    chk(info_driver.state == ST_ALARM && car_throttle == 30 && !info_driver.alarm, "alarm mode, slow");
    car.throttle = 60;
    settle(120);
    chk(info_driver.alarm, "no alarm above the GPS limit");
    // Cruise at 90
    press(REQ_CRUISE);
    chk(info_driver.state == ST_CRUISE, "cruise not entered");
    settle(90);
    // Cruise_GPS: min(90, 70)
    press(REQ_CRUISE_GPS);
    settle(70);
    // StdB: throttle back to the pedal
    driver.stdb = 1;
    repeat (2) @(posedge clk);
    #1 chk(info_driver.state == ST_CRUISE_GPS_STDB && car_throttle == car.throttle, "StdB");
    driver.stdb = 0; gps.fail = 1;
    repeat (2) @(posedge clk);
    #1 chk(info_driver.state == ST_CRUISE_GPS_FAIL && car_throttle == car.throttle, "GPS fail");
    gps.fail = 0;
    repeat (2) @(posedge clk);
    #1 chk(info_driver.state == ST_CRUISE_GPS, "back to Cruise_GPS");
    // Cruise_Tracking to the lead car at 60
    press(REQ_CRUISE_TRACKING);
    settle(60);
    cruise_radar.fail = 1;
    repeat (2) @(posedge clk);
    #1 chk(info_driver.state == ST_CRUISE_TRACKING_FAIL && car_throttle == car.throttle, "tracking fail");
    cruise_radar.fail = 0;
    // Limit at 50 with the pedal floored
    repeat (2) @(posedge clk);
    press(REQ_LIMIT);
    driver.speed = 50; car.throttle = 100;
    settle(50);
    chk(info_driver.limiting && info_driver.state == ST_LIMIT, "not limiting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
