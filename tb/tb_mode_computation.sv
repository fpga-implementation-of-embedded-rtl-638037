// tb_mode_computation: for every automaton state and random speeds and pedal positions, checks
// the target speed (Driver_Speed, MIN(Driver, GPS), Tracking_Speed or the measured speed),
// which throttle reaches the car (computed, pedal, or the smaller of the two in Limit modes),
// the alarm (Alarm mode, measured speed above the GPS speed) and the limiting flag. The
// computed throttle is taken from a second regulator in the testbench, driven with the
// target and hold worked out here; the regulator's own law is tested apart.
// Then it checks that Cruise regulation raises the throttle when the car is too slow.
module tb_mode_computation;
  import radar_cc_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  iccg_state_e state = ST_ALARM;
  logic [SPEED_W-1:0] driver_speed = '0, gps_speed = '0, tracking_speed = '0, measured_speed = '0;
  logic [THR_W-1:0] measured_throttle = '0, car_throttle;
  logic [SPEED_W-1:0] car_speed;
  logic alarm, limiting;
  int checks = 0, failures = 0;

  mode_computation dut (.*);

  // reference regulator, fed with the expected target speed and hold
  logic [SPEED_W-1:0] ref_target;
  logic               ref_hold;
  logic [THR_W-1:0]   ref_thr;
  always_comb begin
    case (state)
      ST_CRUISE, ST_LIMIT:         ref_target = driver_speed;
      ST_CRUISE_GPS, ST_LIMIT_GPS: ref_target = driver_speed < gps_speed ? driver_speed : gps_speed;
      ST_CRUISE_TRACKING:          ref_target = tracking_speed;
      default:                     ref_target = measured_speed;
    endcase
    ref_hold = !(state inside {ST_CRUISE, ST_CRUISE_GPS, ST_CRUISE_TRACKING, ST_LIMIT, ST_LIMIT_GPS});
  end
  regulator_throttle u_ref (.clk, .rst_n, .tick, .hold(ref_hold), .target_speed(ref_target),
                            .measured_speed, .measured_throttle, .throttle(ref_thr));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("state %s: %s", state.name(), msg);
    end
  endtask

  initial begin
    int ds, gs, ts, ms, mt, ct, exp_spd, exp_thr;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      state = iccg_state_e'($urandom_range(14));
      ds = $urandom_range(255); gs = $urandom_range(255); ts = $urandom_range(255);
      ms = $urandom_range(255); mt = $urandom_range(100);
      driver_speed = SPEED_W'(ds); gps_speed = SPEED_W'(gs); tracking_speed = SPEED_W'(ts);
      measured_speed = SPEED_W'(ms); measured_throttle = THR_W'(mt);
      tick = $urandom_range(1);
      @(posedge clk);
      #1;
      ct = int'(ref_thr);
      case (state)
        ST_CRUISE, ST_LIMIT:         exp_spd = ds;
        ST_CRUISE_GPS, ST_LIMIT_GPS: exp_spd = ds < gs ? ds : gs;
        ST_CRUISE_TRACKING:          exp_spd = ts;
        default:                     exp_spd = ms;
      endcase
      case (state)
        ST_CRUISE, ST_CRUISE_GPS, ST_CRUISE_TRACKING: exp_thr = ct;
        ST_LIMIT, ST_LIMIT_GPS:      exp_thr = ct < mt ? ct : mt;
        default:                     exp_thr = mt;
      endcase
      chk(int'(car_speed) == exp_spd, $sformatf("car_speed %0d expected %0d", car_speed, exp_spd));
      chk(int'(car_throttle) == exp_thr, $sformatf("throttle %0d expected %0d", car_throttle, exp_thr));
      chk(alarm == (state == ST_ALARM && ms > gs), "alarm");
      chk(limiting == ((state == ST_LIMIT || state == ST_LIMIT_GPS) && ct < mt), "limiting");
    end
    // Cruise at 100 km/h with the car at 60: the throttle must rise well above the pedal
    state = ST_ALARM; measured_throttle = 10; tick = 1;
    @(posedge clk);
    #1 state = ST_CRUISE; driver_speed = 100; measured_speed = 60;
    repeat (3) @(posedge clk);
    #1 chk(car_throttle > 50, $sformatf("cruise throttle %0d", car_throttle));
    // Limit at 50 km/h with the car at 80: the pedal is overridden down to 0
    state = ST_LIMIT; driver_speed = 50; measured_speed = 80; measured_throttle = 90;
    repeat (40) @(posedge clk);
    #1 chk(car_throttle == 0 && limiting, $sformatf("limit throttle %0d", car_throttle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
