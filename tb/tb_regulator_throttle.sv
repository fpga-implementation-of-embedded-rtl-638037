// tb_regulator_throttle: compares the corrector with a PI model written here, tick by tick,
// over random targets and speeds (including saturation at 0 and 100 %), checks hold (output
// follows the pedal, bumpless restart) and that nothing changes without a tick, then closes
// the loop on a first-order car model and checks the speed settles on the target.
module tb_regulator_throttle;
  import radar_cc_pkg::*;
  localparam int KP = 32, KI = 2, FRAC = 4;
  logic clk = 0, rst_n = 0, tick = 0, hold = 1;
  logic [SPEED_W-1:0] target_speed = '0, measured_speed = '0;
  logic [THR_W-1:0] measured_throttle = '0, throttle;
  int checks = 0, failures = 0;
  int m_int = 0, m_out = 0;

  regulator_throttle dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  task automatic do_tick(int tgt, int spd, int pedal, bit h);
    int e;
    target_speed = SPEED_W'(tgt); measured_speed = SPEED_W'(spd);
    measured_throttle = THR_W'(pedal); hold = h; tick = 1;
    e = tgt - spd;
    if (h) begin
      m_int = pedal * 16; m_out = pedal;
    end else begin
      m_int = clampi(m_int + KI * e, 0, 1600);
      m_out = clampi(m_int + KP * e, 0, 1600) / 16;
    end
    @(posedge clk);
    #1 tick = 0;
    checks++;
    if (int'(throttle) != m_out) begin
      failures++;
      if (failures < 10) $display("tgt %0d spd %0d hold %0b: throttle %0d expected %0d", tgt, spd, h, throttle, m_out);
    end
  endtask

  initial begin
    real v;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    do_tick(0, 0, 35, 1);
    do_tick(90, 90, 35, 0);                      // bumpless: stays at the pedal value
    for (int i = 0; i < 2000; i++)
      do_tick(int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(100)), $urandom_range(9) == 0);
    // no tick, no change
    target_speed = 200; measured_speed = 0;
    repeat (5) @(posedge clk);
    #1 checks++;
    if (int'(throttle) != m_out) begin failures++; $display("changed without tick"); end
    // closed loop: dv = (throttle - drag*v) per tick
    do_tick(0, 0, 20, 1);
    v = 50.0;
    for (int i = 0; i < 3000; i++) begin
      do_tick(110, int'(v), 20, 0);
      v = v + 0.02 * (real'(throttle) - 0.5 * v);
    end
    checks++;
    if (int'(v) < 108 || int'(v) > 111) begin failures++; $display("closed loop settled at %f", v); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
