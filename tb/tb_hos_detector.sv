// tb_hos_detector: end-to-end test of the HOS detector at the default N = 1023, L = 150.
//
// The received wave is the LFSR code echoed with a delay d that changes every frame (0, 73,
// 149, 20, 111 samples), around mid-scale with uniform noise, clipped to 4 bits. For every
// frame the testbench computes Cycc, Cycy and J32 directly from the formulas and compares all
// 2L-1 lags of Cycc/Cycy, all L values of J32 and the interrupt (distance = lag of the J32
// maximum, which must equal the echo delay d). It also checks that the interrupt comes a
// fixed 2L+2 clocks after the last sample of its frame, i.e. one result per frame, no stall.
module tb_hos_detector;
  import radar_cc_pkg::*;
  import hos_ref_pkg::*;
  localparam int N = 1023, L = 150, NF = 5;
  localparam int DELAY [NF] = '{0, 73, 149, 20, 111};

  logic clk = 0, rst_n = 0;
  logic [Y_W-1:0] y_in;
  logic c_in;
  logic signed [J_W-1:0] threshold;
  obstacle_t obstacle;
  logic cyc_valid; logic [8:0] cyc_k;
  logic signed [CYCC_W-1:0] cycc_out; logic signed [CYCY_W-1:0] cycy_out;
  logic j_valid; logic [7:0] j_i0; logic signed [J_W-1:0] j_val;

  bit code [];
  int y [];
  longint gc [NF][], gy [NF][], gj [NF][];
  int gmax [NF];
  int checks = 0, failures = 0;
  int t = 0, cf = -1, jf = -1, irqs = 0;

  hos_detector #(.N(N), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat ((NF + 2) * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("t=%0d: %s", t, msg);
  endtask

  always @(posedge clk) if (rst_n) begin
    // outputs as registered on the previous edge
    if (cyc_valid && cf < NF) begin
      if (cyc_k == 0) cf++;
      if (cf < NF) begin
        checks++;
        if (cycc_out != CYCC_W'(gc[cf][cyc_k]) || cycy_out != CYCY_W'(gy[cf][cyc_k]))
          fail($sformatf("frame %0d lag %0d: Cycc %0d/%0d Cycy %0d/%0d", cf, cyc_k,
                         cycc_out, gc[cf][cyc_k], cycy_out, gy[cf][cyc_k]));
      end
    end
    if (j_valid && jf < NF) begin
      if (j_i0 == 0) jf++;
      if (jf < NF) begin
        checks++;
        if (j_val != J_W'(gj[jf][j_i0]))
          fail($sformatf("frame %0d J32(%0d)=%0d expected %0d", jf, j_i0, j_val, gj[jf][j_i0]));
      end
    end
    if (obstacle.irq) begin
      checks += 3;
      if (irqs >= NF) fail("too many interrupts");
      else begin
        if (int'(obstacle.distance) != gmax[irqs] || obstacle.peak != J_W'(gj[irqs][gmax[irqs]]))
          fail($sformatf("irq distance %0d expected %0d", obstacle.distance, gmax[irqs]));
        if (int'(obstacle.distance) != DELAY[irqs])
          fail($sformatf("irq distance %0d but echo delay %0d", obstacle.distance, DELAY[irqs]));
        // last sample of frame f is taken on edge t = (f+1)N; the irq is seen 2L+2 edges later
        if (t != (irqs + 1) * N + 2 * L + 2)
          fail($sformatf("irq on edge %0d expected %0d", t, (irqs + 1) * N + 2 * L + 2));
      end
      irqs++;
    end
    // drive the next sample
    t++;
    y_in <= Y_W'(y[t]);
    c_in <= code[t];
  end

  initial begin
    int len;
    len = (NF + 2) * N;
    make_code(code, len);
    y = new[len];
    for (int tt = 0; tt < len; tt++) begin
      int d, v;
      d = DELAY[(tt / N) < NF ? tt / N : NF - 1];
      v = 8 + (code[((tt - d) % N + N) % N] ? 4 : -4) + int'($urandom_range(6)) - 3;
      y[tt] = v < 0 ? 0 : (v > 15 ? 15 : v);
    end
    for (int f = 0; f < NF; f++) begin
      golden(code, y, f * N, N, L, gc[f], gy[f], gj[f]);
      gmax[f] = 0;
      for (int i = 1; i < L; i++) if (gj[f][i] > gj[f][gmax[f]]) gmax[f] = i;
    end
    threshold = J_W'(64'd20000000);
    y_in = Y_W'(y[0]);
    c_in = code[0];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (irqs == NF && jf >= NF - 1);
    repeat (L + 10) @(posedge clk);
    checks++;
    if (irqs != NF) fail($sformatf("%0d interrupts, expected %0d", irqs, NF));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
