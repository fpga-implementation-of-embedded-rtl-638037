// tb_radar_workload: the algorithm-validation run of the detector at full size (N = 1023,
// L = 150): the code echoed from a fixed 90 m obstacle is sent cyclically with a noise level
// that grows every frame, 16 frames in all. For every frame the testbench evaluates the HOS
// formulas itself and checks the interrupt (present exactly when the J32 maximum is above
// the threshold) and its distance. It counts the frames where the obstacle is found at 90 m
// and those where the noise hides it, and requires both to occur: detection holds at low
// noise and is lost once the noise dominates.
module tb_radar_workload;
  import radar_cc_pkg::*;
  import hos_ref_pkg::*;
  localparam int N = 1023, L = 150, NF = 16, D = 90;
  localparam longint THR = 64'd30000000;

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
  longint gc [], gy [], gj [];
  int gmax [NF];
  bit exp_irq [NF];
  int checks = 0, failures = 0, t = 0, f = 0, found = 0, lost = 0;

  hos_detector #(.N(N), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat ((NF + 3) * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (f < NF && t == (f + 1) * N + 2 * L + 2) begin
      checks++;
      if (obstacle.irq != exp_irq[f]) begin
        failures++;
        $display("frame %0d: irq %0b expected %0b", f, obstacle.irq, exp_irq[f]);
      end else if (obstacle.irq) begin
        checks++;
        if (int'(obstacle.distance) != gmax[f]) begin
          failures++;
          $display("frame %0d: distance %0d expected %0d", f, obstacle.distance, gmax[f]);
        end
      end
      if (obstacle.irq && int'(obstacle.distance) == D) found++; else lost++;
      f++;
    end else if (obstacle.irq && f < NF) begin
      failures++;
      $display("unexpected interrupt at %0d", t);
    end
    t++;
    y_in <= Y_W'(y[t]);
    c_in <= code[t];
  end

  initial begin
    int len;
    len = (NF + 4) * N;
    make_code(code, len);
    y = new[len];
    for (int tt = 0; tt < len; tt++) begin
      int nz, v;
      nz = (tt / N) < NF ? tt / N : NF - 1;          // noise amplitude grows 0..15
      v = 8 + (code[((tt - D) % N + N) % N] ? 1 : -1);
      if (nz > 0) v += int'($urandom_range(2 * nz)) - nz;
      y[tt] = v < 0 ? 0 : (v > 15 ? 15 : v);
    end
    for (int ff = 0; ff < NF; ff++) begin
      golden(code, y, ff * N, N, L, gc, gy, gj);
      gmax[ff] = 0;
      for (int i = 1; i < L; i++) if (gj[i] > gj[gmax[ff]]) gmax[ff] = i;
      exp_irq[ff] = gj[gmax[ff]] > THR;
    end
    threshold = J_W'(THR);
    y_in = Y_W'(y[0]);
    c_in = code[0];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (f == NF);
    checks += 2;
    if (found == 0) begin failures++; $display("obstacle never found"); end
    if (lost == 0)  begin failures++; $display("noise never hid the obstacle"); end
    $display("obstacle found in %0d frames, hidden in %0d", found, lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
