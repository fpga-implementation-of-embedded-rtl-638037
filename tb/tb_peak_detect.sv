// tb_peak_detect: feeds sweeps of L = 150 J32 values and checks that exactly one interrupt is
// raised per sweep whose maximum exceeds the threshold, one clock after the last lag, with the
// lag and value of the maximum (first occurrence on ties), and none when it does not.
module tb_peak_detect;
  import radar_cc_pkg::*;
  localparam int L = 150;
  logic clk = 0, rst_n = 0;
  logic j_valid = 0;
  logic [7:0] j_i0 = '0;
  logic signed [J_W-1:0] j_val = '0, threshold = '0;
  obstacle_t obstacle;
  int checks = 0, failures = 0, irqs = 0;

  peak_detect #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(longint thr, int peak_at, longint peak_v, bit negative);
    longint v [L];
    longint mx; int am;
    for (int i = 0; i < L; i++) begin
      v[i] = longint'($urandom_range(1000000));
      if (negative) v[i] = -v[i] - 5000000;
    end
    if (peak_at >= 0) v[peak_at] = peak_v;
    mx = v[0]; am = 0;
    for (int i = 1; i < L; i++) if (v[i] > mx) begin mx = v[i]; am = i; end
    threshold <= J_W'(thr);
    for (int i = 0; i < L; i++) begin
      j_valid <= 1; j_i0 <= 8'(i); j_val <= J_W'(v[i]);
      @(posedge clk);
      #1;
      if (i < L - 1) begin
        checks++;
        if (obstacle.irq) begin failures++; $display("early irq at %0d", i); end
      end
    end
    j_valid <= 0;
    // the interrupt is registered on the clock edge that takes the last lag
    checks++;
    if (obstacle.irq != (mx > thr)) begin
      failures++; $display("irq=%0b, max %0d threshold %0d", obstacle.irq, mx, thr);
    end else if (obstacle.irq) begin
      irqs++;
      checks++;
      if (obstacle.distance != 8'(am) || obstacle.peak != J_W'(mx)) begin
        failures++;
        $display("distance %0d peak %0d, expected %0d %0d", obstacle.distance, obstacle.peak, am, mx);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (obstacle.irq) begin failures++; $display("irq longer than one clock"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    sweep(2000000, 37, 64'd500000000000, 0);   // clear peak
    sweep(2000000, -1, 0, 0);                  // noise only, under threshold
    sweep(-64'd1000000000, -1, 0, 1);          // all negative, negative threshold
    sweep(0, 0, 64'd9000000, 0);               // peak at lag 0
    sweep(0, L - 1, 64'd9000000, 0);           // peak at the last lag
    for (int r = 0; r < 10; r++) sweep(longint'($urandom_range(1000000)), int'($urandom_range(L - 1)), 64'd3000000, 0);
    checks++;
    if (irqs < 10) begin failures++; $display("only %0d interrupts", irqs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
