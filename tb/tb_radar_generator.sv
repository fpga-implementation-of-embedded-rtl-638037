// tb_radar_generator: checks that the reference code is a maximal-length sequence of period
// exactly 1023 (it repeats after 1023 chips and the 10-bit window of the last chips never
// repeats within a period), that it has the m-sequence balance of 512 ones and 511 zeros, that
// the emitted chip equals the reference chip, and that the time base counts 0..1022 in step
// with the code, with period_start on 0.
module tb_radar_generator;
  import radar_cc_pkg::*;
  localparam int N = 1023;
  logic clk = 0, rst_n = 0;
  logic ref_code, radar_emission, period_start;
  logic [9:0] counter;
  int checks = 0, failures = 0;
  bit seq [3*N];
  bit seen [1024];

  radar_generator #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3 * N; t++) begin
      seq[t] = ref_code;
      checks += 3;
      if (radar_emission != ref_code) begin failures++; $display("emission differs at %0d", t); end
      if (int'(counter) != t % N) begin failures++; $display("counter %0d at %0d", counter, t); end
      if (period_start != (t % N == 0)) begin failures++; $display("period_start at %0d", t); end
      @(posedge clk);
      #1;
    end
    for (int t = 0; t < 2 * N; t++) begin
      checks++;
      if (seq[t] != seq[t + N]) begin failures++; $display("not periodic at %0d", t); break; end
    end
    ones = 0;
    for (int t = 0; t < N; t++) ones += seq[t];
    checks++;
    if (ones != 512) begin failures++; $display("%0d ones in a period", ones); end
    for (int t = 0; t < N; t++) begin
      int w = 0;
      for (int b = 0; b < 10; b++) w = (w << 1) | seq[t + b];
      checks++;
      if (seen[w] || w == 0) begin failures++; $display("window %0d repeats at %0d", w, t); break; end
      seen[w] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
