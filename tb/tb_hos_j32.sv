// tb_hos_j32: streams sweeps of 2L-1 random (and full-scale) Cycc/Cycy lags into hos_j32 at
// the default L = 150 and compares every J32(i0) with the direct sum computed here. Also
// checks that J32(i0) appears exactly two clocks after lag i0+L-1 was presented, that the L
// results come out in order on consecutive clocks, and that a gap between sweeps is harmless.
module tb_hos_j32;
  import radar_cc_pkg::*;
  localparam int L = 150;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  logic signed [CYCC_W-1:0] cycc = '0;
  logic signed [CYCY_W-1:0] cycy = '0;
  logic j_valid;
  logic [7:0] j_i0;
  logic signed [J_W-1:0] j_val;
  int checks = 0, failures = 0;
  longint ac [2*L-1], ay [2*L-1], expj [L];
  int cycle = 0, sent_at [2*L-1];
  int got, kin = 0;

  hos_j32 #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: compares every output with the expectation of the current sweep
  // the clock counter, the input log and the checker share one process so they see one edge
  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid) begin
      if (in_first) kin = 0;
      sent_at[kin] = cycle;
      kin++;
    end
    if (rst_n && j_valid) check_out();
  end

  task automatic check_out();
    checks++;
    if (j_val != expj[j_i0] || int'(j_i0) != got) begin
      failures++;
      if (failures < 10) $display("i0=%0d (expected order %0d): J=%0d expected %0d", j_i0, got, j_val, expj[j_i0]);
    end
    checks++;
    if (cycle - sent_at[j_i0 + L - 1] != 2) begin
      failures++;
      $display("latency %0d for i0=%0d", cycle - sent_at[j_i0 + L - 1], j_i0);
    end
    got++;
  endtask

  task automatic sweep(int kind, int gap_at = -1);
    for (int k = 0; k < 2*L-1; k++) begin
      case (kind)
        0: begin ac[k] = 15345;  ay[k] = 230175; end
        1: begin ac[k] = -15345; ay[k] = 230175; end
        default: begin
          ac[k] = longint'($urandom_range(30690)) - 15345;
          ay[k] = longint'($urandom_range(460350)) - 230175;
        end
      endcase
    end
    for (int i0 = 0; i0 < L; i0++) begin
      expj[i0] = 0;
      for (int j = 0; j < L; j++) expj[i0] += ac[j] * ay[j + i0];
    end
    got = 0;
    for (int k = 0; k < 2*L-1; k++) begin
      if (k == gap_at) begin
        in_valid <= 0;
        repeat (3) @(posedge clk);
      end
      in_valid <= 1;
      in_first <= (k == 0);
      cycc <= CYCC_W'(ac[k]);
      cycy <= CYCY_W'(ay[k]);
      @(posedge clk);
    end
    in_valid <= 0;
    in_first <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != L) begin
      failures++;
      $display("sweep gave %0d results, expected %0d", got, L);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    sweep(0, -1);
    sweep(1, -1);
    for (int r = 0; r < 4; r++) sweep(2, -1);
    sweep(2, 10);   // a pause inside a sweep delays the results but must not change them
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
