// peak_detect: picks the obstacle peak out of one sweep of J32 and raises an interrupt.
//
// The published detector ends with a comparator and a register fed back on itself: the running
// maximum of the correlation. This block keeps the largest J32 of the sweep i0 = 0 .. L-1 and
// the lag where it occurred; when the last lag arrives it compares that maximum with a
// threshold set by the processor and, if it is above, pulses obstacle.irq for one clock with
// the lag (the distance in metres) and the peak value. The threshold test and the one-cycle
// pulse are this design's own choices; the document only says an interrupt is sent once the
// peak is found. Latency: irq rises one clock after the lag i0 = L-1 is presented.
module peak_detect
  import radar_cc_pkg::*;
#(
  parameter int unsigned L = L_LAGS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      j_valid,
  input  logic [7:0]                j_i0,
  input  logic signed [J_W-1:0]     j_val,
  input  logic signed [J_W-1:0]     threshold,
  output obstacle_t                 obstacle
);
  logic signed [J_W-1:0] max_q;
  logic [7:0]            arg_q;
  logic signed [J_W-1:0] max_n;
  logic [7:0]            arg_n;

  always_comb begin
    max_n = max_q;
    arg_n = arg_q;
    if (j_i0 == 0 || j_val > max_q) begin
      max_n = j_val;
      arg_n = j_i0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_q    <= '0;
      arg_q    <= '0;
      obstacle <= '0;
    end else begin
      obstacle.irq <= 1'b0;
      if (j_valid) begin
        max_q <= max_n;
        arg_q <= arg_n;
        if (j_i0 == 8'(L - 1) && max_n > threshold) begin
          obstacle.irq      <= 1'b1;
          obstacle.distance <= arg_n;
          obstacle.peak     <= max_n;
        end
      end
    end
  end
endmodule
