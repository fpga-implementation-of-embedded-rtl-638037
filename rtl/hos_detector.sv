// hos_detector: the Detection component, obstacle detection by a third-order Higher Order
// Statistics correlation (the modified Tugnait algorithm) of the received wave y with the
// reference code c, followed by peak detection.
//
//   Cycc(j)  = sum_{i<N} y(i) c(i+1) c(i+j)           j = 0 .. 2L-2
//   Cycy(j)  = sum_{i<N} y(i) c(i+1) y(i+j)
//   J32(i0)  = sum_{j<L} Cycc(j) Cycy(j+i0)            i0 = 0 .. L-1 (metres)
//
// How it works. One sample y and one reference chip c enter per clock. A modulo-N counter cuts
// the stream into frames of N samples. Two N-deep shift registers hold the latest N samples and
// chips; lane i holds the sample that arrived N-1-i clocks ago. At the last sample of a frame
// both windows are copied into frame registers, which give y(i) and c(i) (and so s(i), formed
// once for both branches). During the next 2L-1 clocks the windows keep shifting, so lane i then
// holds y(i+j) and c(i+j) for lag j = 0, 1, 2, ...: the samples after the frame are the real
// y(i+j), not a wrapped copy. Each clock one lag of Cycc and Cycy is registered and streamed
// into hos_j32, whose L results go to peak_detect. The (1/N) normalisation is omitted.
//
// Interface: y_in is 4-bit unsigned, c_in is the generator's reference chip of the same clock
// (1 = +1, 0 = -1). The frame counter starts at 0 after reset, like the generator's counter.
// Timing: a frame of N clocks is followed by 2L-1 clocks of lags (overlapping the next frame,
// so one result per frame, no stall: 2L-1 <= N is required); J32(i0) leaves on j_val three
// clocks after lag i0+L-1 is formed, the interrupt one clock after J32(L-1).
// The shift-register form of the y(i+j) store (the schematic draws latches written by a
// modulo-1023 counter) and the observation outputs are this design's own choices.
module hos_detector
  import radar_cc_pkg::*;
#(
  parameter int unsigned N = N_CODE,
  parameter int unsigned L = L_LAGS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [Y_W-1:0]            y_in,       // received wave sample
  input  logic                      c_in,       // reference code chip
  input  logic signed [J_W-1:0]     threshold,  // peak threshold (from the processor)
  output obstacle_t                 obstacle,   // interrupt, distance, peak
  // observation of the intermediate signals (marks 2 to 4 of the schematic)
  output logic                      cyc_valid,
  output logic [8:0]                cyc_k,
  output logic signed [CYCC_W-1:0]  cycc_out,
  output logic signed [CYCY_W-1:0]  cycy_out,
  output logic                      j_valid,
  output logic [7:0]                j_i0,
  output logic signed [J_W-1:0]     j_val
);
  localparam int unsigned CW = $clog2(N);

  logic [Y_W-1:0]         ywin [N];     // y(i+j)
  logic                   cwin [N];     // c(i+j)
  logic [Y_W-1:0]         yfrm [N];     // y(i)
  logic                   cfrm [N];     // c(i)
  logic signed [Y_W:0]    s    [N];     // s(i)
  logic [CW-1:0]          cnt;          // Counter (mod N)
  logic                   lag_act;      // lags of the last frame are being produced
  logic [8:0]             lag;          // current lag j
  logic                   frame_end;
  logic signed [CYCC_W-1:0] cycc_c;
  logic signed [CYCY_W-1:0] cycy_c;

  assign frame_end = (cnt == CW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      lag_act <= 1'b0;
      lag     <= '0;
    end else begin
      cnt <= frame_end ? '0 : cnt + 1'b1;
      if (frame_end) begin
        lag_act <= 1'b1;
        lag     <= '0;
      end else if (lag_act) begin
        lag     <= lag + 1'b1;
        if (lag == 9'(2 * L - 2)) lag_act <= 1'b0;
      end
    end
  end

  // Sample and chip windows (no reset: a full frame is shifted in before first use).
  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < N - 1; i++) begin
      ywin[i] <= ywin[i + 1];
      cwin[i] <= cwin[i + 1];
    end
    ywin[N-1] <= y_in;
    cwin[N-1] <= c_in;
    if (frame_end) begin
      for (int unsigned i = 0; i < N - 1; i++) begin
        yfrm[i] <= ywin[i + 1];
        cfrm[i] <= cwin[i + 1];
      end
      yfrm[N-1] <= y_in;
      cfrm[N-1] <= c_in;
    end
  end

  hos_s    #(.N(N)) u_s    (.y(yfrm), .c(cfrm), .s(s));
  hos_cycc #(.N(N)) u_cycc (.s(s), .cj(cwin), .cycc(cycc_c));
  hos_cycy #(.N(N)) u_cycy (.s(s), .yj(ywin), .cycy(cycy_c));

  // One lag per clock, registered (marks 2 and 3).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_valid <= 1'b0;
      cyc_k     <= '0;
      cycc_out  <= '0;
      cycy_out  <= '0;
    end else begin
      cyc_valid <= lag_act;
      if (lag_act) begin
        cyc_k    <= lag;
        cycc_out <= cycc_c;
        cycy_out <= cycy_c;
      end
    end
  end

  hos_j32 #(.L(L)) u_j32 (
    .clk, .rst_n,
    .in_valid(cyc_valid), .in_first(cyc_valid && cyc_k == 0),
    .cycc(cycc_out), .cycy(cycy_out),
    .j_valid, .j_i0, .j_val
  );

  peak_detect #(.L(L)) u_peak (
    .clk, .rst_n, .j_valid, .j_i0, .j_val, .threshold, .obstacle
  );

  initial begin
    assert (2 * L - 1 <= N) else $error("hos_detector: 2L-1 lags must fit in one frame of N");
  end
endmodule
