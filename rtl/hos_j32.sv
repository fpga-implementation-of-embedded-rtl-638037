// hos_j32: the final correlation of the HOS detector, J32(i0) = sum_{j<L} Cycc(j) * Cycy(j+i0).
//
// Cycc and Cycy arrive as a stream, one lag k per valid cycle, k = 0 .. 2L-2 (in_first marks
// k = 0). As in the published schematic, Cycy is written into a bank of L registers addressed by
// a modulo-L counter, Cycc(j) is kept in an L-deep shift register, and L parallel 15 x 19 bit
// multipliers feed one adder producing a 40-bit result.
//   * k < L : Cycc(k) enters the shift register at the top (the register shifts down), so once
//             k = L-1 has been taken, register q holds Cycc(q) and bank entry q holds Cycy(q).
//   * k >= L: Cycy(k) overwrites bank entry k mod L and the Cycc register rotates up by one, so
//             bank entry q always meets Cycc((q - i0) mod L), as the sum for i0 = k-L+1 needs.
// Timing: J32(i0) appears on j_val with j_valid two clocks after the cycle that delivered
// k = i0+L-1; the L results of a sweep come out on L consecutive cycles if the input is
// contiguous. How Cycc is realigned (rotation) is this design's own choice.
module hos_j32
  import radar_cc_pkg::*;
#(
  parameter int unsigned L = L_LAGS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_first,   // this lag is k = 0
  input  logic signed [CYCC_W-1:0]  cycc,       // Cycc(k)
  input  logic signed [CYCY_W-1:0]  cycy,       // Cycy(k)
  output logic                      j_valid,
  output logic [7:0]                j_i0,       // lag i0 of j_val
  output logic signed [J_W-1:0]     j_val       // J32(i0)
);
  localparam int unsigned KW = $clog2(2 * L);

  logic signed [CYCY_W-1:0] cycy_bank [L];   // Cycy(j+i0) latches
  logic signed [CYCC_W-1:0] cycc_reg  [L];   // Cycc(j) register
  logic [KW-1:0]            k_cnt;           // lag number of the next input
  logic [$clog2(L)-1:0]     wptr;            // modulo-L write counter
  logic                     sum_valid;       // bank/register hold a complete window
  logic [7:0]               sum_i0;
  logic signed [J_W-1:0]    sum_comb;

  logic [KW-1:0] k_now;
  assign k_now = in_first ? '0 : k_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_cnt     <= '0;
      wptr      <= '0;
      sum_valid <= 1'b0;
      sum_i0    <= '0;
    end else begin
      sum_valid <= 1'b0;
      if (in_valid) begin
        k_cnt <= k_now + 1'b1;
        if (in_first || wptr == $bits(wptr)'(L - 1)) wptr <= in_first ? $bits(wptr)'(1) : '0;
        else                           wptr <= wptr + 1'b1;
        if (k_now >= KW'(L - 1)) begin
          sum_valid <= 1'b1;
          sum_i0    <= 8'(k_now - (L - 1));
        end
      end
    end
  end

  // Data registers: no reset, every entry is written before it is read.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      cycy_bank[in_first ? '0 : wptr] <= cycy;
      if (k_now < KW'(L)) begin
        for (int unsigned q = 0; q < L - 1; q++) cycc_reg[q] <= cycc_reg[q + 1];
        cycc_reg[L-1] <= cycc;
      end else begin
        for (int unsigned q = 1; q < L; q++) cycc_reg[q] <= cycc_reg[q - 1];
        cycc_reg[0] <= cycc_reg[L-1];
      end
    end
  end

  always_comb begin
    logic signed [CYCC_W+CYCY_W-1:0] prod;
    sum_comb = '0;
    for (int unsigned q = 0; q < L; q++) begin
      prod     = cycc_reg[q] * cycy_bank[q];
      sum_comb = sum_comb + J_W'(prod);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j_valid <= 1'b0;
      j_i0    <= '0;
      j_val   <= '0;
    end else begin
      j_valid <= sum_valid;
      j_i0    <= sum_i0;
      if (sum_valid) j_val <= sum_comb;
    end
  end

  // A sweep has exactly 2L-1 lags; a new sweep must be started with in_first.
  a_sweep_len: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_first |-> k_cnt <= KW'(2 * L - 2));
endmodule
