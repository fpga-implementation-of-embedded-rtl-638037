// hos_cycy: Cycy(j) = sum over i of s(i) * y(i+j), the code-signal branch of the HOS detector.
//
// Each lane multiplies the 5-bit signed s(i) by a 4-bit unsigned delayed sample y(i+j). With
// |s| <= 15, y <= 15 and N = 1023 terms the sum fits 19 signed bits, the width the published
// design multiplies by. This branch is the larger one because y(i+j) is a 4-bit sample where
// Cycc only needs a code bit. Purely combinational.
module hos_cycy
  import radar_cc_pkg::*;
#(
  parameter int unsigned N = N_CODE
) (
  input  logic signed [Y_W:0]       s  [N],  // s(i)
  input  logic [Y_W-1:0]            yj [N],  // y(i+j)
  output logic signed [CYCY_W-1:0]  cycy     // Cycy(j)
);
  always_comb begin
    logic signed [2*Y_W+1:0] prod;  // 5-bit signed x 5-bit signed (y zero-extended)
    cycy = '0;
    for (int unsigned i = 0; i < N; i++) begin
      prod = s[i] * signed'({1'b0, yj[i]});
      cycy = cycy + CYCY_W'(prod);
    end
  end
endmodule
