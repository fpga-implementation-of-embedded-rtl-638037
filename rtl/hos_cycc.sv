// hos_cycc: Cycc(j) = sum over i of s(i) * c(i+j), the code-code branch of the HOS detector.
//
// The caller presents s(i) for the frame and the code window c(i+j) for the current lag j; the
// 1-bit code is read as +1/-1, so every lane adds or subtracts s(i). With |s| <= 15 and
// N = 1023 terms the result fits 15 signed bits, the width the published design multiplies by.
// Purely combinational; one lag per clock is produced by shifting the code window outside.
module hos_cycc
  import radar_cc_pkg::*;
#(
  parameter int unsigned N = N_CODE
) (
  input  logic signed [Y_W:0]       s  [N],  // s(i)
  input  logic                      cj [N],  // c(i+j)
  output logic signed [CYCC_W-1:0]  cycc     // Cycc(j)
);
  always_comb begin
    cycc = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (cj[i]) cycc = cycc + CYCC_W'(s[i]);
      else       cycc = cycc - CYCC_W'(s[i]);
    end
  end
endmodule
