// hos_s: first stage of the third-order HOS (modified Tugnait) detector, s(i) = y(i) * c(i+1).
//
// The product is formed once per frame for all N lanes and shared by the Cycc and Cycy sums,
// as in the published detector. The 1-bit code c is read as +1 (c = 1) or -1 (c = 0), so each
// lane is a multiplexer choosing +y or -y. Index i+1 wraps modulo N because the code repeats
// every N chips. The received sample y is 4-bit unsigned, so s is 5-bit signed (-15..15).
// Purely combinational: s is valid in the same cycle as y and c.
module hos_s
  import radar_cc_pkg::*;
#(
  parameter int unsigned N = N_CODE
) (
  input  logic [Y_W-1:0]        y [N],   // y(i), one frame of received samples
  input  logic                  c [N],   // c(i), the reference code of that frame
  output logic signed [Y_W:0]   s [N]    // s(i) = y(i) * c(i+1)
);
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      if (c[(i + 1) % N]) s[i] = signed'({1'b0, y[i]});
      else                s[i] = -signed'({1'b0, y[i]});
    end
  end
endmodule
