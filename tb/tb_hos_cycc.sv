// tb_hos_cycc: checks the cycc sum over N = 1023 lanes against a sum computed in the testbench,
// for random inputs and for the full-scale cases (every term +max, every term -max) that
// set the CYCC_W result width (|result| up to 15345).
module tb_hos_cycc;
  import radar_cc_pkg::*;
  localparam int N = 1023;
  logic signed [Y_W:0]   s [N];
  logic cj [N];
  logic signed [CYCC_W-1:0] cycc;
  int checks = 0, failures = 0;

  hos_cycc #(.N(N)) dut (.s(s), .cj(cj), .cycc(cycc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 30; rep++) begin
      int exp_v;
      exp_v = 0;
      for (int i = 0; i < N; i++) begin
        int sv, bv;
        case (rep)
          0: begin sv = 15;  bv = 1; end
          1: begin sv = -15; bv = 1; end
          2: begin sv = 15;  bv = 0; end
          default: begin sv = int'($urandom_range(30)) - 15; bv = int'($urandom_range(1)); end
        endcase
        s[i] = 5'(sv);
        if (rep == 2) bv = 0;
        cj[i] = 1'(bv);
        exp_v += bv != 0 ? sv : -sv;
      end
      #1;
      checks++;
      if (int'(cycc) != exp_v) begin
        failures++;
        $display("rep %0d: cycc=%0d expected %0d", rep, cycc, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
