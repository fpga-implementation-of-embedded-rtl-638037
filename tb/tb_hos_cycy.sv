// tb_hos_cycy: checks the cycy sum over N = 1023 lanes against a sum computed in the testbench,
// for random inputs and for the full-scale cases (every term +max, every term -max) that
// set the CYCY_W result width (|result| up to 230175).
module tb_hos_cycy;
  import radar_cc_pkg::*;
  localparam int N = 1023;
  logic signed [Y_W:0]   s [N];
  logic [Y_W-1:0] yj [N];
  logic signed [CYCY_W-1:0] cycy;
  int checks = 0, failures = 0;

  hos_cycy #(.N(N)) dut (.s(s), .yj(yj), .cycy(cycy));

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
        if (rep < 3) bv = (rep == 2) ? 0 : 15; else bv = int'($urandom_range(15));
        yj[i] = 4'(bv);
        exp_v += sv * bv;
      end
      #1;
      checks++;
      if (int'(cycy) != exp_v) begin
        failures++;
        $display("rep %0d: cycy=%0d expected %0d", rep, cycy, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
