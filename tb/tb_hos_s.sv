// tb_hos_s: checks s(i) = y(i) * c(i+1) on all 1023 lanes for random frames and for the
// extreme samples 0 and 15, including the wrap of c(i+1) at the last lane.
module tb_hos_s;
  import radar_cc_pkg::*;
  localparam int N = 1023;
  logic [Y_W-1:0]      y [N];
  logic                c [N];
  logic signed [Y_W:0] s [N];
  int checks = 0, failures = 0;

  hos_s #(.N(N)) dut (.y, .c, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < N; i++) begin
        y[i] = (rep == 0) ? 4'd15 : (rep == 1) ? 4'd0 : 4'($urandom_range(15));
        c[i] = 1'($urandom_range(1));
      end
      #1;
      for (int i = 0; i < N; i++) begin
        int exp_v;
        exp_v = c[(i + 1) % N] ? int'(y[i]) : -int'(y[i]);
        checks++;
        if (int'(s[i]) != exp_v) begin
          failures++;
          if (failures < 10) $display("lane %0d: s=%0d expected %0d", i, s[i], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
