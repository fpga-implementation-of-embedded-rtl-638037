// radar_generator: the Generator component, the reference code and the system time base.
//
// Wave: a 10-bit maximal-length Fibonacci LFSR (x^10 + x^7 + 1, seeded with all ones) gives a
// pseudo-random code that repeats every 2^10 - 1 = 1023 chips, the code length N of the
// detector. One chip per clock is sent to the radar emitter (radar_emission) and, as the
// reference code, to the detector (ref_code). Counter: a modulo-1023 counter, 0 at the first
// chip of each code period, is the time base read by the processor to turn an interrupt into a
// time of flight. The document says only that the code comes from an LFSR and has N = 1023
// chips; the polynomial, seed and one-chip-per-clock rate are this design's own choices.
// Timing: chip and counter change on every rising edge; both restart together after reset.
module radar_generator
  import radar_cc_pkg::*;
#(
  parameter int unsigned N = N_CODE   // code period; must equal 2^LFSR_W - 1 for the LFSR used
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       ref_code,        // reference code chip to the detector
  output logic                       radar_emission,  // chip modulating the emitted wave
  output logic [$clog2(N)-1:0]       counter,         // time base, modulo N
  output logic                       period_start     // counter == 0
);
  logic [LFSR_W-1:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr    <= '1;
      counter <= '0;
    end else begin
      lfsr    <= {lfsr[LFSR_W-2:0], lfsr[LFSR_W-1] ^ lfsr[6]};
      counter <= (counter == $clog2(N)'(N - 1)) ? '0 : counter + 1'b1;
    end
  end

  assign ref_code       = lfsr[LFSR_W-1];
  assign radar_emission = lfsr[LFSR_W-1];
  assign period_start   = (counter == '0);

  initial begin
    assert (N == (1 << LFSR_W) - 1) else $error("radar_generator: N must be 2^LFSR_W - 1");
  end
endmodule
