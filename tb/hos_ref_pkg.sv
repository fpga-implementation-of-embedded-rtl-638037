// hos_ref_pkg: reference model used by the radar testbenches.
//
// Generates the 1023-chip code of the x^10 + x^7 + 1 LFSR independently of the RTL (by
// stepping the polynomial on an int), synthesises a received wave (an echo of the code delayed
// by d samples around mid-scale 8, plus uniform noise, clipped to 0..15), and evaluates the HOS
// formulas directly on whole arrays:
//   Cycc(j) = sum_i y(i) c(i+1) c(i+j),  Cycy(j) = sum_i y(i) c(i+1) y(i+j),
//   J32(i0) = sum_{j<L} Cycc(j) Cycy(j+i0)
// with c read as +1/-1, indices i+1 taken modulo N and i+j running past the frame.
package hos_ref_pkg;

  // chip t of the LFSR sequence seeded with all ones (bit 9 out, feedback bit9 ^ bit6)
  function automatic void make_code(ref bit code[], input int len);
    int unsigned st = 'h3ff;
    code = new[len];
    for (int t = 0; t < len; t++) begin
      code[t] = st[9];
      st = ((st << 1) | (((st >> 9) ^ (st >> 6)) & 1)) & 'h3ff;
    end
  endfunction

  function automatic void make_wave(ref bit code[], ref int y[], input int len, input int n,
                                    input int d, input int amp, input int noise);
    y = new[len];
    for (int t = 0; t < len; t++) begin
      int v;
      v = 8 + (code[((t - d) % n + n) % n] ? amp : -amp);
      if (noise > 0) v += int'($urandom_range(2 * noise)) - noise;
      y[t] = v < 0 ? 0 : (v > 15 ? 15 : v);
    end
  endfunction

  function automatic int pm(bit b);
    return b ? 1 : -1;
  endfunction

  // frame starting at sample base
  function automatic void golden(ref bit code[], ref int y[], input int base, input int n,
                                 input int l, ref longint cycc[], ref longint cycy[],
                                 ref longint j32[]);
    cycc = new[2 * l - 1];
    cycy = new[2 * l - 1];
    j32  = new[l];
    for (int j = 0; j < 2 * l - 1; j++) begin
      cycc[j] = 0;
      cycy[j] = 0;
      for (int i = 0; i < n; i++) begin
        longint si;
        si = y[base + i] * pm(code[base + (i + 1) % n]);
        cycc[j] += si * pm(code[base + i + j]);
        cycy[j] += si * y[base + i + j];
      end
    end
    for (int i0 = 0; i0 < l; i0++) begin
      j32[i0] = 0;
      for (int j = 0; j < l; j++) j32[i0] += cycc[j] * cycy[j + i0];
    end
  endfunction

endpackage
