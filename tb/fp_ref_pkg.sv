// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Values are converted to double precision, combined with the simulator's
// own real arithmetic, and rounded back to the 32-bit format with
// round-to-nearest-even, flush of tiny results to zero and saturation to
// infinity, the rules the arithmetic units implement. Random operands are
// drawn from a narrow exponent window so that every sum and product used is
// exact in double precision before the single rounding step.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return $bitstoreal({f[31], 63'd0});
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [24:0] keep;
    logic [28:0] rest;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e    = int'(d[62:52]) - 1023 + 127;
    keep = {2'b01, d[51:29]};
    rest = d[28:0];
    if (rest > 29'h1000_0000 || (rest == 29'h1000_0000 && keep[0])) keep = keep + 25'd1;
    if (keep[24]) begin
      keep = keep >> 1;
      e    = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), keep[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  // A zero product carries the XOR of the signs.
  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    r = r2f(f2r(a) * f2r(b));
    if (r[30:0] == 31'd0) r[31] = a[31] ^ b[31];
    return r;
  endfunction

  // Random value with exponent in [127-w, 127+w] and random sign.
  function automatic logic [31:0] rand_f32(int w);
    int e;
    e = 127 - w + int'($urandom_range(2 * w, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
