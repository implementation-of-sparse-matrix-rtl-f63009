// Reference model of binary32 arithmetic for the testbenches, computed
// through the simulator's double-precision `real` type rather than with the
// bit manipulations of the RTL. A product of two binary32 values is exact in
// double precision, and so is a sum as long as the exponents differ by less
// than 29; to_fp32() then rounds the double once, to nearest-even, flushing
// subnormal results to zero as the RTL does.
package fp_ref_pkg;

  function automatic real to_real(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_fp32(real r);
    logic [63:0] d;
    logic [23:0] m;
    logic [24:0] mr;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    mr = {1'b0, m} + 25'(g && (st || m[0]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] mul_ref(logic [31:0] a, logic [31:0] b);
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) return {a[31] ^ b[31], 31'd0};
    return to_fp32(to_real(a) * to_real(b));
  endfunction

  function automatic logic [31:0] add_ref(logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    r = to_fp32(to_real(a) + to_real(b));
    // exact cancellation: IEEE gives +0 unless both operands are negative
    if (r[30:0] == 31'd0 && !(a[31] && b[31])) r[31] = 1'b0;
    return r;
  endfunction

  // random normal binary32 with exponent in [127-spread, 127+spread]
  function automatic logic [31:0] rand_fp(int spread);
    int e;
    e = 127 - spread + int'($urandom_range(2 * spread, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // Row dot product in the order the MAC adds: product k goes into partial
  // sum k mod slots, then the partial sums are summed as a pairwise tree.
  function automatic logic [31:0] mac_ref(logic [31:0] a[$], logic [31:0] b[$], int slots);
    logic [31:0] ps [$];
    for (int i = 0; i < slots; i++) ps.push_back(32'd0);
    foreach (a[k]) ps[k % slots] = add_ref(mul_ref(a[k], b[k]), ps[k % slots]);
    for (int n = slots / 2; n >= 1; n = n / 2)
      for (int i = 0; i < n; i++) ps[i] = add_ref(ps[2 * i], ps[2 * i + 1]);
    return ps[0];
  endfunction

  // Cycles from the first element of a back-to-back row of n elements to
  // conv_done: multiplier, last addition, then each tree round (its issue
  // cycles plus the adder latency and one cycle to see the adder drained).
  function automatic int mac_latency(int n, int mlat, int alat, int slots);
    int lat = n + mlat + alat + 1;
    for (int r = slots / 2; r >= 1; r = r / 2) lat += r + alat + 1;
    return lat;
  endfunction

endpackage
