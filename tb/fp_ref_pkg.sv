// fp_ref_pkg: reference helpers for the testbenches.
//
// Converts between IEEE-754 single-precision bit patterns and the simulator's
// double-precision `real`, independently of the design's arithmetic. r2f rounds
// to nearest even and flushes results below the normal range to zero, which
// is the behaviour the floating-point units are meant to have. ulp_dist gives
// the distance in units of the last place between two finite numbers of the
// same sign.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    if (f[30:23] == 8'hFF) begin
      d = {f[31], 11'h7FF, f[22:0], 29'd0};
      return $bitstoreal(d);
    end
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((d[27:0] != 0) || d[29])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic int unsigned ulp_dist(input logic [31:0] a, input logic [31:0] b);
    if (a == b) return 0;
    if (a[31] != b[31]) return (a[30:0] == 0 && b[30:0] == 0) ? 0 : 32'hFFFF_FFFF;
    return (a[30:0] > b[30:0]) ? a[30:0] - b[30:0] : b[30:0] - a[30:0];
  endfunction

  // random finite normal number with exponent field in [elo, ehi]
  function automatic logic [31:0] rand_fp(input int elo, input int ehi);
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'(elo + int'($urandom_range(ehi - elo)));
    return r;
  endfunction

endpackage
