// sincos_rom: sine and cosine of a rotation angle, for the world transform.
//
// The angle is an unsigned 8-bit fraction of a full turn (256 steps, about
// 1.4 degrees each). A quarter-wave table of 65 entries, sin(i*pi/128) for
// i = 0..64 in Q16.16, is built at elaboration time by a constant function
// that sums the Taylor series sin x = x - x^3/3! + x^5/5! - ... in 64-bit
// Q2.30 integer arithmetic, so no data file is needed. The two outputs are
// read from that table by quadrant symmetry: sin(a) uses entry a mod 64 or
// 64 - (a mod 64) with the sign of the quadrant, and cos(a) = sin(a + 64).
// The lookup is purely combinational (a ROM read with no clock).
// Rotation by table lookup and the angle resolution are this design's
// choices; the source only names the rotations R_x, R_y, R_z by angle theta.
module sincos_rom
  import gpu_pkg::*;
(
  input  angle_t angle,
  output fix_t   sin_o,
  output fix_t   cos_o
);

  typedef logic signed [FIX_W-1:0] qtab_t [0:64];

  function automatic qtab_t build_table();
    qtab_t t;
    longint x, x2, term, sum;
    for (int i = 0; i <= 64; i++) begin
      // x = i * (pi/2) / 64 in Q30; pi/2 * 2^30 = 1686629713
      x    = (64'sd1686629713 * longint'(i)) / 64;
      x2   = (x * x) >>> 30;
      term = x;
      sum  = x;
      for (int k = 1; k <= 7; k++) begin
        term = -((term * x2) >>> 30) / longint'((2*k) * (2*k + 1));
        sum  = sum + term;
      end
      t[i] = fix_t'((sum + 64'sd8192) >>> 14);  // Q30 -> Q16, rounded
    end
    return t;
  endfunction

  localparam qtab_t QTAB = build_table();

  function automatic fix_t lookup_sin(angle_t a);
    logic [5:0] idx;
    fix_t       mag;
    idx = a[5:0];
    if (a[6]) mag = QTAB[7'd64 - {1'b0, idx}];
    else      mag = QTAB[{1'b0, idx}];
    return a[7] ? -mag : mag;
  endfunction

  always_comb begin
    sin_o = lookup_sin(angle);
    cos_o = lookup_sin(angle + angle_t'(64));
  end

endmodule
