// gpu_pkg: types and constants shared by the fixed-pipeline GPU.
//
// All geometry is carried in signed fixed point, Q16.16 in a 32-bit word
// (16 integer bits, 16 fraction bits). The design replaces floating point
// by fixed-point binary throughout; the Q16.16 split is this design's choice.
// A vertex is a struct of three such numbers. Screen-space vertices use
// 12-bit signed integer pixel coordinates so that points slightly off the
// 640x480 screen still rasterize correctly, plus a flag that marks a vertex
// that lies behind the camera's near plane.
package gpu_pkg;

  localparam int unsigned FIX_W  = 32;
  localparam int unsigned FRAC   = 16;
  localparam int unsigned SCR_W  = 12;   // screen coordinate width (signed)
  localparam int unsigned ANG_W  = 8;    // angle: 256 steps per full turn
  localparam int unsigned NUM_VERTS = 12;  // 4 triangles x 3 vertices
  localparam int unsigned NUM_TRIS  = NUM_VERTS / 3;

  typedef logic signed [FIX_W-1:0] fix_t;
  typedef logic signed [SCR_W-1:0] scr_t;
  typedef logic [ANG_W-1:0]        angle_t;

  typedef struct packed {
    fix_t x;
    fix_t y;
    fix_t z;
  } vec3_t;

  typedef struct packed {
    logic valid;   // 0: vertex behind the near plane, triangle is dropped
    scr_t x;
    scr_t y;
  } svert_t;

  localparam fix_t FIX_ONE = fix_t'(1 <<< FRAC);

  // Q16.16 multiply with truncation toward minus infinity.
  function automatic fix_t fmul(fix_t a, fix_t b);
    logic signed [2*FIX_W-1:0] p;
    p = 64'(a) * 64'(b);
    return fix_t'(p >>> FRAC);
  endfunction

  // Integer constant to Q16.16.
  function automatic fix_t to_fix(int i);
    return fix_t'(i <<< FRAC);
  endfunction

endpackage
