// screen_transform: projected coordinates to pixel coordinates.
//
// Applies the screen-space matrix M_screen: the projected square [-1, 1]
// is scaled by half the screen height and centred on the screen, with y
// flipped so that it grows downwards as the scan does:
//   x_s = H_RES/2 + round(x_p * V_RES/2),  y_s = V_RES/2 - round(y_p * V_RES/2)
// Using V_RES/2 for both axes keeps pixels square. Results are clamped to
// the 12-bit signed range so that far off-screen points keep their
// direction. One register stage, one vertex per clock, same valid/ready
// handshake as the other stages; the visibility flag passes through.
// A screen-space transformation follows the source; the scaling, rounding
// and clamping are this design's choices.
module screen_transform
  import gpu_pkg::*;
#(
  parameter int H_RES = 640,
  parameter int V_RES = 480
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  vec3_t  in_vert,
  input  logic   in_vis,
  output logic   out_valid,
  input  logic   out_ready,
  output svert_t out_vert
);

  localparam fix_t HALF_H = to_fix(V_RES / 2);
  localparam int   SMAX   = (1 << (SCR_W - 1)) - 1;

  function automatic scr_t to_scr(fix_t centre, fix_t off, logic neg);
    fix_t r;
    r = neg ? centre - off : centre + off;
    r = (r + fix_t'(1 <<< (FRAC - 1))) >>> FRAC;   // round to nearest
    if (r > fix_t'(SMAX))  r = fix_t'(SMAX);
    if (r < fix_t'(-SMAX)) r = fix_t'(-SMAX);
    return scr_t'(r);
  endfunction

  // saturating Q16.16 multiply, so that huge projected values clamp
  function automatic fix_t smul(fix_t a, fix_t b);
    logic signed [63:0] p;
    p = (64'(a) * 64'(b)) >>> FRAC;
    if (p > 64'sd1073741823)  return fix_t'(32'sd1073741823);
    if (p < -64'sd1073741823) return fix_t'(-32'sd1073741823);
    return fix_t'(p);
  endfunction

  logic en;
  assign en       = !out_valid || out_ready;
  assign in_ready = en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_vert  <= '0;
    end else if (en) begin
      out_valid      <= in_valid;
      out_vert.valid <= in_vis;
      out_vert.x     <= to_scr(to_fix(H_RES / 2), smul(in_vert.x, HALF_H), 1'b0);
      out_vert.y     <= to_scr(to_fix(V_RES / 2), smul(in_vert.y, HALF_H), 1'b1);
    end
  end

endmodule
