// user_control: the viewer-adjustable settings of the GPU.
//
// Holds the object translation, the spin (rotation) speed, the eye point
// and the look-to point. sel picks one quantity; a one-cycle pulse on inc
// or dec steps it up or down. Coordinates step by STEP (Q16.16) and
// saturate at +-COORD_MAX; the speed steps by one angle unit per frame and
// saturates at +-SPEED_MAX. All settings take their defaults on reset and
// change on the clock edge after the pulse. If inc and dec arrive together,
// nothing changes.
//   sel: 0..2 translation x/y/z, 3 spin speed, 4..6 eye x/y/z, 7..9 look x/y/z
// The four kinds of control follow the source; the select/step interface,
// the step sizes and the defaults are this design's choices.
module user_control
  import gpu_pkg::*;
#(
  parameter fix_t   STEP      = fix_t'(32'sh0000_4000),  // 0.25
  parameter fix_t   COORD_MAX = fix_t'(32'sh0010_0000),  // 16.0
  parameter int     SPEED_MAX = 16,
  parameter int     SPEED_DEF = 1,
  parameter vec3_t  EYE_DEF   = '{x: 32'sh0, y: 32'sh0001_8000, z: 32'sh0005_0000},
  parameter vec3_t  LOOK_DEF  = '{x: 32'sh0, y: 32'sh0, z: 32'sh0}
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [3:0]             sel,
  input  logic                   inc,
  input  logic                   dec,
  output vec3_t                  trans,
  output logic signed [ANG_W-1:0] speed,
  output vec3_t                  eye,
  output vec3_t                  look
);

  function automatic fix_t step_coord(fix_t c, logic up);
    fix_t n;
    n = up ? c + STEP : c - STEP;
    if (n > COORD_MAX)  n = COORD_MAX;
    if (n < -COORD_MAX) n = -COORD_MAX;
    return n;
  endfunction

  logic step, up;
  assign step = inc ^ dec;
  assign up   = inc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trans <= '0;
      speed <= (ANG_W)'(SPEED_DEF);
      eye   <= EYE_DEF;
      look  <= LOOK_DEF;
    end else if (step) begin
      unique case (sel)
        4'd0: trans.x <= step_coord(trans.x, up);
        4'd1: trans.y <= step_coord(trans.y, up);
        4'd2: trans.z <= step_coord(trans.z, up);
        4'd3: begin
          if (up && speed < (ANG_W)'(SPEED_MAX))        speed <= speed + 1'b1;
          else if (!up && speed > -(ANG_W)'(SPEED_MAX)) speed <= speed - 1'b1;
        end
        4'd4: eye.x  <= step_coord(eye.x, up);
        4'd5: eye.y  <= step_coord(eye.y, up);
        4'd6: eye.z  <= step_coord(eye.z, up);
        4'd7: look.x <= step_coord(look.x, up);
        4'd8: look.y <= step_coord(look.y, up);
        4'd9: look.z <= step_coord(look.z, up);
        default: ;
      endcase
    end
  end

endmodule
