// projective_transform: perspective projection of camera-space vertices.
//
// The projection matrix M_proj with focal factor F = cot(fov/2), followed by
// the divide by the homogeneous coordinate, reduces to
//   depth = -z_v,  x_p = F * x_v / depth,  y_p = F * y_v / depth
// so that points at the edge of the field of view land on +-1. To share
// one divider, the stage forms the reciprocal r = F / depth once (fx_div,
// 64 clocks) and multiplies both coordinates by it. A vertex closer than
// NEAR, or behind the camera, is not divided: it leaves at once with
// out_vis low, and the rasterizer drops any triangle that uses it.
// The stage holds one vertex at a time: in_ready is high only while it is
// idle, so it stalls the stages in front of it during each division. A
// visible vertex leaves 67 clocks after it is accepted; out_vert.z carries
// the depth. Arithmetic is Q16.16. A projective transformation follows the
// source; F, NEAR, near-plane handling and the iterative divide are this
// design's choices.
module projective_transform
  import gpu_pkg::*;
#(
  parameter fix_t FOCAL = fix_t'(32'sh0002_0000),  // 2.0, about 53 degrees
  parameter fix_t NEAR  = fix_t'(32'sh0000_4000)   // 0.25
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  vec3_t in_vert,
  output logic  out_valid,
  input  logic  out_ready,
  output vec3_t out_vert,
  output logic  out_vis
);

  typedef enum logic [1:0] {IDLE, DIV, OUT} state_t;

  state_t state;
  vec3_t  cur;           // x_v, y_v, depth
  fix_t   depth_in;

  logic               dv_start, dv_done;
  logic signed [63:0] dv_quo;

  assign depth_in = -in_vert.z;
  assign dv_start = (state == IDLE) && in_valid && (depth_in >= NEAR);
  assign in_ready = (state == IDLE);

  fx_div #(.NUM_W(64), .DEN_W(32)) u_div (
    .clk, .rst_n, .start(dv_start),
    .num(64'(FOCAL) <<< FRAC), .den(depth_in),
    .busy(), .done(dv_done), .quo(dv_quo)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      cur       <= '0;
      out_valid <= 1'b0;
      out_vert  <= '0;
      out_vis   <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (in_valid) begin
          cur <= '{x: in_vert.x, y: in_vert.y, z: depth_in};
          if (depth_in >= NEAR) begin
            state <= DIV;
          end else begin
            out_vert  <= '{x: '0, y: '0, z: depth_in};
            out_vis   <= 1'b0;
            out_valid <= 1'b1;
            state     <= OUT;
          end
        end
        DIV: if (dv_done) begin
          out_vert.x <= fmul(cur.x, fix_t'(dv_quo));
          out_vert.y <= fmul(cur.y, fix_t'(dv_quo));
          out_vert.z <= cur.z;
          out_vis    <= 1'b1;
          out_valid  <= 1'b1;
          state      <= OUT;
        end
        OUT: if (out_ready) begin
          out_valid <= 1'b0;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  property p_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_vert);
  endproperty
  a_hold: assert property (p_hold);

endmodule
