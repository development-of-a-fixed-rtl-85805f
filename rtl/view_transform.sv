// view_transform: world space to camera (view) space.
//
// Applies the view matrix M_view built from the camera basis: the right
// vector u, the up vector v and the view-direction vector n (pointing from
// the look-to point back to the eye), with the eye point as origin:
//   x_v = u . (p - eye),  y_v = v . (p - eye),  z_v = n . (p - eye)
// Points in front of the camera therefore have negative z_v. Two register
// stages (subtract, then the three dot products) give a latency of two
// clocks at one vertex per clock, with the same valid/ready handshake as
// the other stages. The basis comes from view_setup and must be stable
// while vertices flow. Arithmetic is Q16.16. The u, v, n basis follows the
// source; the pipelining and handshake are this design's choices.
module view_transform
  import gpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  vec3_t u,
  input  vec3_t v,
  input  vec3_t n,
  input  vec3_t eye,
  input  logic  in_valid,
  output logic  in_ready,
  input  vec3_t in_vert,
  output logic  out_valid,
  input  logic  out_ready,
  output vec3_t out_vert
);

  function automatic fix_t dot(vec3_t a, vec3_t b);
    return fmul(a.x, b.x) + fmul(a.y, b.y) + fmul(a.z, b.z);
  endfunction

  logic  [1:0] vld;
  vec3_t       d, r;
  logic        en;

  assign en        = !vld[1] || out_ready;
  assign in_ready  = en;
  assign out_valid = vld[1];
  assign out_vert  = r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      d   <= '0;
      r   <= '0;
    end else if (en) begin
      vld <= {vld[0], in_valid};
      d.x <= in_vert.x - eye.x;
      d.y <= in_vert.y - eye.y;
      d.z <= in_vert.z - eye.z;
      r.x <= dot(u, d);
      r.y <= dot(v, d);
      r.z <= dot(n, d);
    end
  end

  property p_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_vert);
  endproperty
  a_hold: assert property (p_hold);

endmodule
