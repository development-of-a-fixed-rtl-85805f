// world_transform: model space to world space, the first pipeline stage.
//
// Each vertex is scaled (S_x, S_y, S_z), rotated about the X axis, then the
// Y axis, then the Z axis, and finally translated (T_x, T_y, T_z):
//   p' = T + Rz(Rz) * Ry(Ry) * Rx(Rx) * S * p
// The four steps are four register stages, so a vertex comes out four
// clocks after it is accepted and one vertex can enter per clock. The
// pipeline uses a valid/ready handshake: all stages advance together while
// the last stage is empty or its output is taken, so a stall further down
// the GPU holds the whole stage in place. Sine and cosine come from three
// sincos_rom lookups. Arithmetic is Q16.16 fixed point, products truncated.
// The transform and its symbols follow the source; the order of the
// rotations, the pipelining and the handshake are this design's choices.
module world_transform
  import gpu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // per-frame settings
  input  vec3_t  scale,
  input  angle_t ang_x,
  input  angle_t ang_y,
  input  angle_t ang_z,
  input  vec3_t  trans,
  // vertex stream in
  input  logic   in_valid,
  output logic   in_ready,
  input  vec3_t  in_vert,
  // vertex stream out
  output logic   out_valid,
  input  logic   out_ready,
  output vec3_t  out_vert
);

  fix_t sx, cx, sy, cy, sz, cz;
  sincos_rom u_rom_x (.angle(ang_x), .sin_o(sx), .cos_o(cx));
  sincos_rom u_rom_y (.angle(ang_y), .sin_o(sy), .cos_o(cy));
  sincos_rom u_rom_z (.angle(ang_z), .sin_o(sz), .cos_o(cz));

  logic  [3:0] vld;
  vec3_t       s1, s2, s3, s4;
  logic        en;

  assign en        = !vld[3] || out_ready;
  assign in_ready  = en;
  assign out_valid = vld[3];
  assign out_vert  = s4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      s1  <= '0;
      s2  <= '0;
      s3  <= '0;
      s4  <= '0;
    end else if (en) begin
      vld <= {vld[2:0], in_valid};
      // scale
      s1.x <= fmul(in_vert.x, scale.x);
      s1.y <= fmul(in_vert.y, scale.y);
      s1.z <= fmul(in_vert.z, scale.z);
      // rotate about X
      s2.x <= s1.x;
      s2.y <= fmul(s1.y, cx) - fmul(s1.z, sx);
      s2.z <= fmul(s1.y, sx) + fmul(s1.z, cx);
      // rotate about Y
      s3.x <= fmul(s2.x, cy) + fmul(s2.z, sy);
      s3.y <= s2.y;
      s3.z <= fmul(s2.z, cy) - fmul(s2.x, sy);
      // rotate about Z, then translate
      s4.x <= fmul(s3.x, cz) - fmul(s3.y, sz) + trans.x;
      s4.y <= fmul(s3.x, sz) + fmul(s3.y, cz) + trans.y;
      s4.z <= s3.z + trans.z;
    end
  end

  // A vertex offered on the output stays until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_vert);
  endproperty
  a_hold: assert property (p_hold);

endmodule
