// model_rom: the model-space geometry, twelve vertices forming a pyramid.
//
// The model is four triangles of three vertices each, the four sloping
// faces of a square pyramid with its apex at (0, +1, 0) and its base
// corners at (+-1, -1, +-1), all in Q16.16. Each triangle is listed
// counter-clockwise as seen from outside the solid, which the rasterizer's
// back-face test relies on. Vertex k of triangle t is at address 3*t + k.
// The read is combinational. Twelve coordinates forming a pyramid follow
// the source; the exact shape, size and winding are this design's choice.
module model_rom
  import gpu_pkg::*;
(
  input  logic [3:0] addr,
  output vec3_t      vert
);

  localparam fix_t P1 = FIX_ONE;
  localparam fix_t M1 = -FIX_ONE;
  localparam fix_t Z0 = '0;

  always_comb begin
    unique case (addr)
      // front face (+z)
      4'd0:  vert = '{x: M1, y: M1, z: P1};
      4'd1:  vert = '{x: P1, y: M1, z: P1};
      4'd2:  vert = '{x: Z0, y: P1, z: Z0};
      // right face (+x)
      4'd3:  vert = '{x: P1, y: M1, z: P1};
      4'd4:  vert = '{x: P1, y: M1, z: M1};
      4'd5:  vert = '{x: Z0, y: P1, z: Z0};
      // back face (-z)
      4'd6:  vert = '{x: P1, y: M1, z: M1};
      4'd7:  vert = '{x: M1, y: M1, z: M1};
      4'd8:  vert = '{x: Z0, y: P1, z: Z0};
      // left face (-x)
      4'd9:  vert = '{x: M1, y: M1, z: M1};
      4'd10: vert = '{x: M1, y: M1, z: P1};
      4'd11: vert = '{x: Z0, y: P1, z: Z0};
      default: vert = '{x: Z0, y: Z0, z: Z0};
    endcase
  end

endmodule
