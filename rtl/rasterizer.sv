// rasterizer: bufferless, scan-synchronous triangle rasterization.
//
// Instead of drawing into a frame buffer, the rasterizer decides the
// colour of each pixel at the moment the VGA scan reaches it. For every
// triangle t (vertices 3t, 3t+1, 3t+2 of the vertex list) and the pixel
// p = (px, py) it evaluates the three edge functions
//   E(a, b, p) = (b.x - a.x)(p.y - a.y) - (b.y - a.y)(p.x - a.x)
// and the signed area E(v0, v1, v2). With screen y pointing down, a
// triangle wound counter-clockwise in the model faces the viewer when its
// area is negative; the pixel is inside it when all three edge functions
// are <= 0. Back-facing triangles are skipped, which for a convex solid
// such as the pyramid is a complete hidden-surface removal, so no depth
// buffer is needed either. Triangles with a vertex behind the near plane
// are skipped. The pixel takes the colour of the lowest-numbered covering
// triangle, else the background colour; outside the active area it is
// black. Stage 1 registers the edge-function signs, stage 2 the colour;
// the sync and blank signals are delayed by the same two clocks so that
// they stay aligned with the colour. A rasterizer that needs no buffer
// follows the source; the edge-function method, back-face culling, flat
// face colours and the two-stage timing are this design's choices.
module rasterizer
  import gpu_pkg::*;
#(
  parameter logic [11:0] BG_RGB = 12'h000,
  parameter logic [11:0] FACE_RGB [NUM_TRIS] = '{12'hF00, 12'h0F0, 12'h00F, 12'hFF0}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  svert_t      verts [NUM_VERTS],
  input  logic [10:0] px,
  input  logic [10:0] py,
  input  logic        active,
  input  logic        hsync_n,
  input  logic        vsync_n,
  output logic [3:0]  r,
  output logic [3:0]  g,
  output logic [3:0]  b,
  output logic        hsync_n_o,
  output logic        vsync_n_o,
  output logic        blank_n_o
);

  typedef logic signed [SCR_W+1:0]     diff_t;   // 14 bits
  typedef logic signed [2*SCR_W+3:0]   efun_t;   // 28 bits

  function automatic efun_t edge_fn(scr_t ax, scr_t ay, scr_t bx_, scr_t by_, scr_t qx, scr_t qy);
    diff_t bx, by, qxa, qya;
    bx  = diff_t'(bx_) - diff_t'(ax);
    by  = diff_t'(by_) - diff_t'(ay);
    qxa = diff_t'(qx)  - diff_t'(ax);
    qya = diff_t'(qy)  - diff_t'(ay);
    return efun_t'(bx) * efun_t'(qya) - efun_t'(by) * efun_t'(qxa);
  endfunction

  scr_t qx, qy;
  assign qx = scr_t'(px);
  assign qy = scr_t'(py);

  // stage 1: per triangle, is the pixel covered by a visible front face
  logic [NUM_TRIS-1:0] cover_d, cover_q;
  always_comb begin
    for (int t = 0; t < NUM_TRIS; t++) begin
      svert_t v0, v1, v2;
      efun_t  area, e0, e1, e2;
      v0   = verts[3*t];
      v1   = verts[3*t+1];
      v2   = verts[3*t+2];
      area = edge_fn(v0.x, v0.y, v1.x, v1.y, v2.x, v2.y);
      e0   = edge_fn(v0.x, v0.y, v1.x, v1.y, qx, qy);
      e1   = edge_fn(v1.x, v1.y, v2.x, v2.y, qx, qy);
      e2   = edge_fn(v2.x, v2.y, v0.x, v0.y, qx, qy);
      cover_d[t] = v0.valid && v1.valid && v2.valid && (area < 0) &&
                   (e0 <= 0) && (e1 <= 0) && (e2 <= 0);
    end
  end

  logic [2:0] sync1, sync2;  // {active, hsync_n, vsync_n}

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cover_q   <= '0;
      sync1     <= 3'b011;
      sync2     <= 3'b011;
      {r, g, b} <= '0;
    end else begin
      cover_q <= cover_d;
      sync1   <= {active, hsync_n, vsync_n};
      // stage 2: pick the colour
      sync2   <= sync1;
      if (!sync1[2])
        {r, g, b} <= '0;
      else begin
        {r, g, b} <= BG_RGB;
        for (int t = NUM_TRIS - 1; t >= 0; t--)
          if (cover_q[t]) {r, g, b} <= FACE_RGB[t];
      end
    end
  end

  assign blank_n_o = sync2[2];
  assign hsync_n_o = sync2[1];
  assign vsync_n_o = sync2[0];

endmodule
