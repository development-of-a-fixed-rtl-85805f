// vertex_buffer: double-buffered list of the twelve screen-space vertices.
//
// The rasterizer keeps no frame buffer; all it needs is the current
// vertex list, which is held here in two banks of registers. The scheduler
// writes the new frame's vertices into the back bank (one per clock with
// we/waddr/wdata) while the rasterizer reads every vertex of the front
// bank in parallel from verts. A pulse on swap, given during vertical
// blanking, exchanges the banks on the next clock edge, so the picture
// never shows a half-updated vertex list. After reset both banks hold
// invalid vertices and nothing is drawn. The double buffering is this
// design's choice; the source only states that rasterization needs no
// buffer.
module vertex_buffer
  import gpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [3:0] waddr,
  input  svert_t     wdata,
  input  logic       swap,
  output svert_t     verts [NUM_VERTS]
);

  svert_t bank [2][NUM_VERTS];
  logic   front;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      front <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < NUM_VERTS; i++)
          bank[b][i] <= '0;
    end else begin
      if (we && waddr < 4'(NUM_VERTS))
        bank[!front][waddr] <= wdata;
      if (swap)
        front <= !front;
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_VERTS; i++)
      verts[i] = bank[front][i];
  end

endmodule
