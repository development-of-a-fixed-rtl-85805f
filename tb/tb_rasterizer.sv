// tb_rasterizer: scans whole 640x480 frames through the rasterizer for
// several vertex lists (random triangles, a front-facing and a back-facing
// triangle, a triangle with an invisible vertex) and compares every pixel
// with a reference that decides coverage with a barycentric test in real
// arithmetic. Pixels exactly on an edge are not compared, since the two
// tests may round them differently. Also checks that sync and blank come
// out two clocks after the scan, that face colours follow the triangle
// order, and counts culled back faces.
module tb_rasterizer;
  import gpu_pkg::*;

  logic        clk = 0, rst_n = 0;
  svert_t      verts [NUM_VERTS];
  logic [10:0] px = 0, py = 0;
  logic        active = 0, hsync_n = 1, vsync_n = 1;
  logic [3:0]  r, g, b;
  logic        hsync_n_o, vsync_n_o, blank_n_o;
  int          checks = 0, failures = 0;

  rasterizer dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] colours [4] = '{12'hF00, 12'h0F0, 12'h00F, 12'hFF0};

  // 0: outside, 1: inside, 2: on an edge (not compared)
  function automatic int coverage(int t, int x, int y);
    real x0, y0, x1, y1, x2, y2, det, l1, l2, l0, eps;
    x0 = verts[3*t].x;   y0 = verts[3*t].y;
    x1 = verts[3*t+1].x; y1 = verts[3*t+1].y;
    x2 = verts[3*t+2].x; y2 = verts[3*t+2].y;
    if (!verts[3*t].valid || !verts[3*t+1].valid || !verts[3*t+2].valid) return 0;
    // orientation in screen space (y down): front faces turn clockwise
    det = (x1 - x0) * (y2 - y0) - (y1 - y0) * (x2 - x0);
    if (det >= 0.0) return 0;
    l1 = ((x - x0) * (y2 - y0) - (y - y0) * (x2 - x0)) / det;
    l2 = ((x1 - x0) * (y - y0) - (y1 - y0) * (x - x0)) / det;
    l0 = 1.0 - l1 - l2;
    eps = 1e-9;
    if (l0 > eps && l1 > eps && l2 > eps) return 1;
    if (l0 < -eps || l1 < -eps || l2 < -eps) return 0;
    return 2;
  endfunction

  int culled = 0, covered = 0;

  task automatic scan_frame();
    logic [13:0] expq [$];   // {skip, active, colour}
    for (int y = 0; y < 482; y++) begin
      for (int x = 0; x < 644; x++) begin
        logic [11:0] exp_rgb;
        bit skip, act;
        act = (x < 640 && y < 480);
        exp_rgb = 12'h000;
        skip = 0;
        if (act)
          for (int t = 3; t >= 0; t--) begin
            int c;
            c = coverage(t, x, y);
            if (c == 1) exp_rgb = colours[t];
            if (c == 2) skip = 1;
          end
        if (!act) skip = 0;
        // once a covering triangle with lower index is certain, edges of
        // higher ones no longer matter; keep it simple and skip
        px = 11'(x); py = 11'(y); active = act;
        hsync_n = !(x == 642); vsync_n = !(y == 481);
        expq.push_back({skip, act, exp_rgb});
        @(negedge clk);
        if (expq.size() > 1) begin
          logic [13:0] e;
          e = expq.pop_front();
          checks++;
          if (blank_n_o != e[12]) begin failures++; $display("blank misaligned"); end
          if (!e[13] && {r, g, b} != e[11:0]) begin
            failures++;
            if (failures < 20) $display("pixel before (%0d,%0d): got %h exp %h", x, y, {r, g, b}, e[11:0]);
          end
          if (e[11:0] != 0) covered++;
        end
      end
    end
    // sync delay: hsync was low for x == 642, seen two clocks later
  endtask

  function automatic svert_t sv(int x, int y, bit v = 1);
    return '{valid: v, x: scr_t'(x), y: scr_t'(y)};
  endfunction

  initial begin
    for (int i = 0; i < NUM_VERTS; i++) verts[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // frame 1: hand-made set: front, back-facing, partly off-screen, hidden vertex
    verts = '{sv(100, 300), sv(300, 300), sv(200, 100),       // front (clockwise on screen)
              sv(350, 100), sv(550, 300), sv(350, 300),       // back (counter-clockwise)
              sv(-200, 400), sv(500, 470), sv(150, 200),      // front, clipped by screen edge
              sv(400, 400), sv(600, 450), sv(500, 300, 0)};   // one invisible vertex
    scan_frame();
    // frames 2..4: random triangles, partly overlapping, either winding
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < NUM_VERTS; i++)
        verts[i] = sv($urandom_range(0, 800) - 80, $urandom_range(0, 600) - 60);
      for (int t = 0; t < 4; t++) begin
        real x0, y0, x1, y1, x2, y2;
        x0 = verts[3*t].x; y0 = verts[3*t].y; x1 = verts[3*t+1].x;
        y1 = verts[3*t+1].y; x2 = verts[3*t+2].x; y2 = verts[3*t+2].y;
        if ((x1 - x0) * (y2 - y0) - (y1 - y0) * (x2 - x0) >= 0.0) culled++;
      end
      scan_frame();
    end
    // sync delay check
    hsync_n = 1;
    @(negedge clk);
    hsync_n = 0;
    @(negedge clk);
    hsync_n = 1;
    checks++;
    if (hsync_n_o != 1) begin failures++; $display("hsync too early"); end
    @(negedge clk);
    checks++;
    if (hsync_n_o != 0) begin failures++; $display("hsync not delayed by two clocks"); end
    checks++;
    if (culled == 0 || covered == 0) begin
      failures++;
      $display("culled %0d covered %0d", culled, covered);
    end
    $display("culled back faces %0d, covered pixels %0d", culled, covered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
