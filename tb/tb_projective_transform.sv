// tb_projective_transform: sends random camera-space vertices, some in
// front of the near plane and some behind it, with random back-pressure.
// Visible results are compared with F * x / depth and F * y / depth in real
// arithmetic (F = 2) to within 0.002 plus 0.1 % of the value; vertices
// nearer than 0.25 must come out flagged invisible. Also checks the
// latency of a visible vertex (67 clocks), that the stage refuses input
// while it works, and that every vertex comes out once, in order.
module tb_projective_transform;
  import gpu_pkg::*;

  logic  clk = 0, rst_n = 0;
  vec3_t in_vert, out_vert;
  logic  in_valid, in_ready, out_valid, out_ready, out_vis;
  int    checks = 0, failures = 0;

  projective_transform dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(fix_t f); return real'(f) / 65536.0; endfunction
  function automatic fix_t rnd(int lim);
    return fix_t'($urandom_range(0, 2 * lim)) - fix_t'(lim);
  endfunction

  real ex [$], ey [$], ed [$];
  bit  evis [$];
  int  received = 0, hidden = 0, busy_refusals = 0, stalls = 0;
  bit  force_ready = 0;
  localparam int N = 300;

  task automatic expect_vertex();
    real d;
    d = -r(in_vert.z);
    ed.push_back(d);
    evis.push_back(d >= 0.25);
    ex.push_back(2.0 * r(in_vert.x) / d);
    ey.push_back(2.0 * r(in_vert.y) / d);
  endtask

  initial begin
    out_ready = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      out_ready = force_ready || ($urandom_range(0, 2) != 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && !in_ready) busy_refusals++;
    if (rst_n && out_valid && !out_ready) stalls++;
    if (rst_n && out_valid && out_ready) begin
      real x, y, d;
      bit  vis;
      x = ex.pop_front(); y = ey.pop_front(); d = ed.pop_front(); vis = evis.pop_front();
      checks++;
      if (out_vis != vis) begin
        failures++;
        $display("vertex %0d: visibility %0d exp %0d (depth %f)", received, out_vis, vis, d);
      end else if (vis) begin
        checks++;
        if ((r(out_vert.x) - x) ** 2 > (0.002 + 0.001 * x) ** 2 ||
            (r(out_vert.y) - y) ** 2 > (0.002 + 0.001 * y) ** 2 ||
            (r(out_vert.z) - d) ** 2 > 1e-8) begin
          failures++;
          $display("vertex %0d: got %f %f exp %f %f", received, r(out_vert.x), r(out_vert.y), x, y);
        end
      end else hidden++;
      received++;
    end
  end

  initial begin
    int lat;
    in_valid = 0; in_vert = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      in_valid = 1;
      in_vert  = '{x: rnd(6 * 65536), y: rnd(6 * 65536),
                   z: ($urandom_range(0, 9) == 0) ? rnd(65536) : -fix_t'($urandom_range(16384, 20 * 65536))};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      expect_vertex();
      @(negedge clk);
      in_valid = ($urandom_range(0, 1) == 0);
      if (!in_valid) @(negedge clk);
    end
    in_valid = 0;
    wait (ex.size() == 0);
    // latency of a visible vertex
    force_ready = 1;
    @(negedge clk);
    in_valid = 1;
    in_vert = '{x: 65536, y: -65536, z: -4 * 65536};
    @(posedge clk);
    expect_vertex();
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 200) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 67) begin failures++; $display("latency %0d, expected 67", lat); end
    @(negedge clk);
    checks++;
    if (received != N + 1 || hidden == 0 || busy_refusals == 0 || stalls == 0) begin
      failures++;
      $display("received %0d hidden %0d refusals %0d stalls %0d", received, hidden, busy_refusals, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
