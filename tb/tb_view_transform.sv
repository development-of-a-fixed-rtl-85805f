// tb_view_transform: streams random world-space vertices through the view
// transform for random orthonormal camera bases and eye points, with
// random back-pressure, and compares each result with real-valued dot
// products u.(p-eye), v.(p-eye), n.(p-eye) to within 0.002. Also checks
// the two-clock latency and that no vertex is lost.
module tb_view_transform;
  import gpu_pkg::*;

  logic  clk = 0, rst_n = 0;
  vec3_t u, v, n, eye, in_vert, out_vert;
  logic  in_valid, in_ready, out_valid, out_ready;
  int    checks = 0, failures = 0;

  view_transform dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(fix_t f); return real'(f) / 65536.0; endfunction
  function automatic fix_t f(real x); return fix_t'($rtoi(x * 65536.0)); endfunction
  function automatic fix_t rnd(int lim);
    return fix_t'($urandom_range(0, 2 * lim)) - fix_t'(lim);
  endfunction

  real ex [$], ey [$], ez [$];
  int  received = 0, stalls = 0;
  bit  force_ready = 0;
  localparam int N = 400;

  task automatic expect_vertex();
    real dx, dy, dz;
    dx = r(in_vert.x) - r(eye.x);
    dy = r(in_vert.y) - r(eye.y);
    dz = r(in_vert.z) - r(eye.z);
    ex.push_back(r(u.x) * dx + r(u.y) * dy + r(u.z) * dz);
    ey.push_back(r(v.x) * dx + r(v.y) * dy + r(v.z) * dz);
    ez.push_back(r(n.x) * dx + r(n.y) * dy + r(n.z) * dz);
  endtask

  // random orthonormal basis from two angles
  task automatic new_basis();
    real a, b;
    a = $urandom_range(0, 6283) / 1000.0;
    b = $urandom_range(0, 3000) / 1000.0 - 1.5;
    n = '{x: f($cos(b) * $sin(a)), y: f($sin(b)), z: f($cos(b) * $cos(a))};
    u = '{x: f($cos(a)), y: 0, z: f(-$sin(a))};
    v = '{x: f(-$sin(b) * $sin(a)), y: f($cos(b)), z: f(-$sin(b) * $cos(a))};
    eye = '{x: rnd(8 * 65536), y: rnd(8 * 65536), z: rnd(8 * 65536)};
  endtask

  initial begin
    out_ready = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      out_ready = force_ready || ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && !out_ready) stalls++;
    if (rst_n && out_valid && out_ready) begin
      real x, y, z;
      x = ex.pop_front(); y = ey.pop_front(); z = ez.pop_front();
      checks++;
      if ((r(out_vert.x) - x) ** 2 + (r(out_vert.y) - y) ** 2 + (r(out_vert.z) - z) ** 2 > 4e-6) begin
        failures++;
        $display("vertex %0d: got %f %f %f exp %f %f %f", received,
                 r(out_vert.x), r(out_vert.y), r(out_vert.z), x, y, z);
      end
      received++;
    end
  end

  initial begin
    int lat;
    in_valid = 0; in_vert = '0;
    new_basis();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int blk = 0; blk < N / 10; blk++) begin
      wait (ex.size() == 0);
      @(negedge clk);
      new_basis();
      for (int i = 0; i < 10; i++) begin
        in_valid = ($urandom_range(0, 4) != 0);
        in_vert  = '{x: rnd(8 * 65536), y: rnd(8 * 65536), z: rnd(8 * 65536)};
        @(posedge clk);
        if (in_valid && in_ready) expect_vertex(); else i--;
        @(negedge clk);
      end
      in_valid = 0;
    end
    wait (ex.size() == 0);
    force_ready = 1;
    @(negedge clk);
    in_valid = 1;
    @(posedge clk);
    expect_vertex();
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin
      failures++;
      $display("latency %0d, expected 2", lat);
    end
    @(negedge clk);
    checks++;
    if (received != N + 1 || stalls == 0) begin
      failures++;
      $display("received %0d of %0d, %0d stall cycles", received, N + 1, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
