// tb_world_transform: streams random vertices through the world transform
// with random scale, rotation angles and translation, and random output
// back-pressure. Each result is compared with a real-valued reference
// (scale, then rotate about X, Y, Z, then translate) to within 0.002. It
// also checks the four-clock latency and that nothing is lost or reordered.
module tb_world_transform;
  import gpu_pkg::*;

  logic   clk = 0, rst_n = 0;
  vec3_t  scale, trans, in_vert, out_vert;
  angle_t ang_x, ang_y, ang_z;
  logic   in_valid, in_ready, out_valid, out_ready;
  int     checks = 0, failures = 0;

  world_transform dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r(fix_t f); return real'(f) / 65536.0; endfunction
  function automatic fix_t rnd(int lim);
    return fix_t'($urandom_range(0, 2 * lim)) - fix_t'(lim);
  endfunction

  real ex [$], ey [$], ez [$];
  longint t_in [$];
  longint cyc = 0;
  int received = 0, stalls = 0;
  bit force_ready = 0;
  localparam int N = 400;

  always @(posedge clk) cyc++;

  task automatic expect_vertex();
    real x, y, z, t, cx_, sx_, cy_, sy_, cz_, sz_, pi2;
    pi2 = 2.0 * 3.14159265358979 / 256.0;
    cx_ = $cos(pi2 * ang_x); sx_ = $sin(pi2 * ang_x);
    cy_ = $cos(pi2 * ang_y); sy_ = $sin(pi2 * ang_y);
    cz_ = $cos(pi2 * ang_z); sz_ = $sin(pi2 * ang_z);
    x = r(in_vert.x) * r(scale.x);
    y = r(in_vert.y) * r(scale.y);
    z = r(in_vert.z) * r(scale.z);
    t = y * cx_ - z * sx_;  z = y * sx_ + z * cx_;  y = t;
    t = x * cy_ + z * sy_;  z = z * cy_ - x * sy_;  x = t;
    t = x * cz_ - y * sz_;  y = x * sz_ + y * cz_;  x = t;
    ex.push_back(x + r(trans.x));
    ey.push_back(y + r(trans.y));
    ez.push_back(z + r(trans.z));
    t_in.push_back(cyc);
  endtask

  // output side
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
      longint t0;
      x = ex.pop_front(); y = ey.pop_front(); z = ez.pop_front();
      t0 = t_in.pop_front();
      checks++;
      if ((r(out_vert.x) - x) ** 2 + (r(out_vert.y) - y) ** 2 + (r(out_vert.z) - z) ** 2 > 4e-6) begin
        failures++;
        $display("vertex %0d: got %f %f %f exp %f %f %f", received,
                 r(out_vert.x), r(out_vert.y), r(out_vert.z), x, y, z);
      end
      received++;
    end
  end

  // latency: with out_ready held high, a vertex appears 4 clocks later
  initial begin
    in_valid = 0; in_vert = '0;
    scale = '{x: FIX_ONE, y: FIX_ONE, z: FIX_ONE};
    trans = '0; ang_x = 0; ang_y = 0; ang_z = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // random stream; settings change only while the pipe is empty
    for (int blk = 0; blk < N / 10; blk++) begin
      wait (ex.size() == 0);
      @(negedge clk);
      scale = '{x: rnd(2 * 65536), y: rnd(2 * 65536), z: rnd(2 * 65536)};
      trans = '{x: rnd(8 * 65536), y: rnd(8 * 65536), z: rnd(8 * 65536)};
      ang_x = angle_t'($urandom); ang_y = angle_t'($urandom); ang_z = angle_t'($urandom);
      for (int i = 0; i < 10; i++) begin
        in_valid = ($urandom_range(0, 4) != 0);
        in_vert  = '{x: rnd(4 * 65536), y: rnd(4 * 65536), z: rnd(4 * 65536)};
        @(posedge clk);
        if (in_valid && in_ready) expect_vertex(); else i--;
        @(negedge clk);
      end
      in_valid = 0;
    end
    wait (ex.size() == 0);
    // latency: with the output always ready, a vertex taken at one clock
    // edge is offered on the output after the fourth edge
    force_ready = 1;
    @(negedge clk);
    in_valid = 1;
    @(posedge clk);
    expect_vertex();
    @(negedge clk);
    in_valid = 0;
    begin
      int lat;
      lat = 1;
      while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 4) begin
        failures++;
        $display("latency %0d, expected 4", lat);
      end
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
