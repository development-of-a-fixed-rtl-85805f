// tb_view_setup: gives the camera setup random eye and look-to points and
// compares the basis it builds with a real-valued reference
// (n = unit(eye - look), u = unit(up x n), v = n x u) to within 0.002 per
// component. Also checks that eye_o follows the eye point, that busy
// covers the run, that the run takes a fixed number of clocks, and that a
// zero-length view direction leaves the previous basis in place.
module tb_view_setup;
  import gpu_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0, busy, done;
  vec3_t eye, look, u, v, n, eye_o;
  int    checks = 0, failures = 0;

  view_setup dut (.*);

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

  task automatic check_vec(string what, vec3_t got, real x, real y, real z);
    checks++;
    if ((r(got.x) - x) ** 2 + (r(got.y) - y) ** 2 + (r(got.z) - z) ** 2 > 4e-6) begin
      failures++;
      $display("%s: got %f %f %f exp %f %f %f", what, r(got.x), r(got.y), r(got.z), x, y, z);
    end
  endtask

  task automatic run(output int cycles);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 2000) begin
      checks++;
      if (!busy) begin failures++; $display("busy low during run"); end
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int  cyc, first_cyc;
    real dx, dy, dz, l, nx, ny, nz, ux, uy, uz;
    vec3_t keep_u;
    repeat (2) @(negedge clk);
    rst_n = 1;
    first_cyc = -1;
    for (int k = 0; k < 60; k++) begin
      eye  = '{x: rnd(10 * 65536), y: rnd(10 * 65536), z: rnd(10 * 65536)};
      look = '{x: rnd(3 * 65536),  y: rnd(3 * 65536),  z: rnd(3 * 65536)};
      run(cyc);
      if (first_cyc < 0) first_cyc = cyc;
      checks++;
      if (cyc != first_cyc) begin failures++; $display("run took %0d clocks, first %0d", cyc, first_cyc); end
      dx = r(eye.x) - r(look.x); dy = r(eye.y) - r(look.y); dz = r(eye.z) - r(look.z);
      l = $sqrt(dx*dx + dy*dy + dz*dz);
      nx = dx / l; ny = dy / l; nz = dz / l;
      // up = (0,1,0): up x n = (nz, 0, -nx)
      l = $sqrt(nz*nz + nx*nx);
      ux = nz / l; uy = 0.0; uz = -nx / l;
      @(negedge clk);
      check_vec("n", n, nx, ny, nz);
      check_vec("u", u, ux, uy, uz);
      check_vec("v", v, ny*uz - nz*uy, nz*ux - nx*uz, nx*uy - ny*ux);
      checks++;
      if (eye_o != eye) begin failures++; $display("eye_o wrong"); end
    end
    // degenerate: eye on the look-to point keeps the basis
    keep_u = u;
    look = eye;
    run(cyc);
    @(negedge clk);
    checks++;
    if (u != keep_u || busy) begin failures++; $display("degenerate case changed basis"); end
    $display("setup takes %0d clocks", first_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
