// tb_screen_transform: sends random projected coordinates (including far
// off-screen ones) and checks the pixel coordinates against
// 320 + round(240 x) and 240 - round(240 y), clamped to +-2047, the
// pass-through of the visibility flag, the one-clock latency and holding
// under back-pressure.
module tb_screen_transform;
  import gpu_pkg::*;

  logic   clk = 0, rst_n = 0;
  vec3_t  in_vert;
  svert_t out_vert;
  logic   in_valid, in_ready, in_vis, out_valid, out_ready;
  int     checks = 0, failures = 0;

  screen_transform dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_coord(int centre, longint p, bit flip);
    longint v;
    // p is Q16.16; 240 * p / 65536 rounded half up
    v = (longint'(centre) * 65536 + (flip ? -240 * p : 240 * p) + 32768) >>> 16;
    if (v > 2047) v = 2047;
    if (v < -2047) v = -2047;
    return int'(v);
  endfunction

  int exq [$], eyq [$];
  bit evq [$];
  int received = 0, held = 0;

  initial begin
    out_ready = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && !out_ready) held++;
    if (rst_n && out_valid && out_ready) begin
      int x, y;
      bit vv;
      x = exq.pop_front(); y = eyq.pop_front(); vv = evq.pop_front();
      checks++;
      if (int'(out_vert.x) != x || int'(out_vert.y) != y || out_vert.valid != vv) begin
        failures++;
        $display("got %0d,%0d,%0d exp %0d,%0d,%0d", out_vert.x, out_vert.y, out_vert.valid, x, y, vv);
      end
      received++;
    end
  end

  initial begin
    in_valid = 0; in_vert = '0; in_vis = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      in_valid = 1;
      in_vis   = 1'($urandom_range(0, 1));
      if ($urandom_range(0, 9) == 0)
        in_vert = '{x: fix_t'($urandom), y: fix_t'($urandom), z: fix_t'($urandom)};
      else
        in_vert = '{x: fix_t'($urandom_range(0, 4 * 65536)) - 2 * 65536,
                    y: fix_t'($urandom_range(0, 4 * 65536)) - 2 * 65536, z: 0};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      exq.push_back(expect_coord(320, longint'(in_vert.x), 0));
      eyq.push_back(expect_coord(240, longint'(in_vert.y), 1));
      evq.push_back(in_vis);
      @(negedge clk);
      // one-clock latency while the output is free
      checks++;
      if (!out_valid) begin failures++; $display("no output one clock after input"); end
      in_valid = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (received != 2000 || held == 0) begin
      failures++;
      $display("received %0d, held %0d", received, held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
