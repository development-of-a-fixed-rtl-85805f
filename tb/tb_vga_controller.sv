// tb_vga_controller: runs two full 640x480 frames and checks the line and
// frame periods, the sync pulse widths and positions, the number of active
// pixels per frame, the coordinates of active pixels and the position and
// rate of frame_tick.
module tb_vga_controller;
  logic        clk = 0, rst_n = 0;
  logic [10:0] px, py;
  logic        active, hsync_n, vsync_n, frame_tick;
  int          checks = 0, failures = 0;

  vga_controller dut (.*);

  always #20 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cyc, last_hfall, last_vfall, last_tick, hlow, vlow, act;
    int ex, ey;
    bit prev_h, prev_v;
    cyc = 0; last_hfall = -1; last_vfall = -1; last_tick = -1;
    hlow = 0; vlow = 0; act = 0; ex = 0; ey = 0;
    prev_h = 1; prev_v = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // sampled at falling edges; the first one is pixel (0,0)
    repeat (2 * 800 * 525) begin
      // coordinates follow a model scan
      if (px != 11'(ex) || py != 11'(ey)) begin
        failures++; checks++;
        $display("scan position %0d,%0d expected %0d,%0d", px, py, ex, ey);
      end
      check(active == (ex < 640 && ey < 480), "active window");
      check(hsync_n == !(ex >= 656 && ex < 752), "hsync position");
      check(vsync_n == !(ey >= 490 && ey < 492), "vsync position");
      if (active) act++;
      if (!hsync_n && prev_h) begin
        if (last_hfall >= 0) check(cyc - last_hfall == 800, "line period");
        last_hfall = cyc;
      end
      if (!vsync_n && prev_v) begin
        if (last_vfall >= 0) check(cyc - last_vfall == 800 * 525, "frame period");
        last_vfall = cyc;
      end
      if (frame_tick) begin
        check(px == 0 && py == 480, "frame_tick position");
        if (last_tick >= 0) check(cyc - last_tick == 800 * 525, "frame_tick period");
        last_tick = cyc;
      end
      if (!hsync_n) hlow++;
      if (!vsync_n) vlow++;
      prev_h = hsync_n; prev_v = vsync_n;
      cyc++;
      ex++;
      if (ex == 800) begin ex = 0; ey = (ey == 524) ? 0 : ey + 1; end
      @(negedge clk);
    end
    check(act == 2 * 640 * 480, "active pixel count");
    check(hlow == 2 * 525 * 96, "hsync low time");
    check(vlow == 2 * 2 * 800, "vsync low time");
    check(last_tick >= 0, "frame_tick seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
