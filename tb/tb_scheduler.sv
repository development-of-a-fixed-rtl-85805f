// tb_scheduler: runs the scheduler against a model of the camera setup and
// of the transformation pipeline (random acceptance, random delays, results
// tagged with the ROM address they came from). Checks per frame that the
// spin angle advanced by the speed, that the camera setup ran before any
// vertex was issued, that the twelve vertices were issued in ROM order and
// written to vertex-buffer addresses 0..11 in that order, that exactly one
// swap follows the twelfth write, and that a frame tick arriving while a
// frame is being built is reported as skipped and otherwise ignored.
module tb_scheduler;
  import gpu_pkg::*;

  logic clk = 0, rst_n = 0, frame_tick = 0;
  logic signed [ANG_W-1:0] speed;
  logic cam_start, cam_done = 0;
  logic [3:0] rom_addr;
  logic feed_valid, feed_ready = 0;
  logic res_valid = 0, res_ready;
  svert_t res_vert = '0;
  logic vb_we, vb_swap;
  logic [3:0] vb_waddr;
  svert_t vb_wdata;
  angle_t spin;
  logic busy, frame_skip;
  int checks = 0, failures = 0;

  scheduler dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // camera model: done 5..20 clocks after start
  int cam_wait = -1;
  bit cam_ran = 0;
  always @(posedge clk) begin
    cam_done <= 0;
    if (cam_start) begin cam_wait <= $urandom_range(5, 20); cam_ran <= 1; end
    else if (cam_wait > 0) cam_wait <= cam_wait - 1;
    else if (cam_wait == 0) begin cam_done <= 1; cam_wait <= -1; end
  end

  // pipeline model: a queue of tagged vertices with random delay
  int pipe_q [$];
  int issued_exp = 0, writes = 0, swaps = 0, skips = 0;
  always @(negedge clk) feed_ready = ($urandom_range(0, 2) != 0);
  always @(posedge clk) begin
    if (feed_valid && feed_ready) begin
      check(cam_ran, "vertex issued before camera setup");
      check(rom_addr == 4'(issued_exp), "ROM address order");
      issued_exp++;
      pipe_q.push_back(int'(rom_addr));
    end
    if (vb_we) begin
      check(vb_waddr == 4'(writes), "vertex buffer address order");
      check(vb_wdata.x == scr_t'(100 + int'(vb_waddr)) && vb_wdata.y == scr_t'(200 + int'(vb_waddr)),
            "vertex buffer data");
      writes++;
    end
    if (vb_swap) begin
      check(writes == 12, "swap after twelve writes");
      swaps++;
    end
    if (frame_skip) skips++;
  end
  always @(negedge clk) begin
    res_valid = 0;
    if (pipe_q.size() > 0 && $urandom_range(0, 3) == 0) begin
      int a;
      a = pipe_q.pop_front();
      res_valid = 1;
      res_vert = '{valid: 1'b1, x: scr_t'(100 + a), y: scr_t'(200 + a)};
    end
  end

  initial begin
    angle_t exp_spin;
    speed = 3;
    exp_spin = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int f = 0; f < 20; f++) begin
      speed = ANG_W'($urandom_range(0, 32) - 16);
      writes = 0; issued_exp = 0; cam_ran = 0;
      frame_tick = 1;
      @(negedge clk);
      frame_tick = 0;
      exp_spin = exp_spin + angle_t'(speed);
      check(spin == exp_spin, "spin advanced by speed");
      check(busy, "busy after frame tick");
      // a second tick while busy must be skipped
      repeat (3) @(negedge clk);
      frame_tick = 1;
      @(negedge clk);
      frame_tick = 0;
      while (busy) @(negedge clk);
      check(writes == 12 && issued_exp == 12, "twelve vertices per frame");
      check(spin == exp_spin, "skipped tick left spin alone");
      repeat ($urandom_range(1, 10)) @(negedge clk);
    end
    check(swaps == 20, "one swap per frame");
    check(skips == 20, "one skip reported per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
