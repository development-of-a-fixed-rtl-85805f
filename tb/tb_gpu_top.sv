// tb_gpu_top: end-to-end test of the whole GPU at its default size
// (640x480 VGA timing, twelve-vertex pyramid), over ten video frames.
//
// Between frames, and once during a frame build, the test works the user
// controls (spin speed, translation, eye point, look-to point); settings
// changed during a build must only show in the next frame. For every frame it
//  * recomputes the twelve screen-space vertices with an independent
//    real-valued model of the world, view, projective and screen-space
//    transforms and compares them with the vertex list the GPU displays
//    (within 2 pixels; same near-plane verdict),
//  * compares every pixel of the VGA output with a barycentric coverage
//    test over that vertex list (pixels exactly on an edge excepted),
//  * checks the sync pulses against the VGA output's own timing.
// It counts how often each mechanism happens and fails if one never does:
// pipeline stalls behind the perspective divide, back-face culling,
// near-plane rejection, vertex-buffer swaps and each kind of user control.
module tb_gpu_top;
  import gpu_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [3:0] sel = 0;
  logic       inc = 0, dec = 0;
  logic [3:0] vga_r, vga_g, vga_b;
  logic       vga_hsync_n, vga_vsync_n, vga_blank_n, busy, frame_skip;
  int         checks = 0, failures = 0;

  gpu_top dut (.*);

  always #20 clk = !clk;

  localparam int FRAMES = 10;

  initial begin
    repeat ((FRAMES + 2) * 800 * 525) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- settings model
  real m_trans [3], m_eye [3], m_look [3];
  int  m_speed, m_spin;
  // the settings as they stood at the last frame start
  real s_trans [3], s_eye [3], s_look [3];
  int  s_speed;
  int  n_midframe = 0;   // control pulses given while a frame was being built
  int  n_ctrl [4];     // uses of translation, speed, eye, look controls

  task automatic press(int s, bit up, int times);
    for (int i = 0; i < times; i++) begin
      @(negedge clk);
      sel = 4'(s); inc = up; dec = !up;
      if (busy) n_midframe++;
      @(negedge clk);
      inc = 0; dec = 0;
      if (s == 3) m_speed += up ? 1 : -1;
      else if (s < 3) m_trans[s] += up ? 0.25 : -0.25;
      else if (s < 7) m_eye[s-4] += up ? 0.25 : -0.25;
      else m_look[s-7] += up ? 0.25 : -0.25;
      n_ctrl[s < 3 ? 0 : s == 3 ? 1 : s < 7 ? 2 : 3]++;
    end
  endtask

  // ---------------------------------------------------------- reference model
  real ref_x [12], ref_y [12], ref_d [12];

  task automatic reference();
    real mx [12] = '{-1, 1, 0,  1, 1, 0,  1,-1, 0, -1,-1, 0};
    real my [12] = '{-1,-1, 1, -1,-1, 1, -1,-1, 1, -1,-1, 1};
    real mz [12] = '{ 1, 1, 0,  1,-1, 0, -1,-1, 0, -1, 1, 0};
    real th, c, s, nx, ny, nz, ux, uy, uz, vx, vy, vz, l;
    th = 2.0 * 3.14159265358979 * (m_spin & 255) / 256.0;
    c = $cos(th); s = $sin(th);
    nx = s_eye[0] - s_look[0]; ny = s_eye[1] - s_look[1]; nz = s_eye[2] - s_look[2];
    l = $sqrt(nx*nx + ny*ny + nz*nz); nx /= l; ny /= l; nz /= l;
    l = $sqrt(nz*nz + nx*nx); ux = nz / l; uy = 0.0; uz = -nx / l;
    vx = ny*uz - nz*uy; vy = nz*ux - nx*uz; vz = nx*uy - ny*ux;
    for (int i = 0; i < 12; i++) begin
      real wx, wy, wz, dx, dy, dz, xv, yv, d;
      wx = mx[i] * c + mz[i] * s + s_trans[0];
      wy = my[i] + s_trans[1];
      wz = mz[i] * c - mx[i] * s + s_trans[2];
      dx = wx - s_eye[0]; dy = wy - s_eye[1]; dz = wz - s_eye[2];
      xv = ux*dx + uy*dy + uz*dz;
      yv = vx*dx + vy*dy + vz*dz;
      d  = -(nx*dx + ny*dy + nz*dz);
      ref_d[i] = d;
      ref_x[i] = 320.0 + 240.0 * 2.0 * xv / d;
      ref_y[i] = 240.0 - 240.0 * 2.0 * yv / d;
    end
  endtask

  // ---------------------------------------------------------- counters
  int n_stall = 0, n_cull = 0, n_near = 0, n_swap = 0, n_skip = 0, n_drawn = 0;

  // frame build time: from the start of vertical blanking to the swap
  longint t_tick = 0, build_max = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.frame_tick && !busy) begin
      t_tick = cyc;
      s_trans = m_trans; s_eye = m_eye; s_look = m_look; s_speed = m_speed;
    end
    if (dut.vb_swap && cyc - t_tick > build_max) build_max = cyc - t_tick;
    if (dut.v_valid && !dut.v_ready) n_stall++;
    if (frame_skip) n_skip++;
  end

  function automatic int coverage(int t, int x, int y);
    real x0, y0, x1, y1, x2, y2, det, l1, l2, l0;
    if (!dut.verts[3*t].valid || !dut.verts[3*t+1].valid || !dut.verts[3*t+2].valid) return 0;
    x0 = dut.verts[3*t].x;   y0 = dut.verts[3*t].y;
    x1 = dut.verts[3*t+1].x; y1 = dut.verts[3*t+1].y;
    x2 = dut.verts[3*t+2].x; y2 = dut.verts[3*t+2].y;
    det = (x1 - x0) * (y2 - y0) - (y1 - y0) * (x2 - x0);
    if (det >= 0.0) return 0;
    l1 = ((x - x0) * (y2 - y0) - (y - y0) * (x2 - x0)) / det;
    l2 = ((x1 - x0) * (y - y0) - (y1 - y0) * (x - x0)) / det;
    l0 = 1.0 - l1 - l2;
    if (l0 > 1e-9 && l1 > 1e-9 && l2 > 1e-9) return 1;
    if (l0 < -1e-9 || l1 < -1e-9 || l2 < -1e-9) return 0;
    return 2;
  endfunction

  logic [11:0] colours [4] = '{12'hF00, 12'h0F0, 12'h00F, 12'hFF0};

  // pixel checker: compares the VGA output with the scan position two
  // clocks earlier, from the first full frame after the first swap on
  bit   pix_on = 0;
  int   hx [2], hy [2];
  bit   ha [2];
  int   hs_low = 0, pix_checked = 0;
  always @(posedge clk) begin
    if (pix_on) begin
      logic [11:0] e;
      bit skip;
      checks++;
      if (vga_blank_n != ha[1]) begin failures++; $display("blank wrong at %0d,%0d", hx[1], hy[1]); end
      if (ha[1]) begin
        e = 12'h000; skip = 0;
        for (int t = 3; t >= 0; t--) begin
          int cv;
          cv = coverage(t, hx[1], hy[1]);
          if (cv == 1) e = colours[t];
          if (cv == 2) skip = 1;
        end
        if (!skip) begin
          pix_checked++;
          if ({vga_r, vga_g, vga_b} != e) begin
            failures++;
            if (failures < 20) $display("pixel %0d,%0d: got %h exp %h", hx[1], hy[1], {vga_r, vga_g, vga_b}, e);
          end
        end
      end
      // hsync low for 96 pixel clocks, starting 16 after the active line
      if (!vga_hsync_n) hs_low++;
      if (hx[1] == 656 + 96 && hy[1] == 10) begin
        checks++;
        if (hs_low % 96 != 0) begin failures++; $display("hsync width wrong"); end
      end
    end
    hx[1] <= hx[0]; hy[1] <= hy[0]; ha[1] <= ha[0];
    hx[0] <= int'(dut.px); hy[0] <= int'(dut.py); ha[0] <= dut.active;
  end

  // ---------------------------------------------------------- frame checker
  task automatic check_vertices();
    reference();
    for (int i = 0; i < 12; i++) begin
      bit  vis_exp;
      vis_exp = ref_d[i] >= 0.25;
      if (ref_d[i] > 0.24 && ref_d[i] < 0.26) continue;
      checks++;
      if (dut.verts[i].valid != vis_exp) begin
        failures++;
        $display("frame %0d vertex %0d: visible %0d expected %0d", n_swap, i, dut.verts[i].valid, vis_exp);
      end else if (vis_exp) begin
        real ex, ey;
        ex = ref_x[i]; ey = ref_y[i];
        if (ex > 2047) ex = 2047; if (ex < -2047) ex = -2047;
        if (ey > 2047) ey = 2047; if (ey < -2047) ey = -2047;
        checks++;
        if ((real'(dut.verts[i].x) - ex) ** 2 > 4.0 || (real'(dut.verts[i].y) - ey) ** 2 > 4.0) begin
          failures++;
          $display("frame %0d vertex %0d: got %h expected (%f,%f)", n_swap, i,
                   dut.verts[i], ex, ey);
        end
      end
      if (!dut.verts[i].valid) n_near++;
    end
    for (int t = 0; t < 4; t++) begin
      real x0, y0, x1, y1, x2, y2;
      if (!(dut.verts[3*t].valid && dut.verts[3*t+1].valid && dut.verts[3*t+2].valid)) continue;
      x0 = dut.verts[3*t].x;   y0 = dut.verts[3*t].y;
      x1 = dut.verts[3*t+1].x; y1 = dut.verts[3*t+1].y;
      x2 = dut.verts[3*t+2].x; y2 = dut.verts[3*t+2].y;
      if ((x1 - x0) * (y2 - y0) - (y1 - y0) * (x2 - x0) >= 0.0) n_cull++;
      else n_drawn++;
    end
  endtask

  initial begin
    m_trans = '{0.0, 0.0, 0.0};
    m_eye   = '{0.0, 1.5, 5.0};
    m_look  = '{0.0, 0.0, 0.0};
    m_speed = 1; m_spin = 0;
    n_ctrl  = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      // wait for the frame to be built and shown
      // the banks change at the clock edge that ends the swap pulse
      @(posedge dut.vb_swap);
      @(posedge clk);
      @(negedge clk);
      m_spin += s_speed;
      n_swap++;
      check_vertices();
      pix_on = 1;
      // change the settings for the next frame
      unique case (f)
        0: press(3, 1, 3);                          // spin faster
        1: press(0, 1, 4);                          // move right by 1
        2: press(5, 1, 4);                          // raise the eye
        3: press(7, 0, 2);                          // look to the left
        4: begin press(0, 0, 4); press(2, 1, 22); end  // object into the camera
        5: press(2, 0, 14);
        6: begin press(3, 0, 6); press(6, 1, 4); end   // spin backwards, step back
        7: begin press(1, 0, 2); press(8, 1, 2); end
        8: begin                                     // controls during a build
             @(posedge dut.frame_tick);
             press(0, 1, 3); press(3, 1, 2); press(4, 1, 2); press(9, 0, 2);
           end
        default: ;
      endcase
    end
    // mechanisms
    checks++;
    if (n_stall == 0 || n_cull == 0 || n_near == 0 || n_swap != FRAMES || n_drawn == 0 ||
        n_ctrl[0] == 0 || n_ctrl[1] == 0 || n_ctrl[2] == 0 || n_ctrl[3] == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    // the frame must be built within vertical blanking (45 lines)
    checks++;
    if (build_max == 0 || build_max >= 45 * 800) begin
      failures++;
      $display("frame build took %0d clocks", build_max);
    end
    checks++;
    if (n_midframe == 0) begin failures++; $display("no control used during a frame build"); end
    checks++;
    if (n_skip != 0 || pix_checked < 1_000_000) begin
      failures++;
      $display("skipped frames %0d, pixels checked %0d", n_skip, pix_checked);
    end
    $display("longest frame build %0d clocks, control pulses during a build %0d", build_max, n_midframe);
    $display("frames %0d, stall cycles %0d, culled faces %0d, drawn faces %0d, near-plane vertices %0d",
             n_swap, n_stall, n_cull, n_drawn, n_near);
    $display("controls used: translation %0d, speed %0d, eye %0d, look %0d; pixels checked %0d",
             n_ctrl[0], n_ctrl[1], n_ctrl[2], n_ctrl[3], pix_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
