// gpu_top: a fixed-function 3D graphics pipeline driving a VGA monitor.
//
// Every frame, twelve model vertices (a four-faced pyramid) go through
//   world transform -> view transform -> projective transform
//   -> screen-space transform
// and land in a small double-buffered vertex list. A bufferless rasterizer
// then colours each pixel as the VGA scan reaches it, from that list
// alone. The viewer can move the object (translation), change how fast it
// spins about the vertical axis, and move the eye point and the look-to
// point, through user_control. A scheduler sequences the work during
// vertical blanking, so a new picture appears every frame. All settings are
// sampled at the start of a frame build.
//
// Interface: clk is the pixel clock (25 MHz for 640x480 at 60 Hz; on the
// board it comes from a PLL, which is outside this design) and rst_n an
// asynchronous active-low reset. sel/inc/dec are the control inputs of
// user_control (inc and dec are single-cycle, already debounced pulses).
// The VGA outputs are 4 bits per colour with active-low syncs and blank;
// they lag the internal scan by the rasterizer's two pipeline clocks.
// busy is high while a frame is being built, frame_skip pulses when a
// frame start finds the previous frame unfinished.
module gpu_top
  import gpu_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter vec3_t  SCALE  = '{x: 32'sh0001_0000, y: 32'sh0001_0000, z: 32'sh0001_0000},
  parameter angle_t TILT_X = 8'd0,
  parameter angle_t TILT_Z = 8'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] sel,
  input  logic       inc,
  input  logic       dec,
  output logic [3:0] vga_r,
  output logic [3:0] vga_g,
  output logic [3:0] vga_b,
  output logic       vga_hsync_n,
  output logic       vga_vsync_n,
  output logic       vga_blank_n,
  output logic       busy,
  output logic       frame_skip
);

  // ---------------- user settings
  vec3_t                   trans, eye, look;
  logic signed [ANG_W-1:0] speed;

  user_control u_ctrl (
    .clk, .rst_n, .sel, .inc, .dec,
    .trans, .speed, .eye, .look
  );

  // ---------------- video timing
  logic [10:0] px, py;
  logic        active, hsync_n, vsync_n, frame_tick;

  vga_controller #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_vga (
    .clk, .rst_n, .px, .py, .active, .hsync_n, .vsync_n, .frame_tick
  );

  // ---------------- scheduler
  logic       cam_start, cam_done;
  logic [3:0] rom_addr;
  logic       feed_valid, feed_ready;
  logic       res_valid, res_ready;
  svert_t     res_vert;
  logic       vb_we, vb_swap;
  logic [3:0] vb_waddr;
  svert_t     vb_wdata;
  angle_t     spin;

  scheduler u_sched (
    .clk, .rst_n, .frame_tick, .speed,
    .cam_start, .cam_done,
    .rom_addr, .feed_valid, .feed_ready,
    .res_valid, .res_ready, .res_vert,
    .vb_we, .vb_waddr, .vb_wdata, .vb_swap,
    .spin, .busy, .frame_skip
  );

  // The translation is sampled at frame start, like the eye and look-to
  // points (inside view_setup) and the speed (inside the scheduler), so a
  // control pulse during a frame build only affects the next frame.
  vec3_t frame_trans;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         frame_trans <= '0;
    else if (cam_start) frame_trans <= trans;
  end

  // ---------------- camera basis
  vec3_t cam_u, cam_v, cam_n, cam_eye;

  view_setup u_cam (
    .clk, .rst_n, .start(cam_start), .eye, .look,
    .busy(), .done(cam_done),
    .u(cam_u), .v(cam_v), .n(cam_n), .eye_o(cam_eye)
  );

  // ---------------- transformation pipeline
  vec3_t model_vert;
  model_rom u_rom (.addr(rom_addr), .vert(model_vert));

  logic  w_valid, w_ready, v_valid, v_ready, p_valid, p_ready, p_vis;
  vec3_t w_vert, v_vert, p_vert;

  world_transform u_world (
    .clk, .rst_n, .scale(SCALE), .ang_x(TILT_X), .ang_y(spin), .ang_z(TILT_Z),
    .trans(frame_trans),
    .in_valid(feed_valid), .in_ready(feed_ready), .in_vert(model_vert),
    .out_valid(w_valid), .out_ready(w_ready), .out_vert(w_vert)
  );

  view_transform u_view (
    .clk, .rst_n, .u(cam_u), .v(cam_v), .n(cam_n), .eye(cam_eye),
    .in_valid(w_valid), .in_ready(w_ready), .in_vert(w_vert),
    .out_valid(v_valid), .out_ready(v_ready), .out_vert(v_vert)
  );

  projective_transform u_proj (
    .clk, .rst_n,
    .in_valid(v_valid), .in_ready(v_ready), .in_vert(v_vert),
    .out_valid(p_valid), .out_ready(p_ready), .out_vert(p_vert), .out_vis(p_vis)
  );

  screen_transform #(.H_RES(H_ACTIVE), .V_RES(V_ACTIVE)) u_screen (
    .clk, .rst_n,
    .in_valid(p_valid), .in_ready(p_ready), .in_vert(p_vert), .in_vis(p_vis),
    .out_valid(res_valid), .out_ready(res_ready), .out_vert(res_vert)
  );

  // ---------------- vertex list and rasterizer
  svert_t verts [NUM_VERTS];

  vertex_buffer u_vbuf (
    .clk, .rst_n, .we(vb_we), .waddr(vb_waddr), .wdata(vb_wdata),
    .swap(vb_swap), .verts
  );

  rasterizer u_rast (
    .clk, .rst_n, .verts, .px, .py, .active, .hsync_n, .vsync_n,
    .r(vga_r), .g(vga_g), .b(vga_b),
    .hsync_n_o(vga_hsync_n), .vsync_n_o(vga_vsync_n), .blank_n_o(vga_blank_n)
  );

endmodule
