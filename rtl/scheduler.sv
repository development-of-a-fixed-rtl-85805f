// scheduler: runs the transformation pipeline once per video frame.
//
// The scheduler is an algorithmic state machine. On each frame_tick (the
// start of vertical blanking) it:
//   1. advances the spin angle by the current rotation speed,
//   2. starts view_setup to rebuild the camera basis and waits for done,
//   3. streams the twelve model vertices (ROM addresses 0..11) into the
//      world transform through its valid/ready handshake, while
//   4. writing each screen-space vertex that leaves the last stage into
//      the back bank of the vertex buffer, in order,
//   5. and, after the twelfth, pulses vb_swap to show the new frame.
// Issuing and collecting overlap, so the pipeline runs as fast as its
// slowest stage (the perspective divide) allows. A frame_tick that comes
// while a frame is still being built is ignored and reported on
// frame_skip; the old vertex list then stays on screen. With the default
// sizes a frame takes about 1,300 clocks, far less than the 36,000 of
// vertical blanking. Results are accepted whenever a frame is being fed
// (res_ready is high in the RUN state).
// The existence of a scheduler follows the source; its sequence, the
// per-frame spin update and the skip rule are this design's choices.
module scheduler
  import gpu_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    frame_tick,
  input  logic signed [ANG_W-1:0] speed,
  // camera setup
  output logic                    cam_start,
  input  logic                    cam_done,
  // model ROM and pipeline input
  output logic [3:0]              rom_addr,
  output logic                    feed_valid,
  input  logic                    feed_ready,
  // pipeline output
  input  logic                    res_valid,
  output logic                    res_ready,
  input  svert_t                  res_vert,
  // vertex buffer
  output logic                    vb_we,
  output logic [3:0]              vb_waddr,
  output svert_t                  vb_wdata,
  output logic                    vb_swap,
  // status
  output angle_t                  spin,
  output logic                    busy,
  output logic                    frame_skip
);

  typedef enum logic [1:0] {IDLE, CAM, RUN, SWAP} state_t;

  state_t     state;
  logic [3:0] issued, received;

  assign busy       = (state != IDLE);
  assign cam_start  = (state == IDLE) && frame_tick;
  assign frame_skip = (state != IDLE) && frame_tick;
  assign rom_addr   = issued;
  assign feed_valid = (state == RUN) && (issued < 4'(NUM_VERTS));
  assign res_ready  = (state == RUN);
  assign vb_we      = res_ready && res_valid;
  assign vb_waddr   = received;
  assign vb_wdata   = res_vert;
  assign vb_swap    = (state == SWAP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      issued   <= '0;
      received <= '0;
      spin     <= '0;
    end else begin
      unique case (state)
        IDLE: if (frame_tick) begin
          spin  <= spin + angle_t'(speed);
          state <= CAM;
        end
        CAM: if (cam_done) begin
          issued   <= '0;
          received <= '0;
          state    <= RUN;
        end
        RUN: begin
          if (feed_valid && feed_ready) issued <= issued + 1'b1;
          if (res_valid) begin  // res_ready is high in RUN
            received <= received + 1'b1;
            if (received == 4'(NUM_VERTS - 1)) state <= SWAP;
          end
        end
        SWAP: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // Results never outnumber the vertices issued.
  a_order: assert property (@(posedge clk) disable iff (!rst_n)
                            vb_we |-> received < issued);

endmodule
