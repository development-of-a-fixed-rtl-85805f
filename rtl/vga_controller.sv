// vga_controller: VGA raster timing for a 640x480 screen at 60 Hz.
//
// Two counters walk the full frame, pixel by pixel, at the pixel clock
// (25.175 MHz nominal; 25 MHz is within monitor tolerance). The horizontal
// counter covers active pixels, front porch, sync pulse and back porch;
// the vertical counter advances once per line. The sync pulses are active
// low. px/py are the counters themselves and are the coordinates of the
// pixel being scanned; active is high while that pixel is on screen.
// frame_tick pulses for one clock as the scan enters the first line after
// the picture, which is when the scheduler may rebuild the vertex list.
// All outputs are decoded from the counter registers in the same cycle.
// A VGA controller driving a monitor follows the source; the standard
// 640x480 timing is this design's choice.
module vga_controller #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [10:0] px,
  output logic [10:0] py,
  output logic        active,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        frame_tick
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] hcnt, vcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt <= '0;
      vcnt <= '0;
    end else if (hcnt == 11'(H_TOTAL - 1)) begin
      hcnt <= '0;
      vcnt <= (vcnt == 11'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
    end else begin
      hcnt <= hcnt + 1'b1;
    end
  end

  always_comb begin
    px         = hcnt;
    py         = vcnt;
    active     = (hcnt < 11'(H_ACTIVE)) && (vcnt < 11'(V_ACTIVE));
    hsync_n    = !((hcnt >= 11'(H_ACTIVE + H_FP)) && (hcnt < 11'(H_ACTIVE + H_FP + H_SYNC)));
    vsync_n    = !((vcnt >= 11'(V_ACTIVE + V_FP)) && (vcnt < 11'(V_ACTIVE + V_FP + V_SYNC)));
    frame_tick = (hcnt == '0) && (vcnt == 11'(V_ACTIVE));
  end

endmodule
