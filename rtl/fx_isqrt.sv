// fx_isqrt: iterative integer square root, one result bit per clock.
//
// Returns floor(sqrt(rad)) for an unsigned RAD_W-bit radicand by the
// digit-by-digit (non-restoring binary) method: each cycle brings down two
// radicand bits and tries to append a 1 to the root. Used to find vector
// lengths when the camera basis is normalised: the square root of a Q32.32
// sum of squares is the Q16.16 length. done pulses RAD_W/2 + 1 cycles after
// start and root holds until the next start. This unit is this design's
// choice; the source does not describe how normalisation is done.
module fx_isqrt #(
  parameter int unsigned RAD_W = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [RAD_W-1:0]   rad,
  output logic               busy,
  output logic               done,
  output logic [RAD_W/2-1:0] root
);

  localparam int unsigned RT_W  = RAD_W / 2;
  localparam int unsigned CNT_W = $clog2(RT_W + 1);

  logic [RAD_W-1:0] r_sh;     // radicand bits still to bring down
  logic [RT_W:0]    rem;      // partial remainder, at most 2*root
  logic [RT_W-1:0]  q;        // partial root
  logic [CNT_W-1:0] cnt;

  logic [RT_W+2:0]  rem_next;
  logic [RT_W+1:0]  trial;
  logic [RT_W+3:0]  diff;

  always_comb begin
    rem_next = {rem, r_sh[RAD_W-1 -: 2]};
    trial    = {q, 2'b01};
    diff     = {1'b0, rem_next} - {2'b00, trial};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
      r_sh <= '0;
      rem  <= '0;
      q    <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        r_sh <= rad;
        rem  <= '0;
        q    <= '0;
        cnt  <= CNT_W'(RT_W);
      end else if (busy) begin
        if (cnt != 0) begin
          r_sh <= {r_sh[RAD_W-3:0], 2'b00};
          if (!diff[RT_W+3]) begin
            rem <= diff[RT_W:0];
            q   <= {q[RT_W-2:0], 1'b1};
          end else begin
            rem <= rem_next[RT_W:0];  // no subtraction: rem_next < trial fits
            q   <= {q[RT_W-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= q;
        end
      end
    end
  end

endmodule
