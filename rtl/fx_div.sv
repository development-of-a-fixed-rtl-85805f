// fx_div: iterative signed integer divider, one quotient bit per clock.
//
// Used by the camera setup (vector normalisation) and by the perspective
// divide. A pulse on start latches num and den; the magnitudes are divided
// by the restoring shift-subtract method, MSB first, one bit per cycle, and
// the sign is applied at the end, so the quotient is truncated toward zero.
// done pulses for one cycle NUM_W + 1 cycles after start, with quo valid
// from then until the next start. A zero divisor gives the largest
// magnitude quotient with the numerator's sign. The algorithm and timing
// are this design's choice; the source does not describe its arithmetic units.
module fx_div #(
  parameter int unsigned NUM_W = 64,
  parameter int unsigned DEN_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [NUM_W-1:0] num,
  input  logic signed [DEN_W-1:0] den,
  output logic                    busy,
  output logic                    done,
  output logic signed [NUM_W-1:0] quo
);

  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] n_mag, q;
  logic [DEN_W:0]   d_mag;
  logic [DEN_W-1:0] rem;
  logic             neg;
  logic [CNT_W-1:0] cnt;

  logic [DEN_W:0]   rem_sh;
  logic [DEN_W+1:0] diff;

  always_comb begin
    rem_sh = {rem, n_mag[NUM_W-1]};
    diff   = {1'b0, rem_sh} - {1'b0, d_mag};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      quo   <= '0;
      n_mag <= '0;
      d_mag <= '0;
      rem   <= '0;
      q     <= '0;
      neg   <= 1'b0;
      cnt   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        n_mag <= num[NUM_W-1] ? NUM_W'(-num) : NUM_W'(num);
        d_mag <= {1'b0, den[DEN_W-1] ? DEN_W'(-den) : DEN_W'(den)};
        neg   <= num[NUM_W-1] ^ den[DEN_W-1];
        rem   <= '0;
        q     <= '0;
        cnt   <= CNT_W'(NUM_W);
      end else if (busy) begin
        if (cnt != 0) begin
          n_mag <= {n_mag[NUM_W-2:0], 1'b0};
          if (!diff[DEN_W+1]) begin
            rem <= diff[DEN_W-1:0];  // remainder < divisor
            q   <= {q[NUM_W-2:0], 1'b1};
          end else begin
            rem <= rem_sh[DEN_W-1:0];
            q   <= {q[NUM_W-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (d_mag == '0)
            quo <= neg ? {1'b1, {(NUM_W-1){1'b0}}} + 1'b1 : {1'b0, {(NUM_W-1){1'b1}}};
          else
            quo <= neg ? -$signed(q) : $signed(q);
        end
      end
    end
  end

endmodule
