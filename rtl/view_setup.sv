// view_setup: builds the camera basis (u, v, n) of the view matrix.
//
// From the eye point and the look-to point, once per frame:
//   n = normalise(eye - look)       view direction (towards the viewer)
//   u = normalise(UP x n)           right vector
//   v = n x u                       up vector (already unit length)
// where UP is the world's up direction. Each normalisation takes the
// integer square root of the Q32.32 sum of squares (fx_isqrt, giving the
// Q16.16 length) and then divides the three components by it, one after the
// other, on a single shared fx_div. A pulse on start latches eye and look;
// the outputs change only when done pulses, 475 clocks later, and
// keep their values until the next run. eye_o is the eye point that
// belongs to the basis. If a vector has zero length (eye on the look-to
// point, or looking straight along UP) the previous basis is kept.
// The basis and its symbols follow the source; the up direction, the
// sequential datapath and its timing are this design's choices.
module view_setup
  import gpu_pkg::*;
#(
  parameter vec3_t UP = '{x: 32'sh0, y: 32'sh0001_0000, z: 32'sh0}
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  vec3_t eye,
  input  vec3_t look,
  output logic  busy,
  output logic  done,
  output vec3_t u,
  output vec3_t v,
  output vec3_t n,
  output vec3_t eye_o
);

  typedef enum logic [2:0] {IDLE, SQ_START, SQ_WAIT, DV_START, DV_WAIT, FINISH} state_t;

  state_t      state;
  logic        phase;      // 0: normalising n, 1: normalising u
  logic [1:0]  comp;
  vec3_t       work, res, n_tmp;
  fix_t        len;

  function automatic vec3_t vcross(vec3_t a, vec3_t b);
    vec3_t c;
    c.x = fmul(a.y, b.z) - fmul(a.z, b.y);
    c.y = fmul(a.z, b.x) - fmul(a.x, b.z);
    c.z = fmul(a.x, b.y) - fmul(a.y, b.x);
    return c;
  endfunction

  function automatic logic [63:0] sq(fix_t a);
    logic signed [63:0] p;
    p = 64'(a) * 64'(a);
    return 64'(p);
  endfunction

  // shared arithmetic units
  logic               sq_start, sq_done;
  logic [31:0]        sq_root;
  logic               dv_start, dv_done;
  logic signed [63:0] dv_num, dv_quo;
  fix_t               comp_val;

  fx_isqrt #(.RAD_W(64)) u_sqrt (
    .clk, .rst_n, .start(sq_start),
    .rad(sq(work.x) + sq(work.y) + sq(work.z)),
    .busy(), .done(sq_done), .root(sq_root)
  );

  always_comb begin
    unique case (comp)
      2'd0:    comp_val = work.x;
      2'd1:    comp_val = work.y;
      default: comp_val = work.z;
    endcase
    dv_num = 64'(comp_val) <<< FRAC;
  end

  fx_div #(.NUM_W(64), .DEN_W(32)) u_div (
    .clk, .rst_n, .start(dv_start), .num(dv_num), .den(len),
    .busy(), .done(dv_done), .quo(dv_quo)
  );

  assign sq_start = (state == SQ_START);
  assign dv_start = (state == DV_START);
  assign busy     = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      phase <= 1'b0;
      comp  <= '0;
      work  <= '0;
      res   <= '0;
      n_tmp <= '0;
      len   <= '0;
      done  <= 1'b0;
      u     <= '{x: FIX_ONE, y: '0, z: '0};
      v     <= '{x: '0, y: FIX_ONE, z: '0};
      n     <= '{x: '0, y: '0, z: FIX_ONE};
      eye_o <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          work.x <= eye.x - look.x;
          work.y <= eye.y - look.y;
          work.z <= eye.z - look.z;
          eye_o  <= eye;
          phase  <= 1'b0;
          state  <= SQ_START;
        end
        SQ_START: state <= SQ_WAIT;
        SQ_WAIT: if (sq_done) begin
          len  <= fix_t'(sq_root);
          comp <= '0;
          // zero length: keep the previous basis
          state <= (sq_root == '0) ? IDLE : DV_START;
          if (sq_root == '0) begin
            done  <= 1'b1;
          end
        end
        DV_START: state <= DV_WAIT;
        DV_WAIT: if (dv_done) begin
          unique case (comp)
            2'd0:    res.x <= fix_t'(dv_quo);
            2'd1:    res.y <= fix_t'(dv_quo);
            default: res.z <= fix_t'(dv_quo);
          endcase
          if (comp == 2'd2) state <= FINISH;
          else begin
            comp  <= comp + 1'b1;
            state <= DV_START;
          end
        end
        FINISH: begin
          if (!phase) begin
            n_tmp <= res;
            work  <= vcross(UP, res);
            phase <= 1'b1;
            state <= SQ_START;
          end else begin
            n     <= n_tmp;
            u     <= res;
            v     <= vcross(n_tmp, res);
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
