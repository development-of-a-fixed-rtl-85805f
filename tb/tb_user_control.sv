// tb_user_control: drives random select/inc/dec pulses and compares every
// setting with a reference model after each clock, including the reset
// defaults, the saturation limits and the no-change case of inc with dec.
module tb_user_control;
  import gpu_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] sel;
  logic inc, dec;
  vec3_t trans, eye, look;
  logic signed [ANG_W-1:0] speed;
  int checks = 0, failures = 0;
  int sat_hits = 0;

  user_control dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: 10 settings, in units of 1/65536
  longint m [10];
  int     ms;
  localparam longint STEP = 16384, LIM = 16 * 65536;

  task automatic compare();
    longint got [10];
    got = '{longint'(trans.x), longint'(trans.y), longint'(trans.z), 0, longint'(eye.x), longint'(eye.y),
           longint'(eye.z), longint'(look.x), longint'(look.y), longint'(look.z)};
    for (int i = 0; i < 10; i++) begin
      if (i == 3) continue;
      checks++;
      if (got[i] != m[i]) begin
        failures++;
        $display("setting %0d: got %0d exp %0d", i, got[i], m[i]);
      end
    end
    checks++;
    if (int'(speed) != ms) begin
      failures++;
      $display("speed: got %0d exp %0d", speed, ms);
    end
  endtask

  initial begin
    m  = '{0, 0, 0, 0, 0, 98304, 327680, 0, 0, 0};
    ms = 1;
    sel = 0; inc = 0; dec = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 20000; n++) begin
      // long runs in one direction reach the limits
      sel = 4'($urandom_range(0, 11));
      inc = ($urandom_range(0, 99) < ((n / 500) % 2 == 1 ? 70 : 30));
      dec = ($urandom_range(0, 99) < ((n / 500) % 2 == 1 ? 30 : 70));
      @(negedge clk);
      if (inc ^ dec) begin
        if (sel == 3) begin
          if (inc && ms < 16) ms++;
          else if (dec && ms > -16) ms--;
          else sat_hits++;
        end else if (sel < 10) begin
          m[sel] += inc ? STEP : -STEP;
          if (m[sel] > LIM)  begin m[sel] = LIM;  sat_hits++; end
          if (m[sel] < -LIM) begin m[sel] = -LIM; sat_hits++; end
        end
      end
      compare();
    end
    checks++;
    if (sat_hits == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
