// tb_sincos_rom: checks the sine/cosine table against real-valued
// $sin/$cos for all 256 angles, to within 2 LSB of Q16.16.
module tb_sincos_rom;
  import gpu_pkg::*;

  angle_t angle;
  fix_t   s, c;
  int     checks = 0, failures = 0;

  sincos_rom dut (.angle(angle), .sin_o(s), .cos_o(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, es, ec;
    for (int a = 0; a < 256; a++) begin
      angle = angle_t'(a);
      #1;
      th = 2.0 * 3.14159265358979 * a / 256.0;
      es = $sin(th) * 65536.0;
      ec = $cos(th) * 65536.0;
      checks += 2;
      if ((real'(s) - es > 2.0 || es - real'(s) > 2.0)) begin
        failures++;
        $display("sin mismatch a=%0d got %0d exp %f", a, s, es);
      end
      if ((real'(c) - ec > 2.0 || ec - real'(c) > 2.0)) begin
        failures++;
        $display("cos mismatch a=%0d got %0d exp %f", a, c, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
