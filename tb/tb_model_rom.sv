// tb_model_rom: checks the twelve pyramid vertices against the expected
// coordinates and checks that every triangle is wound counter-clockwise
// seen from outside (its normal points away from the solid's centre).
module tb_model_rom;
  import gpu_pkg::*;

  logic [3:0] addr;
  vec3_t      vert;
  int         checks = 0, failures = 0;

  model_rom dut (.addr(addr), .vert(vert));

  // expected corners in whole units: A apex, B0..B3 base
  int ex [12] = '{-1, 1, 0,  1, 1, 0,  1,-1, 0, -1,-1, 0};
  int ey [12] = '{-1,-1, 1, -1,-1, 1, -1,-1, 1, -1,-1, 1};
  int ez [12] = '{ 1, 1, 0,  1,-1, 0, -1,-1, 0, -1, 1, 0};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real px [3], py [3], pz [3];
    real ax, ay, az, bx, by, bz, nx, ny, nz, cx, cy, cz;
    for (int t = 0; t < 4; t++) begin
      for (int k = 0; k < 3; k++) begin
        addr = 4'(3*t + k);
        #1;
        checks++;
        if (vert.x != to_fix(ex[3*t+k]) || vert.y != to_fix(ey[3*t+k]) ||
            vert.z != to_fix(ez[3*t+k])) begin
          failures++;
          $display("vertex %0d wrong: %h %h %h", 3*t+k, vert.x, vert.y, vert.z);
        end
        px[k] = real'(vert.x) / 65536.0;
        py[k] = real'(vert.y) / 65536.0;
        pz[k] = real'(vert.z) / 65536.0;
      end
      ax = px[1]-px[0]; ay = py[1]-py[0]; az = pz[1]-pz[0];
      bx = px[2]-px[0]; by = py[2]-py[0]; bz = pz[2]-pz[0];
      nx = ay*bz - az*by; ny = az*bx - ax*bz; nz = ax*by - ay*bx;
      // centroid of the face minus the solid's centre (0, -0.5, 0)
      cx = (px[0]+px[1]+px[2])/3.0;
      cy = (py[0]+py[1]+py[2])/3.0 + 0.5;
      cz = (pz[0]+pz[1]+pz[2])/3.0;
      checks++;
      if (nx*cx + ny*cy + nz*cz <= 0.0) begin
        failures++;
        $display("triangle %0d wound inwards", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
