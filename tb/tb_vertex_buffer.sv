// tb_vertex_buffer: writes random vertex lists into the back bank, swaps,
// and checks that the front bank shows exactly the list written before the
// swap, that writes never disturb the visible list, that reset clears both
// banks and that out-of-range addresses are ignored.
module tb_vertex_buffer;
  import gpu_pkg::*;

  logic       clk = 0, rst_n = 0, we = 0, swap = 0;
  logic [3:0] waddr = 0;
  svert_t     wdata = '0;
  svert_t     verts [NUM_VERTS];
  int         checks = 0, failures = 0;

  vertex_buffer dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  svert_t shown [NUM_VERTS], back [NUM_VERTS];

  task automatic compare(string what);
    for (int i = 0; i < NUM_VERTS; i++) begin
      checks++;
      if (verts[i] != shown[i]) begin
        failures++;
        $display("%s: vertex %0d is %h, expected %h", what, i, verts[i], shown[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < NUM_VERTS; i++) begin shown[i] = '0; back[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("after reset");
    for (int f = 0; f < 50; f++) begin
      for (int k = 0; k < 40; k++) begin
        we    = 1'($urandom_range(0, 1));
        waddr = 4'($urandom_range(0, 15));
        wdata = svert_t'($urandom);
        @(negedge clk);
        if (we && int'(waddr) < NUM_VERTS) back[waddr] = wdata;
        compare("while writing");
      end
      we = 0;
      swap = 1;
      @(negedge clk);
      swap = 0;
      for (int i = 0; i < NUM_VERTS; i++) begin
        svert_t t;
        t = shown[i]; shown[i] = back[i]; back[i] = t;
      end
      compare("after swap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
