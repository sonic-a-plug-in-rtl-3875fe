// tb_raster_agu: checks the four PR scan orders against sequences built here with plain
// nested loops: normal horizontal and vertical rasters, and horizontal/vertical 'stripped'
// scans with a partial last strip. Checks address, start-of-line and last flags for every
// pixel, that the generator stops after the last pixel, that stepping one pixel per clock
// works (and with random holds), and that a scan of N pixels takes exactly N steps.
`timescale 1ns/1ps
module tb_raster_agu;
  import sonic_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, step, valid, sol, last;
  scan_e mode;
  logic [10:0] width, height, strip;
  logic [19:0] base, addr;

  raster_agu dut (.clk, .rst_n, .start, .mode, .width, .height, .strip, .base, .step,
                  .valid, .addr, .sol, .last);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // expected sequence
  int unsigned exp_addr[$];
  bit          exp_sol[$];

  task automatic build(scan_e m, int w, int h, int s, int b);
    exp_addr.delete(); exp_sol.delete();
    case (m)
      SCAN_H: for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
        exp_addr.push_back(b + y*w + x); exp_sol.push_back(x == 0); end
      SCAN_V: for (int x = 0; x < w; x++) for (int y = 0; y < h; y++) begin
        exp_addr.push_back(b + y*w + x); exp_sol.push_back(y == 0); end
      SCAN_HS: for (int sb = 0; sb < h; sb += s) for (int x = 0; x < w; x++)
        for (int y = sb; y < sb + s && y < h; y++) begin
          exp_addr.push_back(b + y*w + x); exp_sol.push_back(y == sb); end
      SCAN_VS: for (int sb = 0; sb < w; sb += s) for (int y = 0; y < h; y++)
        for (int x = sb; x < sb + s && x < w; x++) begin
          exp_addr.push_back(b + y*w + x); exp_sol.push_back(x == sb); end
    endcase
  endtask

  task automatic run(scan_e m, int w, int h, int s, int b, bit holds);
    int n, steps;
    build(m, w, h, s, b);
    @(negedge clk);
    mode = m; width = 11'(w); height = 11'(h); strip = 11'(s); base = 20'(b);
    start = 1; step = 0;
    @(negedge clk);
    start = 0;
    n = 0; steps = 0;
    while (valid && n < exp_addr.size() + 2) begin
      step = holds ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (step) begin
        check(n < exp_addr.size(), $sformatf("mode %0d: too many pixels", m));
        if (n < exp_addr.size()) begin
          check(addr == 20'(exp_addr[n]),
                $sformatf("mode %0d %0dx%0d s%0d pixel %0d addr %0d exp %0d", m, w, h, s, n, addr, exp_addr[n]));
          check(sol == exp_sol[n], $sformatf("mode %0d pixel %0d sol", m, n));
          check(last == (n == exp_addr.size() - 1), $sformatf("mode %0d pixel %0d last", m, n));
        end
        n++;
        steps++;
      end
      @(negedge clk);
    end
    step = 0;
    check(n == exp_addr.size(), $sformatf("mode %0d: %0d pixels, expected %0d", m, n, exp_addr.size()));
    check(steps == w*h, "one step per pixel");
    check(!valid, "stops after last");
  endtask

  initial begin
    start = 0; step = 0; mode = SCAN_H; width = 0; height = 0; strip = 0; base = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      run(scan_e'(m), 5, 7, 3, 0, 0);
      run(scan_e'(m), 8, 4, 2, 100, 0);
      run(scan_e'(m), 6, 6, 4, 33, 1);
      run(scan_e'(m), 1, 5, 2, 7, 0);
      run(scan_e'(m), 7, 1, 3, 0, 1);
      run(scan_e'(m), 9, 10, 9, 5000, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
