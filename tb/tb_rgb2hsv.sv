// tb_rgb2hsv: checks the RGB to HSV converter against a floating-point reference: V must be
// exact, S = floor(255*(max-min)/max) exact, H within 2 steps (of 256 per turn) of the
// real hue angle, alpha unchanged. Covers primaries, secondaries, greys, black and
// random colours.
`timescale 1ns/1ps
module tb_rgb2hsv;
  logic [31:0] rgba, hsva;
  rgb2hsv dut (.rgba, .hsva);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic try(logic [7:0] r, g, b, a);
    real mx, mn, d, hdeg, href, diff;
    int  sexp;
    rgba = {r, g, b, a};
    #1;
    mx = (r > g) ? r : g; mx = (b > mx) ? b : mx;
    mn = (r < g) ? r : g; mn = (b < mn) ? b : mn;
    d  = mx - mn;
    sexp = (mx == 0) ? 0 : int'($floor(255.0 * d / mx));
    if (d == 0) hdeg = 0;
    else if (mx == r) hdeg = 60.0 * (real'(g) - real'(b)) / d;
    else if (mx == g) hdeg = 120.0 + 60.0 * (real'(b) - real'(r)) / d;
    else hdeg = 240.0 + 60.0 * (real'(r) - real'(g)) / d;
    if (hdeg < 0) hdeg += 360.0;
    href = hdeg * 256.0 / 360.0;
    diff = real'(hsva[31:24]) - href;
    if (diff > 128) diff -= 256;
    if (diff < -128) diff += 256;
    check(hsva[15:8] == (mx > mn ? 8'(int'(mx)) : 8'(int'(mx))), $sformatf("V of %h", rgba));
    check(int'(hsva[23:16]) == sexp, $sformatf("S of %h: %0d exp %0d", rgba, hsva[23:16], sexp));
    check(diff <= 2.0 && diff >= -2.0, $sformatf("H of %h: %0d exp %f", rgba, hsva[31:24], href));
    check(hsva[7:0] == a, "alpha");
  endtask

  initial begin
    try(255, 0, 0, 1);   try(0, 255, 0, 2);   try(0, 0, 255, 3);
    try(255, 255, 0, 4); try(0, 255, 255, 5); try(255, 0, 255, 6);
    try(0, 0, 0, 7);     try(128, 128, 128, 8); try(255, 255, 255, 9);
    try(200, 10, 60, 10); try(1, 2, 3, 11);
    for (int i = 0; i < 2000; i++)
      try(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
