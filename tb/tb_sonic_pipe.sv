// tb_sonic_pipe: runs one PIPE through the SONIC paper's separable 2-D FIR example, driving
// the PIPE bus the way the API would: write the image into the PM, set the image size, the
// route (PM to PE and back to the PM) and the filter coefficients, run a horizontal raster
// pass, wait for done, run a vertical raster pass, wait, read the image back. The result
// must equal the 2-D filter computed here (rows first, then columns, each with edge
// replication, shift and saturation per pass). Each pass must take about two clocks per
// pixel (the PIPEFlow rate). A second image, in vertical-stripped order, checks that the
// same PE filters short runs as lines.
`timescale 1ns/1ps
module tb_sonic_pipe;
  import sonic_pkg::*;

  localparam int AW = 14, TAPS = 9, HALF = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pr_sel, pm_sel, pe_sel, pb_rdy, irq;
  pb_m_t pb;
  logic [31:0] pb_rdata;
  pf_beat_t pf_left_in, pf_right_out, pf_start_in, pf_end_out;

  sonic_pipe #(.AW(AW), .TAPS(TAPS)) dut (
    .clk, .rst_n, .pr_sel, .pm_sel, .pe_sel, .pb, .pb_rdy, .pb_rdata, .irq,
    .pf_left_in, .pf_right_out, .pf_start_in, .pf_end_out);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // space 0 = PR, 1 = PM, 2 = PE
  task automatic burst(int space, int addr, bit wr, ref logic [31:0] data[$], input int n);
    int acc = 0; bit rd_pending = 0;
    @(negedge clk);
    pr_sel = (space == 0); pm_sel = (space == 1); pe_sel = (space == 2);
    pb = '0; pb.as = 1; pb.wr = wr; pb.ad = addr;
    if (!wr) data.delete();
    @(negedge clk);
    while (acc < n || rd_pending) begin
      if (rd_pending) begin data.push_back(pb_rdata); rd_pending = 0; end
      if (acc < n) begin
        pb = '0; pb.ds = 1; pb.wr = wr; pb.ad = wr ? data[acc] : 0;
        #1;
        if (pb_rdy) begin acc++; rd_pending = !wr; end
      end else pb = '0;
      @(negedge clk);
    end
    pb = '0; pr_sel = 0; pm_sel = 0; pe_sel = 0;
  endtask

  task automatic reg_write(logic [3:0] r, logic [31:0] v);
    logic [31:0] d[$]; d.push_back(v); burst(0, r, 1, d, 1);
  endtask

  int unsigned coef[TAPS];
  int unsigned shift;

  // one 1-D pass over a run of pixels
  function automatic void filt(ref logic [31:0] run[$], ref logic [31:0] res[$]);
    res.delete();
    for (int j = 0; j < run.size(); j++) begin
      logic [31:0] o;
      o[7:0] = run[j][7:0];
      for (int c = 0; c < 3; c++) begin
        int unsigned acc = 0;
        for (int k = 0; k < TAPS; k++) begin
          int idx = j + k - HALF;
          if (idx < 0) idx = 0;
          if (idx >= run.size()) idx = run.size() - 1;
          acc += coef[k] * run[idx][31-8*c -: 8];
        end
        acc >>= shift;
        o[31-8*c -: 8] = (acc > 255) ? 8'd255 : 8'(acc);
      end
      res.push_back(o);
    end
  endfunction

  task automatic run_pass(scan_e m, int n);
    int t0, took;
    reg_write(PR_REG_MODE, m);
    t0 = cyc;
    reg_write(PR_REG_FLOW, 1);
    while (!irq && cyc - t0 < 20 * n) @(negedge clk);
    took = cyc - t0;
    check(irq, "pass done");
    check(took >= 2 * n && took <= 2 * n + 50, $sformatf("pass of %0d pixels took %0d clocks", n, took));
    reg_write(PR_REG_FLOW, 2);
  endtask

  localparam int W = 16, H = 12, N = W * H;

  initial begin
    logic [31:0] img[$], d[$], exp_img[$], run[$], res[$];
    pr_sel = 0; pm_sel = 0; pe_sel = 0; pb = '0;
    pf_left_in = PF_IDLE; pf_start_in = PF_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int i = 0; i < N; i++) img.push_back($urandom);
    d = img; burst(1, 0, 1, d, N);
    reg_write(PR_REG_WIDTH, W); reg_write(PR_REG_HEIGHT, H);
    reg_write(PR_REG_ROUTE, {DST_PM, SRC_PM});
    d.delete();
    for (int k = 0; k < TAPS; k++) begin coef[k] = 1 + (k < HALF ? k : TAPS - 1 - k) * 3; d.push_back(coef[k]); end
    shift = 5; d.push_back(shift);
    burst(2, 0, 1, d, TAPS + 1);

    run_pass(SCAN_H, N);
    run_pass(SCAN_V, N);
    burst(1, 0, 0, d, N);

    // reference: rows, then columns
    exp_img = img;
    for (int y = 0; y < H; y++) begin
      run.delete(); for (int x = 0; x < W; x++) run.push_back(exp_img[y*W+x]);
      filt(run, res); for (int x = 0; x < W; x++) exp_img[y*W+x] = res[x];
    end
    for (int x = 0; x < W; x++) begin
      run.delete(); for (int y = 0; y < H; y++) run.push_back(exp_img[y*W+x]);
      filt(run, res); for (int y = 0; y < H; y++) exp_img[y*W+x] = res[y];
    end
    for (int i = 0; i < N; i++) check(d[i] == exp_img[i], $sformatf("2-D result %0d: %h exp %h", i, d[i], exp_img[i]));

    // vertical stripped pass: runs of STRIP pixels along a row, one strip of columns at a time
    for (int i = 0; i < N; i++) img[i] = $urandom;
    d = img; burst(1, 0, 1, d, N);
    reg_write(PR_REG_STRIP, 5);
    run_pass(SCAN_VS, N);
    burst(1, 0, 0, d, N);
    exp_img = img;
    for (int sb = 0; sb < W; sb += 5)
      for (int y = 0; y < H; y++) begin
        run.delete(); for (int x = sb; x < sb + 5 && x < W; x++) run.push_back(img[y*W+x]);
        filt(run, res);
        for (int x = sb; x < sb + 5 && x < W; x++) exp_img[y*W+x] = res[x-sb];
      end
    for (int i = 0; i < N; i++) check(d[i] == exp_img[i], $sformatf("stripped result %0d: %h exp %h", i, d[i], exp_img[i]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
