// tb_sonic_top_full: the SONIC paper's example workload on the board at its full size (eight
// PIPEs, 1M-word PIPE memories, 9-tap engines): one 576 x 461 RGBa frame is written into
// PIPE 0's memory over the host port, filtered by the separable 2-D FIR (horizontal raster
// pass, then vertical raster pass, in place) and read back; every pixel is compared with a
// reference computed here. Each pass must take about two clocks per pixel, the PIPEFlow
// rate; the clock counts of the transfers and passes are printed. A second frame, 512 x 512,
// follows with the engine's coefficients left as they were, as a plug-in that is called
// again finds its PIPE still set up.
`timescale 1ns/1ps
module tb_sonic_top_full;
  import sonic_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_req, host_wr, host_ack, host_rvalid, host_irq;
  logic [HA_W-1:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic vin_valid, vin_ready, vout_valid;
  pix_t vin, vout;
  pf_beat_t pf_chain_in, pf_chain_out;

  sonic_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  `include "sonic_host.svh"

  localparam int W = 576, H = 461, N = W * H;
  localparam int W2 = 512, H2 = 512;
  int unsigned cf[9] = '{1, 2, 4, 6, 8, 6, 4, 2, 1};

  initial begin
    logic [31:0] img[$], d[$], e[$];
    int t0, took, t_in, t_h, t_v, t_out;
    host_req = 0; host_wr = 0; host_addr = 0; host_wdata = 0;
    vin_valid = 0; vin = '0; pf_chain_in = PF_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int i = 0; i < N; i++) img.push_back($urandom);
    d = img;
    t0 = cyc; host_burst(1, 0, 1, 0, d, N); t_in = cyc - t0;
    set_filter(0, cf, 5);
    host_write(0, 0, PR_REG_WIDTH, W);
    host_write(0, 0, PR_REG_HEIGHT, H);
    host_write(0, 0, PR_REG_ROUTE, {DST_PM, SRC_PM});
    host_write(0, 0, PR_REG_MODE, SCAN_H);
    host_write(0, 0, PR_REG_FLOW, 1);
    wait_done(0, 3 * N, t_h);
    check(t_h >= 2 * N && t_h <= 2 * N + 100, $sformatf("horizontal pass %0d clocks", t_h));
    host_write(0, 0, PR_REG_FLOW, 2);
    host_write(0, 0, PR_REG_MODE, SCAN_V);
    host_write(0, 0, PR_REG_FLOW, 1);
    wait_done(0, 3 * N, t_v);
    check(t_v >= 2 * N && t_v <= 2 * N + 100, $sformatf("vertical pass %0d clocks", t_v));
    t0 = cyc; host_burst(0, 0, 1, 0, d, N); t_out = cyc - t0;
    check(t_in <= N + 10 && t_out <= N + 10, "host transfers at one word per clock");

    e = img; fir_rows(e, W, H, cf, 5); fir_cols(e, W, H, cf, 5);
    for (int i = 0; i < N; i++) check(d[i] == e[i], $sformatf("pixel %0d: %h exp %h", i, d[i], e[i]));
    $display("frame %0dx%0d: write %0d, horizontal %0d, vertical %0d, read %0d clocks",
             W, H, t_in, t_h, t_v, t_out);

    // second frame, 512 x 512: the engine keeps its coefficients (no reloading), only the
    // image size changes
    img.delete();
    for (int i = 0; i < W2 * H2; i++) img.push_back($urandom);
    d = img;
    host_burst(1, 0, 1, 0, d, W2 * H2);
    host_write(0, 0, PR_REG_FLOW, 2);
    host_write(0, 0, PR_REG_WIDTH, W2);
    host_write(0, 0, PR_REG_HEIGHT, H2);
    host_write(0, 0, PR_REG_MODE, SCAN_H);
    host_write(0, 0, PR_REG_FLOW, 1);
    wait_done(0, 3 * W2 * H2, t_h);
    host_write(0, 0, PR_REG_FLOW, 2);
    host_write(0, 0, PR_REG_MODE, SCAN_V);
    host_write(0, 0, PR_REG_FLOW, 1);
    wait_done(0, 3 * W2 * H2, t_v);
    check(t_h <= 2 * W2 * H2 + 100 && t_v <= 2 * W2 * H2 + 100, "512x512 passes at the PIPEFlow rate");
    host_burst(0, 0, 1, 0, d, W2 * H2);
    e = img; fir_rows(e, W2, H2, cf, 5); fir_cols(e, W2, H2, cf, 5);
    for (int i = 0; i < W2 * H2; i++) check(d[i] == e[i], $sformatf("512x512 pixel %0d: %h exp %h", i, d[i], e[i]));
    $display("frame %0dx%0d: horizontal %0d, vertical %0d clocks", W2, H2, t_h, t_v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
