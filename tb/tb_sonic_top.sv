// tb_sonic_top: end-to-end run of the SONIC board with eight PIPEs (PIPE memories cut to
// 4K words to keep the run short), driven only through the host port and the video stream
// port, the way the API and a video source would. At once:
//   PIPE 0  plug-in 1: the separable 2-D FIR of the SONIC paper's example, horizontal pass then
//           vertical pass, in place in its PM;
//   PIPE 1  plug-in 2: a 1-D filter over a horizontal-stripped scan, result to another area;
//   PIPE 2-4 plug-in 3: three filters chained PM -> Right -> Left..Right -> Left -> PM;
//   PIPE 5  a filter on a stream that enters on PIPEFlow Start and leaves on PIPEFlow End;
//   PIPE 6  RGB->HSV formatting by the router in front of an identity filter;
//   PIPE 7  a 1-D filter over a vertical-stripped scan.
// Every result is compared with a reference computed here. Counted, and failed if never
// seen: each scan mode, the chain, the Start/End stream, the format conversion, two PIPEs
// busy at once, a PIPE bus burst, a PIPE bus wait behind the PM, and the interrupt.
`timescale 1ns/1ps
module tb_sonic_top;
  import sonic_pkg::*;

  localparam int AW = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_req, host_wr, host_ack, host_rvalid, host_irq;
  logic [HA_W-1:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic vin_valid, vin_ready, vout_valid;
  pix_t vin, vout;
  pf_beat_t pf_chain_in, pf_chain_out;

  sonic_top #(.NPIPES(8), .AW(AW), .TAPS(9)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  `include "sonic_host.svh"

  // ---------------------------------------------- mechanism counters (observed on the board)
  int n_mode[4] = '{0, 0, 0, 0}, n_hsv = 0;
  int n_concurrent = 0, n_chain = 0, n_start = 0, n_end = 0, n_burst = 0, n_irq = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_pipe[0].u_pipe.u_pr.busy) n_mode[dut.g_pipe[0].u_pipe.u_pr.scan]++;
    if (dut.g_pipe[1].u_pipe.u_pr.busy) n_mode[dut.g_pipe[1].u_pipe.u_pr.scan]++;
    if (dut.g_pipe[7].u_pipe.u_pr.busy) n_mode[dut.g_pipe[7].u_pipe.u_pr.scan]++;
    if (dut.g_pipe[6].u_pipe.u_pr.busy && dut.g_pipe[6].u_pipe.u_pr.hsv_en) n_hsv++;
    if (dut.g_pipe[0].u_pipe.u_pr.busy && dut.g_pipe[1].u_pipe.u_pr.busy) n_concurrent++;
    if (dut.right[2].ctrl[0] && dut.right[3].ctrl[0]) n_chain++;
    if (dut.pf_start.ctrl[0]) n_start++;
    if (dut.pf_end.ctrl[0]) n_end++;
    if (dut.pb.ds && dut.pb_rdy && $past(dut.pb.ds && dut.pb_rdy) && !$past(dut.pb.as)) n_burst++;
    if (host_irq) n_irq++;
  end

  localparam int W = 12, H = 10, N = W * H;
  int unsigned cfA[9] = '{1, 2, 4, 6, 8, 6, 4, 2, 1};        // sums to 34
  int unsigned cfB[9] = '{0, 0, 0, 8, 16, 8, 0, 0, 0};
  int unsigned cfC[9] = '{3, 3, 3, 3, 3, 3, 3, 3, 3};
  int unsigned cfD[9] = '{0, 0, 0, 0, 1, 1, 0, 0, 0};
  int unsigned cfE[9] = '{0, 0, 0, 1, 1, 0, 0, 0, 0};
  int unsigned cfI[9] = '{0, 0, 0, 0, 1, 0, 0, 0, 0};
  int unsigned cfS[9] = '{1, 1, 1, 1, 1, 1, 1, 1, 1};

  task automatic setup(int p, int src, int dst, int mode, int strip, int srcb, int dstb);
    host_write(p, 0, PR_REG_WIDTH, W);
    host_write(p, 0, PR_REG_HEIGHT, H);
    host_write(p, 0, PR_REG_ROUTE, {dst[1:0], src[1:0]});
    host_write(p, 0, PR_REG_MODE, mode);
    host_write(p, 0, PR_REG_STRIP, strip);
    host_write(p, 0, PR_REG_SRCBASE, srcb);
    host_write(p, 0, PR_REG_DSTBASE, dstb);
  endtask

  initial begin
    logic [31:0] img[8][$], d[$], e[$], run[$], res[$], v;
    int took, w0, w1;
    host_req = 0; host_wr = 0; host_addr = 0; host_wdata = 0;
    vin_valid = 0; vin = '0; pf_chain_in = PF_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // images into PIPEs 0, 1, 2, 6, 7 (one burst each)
    foreach (img[p]) begin
      for (int i = 0; i < N; i++) img[p].push_back($urandom);
      if (p inside {0, 1, 2, 6, 7}) begin d = img[p]; host_burst(1, p, 1, 0, d, N); end
    end
    // plug-in parameters
    set_filter(0, cfA, 5); set_filter(1, cfB, 5); set_filter(2, cfC, 5);
    set_filter(3, cfD, 1); set_filter(4, cfE, 1); set_filter(5, cfS, 3);
    set_filter(7, cfA, 5);
    // routes
    setup(0, SRC_PM, DST_PM, SCAN_H, 8, 0, 0);
    setup(1, SRC_PM, DST_PM, SCAN_HS, 4, 0, 'h800);
    setup(2, SRC_PM, DST_RIGHT, SCAN_H, 8, 0, 0);
    setup(3, SRC_LEFT, DST_RIGHT, SCAN_H, 8, 0, 0);
    setup(4, SRC_LEFT, DST_PM, SCAN_H, 8, 0, 'h400);
    setup(5, SRC_START, DST_END, SCAN_H, 8, 0, 0);
    setup(6, SRC_PM, DST_PM, 32'h10 | SCAN_H, 8, 0, 'h800);
    setup(7, SRC_PM, DST_PM, SCAN_VS, 3, 0, 'h800);

    // ---- plug-ins 1 and 2 at once; read PIPE 1's source while it runs
    host_write(0, 0, PR_REG_FLOW, 1);
    host_write(1, 0, PR_REG_FLOW, 1);
    host_waits = 0;
    host_burst(0, 1, 1, 0, d, N);
    w1 = host_waits;
    for (int i = 0; i < N; i++) check(d[i] == img[1][i], "PM read during a run");
    wait_done(0, 20 * N, took);
    host_write(0, 0, PR_REG_FLOW, 2);
    host_write(0, 0, PR_REG_MODE, SCAN_V);
    host_write(0, 0, PR_REG_FLOW, 1);
    wait_done(0, 20 * N, took);
    wait_done(1, 20 * N, took);
    // interrupt lines through the LBC
    host_read(0, 3, 0, v);
    check(v[1:0] == 2'b11, $sformatf("irq vector %h", v));
    host_write(0, 0, PR_REG_FLOW, 2);
    host_write(1, 0, PR_REG_FLOW, 2);

    e = img[0]; fir_rows(e, W, H, cfA, 5); fir_cols(e, W, H, cfA, 5);
    host_burst(0, 0, 1, 0, d, N);
    for (int i = 0; i < N; i++) check(d[i] == e[i], $sformatf("plug-in 1 pixel %0d: %h exp %h", i, d[i], e[i]));

    // plug-in 2 reference: horizontal strips of 4 rows, filtered down each column of a strip
    e = img[1];
    for (int sb = 0; sb < H; sb += 4) for (int x = 0; x < W; x++) begin
      run.delete(); for (int y = sb; y < sb + 4 && y < H; y++) run.push_back(img[1][y*W+x]);
      fir_ref(run, res, cfB, 5);
      for (int y = sb; y < sb + 4 && y < H; y++) e[y*W+x] = res[y-sb];
    end
    host_burst(0, 1, 1, 'h800, d, N);
    for (int i = 0; i < N; i++) check(d[i] == e[i], $sformatf("plug-in 2 pixel %0d", i));

    // ---- plug-in 3 across PIPEs 2, 3, 4: start the consumers first
    host_write(4, 0, PR_REG_FLOW, 1);
    host_write(3, 0, PR_REG_FLOW, 1);
    host_write(2, 0, PR_REG_FLOW, 1);
    wait_done(4, 20 * N, took);
    check(took < 3 * N + 200, $sformatf("chained plug-in took %0d clocks", took));
    e = img[2]; fir_rows(e, W, H, cfC, 5); fir_rows(e, W, H, cfD, 1); fir_rows(e, W, H, cfE, 1);
    host_burst(0, 4, 1, 'h400, d, N);
    for (int i = 0; i < N; i++) check(d[i] == e[i], $sformatf("plug-in 3 pixel %0d: %h exp %h", i, d[i], e[i]));

    // ---- stream in on Start, out on End, through PIPE 5
    begin
      pix_t got[$];
      logic [31:0] src[$];
      host_write(5, 0, PR_REG_FLOW, 1);
      fork
        for (int i = 0; i < N; i++) begin
          pix_t p; p.pix = $urandom; p.sol = (i % W == 0); p.eof = (i == N - 1);
          src.push_back(p.pix);
          @(negedge clk); vin_valid = 1; vin = p;
          #1; while (!vin_ready) begin @(negedge clk); #1; end
          @(negedge clk); vin_valid = 0;
        end
        repeat (4 * N + 100) begin @(posedge clk); if (vout_valid) got.push_back(vout); end
      join
      e = src; fir_rows(e, W, H, cfS, 3);
      check(got.size() == N, $sformatf("%0d stream results", got.size()));
      for (int i = 0; i < N && i < got.size(); i++) begin
        check(got[i].pix == e[i], $sformatf("stream result %0d", i));
        check(got[i].sol == (i % W == 0) && got[i].eof == (i == N - 1), "stream marks");
      end
      wait_done(5, 100, took);
    end

    // ---- RGB->HSV by the router (PIPE 6) and vertical stripes (PIPE 7), together
    host_write(6, 0, PR_REG_FLOW, 1);
    host_write(7, 0, PR_REG_FLOW, 1);
    wait_done(6, 20 * N, took);
    wait_done(7, 20 * N, took);
    host_burst(0, 6, 1, 'h800, d, N);
    for (int i = 0; i < N; i++) begin
      logic [7:0] r, g, b; real mx, mn, dd, hd, hexp, df;
      {r, g, b} = img[6][i][31:8];
      mx = (r > g) ? r : g; mx = (b > mx) ? b : mx;
      mn = (r < g) ? r : g; mn = (b < mn) ? b : mn;
      dd = mx - mn;
      if (dd == 0) hd = 0;
      else if (mx == r) hd = 60.0 * (real'(g) - real'(b)) / dd;
      else if (mx == g) hd = 120.0 + 60.0 * (real'(b) - real'(r)) / dd;
      else hd = 240.0 + 60.0 * (real'(r) - real'(g)) / dd;
      if (hd < 0) hd += 360.0;
      hexp = hd * 256.0 / 360.0;
      df = real'(d[i][31:24]) - hexp; if (df > 128) df -= 256; if (df < -128) df += 256;
      check(df <= 2.0 && df >= -2.0 && d[i][15:8] == 8'(int'(mx)) && d[i][7:0] == img[6][i][7:0] &&
            int'(d[i][23:16]) == ((mx == 0) ? 0 : int'($floor(255.0 * dd / mx))),
            $sformatf("HSV pixel %0d: %h from %h", i, d[i], img[6][i]));
    end
    e = img[7];
    for (int sb = 0; sb < W; sb += 3) for (int y = 0; y < H; y++) begin
      run.delete(); for (int x = sb; x < sb + 3 && x < W; x++) run.push_back(img[7][y*W+x]);
      fir_ref(run, res, cfA, 5);
      for (int x = sb; x < sb + 3 && x < W; x++) e[y*W+x] = res[x-sb];
    end
    host_burst(0, 7, 1, 'h800, d, N);
    for (int i = 0; i < N; i++) check(d[i] == e[i], $sformatf("PIPE 7 pixel %0d", i));

    // ---- mechanisms
    $display("mechanisms: concurrent=%0d chain=%0d start=%0d end=%0d burst=%0d bus_wait=%0d irq=%0d",
             n_concurrent, n_chain, n_start, n_end, n_burst, w1, n_irq);
    $display("scan modes H=%0d V=%0d HS=%0d VS=%0d, HSV=%0d", n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_hsv);
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("scan mode %0d used", m));
    check(n_hsv > 0, "format conversion used");
    check(n_concurrent > 0, "two PIPEs busy at once");
    check(n_chain > 0, "PIPEFlow chain used");
    check(n_start > 0 && n_end > 0, "Start and End buses used");
    check(n_burst > 0, "PIPE bus bursts");
    check(w1 > 0, "PIPE bus waited for a busy PM");
    check(n_irq > 0, "interrupt raised");
    check(pf_chain_out == PF_IDLE, "chain end idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
