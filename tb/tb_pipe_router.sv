// tb_pipe_router: checks the PIPE Router with a PIPE Memory and a stand-in PE.
// The stand-in PE records every pixel the PR sends it and answers each with a result pixel
// holding its arrival number (with the same line/image marks), so the result image written
// back shows the order in which the PR read the source. Checks:
//  * PIPE bus bursts into and out of the PM, and register write/read-back;
//  * a PM-to-PM run in each of the four scan modes: the PE sees the source pixels in the
//    order built here with nested loops, the result lands at DSTBASE in the same order,
//    done/irq rise, and a run of N pixels takes between 2N and 2N+40 clocks (one pixel per
//    two clocks, the PIPEFlow rate);
//  * RGB->HSV formatting towards the PE, with hand-worked values for primaries and greys;
//  * Left-to-Right and Start-to-End routes, and that only the chosen output bus is driven;
//  * PIPE bus access to the PM while a run is using it (RDY waits, data still right);
//  * the PE's direct PM port when the PE is given the PM, with the bus waiting behind it;
//  * clearing done.
`timescale 1ns/1ps
module tb_pipe_router;
  import sonic_pkg::*;

  localparam int AW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pr_sel, pm_sel, pb_rdy, irq;
  pb_m_t pb;
  logic [31:0] pb_rdata;
  pf_beat_t pf_left_in, pf_right_out, pf_start_in, pf_end_out, pf_pe_in, pf_pe_out;
  logic pe_pm_req, pe_pm_we, pe_pm_gnt;
  logic [AW-1:0] pe_pm_addr;
  logic [31:0] pe_pm_wdata;
  logic pm_en, pm_we;
  logic [AW-1:0] pm_addr;
  logic [31:0] pm_wdata, pm_rdata;

  pipe_router #(.AW(AW)) dut (
    .clk, .rst_n, .pr_sel, .pm_sel, .pb, .pb_rdy, .pb_rdata, .irq,
    .pf_left_in, .pf_right_out, .pf_start_in, .pf_end_out, .pf_pe_in, .pf_pe_out,
    .pe_pm_req, .pe_pm_we, .pe_pm_addr, .pe_pm_wdata, .pe_pm_gnt,
    .pm_en, .pm_we, .pm_addr, .pm_wdata, .pm_rdata);

  pipe_memory #(.AW(AW)) u_pm (.clk, .en(pm_en), .we(pm_we), .addr(pm_addr), .wdata(pm_wdata),
                               .rdata(pm_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------ stand-in PE
  pix_t     pe_seen[$];
  pf_beat_t pe_outq[$];
  int       pe_out_at[$];
  int       pe_count = 0;
  logic [15:0] pe_hi; logic pe_sol; bit pe_have = 0;

  always @(posedge clk) begin
    if (rst_n && pf_pe_in.ctrl[0]) begin
      if (!pf_pe_in.ctrl[1]) begin pe_hi = pf_pe_in.data; pe_sol = pf_pe_in.ctrl[2]; pe_have = 1; end
      else if (pe_have) begin
        pe_seen.push_back('{sol: pe_sol, eof: pf_pe_in.ctrl[2], pix: {pe_hi, pf_pe_in.data}});
        pe_outq.push_back('{ctrl: {pe_sol, 1'b0, 1'b1}, data: 16'(pe_count >> 16)});
        pe_out_at.push_back(cyc + 4);
        pe_outq.push_back('{ctrl: {pf_pe_in.ctrl[2], 1'b1, 1'b1}, data: 16'(pe_count)});
        pe_out_at.push_back(cyc + 5);
        pe_count++;
        pe_have = 0;
      end
    end
    if (pe_out_at.size() > 0 && pe_out_at[0] == cyc) begin
      pf_pe_out <= pe_outq.pop_front();
      void'(pe_out_at.pop_front());
    end else pf_pe_out <= PF_IDLE;
  end

  // ------------------------------------------------ PIPE bus master
  int bus_waits = 0;

  // burst: space 0 = PR registers, 1 = PM
  task automatic burst(int space, int addr, bit wr, ref logic [31:0] data[$], input int n);
    int issued = 0, acc = 0;
    bit rd_pending = 0;
    @(negedge clk);
    pr_sel = (space == 0); pm_sel = (space == 1);
    pb = '0; pb.as = 1; pb.wr = wr; pb.ad = addr;
    if (!wr) data.delete();
    @(negedge clk);
    while (acc < n || rd_pending) begin
      if (rd_pending) begin data.push_back(pb_rdata); rd_pending = 0; end
      if (acc < n) begin
        pb = '0; pb.ds = 1; pb.wr = wr; pb.ad = wr ? data[acc] : 0;
        #1;
        if (pb_rdy) begin acc++; rd_pending = !wr; end
        else bus_waits++;
      end else pb = '0;
      @(negedge clk);
    end
    pb = '0; pr_sel = 0; pm_sel = 0;
  endtask

  task automatic reg_write(logic [3:0] r, logic [31:0] v);
    logic [31:0] d[$];
    d.push_back(v);
    burst(0, r, 1, d, 1);
  endtask

  task automatic reg_read(logic [3:0] r, output logic [31:0] v);
    logic [31:0] d[$];
    burst(0, r, 0, d, 1);
    v = d[0];
  endtask

  // ------------------------------------------------ reference scan order
  function automatic void scan_order(scan_e m, int w, int h, int s, ref int pos[$], ref bit sol[$]);
    pos.delete(); sol.delete();
    case (m)
      SCAN_H:  for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin pos.push_back(y*w+x); sol.push_back(x == 0); end
      SCAN_V:  for (int x = 0; x < w; x++) for (int y = 0; y < h; y++) begin pos.push_back(y*w+x); sol.push_back(y == 0); end
      SCAN_HS: for (int sb = 0; sb < h; sb += s) for (int x = 0; x < w; x++)
                 for (int y = sb; y < sb+s && y < h; y++) begin pos.push_back(y*w+x); sol.push_back(y == sb); end
      SCAN_VS: for (int sb = 0; sb < w; sb += s) for (int y = 0; y < h; y++)
                 for (int x = sb; x < sb+s && x < w; x++) begin pos.push_back(y*w+x); sol.push_back(x == sb); end
    endcase
  endfunction

  task automatic wait_done(int limit, output int took);
    int t0 = cyc;
    while (!irq && cyc - t0 < limit) @(negedge clk);
    took = cyc - t0;
    check(irq, "run finished (irq)");
  endtask

  localparam int W = 9, H = 7, N = W * H, SRC = 'h100, DST = 'h4000;
  logic [31:0] img[$];

  initial begin
    logic [31:0] d[$], v;
    int pos[$]; bit sol[$]; int took;
    pr_sel = 0; pm_sel = 0; pb = '0;
    pf_left_in = PF_IDLE; pf_start_in = PF_IDLE;
    pe_pm_req = 0; pe_pm_we = 0; pe_pm_addr = 0; pe_pm_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- bus bursts into and out of the PM
    for (int i = 0; i < N; i++) img.push_back($urandom);
    d = img;
    burst(1, SRC, 1, d, N);
    burst(1, SRC, 0, d, N);
    check(d.size() == N, "burst read length");
    for (int i = 0; i < N && i < d.size(); i++) check(d[i] == img[i], $sformatf("PM word %0d", i));

    // ---- registers
    reg_write(PR_REG_WIDTH, W);     reg_write(PR_REG_HEIGHT, H);
    reg_write(PR_REG_SRCBASE, SRC); reg_write(PR_REG_DSTBASE, DST);
    reg_write(PR_REG_STRIP, 3);
    reg_write(PR_REG_ROUTE, {DST_PM, SRC_PM});
    reg_read(PR_REG_WIDTH, v);   check(v == W, "width reads back");
    reg_read(PR_REG_HEIGHT, v);  check(v == H, "height reads back");
    reg_read(PR_REG_ROUTE, v);   check(v == {DST_PM, SRC_PM}, "route reads back");
    reg_read(PR_REG_SRCBASE, v); check(v == SRC, "srcbase reads back");
    reg_read(PR_REG_STRIP, v);   check(v == 3, "strip reads back");

    // ---- PM to PM in every scan mode
    for (int m = 0; m < 4; m++) begin
      scan_order(scan_e'(m), W, H, 3, pos, sol);
      reg_write(PR_REG_MODE, m);
      pe_seen.delete(); pe_count = 0;
      reg_write(PR_REG_FLOW, 1);
      wait_done(10 * N, took);
      check(took >= 2 * N && took <= 2 * N + 40, $sformatf("mode %0d run took %0d clocks for %0d pixels", m, took, N));
      check(pe_seen.size() == N, $sformatf("mode %0d: PE saw %0d pixels", m, pe_seen.size()));
      for (int i = 0; i < N && i < pe_seen.size(); i++) begin
        check(pe_seen[i].pix == img[pos[i]], $sformatf("mode %0d: PE pixel %0d", m, i));
        check(pe_seen[i].sol == sol[i], $sformatf("mode %0d: sol %0d", m, i));
        check(pe_seen[i].eof == (i == N - 1), $sformatf("mode %0d: eof %0d", m, i));
      end
      burst(1, DST, 0, d, N);
      for (int i = 0; i < N; i++) check(d[pos[i]] == i, $sformatf("mode %0d: result at %0d = %0d exp %0d", m, pos[i], d[pos[i]], i));
      reg_read(PR_REG_FLOW, v); check(v[1:0] == 2'b01, "done, not busy");
      reg_read(PR_REG_COUNT, v); check(v == N, "count");
      reg_write(PR_REG_FLOW, 2);
      check(!irq, "done cleared");
    end

    // ---- PIPE bus reads of the PM during a run
    reg_write(PR_REG_MODE, SCAN_H);
    bus_waits = 0;
    reg_write(PR_REG_FLOW, 1);
    burst(1, SRC, 0, d, N);
    for (int i = 0; i < N; i++) check(d[i] == img[i], "PM read during a run");
    check(bus_waits > 0, $sformatf("bus waited for the PM during a run (%0d)", bus_waits));
    wait_done(10 * N, took);
    reg_write(PR_REG_FLOW, 2);

    // ---- RGB -> HSV towards the PE
    begin
      logic [31:0] cols[8] = '{32'hFF000011, 32'h00FF0022, 32'h0000FF33, 32'h64646444,
                               32'h00000055, 32'hFFFF0066, 32'h00FFFF77, 32'hFF00FF88};
      logic [31:0] hsv[8]  = '{32'h00FFFF11, 32'h55FFFF22, 32'hABFFFF33, 32'h00006444,
                               32'h00000055, 32'h2BFFFF66, 32'h80FFFF77, 32'hD5FFFF88};
      d.delete(); for (int i = 0; i < 8; i++) d.push_back(cols[i]);
      burst(1, 0, 1, d, 8);
      reg_write(PR_REG_WIDTH, 8); reg_write(PR_REG_HEIGHT, 1);
      reg_write(PR_REG_SRCBASE, 0); reg_write(PR_REG_DSTBASE, 'h200);
      reg_write(PR_REG_MODE, 32'h10);
      pe_seen.delete(); pe_count = 0;
      reg_write(PR_REG_FLOW, 1);
      wait_done(200, took);
      for (int i = 0; i < 8 && i < pe_seen.size(); i++)
        check(pe_seen[i].pix == hsv[i], $sformatf("HSV of %h: %h exp %h", cols[i], pe_seen[i].pix, hsv[i]));
      reg_write(PR_REG_FLOW, 2);
      reg_write(PR_REG_MODE, 0);
    end

    // ---- Left -> PE -> Right, and Start -> PE -> End
    for (int r = 0; r < 2; r++) begin
      pix_t sent[$], outp[$];
      int n, right_beats, end_beats;
      n = 12; right_beats = 0; end_beats = 0;
      sent.delete(); outp.delete();
      reg_write(PR_REG_WIDTH, 4); reg_write(PR_REG_HEIGHT, 3);
      reg_write(PR_REG_ROUTE, r == 0 ? {DST_RIGHT, SRC_LEFT} : {DST_END, SRC_START});
      pe_seen.delete(); pe_count = 0;
      reg_write(PR_REG_FLOW, 1);
      fork
        for (int i = 0; i < n; i++) begin
          pix_t p; pf_beat_t b0, b1;
          p.pix = $urandom; p.sol = (i % 4 == 0); p.eof = (i == n - 1);
          sent.push_back(p);
          b0 = '{ctrl: {p.sol, 1'b0, 1'b1}, data: p.pix[31:16]};
          b1 = '{ctrl: {p.eof, 1'b1, 1'b1}, data: p.pix[15:0]};
          @(negedge clk); if (r == 0) pf_left_in = b0; else pf_start_in = b0;
          @(negedge clk); if (r == 0) pf_left_in = b1; else pf_start_in = b1;
          @(negedge clk); pf_left_in = PF_IDLE; pf_start_in = PF_IDLE;
        end
        begin
          logic [15:0] hi; bit have = 0;
          repeat (n * 3 + 30) begin
            pf_beat_t b;
            @(posedge clk);
            if (pf_right_out.ctrl[0]) right_beats++;
            if (pf_end_out.ctrl[0]) end_beats++;
            b = (r == 0) ? pf_right_out : pf_end_out;
            if (b.ctrl[0] && !b.ctrl[1]) begin hi = b.data; have = 1; end
            else if (b.ctrl[0] && have) begin outp.push_back('{sol: 0, eof: b.ctrl[2], pix: {hi, b.data}}); have = 0; end
          end
        end
      join
      check(irq, $sformatf("route %0d done", r));
      check(pe_seen.size() == n, "PE saw the stream");
      for (int i = 0; i < n && i < pe_seen.size(); i++) check(pe_seen[i] == sent[i], $sformatf("route %0d pixel %0d", r, i));
      check(outp.size() == n, $sformatf("route %0d: %0d results out", r, outp.size()));
      for (int i = 0; i < n && i < outp.size(); i++) check(outp[i].pix == i, "result order");
      check(r == 0 ? (end_beats == 0 && right_beats == 2 * n) : (right_beats == 0 && end_beats == 2 * n),
            $sformatf("route %0d drives only its bus (%0d right, %0d end)", r, right_beats, end_beats));
      reg_write(PR_REG_FLOW, 2);
    end

    // ---- PE direct access to the PM
    reg_write(PR_REG_PMOWN, 1);
    fork
      begin
        for (int i = 0; i < 16; i++) begin
          @(negedge clk);
          pe_pm_req = 1; pe_pm_we = 1; pe_pm_addr = AW'('h300 + i); pe_pm_wdata = 32'hA000 + i;
          #1;
          while (!pe_pm_gnt) begin @(negedge clk); #1; end
        end
        @(negedge clk);
        pe_pm_req = 0; pe_pm_we = 0;
      end
      begin
        bus_waits = 0;
        repeat (2) @(negedge clk);
        burst(1, 'h400, 0, d, 4);
        check(bus_waits >= 8, $sformatf("bus waited behind the PE (%0d)", bus_waits));
      end
    join
    burst(1, 'h300, 0, d, 16);
    for (int i = 0; i < 16; i++) check(d[i] == 32'hA000 + i, $sformatf("PE wrote word %0d", i));
    reg_write(PR_REG_PMOWN, 0);
    // without ownership the PE is not granted
    @(negedge clk); pe_pm_req = 1; #1; check(!pe_pm_gnt, "PE not granted without ownership");
    @(negedge clk); pe_pm_req = 0;

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
