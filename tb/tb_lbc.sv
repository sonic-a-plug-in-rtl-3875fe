// tb_lbc: checks the Local Bus Controller against a PIPE bus slave model written here
// (one word-addressed store per PIPE and space, with random wait states on RDY).
// Host writes and reads reach the right PIPE, space and offset; a run of sequential host
// words costs one address cycle (a burst), a jump or a new target opens a new one; only
// one select line is ever high and it is the target's; read data returns one clock after
// the acknowledge; the interrupt lines read back through the LBC's own space and host_irq
// is their OR; a pixel stream sent on PIPEFlow Start and looped back on End comes out of
// the stream port unchanged.
`timescale 1ns/1ps
module tb_lbc;
  import sonic_pkg::*;

  localparam int NP = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_req, host_wr, host_ack, host_rvalid, host_irq;
  logic [HA_W-1:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic vin_valid, vin_ready, vout_valid;
  pix_t vin, vout;
  pb_m_t pb;
  logic pb_rdy;
  logic [31:0] pb_rdata;
  logic [NP-1:0] pr_sel, pm_sel, pe_sel, irq;
  pf_beat_t pf_start, pf_end;

  lbc #(.NPIPES(NP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------- PIPE bus slave model
  logic [31:0] store [int];     // key: pipe*4M + space*1M + offset
  int   as_count = 0;
  int   m_key;  bit m_wr;  bit m_open = 0;
  bit   stall;
  logic [31:0] rd_next;  bit rd_next_v = 0;

  function automatic int target(output int p, output int s);
    int n = 0;
    p = -1; s = -1;
    for (int i = 0; i < NP; i++) begin
      if (pr_sel[i]) begin n++; p = i; s = 0; end
      if (pm_sel[i]) begin n++; p = i; s = 1; end
      if (pe_sel[i]) begin n++; p = i; s = 2; end
    end
    return n;
  endfunction

  always_comb pb_rdy = pb.ds && !stall && (pr_sel != 0 || pm_sel != 0 || pe_sel != 0);
  always_comb pb_rdata = rd_next_v ? rd_next : 32'd0;

  always @(posedge clk) begin
    int p, s, n;
    stall <= ($urandom_range(0, 3) == 0);
    rd_next_v <= 0;
    n = target(p, s);
    if (rst_n) begin
      check(n <= 1, "at most one select");
      if (pb.as) begin
        check(n == 1, "address cycle has a target");
        as_count++;
        m_key = p * (1 << 22) + s * (1 << 20) + int'(pb.ad[19:0]);
        m_wr = pb.wr; m_open = 1;
      end else if (pb.ds && pb_rdy) begin
        check(m_open && pb.wr == m_wr, "beat in an open transaction");
        if (m_wr) store[m_key] = pb.ad;
        else begin rd_next <= store.exists(m_key) ? store[m_key] : 32'hDEAD0000; rd_next_v <= 1; end
        m_key++;
      end
    end
  end

  // ---------------------------------------------- host side
  task automatic host_access(bit wr, int pipe, int space, int off, inout logic [31:0] data);
    @(negedge clk);
    host_req = 1; host_wr = wr; host_addr = {3'(pipe), 2'(space), 1'b0, 20'(off)}; host_wdata = data;
    #1;
    while (!host_ack) begin @(negedge clk); #1; end
    @(negedge clk);
    host_req = 0;
    if (!wr) begin
      #1;
      check(host_rvalid, "read data one clock after ack");
      data = host_rdata;
    end
  endtask

  // back-to-back burst, host_req held high
  task automatic host_burst(bit wr, int pipe, int space, int off, ref logic [31:0] d[$], input int n);
    int i = 0, got = 0;
    bit pend = 0;
    @(negedge clk);
    if (!wr) d.delete();
    while (i < n || pend) begin
      if (pend) begin #1; check(host_rvalid, "burst read valid"); d.push_back(host_rdata); pend = 0; end
      if (i < n) begin
        host_req = 1; host_wr = wr; host_addr = {3'(pipe), 2'(space), 1'b0, 20'(off + i)};
        host_wdata = wr ? d[i] : 0;
        #1;
        if (host_ack) begin i++; pend = !wr; end
      end else host_req = 0;
      @(negedge clk);
    end
    host_req = 0;
  endtask

  initial begin
    logic [31:0] v, d[$], e[$];
    int a0;
    host_req = 0; host_wr = 0; host_addr = 0; host_wdata = 0; irq = 0;
    vin_valid = 0; vin = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // single words to every PIPE and space
    for (int p = 0; p < NP; p++) for (int s = 0; s < 3; s++) begin
      v = {8'(p), 8'(s), 16'h5A5A}; host_access(1, p, s, 100 + p, v);
    end
    for (int p = 0; p < NP; p++) for (int s = 0; s < 3; s++) begin
      v = 0; host_access(0, p, s, 100 + p, v);
      check(v == {8'(p), 8'(s), 16'h5A5A}, $sformatf("word of pipe %0d space %0d: %h", p, s, v));
      check(store[p * (1 << 22) + s * (1 << 20) + 100 + p] == {8'(p), 8'(s), 16'h5A5A}, "landed at target");
    end

    // bursts: one address cycle each
    d.delete(); for (int i = 0; i < 64; i++) d.push_back($urandom);
    e = d;
    a0 = as_count;
    host_burst(1, 3, 1, 4000, d, 64);
    check(as_count - a0 == 1, $sformatf("write burst used %0d address cycles", as_count - a0));
    a0 = as_count;
    host_burst(0, 3, 1, 4000, d, 64);
    check(as_count - a0 == 1, $sformatf("read burst used %0d address cycles", as_count - a0));
    for (int i = 0; i < 64; i++) check(d[i] == e[i], $sformatf("burst word %0d", i));
    // a jump opens a new transaction
    a0 = as_count;
    v = 1; host_access(1, 3, 1, 9000, v);
    v = 2; host_access(1, 3, 1, 9001, v);
    v = 3; host_access(1, 3, 1, 7, v);
    check(as_count - a0 == 2, "jump needs a new address cycle");

    // interrupts
    irq = 8'b1010_0100;
    @(negedge clk);
    check(host_irq, "host_irq");
    v = 0; host_access(0, 0, 3, 0, v);
    check(v == 32'hA4, $sformatf("irq lines read %h", v));
    irq = 0; @(negedge clk); check(!host_irq, "host_irq low");

    // stream loop: Start -> End
    begin
      pix_t sent[$], got[$];
      fork
        for (int i = 0; i < 30; i++) begin
          pix_t p; p.pix = $urandom; p.sol = (i % 5 == 0); p.eof = (i == 29);
          @(negedge clk); vin_valid = 1; vin = p;
          #1; while (!vin_ready) begin @(negedge clk); #1; end
          sent.push_back(p);
          @(negedge clk); vin_valid = 0;
        end
        repeat (200) begin @(posedge clk); if (vout_valid) got.push_back(vout); end
      join
      check(got.size() == 30, $sformatf("%0d stream pixels back", got.size()));
      for (int i = 0; i < 30 && i < got.size(); i++) check(got[i] == sent[i], "stream pixel");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) pf_end <= pf_start;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
