// tb_pipeflow_rx: checks the PIPEFlow receiver with hand-made beats: a pixel is the phase-0
// beat {R,G} followed by a phase-1 beat {B,a}, with idle clocks allowed between and after;
// the pixel appears one clock after its second beat with its start-of-line and end-of-image
// marks; a stray phase-1 beat is dropped and flagged.
`timescale 1ns/1ps
module tb_pipeflow_rx;
  import sonic_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pf_beat_t beat;
  logic out_valid, err;
  pix_t out;

  pipeflow_rx dut (.clk, .rst_n, .beat, .out_valid, .out, .err);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  pix_t exp_q[$];
  int   cyc = 0, errs = 0, outs = 0, b1_at = -10;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && beat.ctrl[1:0] == 2'b11) b1_at <= cyc;

  always @(posedge clk) if (rst_n) begin
    if (err) errs++;
    if (out_valid) begin
      outs++;
      check(exp_q.size() > 0, "unexpected pixel");
      if (exp_q.size() > 0) begin
        pix_t e;
        e = exp_q.pop_front();
        check(out == e, $sformatf("pixel %h exp %h", out, e));
        check(cyc == b1_at + 1, $sformatf("pixel at %0d, second beat at %0d", cyc, b1_at));
      end
    end
  end

  task automatic put(pf_beat_t b);
    beat = b;
    @(posedge clk); #1;
    beat = PF_IDLE;
  endtask

  initial begin
    beat = PF_IDLE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      pix_t p;
      p.pix = $urandom; p.sol = $urandom_range(0,1); p.eof = $urandom_range(0,1);
      put('{ctrl: {p.sol, 1'b0, 1'b1}, data: p.pix[31:16]});
      repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
      exp_q.push_back(p);
      put('{ctrl: {p.eof, 1'b1, 1'b1}, data: p.pix[15:0]});
      if (i % 3 == 0) repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
    end
    // stray second beat
    put('{ctrl: 3'b011, data: 16'h1234});
    repeat (4) @(posedge clk);
    check(outs == 50, $sformatf("%0d pixels", outs));
    check(errs == 1, $sformatf("%0d errors flagged", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
