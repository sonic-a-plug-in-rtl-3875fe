// tb_pipeflow_link: checks the PIPEFlow transmitter. Each pixel must leave as two beats on
// consecutive clocks, {R,G} with phase 0 and the start-of-line mark, then {B,a} with phase 1
// and the end-of-image mark; back-to-back pixels must go at one pixel per two clocks, and
// the bus must be idle (all zero) when there is nothing to send. The beats are decoded
// here, without the receiver.
`timescale 1ns/1ps
module tb_pipeflow_link;
  import sonic_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  pix_t in;
  pf_beat_t beat;

  pipeflow_tx dut (.clk, .rst_n, .in_valid, .in, .in_ready, .beat);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  pix_t sent[$];
  int   accepted_at[$];
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // monitor: decode beats
  pix_t got[$];
  int   first_beat_at[$];
  logic [15:0] hi; logic hsol; bit have = 0;
  int idle_beats = 0;
  always @(posedge clk) if (rst_n) begin
    if (beat.ctrl[0]) begin
      if (!beat.ctrl[1]) begin
        check(!have, "two first beats in a row");
        hi = beat.data; hsol = beat.ctrl[2]; have = 1; first_beat_at.push_back(cyc);
      end else begin
        check(have, "second beat without first");
        got.push_back('{sol: hsol, eof: beat.ctrl[2], pix: {hi, beat.data}});
        have = 0;
      end
    end else begin
      if (beat == PF_IDLE) idle_beats++;
      else check(0, "idle beat not all zero");
    end
  end

  task automatic send(pix_t p, int gap);
    in_valid = 1; in = p;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    sent.push_back(p); accepted_at.push_back(cyc);
    #1;
    in_valid = 0;
    repeat (gap) @(posedge clk);
    #1;
  endtask

  initial begin
    in_valid = 0; in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // back-to-back stream: keep in_valid high
    for (int i = 0; i < 40; i++) begin
      pix_t p;
      p.pix = $urandom; p.sol = (i % 8 == 0); p.eof = (i == 39);
      in_valid = 1; in = p;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      sent.push_back(p); accepted_at.push_back(cyc);
      #1;
    end
    in_valid = 0;
    // sparse pixels
    for (int i = 0; i < 20; i++) begin
      pix_t p;
      p.pix = $urandom; p.sol = $urandom_range(0,1); p.eof = $urandom_range(0,1);
      send(p, $urandom_range(0, 4));
    end
    repeat (6) @(posedge clk);
    check(got.size() == sent.size(), $sformatf("%0d pixels out, %0d in", got.size(), sent.size()));
    for (int i = 0; i < sent.size() && i < got.size(); i++)
      check(got[i] == sent[i], $sformatf("pixel %0d %h exp %h", i, got[i], sent[i]));
    // full rate: the 40 back-to-back pixels are accepted every 2 clocks
    for (int i = 1; i < 40; i++)
      check(accepted_at[i] - accepted_at[i-1] == 2, $sformatf("rate at pixel %0d", i));
    for (int i = 0; i < first_beat_at.size() && i < accepted_at.size(); i++)
      check(first_beat_at[i] == accepted_at[i] + 1, "first beat one clock after accept");
    check(idle_beats > 0, "bus idles");
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
