// tb_pipe_memory: checks the PIPE Memory model at its full 1M x 32 size: words written at
// addresses spread over the whole range (lowest and highest included) read back on the
// next clock, a read does not disturb the data, and rdata holds while the memory is idle.
`timescale 1ns/1ps
module tb_pipe_memory;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en, we;
  logic [19:0] addr;
  logic [31:0] wdata, rdata;

  pipe_memory dut (.clk, .en, .we, .addr, .wdata, .rdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [31:0] model [logic [19:0]];
  logic [19:0] used[$];

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    used.push_back(20'h0); used.push_back(20'hFFFFF);
    for (int i = 0; i < 300; i++) used.push_back(20'($urandom));
    foreach (used[i]) begin
      @(negedge clk);
      en = 1; we = 1; addr = used[i]; wdata = $urandom;
      model[used[i]] = wdata;
    end
    @(negedge clk);
    foreach (used[i]) begin
      en = 1; we = 0; addr = used[i];
      @(posedge clk); #1;
      check(rdata == model[used[i]], $sformatf("addr %h: %h exp %h", used[i], rdata, model[used[i]]));
      @(negedge clk);
    end
    // hold while idle
    en = 1; we = 0; addr = used[0];
    @(negedge clk);
    en = 0; addr = used[1];
    repeat (3) @(negedge clk);
    check(rdata == model[used[0]], "rdata holds when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
