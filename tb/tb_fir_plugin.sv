// tb_fir_plugin: checks the example plug-in, the 1-D FIR filter in the PE.
// Coefficients and the shift are written over the PIPE bus (one burst) and read back.
// Images are sent as PIPEFlow beats at the full rate; the result stream is decoded here
// and compared with a reference computed here: each line filtered on its own, out-of-line
// taps replaced by the nearest pixel of the line, sum shifted and saturated. Also checks
// the start-of-line and end-of-image marks, that result pixels follow each other every two
// clocks (the PIPEFlow rate), lines of different lengths (including lines shorter than the
// filter), and a second image after the first.
`timescale 1ns/1ps
module tb_fir_plugin;
  import sonic_pkg::*;

  localparam int TAPS = 9, HALF = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pf_beat_t pf_in, pf_out;
  logic pe_sel, pb_rdy;
  pb_m_t pb;
  logic [31:0] pb_rdata;

  fir_plugin #(.TAPS(TAPS)) dut (.clk, .rst_n, .pf_in, .pf_out, .pe_sel, .pb, .pb_rdy, .pb_rdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------ result monitor
  pix_t got[$];
  int   got_at[$];
  logic [15:0] hi; logic hsol; bit have = 0; int hi_at;
  always @(posedge clk) if (rst_n && pf_out.ctrl[0]) begin
    if (!pf_out.ctrl[1]) begin hi = pf_out.data; hsol = pf_out.ctrl[2]; have = 1; hi_at = cyc; end
    else if (have) begin
      got.push_back('{sol: hsol, eof: pf_out.ctrl[2], pix: {hi, pf_out.data}});
      got_at.push_back(hi_at);
      have = 0;
    end
  end

  // ------------------------------------------------ bus
  task automatic bus_write_burst(logic [4:0] a, logic [31:0] d[$]);
    @(negedge clk);
    pe_sel = 1; pb = '0; pb.as = 1; pb.wr = 1; pb.ad = 32'(a);
    foreach (d[i]) begin
      @(negedge clk);
      pb = '0; pb.ds = 1; pb.wr = 1; pb.ad = d[i];
      #1 check(pb_rdy, "write accepted");
    end
    @(negedge clk);
    pb = '0; pe_sel = 0;
  endtask

  task automatic bus_read(logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    pe_sel = 1; pb = '0; pb.as = 1; pb.ad = 32'(a);
    @(negedge clk);
    pb = '0; pb.ds = 1;
    @(negedge clk);
    pb = '0;
    d = pb_rdata;
    pe_sel = 0;
  endtask

  // ------------------------------------------------ stimulus and reference
  int unsigned coef[TAPS];
  int unsigned shift;

  function automatic logic [7:0] ref_comp(logic [31:0] line[$], int j, int c);
    int unsigned acc = 0;
    for (int k = 0; k < TAPS; k++) begin
      int idx = j + k - HALF;
      if (idx < 0) idx = 0;
      if (idx > line.size() - 1) idx = line.size() - 1;
      acc += coef[k] * line[idx][31-8*c -: 8];
    end
    acc = acc >> shift;
    return (acc > 255) ? 8'd255 : 8'(acc);
  endfunction

  pix_t expq[$];

  task automatic send_image(int lens[$]);
    int first_out;
    got.delete(); got_at.delete(); expq.delete();
    foreach (lens[l]) begin
      logic [31:0] line[$];
      for (int j = 0; j < lens[l]; j++) line.push_back($urandom);
      for (int j = 0; j < lens[l]; j++) begin
        pix_t e;
        e.sol = (j == 0); e.eof = (l == lens.size() - 1) && (j == lens[l] - 1);
        e.pix = {ref_comp(line, j, 0), ref_comp(line, j, 1), ref_comp(line, j, 2), line[j][7:0]};
        expq.push_back(e);
        @(negedge clk);
        pf_in = '{ctrl: {e.sol, 1'b0, 1'b1}, data: line[j][31:16]};
        @(negedge clk);
        pf_in = '{ctrl: {e.eof, 1'b1, 1'b1}, data: line[j][15:0]};
      end
    end
    @(negedge clk);
    pf_in = PF_IDLE;
    repeat (4 * TAPS) @(negedge clk);
    check(got.size() == expq.size(), $sformatf("%0d results, expected %0d", got.size(), expq.size()));
    for (int i = 0; i < expq.size() && i < got.size(); i++)
      check(got[i] == expq[i], $sformatf("result %0d: %h exp %h", i, got[i], expq[i]));
    for (int i = 1; i < got_at.size(); i++)
      check(got_at[i] - got_at[i-1] == 2, $sformatf("result %0d spacing %0d", i, got_at[i] - got_at[i-1]));
  endtask

  initial begin
    logic [31:0] d[$];
    logic [31:0] rd;
    pf_in = PF_IDLE; pe_sel = 0; pb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // identity after reset: centre tap 1, shift 0
    for (int k = 0; k < TAPS; k++) coef[k] = (k == HALF);
    shift = 0;
    send_image('{12, 12, 12});
    // smoothing filter
    d.delete();
    for (int k = 0; k < TAPS; k++) begin coef[k] = $urandom_range(0, 40); d.push_back(coef[k]); end
    shift = 6; d.push_back(shift);
    bus_write_burst(0, d);
    for (int k = 0; k <= TAPS; k++) begin
      bus_read(5'(k), rd);
      check(rd == d[k], $sformatf("read back register %0d: %0d exp %0d", k, rd, d[k]));
    end
    send_image('{20, 20, 20, 20, 20});
    send_image('{3, 3, 3, 3, 2, 7, 1, 15});
    // saturation
    d.delete();
    for (int k = 0; k < TAPS; k++) begin coef[k] = 200; d.push_back(200); end
    shift = 2; d.push_back(2);
    bus_write_burst(0, d);
    send_image('{10, 10});
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
