// sonic_pipe: one Plug-In Processing Element (PIPE) of SONIC.
//
// A PIPE has three parts: the PIPE Router (PR) that moves and formats image data under the
// API's control, the PIPE Engine (PE) that holds the plug-in's processing, and the PIPE
// Memory (PM), a 1M x 32 frame store. Here the PE holds the SONIC paper's example plug-in, the
// 1-D FIR filter (fir_plugin); in the original board it is a separately configured FPGA. The
// PR and the PE share the PIPE bus, each with its own select line (PR Select and PM Select
// reach the PR, PE Select the PE), and the PR owns the PM port. The PE's direct PM port is
// part of the PR; the FIR plug-in does not use it, so it is held idle here.
//
// Interface: PIPE bus (pb, pb_rdy, pb_rdata, where pb_rdata is zero unless this PIPE is
// returning read data), three select lines, an interrupt (the PR's done flag) and the four
// PIPEFlow buses: Left in, Right out, Start in and End out (End out is all-zero unless the
// PR is routed to End). Timing is that of pipe_router and fir_plugin.
module sonic_pipe
  import sonic_pkg::*;
#(
  parameter int unsigned AW   = PM_AW,
  parameter int unsigned TAPS = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pr_sel,
  input  logic        pm_sel,
  input  logic        pe_sel,
  input  pb_m_t       pb,
  output logic        pb_rdy,
  output logic [31:0] pb_rdata,
  output logic        irq,
  input  pf_beat_t    pf_left_in,
  output pf_beat_t    pf_right_out,
  input  pf_beat_t    pf_start_in,
  output pf_beat_t    pf_end_out
);

  pf_beat_t pf_pe_in, pf_pe_out;

  logic          pm_en, pm_we;
  logic [AW-1:0] pm_addr;
  logic [31:0]   pm_wdata, pm_rdata;

  logic          pr_rdy, pe_rdy, pe_pm_gnt;
  logic [31:0]   pr_rdata, pe_rdata;

  pipe_router #(.AW(AW)) u_pr (
    .clk, .rst_n,
    .pr_sel, .pm_sel, .pb, .pb_rdy(pr_rdy), .pb_rdata(pr_rdata), .irq,
    .pf_left_in, .pf_right_out, .pf_start_in, .pf_end_out,
    .pf_pe_in, .pf_pe_out,
    .pe_pm_req(1'b0), .pe_pm_we(1'b0), .pe_pm_addr('0), .pe_pm_wdata('0), .pe_pm_gnt,
    .pm_en, .pm_we, .pm_addr, .pm_wdata, .pm_rdata
  );

  fir_plugin #(.TAPS(TAPS)) u_pe (
    .clk, .rst_n, .pf_in(pf_pe_in), .pf_out(pf_pe_out),
    .pe_sel, .pb, .pb_rdy(pe_rdy), .pb_rdata(pe_rdata)
  );

  pipe_memory #(.AW(AW), .DW(32)) u_pm (
    .clk, .en(pm_en), .we(pm_we), .addr(pm_addr), .wdata(pm_wdata), .rdata(pm_rdata)
  );

  assign pb_rdy   = pr_rdy | pe_rdy;
  assign pb_rdata = pr_rdata | pe_rdata;

  a_pe_port_idle: assert property (@(posedge clk) disable iff (!rst_n) !pe_pm_gnt);

endmodule
