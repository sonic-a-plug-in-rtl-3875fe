// sonic_top: the SONIC-1 board: a Local Bus Controller and NPIPES PIPEs joined by the
// PIPE bus and the PIPEFlow buses.
//
// SONIC accelerates video plug-ins. Each PIPE (sonic_pipe) holds one plug-in in its engine,
// a router that feeds the engine with image data in the order and format it expects, and a
// frame memory. The host reaches every PIPE through the shared PIPE bus: images are written
// to and read from the PIPE memories, plug-in parameters are written to the engines, and
// the routers are told where to take their data from and where to send results. Plug-ins
// that span several PIPEs pass pixels along the PIPEFlow chain (Right output of PIPE i to
// Left input of PIPE i+1); the shared PIPEFlow Start bus carries a stream from the LBC to
// any PIPE, and the shared PIPEFlow End bus carries results from the PIPE routed to it back
// to the LBC. Several plug-ins run at once in different PIPEs.
//
// Ports: the host word interface and interrupt of the LBC, the LBC's video stream in and
// out (standing for the board's video path), and the two open ends of the PIPEFlow chain
// (Left input of the first PIPE, Right output of the last), which on the board leave the
// PIPE array. The 8 PIPEs and the 1M x 32 memory per PIPE follow the SONIC paper (SONIC-1).
module sonic_top
  import sonic_pkg::*;
#(
  parameter int unsigned NPIPES = 8,
  parameter int unsigned AW     = PM_AW,
  parameter int unsigned TAPS   = 9
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            host_req,
  input  logic            host_wr,
  input  logic [HA_W-1:0] host_addr,
  input  logic [31:0]     host_wdata,
  output logic            host_ack,
  output logic [31:0]     host_rdata,
  output logic            host_rvalid,
  output logic            host_irq,
  input  logic            vin_valid,
  input  pix_t            vin,
  output logic            vin_ready,
  output logic            vout_valid,
  output pix_t            vout,
  input  pf_beat_t        pf_chain_in,
  output pf_beat_t        pf_chain_out
);

  pb_m_t             pb;
  logic              pb_rdy;
  logic [31:0]       pb_rdata;
  logic [NPIPES-1:0] pr_sel, pm_sel, pe_sel, irq, rdy;
  logic [31:0]       rdata [NPIPES];
  pf_beat_t          pf_start, pf_end;
  pf_beat_t          right [NPIPES];
  pf_beat_t          end_out [NPIPES];

  lbc #(.NPIPES(NPIPES)) u_lbc (
    .clk, .rst_n,
    .host_req, .host_wr, .host_addr, .host_wdata, .host_ack, .host_rdata, .host_rvalid,
    .host_irq, .vin_valid, .vin, .vin_ready, .vout_valid, .vout,
    .pb, .pb_rdy, .pb_rdata, .pr_sel, .pm_sel, .pe_sel, .irq, .pf_start, .pf_end
  );

  for (genvar i = 0; i < NPIPES; i++) begin : g_pipe
    sonic_pipe #(.AW(AW), .TAPS(TAPS)) u_pipe (
      .clk, .rst_n,
      .pr_sel(pr_sel[i]), .pm_sel(pm_sel[i]), .pe_sel(pe_sel[i]), .pb,
      .pb_rdy(rdy[i]), .pb_rdata(rdata[i]), .irq(irq[i]),
      .pf_left_in((i == 0) ? pf_chain_in : right[(i == 0) ? 0 : i-1]),
      .pf_right_out(right[i]),
      .pf_start_in(pf_start),
      .pf_end_out(end_out[i])
    );
  end

  // wired-OR of the PIPEs' bus answers and of the shared End bus
  always_comb begin
    pb_rdy   = |rdy;
    pb_rdata = '0;
    pf_end   = PF_IDLE;
    for (int i = 0; i < NPIPES; i++) begin
      pb_rdata = pb_rdata | rdata[i];
      pf_end   = pf_end | end_out[i];
    end
  end

  assign pf_chain_out = right[NPIPES-1];

  // only one PIPE may drive the End bus at a time
  logic [NPIPES-1:0] end_active;
  always_comb for (int i = 0; i < NPIPES; i++) end_active[i] = end_out[i].ctrl[0];
  a_one_end_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(end_active));

endmodule
