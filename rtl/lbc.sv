// lbc: Local Bus Controller of the SONIC board, between the host bus and the PIPEs.
//
// The SONIC paper's LBC joins the PCI interface chip to the PIPE bus and owns the per-PIPE
// control lines (selects and interrupts) and the PIPEFlow Start and End buses. This block
// models its logic; the PCI bridge itself is outside, and its local side is the host port
// here: one 32-bit word per request, held until host_ack.
//
// Host word address: [25:23] PIPE number, [22:21] space (0 = PR registers, 1 = PM,
// 2 = PE parameters, 3 = this LBC), [19:0] word offset. A request opens a PIPE bus
// transaction: the LBC raises the target's select line and drives an address cycle (AS).
// Each request then becomes one data beat (DS) that ends, with host_ack, when the PIPE
// answers RDY. A request that continues the open transaction (same target, same direction,
// next word) skips the address cycle, so host bursts become PIPE bus bursts of one word per
// clock. Read data comes back on host_rdata with host_rvalid one clock after host_ack.
// Space 3, offset 0 reads the interrupt lines of all PIPEs; host_irq is their OR.
//
// Stream ports: pixels offered on vin_valid/vin (with vin_ready) are sent on the PIPEFlow
// Start bus, and pixels arriving on the PIPEFlow End bus are presented on vout_valid/vout.
// They stand for the board's video path into and out of the PIPE array.
//
// The address map, the burst-continuation rule and the LBC register are this design's
// choices; the roles follow the SONIC paper.
module lbc
  import sonic_pkg::*;
#(
  parameter int unsigned NPIPES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // host (local side of the PCI bridge)
  input  logic              host_req,
  input  logic              host_wr,
  input  logic [HA_W-1:0]   host_addr,
  input  logic [31:0]       host_wdata,
  output logic              host_ack,
  output logic [31:0]       host_rdata,
  output logic              host_rvalid,
  output logic              host_irq,
  // video stream in/out
  input  logic              vin_valid,
  input  pix_t              vin,
  output logic              vin_ready,
  output logic              vout_valid,
  output pix_t              vout,
  // PIPE bus
  output pb_m_t             pb,
  input  logic              pb_rdy,
  input  logic [31:0]       pb_rdata,
  output logic [NPIPES-1:0] pr_sel,
  output logic [NPIPES-1:0] pm_sel,
  output logic [NPIPES-1:0] pe_sel,
  input  logic [NPIPES-1:0] irq,
  // PIPEFlow Start and End buses
  output pf_beat_t          pf_start,
  input  pf_beat_t          pf_end
);

  localparam int unsigned PW = (NPIPES > 1) ? $clog2(NPIPES) : 1;

  logic [2:0]  h_pipe;
  space_e      h_space;
  logic [19:0] h_off;

  assign h_pipe  = host_addr[25:23];
  assign h_space = space_e'(host_addr[22:21]);
  assign h_off   = host_addr[19:0];

  // open transaction
  logic        open;
  logic [2:0]  o_pipe;
  space_e      o_space;
  logic        o_wr;
  logic [19:0] o_next;

  logic local_req, continues, addr_cycle, beat, local_rd_q;
  logic [31:0] local_rdata_q;
  logic        bus_rd_q;

  assign local_req  = host_req && (h_space == SPACE_NONE);
  assign continues  = open && (o_pipe == h_pipe) && (o_space == h_space) && (o_wr == host_wr)
                      && (o_next == h_off);
  assign addr_cycle = host_req && !local_req && !continues;
  assign beat       = host_req && !local_req && continues;

  always_comb begin
    pb    = '0;
    if (addr_cycle) begin
      pb.as = 1'b1;
      pb.wr = host_wr;
      pb.ad = 32'(h_off);
    end else if (beat) begin
      pb.ds = 1'b1;
      pb.wr = o_wr;
      pb.ad = o_wr ? host_wdata : 32'd0;
    end
  end

  // select lines follow the open target; an address cycle for a new target selects it
  // in the same clock
  always_comb begin
    logic [2:0] p;
    space_e     s;
    logic       on;
    p  = addr_cycle ? h_pipe  : o_pipe;
    s  = addr_cycle ? h_space : o_space;
    on = addr_cycle || open;
    pr_sel = '0;
    pm_sel = '0;
    pe_sel = '0;
    if (on && int'(p) < NPIPES) begin
      pr_sel[PW'(p)] = (s == SPACE_PR);
      pm_sel[PW'(p)] = (s == SPACE_PM);
      pe_sel[PW'(p)] = (s == SPACE_PE);
    end
  end

  assign host_ack    = (beat && pb_rdy) || local_req;
  assign host_rvalid = bus_rd_q || local_rd_q;
  assign host_rdata  = local_rd_q ? local_rdata_q : pb_rdata;
  assign host_irq    = |irq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open          <= 1'b0;
      o_pipe        <= '0;
      o_space       <= SPACE_NONE;
      o_wr          <= 1'b0;
      o_next        <= '0;
      bus_rd_q      <= 1'b0;
      local_rd_q    <= 1'b0;
      local_rdata_q <= '0;
    end else begin
      bus_rd_q   <= beat && pb_rdy && !o_wr;
      local_rd_q <= local_req && !host_wr;
      local_rdata_q <= (local_req && !host_wr && h_off == 20'd0) ? 32'(irq) : 32'd0;
      if (addr_cycle) begin
        open    <= 1'b1;
        o_pipe  <= h_pipe;
        o_space <= h_space;
        o_wr    <= host_wr;
        o_next  <= h_off;
      end else if (beat && pb_rdy) begin
        o_next <= o_next + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ streams
  logic rx_err;
  pipeflow_tx u_tx_start (.clk, .rst_n, .in_valid(vin_valid), .in(vin), .in_ready(vin_ready),
                          .beat(pf_start));
  pipeflow_rx u_rx_end (.clk, .rst_n, .beat(pf_end), .out_valid(vout_valid), .out(vout),
                        .err(rx_err));

  a_one_select: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0({pr_sel, pm_sel, pe_sel}));
  a_end_clean:  assert property (@(posedge clk) disable iff (!rst_n) !rx_err);

endmodule
