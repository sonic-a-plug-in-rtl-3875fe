// pipe_router: the PIPE Router (PR), which moves and formats image data for one PIPE.
//
// The SONIC paper gives the PR three tasks: access to the PIPE Memory (PM) from the PIPE bus,
// generating the PIPEFlow In stream for the PIPE Engine (PE), and handling the PE's
// PIPEFlow Out stream. It chooses where the data comes from and goes to (the PM, the
// neighbouring PIPE through PIPEFlow Left/Right, or the shared PIPEFlow Start/End buses),
// reads the image in one of four raster orders (raster_agu), and can convert the format the
// PE sees (here RGB to HSV, rgb2hsv). The PR is driven by the API through registers on the
// PIPE bus; the PE never needs to know where its data came from.
//
// How it works. A write of PROCESS to the FLOW register starts a run of width*height
// pixels:
//   * source PM: an address generator walks the source image in the selected scan order;
//     PM reads go through a small FIFO into the PIPEFlow transmitter towards the PE.
//     Source Left or Start: pixels from that PIPEFlow bus are forwarded to the PE.
//     The RGB->HSV converter sits on this path when MODE bit 4 is set.
//   * destination PM: pixels returned by the PE are written back by a second address
//     generator that walks the destination image in the same order, so the result lands
//     in place (or at DSTBASE). Destination Right or End: returned pixels are sent on that
//     bus. The End bus is shared by all PIPEs and only the PIPE routed to it drives it.
//   * the run ends, FLOW bit 0 (done) and irq rise, when width*height result pixels have
//     been delivered. Writing FLOW bit 1 clears done.
// PM arbitration, one access per clock: the result writer first (its stream cannot wait),
// then the PE's direct port (only while PMOWN bit 0 gives the PE the PM), then the PIPE
// bus, then the source reader, which simply waits. The PM's one word per clock is twice the
// PIPEFlow rate, so a PM-to-PM run reads and writes the same PM at the full PIPEFlow rate of
// one pixel per two clocks: a run takes 2*width*height clocks plus a few tens of clocks of
// pipeline.
//
// PIPE bus: pr_sel selects the registers (word offsets in sonic_pkg), pm_sel the PM (word
// offset = PM address). Every beat to the registers is accepted at once; a PM beat waits
// (RDY low) while the PM is busy with higher-priority work. Read data appears on pb_rdata
// one clock after RDY and is zero otherwise, so the PIPEs' read buses can be ORed.
//
// A plug-in must return its results in input order with the input's start-of-line and
// end-of-image marks; an assertion checks the marks against the writer's scan position.
//
// The tasks, the routing choices, the scan modes, the format-conversion role and the
// PM-to-PIPEFlow bandwidth ratio follow the SONIC paper. The register map, the priority order,
// the done/irq behaviour, the base registers and the one-way Left-to-Right chain are this
// design's choices.
module pipe_router
  import sonic_pkg::*;
#(
  parameter int unsigned AW = PM_AW,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  // PIPE bus and this PIPE's select lines
  input  logic          pr_sel,
  input  logic          pm_sel,
  input  pb_m_t         pb,
  output logic          pb_rdy,
  output logic [31:0]   pb_rdata,
  output logic          irq,
  // PIPEFlow buses
  input  pf_beat_t      pf_left_in,
  output pf_beat_t      pf_right_out,
  input  pf_beat_t      pf_start_in,
  output pf_beat_t      pf_end_out,     // all-zero unless this PIPE is routed to End
  output pf_beat_t      pf_pe_in,       // PIPEFlow In, to the PE
  input  pf_beat_t      pf_pe_out,      // PIPEFlow Out, from the PE
  // PE direct access to the PM
  input  logic          pe_pm_req,
  input  logic          pe_pm_we,
  input  logic [AW-1:0] pe_pm_addr,
  input  logic [31:0]   pe_pm_wdata,
  output logic          pe_pm_gnt,
  // PIPE Memory port
  output logic          pm_en,
  output logic          pm_we,
  output logic [AW-1:0] pm_addr,
  output logic [31:0]   pm_wdata,
  input  logic [31:0]   pm_rdata
);

  // ------------------------------------------------------------ registers
  logic [DIM_W-1:0] width, height, strip;
  src_e             src;
  dst_e             dst;
  scan_e            scan;
  logic             hsv_en;
  logic [AW-1:0]    src_base, dst_base;
  logic             pe_owns_pm;
  logic             busy, done;
  logic [2*DIM_W-1:0] delivered, total;

  logic        r_req, r_wr;
  logic [3:0]  r_addr;
  logic [31:0] r_wdata;
  logic [31:0] r_rdata_q;
  logic        r_rd_q;

  pipe_bus_slave #(.AW(4)) u_reg_slave (
    .clk, .rst_n, .sel(pr_sel), .pb,
    .req(r_req), .wr(r_wr), .addr(r_addr), .wdata(r_wdata), .accept(1'b1)
  );

  logic start_run;
  assign start_run = r_req && r_wr && (r_addr == PR_REG_FLOW) && r_wdata[0];

  // ------------------------------------------------------------ PM bus slave
  logic          m_req, m_wr, m_acc;
  logic [AW-1:0] m_addr;
  logic [31:0]   m_wdata;
  logic          m_rd_q;

  pipe_bus_slave #(.AW(AW)) u_pm_slave (
    .clk, .rst_n, .sel(pm_sel), .pb,
    .req(m_req), .wr(m_wr), .addr(m_addr), .wdata(m_wdata), .accept(m_acc)
  );

  assign pb_rdy   = r_req || (m_req && m_acc);
  assign pb_rdata = m_rd_q ? pm_rdata : (r_rd_q ? r_rdata_q : 32'd0);

  // ------------------------------------------------------------ address generators
  logic          rd_valid, rd_sol, rd_last, rd_step;
  logic [AW-1:0] rd_addr;
  logic          wr_valid, wr_sol, wr_last, wr_step;
  logic [AW-1:0] wr_addr;

  raster_agu #(.AW(AW)) u_rd_agu (
    .clk, .rst_n, .start(start_run && (src == SRC_PM)), .mode(scan), .width, .height,
    .strip, .base(src_base), .step(rd_step), .valid(rd_valid), .addr(rd_addr),
    .sol(rd_sol), .last(rd_last)
  );

  raster_agu #(.AW(AW)) u_wr_agu (
    .clk, .rst_n, .start(start_run && (dst == DST_PM)), .mode(scan), .width, .height,
    .strip, .base(dst_base), .step(wr_step), .valid(wr_valid), .addr(wr_addr),
    .sol(wr_sol), .last(wr_last)
  );

  // ------------------------------------------------------------ streams
  logic res_valid;            // a result pixel returned by the PE
  pix_t res_pix;
  logic res_err;

  pipeflow_rx u_rx_pe (.clk, .rst_n, .beat(pf_pe_out), .out_valid(res_valid), .out(res_pix),
                       .err(res_err));

  logic left_valid, start_valid, left_err, start_err;
  pix_t left_pix, start_pix;

  pipeflow_rx u_rx_left  (.clk, .rst_n, .beat(pf_left_in),  .out_valid(left_valid),
                          .out(left_pix), .err(left_err));
  pipeflow_rx u_rx_start (.clk, .rst_n, .beat(pf_start_in), .out_valid(start_valid),
                          .out(start_pix), .err(start_err));

  // ------------------------------------------------------------ PM arbitration
  logic wr_go, pe_go, bus_go, rd_go;
  logic fifo_push, fifo_pop, fifo_empty, fifo_full;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;
  logic rd_pend, rd_pend_sol, rd_pend_last;
  pix_t fifo_dout;

  always_comb begin
    wr_go  = busy && (dst == DST_PM) && res_valid && wr_valid;
    pe_go  = !wr_go && pe_owns_pm && pe_pm_req;
    bus_go = !wr_go && !pe_go && m_req;
    rd_go  = !wr_go && !pe_go && !bus_go && busy && (src == SRC_PM) && rd_valid
             && (int'(fifo_count) + int'(rd_pend) < FIFO_DEPTH);

    pm_en    = wr_go || pe_go || bus_go || rd_go;
    pm_we    = wr_go || (pe_go && pe_pm_we) || (bus_go && m_wr);
    pm_addr  = wr_go ? wr_addr : pe_go ? pe_pm_addr : bus_go ? m_addr : rd_addr;
    pm_wdata = wr_go ? res_pix.pix : pe_go ? pe_pm_wdata : m_wdata;
  end

  assign m_acc     = bus_go;
  assign pe_pm_gnt = pe_go;
  assign rd_step   = rd_go;
  assign wr_step   = wr_go;

  // ------------------------------------------------------------ source side
  sync_fifo #(.W($bits(pix_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(fifo_push), .din({rd_pend_sol, rd_pend_last, pm_rdata}),
    .pop(fifo_pop), .dout(fifo_dout), .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );
  assign fifo_push = rd_pend;

  logic src_valid, tx_pe_ready;
  pix_t src_pix, pe_pix;

  always_comb begin
    unique case (src)
      SRC_PM:    begin src_valid = !fifo_empty; src_pix = fifo_dout; end
      SRC_LEFT:  begin src_valid = left_valid;  src_pix = left_pix;  end
      SRC_START: begin src_valid = start_valid; src_pix = start_pix; end
      default:   begin src_valid = 1'b0;        src_pix = '0;        end
    endcase
    src_valid = src_valid && busy;
  end
  assign fifo_pop = (src == SRC_PM) && src_valid && tx_pe_ready;

  logic [31:0] hsv_pix;
  rgb2hsv u_hsv (.rgba(src_pix.pix), .hsva(hsv_pix));

  always_comb begin
    pe_pix = src_pix;
    if (hsv_en) pe_pix.pix = hsv_pix;
  end

  pipeflow_tx u_tx_pe (.clk, .rst_n, .in_valid(src_valid), .in(pe_pix), .in_ready(tx_pe_ready),
                       .beat(pf_pe_in));

  // ------------------------------------------------------------ result side
  logic     out_valid, tx_out_ready;
  pf_beat_t out_beat;

  assign out_valid = busy && res_valid && ((dst == DST_RIGHT) || (dst == DST_END));

  pipeflow_tx u_tx_out (.clk, .rst_n, .in_valid(out_valid), .in(res_pix),
                        .in_ready(tx_out_ready), .beat(out_beat));

  assign pf_right_out = (dst == DST_RIGHT) ? out_beat : PF_IDLE;
  assign pf_end_out   = (dst == DST_END)   ? out_beat : PF_IDLE;

  logic delivered_now;
  assign delivered_now = busy && res_valid &&
                         ((dst == DST_PM) ? wr_go :
                          (dst == DST_NONE) ? 1'b1 : tx_out_ready);

  // ------------------------------------------------------------ sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      width      <= '0;
      height     <= '0;
      strip      <= DIM_W'(8);
      src        <= SRC_NONE;
      dst        <= DST_NONE;
      scan       <= SCAN_H;
      hsv_en     <= 1'b0;
      src_base   <= '0;
      dst_base   <= '0;
      pe_owns_pm <= 1'b0;
      busy       <= 1'b0;
      done       <= 1'b0;
      delivered  <= '0;
      total      <= '0;
      r_rdata_q  <= '0;
      r_rd_q     <= 1'b0;
      m_rd_q     <= 1'b0;
      rd_pend    <= 1'b0;
      rd_pend_sol  <= 1'b0;
      rd_pend_last <= 1'b0;
    end else begin
      // register writes
      if (r_req && r_wr) begin
        unique case (r_addr)
          PR_REG_WIDTH:   width  <= r_wdata[DIM_W-1:0];
          PR_REG_HEIGHT:  height <= r_wdata[DIM_W-1:0];
          PR_REG_ROUTE:   begin src <= src_e'(r_wdata[1:0]); dst <= dst_e'(r_wdata[3:2]); end
          PR_REG_MODE:    begin scan <= scan_e'(r_wdata[1:0]); hsv_en <= r_wdata[4]; end
          PR_REG_STRIP:   strip    <= r_wdata[DIM_W-1:0];
          PR_REG_SRCBASE: src_base <= r_wdata[AW-1:0];
          PR_REG_DSTBASE: dst_base <= r_wdata[AW-1:0];
          PR_REG_PMOWN:   pe_owns_pm <= r_wdata[0];
          PR_REG_FLOW:    if (r_wdata[1]) done <= 1'b0;
          default: ;
        endcase
      end
      // register reads
      r_rd_q <= r_req && !r_wr;
      if (r_req && !r_wr) begin
        unique case (r_addr)
          PR_REG_WIDTH:   r_rdata_q <= 32'(width);
          PR_REG_HEIGHT:  r_rdata_q <= 32'(height);
          PR_REG_ROUTE:   r_rdata_q <= {28'd0, dst, src};
          PR_REG_MODE:    r_rdata_q <= {27'd0, hsv_en, 2'b00, scan};
          PR_REG_FLOW:    r_rdata_q <= {30'd0, busy, done};
          PR_REG_STRIP:   r_rdata_q <= 32'(strip);
          PR_REG_SRCBASE: r_rdata_q <= 32'(src_base);
          PR_REG_DSTBASE: r_rdata_q <= 32'(dst_base);
          PR_REG_PMOWN:   r_rdata_q <= {31'd0, pe_owns_pm};
          PR_REG_COUNT:   r_rdata_q <= 32'(delivered);
          default:        r_rdata_q <= '0;
        endcase
      end else begin
        r_rdata_q <= '0;
      end
      m_rd_q <= bus_go && !m_wr;

      // PM read pipeline of the source reader
      rd_pend      <= rd_go;
      rd_pend_sol  <= rd_sol;
      rd_pend_last <= rd_last;

      // run control
      if (start_run) begin
        busy      <= (width != 0) && (height != 0);
        done      <= (width == 0) || (height == 0);
        delivered <= '0;
        total     <= (2*DIM_W)'(width) * (2*DIM_W)'(height);
      end else if (busy && delivered_now) begin
        delivered <= delivered + 1'b1;
        if (delivered + 1'b1 == total) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign irq = done;

  // ------------------------------------------------------------ checks
  a_fifo_ok:       assert property (@(posedge clk) disable iff (!rst_n) !(fifo_push && fifo_full));
  a_stream_to_pe:  assert property (@(posedge clk) disable iff (!rst_n)
                                    (src_valid && src != SRC_PM) |-> tx_pe_ready);
  a_stream_out:    assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> tx_out_ready);
  a_result_slot:   assert property (@(posedge clk) disable iff (!rst_n)
                                    (busy && res_valid && dst == DST_PM) |-> wr_valid);
  // a plug-in keeps the line and image marks of its input, so the result marks must match
  // the scan position the writer is at
  a_result_marks:  assert property (@(posedge clk) disable iff (!rst_n)
                                    wr_go |-> (res_pix.sol == wr_sol && res_pix.eof == wr_last));
  a_beats_clean:   assert property (@(posedge clk) disable iff (!rst_n)
                                    !(res_err || left_err || start_err));

endmodule
