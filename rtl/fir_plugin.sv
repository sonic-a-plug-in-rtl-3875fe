// fir_plugin: PIPE Engine (PE) configured with the SONIC paper's example plug-in, a 1-D FIR
// filter that, run once along a horizontal raster and once along a vertical raster, makes a
// separable 2-D filter (the same PE design serves both passes because the PIPE Router
// reorders the data).
//
// How it works: pixels arrive on PIPEFlow In, two beats each, and enter a window of TAPS
// pixels. The centre of the window is the output pixel; each colour component (R, G, B) is
// the sum of coef[k] * pixel(centre + k - TAPS/2) along the scan line, shifted right by the
// 'shift' register and saturated to 255. Alpha is copied from the centre pixel. Every window
// entry carries a tag of the scan line it came from; a tap that falls outside the centre
// pixel's line takes the nearest pixel of that line instead (edge replication), so lines
// are filtered independently and the output has exactly as many pixels as the input, in the
// same order, with the same start-of-line and end-of-image marks. The first TAPS/2 pixels
// of each line produce no output; the slots they leave carry the last TAPS/2 outputs of the
// line before, and after the last pixel of the image the PE shifts TAPS/2 empty entries in
// by itself, one per two clocks, to drain the window.
//
// Interface: PIPEFlow In/Out beats (sonic_pkg::pf_beat_t); the PIPE bus, selected by pe_sel,
// reaches the parameter registers: word offsets 0..TAPS-1 the 8-bit unsigned coefficients,
// offset TAPS the shift amount. Reads return the register one clock after RDY. The
// coefficients are the plug-in's low-bandwidth parameter path of the SONIC paper.
//
// Timing: output pixel j leaves on PIPEFlow Out (first beat) 3 clocks after pixel j+TAPS/2
// of the same line is complete at the input; the stream rate is one pixel per two clocks,
// the PIPEFlow rate. A new image must not start within 2*TAPS clocks of the end of the last.
//
// The SONIC paper gives the filter's role and its coefficient dialog; the tap count, the
// coefficient format, the scaling, edge replication and the register layout are this
// design's choices.
module fir_plugin
  import sonic_pkg::*;
#(
  parameter int unsigned TAPS = 9
) (
  input  logic     clk,
  input  logic     rst_n,
  // PIPEFlow
  input  pf_beat_t pf_in,
  output pf_beat_t pf_out,
  // PIPE bus (parameter access)
  input  logic     pe_sel,
  input  pb_m_t    pb,
  output logic     pb_rdy,
  output logic [31:0] pb_rdata
);

  localparam int unsigned HALF = TAPS / 2;
  localparam int unsigned IW   = $clog2(TAPS);

  typedef struct packed {
    logic       valid;
    logic [3:0] tag;
    logic       sol;
    logic       eof;
    logic [31:0] pix;
  } tap_t;

  // ------------------------------------------------------------ parameter registers
  logic [7:0] coef [TAPS];
  logic [3:0] shift;

  logic        bus_req, bus_wr;
  logic [4:0]  bus_addr;
  logic [31:0] bus_wdata;

  pipe_bus_slave #(.AW(5)) u_bus (
    .clk, .rst_n, .sel(pe_sel), .pb,
    .req(bus_req), .wr(bus_wr), .addr(bus_addr), .wdata(bus_wdata), .accept(1'b1)
  );
  assign pb_rdy = bus_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) coef[k] <= (k == HALF) ? 8'd1 : 8'd0;
      shift    <= '0;
      pb_rdata <= '0;
    end else begin
      pb_rdata <= '0;
      if (bus_req && bus_wr) begin
        if (int'(bus_addr) < TAPS) coef[IW'(bus_addr)] <= bus_wdata[7:0];
        else if (int'(bus_addr) == TAPS) shift <= bus_wdata[3:0];
      end
      if (bus_req && !bus_wr) begin
        if (int'(bus_addr) < TAPS) pb_rdata <= {24'd0, coef[IW'(bus_addr)]};
        else if (int'(bus_addr) == TAPS) pb_rdata <= {28'd0, shift};
      end
    end
  end

  // ------------------------------------------------------------ input
  logic in_valid;
  pix_t in_pix;
  logic rx_err;

  pipeflow_rx u_rx (.clk, .rst_n, .beat(pf_in), .out_valid(in_valid), .out(in_pix), .err(rx_err));

  // ------------------------------------------------------------ window
  tap_t       win [TAPS];     // win[0] newest, win[TAPS-1] oldest
  logic [3:0] line_tag;
  logic [3:0] flush_cnt;
  logic       flush_phase;
  logic       shifted;        // the window moved in the previous clock
  logic       do_flush, do_shift;
  tap_t       new_entry;

  assign do_flush = !in_valid && (flush_cnt != 0) && flush_phase;
  assign do_shift = in_valid || do_flush;

  always_comb begin
    new_entry = '0;
    if (in_valid) begin
      new_entry.valid = 1'b1;
      new_entry.tag   = in_pix.sol ? line_tag + 1'b1 : line_tag;
      new_entry.sol   = in_pix.sol;
      new_entry.eof   = in_pix.eof;
      new_entry.pix   = in_pix.pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) win[k] <= '0;
      line_tag    <= '0;
      flush_cnt   <= '0;
      flush_phase <= 1'b0;
      shifted     <= 1'b0;
    end else begin
      shifted <= do_shift;
      if (do_shift) begin
        win[0] <= new_entry;
        for (int k = 1; k < TAPS; k++) win[k] <= win[k-1];
      end
      if (in_valid) line_tag <= new_entry.tag;
      if (in_valid && in_pix.eof) begin
        flush_cnt   <= 4'(HALF);
        flush_phase <= 1'b0;
      end else if (flush_cnt != 0) begin
        flush_phase <= !flush_phase;
        if (do_shift) flush_cnt <= flush_cnt - 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ filter
  logic [31:0] eff [TAPS];   // taps after edge replication, same indexing as win
  logic [7:0]  res [3];
  logic [23:0] acc [3];
  logic [23:0] scaled;

  // a window entry belongs to the centre pixel's line when it holds a pixel with the same tag
  function automatic logic same_line(logic valid, logic [3:0] tag, logic [3:0] centre_tag);
    return valid && (tag == centre_tag);
  endfunction

  always_comb begin
    eff[HALF] = win[HALF].pix;
    for (int k = HALF - 1; k >= 0; k--)
      eff[k] = same_line(win[k].valid, win[k].tag, win[HALF].tag) ? win[k].pix : eff[k+1];
    for (int k = HALF + 1; k < TAPS; k++)
      eff[k] = same_line(win[k].valid, win[k].tag, win[HALF].tag) ? win[k].pix : eff[k-1];

    for (int c = 0; c < 3; c++) begin
      acc[c] = '0;
      // coef[k] weighs the pixel k - HALF places along the line from the centre
      for (int k = 0; k < TAPS; k++)
        acc[c] = acc[c] + 24'(coef[k]) * 24'(eff[TAPS-1-k][31-8*c -: 8]);
      scaled = acc[c] >> shift;
      res[c] = (scaled > 24'd255) ? 8'd255 : scaled[7:0];
    end
  end

  // ------------------------------------------------------------ output
  logic out_valid, tx_ready;
  pix_t out_pix;

  assign out_valid = shifted && win[HALF].valid;
  assign out_pix   = '{sol: win[HALF].sol, eof: win[HALF].eof,
                       pix: {res[0], res[1], res[2], win[HALF].pix[7:0]}};

  pipeflow_tx u_tx (.clk, .rst_n, .in_valid(out_valid), .in(out_pix), .in_ready(tx_ready),
                    .beat(pf_out));

  a_tx_keeps_pace: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> tx_ready);
  a_rx_clean:      assert property (@(posedge clk) disable iff (!rst_n) !rx_err);

endmodule
