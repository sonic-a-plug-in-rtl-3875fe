// raster_agu: PIPE Router address generator for the four raster-scan modes of the PR.
//
// The SONIC paper lets the PR present an image to the PE in a normal horizontal raster, a
// normal vertical raster, or a 'stripped' version of either (Fig 7): a horizontal stripped
// scan walks a band of STRIP rows column by column (down the band, then one column right),
// and a vertical stripped scan walks a band of STRIP columns row by row. The band size, the
// treatment of a last, partial band, and marking every short run as its own scan line are
// this design's choices.
//
// Interface: start loads the image geometry and places the scan at the first pixel
// (valid rises on the next clock). While valid is high, addr = base + y*width + x is the PM
// word address of the current pixel, sol marks the first pixel of a scan line (or of a run
// within a strip) and last marks the final pixel. step advances to the next pixel in the
// same clock; stepping on last ends the scan (valid falls). One pixel per clock at most.
module raster_agu
  import sonic_pkg::*;
#(
  parameter int unsigned AW = PM_AW,
  parameter int unsigned DW = DIM_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  scan_e         mode,
  input  logic [DW-1:0] width,
  input  logic [DW-1:0] height,
  input  logic [DW-1:0] strip,
  input  logic [AW-1:0] base,
  input  logic          step,
  output logic          valid,
  output logic [AW-1:0] addr,
  output logic          sol,
  output logic          last
);

  scan_e         mode_q;
  logic [DW-1:0] w_q, h_q, s_q;
  logic [AW-1:0] base_q;
  logic [DW-1:0] x, y, sb;          // position and first row/column of the current strip
  logic [2*DW-1:0] cnt, total;

  // last row (HS) / column (VS) of the current strip
  logic [DW:0] band_end_h, band_end_w;
  logic [DW-1:0] ylast, xlast;

  always_comb begin
    band_end_h = {1'b0, sb} + {1'b0, s_q};
    band_end_w = band_end_h;
    ylast = (band_end_h > {1'b0, h_q}) ? h_q - 1'b1 : DW'(band_end_h - 1'b1);
    xlast = (band_end_w > {1'b0, w_q}) ? w_q - 1'b1 : DW'(band_end_w - 1'b1);
  end

  assign addr = base_q + AW'(y) * AW'(w_q) + AW'(x);
  assign last = (cnt == total - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= 1'b0;
      mode_q <= SCAN_H;
      w_q    <= '0;
      h_q    <= '0;
      s_q    <= '0;
      base_q <= '0;
      x      <= '0;
      y      <= '0;
      sb     <= '0;
      sol    <= 1'b0;
      cnt    <= '0;
      total  <= '0;
    end else if (start) begin
      valid  <= (width != 0) && (height != 0);
      mode_q <= mode;
      w_q    <= width;
      h_q    <= height;
      s_q    <= (strip == 0) ? DW'(1) : strip;
      base_q <= base;
      x      <= '0;
      y      <= '0;
      sb     <= '0;
      sol    <= 1'b1;
      cnt    <= '0;
      total  <= (2*DW)'(width) * (2*DW)'(height);
    end else if (valid && step) begin
      cnt <= cnt + 1'b1;
      if (last) begin
        valid <= 1'b0;
      end else begin
        unique case (mode_q)
          SCAN_H: begin
            sol <= (x == w_q - 1'b1);
            if (x == w_q - 1'b1) begin x <= '0; y <= y + 1'b1; end
            else x <= x + 1'b1;
          end
          SCAN_V: begin
            sol <= (y == h_q - 1'b1);
            if (y == h_q - 1'b1) begin y <= '0; x <= x + 1'b1; end
            else y <= y + 1'b1;
          end
          SCAN_HS: begin
            sol <= (y == ylast);
            if (y == ylast) begin
              if (x == w_q - 1'b1) begin
                x  <= '0;
                sb <= sb + s_q;
                y  <= sb + s_q;
              end else begin
                x <= x + 1'b1;
                y <= sb;
              end
            end else y <= y + 1'b1;
          end
          SCAN_VS: begin
            sol <= (x == xlast);
            if (x == xlast) begin
              if (y == h_q - 1'b1) begin
                y  <= '0;
                sb <= sb + s_q;
                x  <= sb + s_q;
              end else begin
                y <= y + 1'b1;
                x <= sb;
              end
            end else x <= x + 1'b1;
          end
        endcase
      end
    end
  end

endmodule
