// pipeflow_tx: PIPEFlow bus transmitter. Sends one 32-bit RGBa pixel as two 16-bit beats.
//
// The SONIC paper's PIPEFlow bus is 19 bits wide (16 data + 3 control) and is time multiplexed
// between the RG and Ba components of 8-bit RGBa data, so a pixel needs two clocks. A pixel
// offered on in_valid/in is taken when in_ready is high; its first beat ({R,G}, phase 0,
// with the start-of-line mark) leaves on the next clock and its second beat ({B,a}, phase 1,
// with the end-of-image mark) on the clock after. in_ready is low only while the second beat
// is pending, so back-to-back pixels run at the full rate of one pixel per two clocks.
// Outputs are registered. The order RG-then-Ba and the control-bit meanings are this
// design's choice.
module pipeflow_tx
  import sonic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  pix_t     in,
  output logic     in_ready,
  output pf_beat_t beat
);

  logic        busy;      // second beat still to send
  logic [15:0] hold;
  logic        hold_eof;

  assign in_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      hold     <= '0;
      hold_eof <= 1'b0;
      beat     <= PF_IDLE;
    end else if (busy) begin
      beat     <= '{ctrl: {hold_eof, 1'b1, 1'b1}, data: hold};
      busy     <= 1'b0;
    end else if (in_valid) begin
      beat     <= '{ctrl: {in.sol, 1'b0, 1'b1}, data: in.pix[31:16]};
      hold     <= in.pix[15:0];
      hold_eof <= in.eof;
      busy     <= 1'b1;
    end else begin
      beat     <= PF_IDLE;
    end
  end

endmodule
