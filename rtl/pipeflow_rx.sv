// pipeflow_rx: PIPEFlow bus receiver. Reassembles a 32-bit RGBa pixel from two beats.
//
// A valid beat with phase 0 carries {R,G} and the start-of-line mark; the following valid
// beat with phase 1 carries {B,a} and the end-of-image mark. One clock after the phase-1 beat
// the pixel appears on out with out_valid high for one clock. A phase-1 beat that has no
// phase-0 beat before it is dropped, and counted on err for one clock. The beat format is
// this design's choice (see sonic_pkg); the two-beat RG/Ba split follows the SONIC paper.
module pipeflow_rx
  import sonic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  pf_beat_t beat,
  output logic     out_valid,
  output pix_t     out,
  output logic     err
);

  logic        have_first;
  logic [15:0] first;
  logic        first_sol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_first <= 1'b0;
      first      <= '0;
      first_sol  <= 1'b0;
      out_valid  <= 1'b0;
      out        <= '0;
      err        <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      err       <= 1'b0;
      if (beat.ctrl[0]) begin
        if (!beat.ctrl[1]) begin
          have_first <= 1'b1;
          first      <= beat.data;
          first_sol  <= beat.ctrl[2];
        end else if (have_first) begin
          have_first <= 1'b0;
          out_valid  <= 1'b1;
          out        <= '{sol: first_sol, eof: beat.ctrl[2], pix: {first, beat.data}};
        end else begin
          err <= 1'b1;
        end
      end
    end
  end

endmodule
