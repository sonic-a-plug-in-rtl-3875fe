// pipe_memory: the PIPE Memory (PM), the frame store of one PIPE.
//
// The SONIC paper's PM is 4 Mbytes of SRAM arranged as 1M x 32 bits, with a bandwidth of one
// 32-bit word per clock (132 MB/s at 33 MHz), twice that of the PIPEFlow bus. It is modelled
// here as a single-port synchronous memory array: one access per clock, selected by en;
// a write stores wdata at addr, a read returns the word on rdata on the next clock
// (one-cycle latency). rdata holds its value when no read is made. The synchronous read and
// the absence of byte enables are this design's choices; the size follows the SONIC paper.
module pipe_memory #(
  parameter int unsigned AW = 20,   // 1M words
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
