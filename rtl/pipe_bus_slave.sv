// pipe_bus_slave: the slave end of the PIPE bus, shared by the PIPE Router and the PE.
//
// The PIPE bus is a 32-bit multiplexed address/data bus with four control signals (AS, WR,
// DS, RDY; see sonic_pkg). While this slave's select line is high, a cycle with AS high
// loads the address and the direction. Each following cycle with DS high (and AS low) is a
// beat request, shown to the owning block on req with its addr, wr and wdata; the block
// answers with accept in the same cycle (it drives RDY from it). After an accepted beat the
// address advances by one word, so a burst needs only one address cycle. Read data is the
// owning block's to return, one clock after the accept. Dropping the select line ends the
// transaction. The burst/auto-increment protocol is this design's reading of a multiplexed
// bus that must keep pace with PCI bursts.
module pipe_bus_slave
  import sonic_pkg::*;
#(
  parameter int unsigned AW = PM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel,
  input  pb_m_t         pb,
  output logic          req,
  output logic          wr,
  output logic [AW-1:0] addr,
  output logic [31:0]   wdata,
  input  logic          accept
);

  logic open;

  assign req   = sel && open && pb.ds && !pb.as;
  assign wdata = pb.ad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open <= 1'b0;
      wr   <= 1'b0;
      addr <= '0;
    end else if (!sel) begin
      open <= 1'b0;
    end else if (pb.as) begin
      open <= 1'b1;
      wr   <= pb.wr;
      addr <= pb.ad[AW-1:0];
    end else if (req && accept) begin
      addr <= addr + 1'b1;
    end
  end

  a_no_strobe_clash: assert property (@(posedge clk) disable iff (!rst_n) sel |-> !(pb.as && pb.ds));

endmodule
