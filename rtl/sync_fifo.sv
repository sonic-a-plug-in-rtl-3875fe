// sync_fifo: small synchronous first-in first-out buffer used inside the PIPE Router to
// decouple the PM read pipeline from the PIPEFlow serializer.
//
// push writes din when not full; pop removes the head, which is always visible on dout
// while empty is low (first-word fall-through). count gives the fill level. Depth must be
// a power of two. Pushing when full or popping when empty is a usage error and is checked
// by assertions.
module sync_fifo #(
  parameter int unsigned W     = 34,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [W-1:0]             din,
  input  logic                     pop,
  output logic [W-1:0]             dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [W-1:0]  store [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[PW:0]);
  assign dout  = store[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) store[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
