// bmnoc_fifo: synchronous first-word-fall-through FIFO, the flit buffer used
// by the router input VCs and the network interface.
//
// A circular array of DEPTH entries with read and write pointers and an
// occupancy counter. rdata shows the oldest entry whenever empty is low; pop
// removes it at the clock edge, push stores wdata. Push and pop may happen in
// the same cycle. Pushing into a full FIFO or popping an empty one is a
// protocol error caught by the assertions (flow control upstream must prevent
// it). Reset is active low and synchronous and empties the FIFO; the storage
// itself is not reset.
module bmnoc_fifo #(
  parameter type         T     = logic [33:0],
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  T              wdata,
  input  logic          pop,
  output T              rdata,
  output logic          empty,
  output logic          full,
  output logic [CW-1:0] count
);

  T              mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  assign rdata = mem[rptr];
  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= wdata;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
