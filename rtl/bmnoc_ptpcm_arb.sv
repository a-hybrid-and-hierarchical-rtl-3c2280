// bmnoc_ptpcm_arb: output-port arbiter with packet transmission priority
// control (PTPCM).
//
// Each cycle it grants the output link to one of N requesters. Plain operation
// is round robin: a pointer names the requester searched first and moves to
// the one after the winner. The priority control adds one flag per requester.
// A requester whose packet already has its head past the crossbar (mid = 1)
// and that wants to send but finds the buffer downstream full (req = 1,
// ready = 0) is blocked: its flag is set. While it stays blocked the others
// are served in round robin, as before. As soon as a flagged requester is
// ready again it is served ahead of every unflagged one; several flagged
// requesters share the link in round robin among themselves. The flag is
// cleared when the requester's tail flit is granted, and arbitration returns
// to plain round robin. These rules are those of the priority control method;
// the method needs no extra buffer, only the flags. With PTPCM = 0 the flags
// stay clear and the arbiter is a plain round-robin arbiter. The router block
// diagram calls this unit a priority matrix arbiter; the arbitration itself is
// described as round robin, and that is what is built here.
//
// Timing: gnt is combinational from req/ready and the registered state; the
// pointer and flags update on the clock edge. Reset is active low and
// synchronous: pointer to 0, flags clear.
module bmnoc_ptpcm_arb #(
  parameter int unsigned N     = 12,   // requesters (input VCs of a router)
  parameter bit          PTPCM = 1'b1  // 1: priority control on, 0: round robin
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,     // has a flit for this output
  input  logic [N-1:0] ready,   // downstream buffer has space for it
  input  logic [N-1:0] mid,     // its packet's head flit has already been sent
  input  logic [N-1:0] tail,    // the flit it offers is its packet's last
  output logic [N-1:0] gnt,     // one-hot grant, zero when nobody is eligible
  output logic [N-1:0] prio     // priority flags, for observation
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;
  logic [N-1:0]  eligible, pool;

  assign eligible = req & ready;
  assign pool     = (|(eligible & prio)) ? (eligible & prio) : eligible;

  always_comb begin
    int unsigned idx;
    gnt = '0;
    for (int unsigned i = 0; i < N; i++) begin
      idx = (int'(ptr) + i) % N;
      if (gnt == '0 && pool[idx]) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr  <= '0;
      prio <= '0;
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (gnt[i]) ptr <= IW'((i + 1) % N);
      end
      if (PTPCM) begin
        prio <= (prio | (req & ~ready & mid)) & ~(gnt & tail);
      end
    end
  end

  // At most one grant, and only to an eligible requester.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                             $onehot0(gnt) && ((gnt & ~eligible) == '0));

endmodule
