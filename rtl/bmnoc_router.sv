// bmnoc_router: wormhole virtual-channel router of the BMNoC, used as mesh
// router (MR) and, with ROLE = ROLE_ES, as edge switch (ES).
//
// Every input port has NVC virtual channels (VCs), each a BUF_DEPTH-flit FIFO.
// A head flit reaching the front of a VC FIFO goes through next-route
// computation (bmnoc_route on DstAddr), then asks the VC allocator of its
// output port for a free output VC. Once it holds one, its flits compete for
// the output link in that port's crossbar allocator, a bmnoc_ptpcm_arb with
// the packet transmission priority control. The winner's flit is written into
// the output register and leaves on the link in the next cycle. The tail
// flit releases the output VC and returns the input VC to idle.
//
// Flow control is hop-to-hop credits: the router keeps one credit counter per
// output VC, loaded with BUF_DEPTH, decremented for each flit sent and
// incremented for each credit pulse from downstream; a flit is only sent when
// its counter is non-zero. Each flit leaving an input FIFO returns a credit
// pulse upstream on in_credit one cycle later. An output VC is handed to a new
// packet as soon as the previous packet's tail has been sent, so the head of
// the next packet may queue behind the tail of the last one in the same VC
// FIFO downstream; that allocation rule is this design's choice.
//
// Timing: a head flit arriving on in_* in cycle t is in the FIFO in cycle t+1,
// spends HDR_CYCLES cycles there (route computation, HDR_CYCLES-3 wait cycles,
// VC allocation, crossbar allocation) and appears on out_* in cycle
// t+1+HDR_CYCLES, i.e. five cycles after it arrived with HDR_CYCLES = 4. Body
// flits then follow one per cycle. Four cycles to process a header plus one
// cycle across the output wires, five in all, and 8-flit buffers of 34-bit
// flits are the numbers of the BMNoC evaluation. The VC structure, the VC
// allocator and the priority-controlled crossbar allocator follow the router
// block diagram of the priority-control BMNoC; the number of VCs is not
// given and NVC = 2 is this design's choice, as is a crossbar with one input
// per VC (so the VCs of one port never conflict with each other).
//
// A packet whose DstAddr names no existing node is discarded flit by flit.
// The arbiters' priority flags (sa_prio) drive nothing outside the arbiters;
// they are kept as named signals so that simulations can observe them.
// Reset is active low and synchronous.
module bmnoc_router
  import bmnoc_pkg::*;
#(
  parameter role_e       ROLE       = ROLE_MR,
  parameter int unsigned NPORTS     = 6,
  parameter int unsigned N_LOCAL    = 2,
  parameter int unsigned NVC        = 2,
  parameter int unsigned BUF_DEPTH  = 8,
  parameter int unsigned HDR_CYCLES = 4,
  parameter int unsigned MESH_X     = 2,
  parameter int unsigned MESH_Y     = 2,
  parameter int unsigned MY_MR      = 0,
  parameter int unsigned MY_ES      = 0,
  parameter bit          LOCAL_BY_ES = 1'b0,  // MR whose local ports lead to ESes
  parameter bit          PTPCM      = 1'b1,
  localparam int unsigned VW        = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // input links
  input  logic            in_valid  [NPORTS],
  input  logic [VW-1:0]   in_vc     [NPORTS],
  input  flit_t           in_flit   [NPORTS],
  output logic [NVC-1:0]  in_credit [NPORTS],
  // output links
  output logic            out_valid [NPORTS],
  output logic [VW-1:0]   out_vc    [NPORTS],
  output flit_t           out_flit  [NPORTS],
  input  logic [NVC-1:0]  out_credit[NPORTS]
);

  localparam int unsigned NIVC = NPORTS * NVC;
  localparam int unsigned PW   = $clog2(NPORTS);
  localparam int unsigned CW   = $clog2(BUF_DEPTH + 1);
  localparam int unsigned RW   = (HDR_CYCLES > 4) ? $clog2(HDR_CYCLES - 3) : 1;

  typedef enum logic [2:0] {S_IDLE, S_ROUTE, S_VCA, S_ACTIVE, S_DROP} ivc_state_e;

  // ---------------------------------------------------------------- input VCs
  flit_t      ivc_head  [NIVC];
  logic       ivc_empty [NIVC];
  logic       ivc_push  [NIVC];
  logic       ivc_pop   [NIVC];
  ivc_state_e ivc_state [NIVC];
  logic [RW-1:0] ivc_cnt [NIVC];
  logic [PW-1:0] ivc_oport[NIVC];
  logic [VW-1:0] ivc_ovc  [NIVC];
  logic       ivc_mid   [NIVC];
  logic [PW-1:0] rt_port [NIVC];
  logic       rt_ok     [NIVC];

  // ---------------------------------------------------------- output VC state
  logic          ovc_busy [NPORTS][NVC];
  logic [CW-1:0] ovc_cred [NPORTS][NVC];

  // allocator results
  logic          va_gnt [NIVC];
  logic [VW-1:0] va_ovc [NIVC];
  logic [NIVC-1:0] sa_gnt [NPORTS];
  logic [NIVC-1:0] sa_prio[NPORTS];

  for (genvar i = 0; i < NIVC; i++) begin : g_ivc
    localparam int unsigned P = i / NVC;
    localparam int unsigned V = i % NVC;
    logic [$clog2(BUF_DEPTH+1)-1:0] unused_count;
    logic unused_full;

    assign ivc_push[i] = in_valid[P] && (int'(in_vc[P]) == V);

    bmnoc_fifo #(.T(flit_t), .DEPTH(BUF_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (ivc_push[i]), .wdata(in_flit[P]),
      .pop  (ivc_pop[i]),  .rdata(ivc_head[i]),
      .empty(ivc_empty[i]), .full(unused_full), .count(unused_count)
    );

    hdr_t head_hdr;
    assign head_hdr = hdr_t'(ivc_head[i].data);

    bmnoc_route #(
      .ROLE(ROLE), .NPORTS(NPORTS), .N_LOCAL(N_LOCAL),
      .MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_MR(MY_MR), .MY_ES(MY_ES),
      .LOCAL_BY_ES(LOCAL_BY_ES)
    ) u_route (
      .dst(head_hdr.dst), .port(rt_port[i]), .dst_ok(rt_ok[i])
    );

    // a flit leaves when the crossbar allocator of its output port grants it,
    // or when it is discarded
    always_comb begin
      ivc_pop[i] = 1'b0;
      if (ivc_state[i] == S_ACTIVE) ivc_pop[i] = sa_gnt[ivc_oport[i]][i];
      if (ivc_state[i] == S_DROP)   ivc_pop[i] = !ivc_empty[i];
      if (ivc_state[i] == S_IDLE)   ivc_pop[i] = !ivc_empty[i] && !is_head(ivc_head[i].dtype);
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        ivc_state[i] <= S_IDLE;
        ivc_cnt[i]   <= '0;
        ivc_oport[i] <= '0;
        ivc_ovc[i]   <= '0;
        ivc_mid[i]   <= 1'b0;
      end else begin
        unique case (ivc_state[i])
          S_IDLE: if (!ivc_empty[i] && is_head(ivc_head[i].dtype)) begin
            ivc_oport[i] <= rt_port[i];
            if (!rt_ok[i])            ivc_state[i] <= S_DROP;
            else if (HDR_CYCLES > 3)  ivc_state[i] <= S_ROUTE;
            else                      ivc_state[i] <= S_VCA;
            ivc_cnt[i] <= RW'((HDR_CYCLES > 4) ? HDR_CYCLES - 4 : 0);
          end
          S_ROUTE: begin
            if (ivc_cnt[i] == '0) ivc_state[i] <= S_VCA;
            else                  ivc_cnt[i]   <= ivc_cnt[i] - 1'b1;
          end
          S_VCA: if (va_gnt[i]) begin
            ivc_ovc[i]   <= va_ovc[i];
            ivc_state[i] <= S_ACTIVE;
          end
          S_ACTIVE: if (ivc_pop[i]) begin
            ivc_mid[i] <= 1'b1;
            if (is_tail(ivc_head[i].dtype)) begin
              ivc_mid[i]   <= 1'b0;
              ivc_state[i] <= S_IDLE;
            end
          end
          S_DROP: if (ivc_pop[i] && is_tail(ivc_head[i].dtype)) ivc_state[i] <= S_IDLE;
          default: ivc_state[i] <= S_IDLE;
        endcase
      end
    end
  end

  // credits back upstream: one pulse per flit that left an input VC
  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < NPORTS; p++) begin
      for (int unsigned v = 0; v < NVC; v++) begin
        in_credit[p][v] <= rst_n && ivc_pop[p*NVC + v];
      end
    end
  end

  // ------------------------------------------------------------ VC allocator
  // Per output port, one allocation per cycle: the first waiting input VC
  // from a rotating pointer gets the lowest-numbered free output VC.
  logic [$clog2(NIVC)-1:0] va_ptr [NPORTS];

  always_comb begin
    int unsigned idx;
    logic        found_vc;
    logic [VW-1:0] free_vc;
    logic        done;
    for (int unsigned i = 0; i < NIVC; i++) begin
      va_gnt[i] = 1'b0;
      va_ovc[i] = '0;
    end
    for (int unsigned o = 0; o < NPORTS; o++) begin
      found_vc = 1'b0;
      free_vc  = '0;
      for (int unsigned v = 0; v < NVC; v++) begin
        if (!found_vc && !ovc_busy[o][v]) begin
          found_vc = 1'b1;
          free_vc  = VW'(v);
        end
      end
      done = !found_vc;
      for (int unsigned k = 0; k < NIVC; k++) begin
        idx = (int'(va_ptr[o]) + k) % NIVC;
        if (!done && ivc_state[idx] == S_VCA && int'(ivc_oport[idx]) == o) begin
          va_gnt[idx] = 1'b1;
          va_ovc[idx] = free_vc;
          done = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned o = 0; o < NPORTS; o++) begin
      if (!rst_n) va_ptr[o] <= '0;
      else begin
        for (int unsigned i = 0; i < NIVC; i++) begin
          if (va_gnt[i] && int'(ivc_oport[i]) == o)
            va_ptr[o] <= $clog2(NIVC)'((i + 1) % NIVC);
        end
      end
    end
  end

  // ------------------------------------------------- crossbar allocators
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    logic [NIVC-1:0] req, rdy, mid, tail;
    always_comb begin
      for (int unsigned i = 0; i < NIVC; i++) begin
        req[i]  = ivc_state[i] == S_ACTIVE && int'(ivc_oport[i]) == o && !ivc_empty[i];
        rdy[i]  = ovc_cred[o][ivc_ovc[i]] != '0;
        mid[i]  = ivc_mid[i];
        tail[i] = is_tail(ivc_head[i].dtype);
      end
    end

    bmnoc_ptpcm_arb #(.N(NIVC), .PTPCM(PTPCM)) u_arb (
      .clk, .rst_n, .req, .ready(rdy), .mid, .tail,
      .gnt(sa_gnt[o]), .prio(sa_prio[o])
    );

    // crossbar and output register
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        out_valid[o] <= 1'b0;
        out_vc[o]    <= '0;
        out_flit[o]  <= '0;
      end else begin
        out_valid[o] <= |sa_gnt[o];
        for (int unsigned i = 0; i < NIVC; i++) begin
          if (sa_gnt[o][i]) begin
            out_vc[o]   <= ivc_ovc[i];
            out_flit[o] <= ivc_head[i];
          end
        end
      end
    end

    // output VC bookkeeping: credits and ownership
    for (genvar v = 0; v < NVC; v++) begin : g_ovc
      logic sent, sent_tail, alloc;
      always_comb begin
        sent = 1'b0; sent_tail = 1'b0; alloc = 1'b0;
        for (int unsigned i = 0; i < NIVC; i++) begin
          if (sa_gnt[o][i] && int'(ivc_ovc[i]) == v) begin
            sent      = 1'b1;
            sent_tail = is_tail(ivc_head[i].dtype);
          end
          if (va_gnt[i] && int'(ivc_oport[i]) == o && int'(va_ovc[i]) == v) alloc = 1'b1;
        end
      end
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          ovc_busy[o][v] <= 1'b0;
          ovc_cred[o][v] <= CW'(BUF_DEPTH);
        end else begin
          ovc_cred[o][v] <= ovc_cred[o][v] - CW'(sent) + CW'(out_credit[o][v]);
          if (alloc)          ovc_busy[o][v] <= 1'b1;
          else if (sent_tail) ovc_busy[o][v] <= 1'b0;
        end
      end
      a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
                                       ovc_cred[o][v] <= CW'(BUF_DEPTH));
    end
  end

endmodule
