// bmnoc_local_bus: the shared local bus that connects the cores of one
// cluster node (CN) with each other and with the CN's network interface (NI).
//
// Masters 0..K-1 are the cores, master K is the NI (delivering packets that
// came from the network). Slaves are numbered the same way. A transfer is one
// header (the same 32-bit hdr_t that heads a packet) followed by 1 to 7 data
// words, the last one marked. Data go between cores of the same CN directly,
// with no packetizing: a header whose DstAddr is this CN's address selects the
// core slave named by dst_core; any other DstAddr selects the NI, which turns
// the transfer into a packet.
//
// Timing, counted from the cycle t in which an idle bus sees a request:
//   t    : arbitration, round robin over the eligible requests
//   t+1  : m_gnt to the winner
//   t+2  : address phase, s_hdr_valid to the selected slave
//   t+3..: data phase, one word per cycle, m_beat to the master and s_valid to
//          the slave, until the word marked m_last
// and the bus is idle again in the cycle after the last word. Two cycles from
// request to address and data one cycle later, three in all, are the bus
// timing of the BMNoC evaluation; the round-robin order and this handshake
// are this design's choice.
//
// A master keeps m_req, m_hdr high and stable from its request until its last
// word, and drives m_data/m_last during its data phase (it advances on
// m_beat). Slaves always accept: cores are assumed ready, and a master whose
// transfer would go to the NI only takes part in arbitration while the NI
// signals ni_can_accept (room for a whole packet), so no transfer can stall
// the bus. Reset is active low and synchronous.
module bmnoc_local_bus
  import bmnoc_pkg::*;
#(
  parameter int unsigned K       = 4,      // cores on the bus
  parameter logic [7:0]  MY_ADDR = 8'h00,  // this CN's address (addr_t)
  localparam int unsigned NM     = K + 1   // masters = slaves = cores + NI
) (
  input  logic        clk,
  input  logic        rst_n,
  // masters
  input  logic        m_req  [NM],
  input  hdr_t        m_hdr  [NM],
  input  logic [31:0] m_data [NM],
  input  logic        m_last [NM],
  output logic        m_gnt  [NM],
  output logic        m_beat [NM],
  // slaves
  output logic        s_hdr_valid [NM],
  output hdr_t        s_hdr,
  output logic        s_valid [NM],
  output logic [31:0] s_data,
  output logic        s_last,
  // NI has room for one more outgoing packet
  input  logic        ni_can_accept
);

  localparam int unsigned MW = $clog2(NM);

  typedef enum logic [1:0] {B_IDLE, B_ARB, B_ADDR, B_DATA} bus_state_e;

  bus_state_e state;
  logic [MW-1:0] owner, ptr, pick;
  logic          pick_valid;
  logic [MW-1:0] target;
  logic          target_ok;

  // slave selected by a header
  function automatic logic [MW:0] decode(hdr_t h);
    if (h.dst == addr_t'(MY_ADDR)) begin
      if (int'(h.dst_core) < K) return {1'b1, MW'(h.dst_core)};
      else                      return {1'b0, MW'(0)};       // no such core
    end
    return {1'b1, MW'(K)};                                   // to the NI
  endfunction

  always_comb begin
    logic [MW:0] d;
    int unsigned idx;
    pick       = '0;
    pick_valid = 1'b0;
    for (int unsigned i = 0; i < NM; i++) begin
      idx = (int'(ptr) + i) % NM;
      d   = decode(m_hdr[idx]);
      if (!pick_valid && m_req[idx] && (int'(d[MW-1:0]) != K || !d[MW] || ni_can_accept)) begin
        pick       = MW'(idx);
        pick_valid = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= B_IDLE;
      owner     <= '0;
      ptr       <= '0;
      target    <= '0;
      target_ok <= 1'b0;
      s_hdr     <= '0;
    end else begin
      unique case (state)
        B_IDLE: if (pick_valid) begin
          owner <= pick;
          ptr   <= MW'((int'(pick) + 1) % NM);
          state <= B_ARB;
        end
        B_ARB: begin
          {target_ok, target} <= decode(m_hdr[owner]);
          s_hdr <= m_hdr[owner];
          state <= B_ADDR;
        end
        B_ADDR: state <= B_DATA;
        B_DATA: if (m_last[owner]) state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NM; i++) begin
      m_gnt[i]       = (state == B_ARB)  && (int'(owner) == i);
      m_beat[i]      = (state == B_DATA) && (int'(owner) == i);
      s_hdr_valid[i] = (state == B_ADDR) && target_ok && (int'(target) == i);
      s_valid[i]     = (state == B_DATA) && target_ok && (int'(target) == i);
    end
    s_data = m_data[owner];
    s_last = (state == B_DATA) && m_last[owner];
  end

  // the owner keeps requesting until its last word
  a_owner_holds: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state != B_IDLE) |-> m_req[owner]);

endmodule
