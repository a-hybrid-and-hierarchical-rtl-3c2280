// bmnoc_cluster_node: one cluster node (CN) of the BMNoC, the local bus that
// ties K tightly coupled cores together plus the network interface (NI) that
// connects the bus to a port of a router.
//
// The cores themselves are outside this module; each brings a bus master port
// (to start transfers) and a bus slave port (to receive them). Transfers
// between cores of this CN stay on the bus; transfers to other CNs leave
// through the NI as packets, and packets from the network come in through the
// NI, which becomes the bus master K to deliver them. See bmnoc_local_bus for
// the bus timing and bmnoc_ni for packetizing and flow control. A CN made of
// cores on a bus with an NI is the BMNoC cluster node; K = 4 cores per CN is
// the configuration of the BMNoC evaluation.
module bmnoc_cluster_node
  import bmnoc_pkg::*;
#(
  parameter int unsigned K         = 4,
  parameter logic [7:0]  MY_ADDR   = 8'h00,
  parameter int unsigned NVC       = 2,
  parameter int unsigned BUF_DEPTH = 8,
  localparam int unsigned VW       = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // core master ports
  input  logic           core_req  [K],
  input  hdr_t           core_hdr  [K],
  input  logic [31:0]    core_wdata[K],
  input  logic           core_wlast[K],
  output logic           core_gnt  [K],
  output logic           core_beat [K],
  // core slave ports
  output logic           core_rx_hdr_valid[K],
  output logic           core_rx_valid    [K],
  output hdr_t           core_rx_hdr,
  output logic [31:0]    core_rx_data,
  output logic           core_rx_last,
  // router local port
  output logic           net_out_valid,
  output logic [VW-1:0]  net_out_vc,
  output flit_t          net_out_flit,
  input  logic [NVC-1:0] net_out_credit,
  input  logic           net_in_valid,
  input  logic [VW-1:0]  net_in_vc,
  input  flit_t          net_in_flit,
  output logic [NVC-1:0] net_in_credit
);

  logic        m_req  [K+1];
  hdr_t        m_hdr  [K+1];
  logic [31:0] m_data [K+1];
  logic        m_last [K+1];
  logic        m_gnt  [K+1];
  logic        m_beat [K+1];
  logic        s_hdr_valid [K+1];
  logic        s_valid     [K+1];
  logic        ni_can_accept;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      m_req[i]             = core_req[i];
      m_hdr[i]             = core_hdr[i];
      m_data[i]            = core_wdata[i];
      m_last[i]            = core_wlast[i];
      core_gnt[i]          = m_gnt[i];
      core_beat[i]         = m_beat[i];
      core_rx_hdr_valid[i] = s_hdr_valid[i];
      core_rx_valid[i]     = s_valid[i];
    end
  end

  bmnoc_local_bus #(.K(K), .MY_ADDR(MY_ADDR)) u_bus (
    .clk, .rst_n,
    .m_req, .m_hdr, .m_data, .m_last, .m_gnt, .m_beat,
    .s_hdr_valid, .s_hdr(core_rx_hdr), .s_valid, .s_data(core_rx_data), .s_last(core_rx_last),
    .ni_can_accept
  );

  logic unused_ni_gnt;
  assign unused_ni_gnt = m_gnt[K];

  bmnoc_ni #(.NVC(NVC), .BUF_DEPTH(BUF_DEPTH)) u_ni (
    .clk, .rst_n,
    .s_hdr_valid(s_hdr_valid[K]), .s_hdr(core_rx_hdr), .s_valid(s_valid[K]),
    .s_data(core_rx_data), .s_last(core_rx_last), .can_accept(ni_can_accept),
    .m_req(m_req[K]), .m_hdr(m_hdr[K]), .m_data(m_data[K]), .m_last(m_last[K]),
    .m_beat(m_beat[K]),
    .out_valid(net_out_valid), .out_vc(net_out_vc), .out_flit(net_out_flit),
    .out_credit(net_out_credit),
    .in_valid(net_in_valid), .in_vc(net_in_vc), .in_flit(net_in_flit),
    .in_credit(net_in_credit)
  );

endmodule
