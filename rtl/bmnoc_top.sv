// bmnoc_top: a (4,2)-BMNoC, the busmesh network-on-chip with packet
// transmission priority control: a MESH_X x MESH_Y mesh of mesh routers (MRs),
// CN_PER_MR cluster nodes (CNs) on every MR, K cores on the local bus of every
// CN.
//
// With the defaults that is four MRs in a 2x2 mesh and eight CNs of four cores
// each, 32 cores in all: the shape of the busmesh NoC with cluster nodes
// attached straight to the mesh routers, sized as in its evaluation with the
// 32-task telecom benchmark (four cores per CN, two CNs per MR). MR number
// m = y * MESH_X + x sits at column x, row y; CN number c = m * CN_PER_MR + l
// is on local port l of MR m and has the address {MRid = m, ESid = 0,
// CNid = l}; core number c * K + j is core j of CN c.
//
// ES_PER_MR > 0 inserts the edge-switch level of the hierarchical BMNoC: every
// MR then has ES_PER_MR local ports, each leading to an edge switch (ES, a
// bmnoc_router in ROLE_ES) with CN_PER_MR / ES_PER_MR CNs under it. CN number
// c is then CN l of ES e of MR m, with c = (m * ES_PER_MR + e) * CN_PER_ES + l
// and address {m, e, l}; ES_PER_MR = 1 with CN_PER_MR = 2 and K = 4 is the
// (4,2,1) configuration. The default, 0, has no edge switches and ESid 0;
// the edge-switch link signals are then tied off and nothing reads them.
//
// Each MR is a bmnoc_router with four mesh ports (N, E, S, W) and CN_PER_MR
// local ports, six with the defaults. Mesh ports at the border of the mesh are
// left unconnected (no flits in, no credits back); dimension-ordered routing
// never uses them. The cores are not part of this design: their bus master and
// slave ports are the ports of this module (see bmnoc_local_bus for the
// transfer protocol). Reset is active low and synchronous.
module bmnoc_top
  import bmnoc_pkg::*;
#(
  parameter int unsigned MESH_X     = 2,
  parameter int unsigned MESH_Y     = 2,
  parameter int unsigned CN_PER_MR  = 2,
  parameter int unsigned K          = 4,
  parameter int unsigned NVC        = 2,
  parameter int unsigned BUF_DEPTH  = 8,
  parameter int unsigned HDR_CYCLES = 4,
  parameter bit          PTPCM      = 1'b1,
  parameter int unsigned ES_PER_MR  = 0,    // 0: CNs on the MRs directly
  localparam int unsigned NMR       = MESH_X * MESH_Y,
  localparam int unsigned NCN       = NMR * CN_PER_MR,
  localparam int unsigned NCORE     = NCN * K
) (
  input  logic        clk,
  input  logic        rst_n,
  // core master ports
  input  logic        core_req  [NCORE],
  input  hdr_t        core_hdr  [NCORE],
  input  logic [31:0] core_wdata[NCORE],
  input  logic        core_wlast[NCORE],
  output logic        core_gnt  [NCORE],
  output logic        core_beat [NCORE],
  // core slave ports; header, data and last are shared by the cores of a CN
  output logic        core_rx_hdr_valid[NCORE],
  output logic        core_rx_valid    [NCORE],
  output hdr_t        cn_rx_hdr [NCN],
  output logic [31:0] cn_rx_data[NCN],
  output logic        cn_rx_last[NCN]
);

  localparam int unsigned NLOC      = (ES_PER_MR > 0) ? ES_PER_MR : CN_PER_MR;
  localparam int unsigned NPORTS    = 4 + NLOC;
  localparam int unsigned VW        = (NVC > 1) ? $clog2(NVC) : 1;
  localparam int unsigned CN_PER_ES = (ES_PER_MR > 0) ? CN_PER_MR / ES_PER_MR : 1;
  localparam int unsigned NES       = (ES_PER_MR > 0) ? NMR * ES_PER_MR : 1;
  localparam int unsigned ES_PORTS  = 1 + CN_PER_ES;

  // router ports
  logic            r_in_valid  [NMR][NPORTS];
  logic [VW-1:0]   r_in_vc     [NMR][NPORTS];
  flit_t           r_in_flit   [NMR][NPORTS];
  logic [NVC-1:0]  r_in_credit [NMR][NPORTS];
  logic            r_out_valid [NMR][NPORTS];
  logic [VW-1:0]   r_out_vc    [NMR][NPORTS];
  flit_t           r_out_flit  [NMR][NPORTS];
  logic [NVC-1:0]  r_out_credit[NMR][NPORTS];

  // CN network ports
  logic            cn_out_valid [NCN];
  logic [VW-1:0]   cn_out_vc    [NCN];
  flit_t           cn_out_flit  [NCN];
  logic [NVC-1:0]  cn_out_credit[NCN];
  logic [NVC-1:0]  cn_in_credit [NCN];
  logic            cn_in_valid  [NCN];
  logic [VW-1:0]   cn_in_vc     [NCN];
  flit_t           cn_in_flit   [NCN];

  // edge switch ports (dummies when ES_PER_MR = 0): port 0 up, 1.. CNs
  logic            e_in_valid  [NES][ES_PORTS];
  logic [VW-1:0]   e_in_vc     [NES][ES_PORTS];
  flit_t           e_in_flit   [NES][ES_PORTS];
  logic [NVC-1:0]  e_in_credit [NES][ES_PORTS];
  logic            e_out_valid [NES][ES_PORTS];
  logic [VW-1:0]   e_out_vc    [NES][ES_PORTS];
  flit_t           e_out_flit  [NES][ES_PORTS];
  logic [NVC-1:0]  e_out_credit[NES][ES_PORTS];

  // neighbour of MR m through mesh port p, or -1 at the border
  function automatic int neighbour(int m, int p);
    int x, y;
    x = m % MESH_X;
    y = m / MESH_X;
    unique case (p)
      PORT_N: return (y + 1 < MESH_Y) ? m + MESH_X : -1;
      PORT_E: return (x + 1 < MESH_X) ? m + 1      : -1;
      PORT_S: return (y > 0)          ? m - MESH_X : -1;
      default: return (x > 0)         ? m - 1      : -1;
    endcase
  endfunction

  // port on the neighbour facing back
  function automatic int opposite(int p);
    return (p + 2) % 4;
  endfunction

  always_comb begin
    int nb;
    for (int m = 0; m < NMR; m++) begin
      for (int p = 0; p < 4; p++) begin
        nb = neighbour(m, p);
        if (nb >= 0) begin
          r_in_valid[m][p]   = r_out_valid[nb][opposite(p)];
          r_in_vc[m][p]      = r_out_vc[nb][opposite(p)];
          r_in_flit[m][p]    = r_out_flit[nb][opposite(p)];
          r_out_credit[m][p] = r_in_credit[nb][opposite(p)];
        end else begin
          r_in_valid[m][p]   = 1'b0;
          r_in_vc[m][p]      = '0;
          r_in_flit[m][p]    = '0;
          r_out_credit[m][p] = '0;
        end
      end
      if (ES_PER_MR == 0) begin
        for (int l = 0; l < CN_PER_MR; l++) begin
          r_in_valid[m][4+l]   = cn_out_valid[m*CN_PER_MR + l];
          r_in_vc[m][4+l]      = cn_out_vc[m*CN_PER_MR + l];
          r_in_flit[m][4+l]    = cn_out_flit[m*CN_PER_MR + l];
          r_out_credit[m][4+l] = cn_in_credit[m*CN_PER_MR + l];
          cn_out_credit[m*CN_PER_MR + l] = r_in_credit[m][4+l];
          cn_in_valid[m*CN_PER_MR + l]   = r_out_valid[m][4+l];
          cn_in_vc[m*CN_PER_MR + l]      = r_out_vc[m][4+l];
          cn_in_flit[m*CN_PER_MR + l]    = r_out_flit[m][4+l];
        end
      end else begin
        for (int e = 0; e < int'(ES_PER_MR); e++) begin
          r_in_valid[m][4+e]   = e_out_valid[m*ES_PER_MR + e][0];
          r_in_vc[m][4+e]      = e_out_vc[m*ES_PER_MR + e][0];
          r_in_flit[m][4+e]    = e_out_flit[m*ES_PER_MR + e][0];
          r_out_credit[m][4+e] = e_in_credit[m*ES_PER_MR + e][0];
        end
      end
    end
    for (int s = 0; s < NES; s++)
      for (int p = 0; p < ES_PORTS; p++) begin
        e_in_valid[s][p]   = 1'b0;
        e_in_vc[s][p]      = '0;
        e_in_flit[s][p]    = '0;
        e_out_credit[s][p] = '0;
      end
    if (ES_PER_MR > 0) begin
      for (int s = 0; s < int'(NMR * ES_PER_MR); s++) begin
        e_in_valid[s][0]   = r_out_valid[s / ES_PER_MR][4 + s % ES_PER_MR];
        e_in_vc[s][0]      = r_out_vc[s / ES_PER_MR][4 + s % ES_PER_MR];
        e_in_flit[s][0]    = r_out_flit[s / ES_PER_MR][4 + s % ES_PER_MR];
        e_out_credit[s][0] = r_in_credit[s / ES_PER_MR][4 + s % ES_PER_MR];
        for (int l = 0; l < CN_PER_ES; l++) begin
          e_in_valid[s][1+l]   = cn_out_valid[s*CN_PER_ES + l];
          e_in_vc[s][1+l]      = cn_out_vc[s*CN_PER_ES + l];
          e_in_flit[s][1+l]    = cn_out_flit[s*CN_PER_ES + l];
          e_out_credit[s][1+l] = cn_in_credit[s*CN_PER_ES + l];
          cn_out_credit[s*CN_PER_ES + l] = e_in_credit[s][1+l];
          cn_in_valid[s*CN_PER_ES + l]   = e_out_valid[s][1+l];
          cn_in_vc[s*CN_PER_ES + l]      = e_out_vc[s][1+l];
          cn_in_flit[s*CN_PER_ES + l]    = e_out_flit[s][1+l];
        end
      end
    end
  end

  for (genvar m = 0; m < NMR; m++) begin : g_mr
    bmnoc_router #(
      .ROLE(ROLE_MR), .NPORTS(NPORTS), .N_LOCAL(NLOC), .NVC(NVC),
      .BUF_DEPTH(BUF_DEPTH), .HDR_CYCLES(HDR_CYCLES),
      .MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_MR(m), .MY_ES(0),
      .LOCAL_BY_ES(ES_PER_MR > 0), .PTPCM(PTPCM)
    ) u_router (
      .clk, .rst_n,
      .in_valid(r_in_valid[m]), .in_vc(r_in_vc[m]), .in_flit(r_in_flit[m]),
      .in_credit(r_in_credit[m]),
      .out_valid(r_out_valid[m]), .out_vc(r_out_vc[m]), .out_flit(r_out_flit[m]),
      .out_credit(r_out_credit[m])
    );
  end

  if (ES_PER_MR > 0) begin : g_es_level
    for (genvar s = 0; s < NMR * ES_PER_MR; s++) begin : g_es
      bmnoc_router #(
        .ROLE(ROLE_ES), .NPORTS(ES_PORTS), .N_LOCAL(CN_PER_ES), .NVC(NVC),
        .BUF_DEPTH(BUF_DEPTH), .HDR_CYCLES(HDR_CYCLES),
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_MR(s / ES_PER_MR), .MY_ES(s % ES_PER_MR),
        .PTPCM(PTPCM)
      ) u_es (
        .clk, .rst_n,
        .in_valid(e_in_valid[s]), .in_vc(e_in_vc[s]), .in_flit(e_in_flit[s]),
        .in_credit(e_in_credit[s]),
        .out_valid(e_out_valid[s]), .out_vc(e_out_vc[s]), .out_flit(e_out_flit[s]),
        .out_credit(e_out_credit[s])
      );
    end
  end else begin : g_no_es
    always_comb
      for (int s = 0; s < NES; s++)
        for (int p = 0; p < ES_PORTS; p++) begin
          e_in_credit[s][p] = '0;
          e_out_valid[s][p] = 1'b0;
          e_out_vc[s][p]    = '0;
          e_out_flit[s][p]  = '0;
        end
  end

  for (genvar c = 0; c < NCN; c++) begin : g_cn
    localparam int unsigned M = c / CN_PER_MR;
    localparam int unsigned E = (ES_PER_MR > 0) ? (c % CN_PER_MR) / CN_PER_ES : 0;
    localparam int unsigned L = (ES_PER_MR > 0) ? c % CN_PER_ES : c % CN_PER_MR;
    localparam logic [7:0] ADDR = {3'(M), 3'(E), 2'(L)};

    logic        req  [K], wlast[K], gnt[K], beat[K], rxh[K], rxv[K];
    hdr_t        hdr  [K];
    logic [31:0] wdata[K];

    always_comb begin
      for (int j = 0; j < K; j++) begin
        req[j]   = core_req[c*K + j];
        hdr[j]   = core_hdr[c*K + j];
        wdata[j] = core_wdata[c*K + j];
        wlast[j] = core_wlast[c*K + j];
        core_gnt[c*K + j]          = gnt[j];
        core_beat[c*K + j]         = beat[j];
        core_rx_hdr_valid[c*K + j] = rxh[j];
        core_rx_valid[c*K + j]     = rxv[j];
      end
    end

    bmnoc_cluster_node #(
      .K(K), .MY_ADDR(ADDR), .NVC(NVC), .BUF_DEPTH(BUF_DEPTH)
    ) u_cn (
      .clk, .rst_n,
      .core_req(req), .core_hdr(hdr), .core_wdata(wdata), .core_wlast(wlast),
      .core_gnt(gnt), .core_beat(beat),
      .core_rx_hdr_valid(rxh), .core_rx_valid(rxv),
      .core_rx_hdr(cn_rx_hdr[c]), .core_rx_data(cn_rx_data[c]), .core_rx_last(cn_rx_last[c]),
      .net_out_valid(cn_out_valid[c]), .net_out_vc(cn_out_vc[c]),
      .net_out_flit(cn_out_flit[c]), .net_out_credit(cn_out_credit[c]),
      .net_in_valid(cn_in_valid[c]), .net_in_vc(cn_in_vc[c]),
      .net_in_flit(cn_in_flit[c]), .net_in_credit(cn_in_credit[c])
    );
  end

endmodule
