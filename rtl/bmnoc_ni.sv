// bmnoc_ni: network interface (NI) between a cluster node's local bus and the
// local port of its router.
//
// Transmit side (bus slave): a bus transfer addressed to another cluster node
// is packetized. Its address-phase header becomes the head flit (DataType 01)
// and each data word one flit, the last one a tail flit (DataType 10); flits
// in between are DataType 00. The flits wait in a TX FIFO of two packets. The
// NI announces can_accept while the FIFO has room for a whole packet, so a
// transfer to the NI never stalls the bus. Each packet is injected on one
// virtual channel (VC) of the router's local input port: the lowest VC that is
// not in use and has all its credits back, held until the tail flit is sent.
// A flit is sent only against a credit (hop-to-hop credit flow control).
//
// Receive side (bus master): flits ejected by the router are stored per VC in
// BUF_DEPTH-flit FIFOs and a credit pulse is returned for each flit removed.
// Once a VC holds a complete packet (its tail has arrived) the NI latches the
// header, requests the bus and streams the data flits to the core named in the
// header, one word per bus beat, so a bus transfer from the NI never waits on
// the network either.
//
// Packetizing on the way out and unpacking on the way in are what an NI on a
// bus does in the BMNoC cluster node; the FIFO sizes, the whole-packet rules
// and the VC choice are this design's. Reset is active low and synchronous.
module bmnoc_ni
  import bmnoc_pkg::*;
#(
  parameter int unsigned NVC       = 2,
  parameter int unsigned BUF_DEPTH = 8,
  localparam int unsigned VW       = (NVC > 1) ? $clog2(NVC) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // bus slave side (transfers to be sent into the network)
  input  logic           s_hdr_valid,
  input  hdr_t           s_hdr,
  input  logic           s_valid,
  input  logic [31:0]    s_data,
  input  logic           s_last,
  output logic           can_accept,
  // bus master side (packets delivered from the network)
  output logic           m_req,
  output hdr_t           m_hdr,
  output logic [31:0]    m_data,
  output logic           m_last,
  input  logic           m_beat,
  // link into the router
  output logic           out_valid,
  output logic [VW-1:0]  out_vc,
  output flit_t          out_flit,
  input  logic [NVC-1:0] out_credit,
  // link out of the router
  input  logic           in_valid,
  input  logic [VW-1:0]  in_vc,
  input  flit_t          in_flit,
  output logic [NVC-1:0] in_credit
);

  localparam int unsigned TX_DEPTH = 2 * PKT_FLITS;
  localparam int unsigned TCW      = $clog2(TX_DEPTH + 1);
  localparam int unsigned CW       = $clog2(BUF_DEPTH + 1);

  // ------------------------------------------------------------- transmit
  flit_t          tx_wdata, tx_head;
  logic           tx_push, tx_pop, tx_empty, tx_full;
  logic [TCW-1:0] tx_count;

  always_comb begin
    tx_push  = s_hdr_valid || s_valid;
    tx_wdata = s_hdr_valid ? flit_t'{dtype: DT_HEAD, data: s_hdr}
                           : flit_t'{dtype: s_last ? DT_TAIL : DT_BODY, data: s_data};
  end

  bmnoc_fifo #(.T(flit_t), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .push(tx_push), .wdata(tx_wdata), .pop(tx_pop),
    .rdata(tx_head), .empty(tx_empty), .full(tx_full), .count(tx_count)
  );

  assign can_accept = (tx_count <= TCW'(TX_DEPTH - PKT_FLITS));

  logic          tx_hold;
  logic [VW-1:0] tx_vc;
  logic [CW-1:0] cred [NVC];
  logic          free_found;
  logic [VW-1:0] free_vc;

  always_comb begin
    free_found = 1'b0;
    free_vc    = '0;
    for (int unsigned v = 0; v < NVC; v++) begin
      if (!free_found && cred[v] == CW'(BUF_DEPTH)) begin
        free_found = 1'b1;
        free_vc    = VW'(v);
      end
    end
  end

  assign tx_pop = !tx_empty && ((tx_hold && cred[tx_vc] != '0) ||
                                (!tx_hold && !is_head(tx_head.dtype)));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_hold   <= 1'b0;
      tx_vc     <= '0;
      out_valid <= 1'b0;
      out_vc    <= '0;
      out_flit  <= '0;
      for (int unsigned v = 0; v < NVC; v++) cred[v] <= CW'(BUF_DEPTH);
    end else begin
      if (!tx_hold && !tx_empty && is_head(tx_head.dtype) && free_found) begin
        tx_hold <= 1'b1;
        tx_vc   <= free_vc;
      end
      out_valid <= tx_pop && tx_hold;
      if (tx_pop && tx_hold) begin
        out_vc   <= tx_vc;
        out_flit <= tx_head;
        if (is_tail(tx_head.dtype)) tx_hold <= 1'b0;
      end
      for (int unsigned v = 0; v < NVC; v++) begin
        cred[v] <= cred[v] - CW'(tx_pop && tx_hold && int'(tx_vc) == v) + CW'(out_credit[v]);
      end
    end
  end

  // -------------------------------------------------------------- receive
  flit_t         rx_head  [NVC];
  logic          rx_empty [NVC];
  logic          rx_pop   [NVC];
  logic [CW-1:0] rx_tails [NVC];   // complete packets held in this VC

  for (genvar v = 0; v < NVC; v++) begin : g_rx
    logic          unused_full;
    logic [CW-1:0] unused_count;
    logic          push;
    assign push = in_valid && int'(in_vc) == v;
    bmnoc_fifo #(.T(flit_t), .DEPTH(BUF_DEPTH)) u_rx_fifo (
      .clk, .rst_n, .push, .wdata(in_flit), .pop(rx_pop[v]),
      .rdata(rx_head[v]), .empty(rx_empty[v]), .full(unused_full), .count(unused_count)
    );
    always_ff @(posedge clk) begin
      if (!rst_n) rx_tails[v] <= '0;
      else rx_tails[v] <= rx_tails[v] + CW'(push && is_tail(in_flit.dtype))
                                      - CW'(rx_pop[v] && is_tail(rx_head[v].dtype));
    end
  end

  typedef enum logic {R_IDLE, R_SEND} rx_state_e;
  rx_state_e     rx_state;
  logic [VW-1:0] rx_vc;
  logic          pick_found;
  logic [VW-1:0] pick_vc;

  always_comb begin
    pick_found = 1'b0;
    pick_vc    = '0;
    for (int unsigned v = 0; v < NVC; v++) begin
      if (!pick_found && rx_tails[v] != '0 && !rx_empty[v]) begin
        pick_found = 1'b1;
        pick_vc    = VW'(v);
      end
    end
  end

  always_comb begin
    for (int unsigned v = 0; v < NVC; v++) rx_pop[v] = 1'b0;
    if (rx_state == R_IDLE && pick_found) rx_pop[pick_vc] = 1'b1;  // header
    if (rx_state == R_SEND && m_beat)     rx_pop[rx_vc]   = 1'b1;  // data word
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_state <= R_IDLE;
      rx_vc    <= '0;
      m_hdr    <= '0;
    end else begin
      unique case (rx_state)
        R_IDLE: if (pick_found) begin
          rx_vc <= pick_vc;
          m_hdr <= hdr_t'(rx_head[pick_vc].data);
          // a header-only packet carries nothing for a core and is dropped
          if (rx_head[pick_vc].dtype == DT_HEAD) rx_state <= R_SEND;
        end
        R_SEND: if (m_beat && is_tail(rx_head[rx_vc].dtype)) rx_state <= R_IDLE;
        default: rx_state <= R_IDLE;
      endcase
    end
  end

  assign m_req  = (rx_state == R_SEND);
  assign m_data = rx_head[rx_vc].data;
  assign m_last = is_tail(rx_head[rx_vc].dtype);

  always_ff @(posedge clk) begin
    for (int unsigned v = 0; v < NVC; v++) in_credit[v] <= rst_n && rx_pop[v];
  end

  a_no_beat_on_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                       (rx_state == R_SEND && m_beat) |-> !rx_empty[rx_vc]);

endmodule
