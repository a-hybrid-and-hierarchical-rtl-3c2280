// tb_bmnoc_cluster_node: self-checking test of one cluster node, its local bus
// and its network interface together.
//
// Four core models send transfers of 1 to 7 words, about half to other cores
// of this CN and half to other CNs. A router-port model takes the packets the
// NI sends out (8-flit buffer per VC, credits back, random stalls) and
// injects packets addressed to the cores of this CN, two VCs interleaved flit
// by flit, against the NI's credits. A monitor on the core slave ports checks
// that every transfer reaches the right core once, complete and in order; the
// router-port model checks that every remote transfer leaves as one packet
// with the bus header as its head flit and the words as the following flits.
// Counted mechanisms, each of which must happen: a local transfer, a packet
// sent out, a packet delivered from the network, the NI refusing a new
// transfer (can_accept low while a core wanted to send out) and the NI
// waiting for credits.
module tb_bmnoc_cluster_node;
  import bmnoc_pkg::*;

  localparam int K = 4, NV = 2, DEPTH = 8, PER_CORE = 30, NET_PKTS = 40;
  localparam logic [7:0] MY_ADDR = 8'h0D;       // MRid 0, ESid 3, CNid 1

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  logic          core_req [K], core_wlast[K], core_gnt[K], core_beat[K];
  hdr_t          core_hdr [K];
  logic [31:0]   core_wdata[K];
  logic          core_rx_hdr_valid[K], core_rx_valid[K];
  hdr_t          core_rx_hdr;
  logic [31:0]   core_rx_data;
  logic          core_rx_last;
  logic          net_out_valid, net_in_valid;
  logic [0:0]    net_out_vc, net_in_vc;
  flit_t         net_out_flit, net_in_flit;
  logic [NV-1:0] net_out_credit, net_in_credit;

  bmnoc_cluster_node #(.K(K), .MY_ADDR(MY_ADDR), .NVC(NV), .BUF_DEPTH(DEPTH)) u_dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, msg);
    end
  endtask

  // tag = source * 256 + sequence; source K is the network
  typedef struct { hdr_t hdr; int len; int target; bit seen; } xfer_t;  // target K: network
  xfer_t xfers [int];
  int    total = 0, done = 0;
  int    n_local = 0, n_out = 0, n_in = 0, refused = 0, credit_wait = 0;

  function automatic int tag_of(hdr_t h);
    return int'(h.src_core) * 256 + int'(h.flag);
  endfunction

  // ------------------------------------------------------------ core models
  int mq [K][$];
  bit m_act [K];
  int m_tag [K];
  int m_idx [K];
  bit s_act [K];
  int s_tag [K];
  int s_idx [K];
  // ----------------------------------------------------- router-port model
  int rq_buf [NV];
  bit rq_act [NV];
  int rq_tag [NV];
  int rq_idx [NV];
  bit rq_stall;
  int nq [$];
  int ri_cred [NV], ri_tag [NV], ri_idx [NV], ri_rr;
  bit ri_act [NV];

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < K; j++) begin
        core_req[j] <= 0; core_hdr[j] <= '0; core_wdata[j] <= '0; core_wlast[j] <= 0;
      end
      net_in_valid <= 0; net_in_vc <= '0; net_in_flit <= '0; net_out_credit <= '0;
    end else begin
      // ---- core slave ports
      for (int s = 0; s < K; s++) begin
        if (core_rx_hdr_valid[s]) begin
          int t;
          t = tag_of(core_rx_hdr);
          check(xfers.exists(t) && xfers[t].target == s, $sformatf("transfer %0h at core %0d", t, s));
          if (xfers.exists(t)) check(core_rx_hdr == xfers[t].hdr, "header altered");
          check(!s_act[s], "header during data phase");
          s_act[s] = 1; s_tag[s] = t; s_idx[s] = 0;
        end
        if (core_rx_valid[s]) begin
          int t;
          t = s_tag[s];
          check(s_act[s], "data without header");
          check(core_rx_data == {16'(t), 16'(s_idx[s])}, $sformatf("transfer %0h word %0d wrong", t, s_idx[s]));
          check(core_rx_last == (s_idx[s] == xfers[t].len - 1), "last flag wrong");
          s_idx[s]++;
          if (core_rx_last) begin
            s_act[s] = 0;
            check(!xfers[t].seen, "transfer delivered twice");
            xfers[t].seen = 1;
            done++;
            if (t / 256 == K) n_in++; else n_local++;
          end
        end
      end
      // ---- core master ports
      for (int m = 0; m < K; m++) begin
        if (m_act[m] && core_beat[m]) begin
          if (m_idx[m] == xfers[m_tag[m]].len - 1) m_act[m] = 0;
          m_idx[m]++;
        end
        if (!m_act[m] && mq[m].size() > 0) begin
          m_act[m] = 1; m_tag[m] = mq[m].pop_front(); m_idx[m] = 0;
        end
        if (m_act[m] && !core_beat[m] && xfers[m_tag[m]].target == K && !u_dut.ni_can_accept) refused++;
        core_req[m] <= m_act[m];
        if (m_act[m]) begin
          core_hdr[m]   <= xfers[m_tag[m]].hdr;
          core_wdata[m] <= {16'(m_tag[m]), 16'(m_idx[m])};
          core_wlast[m] <= (m_idx[m] == xfers[m_tag[m]].len - 1);
        end
      end
      // ---- router port: packets from the NI
      if (net_out_valid) begin
        int v;
        v = int'(net_out_vc);
        rq_buf[v]++;
        check(rq_buf[v] <= DEPTH, "NI overran the router buffer");
        if (is_head(net_out_flit.dtype)) begin
          int t;
          t = tag_of(hdr_t'(net_out_flit.data));
          check(!rq_act[v], "head inside a packet");
          check(xfers.exists(t) && xfers[t].target == K, $sformatf("packet %0h should not leave the CN", t));
          if (xfers.exists(t)) check(net_out_flit.data == xfers[t].hdr, "head flit differs from header");
          rq_act[v] = 1; rq_tag[v] = t; rq_idx[v] = 0;
        end else begin
          int t;
          t = rq_tag[v];
          check(rq_act[v], "body without head");
          check(net_out_flit.data == {16'(t), 16'(rq_idx[v])}, "packet word wrong");
          check((net_out_flit.dtype == DT_TAIL) == (rq_idx[v] == xfers[t].len - 1), "tail marking wrong");
          rq_idx[v]++;
          if (net_out_flit.dtype == DT_TAIL) begin
            rq_act[v] = 0;
            check(!xfers[t].seen, "packet sent twice");
            xfers[t].seen = 1;
            done++;
            n_out++;
          end
        end
      end
      begin
        logic [NV-1:0] cr;
        cr = '0;
        if (!rq_stall)
          for (int v = 0; v < NV; v++) if (cr == '0 && rq_buf[v] > 0) begin rq_buf[v]--; cr[v] = 1; end
        net_out_credit <= cr;
        if (rq_stall) rq_stall = ($urandom % 10) != 0;
        else          rq_stall = ($urandom % 8) == 0;
      end
      if (!u_dut.u_ni.tx_empty && ((u_dut.u_ni.tx_hold && u_dut.u_ni.cred[u_dut.u_ni.tx_vc] == 0) ||
                                   (!u_dut.u_ni.tx_hold && !u_dut.u_ni.free_found))) credit_wait++;
      // ---- router port: packets to the cores
      for (int v = 0; v < NV; v++) if (net_in_credit[v]) ri_cred[v]++;
      for (int v = 0; v < NV; v++)
        if (!ri_act[v] && nq.size() > 0) begin
          ri_act[v] = 1; ri_tag[v] = nq.pop_front(); ri_idx[v] = 0;
          break;
        end
      begin
        int pick;
        pick = -1;
        for (int k = 0; k < NV; k++) begin
          int v;
          v = (ri_rr + k) % NV;
          if (pick < 0 && ri_act[v] && ri_cred[v] > 0 && ($urandom % 3) != 0) pick = v;
        end
        net_in_valid <= (pick >= 0);
        if (pick >= 0) begin
          int t, i;
          t = ri_tag[pick];
          i = ri_idx[pick];
          net_in_vc <= 1'(pick);
          if (i == 0) net_in_flit <= flit_t'{dtype: DT_HEAD, data: xfers[t].hdr};
          else net_in_flit <= flit_t'{dtype: (i == xfers[t].len) ? DT_TAIL : DT_BODY,
                                      data: {16'(t), 16'(i - 1)}};
          ri_cred[pick]--;
          ri_idx[pick]++;
          ri_rr = (pick + 1) % NV;
          if (ri_idx[pick] == xfers[t].len + 1) ri_act[pick] = 0;
        end
      end
    end
  end

  task automatic add(int src, int seq, hdr_t h, int len, int target);
    int t;
    t = src * 256 + seq;
    h.src_core = 4'(src);
    h.flag = flag_t'(seq);
    xfers[t] = '{hdr: h, len: len, target: target, seen: 0};
    if (src == K) nq.push_back(t); else mq[src].push_back(t);
    total++;
  endtask

  initial begin
    rst_n = 1'b0;
    for (int j = 0; j < K; j++) begin m_act[j] = 0; s_act[j] = 0; end
    for (int v = 0; v < NV; v++) begin
      rq_buf[v] = 0; rq_act[v] = 0; ri_cred[v] = DEPTH; ri_act[v] = 0;
    end
    rq_stall = 0; ri_rr = 0;
    for (int m = 0; m < K; m++)
      for (int n = 0; n < PER_CORE; n++) begin
        hdr_t h;
        h = '0;
        h.src = addr_t'(MY_ADDR);
        h.dst_core = 4'($urandom % K);
        if ($urandom % 2) begin
          h.dst = addr_t'(MY_ADDR);
          add(m, n, h, 1 + $urandom % 7, int'(h.dst_core));
        end else begin
          h.dst = addr_t'(8'($urandom));
          if (h.dst == addr_t'(MY_ADDR)) h.dst.cn_id = ~h.dst.cn_id;
          add(m, n, h, 1 + $urandom % 7, K);
        end
      end
    for (int n = 0; n < NET_PKTS; n++) begin
      hdr_t h;
      h = '0;
      h.src = addr_t'(8'($urandom));
      h.dst = addr_t'(MY_ADDR);
      h.dst_core = 4'($urandom % K);
      add(K, n, h, 1 + $urandom % 7, int'(h.dst_core));
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done == total);
    repeat (20) @(posedge clk);
    foreach (xfers[t]) if (xfers[t].len > 0) check(xfers[t].seen, $sformatf("transfer %0h lost", t));
    check(n_local > 0, "no transfer between cores of the CN");
    check(n_out > 0, "no packet sent to the network");
    check(n_in > 0, "no packet delivered from the network");
    check(refused > 0, "the NI never refused a transfer");
    check(credit_wait > 0, "the NI never waited for credits");
    $display("cn: %0d local, %0d out, %0d in, %0d cycles refused by the NI, %0d cycles waiting for credits",
             n_local, n_out, n_in, refused, credit_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d transfers", done, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
