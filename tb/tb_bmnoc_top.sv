// tb_bmnoc_top: end-to-end test of the whole BMNoC at its default size: a 2x2
// mesh of routers, two cluster nodes per router, four cores per cluster node,
// 32 cores in all, with no parameter overridden.
//
// Every core is played by a model that sends transfers of 1 to 7 words to
// other cores: about a quarter to cores of its own cluster node (these stay on
// the local bus), the rest to cores anywhere else (these cross the network as
// packets, through one, two or three routers). The first phase sends one
// packet alone across two mesh hops and checks its delivery time; the second
// phase runs all 32 cores at once, the last part of it with every core sending
// to the cores of one cluster node so that packets pile up in the network.
// Monitors on all core slave ports check that every transfer reaches the right
// core once, complete, with its header and words unchanged.
//
// Mechanisms counted, each of which must happen at least once: transfers kept
// on a local bus, packets across the network, packets over two mesh hops, a
// network interface refusing a transfer (can_accept low), a network interface
// waiting for credits, a router output VC held with no credits left, both VCs
// of a mesh link held by packets at once, and the priority control raising the
// flag of a packet blocked in the middle.
module tb_bmnoc_top;
  import bmnoc_pkg::*;

  localparam int NMR = 4, CPM = 2, K = 4, NCN = NMR * CPM, NCORE = NCN * K;
  localparam int PER_CORE = 24, HOT = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  logic        core_req  [NCORE], core_wlast[NCORE], core_gnt[NCORE], core_beat[NCORE];
  hdr_t        core_hdr  [NCORE];
  logic [31:0] core_wdata[NCORE];
  logic        core_rx_hdr_valid[NCORE], core_rx_valid[NCORE];
  hdr_t        cn_rx_hdr [NCN];
  logic [31:0] cn_rx_data[NCN];
  logic        cn_rx_last[NCN];

  bmnoc_top u_dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, msg);
    end
  endtask

  // ------------------------------------------------------------ addressing
  function automatic addr_t cn_addr(int c);
    addr_t a;
    a = '0;
    a.mr_id = 3'(c / CPM);
    a.cn_id = 2'(c % CPM);
    return a;
  endfunction

  function automatic int cn_of(addr_t a);
    return int'(a.mr_id) * CPM + int'(a.cn_id);
  endfunction

  function automatic int hops(int c1, int c2);
    int m1, m2, dx, dy;
    m1 = c1 / CPM; m2 = c2 / CPM;
    dx = (m1 % 2 > m2 % 2) ? m1 % 2 - m2 % 2 : m2 % 2 - m1 % 2;
    dy = (m1 / 2 > m2 / 2) ? m1 / 2 - m2 / 2 : m2 / 2 - m1 / 2;
    return dx + dy;
  endfunction

  // tag = source core * 256 + sequence number
  function automatic int tag_of(hdr_t h);
    return (cn_of(h.src) * K + int'(h.src_core)) * 256 + int'(h.flag);
  endfunction

  typedef struct { hdr_t hdr; int len; int dst; bit seen; } xfer_t;
  xfer_t xfers [int];
  int    total = 0, done = 0, cycle = 0;

  // --------------------------------------------------------- mechanism probes
  logic cn_accept [NCN];
  logic cn_cwait  [NCN];
  logic mr_prio   [NMR];
  logic mr_nocred [NMR];
  logic mr_bothvc [NMR];
  for (genvar c = 0; c < NCN; c++) begin : g_cnp
    assign cn_accept[c] = u_dut.g_cn[c].u_cn.ni_can_accept;
    assign cn_cwait[c]  = !u_dut.g_cn[c].u_cn.u_ni.tx_empty &&
                          ((u_dut.g_cn[c].u_cn.u_ni.tx_hold &&
                            u_dut.g_cn[c].u_cn.u_ni.cred[u_dut.g_cn[c].u_cn.u_ni.tx_vc] == 0) ||
                           (!u_dut.g_cn[c].u_cn.u_ni.tx_hold && !u_dut.g_cn[c].u_cn.u_ni.free_found));
  end
  for (genvar m = 0; m < NMR; m++) begin : g_mrp
    always_comb begin
      mr_prio[m] = 1'b0; mr_nocred[m] = 1'b0; mr_bothvc[m] = 1'b0;
      for (int p = 0; p < 4 + CPM; p++) begin
        if (|u_dut.g_mr[m].u_router.sa_prio[p]) mr_prio[m] = 1'b1;
        for (int v = 0; v < 2; v++)
          if (u_dut.g_mr[m].u_router.ovc_busy[p][v] && u_dut.g_mr[m].u_router.ovc_cred[p][v] == 0)
            mr_nocred[m] = 1'b1;
        if (p < 4 && u_dut.g_mr[m].u_router.ovc_busy[p][0] && u_dut.g_mr[m].u_router.ovc_busy[p][1])
          mr_bothvc[m] = 1'b1;
      end
    end
  end

  int n_local = 0, n_remote = 0, n_2hop = 0, refused = 0, credit_wait = 0;
  int no_credit = 0, both_vc = 0, prio_events = 0;
  bit prio_prev [NMR];

  // ------------------------------------------------------------ core models
  int mq [NCORE][$];
  bit m_act [NCORE];
  int m_tag [NCORE];
  int m_idx [NCORE];
  bit s_act [NCORE];
  int s_tag [NCORE];
  int s_idx [NCORE];
  int first_start = -1, first_end = -1;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      for (int g = 0; g < NCORE; g++) begin
        core_req[g] <= 0; core_hdr[g] <= '0; core_wdata[g] <= '0; core_wlast[g] <= 0;
      end
    end else begin
      // ---- slave ports
      for (int g = 0; g < NCORE; g++) begin
        int c;
        c = g / K;
        if (core_rx_hdr_valid[g]) begin
          int t;
          t = tag_of(cn_rx_hdr[c]);
          check(xfers.exists(t) && xfers[t].dst == g, $sformatf("transfer %0h at core %0d", t, g));
          if (xfers.exists(t)) check(cn_rx_hdr[c] == xfers[t].hdr, "header altered");
          check(!s_act[g], "header during data phase");
          s_act[g] = 1; s_tag[g] = t; s_idx[g] = 0;
        end
        if (core_rx_valid[g]) begin
          int t;
          t = s_tag[g];
          check(s_act[g], "data without header");
          check(cn_rx_data[c] == {16'(t), 16'(s_idx[g])},
                $sformatf("transfer %0h word %0d is %08h", t, s_idx[g], cn_rx_data[c]));
          check(cn_rx_last[c] == (s_idx[g] == xfers[t].len - 1), "last flag wrong");
          s_idx[g]++;
          if (cn_rx_last[c]) begin
            int sc;
            s_act[g] = 0;
            check(!xfers[t].seen, "transfer delivered twice");
            xfers[t].seen = 1;
            done++;
            if (first_end < 0) first_end = cycle;
            sc = (t / 256) / K;
            if (sc == c) n_local++;
            else begin
              n_remote++;
              if (hops(sc, c) == 2) n_2hop++;
            end
          end
        end
      end
      // ---- master ports
      for (int g = 0; g < NCORE; g++) begin
        if (m_act[g] && core_beat[g]) begin
          if (m_idx[g] == xfers[m_tag[g]].len - 1) m_act[g] = 0;
          m_idx[g]++;
        end
        if (!m_act[g] && mq[g].size() > 0) begin
          m_act[g] = 1; m_tag[g] = mq[g].pop_front(); m_idx[g] = 0;
          if (first_start < 0) first_start = cycle;
        end
        if (m_act[g] && !core_beat[g] && xfers[m_tag[g]].dst / K != g / K && !cn_accept[g / K])
          refused++;
        core_req[g] <= m_act[g];
        if (m_act[g]) begin
          core_hdr[g]   <= xfers[m_tag[g]].hdr;
          core_wdata[g] <= {16'(m_tag[g]), 16'(m_idx[g])};
          core_wlast[g] <= (m_idx[g] == xfers[m_tag[g]].len - 1);
        end
      end
      // ---- mechanisms
      for (int c = 0; c < NCN; c++) if (cn_cwait[c]) credit_wait++;
      for (int m = 0; m < NMR; m++) begin
        if (mr_nocred[m]) no_credit++;
        if (mr_bothvc[m]) both_vc++;
        if (mr_prio[m] && !prio_prev[m]) prio_events++;
        prio_prev[m] = mr_prio[m];
      end
    end
  end

  task automatic add(int src, int dst, int len);
    hdr_t h;
    int   t, seq;
    seq = 0;
    while (xfers.exists(src * 256 + seq)) seq++;
    t = src * 256 + seq;
    h = '0;
    h.src      = cn_addr(src / K);
    h.src_core = 4'(src % K);
    h.dst      = cn_addr(dst / K);
    h.dst_core = 4'(dst % K);
    h.flag     = flag_t'(seq);
    xfers[t] = '{hdr: h, len: len, dst: dst, seen: 0};
    mq[src].push_back(t);
    total++;
  endtask

  initial begin
    rst_n = 1'b0;
    for (int g = 0; g < NCORE; g++) begin m_act[g] = 0; s_act[g] = 0; end
    for (int m = 0; m < NMR; m++) prio_prev[m] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // one packet alone: core 0 (CN 0 on MR 0) to core 29 (CN 7 on MR 3), 4 words.
    // Counted from the clock edge that raises the request: the header is on
    // the source bus 2 edges later and in the NI FIFO 1 edge after that; the
    // NI claims a VC and drives the head flit 2 edges later (edge 5); three
    // routers take 5 edges each (edge 20); the tail follows 4 flits behind
    // (edge 24) and is in the NI's receive FIFO at edge 25; the NI requests
    // the destination bus at edge 26, which then behaves like the source bus:
    // last word driven 6 edges after the request, seen by the core one edge
    // later. 26 + 6 + 1 = 33.
    add(0, 29, 4);
    wait (done == 1);
    begin
      int lat;
      lat = first_end - first_start;
      $display("top: one 4-word packet over two mesh hops delivered %0d cycles after the request", lat);
      check(lat == 33, $sformatf("end-to-end delivery time %0d cycles, expected 33", lat));
    end

    // every core at once, random destinations
    for (int g = 0; g < NCORE; g++)
      for (int n = 0; n < PER_CORE; n++) begin
        int d;
        if ($urandom % 4 == 0) d = (g / K) * K + int'($urandom % K);
        else d = int'($urandom % NCORE);
        if (d == g) d = (g + 1) % NCORE;
        add(g, d, 1 + $urandom % 7);
      end
    // then everyone sends to the cores of CN 3
    for (int g = 0; g < NCORE; g++)
      for (int n = 0; n < HOT; n++) begin
        int d;
        d = 3 * K + int'($urandom % K);
        if (d == g) d = 3 * K + (d + 1) % K;
        add(g, d, 1 + $urandom % 7);
      end
    wait (done == total);
    repeat (20) @(posedge clk);
    foreach (xfers[t]) if (xfers[t].len > 0) check(xfers[t].seen, $sformatf("transfer %0h lost", t));
    check(n_local > 0,     "no transfer stayed on a local bus");
    check(n_remote > 0,    "no packet crossed the network");
    check(n_2hop > 0,      "no packet crossed two mesh hops");
    check(refused > 0,     "no network interface ever refused a transfer");
    check(credit_wait > 0, "no network interface ever waited for credits");
    check(no_credit > 0,   "no router output ever ran out of credits");
    check(both_vc > 0,     "no mesh link ever carried two packets at once");
    check(prio_events > 0, "the priority control never raised a flag");
    $display("top: %0d transfers in %0d cycles: %0d local, %0d remote (%0d over two hops)",
             done, cycle, n_local, n_remote, n_2hop);
    $display("top: NI refused %0d core-cycles, NI credit wait %0d, router no-credit %0d, both VCs %0d, priority flags %0d",
             refused, credit_wait, no_credit, both_vc, prio_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d transfers", done, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
