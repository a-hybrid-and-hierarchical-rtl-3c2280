// tb_bmnoc_local_bus: self-checking test of the cluster node's local bus.
//
// Five master models (four cores and the NI position) issue transfers of 1 to
// 7 words to random targets: cores of this CN, a core number that does not
// exist here, and other CNs (which must go to the NI slave). A monitor on the
// slave side checks that each header reaches exactly the slave it should, that
// the data words follow in order with the last one marked, and that every
// transfer is seen once. The first transfer, on an idle bus, must show its
// header two cycles and its first word three cycles after the request. While
// ni_can_accept is low no transfer may start towards the NI; the test counts
// cycles in which a waiting NI transfer was held back and fails if there were
// none.
module tb_bmnoc_local_bus;
  import bmnoc_pkg::*;

  localparam int K = 4, NM = K + 1, PER_MASTER = 30;
  localparam logic [7:0] MY_ADDR = 8'h21;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  logic        m_req [NM], m_last[NM], m_gnt[NM], m_beat[NM];
  hdr_t        m_hdr [NM];
  logic [31:0] m_data[NM];
  logic        s_hdr_valid[NM], s_valid[NM], s_last;
  hdr_t        s_hdr;
  logic [31:0] s_data;
  logic        ni_can_accept;

  bmnoc_local_bus #(.K(K), .MY_ADDR(MY_ADDR)) u_dut (
    .clk, .rst_n, .m_req, .m_hdr, .m_data, .m_last, .m_gnt, .m_beat,
    .s_hdr_valid, .s_hdr, .s_valid, .s_data, .s_last, .ni_can_accept
  );

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, msg);
    end
  endtask

  typedef struct {
    hdr_t hdr;
    int   len;
    int   target;   // -1: no slave
    bit   seen;
  } xfer_t;

  xfer_t xfers [int];      // by tag = master * 256 + sequence
  int    mq [NM][$];
  bit    m_act [NM];
  int    m_tag [NM];
  int    m_idx [NM];
  int    cycle = 0, done = 0, total = 0, dropped = 0, held_back = 0;
  int    first_req = -1, first_hdr = -1, first_data = -1;
  bit    s_act [NM];
  int    s_tag [NM];
  int    s_idx [NM];

  function automatic int exp_target(hdr_t h);
    if (h.dst == addr_t'(MY_ADDR)) return (h.dst_core < K) ? int'(h.dst_core) : -1;
    return K;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      for (int m = 0; m < NM; m++) begin
        m_req[m] <= 1'b0; m_hdr[m] <= '0; m_data[m] <= '0; m_last[m] <= 1'b0;
      end
    end else begin
      // ---- slave monitor (values of the cycle that just ended)
      for (int s = 0; s < NM; s++) begin
        if (s_hdr_valid[s]) begin
          int t;
          t = int'(s_hdr.src_core) * 256 + int'(s_hdr.flag);
          check(xfers.exists(t), $sformatf("slave %0d got unknown header", s));
          if (xfers.exists(t)) begin
            check(xfers[t].target == s, $sformatf("transfer %0h at slave %0d, expected %0d", t, s, xfers[t].target));
            check(s_hdr == xfers[t].hdr, "header altered");
          end
          check(!s_act[s], "header during data phase");
          s_act[s] = 1; s_tag[s] = t; s_idx[s] = 0;
          if (first_hdr < 0) first_hdr = cycle - 1;
        end
        if (s_valid[s]) begin
          int t;
          t = s_tag[s];
          check(s_act[s], "data without header");
          check(s_data == {16'(t), 16'(s_idx[s])}, $sformatf("transfer %0h word %0d data %08h", t, s_idx[s], s_data));
          check(s_last == (s_idx[s] == xfers[t].len - 1), $sformatf("transfer %0h last flag wrong", t));
          if (first_data < 0) first_data = cycle - 1;
          s_idx[s]++;
          if (s_last) begin
            s_act[s] = 0;
            check(!xfers[t].seen, "transfer seen twice");
            xfers[t].seen = 1;
            done++;
          end
        end
      end
      // ---- masters
      for (int m = 0; m < NM; m++) begin
        if (m_act[m] && m_beat[m]) begin
          if (m_idx[m] == xfers[m_tag[m]].len - 1) begin
            m_act[m] = 0;
            if (xfers[m_tag[m]].target < 0) begin dropped++; done++; end
          end
          m_idx[m]++;
        end
        if (m_act[m] && !m_beat[m] && xfers[m_tag[m]].target == K && !ni_can_accept &&
            u_dut.state == 0) held_back++;
        if (!m_act[m] && mq[m].size() > 0) begin
          m_act[m] = 1;
          m_tag[m] = mq[m].pop_front();
          m_idx[m] = 0;
          if (first_req < 0) first_req = cycle;
        end
        m_req[m] <= m_act[m];
        if (m_act[m]) begin
          m_hdr[m]  <= xfers[m_tag[m]].hdr;
          m_data[m] <= {16'(m_tag[m]), 16'(m_idx[m])};
          m_last[m] <= (m_idx[m] == xfers[m_tag[m]].len - 1);
        end
      end
    end
  end

  // the NI side refuses new packets now and then
  always @(posedge clk) ni_can_accept <= ($urandom % 4) != 0;

  task automatic add(int m, int seq, hdr_t h, int len);
    int t;
    t = m * 256 + seq;
    h.src_core = 4'(m);
    h.flag = flag_t'(seq);
    xfers[t] = '{hdr: h, len: len, target: exp_target(h), seen: 0};
    mq[m].push_back(t);
    total++;
  endtask

  initial begin
    hdr_t h;
    rst_n = 1'b0;
    for (int m = 0; m < NM; m++) begin m_act[m] = 0; s_act[m] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // one transfer on an idle bus: core 1 to core 3, 4 words
    h = '0; h.dst = addr_t'(MY_ADDR); h.dst_core = 4'd3;
    h.src = addr_t'(MY_ADDR);
    add(1, 0, h, 4);
    wait (done == 1);
    check(first_hdr - first_req == 2, $sformatf("request to header %0d cycles, expected 2", first_hdr - first_req));
    check(first_data - first_req == 3, $sformatf("request to data %0d cycles, expected 3", first_data - first_req));

    // random transfers from every master
    for (int m = 0; m < NM; m++) begin
      for (int n = 1; n <= PER_MASTER; n++) begin
        int r;
        h = '0;
        h.src = addr_t'(MY_ADDR);
        r = $urandom % 10;
        if (m == K || r < 5) begin       // the NI only delivers locally
          h.dst = addr_t'(MY_ADDR);
          h.dst_core = 4'($urandom % K);
        end else if (r < 6) begin
          h.dst = addr_t'(MY_ADDR);
          h.dst_core = 4'd9;             // no such core
        end else begin
          h.dst = addr_t'(8'($urandom));
          if (h.dst == addr_t'(MY_ADDR)) h.dst.mr_id = ~h.dst.mr_id;
        end
        add(m, n, h, 1 + $urandom % 7);
      end
    end
    wait (done == total);
    repeat (5) @(posedge clk);
    foreach (xfers[t]) if (xfers[t].len > 0 && xfers[t].target >= 0) check(xfers[t].seen, $sformatf("transfer %0h lost", t));
    check(held_back > 0, "NI back-pressure never held a transfer");
    check(dropped > 0, "no transfer to a missing core was tried");
    $display("bus: %0d transfers, %0d to no slave, %0d cycles NI transfers held back",
             total, dropped, held_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d transfers", done, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // no transfer to the NI may start while it cannot accept
  always @(posedge clk) begin
    if (rst_n && u_dut.state == 0 && u_dut.pick_valid && m_act[u_dut.pick]
        && xfers[m_tag[u_dut.pick]].target == K)
      check(ni_can_accept, "transfer to the NI started while it could not accept");
  end

endmodule
