// tb_bmnoc_router: self-checking test of a mesh router (MRid 0, the
// south-west corner of a 2x2 mesh) at its default sizes: six ports, two VCs,
// 8-flit buffers, four header cycles.
//
// The testbench plays every neighbour. Upstream models obey the credit rules
// (a flit only against a credit, a new packet on a VC only when all its
// credits are back) and interleave two packets per input link on the two VCs.
// Downstream models hold what they receive in per-VC buffers of 8 flits,
// check that the router never overfills them, and drain them one flit per
// cycle, except during random stall periods that block packets in the middle
// and so exercise the priority control.
//
// Checks: the first packet, alone in the router, leaves five cycles after it
// arrived with its flits back to back; every packet leaves on the port given
// by X-then-Y routing, on one VC, complete, in order and unaltered; no buffer
// overflows; all packets arrive. The test also counts blocked-packet priority
// flags being raised and cycles in which both VCs of an output were held, and
// fails if either never happened.
module tb_bmnoc_router;
  import bmnoc_pkg::*;

  localparam int NP = 6, NV = 2, DEPTH = 8, PKTS_PER_PORT = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  logic           in_valid [NP];
  logic [0:0]     in_vc    [NP];
  flit_t          in_flit  [NP];
  logic [NV-1:0]  in_credit[NP];
  logic           out_valid[NP];
  logic [0:0]     out_vc   [NP];
  flit_t          out_flit [NP];
  logic [NV-1:0]  out_credit[NP];

  bmnoc_router #(.MY_MR(0)) u_dut (
    .clk, .rst_n, .in_valid, .in_vc, .in_flit, .in_credit,
    .out_valid, .out_vc, .out_flit, .out_credit
  );

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, msg);
    end
  endtask

  // ---------------------------------------------------------- packet table
  typedef struct {
    addr_t dst;
    int    len;      // flits, head included
    int    port;     // expected output port
    bit    done;
  } pkt_t;

  pkt_t pkts [int];  // by 16-bit tag

  function automatic int exp_port(addr_t d);
    // router at x=0, y=0 of a 2x2 mesh
    int tx = d.mr_id % 2, ty = d.mr_id / 2;
    if (tx > 0) return PORT_E;
    if (ty > 0) return PORT_N;
    return PORT_LOCAL0 + d.cn_id;
  endfunction

  function automatic flit_t make_flit(int tag, int i, int len, addr_t dst);
    hdr_t h;
    if (i == 0) begin
      h = '0;
      h.dst = dst;
      h.flag = flag_t'(tag[15:8]);
      h.dst_core = tag[7:4];
      h.src_core = tag[3:0];
      return flit_t'{dtype: DT_HEAD, data: h};
    end
    return flit_t'{dtype: (i == len - 1) ? DT_TAIL : DT_BODY, data: {16'(tag), 16'(i)}};
  endfunction

  // ------------------------------------------------------- upstream models
  int queue_tags [NP][$];
  bit up_act [NP][NV];
  int up_tag [NP][NV];
  int up_idx [NP][NV];
  int up_cred[NP][NV];
  int up_rr  [NP];

  // ----------------------------------------------------- downstream models
  int  dn_buf [NP][NV];
  bit  dn_act [NP][NV];
  int  dn_tag [NP][NV];
  int  dn_idx [NP][NV];
  bit  dn_stall[NP];
  int  delivered = 0, total = 0;
  int  cycle = 0;
  int  prio_events = 0, both_vc_cycles = 0;
  bit  prio_prev [NP];

  // latency of the first packet
  int  first_drive = -1, first_seen = -1, first_last = -1;
  bit  lat_phase;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        in_valid[p]   <= 1'b0;
        in_vc[p]      <= '0;
        in_flit[p]    <= '0;
        out_credit[p] <= '0;
      end
    end else begin
      for (int p = 0; p < NP; p++) begin
        // ---------------- upstream p
        int pick;
        for (int v = 0; v < NV; v++) if (in_credit[p][v]) up_cred[p][v]++;
        for (int v = 0; v < NV; v++) begin
          if (!up_act[p][v] && up_cred[p][v] == DEPTH && queue_tags[p].size() > 0) begin
            up_act[p][v] = 1;
            up_tag[p][v] = queue_tags[p].pop_front();
            up_idx[p][v] = 0;
            break;
          end
        end
        pick = -1;
        for (int k = 0; k < NV; k++) begin
          int v;
          v = (up_rr[p] + k) % NV;
          if (pick < 0 && up_act[p][v] && up_cred[p][v] > 0) pick = v;
        end
        in_valid[p] <= (pick >= 0);
        if (pick >= 0) begin
          int t;
          t = up_tag[p][pick];
          in_vc[p]   <= 1'(pick);
          in_flit[p] <= make_flit(t, up_idx[p][pick], pkts[t].len, pkts[t].dst);
          if (first_drive < 0 && lat_phase) first_drive = cycle;
          up_cred[p][pick]--;
          up_idx[p][pick]++;
          up_rr[p] = (pick + 1) % NV;
          if (up_idx[p][pick] == pkts[t].len) up_act[p][pick] = 0;
        end

        // ---------------- downstream p: receive
        if (out_valid[p]) begin
          int v;
          flit_t f;
          v = int'(out_vc[p]);
          f = out_flit[p];
          dn_buf[p][v]++;
          check(dn_buf[p][v] <= DEPTH, $sformatf("port %0d vc %0d buffer overflow", p, v));
          if (is_head(f.dtype)) begin
            hdr_t h;
            int t;
            h = hdr_t'(f.data);
            t = {h.flag, h.dst_core, h.src_core};
            check(!dn_act[p][v], $sformatf("port %0d vc %0d head inside a packet", p, v));
            check(pkts.exists(t) && !pkts[t].done, $sformatf("unknown packet %0h", t));
            if (pkts.exists(t)) check(pkts[t].port == p,
                 $sformatf("packet %0h on port %0d, expected %0d", t, p, pkts[t].port));
            dn_act[p][v] = 1; dn_tag[p][v] = t; dn_idx[p][v] = 1;
            if (lat_phase && first_seen < 0) first_seen = cycle;
          end else begin
            int t;
            t = dn_tag[p][v];
            check(dn_act[p][v], $sformatf("port %0d vc %0d body without head", p, v));
            check(f.data == {16'(t), 16'(dn_idx[p][v])},
                  $sformatf("packet %0h flit %0d data %08h", t, dn_idx[p][v], f.data));
            if (f.dtype == DT_TAIL) begin
              check(dn_idx[p][v] == pkts[t].len - 1, $sformatf("packet %0h early tail", t));
              pkts[t].done = 1;
              dn_act[p][v] = 0;
              delivered++;
              if (lat_phase && first_last < 0) first_last = cycle;
            end
            dn_idx[p][v]++;
          end
        end
        // ---------------- downstream p: drain and return credits
        begin
          logic [NV-1:0] cr;
          cr = '0;
          if (!dn_stall[p]) begin
            for (int k = 0; k < NV; k++) begin
              int v;
              v = (cycle + k) % NV;
              if (cr == '0 && dn_buf[p][v] > 0) begin
                dn_buf[p][v]--;
                cr[v] = 1'b1;
              end
            end
          end
          out_credit[p] <= cr;
        end
        if (!lat_phase) begin
          if (dn_stall[p]) dn_stall[p] = ($urandom % 8) != 0;
          else             dn_stall[p] = ($urandom % 24) == 0;
        end
        // ---------------- mechanism counters
        if (u_dut.ovc_busy[p][0] && u_dut.ovc_busy[p][1]) both_vc_cycles++;
        if ((|u_dut.sa_prio[p]) && !prio_prev[p]) prio_events++;
        prio_prev[p] = |u_dut.sa_prio[p];
      end
    end
  end

  function automatic addr_t rand_dst();
    addr_t a = '0;
    a.mr_id = 3'($urandom % 4);
    a.cn_id = 2'($urandom % 2);
    return a;
  endfunction

  initial begin
    int tag;
    rst_n = 1'b0;
    lat_phase = 1'b1;
    for (int p = 0; p < NP; p++) begin
      up_rr[p] = 0; dn_stall[p] = 0; prio_prev[p] = 0;
      for (int v = 0; v < NV; v++) begin
        up_act[p][v] = 0; up_cred[p][v] = DEPTH; dn_buf[p][v] = 0; dn_act[p][v] = 0;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // one packet alone: local port 0 to MR1, 8 flits
    begin
      addr_t d = '0;
      d.mr_id = 3'd1;
      tag = 16'h0001;
      pkts[tag] = '{dst: d, len: 8, port: exp_port(d), done: 0};
      total++;
      queue_tags[PORT_LOCAL0].push_back(tag);
    end
    repeat (30) @(posedge clk);
    check(first_seen - first_drive - 1 == 5,
          $sformatf("head latency %0d cycles, expected 5", first_seen - first_drive - 1));
    check(first_last - first_seen == 7,
          $sformatf("8 flits took %0d cycles after the head, expected 7", first_last - first_seen));
    lat_phase = 1'b0;

    // random traffic on every input
    tag = 16'h0100;
    for (int p = 0; p < NP; p++) begin
      for (int n = 0; n < PKTS_PER_PORT; n++) begin
        addr_t d;
        int    len;
        d   = rand_dst();
        len = 2 + int'($urandom % 7);
        pkts[tag] = '{dst: d, len: len, port: exp_port(d), done: 0};
        queue_tags[p].push_back(tag);
        total++;
        tag++;
      end
    end
    wait (delivered == total);
    repeat (20) @(posedge clk);
    check(delivered == total, "all packets delivered");
    check(prio_events > 0, "priority control never engaged");
    check(both_vc_cycles > 0, "two packets never shared an output");
    $display("router: %0d packets, %0d priority flags raised, %0d cycles with both VCs held",
             delivered, prio_events, both_vc_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d packets delivered", delivered, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
