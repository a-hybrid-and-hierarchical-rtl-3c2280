// tb_bmnoc_traffic_agent: plays all cores of a bmnoc_top and checks what
// they receive. Used by testbenches that run the same traffic through more
// than one network.
//
// The traffic is a fixed function of the parameters and not of $urandom, so
// two agents with the same SEED drive identical traffic into two networks.
// Core g sends NXFER transfers one after the other. Transfer n goes to a
// core picked by a hash of (SEED, g, n), and has 1 to 7 words. With
// probability HOT_PCT percent it goes to a core of CN HOT_CN, otherwise to any
// core other than the sender. The agent checks that every transfer reaches
// its core once, with its header and words unchanged. It measures each
// transfer's latency, from the cycle its request is raised to the cycle its
// last word arrives, and reports the sum, the count and the worst case.
//
// Interface: the core ports of bmnoc_top (mirrored), plus outputs for the
// results. Timing: the core side of the local bus protocol (request held to
// the last word, words advanced on core_beat).
module tb_bmnoc_traffic_agent
  import bmnoc_pkg::*;
#(
  parameter int NCN     = 8,
  parameter int CPM     = 2,
  parameter int K       = 4,
  parameter int NXFER   = 20,
  parameter int HOT_PCT = 40,
  parameter int HOT_CN  = 5,
  parameter int SEED    = 1,
  localparam int NCORE  = NCN * K
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        core_req  [NCORE],
  output hdr_t        core_hdr  [NCORE],
  output logic [31:0] core_wdata[NCORE],
  output logic        core_wlast[NCORE],
  input  logic        core_beat [NCORE],
  input  logic        core_rx_hdr_valid[NCORE],
  input  logic        core_rx_valid    [NCORE],
  input  hdr_t        cn_rx_hdr [NCN],
  input  logic [31:0] cn_rx_data[NCN],
  input  logic        cn_rx_last[NCN],
  output int          done,
  output int          errors,
  output longint      lat_sum,
  output int          lat_max
);

  function automatic int unsigned hash(int unsigned a, int unsigned b, int unsigned c);
    int unsigned x;
    x = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D;
    x ^= x >> 15; x *= 32'h2C1B3C6D;
    x ^= x >> 12; x *= 32'h297A2D39;
    x ^= x >> 15;
    return x;
  endfunction

  function automatic int dst_of(int g, int n);
    int unsigned h;
    int d;
    h = hash(SEED, g, n);
    if (h % 100 < HOT_PCT) d = HOT_CN * K + int'((h >> 8) % K);
    else d = int'((h >> 8) % NCORE);
    if (d == g) d = (d + K) % NCORE;
    return d;
  endfunction

  function automatic int len_of(int g, int n);
    return 1 + int'((hash(SEED, g, n) >> 20) % 7);
  endfunction

  function automatic addr_t cn_addr(int c);
    addr_t a;
    a = '0;
    a.mr_id = 3'(c / CPM);
    a.cn_id = 2'(c % CPM);
    return a;
  endfunction

  function automatic hdr_t hdr_of(int g, int n);
    hdr_t h;
    int d;
    d = dst_of(g, n);
    h = '0;
    h.src      = cn_addr(g / K);
    h.src_core = 4'(g % K);
    h.dst      = cn_addr(d / K);
    h.dst_core = 4'(d % K);
    h.flag     = flag_t'(n);
    return h;
  endfunction

  int  cycle;
  int  m_n   [NCORE];   // transfer being sent, NXFER when finished
  int  m_idx [NCORE];
  bit  m_act [NCORE];
  int  start [NCORE][NXFER];
  bit  seen  [NCORE][NXFER];
  bit  s_act [NCORE];
  int  s_g   [NCORE];
  int  s_n   [NCORE];
  int  s_idx [NCORE];

  always @(posedge clk) begin
    if (!rst_n) begin
      cycle <= 0;
      done = 0; errors = 0; lat_sum = 0; lat_max = 0;
      for (int g = 0; g < NCORE; g++) begin
        core_req[g] <= 0; core_hdr[g] <= '0; core_wdata[g] <= '0; core_wlast[g] <= 0;
        m_n[g] = 0; m_idx[g] = 0; m_act[g] = 0; s_act[g] = 0;
        for (int n = 0; n < NXFER; n++) seen[g][n] = 0;
      end
    end else begin
      cycle <= cycle + 1;
      // receivers
      for (int g = 0; g < NCORE; g++) begin
        int c;
        c = g / K;
        if (core_rx_hdr_valid[g]) begin
          hdr_t h;
          h = cn_rx_hdr[c];
          s_g[g] = int'(h.src.mr_id) * CPM * K + int'(h.src.cn_id) * K + int'(h.src_core);
          s_n[g] = int'(h.flag);
          s_idx[g] = 0;
          s_act[g] = 1;
          if (s_g[g] >= NCORE || s_n[g] >= NXFER || h != hdr_of(s_g[g], s_n[g]) || dst_of(s_g[g], s_n[g]) != g) begin
            errors++;
            $display("FAIL at %0t: core %0d got an unexpected header %08h", $time, g, h);
            s_act[g] = 0;
          end
        end
        if (core_rx_valid[g] && s_act[g]) begin
          if (cn_rx_data[c] != {16'(s_g[g] * 64 + s_n[g]), 16'(s_idx[g])} ||
              cn_rx_last[c] != (s_idx[g] == len_of(s_g[g], s_n[g]) - 1)) begin
            errors++;
            $display("FAIL at %0t: core %0d word %0d of transfer %0d/%0d wrong", $time, g, s_idx[g], s_g[g], s_n[g]);
          end
          s_idx[g]++;
          if (cn_rx_last[c]) begin
            int l;
            s_act[g] = 0;
            if (seen[s_g[g]][s_n[g]]) begin
              errors++;
              $display("FAIL at %0t: transfer %0d/%0d delivered twice", $time, s_g[g], s_n[g]);
            end
            seen[s_g[g]][s_n[g]] = 1;
            l = cycle - start[s_g[g]][s_n[g]];
            lat_sum += longint'(l);
            if (l > lat_max) lat_max = l;
            done++;
          end
        end
      end
      // senders
      for (int g = 0; g < NCORE; g++) begin
        if (m_act[g] && core_beat[g]) begin
          if (m_idx[g] == len_of(g, m_n[g]) - 1) begin
            m_act[g] = 0;
            m_n[g]++;
          end else m_idx[g]++;
        end
        if (!m_act[g] && m_n[g] < NXFER) begin
          m_act[g] = 1; m_idx[g] = 0;
          start[g][m_n[g]] = cycle;
        end
        core_req[g] <= m_act[g];
        if (m_act[g]) begin
          core_hdr[g]   <= hdr_of(g, m_n[g]);
          core_wdata[g] <= {16'(g * 64 + m_n[g]), 16'(m_idx[g])};
          core_wlast[g] <= (m_idx[g] == len_of(g, m_n[g]) - 1);
        end
      end
    end
  end

endmodule
