// tb_bmnoc_ni: self-checking test of the network interface.
//
// The testbench plays the local bus and the router. Transmit direction: a bus
// model sends transfers of 1 to 7 words to the NI whenever can_accept is high;
// a router-port model with an 8-flit buffer per VC takes the flits, returns
// credits and stalls now and then. Each transfer must come out as one packet
// on one VC: a head flit equal to the bus header, the words in order as body
// flits, the last as tail, and never more flits than the credits allow.
// Receive direction: a router model injects packets, interleaving two VCs
// flit by flit and respecting the NI's credits; a bus model grants the NI's
// requests (address phase two cycles after the request, then one word per
// cycle) and checks that each packet is delivered as one transfer with the
// right header and words. The test counts cycles in which can_accept held the
// bus back and in which the NI waited for credits (a flit with no credit, or a
// new packet with no VC whose credits are all back), and fails if either
// never happened.
module tb_bmnoc_ni;
  import bmnoc_pkg::*;

  localparam int NV = 2, DEPTH = 8, NTX = 60, NRX = 60;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  logic          s_hdr_valid, s_valid, s_last, can_accept;
  hdr_t          s_hdr;
  logic [31:0]   s_data;
  logic          m_req, m_last, m_beat;
  hdr_t          m_hdr;
  logic [31:0]   m_data;
  logic          out_valid, in_valid;
  logic [0:0]    out_vc, in_vc;
  flit_t         out_flit, in_flit;
  logic [NV-1:0] out_credit, in_credit;

  bmnoc_ni #(.NVC(NV), .BUF_DEPTH(DEPTH)) u_dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, msg);
    end
  endtask

  typedef struct { hdr_t hdr; int len; } msg_t;   // len = data words
  msg_t tx_msgs [NTX];
  msg_t rx_msgs [NRX];

  function automatic hdr_t rand_hdr(int tag);
    hdr_t h;
    h = hdr_t'($urandom);
    h.flag = flag_t'(tag);
    return h;
  endfunction

  int cycle = 0;
  // transmit side state
  int  tx_next = 0, tx_word = -1, tx_gap = 0, tx_done = 0;
  int  rq_buf [NV];
  bit  rq_act [NV];
  int  rq_msg [NV];
  int  rq_idx [NV];
  bit  rq_stall;
  int  accept_low = 0, credit_wait = 0;
  // receive side state
  int  ri_next = 0, ri_cred [NV], ri_msg [NV], ri_idx [NV], ri_rr = 0;
  bit  ri_act [NV];
  int  rb_state = 0, rb_msg = -1, rb_word = 0, rx_done = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      s_hdr_valid <= 0; s_valid <= 0; s_last <= 0; s_hdr <= '0; s_data <= '0;
      m_beat <= 0; in_valid <= 0; in_vc <= '0; in_flit <= '0; out_credit <= '0;
    end else begin
      // ================= transmit: bus model feeding the NI
      s_hdr_valid <= 0; s_valid <= 0; s_last <= 0;
      if (tx_word >= 0) begin
        s_valid <= 1;
        s_data  <= {16'(tx_next - 1), 16'(tx_word)};
        s_last  <= (tx_word == tx_msgs[tx_next-1].len - 1);
        tx_word = (tx_word == tx_msgs[tx_next-1].len - 1) ? -1 : tx_word + 1;
        if (tx_word < 0) tx_gap = $urandom % 3;
      end else if (tx_gap > 0) begin
        tx_gap--;
      end else if (tx_next < NTX) begin
        if (can_accept) begin
          s_hdr_valid <= 1;
          s_hdr <= tx_msgs[tx_next].hdr;
          tx_next++;
          tx_word = 0;
        end else accept_low++;
      end
      // ================= transmit: router port model taking the packets
      if (out_valid) begin
        int v;
        v = int'(out_vc);
        rq_buf[v]++;
        check(rq_buf[v] <= DEPTH, "NI overran the router buffer");
        if (is_head(out_flit.dtype)) begin
          int t;
          hdr_t h;
          h = hdr_t'(out_flit.data);
          t = int'(h.flag);
          check(!rq_act[v], "head inside a packet");
          check(t < NTX && h == tx_msgs[t].hdr, "head flit differs from bus header");
          rq_act[v] = 1; rq_msg[v] = t; rq_idx[v] = 0;
        end else begin
          check(rq_act[v], "body flit without head");
          check(out_flit.data == {16'(rq_msg[v]), 16'(rq_idx[v])}, "payload word wrong");
          check((out_flit.dtype == DT_TAIL) == (rq_idx[v] == tx_msgs[rq_msg[v]].len - 1), "tail marking wrong");
          rq_idx[v]++;
          if (out_flit.dtype == DT_TAIL) begin
            rq_act[v] = 0;
            check(rq_msg[v] == tx_done, "packets out of order");
            tx_done++;
          end
        end
      end
      begin
        logic [NV-1:0] cr;
        cr = '0;
        if (!rq_stall) begin
          for (int v = 0; v < NV; v++) if (cr == '0 && rq_buf[v] > 0) begin rq_buf[v]--; cr[v] = 1; end
        end
        out_credit <= cr;
        if (rq_stall) rq_stall = ($urandom % 12) != 0;
        else          rq_stall = ($urandom % 6) == 0;
      end
      if (!u_dut.tx_empty && ((u_dut.tx_hold && u_dut.cred[u_dut.tx_vc] == 0) ||
                              (!u_dut.tx_hold && !u_dut.free_found))) credit_wait++;

      // ================= receive: router model injecting packets
      for (int v = 0; v < NV; v++) if (in_credit[v]) ri_cred[v]++;
      for (int v = 0; v < NV; v++) begin
        if (!ri_act[v] && ri_next < NRX) begin
          ri_act[v] = 1; ri_msg[v] = ri_next; ri_idx[v] = 0; ri_next++;
          break;
        end
      end
      begin
        int pick;
        pick = -1;
        for (int k = 0; k < NV; k++) begin
          int v;
          v = (ri_rr + k) % NV;
          if (pick < 0 && ri_act[v] && ri_cred[v] > 0 && ($urandom % 4) != 0) pick = v;
        end
        in_valid <= (pick >= 0);
        if (pick >= 0) begin
          int t, i;
          t = ri_msg[pick];
          i = ri_idx[pick];
          in_vc <= 1'(pick);
          if (i == 0) in_flit <= flit_t'{dtype: DT_HEAD, data: rx_msgs[t].hdr};
          else in_flit <= flit_t'{dtype: (i == rx_msgs[t].len) ? DT_TAIL : DT_BODY,
                                  data: {16'(t), 16'(i - 1)}};
          ri_cred[pick]--;
          ri_idx[pick]++;
          ri_rr = (pick + 1) % NV;
          if (ri_idx[pick] == rx_msgs[t].len + 1) ri_act[pick] = 0;
        end
      end
      // ================= receive: bus model serving the NI's requests
      case (rb_state)
        0: if (m_req) rb_state = 1;               // request seen: arbitration
        1: rb_state = 2;                          // grant
        2: begin                                  // address phase
          int t;
          t = int'(m_hdr.flag);
          check(t < NRX && m_hdr == rx_msgs[t].hdr, "delivered header wrong");
          rb_msg = t; rb_word = 0;
          m_beat <= 1;
          rb_state = 3;
        end
        default: begin                            // data phase
          check(m_data == {16'(rb_msg), 16'(rb_word)}, $sformatf("delivered word %0d of packet %0d wrong", rb_word, rb_msg));
          check(m_last == (rb_word == rx_msgs[rb_msg].len - 1), "delivered last flag wrong");
          rb_word++;
          if (m_last) begin
            m_beat <= 0;
            rb_state = 0;
            rx_done++;
          end
        end
      endcase
    end
  end

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < NTX; i++) begin tx_msgs[i].hdr = rand_hdr(i); tx_msgs[i].len = 1 + $urandom % 7; end
    for (int i = 0; i < NRX; i++) begin rx_msgs[i].hdr = rand_hdr(i); rx_msgs[i].len = 1 + $urandom % 7; end
    for (int v = 0; v < NV; v++) begin
      rq_buf[v] = 0; rq_act[v] = 0; ri_cred[v] = DEPTH; ri_act[v] = 0;
    end
    rq_stall = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (tx_done == NTX && rx_done == NRX);
    repeat (10) @(posedge clk);
    check(accept_low > 0, "can_accept never held the bus back");
    check(credit_wait > 0, "the NI never waited for credits");
    $display("ni: %0d packets out, %0d packets in, %0d cycles held by can_accept, %0d cycles waiting for credits",
             tx_done, rx_done, accept_low, credit_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d/%0d out, %0d/%0d in", tx_done, NTX, rx_done, NRX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
