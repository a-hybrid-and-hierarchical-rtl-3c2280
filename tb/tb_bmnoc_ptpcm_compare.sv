// tb_bmnoc_ptpcm_compare: the same traffic through two complete 32-core
// BMNoCs, one with the packet transmission priority control and one with
// plain round-robin arbitration, to compare average transfer latency.
//
// Both networks are bmnoc_top with default sizes: a 2x2 mesh, two cluster
// nodes per router, four cores per node. One has PTPCM = 1 and the other
// PTPCM = 0. Each is driven by a tb_bmnoc_traffic_agent with the same seed,
// so the cores of the two networks issue identical transfers. Each core sends
// its transfers back to back. A share of them go to one hot cluster node, so
// that packets block each other inside the routers. The agents check every
// delivery and measure latency from request to last word.
//
// Checks: both networks deliver every transfer intact; the priority control
// raises flags in the first network and never in the second. The average
// and worst latencies of both are printed for comparison. The test does not
// require either network to be faster: that depends on the traffic.
module tb_bmnoc_ptpcm_compare;
  import bmnoc_pkg::*;

  localparam int NCN = 8, K = 4, NCORE = NCN * K, NXFER = 24;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, msg);
    end
  endtask

  logic        req  [2][NCORE], wlast[2][NCORE], gnt[2][NCORE], beat[2][NCORE];
  hdr_t        hdr  [2][NCORE];
  logic [31:0] wdata[2][NCORE];
  logic        rxh  [2][NCORE], rxv[2][NCORE];
  hdr_t        rx_hdr [2][NCN];
  logic [31:0] rx_data[2][NCN];
  logic        rx_last[2][NCN];
  int          done [2], errors[2], lat_max[2];
  longint      lat_sum[2];

  for (genvar n = 0; n < 2; n++) begin : g_net
    bmnoc_top #(.PTPCM(n == 0)) u_noc (
      .clk, .rst_n,
      .core_req(req[n]), .core_hdr(hdr[n]), .core_wdata(wdata[n]), .core_wlast(wlast[n]),
      .core_gnt(gnt[n]), .core_beat(beat[n]),
      .core_rx_hdr_valid(rxh[n]), .core_rx_valid(rxv[n]),
      .cn_rx_hdr(rx_hdr[n]), .cn_rx_data(rx_data[n]), .cn_rx_last(rx_last[n])
    );
    tb_bmnoc_traffic_agent #(.NXFER(NXFER), .HOT_PCT(40), .HOT_CN(5), .SEED(7)) u_agent (
      .clk, .rst_n,
      .core_req(req[n]), .core_hdr(hdr[n]), .core_wdata(wdata[n]), .core_wlast(wlast[n]),
      .core_beat(beat[n]),
      .core_rx_hdr_valid(rxh[n]), .core_rx_valid(rxv[n]),
      .cn_rx_hdr(rx_hdr[n]), .cn_rx_data(rx_data[n]), .cn_rx_last(rx_last[n]),
      .done(done[n]), .errors(errors[n]), .lat_sum(lat_sum[n]), .lat_max(lat_max[n])
    );
  end

  // priority flags raised in each network
  logic flag_now [2];
  int   flags [2];
  for (genvar n = 0; n < 2; n++) begin : g_flag
    always_comb begin
      flag_now[n] = 1'b0;
      for (int p = 0; p < 6; p++) begin
        if (|g_net[n].u_noc.g_mr[0].u_router.sa_prio[p]) flag_now[n] = 1'b1;
        if (|g_net[n].u_noc.g_mr[1].u_router.sa_prio[p]) flag_now[n] = 1'b1;
        if (|g_net[n].u_noc.g_mr[2].u_router.sa_prio[p]) flag_now[n] = 1'b1;
        if (|g_net[n].u_noc.g_mr[3].u_router.sa_prio[p]) flag_now[n] = 1'b1;
      end
    end
  end
  always @(posedge clk) if (rst_n) for (int n = 0; n < 2; n++) if (flag_now[n]) flags[n]++;

  initial begin
    flags[0] = 0; flags[1] = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done[0] == NCORE * NXFER && done[1] == NCORE * NXFER);
    repeat (10) @(posedge clk);
    for (int n = 0; n < 2; n++) begin
      check(errors[n] == 0, $sformatf("network %0d delivered %0d transfers wrongly", n, errors[n]));
      check(done[n] == NCORE * NXFER, $sformatf("network %0d delivered %0d transfers", n, done[n]));
    end
    check(flags[0] > 0, "the priority control never raised a flag");
    check(flags[1] == 0, "flags raised with the priority control off");
    $display("with priority control: average latency %0d.%02d cycles, worst %0d, flags up %0d cycles",
             lat_sum[0] / (NCORE * NXFER), (lat_sum[0] * 100 / (NCORE * NXFER)) % 100, lat_max[0], flags[0]);
    $display("round robin only:      average latency %0d.%02d cycles, worst %0d",
             lat_sum[1] / (NCORE * NXFER), (lat_sum[1] * 100 / (NCORE * NXFER)) % 100, lat_max[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d and %0d of %0d transfers", done[0], done[1], NCORE * NXFER);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
