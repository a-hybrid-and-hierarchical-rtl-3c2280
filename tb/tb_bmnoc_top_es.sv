// tb_bmnoc_top_es: end-to-end test of the hierarchical BMNoC with its
// edge-switch level, the (4,2,1) configuration: a 2x2 mesh, one edge switch
// (ES) per mesh router, two cluster nodes per ES and four cores per node, 32
// cores in all.
//
// bmnoc_top is built with ES_PER_MR = 1. With one ES per router every CN keeps
// the address {MRid, ESid = 0, CNid}, so the same traffic agent as for the
// flat network drives it: every core sends transfers back to back, a share
// of them to one hot CN. The agent checks that every transfer reaches its core
// once and intact, and measures latency.
//
// Counted mechanisms, each of which must happen: a packet kept inside an ES
// (from one of its CNs to the other, without the mesh router), a packet sent
// up from an ES to its mesh router, a packet sent down from a mesh router to
// an ES, and a packet crossing the mesh between routers.
module tb_bmnoc_top_es;
  import bmnoc_pkg::*;

  localparam int NCN = 8, K = 4, NCORE = NCN * K, NXFER = 16;

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

  logic        req [NCORE], wlast[NCORE], gnt[NCORE], beat[NCORE];
  hdr_t        hdr [NCORE];
  logic [31:0] wdata[NCORE];
  logic        rxh [NCORE], rxv[NCORE];
  hdr_t        rx_hdr [NCN];
  logic [31:0] rx_data[NCN];
  logic        rx_last[NCN];
  int          done, errors, lat_max;
  longint      lat_sum;

  bmnoc_top #(.ES_PER_MR(1)) u_noc (
    .clk, .rst_n,
    .core_req(req), .core_hdr(hdr), .core_wdata(wdata), .core_wlast(wlast),
    .core_gnt(gnt), .core_beat(beat),
    .core_rx_hdr_valid(rxh), .core_rx_valid(rxv),
    .cn_rx_hdr(rx_hdr), .cn_rx_data(rx_data), .cn_rx_last(rx_last)
  );

  tb_bmnoc_traffic_agent #(.NXFER(NXFER), .HOT_PCT(30), .HOT_CN(2), .SEED(3)) u_agent (
    .clk, .rst_n,
    .core_req(req), .core_hdr(hdr), .core_wdata(wdata), .core_wlast(wlast),
    .core_beat(beat),
    .core_rx_hdr_valid(rxh), .core_rx_valid(rxv),
    .cn_rx_hdr(rx_hdr), .cn_rx_data(rx_data), .cn_rx_last(rx_last),
    .done(done), .errors(errors), .lat_sum(lat_sum), .lat_max(lat_max)
  );

  // head flits seen on the ES and mesh links
  int n_inside = 0, n_up = 0, n_down = 0, n_mesh = 0;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 4; s++) begin
      if (u_noc.e_out_valid[s][0] && is_head(u_noc.e_out_flit[s][0].dtype)) n_up++;
      if (u_noc.e_in_valid[s][0] && is_head(u_noc.e_in_flit[s][0].dtype)) n_down++;
      for (int p = 1; p < 3; p++) begin
        hdr_t h;
        h = hdr_t'(u_noc.e_out_flit[s][p].data);
        if (u_noc.e_out_valid[s][p] && is_head(u_noc.e_out_flit[s][p].dtype) &&
            h.src.mr_id == 3'(s)) n_inside++;
      end
    end
    for (int m = 0; m < 4; m++)
      for (int p = 0; p < 4; p++)
        if (u_noc.r_out_valid[m][p] && is_head(u_noc.r_out_flit[m][p].dtype)) n_mesh++;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done == NCORE * NXFER);
    repeat (10) @(posedge clk);
    check(errors == 0, $sformatf("%0d transfers delivered wrongly", errors));
    check(done == NCORE * NXFER, $sformatf("%0d transfers delivered", done));
    check(n_inside > 0, "no packet stayed inside an edge switch");
    check(n_up > 0, "no packet went up from an edge switch");
    check(n_down > 0, "no packet came down to an edge switch");
    check(n_mesh > 0, "no packet crossed the mesh");
    // every packet that goes up comes down again at some ES
    check(n_up == n_down, $sformatf("%0d packets up, %0d down", n_up, n_down));
    $display("es: %0d inside an ES, %0d up, %0d down, %0d mesh hops; average latency %0d.%02d, worst %0d",
             n_inside, n_up, n_down, n_mesh, lat_sum / (NCORE * NXFER),
             (lat_sum * 100 / (NCORE * NXFER)) % 100, lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d transfers", done, NCORE * NXFER);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
