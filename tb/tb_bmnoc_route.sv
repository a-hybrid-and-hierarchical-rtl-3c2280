// tb_bmnoc_route: self-checking test of the next-route computation.
//
// Three instances are checked against every one of the 256 addresses: the
// mesh router at MRid 0 (south-west corner) and at MRid 3 (north-east corner)
// of a 2x2 mesh, and an edge switch with MRid 2, ESid 5 and three CN ports.
// Expected ports are worked out here from the mesh coordinates: X first, then
// Y, then the local CN port; the edge switch sends its own CNs to ports 1..3
// and everything else up port 0.
module tb_bmnoc_route;
  import bmnoc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  addr_t      dst;
  logic [2:0] p0, p3;
  logic [1:0] pes;
  logic       ok0, ok3, okes;

  bmnoc_route #(.ROLE(ROLE_MR), .NPORTS(6), .N_LOCAL(2), .MESH_X(2), .MESH_Y(2), .MY_MR(0))
    u_mr0 (.dst, .port(p0), .dst_ok(ok0));
  bmnoc_route #(.ROLE(ROLE_MR), .NPORTS(6), .N_LOCAL(2), .MESH_X(2), .MESH_Y(2), .MY_MR(3))
    u_mr3 (.dst, .port(p3), .dst_ok(ok3));
  bmnoc_route #(.ROLE(ROLE_ES), .NPORTS(4), .N_LOCAL(3), .MESH_X(2), .MESH_Y(2), .MY_MR(2), .MY_ES(5))
    u_es (.dst, .port(pes), .dst_ok(okes));

  // reference for a mesh router at (mx,my) of a 2x2 mesh with two CNs
  function automatic void ref_mr(int me, addr_t a, output int port, output bit ok);
    int mx, my, tx, ty;
    mx = me % 2; my = me / 2;
    tx = a.mr_id % 2; ty = a.mr_id / 2;
    ok = 1; port = 0;
    if (a.mr_id >= 4) begin ok = 0; port = 0; end
    else if (tx == mx && ty == my) begin
      if (a.cn_id < 2) port = 4 + a.cn_id;
      else begin ok = 0; port = 0; end
    end
    else if (tx != mx) port = (tx > mx) ? 1 : 3;
    else               port = (ty > my) ? 0 : 2;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s dst=%02h got %0d expected %0d", what, dst, got, exp);
    end
  endtask

  initial begin
    int ep; bit eok;
    for (int a = 0; a < 256; a++) begin
      dst = addr_t'(a[7:0]);
      #1;
      ref_mr(0, dst, ep, eok);
      check("mr0 ok", int'(ok0), int'(eok));
      if (eok) check("mr0 port", int'(p0), ep);
      ref_mr(3, dst, ep, eok);
      check("mr3 ok", int'(ok3), int'(eok));
      if (eok) check("mr3 port", int'(p3), ep);
      if (dst.mr_id == 3'd2 && dst.es_id == 3'd5) begin
        check("es ok", int'(okes), int'(dst.cn_id < 3));
        if (dst.cn_id < 3) check("es port", int'(pes), 1 + int'(dst.cn_id));
      end else begin
        check("es ok", int'(okes), 1);
        check("es port", int'(pes), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
