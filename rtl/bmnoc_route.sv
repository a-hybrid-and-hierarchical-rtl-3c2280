// bmnoc_route: next-route computation of a BMNoC router, from DstAddr alone.
//
// The block is purely combinational. A mesh router (ROLE_MR) looks the
// destination MRid up in a route table that holds, for every MRid of the
// mesh, the output port towards it; a packet whose MRid is the router's own
// goes to the local port of its CNid, or, with LOCAL_BY_ES set (edge switches
// below the mesh router), to the local port of its ESid. An edge switch (ROLE_ES) compares the
// MRid and ESid fields of DstAddr with its own: on a match the packet leaves on
// the port of its CNid (ports 1 and up), otherwise on port 0, the uplink to
// the mesh router. Routing on DstAddr only, the route table in mesh routers
// and the MRid/ESid compare in edge switches follow the BMNoC description.
//
// The table is filled at elaboration with dimension-ordered (X then Y) routes,
// which is this design's choice: the architecture names a partially adaptive
// routing but gives no rule for it, so every destination has one route and
// packets stay in order. MRid = y * MESH_X + x; x grows to the east and y to
// the north. Port numbers of a mesh router: 0 N, 1 E, 2 S, 3 W, 4.. local CNs.
//
// Interface: dst in, port out (index into the router's ports), dst_ok low when
// the address names a node that does not exist (the port is then 0).
module bmnoc_route
  import bmnoc_pkg::*;
#(
  parameter role_e       ROLE    = ROLE_MR,
  parameter int unsigned NPORTS  = 6,      // ports of the router
  parameter int unsigned N_LOCAL = 2,      // CN ports of the router
  parameter int unsigned MESH_X  = 2,
  parameter int unsigned MESH_Y  = 2,
  parameter int unsigned MY_MR   = 0,      // own MRid
  parameter int unsigned MY_ES   = 0,      // own ESid (edge switch only)
  parameter bit          LOCAL_BY_ES = 1'b0, // mesh router: local ports lead to ESes
  localparam int unsigned PW     = $clog2(NPORTS)
) (
  input  addr_t         dst,
  output logic [PW-1:0] port,
  output logic          dst_ok
);

  localparam int unsigned NMR = 8;  // MRid is 3 bits wide

  // Route table entry: output port towards MRid i; the own MRid maps to the
  // first local port and is overridden by the CNid below.
  typedef logic [PW-1:0] route_table_t [NMR];

  function automatic route_table_t build_table();
    route_table_t t;
    int unsigned mx, my, dx, dy;
    mx = MY_MR % MESH_X;
    my = MY_MR / MESH_X;
    for (int unsigned i = 0; i < NMR; i++) begin
      dx = i % MESH_X;
      dy = i / MESH_X;
      if (dx > mx)      t[i] = PW'(PORT_E);
      else if (dx < mx) t[i] = PW'(PORT_W);
      else if (dy > my) t[i] = PW'(PORT_N);
      else if (dy < my) t[i] = PW'(PORT_S);
      else              t[i] = PW'(PORT_LOCAL0);
    end
    return t;
  endfunction

  localparam route_table_t ROUTE_TABLE = build_table();

  always_comb begin
    port   = '0;
    dst_ok = 1'b0;
    if (ROLE == ROLE_MR) begin
      if (int'(dst.mr_id) < MESH_X * MESH_Y) begin
        if (int'(dst.mr_id) == MY_MR) begin
          if (LOCAL_BY_ES) begin
            if (int'(dst.es_id) < N_LOCAL) begin
              port   = PW'(PORT_LOCAL0 + int'(dst.es_id));
              dst_ok = 1'b1;
            end
          end else if (int'(dst.cn_id) < N_LOCAL) begin
            port   = PW'(PORT_LOCAL0 + int'(dst.cn_id));
            dst_ok = 1'b1;
          end
        end else begin
          port   = ROUTE_TABLE[dst.mr_id];
          dst_ok = 1'b1;
        end
      end
    end else begin
      if (int'(dst.mr_id) == MY_MR && int'(dst.es_id) == MY_ES) begin
        if (int'(dst.cn_id) < N_LOCAL) begin
          port   = PW'(1 + int'(dst.cn_id));
          dst_ok = 1'b1;
        end
      end else begin
        port   = '0;
        dst_ok = 1'b1;
      end
    end
  end

endmodule
