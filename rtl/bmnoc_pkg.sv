// bmnoc_pkg: types and constants shared by the BusMesh NoC (BMNoC) blocks.
//
// A cluster node (CN) is addressed by an 8-bit address made of three fields,
// MRid (3 bits), ESid (3 bits) and CNid (2 bits), in that order from the most
// significant bit. Those field names and widths are the BMNoC packet format.
// A flit is 2 bits of DataType plus N = 32 bits of Data, 34 bits in all; the
// DataType codes 01 (first flit), 10 (last flit) and 00 (flit in between) are
// also the format's own. Code 11, a packet of a single flit, is an addition of
// this design so that the code space is complete.
//
// The header flit carries DstAddr, SrcAddr and Flag (8 bits each, in that
// order) followed by the numbers of the destination and source core inside
// their cluster nodes (4 bits each). The core numbers are this design's
// choice: the format addresses a cluster node, and something has to say which
// core on that node's local bus a packet is for. The Flag byte holds the
// service priority bit (SPB, guaranteed throughput when 1) in bit 7 and a
// 7-bit packet sequence number (PktId) below it; that split is this design's
// choice, the format only says Flag holds both. The optional CRC field is not
// used. The same 32-bit header is what a bus master presents in the address
// phase of a local bus transfer.
package bmnoc_pkg;

  // Flit data width N and DataType codes.
  localparam int unsigned FLIT_DATA_W = 32;

  typedef enum logic [1:0] {
    DT_BODY   = 2'b00,
    DT_HEAD   = 2'b01,
    DT_TAIL   = 2'b10,
    DT_SINGLE = 2'b11
  } dtype_e;

  typedef struct packed {
    dtype_e                   dtype;
    logic [FLIT_DATA_W-1:0]   data;
  } flit_t;

  // Cluster node address: MRid | ESid | CNid.
  typedef struct packed {
    logic [2:0] mr_id;
    logic [2:0] es_id;
    logic [1:0] cn_id;
  } addr_t;

  // Flag byte: SPB | PktId.
  typedef struct packed {
    logic       spb;
    logic [6:0] pkt_id;
  } flag_t;

  // Header: the Data field of a head flit and the address phase of the bus.
  typedef struct packed {
    addr_t      dst;
    addr_t      src;
    flag_t      flag;
    logic [3:0] dst_core;
    logic [3:0] src_core;
  } hdr_t;

  // Flits in the longest packet: one header flit and up to seven data flits.
  localparam int unsigned PKT_FLITS = 8;

  // Router port roles.
  typedef enum logic {
    ROLE_MR = 1'b0,   // mesh router: route table over MRids
    ROLE_ES = 1'b1    // edge switch: compares MRid and ESid with its own
  } role_e;

  // Mesh router port numbering: four mesh directions, then local CN ports.
  localparam int unsigned PORT_N = 0;
  localparam int unsigned PORT_E = 1;
  localparam int unsigned PORT_S = 2;
  localparam int unsigned PORT_W = 3;
  localparam int unsigned PORT_LOCAL0 = 4;

  function automatic logic is_head(dtype_e t);
    return t == DT_HEAD || t == DT_SINGLE;
  endfunction

  function automatic logic is_tail(dtype_e t);
    return t == DT_TAIL || t == DT_SINGLE;
  endfunction

endpackage
