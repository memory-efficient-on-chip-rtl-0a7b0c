// noc_pkg: types and constants shared by the routers, network interfaces and memory controller
// of the 5x5 mesh.
//
// A flit is 32 bits of payload plus two framing bits (head, tail). A packet's first flit is a
// header (hdr_t) that carries the destination and source tile, the AXI transaction ID (T-ID,
// 4 bits), the sequence number (SN, 3 bits), the router priority, the message class (request or
// response), read/write and the burst length. The 32-bit flit, the 4-bit T-ID, the 3-bit SN, the
// five router ports and two virtual channels follow the document; the bit layout of the header
// is this design's own choice.
//
// The AXI port between a master core and its network interface is reduced to the fields the
// interface uses (IDs, addresses, burst length, data, last); there are no size, strobe or
// response-code fields. The DRAM port is a single-rank command bus (ACT, PRE, RD, WR) with one
// 32-bit data word per column command; read data returns T_CL cycles after RD.
package noc_pkg;

  // Mesh (Section VII-A: 25 nodes, 5x5)
  parameter int unsigned MESH_X  = 5;
  parameter int unsigned MESH_Y  = 5;
  parameter int unsigned COORD_W = 3;

  // Flit and header fields
  parameter int unsigned FLIT_W  = 32;
  parameter int unsigned TID_W   = 4;   // T-ID width (Section VII-C)
  parameter int unsigned SN_W    = 3;   // SN width (Section VII-C)
  parameter int unsigned PRIO_W  = 5;   // MaxSeqNum - SN + distance <= 7 + 8
  parameter int unsigned LEN_W   = 3;   // AXI burst length minus one, bursts of 1..8
  parameter int unsigned MAX_SN  = (1 << SN_W) - 1;
  parameter int unsigned N_TID   = 1 << TID_W;

  // Router (Section V-B)
  parameter int unsigned N_PORTS  = 5;
  parameter int unsigned N_VC     = 2;
  parameter int unsigned VC_DEPTH = 5;  // flits per VC buffer (Section VII-A)
  parameter int unsigned WP_W     = 8;  // waiting-priority register width

  typedef enum logic [2:0] {
    PORT_N = 3'd0, PORT_E = 3'd1, PORT_S = 3'd2, PORT_W = 3'd3, PORT_L = 3'd4
  } port_e;

  // Message classes use separate VCs to avoid message-dependency deadlock
  parameter logic VC_REQ  = 1'b0;
  parameter logic VC_RESP = 1'b1;

  typedef struct packed {
    logic [2:0]         spare;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [TID_W-1:0]   tid;
    logic [SN_W-1:0]    sn;
    logic [PRIO_W-1:0]  prio;
    logic               resp;   // 1: response message, 0: request
    logic               wr;     // 1: write transaction
    logic [LEN_W-1:0]   len;    // burst length minus one
  } hdr_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic  valid;
    logic  vc;
    flit_t flit;
  } link_t;

  // AXI master -> network interface
  typedef struct packed {
    logic              aw_valid;
    logic [TID_W-1:0]  aw_id;
    logic [31:0]       aw_addr;
    logic [LEN_W-1:0]  aw_len;
    logic              w_valid;
    logic [31:0]       w_data;
    logic              w_last;
    logic              ar_valid;
    logic [TID_W-1:0]  ar_id;
    logic [31:0]       ar_addr;
    logic [LEN_W-1:0]  ar_len;
    logic              r_ready;
    logic              b_ready;
  } axi_m2s_t;

  // network interface -> AXI master
  typedef struct packed {
    logic              aw_ready;
    logic              w_ready;
    logic              ar_ready;
    logic              r_valid;
    logic [TID_W-1:0]  r_id;
    logic [31:0]       r_data;
    logic              r_last;
    logic              b_valid;
    logic [TID_W-1:0]  b_id;
  } axi_s2m_t;

  // DRAM (DDR2-256MB, 32 bit, 4 banks, Section VII-A)
  parameter int unsigned N_BANKS = 4;
  parameter int unsigned BANK_W  = 2;
  parameter int unsigned ROW_W   = 14;
  parameter int unsigned COL_W   = 10;

  typedef enum logic [2:0] {
    DRAM_NOP = 3'd0, DRAM_ACT = 3'd1, DRAM_PRE = 3'd2, DRAM_RD = 3'd3, DRAM_WR = 3'd4
  } dram_cmd_e;

  typedef struct packed {
    dram_cmd_e         cmd;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic [31:0]       wdata;
  } dram_req_t;

  typedef struct packed {
    logic        rvalid;
    logic [31:0] rdata;
  } dram_rsp_t;

  // Configuration A: rows 0, 2, 4 hold memories, rows 1, 3 hold processors.
  // Address bits [31:28] name one of the 15 memories; memory m sits at x = m % 5, y = 2*(m / 5).
  function automatic logic [2*COORD_W-1:0] mem_node(input logic [3:0] idx);
    logic [3:0] m;
    m = (idx > 4'd14) ? 4'd0 : idx;
    return {COORD_W'(32'(m) % 5), COORD_W'(2 * (32'(m) / 5))};
  endfunction

  // Configuration B (every tile holds a processor and a memory, hybrid NI): address bits [31:27]
  // name the tile n = 5*y + x (values above 24 fold to tile 0).
  function automatic logic [2*COORD_W-1:0] tile_node(input logic [4:0] idx);
    logic [4:0] n;
    n = (idx > 5'd24) ? 5'd0 : idx;
    return {COORD_W'(32'(n) % 5), COORD_W'(32'(n) / 5)};
  endfunction

  // Router priority: MaxSeqNum - SN + distance (Section V-B)
  function automatic logic [PRIO_W-1:0] pkt_prio(input logic [SN_W-1:0] sn,
      input logic [COORD_W-1:0] sx, input logic [COORD_W-1:0] sy,
      input logic [COORD_W-1:0] dx, input logic [COORD_W-1:0] dy);
    logic [COORD_W-1:0] ddx, ddy;
    ddx = (sx > dx) ? sx - dx : dx - sx;
    ddy = (sy > dy) ? sy - dy : dy - sy;
    return PRIO_W'(MAX_SN - sn) + PRIO_W'(ddx) + PRIO_W'(ddy);
  endfunction

endpackage
