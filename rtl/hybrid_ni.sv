// hybrid_ni: network interface of a configuration-B tile, where one tile holds both a processor
// (AXI master) and a memory. It joins a master NI and a slave NI (with its memory controller) on
// a single router port.
//
// How it works:
//   Detector    flits arriving from the router are split by virtual channel, which is the same
//               thing as the request/response bit of the header: requests (VC 0) go to a request
//               queue in front of the slave side, responses (VC 1) to a response queue in front
//               of the master side. Each queue is VC_DEPTH flits deep and returns one router
//               credit per flit it gives away.
//   Local path  the master side's outgoing requests and the slave side's outgoing responses
//               first enter small output queues. A packet whose destination is this tile does
//               not enter the network: a request goes straight to the slave side, a response
//               straight to the master side.
//   Mergers     on each side a packet-level round-robin arbiter merges the local packets with
//               the packets from the network (the "RR" arbiter between local and global
//               requests); once a packet starts, its flits pass without interruption.
//   Output      network-bound flits of both output queues share the router link flit by flit,
//               round-robin, each using its own virtual channel and its own credit counter.
// Interface and timing: the same AXI-side ports as master_ni and the same DRAM-side ports as
// slave_ni; one router link pair with per-VC credits, identical to the NIs' link ports. Local
// packets take two cycles from one side's packetizer to the other side's input queue.
// Follows the document: detector splitting requests from responses, local requests kept off
// the network, round-robin arbiter between local and global traffic, shared router port.
// Own choices: the split uses the VC (equivalent to the header's response bit), the queue
// depths, and the configuration-B address map (bits [31:27] name the tile, see noc_pkg).
module hybrid_ni
  import noc_pkg::*;
#(
  parameter int unsigned X        = 0,
  parameter int unsigned Y        = 0,
  parameter int unsigned RB_WORDS = 48,
  parameter int unsigned QDEPTH   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axi_m2s_t          axi_req,
  output axi_s2m_t          axi_rsp,
  output dram_req_t         dram_req,
  input  dram_rsp_t         dram_rsp,
  output link_t             out_link,
  input  logic [N_VC-1:0]   out_credit,
  input  link_t             in_link,
  output logic [N_VC-1:0]   in_credit
);
  localparam int unsigned CRED_W = $clog2(VC_DEPTH + 1);
  localparam int unsigned CNT_W  = $clog2(VC_DEPTH + 1);

  link_t           m_out, m_in, s_out, s_in;
  logic [N_VC-1:0] m_out_cr, m_in_cr, s_out_cr, s_in_cr;

  master_ni #(.X(X), .Y(Y), .RB_WORDS(RB_WORDS), .QDEPTH(QDEPTH), .TILE_MAP(1'b1)) u_m (
    .clk, .rst_n, .axi_req, .axi_rsp,
    .out_link(m_out), .out_credit(m_out_cr), .in_link(m_in), .in_credit(m_in_cr));

  slave_ni #(.X(X), .Y(Y), .QDEPTH(QDEPTH)) u_s (
    .clk, .rst_n, .in_link(s_in), .in_credit(s_in_cr),
    .out_link(s_out), .out_credit(s_out_cr), .dram_req, .dram_rsp);

  function automatic logic to_self(input flit_t f);
    hdr_t h;
    h = hdr_t'(f.data);
    return (32'(h.dst_x) == X) && (32'(h.dst_y) == Y);
  endfunction

  // ---------------- detector: network input queues ----------------
  flit_t nq_f, rq_f;                 // network requests / network responses
  logic  nq_empty, rq_empty, nq_pop, rq_pop;
  logic  unused_nq_full, unused_rq_full;
  logic [CNT_W-1:0] unused_nq_cnt, unused_rq_cnt;

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(VC_DEPTH)) u_nq (
    .clk, .rst_n, .push(in_link.valid && in_link.vc == VC_REQ), .din(in_link.flit),
    .pop(nq_pop), .dout(nq_f), .empty(nq_empty), .full(unused_nq_full), .count(unused_nq_cnt));
  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(VC_DEPTH)) u_rq (
    .clk, .rst_n, .push(in_link.valid && in_link.vc == VC_RESP), .din(in_link.flit),
    .pop(rq_pop), .dout(rq_f), .empty(rq_empty), .full(unused_rq_full), .count(unused_rq_cnt));

  assign in_credit[VC_REQ]  = nq_pop;
  assign in_credit[VC_RESP] = rq_pop;

  // ---------------- output queues of both sides ----------------
  flit_t fm_f, fs_f;
  logic  fm_empty, fs_empty, fm_pop, fs_pop;
  logic  unused_fm_full, unused_fs_full;
  logic [CNT_W-1:0] unused_fm_cnt, unused_fs_cnt;

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(VC_DEPTH)) u_fm (
    .clk, .rst_n, .push(m_out.valid), .din(m_out.flit),
    .pop(fm_pop), .dout(fm_f), .empty(fm_empty), .full(unused_fm_full), .count(unused_fm_cnt));
  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(VC_DEPTH)) u_fs (
    .clk, .rst_n, .push(s_out.valid), .din(s_out.flit),
    .pop(fs_pop), .dout(fs_f), .empty(fs_empty), .full(unused_fs_full), .count(unused_fs_cnt));

  assign m_out_cr = {1'b0, fm_pop};  // master side sends on VC 0
  assign s_out_cr = {fs_pop, 1'b0};  // slave side sends on VC 1

  // Local flag of the packet at the head of each output queue (taken from its header flit).
  logic fm_loc_q, fs_loc_q, fm_local, fs_local;
  assign fm_local = fm_f.head ? to_self(fm_f) : fm_loc_q;
  assign fs_local = fs_f.head ? to_self(fs_f) : fs_loc_q;

  // ---------------- output to the router ----------------
  logic [CRED_W-1:0] rc_q [N_VC];
  logic cand_m, cand_s, send_m, send_s, out_rr_q;
  assign cand_m = !fm_empty && !fm_local && (rc_q[VC_REQ]  != '0);
  assign cand_s = !fs_empty && !fs_local && (rc_q[VC_RESP] != '0);
  assign send_m = cand_m && (!cand_s || !out_rr_q);
  assign send_s = cand_s && !send_m;

  always_comb begin
    out_link = '0;
    if (send_m) out_link = '{valid: 1'b1, vc: VC_REQ,  flit: fm_f};
    if (send_s) out_link = '{valid: 1'b1, vc: VC_RESP, flit: fs_f};
  end

  // ---------------- mergers (local and global packets) ----------------
  // Slave side: network requests (0) and local requests (1).
  logic sv_a, sv_b, sv_g, sv_valid, sv_xfer, sv_lock_q, sv_sel_q, sv_rr_q;
  logic [CNT_W-1:0] sv_space_q;
  flit_t sv_f;
  assign sv_a     = !nq_empty;
  assign sv_b     = !fm_empty && fm_local;
  assign sv_g     = sv_lock_q ? sv_sel_q : ((sv_a && sv_b) ? sv_rr_q : sv_b);
  assign sv_valid = sv_g ? sv_b : sv_a;
  assign sv_xfer  = sv_valid && (sv_space_q != '0);
  assign sv_f     = sv_g ? fm_f : nq_f;
  assign s_in     = '{valid: sv_xfer, vc: VC_REQ, flit: sv_f};
  assign nq_pop   = sv_xfer && !sv_g;

  // Master side: network responses (0) and local responses (1).
  logic mv_a, mv_b, mv_g, mv_valid, mv_xfer, mv_lock_q, mv_sel_q, mv_rr_q;
  logic [CNT_W-1:0] mv_space_q;
  flit_t mv_f;
  assign mv_a     = !rq_empty;
  assign mv_b     = !fs_empty && fs_local;
  assign mv_g     = mv_lock_q ? mv_sel_q : ((mv_a && mv_b) ? mv_rr_q : mv_b);
  assign mv_valid = mv_g ? mv_b : mv_a;
  assign mv_xfer  = mv_valid && (mv_space_q != '0);
  assign mv_f     = mv_g ? fs_f : rq_f;
  assign m_in     = '{valid: mv_xfer, vc: VC_RESP, flit: mv_f};
  assign rq_pop   = mv_xfer && !mv_g;

  assign fm_pop = send_m || (sv_xfer && sv_g);
  assign fs_pop = send_s || (mv_xfer && mv_g);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fm_loc_q   <= 1'b0;
      fs_loc_q   <= 1'b0;
      out_rr_q   <= 1'b0;
      rc_q       <= '{default: CRED_W'(VC_DEPTH)};
      sv_lock_q  <= 1'b0;
      sv_sel_q   <= 1'b0;
      sv_rr_q    <= 1'b0;
      sv_space_q <= CNT_W'(VC_DEPTH);
      mv_lock_q  <= 1'b0;
      mv_sel_q   <= 1'b0;
      mv_rr_q    <= 1'b0;
      mv_space_q <= CNT_W'(VC_DEPTH);
    end else begin
      if (fm_pop && fm_f.head) fm_loc_q <= to_self(fm_f);
      if (fs_pop && fs_f.head) fs_loc_q <= to_self(fs_f);
      if (send_m) out_rr_q <= 1'b1;
      if (send_s) out_rr_q <= 1'b0;
      rc_q[VC_REQ]  <= rc_q[VC_REQ]  - CRED_W'(send_m) + CRED_W'(out_credit[VC_REQ]);
      rc_q[VC_RESP] <= rc_q[VC_RESP] - CRED_W'(send_s) + CRED_W'(out_credit[VC_RESP]);

      sv_space_q <= sv_space_q - CNT_W'(sv_xfer) + CNT_W'(s_in_cr[VC_REQ]);
      if (sv_xfer) begin
        sv_lock_q <= !sv_f.tail;
        sv_sel_q  <= sv_g;
        if (sv_f.tail) sv_rr_q <= !sv_g;
      end
      mv_space_q <= mv_space_q - CNT_W'(mv_xfer) + CNT_W'(m_in_cr[VC_RESP]);
      if (mv_xfer) begin
        mv_lock_q <= !mv_f.tail;
        mv_sel_q  <= mv_g;
        if (mv_f.tail) mv_rr_q <= !mv_g;
      end
    end
  end

  logic unused;
  assign unused = ^{m_in_cr[VC_REQ], s_in_cr[VC_RESP], unused_nq_full, unused_rq_full,
                    unused_fm_full, unused_fs_full, unused_nq_cnt, unused_rq_cnt,
                    unused_fm_cnt, unused_fs_cnt};

  a_nq_room: assert property (@(posedge clk) disable iff (!rst_n)
                              (in_link.valid && in_link.vc == VC_REQ) |-> (!unused_nq_full || nq_pop));
  a_rq_room: assert property (@(posedge clk) disable iff (!rst_n)
                              (in_link.valid && in_link.vc == VC_RESP) |-> (!unused_rq_full || rq_pop));
endmodule
