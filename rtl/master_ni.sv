// master_ni: master-side network interface between an AXI master core and its router.
//
// Forward path (requests):
//   AXI-queue   write-request buffer (AW), write-data buffer (W) and read-request buffer (AR),
//               8 entries each; alternates between the write and the read candidate. A write is
//               a candidate once all its data words are buffered.
//   Reorder unit admittance: the candidate asks the status table for admission with the size of
//               the response it will cause (read: header + burst words, write: 1 flit) and
//               receives its SN. A refused request waits in its buffer.
//   Packetizer  header flit (mapping unit: address bits [31:28] select one of the 15 memory
//               tiles of configuration A, or with TILE_MAP bits [31:27] one of the 25 tiles of
//               configuration B; router priority = MaxSeqNum - SN + hop distance), address flit, then the
//               write data flits. Requests travel on VC 0; credits for the router's local input.
// Reverse path (responses, VC 1):
//   Packet-queue an 8-flit packet buffer. At a header the status table decides: SN equal to the
//               T-ID's expected SN goes straight to the depacketizer, any other SN into the
//               reorder buffer.
//   Depacketizer turns a response packet into one AXI B beat (write) or a burst of R beats
//               (read). Packets waiting in the reorder buffer whose SN has become the expected
//               one are released to it first. When the last flit of a response has been
//               delivered the status table is updated (Procedures C and D).
// The flit formats follow the document (command flit, address flit, write data; response
// control flit followed by read data); the field layout, the queue arbitration and the
// priority given to reorder-buffer releases are this design's choices. Latency: a request
// accepted on AXI can leave as a header flit two cycles later.
module master_ni
  import noc_pkg::*;
#(
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 1,
  parameter int unsigned RB_WORDS  = 48,
  parameter int unsigned QDEPTH    = 8,
  parameter bit          TILE_MAP  = 1'b0   // 0: configuration A map, 1: configuration B map
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axi_m2s_t          axi_req,
  output axi_s2m_t          axi_rsp,
  output link_t             out_link,
  input  logic [N_VC-1:0]   out_credit,
  input  link_t             in_link,
  output logic [N_VC-1:0]   in_credit
);
  localparam int unsigned AW_W   = TID_W + 32 + LEN_W;
  localparam int unsigned CRED_W = $clog2(VC_DEPTH + 1);
  localparam int unsigned QC_W   = $clog2(QDEPTH + 1);

  // ---------------- AXI-queue ----------------
  logic [AW_W-1:0] aw_dout, ar_dout;
  logic            aw_empty, aw_full, ar_empty, ar_full, w_empty, w_full;
  logic            aw_pop, ar_pop, w_pop;
  logic [31:0]     w_dout;
  logic [QC_W-1:0] w_count, unused_awc, unused_arc;

  sync_fifo #(.WIDTH(AW_W), .DEPTH(QDEPTH)) u_awq (
    .clk, .rst_n, .push(axi_req.aw_valid && !aw_full),
    .din({axi_req.aw_id, axi_req.aw_addr, axi_req.aw_len}),
    .pop(aw_pop), .dout(aw_dout), .empty(aw_empty), .full(aw_full), .count(unused_awc));
  sync_fifo #(.WIDTH(AW_W), .DEPTH(QDEPTH)) u_arq (
    .clk, .rst_n, .push(axi_req.ar_valid && !ar_full),
    .din({axi_req.ar_id, axi_req.ar_addr, axi_req.ar_len}),
    .pop(ar_pop), .dout(ar_dout), .empty(ar_empty), .full(ar_full), .count(unused_arc));
  sync_fifo #(.WIDTH(32), .DEPTH(QDEPTH)) u_wq (
    .clk, .rst_n, .push(axi_req.w_valid && !w_full), .din(axi_req.w_data),
    .pop(w_pop), .dout(w_dout), .empty(w_empty), .full(w_full), .count(w_count));

  logic [TID_W-1:0] aw_id, ar_id;
  logic [31:0]      aw_addr, ar_addr;
  logic [LEN_W-1:0] aw_len, ar_len;
  assign {aw_id, aw_addr, aw_len} = aw_dout;
  assign {ar_id, ar_addr, ar_len} = ar_dout;

  logic cand_wr, cand_rd, pick_rd, rr_q;
  assign cand_wr = !aw_empty && (32'(w_count) >= 32'(aw_len) + 1);
  assign cand_rd = !ar_empty;
  assign pick_rd = cand_rd && (!cand_wr || rr_q);

  // ---------------- Reorder unit ----------------
  typedef enum logic [1:0] {P_IDLE, P_HDR, P_ADDR, P_DATA} pstate_e;
  pstate_e pst;

  logic                       fwd_req, fwd_admit, fwd_fire;
  logic [SN_W-1:0]            fwd_sn;
  logic [LEN_W+1:0]           fwd_size;
  logic [TID_W-1:0]           fwd_tid;
  logic                       rev_valid;
  logic [TID_W-1:0]           rev_tid;
  logic [LEN_W+1:0]           rev_size;
  logic [N_TID-1:0][SN_W-1:0] es_all;
  logic [$clog2(RB_WORDS+1)-1:0] rsrv_size, rb_used;

  assign fwd_req  = (pst == P_IDLE) && (cand_wr || cand_rd);
  assign fwd_tid  = pick_rd ? ar_id : aw_id;
  assign fwd_size = pick_rd ? (LEN_W+2)'(ar_len) + (LEN_W+2)'(2) : (LEN_W+2)'(1);
  assign fwd_fire = fwd_req && fwd_admit;

  status_table #(.BUF_WORDS(RB_WORDS)) u_st (
    .clk, .rst_n,
    .fwd_req, .fwd_tid, .fwd_size, .fwd_admit, .fwd_sn, .fwd_fire,
    .rev_valid, .rev_tid, .rev_size, .es_all, .rsrv_size);

  logic  rb_wr_valid, rb_wr_ready, rb_rel_avail, rb_rel_start, rb_rel_valid, rb_rel_ready;
  flit_t rb_rel_flit, pq_flit;

  reorder_buffer #(.BUF_WORDS(RB_WORDS), .ROWS(RB_WORDS)) u_rb (
    .clk, .rst_n,
    .wr_valid(rb_wr_valid), .wr_flit(pq_flit), .wr_ready(rb_wr_ready),
    .es_all, .rel_avail(rb_rel_avail), .rel_start(rb_rel_start),
    .rel_valid(rb_rel_valid), .rel_flit(rb_rel_flit), .rel_ready(rb_rel_ready),
    .used_words(rb_used));

  // ---------------- Packetizer ----------------
  hdr_t              hdr_q;
  logic [31:0]       addr_q;
  logic [LEN_W-1:0]  beats_q;
  logic [CRED_W-1:0] cred_q;
  logic              send;

  assign aw_pop = fwd_fire && !pick_rd;
  assign ar_pop = fwd_fire && pick_rd;
  assign send   = (pst != P_IDLE) && (cred_q != '0);
  assign w_pop  = send && (pst == P_DATA);

  always_comb begin
    out_link       = '0;
    out_link.valid = send;
    out_link.vc    = VC_REQ;
    unique case (pst)
      P_HDR:   out_link.flit = '{head: 1'b1, tail: 1'b0, data: hdr_q};
      P_ADDR:  out_link.flit = '{head: 1'b0, tail: !hdr_q.wr, data: addr_q};
      P_DATA:  out_link.flit = '{head: 1'b0, tail: beats_q == '0, data: w_dout};
      default: out_link.flit = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst     <= P_IDLE;
      hdr_q   <= '0;
      addr_q  <= '0;
      beats_q <= '0;
      rr_q    <= 1'b0;
      cred_q  <= CRED_W'(VC_DEPTH);
    end else begin
      cred_q <= cred_q - CRED_W'(send) + CRED_W'(out_credit[VC_REQ]);
      if (fwd_req) rr_q <= !pick_rd;
      unique case (pst)
        P_IDLE: if (fwd_fire) begin
          hdr_t h;
          logic [31:0] a;
          a = pick_rd ? ar_addr : aw_addr;
          h = '0;
          {h.dst_x, h.dst_y} = TILE_MAP ? tile_node(a[31:27]) : mem_node(a[31:28]);
          h.src_x = COORD_W'(X);
          h.src_y = COORD_W'(Y);
          h.tid   = fwd_tid;
          h.sn    = fwd_sn;
          h.prio  = pkt_prio(fwd_sn, h.src_x, h.src_y, h.dst_x, h.dst_y);
          h.resp  = 1'b0;
          h.wr    = !pick_rd;
          h.len   = pick_rd ? ar_len : aw_len;
          hdr_q   <= h;
          addr_q  <= a;
          beats_q <= h.len;
          pst     <= P_HDR;
        end
        P_HDR:  if (send) pst <= P_ADDR;
        P_ADDR: if (send) pst <= hdr_q.wr ? P_DATA : P_IDLE;
        P_DATA: if (send) begin
          if (beats_q == '0) pst <= P_IDLE;
          beats_q <= beats_q - 1'b1;
        end
        default: pst <= P_IDLE;
      endcase
    end
  end

  // ---------------- Packet-queue ----------------
  typedef enum logic [1:0] {Q_HEAD, Q_DU, Q_RB} qstate_e;
  qstate_e qst;
  logic    pq_empty, pq_full, pq_pop, pq_inorder;
  logic [$clog2(QDEPTH+1)-1:0] unused_pqc;
  hdr_t    pq_hdr;

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(QDEPTH)) u_pq (
    .clk, .rst_n, .push(in_link.valid), .din(in_link.flit),
    .pop(pq_pop), .dout(pq_flit), .empty(pq_empty), .full(pq_full), .count(unused_pqc));

  assign in_credit[VC_REQ]  = 1'b0;
  assign in_credit[VC_RESP] = pq_pop;
  assign pq_hdr     = hdr_t'(pq_flit.data);
  assign pq_inorder = pq_flit.head && (pq_hdr.sn == es_all[pq_hdr.tid]);

  // ---------------- Depacketizer ----------------
  logic             du_busy, du_src_rb, du_valid, du_take;
  flit_t            du_flit;
  hdr_t             du_hdr;
  logic [TID_W-1:0] du_tid_q;
  logic             du_start_q;

  assign du_start_q   = !du_busy && !rb_rel_avail && (qst == Q_HEAD) && !pq_empty && pq_inorder;
  assign rb_rel_start = !du_busy && rb_rel_avail;
  assign du_valid     = du_busy && (du_src_rb ? rb_rel_valid : (!pq_empty && qst == Q_DU));
  assign du_flit      = du_src_rb ? rb_rel_flit : pq_flit;
  assign du_hdr       = hdr_t'(du_flit.data);

  always_comb begin
    axi_rsp          = '0;
    axi_rsp.aw_ready = !aw_full;
    axi_rsp.w_ready  = !w_full;
    axi_rsp.ar_ready = !ar_full;
    du_take          = 1'b0;
    if (du_valid) begin
      if (du_flit.head) begin
        if (du_hdr.wr) begin
          axi_rsp.b_valid = 1'b1;
          axi_rsp.b_id    = du_hdr.tid;
          du_take         = axi_req.b_ready;
        end else begin
          du_take = 1'b1;
        end
      end else begin
        axi_rsp.r_valid = 1'b1;
        axi_rsp.r_id    = du_tid_q;
        axi_rsp.r_data  = du_flit.data;
        axi_rsp.r_last  = du_flit.tail;
        du_take         = axi_req.r_ready;
      end
    end
  end

  logic [LEN_W+1:0] du_size_q;
  assign rb_rel_ready = du_busy && du_src_rb && du_take;
  assign rb_wr_valid  = !pq_empty && ((qst == Q_RB) || (qst == Q_HEAD && pq_flit.head && !pq_inorder));
  assign pq_pop       = (rb_wr_valid && rb_wr_ready) || (du_busy && !du_src_rb && du_take);
  assign rev_valid    = du_take && du_flit.tail;
  assign rev_tid      = du_flit.head ? du_hdr.tid : du_tid_q;
  assign rev_size     = du_flit.head ? (du_hdr.wr ? (LEN_W+2)'(1) : (LEN_W+2)'(du_hdr.len) + (LEN_W+2)'(2))
                                     : du_size_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qst       <= Q_HEAD;
      du_busy   <= 1'b0;
      du_src_rb <= 1'b0;
      du_tid_q  <= '0;
      du_size_q <= '0;
    end else begin
      // packet-queue
      unique case (qst)
        Q_HEAD: if (du_start_q) qst <= Q_DU;
                else if (rb_wr_valid && rb_wr_ready && !pq_flit.tail) qst <= Q_RB;
        Q_RB:   if (rb_wr_valid && rb_wr_ready && pq_flit.tail) qst <= Q_HEAD;
        Q_DU:   if (du_take && du_flit.tail) qst <= Q_HEAD;
        default: qst <= Q_HEAD;
      endcase
      // depacketizer
      if (rb_rel_start) begin
        du_busy   <= 1'b1;
        du_src_rb <= 1'b1;
      end else if (du_start_q) begin
        du_busy   <= 1'b1;
        du_src_rb <= 1'b0;
      end else if (du_take && du_flit.tail) begin
        du_busy <= 1'b0;
      end
      if (du_take && du_flit.head) begin
        du_tid_q  <= du_hdr.tid;
        du_size_q <= du_hdr.wr ? (LEN_W+2)'(1) : (LEN_W+2)'(du_hdr.len) + (LEN_W+2)'(2);
      end
    end
  end

  a_resp_vc:   assert property (@(posedge clk) disable iff (!rst_n) in_link.valid |-> in_link.vc == VC_RESP);
  a_pq_room:   assert property (@(posedge clk) disable iff (!rst_n) in_link.valid |-> (!pq_full || pq_pop));
  a_rb_bound:  assert property (@(posedge clk) disable iff (!rst_n) 32'(rsrv_size) <= RB_WORDS);
endmodule
