// mem_ctrl: order-sensitive (OS) DRAM controller of a slave network interface.
//
// Requests (header + address, from the slave depacketizer) are sorted into one queue per bank
// (QDEPTH entries each); the data of a write is appended, one word per cycle after its request,
// to a shared write-data queue kept as linked lists (WDQ_WORDS words, one next-pointer per
// word), and the request becomes schedulable once all its words are in. Memory mapping of
// the 28-bit local address: column = addr[11:2], bank = addr[13:12], row = addr[27:14].
//
// Two scheduling levels, as in the document:
//  1. Bank arbiters (bank_arbiter): a request entering a bank queue gets the waiting priority
//     MaxSeqNum - SN and every request already in that queue is incremented; each bank picks
//     the highest-priority row hit, else the highest-priority other request (row-first).
//  2. Memory scheduler: a round-robin arbiter between the banks for the command bus, so one
//     bank's precharge or activate overlaps another bank's accesses (bank interleaving).
// Command generator, per bank: row conflict PRE, wait T_RP, ACT, wait T_RCD, column commands;
// row empty ACT, wait T_RCD, column commands; row hit column commands at once. A burst of
// len+1 words is len+1 consecutive RD or WR commands, one word each, and holds the command bus
// until its last word (so read data of different requests never interleave). Read data comes
// back T_CL cycles after each RD into an RDQ-word read buffer; a read burst starts only when
// the buffer has room for all its words. A response descriptor (the request header) is queued
// when a read burst starts or a write burst ends. Rows stay open after an access (open-page
// policy). The DDR2 timing 2-2-2 and four banks follow the document; the open-page policy,
// the one-word column commands and write data sent with the WR command are this design's own.
module mem_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned QDEPTH    = 8,
  parameter int unsigned WDQ_WORDS = 8,
  parameter int unsigned RDQ       = 8,
  parameter int unsigned T_RP      = 2,
  parameter int unsigned T_RCD     = 2,
  parameter int unsigned T_CL      = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // request from the depacketizer
  input  logic        req_valid,
  input  hdr_t        req_hdr,
  input  logic [31:0] req_addr,
  output logic        req_ready,
  input  logic        wd_valid,
  input  logic [31:0] wd_data,
  output logic        wd_ready,
  // response descriptors and read data to the packetizer
  output logic        rsp_valid,
  output hdr_t        rsp_hdr,
  input  logic        rsp_pop,
  output logic        rd_valid,
  output logic [31:0] rd_data,
  input  logic        rd_pop,
  // DRAM
  output dram_req_t   dram_req,
  input  dram_rsp_t   dram_rsp
);
  localparam int unsigned QW  = $clog2(QDEPTH);
  localparam int unsigned DW  = $clog2(WDQ_WORDS);
  localparam int unsigned BW  = BANK_W;
  localparam int unsigned RCW = $clog2(RDQ + 1);
  localparam int unsigned TW  = 4;

  typedef struct packed {
    logic              v;
    logic              rdy;
    logic [WP_W-1:0]   w;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic [DW-1:0]     wptr;
    hdr_t              hdr;
  } mc_entry_t;

  typedef enum logic [1:0] {B_IDLE, B_PRE, B_ACT, B_COL} bstate_e;

  mc_entry_t   q      [N_BANKS][QDEPTH];
  bstate_e     bst    [N_BANKS];
  logic        open_q [N_BANKS];
  logic [ROW_W-1:0] orow_q [N_BANKS];
  logic [TW-1:0]    tmr_q  [N_BANKS];
  mc_entry_t   cur_q  [N_BANKS];
  logic [LEN_W-1:0] beat_q [N_BANKS];

  // ---------------- write-data queue (linked lists) ----------------
  logic          wd_v  [WDQ_WORDS];
  logic [31:0]   wd_d  [WDQ_WORDS];
  logic [DW-1:0] wd_nx [WDQ_WORDS];
  logic          wd_free_ok;
  logic [DW-1:0] wd_free;
  logic [DW:0]   wd_nfree;

  always_comb begin
    wd_free_ok = 1'b0; wd_free = '0; wd_nfree = '0;
    for (int i = WDQ_WORDS - 1; i >= 0; i--)
      if (!wd_v[i]) begin wd_free_ok = 1'b1; wd_free = DW'(i); wd_nfree = wd_nfree + 1'b1; end
  end

  // ---------------- request admission ----------------
  logic [BW-1:0]    req_bank;
  logic             qfree_ok;
  logic [QW-1:0]    qfree;
  logic             filling_q;          // a write's data is still arriving
  logic [BW-1:0]    fill_bank_q;
  logic [QW-1:0]    fill_idx_q;
  logic [LEN_W-1:0] fill_left_q;
  logic [DW-1:0]    fill_prev_q;
  logic             fill_first_q;

  assign req_bank = req_addr[13:12];
  always_comb begin
    qfree_ok = 1'b0; qfree = '0;
    for (int i = QDEPTH - 1; i >= 0; i--)
      if (!q[req_bank][i].v) begin qfree_ok = 1'b1; qfree = QW'(i); end
  end
  assign req_ready = qfree_ok && !filling_q &&
                     (!req_hdr.wr || 32'(wd_nfree) >= 32'(req_hdr.len) + 1);
  assign wd_ready  = filling_q && wd_free_ok;

  // ---------------- bank arbiters ----------------
  logic          ba_found [N_BANKS];
  logic          ba_hit   [N_BANKS];
  logic [QW-1:0] ba_sel   [N_BANKS];

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    logic [QDEPTH-1:0]            ba_valid;
    logic [QDEPTH-1:0][WP_W-1:0]  ba_w;
    logic [QDEPTH-1:0][ROW_W-1:0] ba_row;
    always_comb begin
      for (int i = 0; i < QDEPTH; i++) begin
        ba_valid[i] = q[b][i].v && q[b][i].rdy;
        ba_w[i]     = q[b][i].w;
        ba_row[i]   = q[b][i].row;
      end
    end
    bank_arbiter #(.Q(QDEPTH), .W(WP_W), .ROW_W(ROW_W)) u_arb (
      .valid(ba_valid), .wprio(ba_w), .row(ba_row),
      .row_open(open_q[b]), .open_row(orow_q[b]),
      .found(ba_found[b]), .hit(ba_hit[b]), .sel(ba_sel[b]));
  end

  // ---------------- response queue and read buffer ----------------
  logic             rsp_full, rsp_empty, rsp_push;
  hdr_t             rsp_din;
  logic [$clog2(QDEPTH+1)-1:0] unused_rspc;
  logic             rdq_empty, rdq_full;
  logic [RCW-1:0]   rdq_count, inflight_q;

  sync_fifo #(.WIDTH($bits(hdr_t)), .DEPTH(QDEPTH)) u_rspq (
    .clk, .rst_n, .push(rsp_push), .din(rsp_din), .pop(rsp_pop),
    .dout(rsp_hdr), .empty(rsp_empty), .full(rsp_full), .count(unused_rspc));
  sync_fifo #(.WIDTH(32), .DEPTH(RDQ)) u_rdq (
    .clk, .rst_n, .push(dram_rsp.rvalid), .din(dram_rsp.rdata), .pop(rd_pop),
    .dout(rd_data), .empty(rdq_empty), .full(rdq_full), .count(rdq_count));
  assign rsp_valid = !rsp_empty;
  assign rd_valid  = !rdq_empty;

  // ---------------- command bus (memory scheduler) ----------------
  logic [N_BANKS-1:0] want;
  logic               lock_q;
  logic [BW-1:0]      lock_bank_q, rr_q, gnt_bank;
  logic               gnt_ok;

  always_comb begin
    for (int b = 0; b < N_BANKS; b++) begin
      unique case (bst[b])
        B_PRE:   want[b] = 1'b1;
        B_ACT:   want[b] = (tmr_q[b] == '0);
        B_COL:   want[b] = (tmr_q[b] == '0) && ((beat_q[b] != '0) ||
                   (!rsp_full && (cur_q[b].hdr.wr ||
                    32'(rdq_count) + 32'(inflight_q) + 32'(cur_q[b].hdr.len) + 1 <= RDQ)));
        default: want[b] = 1'b0;
      endcase
    end
    gnt_ok = 1'b0; gnt_bank = '0;
    if (lock_q) begin
      gnt_ok = want[lock_bank_q]; gnt_bank = lock_bank_q;
    end else begin
      for (int k = N_BANKS; k >= 1; k--) begin
        logic [BW-1:0] b;
        b = rr_q + BW'(k);
        if (want[b]) begin gnt_ok = 1'b1; gnt_bank = b; end
      end
    end
  end

  always_comb begin
    mc_entry_t c;
    c = cur_q[gnt_bank];
    dram_req      = '0;
    dram_req.cmd  = DRAM_NOP;
    rsp_push      = 1'b0;
    rsp_din       = c.hdr;
    if (gnt_ok) begin
      dram_req.bank = gnt_bank;
      dram_req.row  = c.row;
      dram_req.col  = c.col + COL_W'(beat_q[gnt_bank]);
      unique case (bst[gnt_bank])
        B_PRE:   dram_req.cmd = DRAM_PRE;
        B_ACT:   dram_req.cmd = DRAM_ACT;
        B_COL: begin
          dram_req.cmd   = c.hdr.wr ? DRAM_WR : DRAM_RD;
          dram_req.wdata = wd_d[c.wptr];
          rsp_push = c.hdr.wr ? (beat_q[gnt_bank] == c.hdr.len) : (beat_q[gnt_bank] == '0);
        end
        default: dram_req.cmd = DRAM_NOP;
      endcase
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < N_BANKS; b++) begin
        for (int i = 0; i < QDEPTH; i++) q[b][i] <= '0;
        bst[b]    <= B_IDLE;
        open_q[b] <= 1'b0;
        orow_q[b] <= '0;
        tmr_q[b]  <= '0;
        cur_q[b]  <= '0;
        beat_q[b] <= '0;
      end
      for (int i = 0; i < WDQ_WORDS; i++) begin wd_v[i] <= 1'b0; wd_nx[i] <= '0; end
      filling_q    <= 1'b0;
      fill_bank_q  <= '0;
      fill_idx_q   <= '0;
      fill_left_q  <= '0;
      fill_prev_q  <= '0;
      fill_first_q <= 1'b0;
      lock_q       <= 1'b0;
      lock_bank_q  <= '0;
      rr_q         <= '0;
      inflight_q   <= '0;
    end else begin
      // input_queue process: new request in, older requests of that bank age
      if (req_valid && req_ready) begin
        for (int i = 0; i < QDEPTH; i++)
          if (q[req_bank][i].v && q[req_bank][i].w != '1) q[req_bank][i].w <= q[req_bank][i].w + 1'b1;
        q[req_bank][qfree] <= '{v: 1'b1, rdy: !req_hdr.wr, w: WP_W'(MAX_SN - 32'(req_hdr.sn)),
                                row: req_addr[27:14], col: req_addr[11:2], wptr: '0, hdr: req_hdr};
        if (req_hdr.wr) begin
          filling_q    <= 1'b1;
          fill_bank_q  <= req_bank;
          fill_idx_q   <= qfree;
          fill_left_q  <= req_hdr.len;
          fill_first_q <= 1'b1;
        end
      end
      // write data arrives
      if (wd_valid && wd_ready) begin
        wd_v[wd_free] <= 1'b1;
        wd_d[wd_free] <= wd_data;
        fill_prev_q   <= wd_free;
        fill_first_q  <= 1'b0;
        if (fill_first_q) q[fill_bank_q][fill_idx_q].wptr <= wd_free;
        else              wd_nx[fill_prev_q] <= wd_free;
        fill_left_q <= fill_left_q - 1'b1;
        if (fill_left_q == '0) begin
          filling_q <= 1'b0;
          q[fill_bank_q][fill_idx_q].rdy <= 1'b1;
        end
      end
      // per-bank command generators
      for (int b = 0; b < N_BANKS; b++) begin
        logic g;
        g = gnt_ok && (gnt_bank == BW'(b));
        if (tmr_q[b] != '0) tmr_q[b] <= tmr_q[b] - 1'b1;
        unique case (bst[b])
          B_IDLE: if (ba_found[b]) begin
            cur_q[b]  <= q[b][ba_sel[b]];
            q[b][ba_sel[b]].v <= 1'b0;
            beat_q[b] <= '0;
            if (ba_hit[b])      bst[b] <= B_COL;
            else if (open_q[b]) bst[b] <= B_PRE;
            else                bst[b] <= B_ACT;
          end
          B_PRE: if (g) begin
            open_q[b] <= 1'b0;
            tmr_q[b]  <= TW'(T_RP - 1);
            bst[b]    <= B_ACT;
          end
          B_ACT: if (g) begin
            open_q[b] <= 1'b1;
            orow_q[b] <= cur_q[b].row;
            tmr_q[b]  <= TW'(T_RCD - 1);
            bst[b]    <= B_COL;
          end
          B_COL: if (g) begin
            beat_q[b] <= beat_q[b] + 1'b1;
            if (cur_q[b].hdr.wr) begin
              wd_v[cur_q[b].wptr] <= 1'b0;
              cur_q[b].wptr <= wd_nx[cur_q[b].wptr];
            end
            if (beat_q[b] == cur_q[b].hdr.len) bst[b] <= B_IDLE;
          end
          default: bst[b] <= B_IDLE;
        endcase
      end
      // command bus lock and round robin
      if (gnt_ok && bst[gnt_bank] == B_COL) begin
        lock_q      <= (beat_q[gnt_bank] != cur_q[gnt_bank].hdr.len);
        lock_bank_q <= gnt_bank;
      end
      if (gnt_ok && !lock_q) rr_q <= gnt_bank;
      inflight_q <= inflight_q + RCW'(dram_req.cmd == DRAM_RD) - RCW'(dram_rsp.rvalid);
    end
  end

  a_rdq_room: assert property (@(posedge clk) disable iff (!rst_n) dram_rsp.rvalid |-> !rdq_full);
endmodule
