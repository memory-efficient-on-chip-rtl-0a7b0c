// reorder_buffer: the reorder unit's reorder-table and shared reorder-buffer.
//
// The reorder-buffer holds BUF_WORDS flits. Each slot has a valid bit, the flit and a pointer
// to the slot of the packet's next flit, so a packet is a linked list that can use any free
// slots: packets of every size share the whole buffer. The reorder-table has one row per
// stored packet: valid, T-ID, SN and the pointer P to the slot of its header flit.
//
// Write side (from the packet-queue, one flit per cycle, wr_valid/wr_ready): a header flit
// takes a free table row (Procedure E: V = 1, T-ID and SN from the header, P = current free
// slot); every flit is written into the lowest free slot (Procedure F) and the slot of the
// packet's previous flit is linked to it. The row is marked complete when the tail flit is
// written; only complete packets are released. wr_ready is low when no slot (or, for a
// header, no row) is free.
// Release side (to the depacketizer): rel_avail says that a complete stored packet has the SN
// its T-ID expects next (es_all, from the status table). rel_start claims it (the row is
// freed); its flits then stream out on rel_flit/rel_valid, one per cycle while rel_ready,
// each slot being freed as its flit leaves, until the tail.
// Linking each new slot from the previous one (instead of reserving the next free slot in
// advance, as the document's Procedure F does) and the complete bit are this design's choices.
module reorder_buffer
  import noc_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 48,
  parameter int unsigned ROWS      = 48
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // from the packet-queue
  input  logic                        wr_valid,
  input  flit_t                       wr_flit,
  output logic                        wr_ready,
  // release to the depacketizer
  input  logic [N_TID-1:0][SN_W-1:0]  es_all,
  output logic                        rel_avail,
  input  logic                        rel_start,
  output logic                        rel_valid,
  output flit_t                       rel_flit,
  input  logic                        rel_ready,
  output logic [$clog2(BUF_WORDS+1)-1:0] used_words
);
  localparam int unsigned SW = $clog2(BUF_WORDS);
  localparam int unsigned TW = $clog2(ROWS);

  typedef struct packed {
    logic             v;
    logic             complete;
    logic [TID_W-1:0] tid;
    logic [SN_W-1:0]  sn;
    logic [SW-1:0]    p;
  } rt_row_t;

  rt_row_t       rt      [ROWS];
  logic          slot_v  [BUF_WORDS];
  flit_t         slot_d  [BUF_WORDS];
  logic [SW-1:0] slot_nx [BUF_WORDS];

  logic          free_ok, row_ok, cand_ok;
  logic [SW-1:0] free_slot;
  logic [TW-1:0] free_row, cand_row, cur_row;
  logic [SW-1:0] prev_slot, rd_ptr;
  logic          reading;

  // lowest free slot, lowest free row, first releasable row
  always_comb begin
    free_ok = 1'b0; free_slot = '0;
    for (int i = BUF_WORDS - 1; i >= 0; i--)
      if (!slot_v[i]) begin free_ok = 1'b1; free_slot = SW'(i); end
    row_ok = 1'b0; free_row = '0;
    cand_ok = 1'b0; cand_row = '0;
    for (int i = ROWS - 1; i >= 0; i--) begin
      if (!rt[i].v) begin row_ok = 1'b1; free_row = TW'(i); end
      if (rt[i].v && rt[i].complete && rt[i].sn == es_all[rt[i].tid]) begin
        cand_ok = 1'b1; cand_row = TW'(i);
      end
    end
  end

  assign wr_ready  = free_ok && (!wr_flit.head || row_ok);
  assign rel_avail = cand_ok && !reading;
  assign rel_valid = reading;
  assign rel_flit  = slot_d[rd_ptr];

  always_comb begin
    used_words = '0;
    for (int i = 0; i < BUF_WORDS; i++) used_words = used_words + ($clog2(BUF_WORDS+1))'(slot_v[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ROWS; i++) rt[i] <= '0;
      for (int i = 0; i < BUF_WORDS; i++) slot_v[i] <= 1'b0;
      prev_slot <= '0;
      cur_row   <= '0;
      rd_ptr    <= '0;
      reading   <= 1'b0;
    end else begin
      // write side
      if (wr_valid && wr_ready) begin
        slot_v[free_slot] <= 1'b1;
        prev_slot         <= free_slot;
        if (wr_flit.head) begin
          hdr_t h;
          h = hdr_t'(wr_flit.data);
          rt[free_row] <= '{v: 1'b1, complete: wr_flit.tail, tid: h.tid, sn: h.sn, p: free_slot};
          cur_row      <= free_row;
        end else begin
          slot_nx[prev_slot] <= free_slot;
          if (wr_flit.tail) rt[cur_row].complete <= 1'b1;
        end
      end
      // release side
      if (rel_start && rel_avail) begin
        rt[cand_row].v <= 1'b0;
        rd_ptr         <= rt[cand_row].p;
        reading        <= 1'b1;
      end else if (reading && rel_ready) begin
        slot_v[rd_ptr] <= 1'b0;
        rd_ptr         <= slot_nx[rd_ptr];
        if (slot_d[rd_ptr].tail) reading <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) slot_d[free_slot] <= wr_flit;
  end

  a_start_avail: assert property (@(posedge clk) disable iff (!rst_n) rel_start |-> rel_avail);
endmodule
