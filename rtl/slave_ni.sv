// slave_ni: slave-side network interface of a memory tile, with the order-sensitive memory
// controller (mem_ctrl) integrated in it.
//
// Reverse path (requests from the router, VC 0): an 8-flit packet buffer feeds the
// depacketizer, which keeps the header flit (T-ID, SN, source tile, length, read/write), hands
// header and address to the memory controller as one request and then passes the write data
// words. No reordering is needed on this side.
// Forward path (responses, VC 1): the packetizer takes the next response descriptor from the
// controller's response queue. The adapter turns the request header into the response header:
// destination = the request's source, source = this tile, response bit set, same T-ID and SN,
// priority recomputed as MaxSeqNum - SN + distance. A write response is that single flit; a read
// response is followed by its len+1 data words from the read buffer. Credits govern the router's
// local input VC 1. The document's slave NI without a memory controller keeps request headers
// in a header FIFO; with the controller, the header travels with the request through the bank
// queue, which is what this design does.
module slave_ni
  import noc_pkg::*;
#(
  parameter int unsigned X      = 0,
  parameter int unsigned Y      = 0,
  parameter int unsigned QDEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  link_t             in_link,
  output logic [N_VC-1:0]   in_credit,
  output link_t             out_link,
  input  logic [N_VC-1:0]   out_credit,
  output dram_req_t         dram_req,
  input  dram_rsp_t         dram_rsp
);
  localparam int unsigned CRED_W = $clog2(VC_DEPTH + 1);

  // ---------------- packet buffer and depacketizer ----------------
  flit_t pb_flit;
  logic  pb_empty, pb_full, pb_pop;
  logic [$clog2(QDEPTH+1)-1:0] unused_pbc;

  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(QDEPTH)) u_pb (
    .clk, .rst_n, .push(in_link.valid), .din(in_link.flit),
    .pop(pb_pop), .dout(pb_flit), .empty(pb_empty), .full(pb_full), .count(unused_pbc));
  assign in_credit[VC_REQ]  = pb_pop;
  assign in_credit[VC_RESP] = 1'b0;

  typedef enum logic [1:0] {D_HDR, D_ADDR, D_DATA} dstate_e;
  dstate_e dst;
  hdr_t    rq_hdr_q;
  logic    req_valid, req_ready, wd_valid, wd_ready;

  assign req_valid = (dst == D_ADDR) && !pb_empty;
  assign wd_valid  = (dst == D_DATA) && !pb_empty;
  assign pb_pop    = !pb_empty && ((dst == D_HDR) || (req_valid && req_ready) || (wd_valid && wd_ready));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst      <= D_HDR;
      rq_hdr_q <= '0;
    end else begin
      unique case (dst)
        D_HDR:  if (!pb_empty) begin
          rq_hdr_q <= hdr_t'(pb_flit.data);
          dst      <= D_ADDR;
        end
        D_ADDR: if (req_valid && req_ready) dst <= rq_hdr_q.wr ? D_DATA : D_HDR;
        D_DATA: if (wd_valid && wd_ready && pb_flit.tail) dst <= D_HDR;
        default: dst <= D_HDR;
      endcase
    end
  end

  // ---------------- memory controller ----------------
  logic        rsp_valid, rsp_pop, rd_valid, rd_pop;
  hdr_t        rsp_hdr;
  logic [31:0] rd_data;

  mem_ctrl u_mc (
    .clk, .rst_n,
    .req_valid, .req_hdr(rq_hdr_q), .req_addr(pb_flit.data), .req_ready,
    .wd_valid, .wd_data(pb_flit.data), .wd_ready,
    .rsp_valid, .rsp_hdr, .rsp_pop, .rd_valid, .rd_data, .rd_pop,
    .dram_req, .dram_rsp);

  // ---------------- packetizer with adapter ----------------
  typedef enum logic [1:0] {P_IDLE, P_HDR, P_DATA} pstate_e;
  pstate_e           pst;
  hdr_t              out_hdr_q;
  logic [LEN_W-1:0]  beat_q;
  logic [CRED_W-1:0] cred_q;
  logic              send;

  assign send    = (cred_q != '0) && ((pst == P_HDR) || (pst == P_DATA && rd_valid));
  assign rd_pop  = send && (pst == P_DATA);
  assign rsp_pop = (pst == P_IDLE) && rsp_valid;

  always_comb begin
    out_link       = '0;
    out_link.valid = send;
    out_link.vc    = VC_RESP;
    if (pst == P_HDR) out_link.flit = '{head: 1'b1, tail: out_hdr_q.wr, data: out_hdr_q};
    else              out_link.flit = '{head: 1'b0, tail: beat_q == out_hdr_q.len, data: rd_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst       <= P_IDLE;
      out_hdr_q <= '0;
      beat_q    <= '0;
      cred_q    <= CRED_W'(VC_DEPTH);
    end else begin
      cred_q <= cred_q - CRED_W'(send) + CRED_W'(out_credit[VC_RESP]);
      unique case (pst)
        P_IDLE: if (rsp_valid) begin
          hdr_t h;
          h       = rsp_hdr;
          h.dst_x = rsp_hdr.src_x;
          h.dst_y = rsp_hdr.src_y;
          h.src_x = COORD_W'(X);
          h.src_y = COORD_W'(Y);
          h.resp  = 1'b1;
          h.prio  = pkt_prio(rsp_hdr.sn, h.src_x, h.src_y, h.dst_x, h.dst_y);
          out_hdr_q <= h;
          beat_q    <= '0;
          pst       <= P_HDR;
        end
        P_HDR:  if (send) pst <= out_hdr_q.wr ? P_IDLE : P_DATA;
        P_DATA: if (send) begin
          beat_q <= beat_q + 1'b1;
          if (beat_q == out_hdr_q.len) pst <= P_IDLE;
        end
        default: pst <= P_IDLE;
      endcase
    end
  end

  a_req_vc:  assert property (@(posedge clk) disable iff (!rst_n) in_link.valid |-> in_link.vc == VC_REQ);
  a_pb_room: assert property (@(posedge clk) disable iff (!rst_n) in_link.valid |-> (!pb_full || pb_pop));
endmodule
