// status_table: the reorder unit's table of outstanding messages, one row per AXI T-ID, and
// the admittance check that keeps the shared reorder buffer from overflowing.
//
// Each row holds NM (messages of that T-ID in the network), ES (the SN the master expects
// next) and LMS (the response size of the last message sent). RsrvSize counts the reorder
// buffer words reserved for all T-IDs.
//   Forward path (a request wants to enter the network, fwd_req with its T-ID and the size in
//   flits of the response it will cause):
//     NM = 0: always admitted, SN = 0, NM = 1, ES = 0, LMS = size, nothing reserved
//             (a lone message cannot arrive out of order).
//     NM > 0: admitted if RsrvSize + size <= BUF_WORDS and NM < 2^SN_W; SN = ES + NM,
//             NM + 1, LMS = size, RsrvSize + size.
//   Reverse path (rev_valid: the depacketizer has delivered the whole expected response of
//   rev_tid, of rev_size flits):
//     NM > 1: NM - 1, ES + 1; the response's own reservation is returned; when NM becomes 1
//             the last outstanding message will arrive in order, so LMS is returned as well.
//     NM = 1: the T-ID's last response; the row is cleared (NM = ES = LMS = 0).
// The document's procedure frees "RecvMsgSize" on every in-order arrival, although the first
// message of a T-ID reserved nothing; to keep RsrvSize exact, this design keeps one extra bit
// per row (U) that says whether the expected message holds a reservation, and frees its size
// only if it does. A reverse update takes precedence: a forward request for the same T-ID in
// the same cycle is not admitted. Updates take effect at the clock edge; admit and sn are
// combinational.
module status_table
  import noc_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 48
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // forward path
  input  logic                        fwd_req,
  input  logic [TID_W-1:0]            fwd_tid,
  input  logic [LEN_W+1:0]            fwd_size,
  output logic                        fwd_admit,
  output logic [SN_W-1:0]             fwd_sn,
  input  logic                        fwd_fire,   // admitted request actually sent
  // reverse path
  input  logic                        rev_valid,
  input  logic [TID_W-1:0]            rev_tid,
  input  logic [LEN_W+1:0]            rev_size,
  // expected SN of every T-ID (for the packet-queue and the reorder buffer)
  output logic [N_TID-1:0][SN_W-1:0]  es_all,
  output logic [$clog2(BUF_WORDS+1)-1:0] rsrv_size
);
  localparam int unsigned RW = $clog2(BUF_WORDS + 1);
  localparam int unsigned NM_W = SN_W + 1;

  typedef struct packed {
    logic [NM_W-1:0]   nm;
    logic [SN_W-1:0]   es;
    logic [LEN_W+1:0]  lms;
    logic              u;    // expected message holds no reservation
  } st_row_t;

  st_row_t         tbl [N_TID];
  logic [RW-1:0]   rsrv_q;

  assign rsrv_size = rsrv_q;

  always_comb begin
    st_row_t r;
    r = tbl[fwd_tid];
    fwd_sn = r.es + SN_W'(r.nm);
    if (!fwd_req || (rev_valid && rev_tid == fwd_tid)) fwd_admit = 1'b0;
    else if (r.nm == '0)                      fwd_admit = 1'b1;
    else fwd_admit = (32'(r.nm) < (1 << SN_W)) &&
                     (32'(rsrv_q) + 32'(fwd_size) <= BUF_WORDS);
    for (int t = 0; t < N_TID; t++) es_all[t] = tbl[t].es;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < N_TID; t++) tbl[t] <= '0;
      rsrv_q <= '0;
    end else begin
      logic [RW-1:0] rs;
      rs = rsrv_q;
      if (fwd_fire) begin
        st_row_t r;
        r = tbl[fwd_tid];
        if (r.nm == '0) begin                     // Procedure A
          tbl[fwd_tid] <= '{nm: NM_W'(1), es: '0, lms: fwd_size, u: 1'b1};
        end else begin                            // Procedure B
          tbl[fwd_tid].nm  <= r.nm + 1'b1;
          tbl[fwd_tid].lms <= fwd_size;
          rs = rs + RW'(fwd_size);
        end
      end
      if (rev_valid) begin
        st_row_t r;
        r = tbl[rev_tid];
        if (r.nm > NM_W'(1)) begin                // Procedure C
          tbl[rev_tid].nm <= r.nm - 1'b1;
          tbl[rev_tid].es <= r.es + 1'b1;
          if (!r.u) rs = rs - RW'(rev_size);
          if (r.nm == NM_W'(2)) begin
            rs = rs - RW'(r.lms);
            tbl[rev_tid].u <= 1'b1;
          end else begin
            tbl[rev_tid].u <= 1'b0;
          end
        end else begin                            // Procedure D
          tbl[rev_tid] <= '0;
        end
      end
      rsrv_q <= rs;
    end
  end

  a_fire_admitted: assert property (@(posedge clk) disable iff (!rst_n) fwd_fire |-> fwd_admit);
  a_rev_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    rev_valid |-> tbl[rev_tid].nm != '0);
endmodule
