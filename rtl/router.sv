// router: priority-based router (PR) of one mesh tile.
//
// Five ports (N, E, S, W, local), each input with two virtual channels: VC 0 carries request
// packets and VC 1 response packets, so the two message classes cannot block each other.
// Each input VC is a VC_DEPTH-flit FIFO. Packets use wormhole switching and dimension-order
// (XY) routing: a packet first travels along x, then along y; y grows towards the south port.
// A head flit may leave only when the output VC of its class at its output port is free; it
// then holds that output VC until its tail flit has passed. Flow control is credit based: one
// credit per flit slot of the downstream VC buffer, returned as a one-cycle pulse on
// in_credit when a flit leaves an input buffer.
//
// Switch allocation is the document's priority scheme. Every input VC holds a waiting
// priority: when a new packet reaches the front of the buffer it is loaded with the packet's
// priority field (MaxSeqNum - SN + distance, written by the sending network interface); every
// time the VC competes and loses, it is incremented, so no packet starves. Each cycle every
// input port offers its eligible VC with the higher waiting priority, and each output port
// grants the input with the highest value (pr_arbiter). The first stage and the tie rule
// (lowest index) are this design's choices. A flit granted in cycle t is on out_link in the same
// cycle (the output is combinational from the input buffers), so a flit crosses a router in one
// cycle after it was written into the input buffer.
module router
  import noc_pkg::*;
#(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  link_t                in_link   [N_PORTS],
  output logic [N_VC-1:0]      in_credit [N_PORTS],
  output link_t                out_link  [N_PORTS],
  input  logic [N_VC-1:0]      out_credit[N_PORTS]
);
  localparam int unsigned PORT_IW = 3;
  localparam int unsigned CRED_W  = $clog2(VC_DEPTH + 1);

  flit_t               fifo_dout [N_PORTS][N_VC];
  logic                fifo_empty[N_PORTS][N_VC];
  logic                fifo_pop  [N_PORTS][N_VC];

  logic [PORT_IW-1:0]  route_q   [N_PORTS][N_VC];
  logic [WP_W-1:0]     wp_q      [N_PORTS][N_VC];
  logic                fresh_q   [N_PORTS][N_VC];
  logic                lock_q    [N_PORTS][N_VC];
  logic [CRED_W-1:0]   credit_q  [N_PORTS][N_VC];

  logic [PORT_IW-1:0]  route     [N_PORTS][N_VC];
  logic [WP_W-1:0]     eff_wp    [N_PORTS][N_VC];
  logic                elig      [N_PORTS][N_VC];

  logic                in_req    [N_PORTS];
  logic                sel_vc    [N_PORTS];
  logic [PORT_IW-1:0]  in_route  [N_PORTS];
  logic [WP_W-1:0]     in_wp     [N_PORTS];
  logic                granted   [N_PORTS];

  logic [N_PORTS-1:0]            arb_req [N_PORTS];
  logic [N_PORTS-1:0][WP_W-1:0]  arb_val [N_PORTS];
  logic [N_PORTS-1:0]            arb_gnt [N_PORTS];
  logic                          arb_ok  [N_PORTS];
  logic [PORT_IW-1:0]            arb_idx [N_PORTS];

  function automatic logic [PORT_IW-1:0] xy_route(input hdr_t h);
    if (int'(h.dst_x) > int'(X))      return PORT_IW'(PORT_E);
    else if (int'(h.dst_x) < int'(X)) return PORT_IW'(PORT_W);
    else if (int'(h.dst_y) > int'(Y)) return PORT_IW'(PORT_S);
    else if (int'(h.dst_y) < int'(Y)) return PORT_IW'(PORT_N);
    else                       return PORT_IW'(PORT_L);
  endfunction

  // input buffers
  for (genvar p = 0; p < N_PORTS; p++) begin : g_in
    for (genvar v = 0; v < N_VC; v++) begin : g_vc
      logic [CRED_W-1:0] unused_count;
      logic              unused_full;
      sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(VC_DEPTH)) u_buf (
        .clk, .rst_n,
        .push (in_link[p].valid && (in_link[p].vc == 1'(v))),
        .din  (in_link[p].flit),
        .pop  (fifo_pop[p][v]),
        .dout (fifo_dout[p][v]),
        .empty(fifo_empty[p][v]),
        .full (unused_full),
        .count(unused_count)
      );
      assign in_credit[p][v] = fifo_pop[p][v];
    end
  end

  // route computation, eligibility and first-stage (VC) selection
  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      for (int v = 0; v < N_VC; v++) begin
        flit_t f;
        hdr_t  h;
        f = fifo_dout[p][v];
        h = hdr_t'(f.data);
        route[p][v]  = f.head ? xy_route(h) : route_q[p][v];
        eff_wp[p][v] = (fresh_q[p][v] && f.head) ? WP_W'(h.prio) : wp_q[p][v];
        elig[p][v]   = !fifo_empty[p][v] && (credit_q[route[p][v]][v] != '0)
                       && (!f.head || !lock_q[route[p][v]][v]);
      end
      sel_vc[p]   = elig[p][1] && (!elig[p][0] || eff_wp[p][1] > eff_wp[p][0]);
      in_req[p]   = elig[p][0] || elig[p][1];
      in_route[p] = route[p][sel_vc[p]];
      in_wp[p]    = eff_wp[p][sel_vc[p]];
    end
    for (int o = 0; o < N_PORTS; o++) begin
      for (int p = 0; p < N_PORTS; p++) begin
        arb_req[o][p] = in_req[p] && (in_route[p] == PORT_IW'(o));
        arb_val[o][p] = in_wp[p];
      end
    end
  end

  // second stage: one priority arbiter per output port
  for (genvar o = 0; o < N_PORTS; o++) begin : g_arb
    pr_arbiter #(.N(N_PORTS), .W(WP_W)) u_arb (
      .req(arb_req[o]), .value(arb_val[o]),
      .gnt(arb_gnt[o]), .gnt_valid(arb_ok[o]), .gnt_idx(arb_idx[o])
    );
  end

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      granted[p] = in_req[p] && arb_gnt[in_route[p]][p];
      for (int v = 0; v < N_VC; v++) fifo_pop[p][v] = granted[p] && (sel_vc[p] == 1'(v));
    end
    for (int o = 0; o < N_PORTS; o++) begin
      out_link[o].valid = arb_ok[o];
      out_link[o].vc    = sel_vc[arb_idx[o]];
      out_link[o].flit  = fifo_dout[arb_idx[o]][sel_vc[arb_idx[o]]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) begin
        for (int v = 0; v < N_VC; v++) begin
          route_q[p][v]  <= '0;
          wp_q[p][v]     <= '0;
          fresh_q[p][v]  <= 1'b1;
          lock_q[p][v]   <= 1'b0;
          credit_q[p][v] <= CRED_W'(VC_DEPTH);
        end
      end
    end else begin
      // input side: waiting priorities and stored routes
      for (int p = 0; p < N_PORTS; p++) begin
        for (int v = 0; v < N_VC; v++) begin
          if (fifo_pop[p][v]) begin
            wp_q[p][v]    <= eff_wp[p][v];
            fresh_q[p][v] <= fifo_dout[p][v].tail;
            if (fifo_dout[p][v].head) route_q[p][v] <= route[p][v];
          end else if (elig[p][v]) begin
            wp_q[p][v]    <= (eff_wp[p][v] == '1) ? eff_wp[p][v] : eff_wp[p][v] + 1'b1;
            fresh_q[p][v] <= 1'b0;
          end
        end
      end
      // output side: VC ownership and credits
      for (int o = 0; o < N_PORTS; o++) begin
        for (int v = 0; v < N_VC; v++) begin
          logic sent;
          sent = out_link[o].valid && (out_link[o].vc == 1'(v));
          credit_q[o][v] <= credit_q[o][v] - CRED_W'(sent) + CRED_W'(out_credit[o][v]);
          if (sent && out_link[o].flit.head && !out_link[o].flit.tail) lock_q[o][v] <= 1'b1;
          else if (sent && out_link[o].flit.tail)                      lock_q[o][v] <= 1'b0;
        end
      end
    end
  end

  for (genvar o = 0; o < N_PORTS; o++) begin : g_chk
    a_credit: assert property (@(posedge clk) disable iff (!rst_n)
      out_link[o].valid |-> credit_q[o][out_link[o].vc] != '0);
  end
endmodule
