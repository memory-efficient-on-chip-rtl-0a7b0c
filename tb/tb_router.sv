// tb_router: the router of tile (2,2) with credit-respecting senders on all five inputs and
// sinks on all five outputs that return a credit one cycle after each flit.
// Directed part: a lone head flit leaves one cycle after it was written (latency 1), and of
// two single-flit packets arriving together for the same output, the one with the higher
// priority field leaves first, whatever its port. Random part: 300 packets of 1-5 flits on
// both VCs to random destinations of the 5x5 mesh. Checked: each packet leaves on the XY
// output port for its destination and on its own VC, its flits arrive complete, in order and
// not interleaved with another packet on that output VC, and every packet arrives.
module tb_router;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t           in_link [N_PORTS];
  logic [N_VC-1:0] in_credit [N_PORTS];
  link_t           out_link [N_PORTS];
  logic [N_VC-1:0] out_credit [N_PORTS];

  router #(.X(2), .Y(2)) dut (.clk, .rst_n, .in_link, .in_credit, .out_link, .out_credit);

  int checks = 0, failures = 0, sent = 0, got = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int xy_port(input int dx, input int dy);
    if (dx > 2) return 1; else if (dx < 2) return 3;
    else if (dy > 2) return 2; else if (dy < 2) return 0; else return 4;
  endfunction

  int pk_port [1024], pk_len [1024], pk_vc [1024];

  // sinks: return credits, check packets
  int cur_id [N_PORTS][N_VC], cur_idx [N_PORTS][N_VC];
  longint t_out [N_PORTS];
  int first_id [N_PORTS];
  for (genvar o = 0; o < N_PORTS; o++) begin : g_sink
    always @(posedge clk) begin
      out_credit[o] <= '0;
      if (rst_n && out_link[o].valid) begin
        int v, id;
        hdr_t h;
        v = int'(out_link[o].vc);
        out_credit[o][v] <= 1'b1;
        if (first_id[o] < 0) begin first_id[o] = -2; t_out[o] = cyc; end
        if (out_link[o].flit.head) begin
          h = hdr_t'(out_link[o].flit.data);
          id = int'({h.spare, h.tid, h.sn});
          if (first_id[o] == -2) first_id[o] = id;
          check(cur_id[o][v] < 0, "head while a packet is open on this output VC");
          check(pk_port[id] == o && pk_vc[id] == v, $sformatf("packet %0d on port %0d vc %0d", id, o, v));
          cur_id[o][v] = id; cur_idx[o][v] = 1;
        end else begin
          id = cur_id[o][v];
          check(id >= 0 && out_link[o].flit.data == {16'(id), 16'(cur_idx[o][v])}, "body flit");
          cur_idx[o][v]++;
        end
        if (out_link[o].flit.tail) begin
          check(id >= 0 && cur_idx[o][v] == pk_len[id], "packet length");
          cur_id[o][v] = -1;
          got++;
        end
      end
    end
  end

  // senders
  int cred_ret [N_PORTS][N_VC], cred_used [N_PORTS][N_VC];
  function automatic int cred(input int p, input int v);
    return VC_DEPTH + cred_ret[p][v] - cred_used[p][v];
  endfunction
  for (genvar p = 0; p < N_PORTS; p++) begin : g_cred
    always @(posedge clk) for (int v = 0; v < N_VC; v++) if (rst_n && in_credit[p][v]) cred_ret[p][v]++;
  end

  bit start_rand = 0;
  int senders_done = 0;
  for (genvar p = 0; p < N_PORTS; p++) begin : g_send
    initial begin
      wait (start_rand);
      for (int k = 0; k < 60; k++) begin
        hdr_t h;
        int id, len, vc;
        id = 10 + p * 60 + k; len = 1 + $urandom % 5; vc = $urandom % 2;
        h = '0; {h.spare, h.tid, h.sn} = 10'(id);
        h.dst_x = 3'($urandom % 5); h.dst_y = 3'($urandom % 5); h.prio = 5'($urandom % 16);
        pk_port[id] = xy_port(int'(h.dst_x), int'(h.dst_y)); pk_len[id] = len; pk_vc[id] = vc;
        for (int i = 0; i < len; i++) begin
          @(negedge clk);
          while (cred(p, vc) == 0) begin in_link[p] = '0; @(negedge clk); end
          cred_used[p][vc]++;
          in_link[p] = '{valid: 1'b1, vc: 1'(vc), flit: '{head: i == 0, tail: i == len - 1,
                          data: (i == 0) ? 32'(h) : {16'(id), 16'(i)}}};
        end
        sent++;
        @(negedge clk);
        in_link[p] = '0;
      end
      senders_done++;
    end
  end

  initial begin
    for (int o = 0; o < N_PORTS; o++) begin
      in_link[o] = '0; out_credit[o] = '0; first_id[o] = -1;
      for (int v = 0; v < N_VC; v++) begin cur_id[o][v] = -1; cred_ret[o][v] = 0; cred_used[o][v] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: one flit from W to E
    begin
      longint t_in;
      hdr_t h;
      h = '0; h.sn = 3'd1; h.dst_x = 3'd4; h.dst_y = 3'd2; h.prio = 5'd3;
      pk_port[1] = 1; pk_len[1] = 1; pk_vc[1] = 0;
      @(negedge clk);
      in_link[3] = '{valid: 1'b1, vc: 1'b0, flit: '{head: 1'b1, tail: 1'b1, data: h}};
      cred_used[3][0]++; sent++;
      @(posedge clk); t_in = cyc;
      @(negedge clk);
      in_link[3] = '0;
      repeat (4) @(posedge clk);
      check(t_out[1] == t_in + 1, $sformatf("one-cycle traversal (%0d -> %0d)", t_in, t_out[1]));
    end
    // priority: N (prio 2) and L (prio 9) both to S in the same cycle; L must win
    first_id[2] = -1;
    begin
      hdr_t ha, hb;
      ha = '0; ha.sn = 3'd2; ha.dst_x = 3'd2; ha.dst_y = 3'd4; ha.prio = 5'd2;
      hb = '0; hb.sn = 3'd3; hb.dst_x = 3'd2; hb.dst_y = 3'd4; hb.prio = 5'd9;
      pk_port[2] = 2; pk_len[2] = 1; pk_vc[2] = 0;
      pk_port[3] = 2; pk_len[3] = 1; pk_vc[3] = 0;
      @(negedge clk);
      in_link[0] = '{valid: 1'b1, vc: 1'b0, flit: '{head: 1'b1, tail: 1'b1, data: ha}};
      in_link[4] = '{valid: 1'b1, vc: 1'b0, flit: '{head: 1'b1, tail: 1'b1, data: hb}};
      cred_used[0][0]++; cred_used[4][0]++; sent += 2;
      @(negedge clk);
      in_link[0] = '0; in_link[4] = '0;
    end
    repeat (4) @(posedge clk);
    check(first_id[2] == 3, $sformatf("higher priority first (got packet %0d)", first_id[2]));
    // random traffic
    start_rand = 1;
    wait (senders_done == N_PORTS);
    repeat (50) @(posedge clk);
    check(got == sent && sent == 303, $sformatf("all packets delivered (%0d of %0d)", got, sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
