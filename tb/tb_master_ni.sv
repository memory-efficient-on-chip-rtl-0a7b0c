// tb_master_ni: master network interface of tile (0,1) between an AXI driver and a network
// model written in the testbench.
// Phase A: four 8-word reads with T-ID 1 to four memories and two writes with T-ID 2. The
// request packets are captured and checked (destination from address bits [31:28], source,
// T-ID, SN 0,1,2,.. per T-ID, priority = 7 - SN + hops, address flit, write data); the
// responses are then sent back in reverse order, so all but the last arrive out of order and
// must pass through the reorder buffer. The AXI side must still see each T-ID's responses in
// issue order with the right data. Phase B: seven 8-word reads with T-ID 3 (10-flit responses):
// the first needs no reservation, the next four reserve 40 of the 48 words and the sixth must
// be held back; exactly five requests may leave until responses come back, then the rest.
// The response path is also checked for its latency: an in-order single-flit write response
// reaches the B channel two cycles after it is presented on the link.
module tb_master_ni;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_m2s_t        axi_req;
  axi_s2m_t        axi_rsp;
  link_t           out_link, in_link;
  logic [N_VC-1:0] out_credit, in_credit;

  master_ni #(.X(0), .Y(1)) dut (.clk, .rst_n, .axi_req, .axi_rsp, .out_link, .out_credit,
                                 .in_link, .in_credit);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] rdata(input logic [31:0] a, input int beat);
    return (a + 32'(4 * beat)) ^ 32'h5A5A_0000;
  endfunction

  // ---------------- request capture (network model) ----------------
  typedef struct {
    hdr_t        h;
    logic [31:0] addr;
    logic [31:0] data [8];
  } req_t;
  req_t reqs [$];
  req_t cur;
  int   cur_n = 0;
  always @(posedge clk) begin
    out_credit <= '0;
    if (rst_n && out_link.valid) begin
      out_credit[out_link.vc] <= 1'b1;
      check(out_link.vc == VC_REQ, "requests on VC 0");
      if (out_link.flit.head) begin cur.h = hdr_t'(out_link.flit.data); cur_n = 0; end
      else if (cur_n == 0) begin cur.addr = out_link.flit.data; cur_n = 1; end
      else begin cur.data[cur_n - 1] = out_link.flit.data; cur_n++; end
      if (out_link.flit.tail) reqs.push_back(cur);
    end
  end

  // ---------------- response injection ----------------
  int cred_ret = 0, cred_used = 0;
  always @(posedge clk) if (rst_n && in_credit[VC_RESP]) cred_ret++;
  task automatic send_resp(input req_t r);
    hdr_t h;
    int n;
    h = r.h;
    h.resp = 1'b1; h.dst_x = r.h.src_x; h.dst_y = r.h.src_y; h.src_x = r.h.dst_x; h.src_y = r.h.dst_y;
    n = r.h.wr ? 1 : int'(r.h.len) + 2;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (VC_DEPTH + cred_ret - cred_used == 0) begin in_link = '0; @(negedge clk); end
      cred_used++;
      in_link = '{valid: 1'b1, vc: VC_RESP,
                  flit: '{head: i == 0, tail: i == n - 1, data: (i == 0) ? 32'(h) : rdata(r.addr, i - 1)}};
    end
    @(negedge clk);
    in_link = '0;
  endtask

  // ---------------- AXI side ----------------
  typedef struct { logic wr; int len; logic [31:0] addr; } exp_t;
  exp_t expq [16][$];
  int   beat = 0, n_resp = 0;
  longint t_b = 0;
  logic [31:0] wdat [$];

  always @(posedge clk) if (rst_n) begin
    if (axi_rsp.r_valid && axi_req.r_ready) begin
      int id;
      id = int'(axi_rsp.r_id);
      check(expq[id].size() > 0 && !expq[id][0].wr, "R beat expected");
      if (expq[id].size() > 0) begin
        check(axi_rsp.r_data == rdata(expq[id][0].addr, beat), $sformatf("R data id %0d beat %0d", id, beat));
        check(axi_rsp.r_last == (beat == expq[id][0].len), "r_last");
        if (axi_rsp.r_last) begin void'(expq[id].pop_front()); beat = 0; n_resp++; end else beat++;
      end
    end
    if (axi_rsp.b_valid && axi_req.b_ready) begin
      check(expq[axi_rsp.b_id].size() > 0 && expq[axi_rsp.b_id][0].wr, "B expected");
      void'(expq[axi_rsp.b_id].pop_front());
      n_resp++;
      t_b = cyc;
    end
  end

  task automatic axi_read(input int id, input logic [31:0] a, input int len);
    @(negedge clk);
    axi_req.ar_valid = 1; axi_req.ar_id = 4'(id); axi_req.ar_addr = a; axi_req.ar_len = 3'(len);
    @(posedge clk);
    while (!axi_rsp.ar_ready) @(posedge clk);
    expq[id].push_back('{wr: 1'b0, len: len, addr: a});
    @(negedge clk);
    axi_req.ar_valid = 0;
  endtask

  task automatic axi_write(input int id, input logic [31:0] a, input int len);
    @(negedge clk);
    axi_req.aw_valid = 1; axi_req.aw_id = 4'(id); axi_req.aw_addr = a; axi_req.aw_len = 3'(len);
    @(posedge clk);
    while (!axi_rsp.aw_ready) @(posedge clk);
    expq[id].push_back('{wr: 1'b1, len: len, addr: a});
    @(negedge clk);
    axi_req.aw_valid = 0;
    for (int i = 0; i <= len; i++) begin
      axi_req.w_valid = 1; axi_req.w_data = $urandom; axi_req.w_last = (i == len);
      wdat.push_back(axi_req.w_data);
      @(posedge clk);
      while (!axi_rsp.w_ready) @(posedge clk);
      @(negedge clk);
    end
    axi_req.w_valid = 0;
  endtask

  task automatic check_req(input req_t r, input int mem, input int tid, input int sn,
                                    input logic wr, input int len);
    int x, y, hops;
    x = mem % 5; y = 2 * (mem / 5);
    hops = x + ((y > 1) ? y - 1 : 1 - y);
    check(int'(r.h.dst_x) == x && int'(r.h.dst_y) == y, $sformatf("destination of mem %0d", mem));
    check(r.h.src_x == 0 && r.h.src_y == 1 && !r.h.resp, "source and class");
    check(int'(r.h.tid) == tid && int'(r.h.sn) == sn, $sformatf("tid %0d sn %0d got %0d %0d", tid, sn, r.h.tid, r.h.sn));
    check(int'(r.h.prio) == 7 - sn + hops, $sformatf("priority %0d", r.h.prio));
    check(r.h.wr == wr && int'(r.h.len) == len, "rw and length");
    check(r.addr[31:28] == 4'(mem), "address flit");
  endtask

  initial begin
    axi_req = '0; axi_req.r_ready = 1; axi_req.b_ready = 1; in_link = '0; out_credit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- phase A ----
    for (int k = 0; k < 4; k++) axi_read(1, {4'(3 * k + 2), 28'(32'h100 * k)}, 7);
    axi_write(2, {4'd14, 28'h40}, 3);
    axi_write(2, {4'd5, 28'h80}, 0);
    repeat (60) @(posedge clk);
    check(reqs.size() == 6, $sformatf("six request packets (%0d)", reqs.size()));
    if (reqs.size() == 6) begin
      int nrd = 0, nwr = 0;
      foreach (reqs[i]) begin
        if (!reqs[i].h.wr) begin check_req(reqs[i], 3 * nrd + 2, 1, nrd, 1'b0, 7); nrd++; end
        else begin
          check_req(reqs[i], nwr == 0 ? 14 : 5, 2, nwr, 1'b1, nwr == 0 ? 3 : 0);
          for (int b = 0; b <= int'(reqs[i].h.len); b++)
            check(reqs[i].data[b] == wdat[nwr == 0 ? b : 4], "write data flit");
          nwr++;
        end
      end
      for (int i = 5; i >= 0; i--) send_resp(reqs[i]);
    end
    repeat (80) @(posedge clk);
    check(n_resp == 6, $sformatf("phase A responses delivered (%0d)", n_resp));
    check(dut.u_st.rsrv_size == 0, "reservation back to zero");
    // ---- phase B ----
    reqs.delete();
    for (int k = 0; k < 7; k++) axi_read(3, {4'(k), 28'(32'h200 * k)}, 7);
    repeat (80) @(posedge clk);
    check(reqs.size() == 6, $sformatf("admittance holds the seventh request (%0d sent)", reqs.size()));
    check(dut.u_st.rsrv_size == 45, "45 words reserved");
    for (int i = 5; i >= 0; i--) send_resp(reqs[i]);
    repeat (80) @(posedge clk);
    check(reqs.size() == 7, $sformatf("held requests sent after release (%0d)", reqs.size()));
    if (reqs.size() == 7) begin
      check(reqs[6].h.tid == 3 && reqs[6].h.sn == 6, "seventh request gets SN 6");
      send_resp(reqs[6]);
    end
    repeat (80) @(posedge clk);
    check(n_resp == 13, $sformatf("phase B responses delivered (%0d)", n_resp));
    // ---- latency of an in-order write response ----
    reqs.delete();
    axi_write(4, {4'd0, 28'h0}, 0);
    repeat (20) @(posedge clk);
    if (reqs.size() == 1) begin
      longint t0;
      fork send_resp(reqs[0]); join_none
      @(posedge clk); t0 = cyc;
      repeat (6) @(posedge clk);
      check(t_b == t0 + 2, $sformatf("B two cycles after the response flit (%0d vs %0d)", t_b, t0));
    end else check(0, "latency request not sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
