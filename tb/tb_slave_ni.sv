// tb_slave_ni: slave network interface of memory tile (1,0) with its DRAM controller and a
// DDR2 device model. Request packets from master tiles (0,1) and (4,3) are sent in on VC 0
// with credits respected: writes of 1-8 words to random banks and rows, then reads of the same
// addresses. Each response packet leaving on VC 1 is checked: destination = the requester,
// source = (1,0), response bit, same T-ID, SN and length, priority = 7 - SN + hops, a
// single-flit write response, and read data equal to what was written.
module tb_slave_ni;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_t           in_link, out_link;
  logic [N_VC-1:0] in_credit, out_credit;
  dram_req_t       dram_req;
  dram_rsp_t       dram_rsp;

  slave_ni #(.X(1), .Y(0)) dut (.clk, .rst_n, .in_link, .in_credit, .out_link, .out_credit,
                                .dram_req, .dram_rsp);
  ddr2_model u_mem (.clk, .req(dram_req), .rsp(dram_rsp));

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  typedef struct { hdr_t h; logic [31:0] addr; logic [31:0] d [8]; } txn_t;
  txn_t sent_q [16];      // by SN+8*wr
  int   n_resp = 0;

  // response capture
  hdr_t cur;
  int   beat = 0;
  always @(posedge clk) begin
    out_credit <= '0;
    if (rst_n && out_link.valid) begin
      out_credit[out_link.vc] <= 1'b1;
      check(out_link.vc == VC_RESP, "responses on VC 1");
      if (out_link.flit.head) begin
        txn_t t;
        int hops;
        cur = hdr_t'(out_link.flit.data);
        t = sent_q[int'(cur.sn) + (cur.wr ? 8 : 0)];
        hops = ((t.h.src_x > 1) ? int'(t.h.src_x) - 1 : 1 - int'(t.h.src_x)) + int'(t.h.src_y);
        check(cur.dst_x == t.h.src_x && cur.dst_y == t.h.src_y, "response destination");
        check(cur.src_x == 1 && cur.src_y == 0 && cur.resp, "response source and class");
        check(cur.tid == t.h.tid && cur.len == t.h.len, "T-ID and length kept");
        check(int'(cur.prio) == 7 - int'(cur.sn) + hops, $sformatf("priority %0d", cur.prio));
        check(out_link.flit.tail == cur.wr, "write response is one flit");
        beat = 0;
      end else begin
        txn_t t;
        t = sent_q[int'(cur.sn) + 8];     // the write to the same address
        check(out_link.flit.data == t.d[beat], $sformatf("read data sn %0d beat %0d", cur.sn, beat));
        check(out_link.flit.tail == (beat == int'(cur.len)), "tail on last word");
        beat++;
      end
      if (out_link.flit.tail) n_resp++;
    end
  end

  int cred_ret = 0, cred_used = 0;
  always @(posedge clk) if (rst_n && in_credit[VC_REQ]) cred_ret++;

  task automatic send_flit(input flit_t f);
    @(negedge clk);
    while (VC_DEPTH + cred_ret - cred_used == 0) begin in_link = '0; @(negedge clk); end
    cred_used++;
    in_link = '{valid: 1'b1, vc: VC_REQ, flit: f};
  endtask

  task automatic send_req(input txn_t t);
    send_flit('{head: 1'b1, tail: 1'b0, data: t.h});
    send_flit('{head: 1'b0, tail: !t.h.wr, data: t.addr});
    if (t.h.wr) for (int i = 0; i <= int'(t.h.len); i++)
      send_flit('{head: 1'b0, tail: i == int'(t.h.len), data: t.d[i]});
    @(negedge clk);
    in_link = '0;
  endtask

  initial begin
    in_link = '0; out_credit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      txn_t t;
      t.h = '0;
      t.h.src_x = (k % 2) ? 3'd4 : 3'd0; t.h.src_y = (k % 2) ? 3'd3 : 3'd1;
      t.h.dst_x = 3'd1; t.h.tid = 4'(k); t.h.sn = 3'(k); t.h.wr = 1'b1; t.h.len = 3'($urandom % 8);
      t.addr = {4'd1, 14'($urandom % 4), 2'($urandom % 4), 10'(16 * k), 2'b00};
      for (int i = 0; i < 8; i++) t.d[i] = $urandom;
      sent_q[k + 8] = t;
      send_req(t);
    end
    for (int k = 0; k < 8; k++) begin
      txn_t t;
      t = sent_q[k + 8];
      t.h.wr = 1'b0;
      sent_q[k] = t;
      send_req(t);
    end
    repeat (300) @(posedge clk);
    check(n_resp == 16, $sformatf("16 responses (%0d)", n_resp));
    check(u_mem.violations == 0, "DRAM timing");
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
