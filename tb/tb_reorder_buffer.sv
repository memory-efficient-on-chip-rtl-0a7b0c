// tb_reorder_buffer: out-of-order packets of four T-IDs (SNs shuffled, 1 to 5 flits) are
// written while the expected SN of each T-ID is advanced as packets are released. Checked:
// every released packet is the one with the T-ID's expected SN, its flits come out complete
// and unchanged, the word count, and that a full buffer refuses further flits (wr_ready low
// with 48 words held) and accepts again once a packet has been released.
module tb_reorder_buffer;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                       wr_valid = 0, wr_ready, rel_avail, rel_start, rel_valid, rel_ready;
  flit_t                      wr_flit = '0, rel_flit;
  logic [N_TID-1:0][SN_W-1:0] es_all = '0;
  logic [5:0]                 used_words;

  reorder_buffer #(.BUF_WORDS(48), .ROWS(48)) dut (.clk, .rst_n, .wr_valid, .wr_flit, .wr_ready,
    .es_all, .rel_avail, .rel_start, .rel_valid, .rel_flit, .rel_ready, .used_words);

  typedef flit_t pkt_t [$];
  flit_t pkts [4][8][$];      // [tid][sn] -> flits
  int    order [$];           // tid*8+sn in write order
  int    checks = 0, failures = 0, released = 0, held = 0;
  bit    releasing = 1;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic void make_pkt(input int tid, input int sn, input int len);
    hdr_t h;
    h = '0; h.tid = TID_W'(tid); h.sn = SN_W'(sn); h.len = LEN_W'(len - 2);
    pkts[tid][sn].delete();
    pkts[tid][sn].push_back('{head: 1'b1, tail: len == 1, data: h});
    for (int i = 1; i < len; i++) pkts[tid][sn].push_back('{head: 1'b0, tail: i == len - 1, data: $urandom});
  endfunction

  // release side: take any available packet, compare with the expected one
  assign rel_start = rel_avail && releasing;
  assign rel_ready = 1'b1;
  int rx_tid = -1, rx_idx = 0;
  always @(posedge clk) if (rst_n) begin
    if (rel_valid && rel_ready) begin
      hdr_t h;
      if (rel_flit.head) begin
        h = hdr_t'(rel_flit.data);
        rx_tid = int'(h.tid);
        rx_idx = 0;
        check(int'(h.sn) == int'(es_all[h.tid]), "released SN is the expected one");
      end
      check(rx_tid >= 0 && rel_flit == pkts[rx_tid][es_all[rx_tid]][rx_idx], "released flit content");
      rx_idx++;
      if (rel_flit.tail) begin
        es_all[rx_tid] <= es_all[rx_tid] + 1'b1;
        released++;
      end
    end
  end

  task automatic write_pkt(input int tid, input int sn);
    foreach (pkts[tid][sn][i]) begin
      @(negedge clk);
      wr_valid = 1; wr_flit = pkts[tid][sn][i];
      @(posedge clk);
      while (!wr_ready) begin held++; @(posedge clk); end
    end
    @(negedge clk);
    wr_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // SNs 0..7 of four T-IDs in four rounds of two SNs per T-ID; each round is written in a
    // shuffled order (at most 40 words, so a round always fits, as reservations guarantee)
    for (int r = 0; r < 4; r++) begin
      order.delete();
      for (int t = 0; t < 4; t++) for (int s = 2 * r; s < 2 * r + 2; s++) begin
        make_pkt(t, s, 1 + $urandom % 5);
        order.push_back(t * 8 + s);
      end
      order.shuffle();
      foreach (order[k]) write_pkt(order[k] / 8, order[k] % 8);
      repeat (50) @(posedge clk);
    end
    check(released == 32, $sformatf("all 32 packets released (%0d)", released));
    check(used_words == 0, "buffer empty at the end");
    // overflow: releases held, SN 0 (1 flit) and SNs 1..6 (9 flits each) = 55 words
    releasing = 0;
    make_pkt(0, 0, 1);
    for (int s = 1; s <= 6; s++) make_pkt(0, s, 9);
    fork
      for (int s = 0; s <= 6; s++) write_pkt(0, s);
    join_none
    repeat (80) @(posedge clk);
    check(used_words == 48 && !wr_ready, "full buffer refuses flits");
    releasing = 1;
    wait fork;
    repeat (100) @(posedge clk);
    check(released == 39, $sformatf("released after overflow (%0d)", released));
    check(held > 0, "write side was held");
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
