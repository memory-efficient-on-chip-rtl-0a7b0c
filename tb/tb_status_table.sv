// tb_status_table: random forward admissions and in-order deliveries on four T-IDs against a
// reference that keeps, per T-ID, the list of outstanding messages with their sizes and a flag
// telling whether each holds reorder-buffer space (every message sent while another of its
// T-ID was outstanding, until it becomes the only one left). Checked every cycle: admit, SN,
// the expected SN of every T-ID and RsrvSize. At the end everything is delivered and RsrvSize
// must be back to zero. The 48-word buffer is filled so that refusals for space and for the
// SN range both occur.
module tb_status_table;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                       fwd_req = 0, fwd_admit, fwd_fire, rev_valid = 0;
  logic [TID_W-1:0]           fwd_tid = 0, rev_tid = 0;
  logic [LEN_W+1:0]           fwd_size = 1, rev_size = 1;
  logic [SN_W-1:0]            fwd_sn;
  logic [N_TID-1:0][SN_W-1:0] es_all;
  logic [5:0]                 rsrv_size;

  status_table #(.BUF_WORDS(48)) dut (.clk, .rst_n, .fwd_req, .fwd_tid, .fwd_size, .fwd_admit,
    .fwd_sn, .fwd_fire, .rev_valid, .rev_tid, .rev_size, .es_all, .rsrv_size);
  assign fwd_fire = fwd_req && fwd_admit;

  int sizes [N_TID][$];
  bit rsv   [N_TID][$];
  int es    [N_TID];
  int checks = 0, failures = 0, n_refuse_space = 0, n_refuse_sn = 0;

  function automatic int model_rsrv();
    int s = 0;
    for (int t = 0; t < N_TID; t++)
      foreach (sizes[t][i]) if (rsv[t][i]) s += sizes[t][i];
    return s;
  endfunction

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int t = 0; t < N_TID; t++) es[t] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      bit exp_admit;
      int t, n;
      @(negedge clk);
      fwd_req  = (cyc < 3500) && ($urandom % 3 != 0);
      fwd_tid  = TID_W'($urandom % 4);
      fwd_size = (LEN_W+2)'(1 + $urandom % 9);
      rev_valid = 0;
      t = $urandom % 4;
      if (sizes[t].size() > 0 && ($urandom % ((cyc < 3500) ? 3 : 1) == 0)) begin
        rev_valid = 1; rev_tid = TID_W'(t); rev_size = (LEN_W+2)'(sizes[t][0]);
      end
      #1;
      n = sizes[fwd_tid].size();
      exp_admit = fwd_req && !(rev_valid && rev_tid == fwd_tid) &&
                  (n == 0 || (n < 8 && model_rsrv() + int'(fwd_size) <= 48));
      if (fwd_req && n > 0 && !(rev_valid && rev_tid == fwd_tid)) begin
        if (n >= 8) n_refuse_sn++;
        else if (model_rsrv() + int'(fwd_size) > 48) n_refuse_space++;
      end
      check(fwd_admit == exp_admit, $sformatf("admit tid %0d cycle %0d", fwd_tid, cyc));
      if (fwd_req && exp_admit)
        check(int'(fwd_sn) == (es[fwd_tid] + n) % 8, $sformatf("sn tid %0d", fwd_tid));
      for (int k = 0; k < N_TID; k++) check(int'(es_all[k]) == es[k], "es_all");
      check(int'(rsrv_size) == model_rsrv(), $sformatf("rsrv %0d vs %0d", rsrv_size, model_rsrv()));
      @(posedge clk);
      // reference update
      if (fwd_fire) begin
        sizes[fwd_tid].push_back(int'(fwd_size));
        rsv[fwd_tid].push_back(sizes[fwd_tid].size() > 1);
      end
      if (rev_valid) begin
        void'(sizes[rev_tid].pop_front());
        void'(rsv[rev_tid].pop_front());
        if (sizes[rev_tid].size() == 0) es[rev_tid] = 0;
        else es[rev_tid] = (es[rev_tid] + 1) % 8;
        if (sizes[rev_tid].size() == 1) rsv[rev_tid][0] = 0;
      end
    end
    @(negedge clk);
    check(rsrv_size == 0 && model_rsrv() == 0, "reservation returned to zero after draining");
    check(n_refuse_space > 0, "refusal for reorder-buffer space exercised");
    check(n_refuse_sn > 0, "refusal for SN range exercised");
    $display("refusals: space %0d, sn %0d", n_refuse_space, n_refuse_sn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
