// tb_noc_top: end-to-end test of the 5x5 mesh in configuration A at its default parameters.
//
// Ten AXI traffic generators (one per processor tile) and fifteen DDR2 device models are
// attached. Phase 1: every master issues N_PH1 random transactions: writes (T-IDs 0-7) of 1-8
// words to addresses unique to that master, and reads (T-IDs 8-15) of rows never written,
// whose contents the memory model defines as a function of the address; targets are spread
// over all 15 memories and 4 banks. Phase 2: every master reads back everything it wrote.
// Checked: every read word, every response's ID, that responses of one T-ID come back in the
// order the requests were issued, that r_last marks the last beat, that all transactions
// complete, and that no DRAM timing rule is broken. Counted, and required to happen at least
// once: responses stored in and released from the reorder buffer, requests held back by the
// admittance check, router arbitration conflicts decided by priority rather than port order,
// row hits, row conflicts, row empties and bank interleaving in the memory controllers.
module tb_noc_top;
  import noc_pkg::*;

  localparam int N_M   = 10;
  localparam int N_MEM = 15;
  localparam int N_PH1 = 24;
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  axi_m2s_t  m_req [N_M];
  axi_s2m_t  m_rsp [N_M];
  dram_req_t d_req [N_MEM];
  dram_rsp_t d_rsp [N_MEM];

  noc_top dut (.clk, .rst_n, .m_axi_req(m_req), .m_axi_rsp(m_rsp), .dram_req(d_req), .dram_rsp(d_rsp));

  int viol [N_MEM];
  for (genvar i = 0; i < N_MEM; i++) begin : g_mem
    ddr2_model u_mem (.clk, .req(d_req[i]), .rsp(d_rsp[i]));
    int base = 0;   // commands seen before reset released (random start-up state) do not count
    always @(posedge clk) begin
      if (!rst_n) base <= u_mem.violations;
      viol[i] <= rst_n ? u_mem.violations - base : 0;
    end
  end

  int checks = 0, failures = 0;
  int done_cnt = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [31:0] model_init(input logic [31:0] addr);
    logic [BANK_W+ROW_W+COL_W-1:0] a;
    a = {addr[13:12], addr[27:14], addr[11:2]};
    return {a[15:0], 16'hA5C3} ^ {6'd0, a};
  endfunction

  // ---------------- traffic generators ----------------
  typedef struct packed {
    logic         wr;
    logic [2:0]   len;
    logic [255:0] data;
  } exp_t;

  for (genvar m = 0; m < N_M; m++) begin : g_m
    logic        aw_valid = 0, w_valid = 0, w_last = 0, ar_valid = 0, r_ready = 0, b_ready = 0;
    logic [3:0]  aw_id = 0, ar_id = 0;
    logic [31:0] aw_addr = 0, ar_addr = 0, w_data = 0;
    logic [2:0]  aw_len = 0, ar_len = 0;
    always_comb m_req[m] = '{aw_valid: aw_valid, aw_id: aw_id, aw_addr: aw_addr, aw_len: aw_len,
                             w_valid: w_valid, w_data: w_data, w_last: w_last,
                             ar_valid: ar_valid, ar_id: ar_id, ar_addr: ar_addr, ar_len: ar_len,
                             r_ready: r_ready, b_ready: b_ready};

    exp_t        expq [16][$];
    logic [31:0] wr_addr [$];
    logic [2:0]  wr_len  [$];
    logic [31:0] wmem [logic [31:0]];
    int          outstanding = 0;
    int          beat = 0;

    task automatic do_write(input logic [3:0] id, input logic [31:0] a, input logic [2:0] len);
      exp_t e;
      e = '0; e.wr = 1'b1; e.len = len;
      @(negedge clk);
      aw_valid = 1; aw_id = id; aw_addr = a; aw_len = len;
      @(posedge clk);
      while (!m_rsp[m].aw_ready) @(posedge clk);
      expq[id].push_back(e);
      outstanding++;
      wr_addr.push_back(a); wr_len.push_back(len);
      @(negedge clk);
      aw_valid = 0;
      for (int i = 0; i <= int'(len); i++) begin
        w_valid = 1; w_data = $urandom; w_last = (i == int'(len));
        wmem[a + 32'(4*i)] = w_data;
        @(posedge clk);
        while (!m_rsp[m].w_ready) @(posedge clk);
        @(negedge clk);
      end
      w_valid = 0; w_last = 0;
    endtask

    task automatic do_read(input logic [3:0] id, input logic [31:0] a, input logic [2:0] len,
                           input logic from_wmem);
      exp_t e;
      e = '0; e.wr = 1'b0; e.len = len;
      for (int i = 0; i <= int'(len); i++)
        e.data[32*i +: 32] = from_wmem ? wmem[a + 32'(4*i)] : model_init(a + 32'(4*i));
      @(negedge clk);
      ar_valid = 1; ar_id = id; ar_addr = a; ar_len = len;
      @(posedge clk);
      while (!m_rsp[m].ar_ready) @(posedge clk);
      expq[id].push_back(e);
      outstanding++;
      @(negedge clk);
      ar_valid = 0;
    endtask

    initial begin
      @(posedge rst_n);
      repeat (5) @(posedge clk);
      for (int i = 0; i < N_PH1; i++) begin
        logic [3:0]  mem;
        logic [31:0] a;
        mem = 4'($urandom % N_MEM);
        if ($urandom % 2 == 0) begin
          // unique per master: row 16*m, column block i
          a = {mem, 14'(16 * m), 2'($urandom % 4), 10'(8 * i), 2'b00};
          do_write(4'($urandom % 8), a, 3'($urandom % 8));
        end else begin
          a = {mem, 14'(1000 + $urandom % 3), 2'($urandom % 4), 10'(8 * ($urandom % 64)), 2'b00};
          do_read(4'(8 + $urandom % 8), a, 3'($urandom % 8), 1'b0);
        end
      end
      while (outstanding != 0) @(posedge clk);
      for (int i = 0; i < wr_addr.size(); i++)
        do_read(4'(8 + i % 8), wr_addr[i], wr_len[i], 1'b1);
      // phase 3: a run of long reads with one T-ID fills the reorder buffer reservation
      for (int i = 0; i < 12; i++)
        do_read(4'(8), {4'($urandom % N_MEM), 14'(1000), 2'($urandom % 4), 10'(8 * i), 2'b00},
                3'd7, 1'b0);
      while (outstanding != 0) @(posedge clk);
      done_cnt++;
    end

    // response side: random back-pressure, checks
    always @(negedge clk) begin
      r_ready <= ($urandom % 4) != 0;
      b_ready <= ($urandom % 4) != 0;
    end

    always @(posedge clk) begin
      if (rst_n && m_rsp[m].r_valid && r_ready) begin
        logic [3:0] id;
        id = m_rsp[m].r_id;
        checks++;
        if (expq[id].size() == 0 || expq[id][0].wr) begin
          failures++;
          $display("FAIL master %0d: unexpected R beat id %0d", m, id);
        end else begin
          if (m_rsp[m].r_data != expq[id][0].data[32*beat +: 32]) begin
            failures++;
            $display("FAIL master %0d id %0d beat %0d: data %h expected %h", m, id, beat,
                     m_rsp[m].r_data, expq[id][0].data[32*beat +: 32]);
          end
          if (m_rsp[m].r_last != (beat == int'(expq[id][0].len))) begin
            failures++;
            $display("FAIL master %0d id %0d: r_last at beat %0d", m, id, beat);
          end
          if (m_rsp[m].r_last) begin
            void'(expq[id].pop_front());
            outstanding--;
            beat = 0;
          end else beat++;
        end
      end
      if (rst_n && m_rsp[m].b_valid && b_ready) begin
        logic [3:0] id;
        id = m_rsp[m].b_id;
        checks++;
        if (expq[id].size() == 0 || !expq[id][0].wr) begin
          failures++;
          $display("FAIL master %0d: unexpected B id %0d", m, id);
        end else begin
          void'(expq[id].pop_front());
          outstanding--;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_rb_store [N_M], n_rb_rel [N_M], n_refused [N_M], n_direct [N_M];
  for (genvar m = 0; m < N_M; m++) begin : g_mc
    always @(posedge clk) if (rst_n) begin
      if (dut.g_y[2*(m/5)+1].g_x[m%5].g_m.u_ni.rb_wr_valid &&
          dut.g_y[2*(m/5)+1].g_x[m%5].g_m.u_ni.rb_wr_ready &&
          dut.g_y[2*(m/5)+1].g_x[m%5].g_m.u_ni.pq_flit.head) n_rb_store[m]++;
      if (dut.g_y[2*(m/5)+1].g_x[m%5].g_m.u_ni.rb_rel_start) n_rb_rel[m]++;
      if (dut.g_y[2*(m/5)+1].g_x[m%5].g_m.u_ni.fwd_req &&
          !dut.g_y[2*(m/5)+1].g_x[m%5].g_m.u_ni.fwd_admit) n_refused[m]++;
      if (dut.g_y[2*(m/5)+1].g_x[m%5].g_m.u_ni.du_start_q) n_direct[m]++;
    end
  end

  int n_hit [N_MEM], n_conf [N_MEM], n_empty [N_MEM], n_ilv [N_MEM];
  for (genvar i = 0; i < N_MEM; i++) begin : g_bc
    always @(posedge clk) if (rst_n) begin
      int busy_col;
      busy_col = 0;
      for (int b = 0; b < N_BANKS; b++) begin
        if (dut.g_y[2*(i/5)].g_x[i%5].g_s_ni.u_ni.u_mc.bst[b] == 2'd0 &&
            dut.g_y[2*(i/5)].g_x[i%5].g_s_ni.u_ni.u_mc.ba_found[b]) begin
          if (dut.g_y[2*(i/5)].g_x[i%5].g_s_ni.u_ni.u_mc.ba_hit[b]) n_hit[i]++;
          else if (dut.g_y[2*(i/5)].g_x[i%5].g_s_ni.u_ni.u_mc.open_q[b]) n_conf[i]++;
          else n_empty[i]++;
        end
        if (dut.g_y[2*(i/5)].g_x[i%5].g_s_ni.u_ni.u_mc.bst[b] == 2'd3) busy_col++;
      end
      if ((d_req[i].cmd == DRAM_ACT || d_req[i].cmd == DRAM_PRE) && busy_col > 0) n_ilv[i]++;
    end
  end

  int n_conflict [25], n_prio_win [25];
  for (genvar r = 0; r < 25; r++) begin : g_rc
    always @(posedge clk) if (rst_n) begin
      for (int o = 0; o < N_PORTS; o++) begin
        logic [N_PORTS-1:0] rq;
        int lowest;
        rq = dut.g_y[r/5].g_x[r%5].u_router.arb_req[o];
        lowest = -1;
        for (int p = N_PORTS - 1; p >= 0; p--) if (rq[p]) lowest = p;
        if ($countones(rq) > 1) begin
          n_conflict[r]++;
          if (int'(dut.g_y[r/5].g_x[r%5].u_router.arb_idx[o]) != lowest) n_prio_win[r]++;
        end
      end
    end
  end

  function automatic int sum_m(input int a [N_M]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction
  function automatic int sum_mem(input int a [N_MEM]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction
  function automatic int sum_r(input int a [25]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    foreach (n_rb_store[i]) begin n_rb_store[i] = 0; n_rb_rel[i] = 0; n_refused[i] = 0; n_direct[i] = 0; end
    foreach (n_hit[i]) begin n_hit[i] = 0; n_conf[i] = 0; n_empty[i] = 0; n_ilv[i] = 0; end
    foreach (n_conflict[i]) begin n_conflict[i] = 0; n_prio_win[i] = 0; end
    repeat (10) @(posedge clk);  // longer than the DRAM model's read pipeline
    rst_n = 1'b1;
    while (done_cnt != N_M) @(posedge clk);
    repeat (20) @(posedge clk);
    $display("tb_noc_top: all transactions done at cycle %0d", cycle);
    need("in-order responses (direct)", sum_m(n_direct));
    need("responses stored in reorder buffer", sum_m(n_rb_store));
    need("reorder buffer releases", sum_m(n_rb_rel));
    need("requests held by admittance", sum_m(n_refused));
    need("router conflicts", sum_r(n_conflict));
    need("conflicts won by priority", sum_r(n_prio_win));
    need("row hits", sum_mem(n_hit));
    need("row conflicts", sum_mem(n_conf));
    need("row empties", sum_mem(n_empty));
    need("bank interleaving", sum_mem(n_ilv));
    for (int i = 0; i < N_MEM; i++) begin
      checks++;
      if (viol[i] != 0) begin
        failures++;
        $display("FAIL memory %0d: %0d DRAM timing violations", i, viol[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d of %0d masters done", done_cnt, N_M);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
