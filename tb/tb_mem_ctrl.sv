// tb_mem_ctrl: order-sensitive memory controller driving a DDR2 device model.
// 1. Timing: a read to a closed bank must give ACT, then RD T_RCD = 2 cycles later, and the data
//    T_CL = 2 cycles after RD; a later read to another row of that bank must give PRE, ACT T_RP
//    cycles later, RD T_RCD later. The model reports any timing violation.
// 2. Scheduling: while bank 0 serves a request to row 5, three requests queue behind it:
//    A (row 7, SN 5), B (row 7, SN 1), C (row 5, SN 6). The row hit C must go first, then B,
//    whose priority 7-1 = 6 (+1 for C arriving after it) beats A's 7-5 = 2 (+2), then A.
// 3. Data: bursts written to three banks are read back; every word and every response
//    descriptor is compared. Bank interleaving (an ACT or PRE issued while another bank is in
//    its column burst) must occur.
module tb_mem_ctrl;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid = 0, req_ready, wd_valid = 0, wd_ready, rsp_valid, rsp_pop, rd_valid, rd_pop;
  hdr_t        req_hdr = '0, rsp_hdr;
  logic [31:0] req_addr = 0, wd_data = 0, rd_data;
  dram_req_t   dram_req;
  dram_rsp_t   dram_rsp;

  mem_ctrl dut (.clk, .rst_n, .req_valid, .req_hdr, .req_addr, .req_ready, .wd_valid, .wd_data,
                .wd_ready, .rsp_valid, .rsp_hdr, .rsp_pop, .rd_valid, .rd_data, .rd_pop,
                .dram_req, .dram_rsp);
  ddr2_model u_mem (.clk, .req(dram_req), .rsp(dram_rsp));

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] addr_of(input int bank, input int row, input int col);
    return {4'd0, 14'(row), 2'(bank), 10'(col), 2'b00};
  endfunction

  // command log
  dram_cmd_e cmd_log [$];
  longint    cmd_t   [$];
  int        ilv = 0;
  always @(posedge clk) if (rst_n && dram_req.cmd != DRAM_NOP) begin
    cmd_log.push_back(dram_req.cmd); cmd_t.push_back(cyc);
    if (dram_req.cmd inside {DRAM_ACT, DRAM_PRE})
      for (int b = 0; b < N_BANKS; b++)
        if (b != int'(dram_req.bank) && dut.bst[b] == 2'd3) ilv++;
  end

  // response side: descriptors in order; read data words
  hdr_t        rsp_log [$];
  logic [31:0] rd_log  [$];
  longint      rd_t    [$];
  assign rsp_pop = rsp_valid;
  assign rd_pop  = rd_valid;
  always @(posedge clk) if (rst_n) begin
    if (rsp_valid) rsp_log.push_back(rsp_hdr);
    if (rd_valid) rd_log.push_back(rd_data);
    if (dram_rsp.rvalid) rd_t.push_back(cyc);
  end

  task automatic send(input int sn, input logic wr, input int len, input logic [31:0] a,
                      input logic [31:0] seed);
    @(negedge clk);
    req_valid = 1; req_addr = a;
    req_hdr = '0; req_hdr.sn = 3'(sn); req_hdr.wr = wr; req_hdr.len = 3'(len); req_hdr.tid = 4'(sn);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    if (wr) for (int i = 0; i <= len; i++) begin
      wd_valid = 1; wd_data = seed + 32'(i);
      @(posedge clk);
      while (!wd_ready) @(posedge clk);
      @(negedge clk);
    end
    wd_valid = 0;
  endtask

  function automatic logic [31:0] init_word(input logic [31:0] a);
    logic [BANK_W+ROW_W+COL_W-1:0] k;
    k = {a[13:12], a[27:14], a[11:2]};
    return {k[15:0], 16'hA5C3} ^ {6'd0, k};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- 1. timing ----
    send(0, 0, 0, addr_of(1, 3, 0), 0);
    repeat (10) @(posedge clk);
    check(cmd_log.size() == 2 && cmd_log[0] == DRAM_ACT && cmd_log[1] == DRAM_RD, "row empty: ACT, RD");
    if (cmd_log.size() == 2) check(cmd_t[1] - cmd_t[0] == 2, "ACT to RD = T_RCD");
    check(rd_t.size() == 1 && rd_t[0] - cmd_t[1] == 2, "RD to data = T_CL");
    check(rd_log.size() == 1 && rd_log[0] == init_word(addr_of(1, 3, 0)), "row-empty read data");
    cmd_log.delete(); cmd_t.delete();
    send(0, 0, 0, addr_of(1, 4, 0), 0);
    repeat (12) @(posedge clk);
    check(cmd_log.size() == 3 && cmd_log[0] == DRAM_PRE && cmd_log[1] == DRAM_ACT && cmd_log[2] == DRAM_RD,
          "row conflict: PRE, ACT, RD");
    if (cmd_log.size() == 3) check(cmd_t[1] - cmd_t[0] == 2 && cmd_t[2] - cmd_t[1] == 2, "T_RP and T_RCD");
    // ---- 2. scheduling ----
    rsp_log.delete();
    send(0, 0, 7, addr_of(0, 5, 0), 0);    // opens row 5, busy for a while
    send(5, 0, 0, addr_of(0, 7, 8), 0);    // A
    send(1, 0, 0, addr_of(0, 7, 16), 0);   // B
    send(6, 0, 0, addr_of(0, 5, 24), 0);   // C
    repeat (40) @(posedge clk);
    check(rsp_log.size() == 4, "four responses");
    if (rsp_log.size() == 4)
      check(rsp_log[1].sn == 6 && rsp_log[2].sn == 1 && rsp_log[3].sn == 5,
            $sformatf("service order C, B, A (got SN %0d %0d %0d)", rsp_log[1].sn, rsp_log[2].sn, rsp_log[3].sn));
    // ---- 3. data through three banks ----
    rsp_log.delete(); rd_log.delete();
    send(1, 1, 7, addr_of(0, 9, 64), 32'h1000);
    send(2, 1, 3, addr_of(2, 9, 64), 32'h2000);
    send(3, 1, 0, addr_of(3, 9, 64), 32'h3000);
    send(4, 0, 7, addr_of(0, 9, 64), 0);
    send(5, 0, 3, addr_of(2, 9, 64), 0);
    send(6, 0, 0, addr_of(3, 9, 64), 0);
    repeat (80) @(posedge clk);
    check(rsp_log.size() == 6, $sformatf("six responses (%0d)", rsp_log.size()));
    check(rd_log.size() == 13, $sformatf("13 read words (%0d)", rd_log.size()));
    begin
      int k = 0;
      foreach (rsp_log[i]) if (!rsp_log[i].wr) begin
        logic [31:0] base;
        base = (rsp_log[i].sn == 4) ? 32'h1000 : (rsp_log[i].sn == 5) ? 32'h2000 : 32'h3000;
        for (int b = 0; b <= int'(rsp_log[i].len); b++) begin
          check(k < rd_log.size() && rd_log[k] == base + 32'(b), $sformatf("read-back word sn %0d beat %0d", rsp_log[i].sn, b));
          k++;
        end
      end
    end
    check(ilv > 0, "bank interleaving");
    check(u_mem.violations == 0, $sformatf("DRAM timing violations: %0d", u_mem.violations));
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
