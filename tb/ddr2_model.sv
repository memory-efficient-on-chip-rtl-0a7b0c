// ddr2_model: behavioural model of one DDR2 device (4 banks, 32-bit words) as seen on the
// memory controller's command bus; not synthesizable.
//
// ACT opens a row, PRE closes it, RD returns the addressed word T_CL cycles later, WR stores
// the word given with the command. Words never written read as a fixed function of their
// address (init_word), so a testbench can predict them. The model counts timing and protocol
// violations: ACT to an open bank or sooner than T_RP after PRE, RD/WR to a closed bank, to
// another row than the open one, or sooner than T_RCD after ACT.
module ddr2_model
  import noc_pkg::*;
#(
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_CL  = 2
) (
  input  logic      clk,
  input  dram_req_t req,
  output dram_rsp_t rsp
);
  logic [31:0] store [logic [BANK_W+ROW_W+COL_W-1:0]];
  logic             open_b [N_BANKS];
  logic [ROW_W-1:0] row_b  [N_BANKS];
  longint           t_pre  [N_BANKS];
  longint           t_act  [N_BANKS];
  longint           cyc = 0;
  int               violations = 0;
  int               n_act = 0, n_pre = 0, n_rd = 0, n_wr = 0;
  logic [T_CL:0]    pv;
  logic [31:0]      pd [T_CL+1];

  function automatic logic [31:0] init_word(input logic [BANK_W+ROW_W+COL_W-1:0] a);
    return {a[15:0], 16'hA5C3} ^ {6'd0, a};
  endfunction

  initial begin
    for (int b = 0; b < N_BANKS; b++) begin
      open_b[b] = 1'b0; row_b[b] = '0; t_pre[b] = -100; t_act[b] = -100;
    end
    pv = '0;
    for (int i = 0; i <= T_CL; i++) pd[i] = '0;
  end

  assign rsp.rvalid = pv[T_CL-1];
  assign rsp.rdata  = pd[T_CL-1];

  always @(posedge clk) begin
    logic [BANK_W+ROW_W+COL_W-1:0] a;
    a = {req.bank, row_b[req.bank], req.col};
    cyc <= cyc + 1;
    for (int i = T_CL; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    pv[0] <= 1'b0;
    unique case (req.cmd)
      DRAM_ACT: begin
        n_act++;
        if (open_b[req.bank] || cyc - t_pre[req.bank] < T_RP) violations++;
        open_b[req.bank] <= 1'b1; row_b[req.bank] <= req.row; t_act[req.bank] <= cyc;
      end
      DRAM_PRE: begin
        n_pre++;
        open_b[req.bank] <= 1'b0; t_pre[req.bank] <= cyc;
      end
      DRAM_RD, DRAM_WR: begin
        if (!open_b[req.bank] || row_b[req.bank] != req.row || cyc - t_act[req.bank] < T_RCD)
          violations++;
        if (req.cmd == DRAM_WR) begin
          n_wr++;
          store[a] = req.wdata;
        end else begin
          n_rd++;
          pv[0] <= 1'b1;
          pd[0] <= store.exists(a) ? store[a] : init_word(a);
        end
      end
      default: ;
    endcase
  end
endmodule
