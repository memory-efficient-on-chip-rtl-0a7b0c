// tb_bank_arbiter: random bank queues against a reference of the row-first, order-sensitive
// selection: the highest-priority row hit if any, else the highest-priority other request;
// ties go to the later queue position.
module tb_bank_arbiter;
  localparam int Q = 8, W = 8, RW = 14;
  logic [Q-1:0]         valid;
  logic [Q-1:0][W-1:0]  wprio;
  logic [Q-1:0][RW-1:0] row;
  logic                 row_open;
  logic [RW-1:0]        open_row;
  logic                 found, hit;
  logic [2:0]           sel;
  int checks = 0, failures = 0;

  bank_arbiter #(.Q(Q), .W(W), .ROW_W(RW)) dut (.valid, .wprio, .row, .row_open, .open_row,
                                                .found, .hit, .sel);
  initial begin
    for (int t = 0; t < 3000; t++) begin
      int bh, bo, exp_sel;
      valid = Q'($urandom); row_open = $urandom % 4 != 0; open_row = RW'($urandom % 3);
      for (int i = 0; i < Q; i++) begin wprio[i] = W'($urandom % 6); row[i] = RW'($urandom % 3); end
      bh = -1; bo = -1;
      for (int i = 0; i < Q; i++) if (valid[i]) begin
        if (row_open && row[i] == open_row) begin if (bh < 0 || wprio[i] >= wprio[bh]) bh = i; end
        else if (bo < 0 || wprio[i] >= wprio[bo]) bo = i;
      end
      exp_sel = (bh >= 0) ? bh : bo;
      #1;
      checks++;
      if (found != (exp_sel >= 0) || (exp_sel >= 0 && (int'(sel) != exp_sel || hit != (bh >= 0)))) begin
        failures++;
        $display("FAIL valid=%b: got found=%b hit=%b sel=%0d expected %0d", valid, found, hit, sel, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
