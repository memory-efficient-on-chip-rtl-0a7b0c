// tb_pr_arbiter: random requests and waiting priorities against a reference maximum search
// (highest value wins, lowest index on a tie); also checks that no request means no grant.
module tb_pr_arbiter;
  localparam int N = 5, W = 8;
  logic [N-1:0]        req;
  logic [N-1:0][W-1:0] value;
  logic [N-1:0]        gnt;
  logic                gnt_valid;
  logic [2:0]          gnt_idx;
  int checks = 0, failures = 0;

  pr_arbiter #(.N(N), .W(W)) dut (.req, .value, .gnt, .gnt_valid, .gnt_idx);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int best;
      req = N'($urandom);
      for (int i = 0; i < N; i++) value[i] = (t < 1000) ? W'($urandom % 4) : W'($urandom);
      best = -1;
      for (int i = 0; i < N; i++)
        if (req[i] && (best < 0 || value[i] > value[best])) best = i;
      #1;
      checks++;
      if ((best < 0) ? (gnt_valid || gnt != '0)
                     : (!gnt_valid || int'(gnt_idx) != best || gnt != N'(1 << best))) begin
        failures++;
        $display("FAIL req=%b values=%h: got %0d/%b expected %0d", req, value, gnt_idx, gnt, best);
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
