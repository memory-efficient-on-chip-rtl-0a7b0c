// pr_arbiter: the priority search of the priority-based router's switch allocator
// (Find_MaxPriority). Among the N requesters it grants the one whose waiting-priority value is
// the highest; on a tie the lowest index wins. The waiting priority of a requester is its
// packet's priority (MaxSeqNum - SN + distance) plus the number of times it has lost; the
// registers that hold it and age the losers live in the router, which owns one value per
// input virtual channel. Purely combinational: grant is valid in the same cycle as req.
module pr_arbiter #(
  parameter int unsigned N = 5,
  parameter int unsigned W = 8
) (
  input  logic [N-1:0]         req,
  input  logic [N-1:0][W-1:0]  value,
  output logic [N-1:0]         gnt,
  output logic                 gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx
);
  always_comb begin
    logic [W-1:0] max_v;
    max_v     = '0;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int i = 0; i < N; i++) begin
      if (req[i] && (!gnt_valid || value[i] > max_v)) begin
        gnt_valid = 1'b1;
        max_v     = value[i];
        gnt_idx   = ($clog2(N))'(i);
      end
    end
    gnt = '0;
    if (gnt_valid) gnt[gnt_idx] = 1'b1;
  end
endmodule
