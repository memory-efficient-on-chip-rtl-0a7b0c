// bank_arbiter: request selector of one bank queue of the order-sensitive memory controller.
//
// Among the valid (and ready) requests of a bank queue it prefers row hits: if any request
// addresses the row that is open in the bank, the hit with the highest waiting priority is
// chosen; otherwise the request with the highest waiting priority among the rest (row
// conflicts, or any request when the bank is closed) is chosen. On equal priority the later
// queue position wins, as in the document's ">=" comparison. The waiting priority of a request
// is MaxSeqNum - SN when it enters the queue, plus one for every later arrival in the same
// queue; those registers live in the memory controller. Purely combinational.
module bank_arbiter #(
  parameter int unsigned Q     = 8,
  parameter int unsigned W     = 8,
  parameter int unsigned ROW_W = 14
) (
  input  logic [Q-1:0]            valid,
  input  logic [Q-1:0][W-1:0]     wprio,
  input  logic [Q-1:0][ROW_W-1:0] row,
  input  logic                    row_open,
  input  logic [ROW_W-1:0]        open_row,
  output logic                    found,
  output logic                    hit,
  output logic [$clog2(Q)-1:0]    sel
);
  always_comb begin
    logic          f1, f2;
    logic [W-1:0]  m1, m2;
    logic [$clog2(Q)-1:0] s1, s2;
    f1 = 1'b0; f2 = 1'b0; m1 = '0; m2 = '0; s1 = '0; s2 = '0;
    for (int i = 0; i < Q; i++) begin
      if (valid[i]) begin
        if (row_open && row[i] == open_row) begin
          if (!f1 || wprio[i] >= m1) begin f1 = 1'b1; m1 = wprio[i]; s1 = ($clog2(Q))'(i); end
        end else begin
          if (!f2 || wprio[i] >= m2) begin f2 = 1'b1; m2 = wprio[i]; s2 = ($clog2(Q))'(i); end
        end
      end
    end
    found = f1 || f2;
    hit   = f1;
    sel   = f1 ? s1 : s2;
  end
endmodule
