// rr_arbiter: round-robin arbiter. Grants one of the requesters, starting the search just
// after the last requester that was granted and accepted (update). One-hot grant,
// combinational; the priority pointer is a register updated only when update is high,
// so a grant whose result is thrown away does not cost the requester its turn.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] gnt
);
  logic [N-1:0] last;   // one-hot: last accepted grant

  always_comb begin
    int idx;
    int start;
    gnt   = '0;
    start = 0;
    for (int i = 0; i < int'(N); i++) if (last[i]) start = i + 1;
    for (int k = 0; k < int'(N); k++) begin
      idx = (start + k) % int'(N);
      if (req[idx] && gnt == '0) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    last <= N'(1) << (N - 1);
    else if (update && gnt != '0)  last <= gnt;
  end
endmodule
