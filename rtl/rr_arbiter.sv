// rr_arbiter: round-robin arbiter over N requesters (block B of the switch
// allocator, one per output port).
//
// grant is one-hot and combinational: the first requester at or after the
// priority pointer, searching upward and wrapping. When advance is high at a
// clock edge and a grant was made, the pointer moves to the requester just
// after the winner, so the winner has the lowest priority next time. Every
// requester is thus served in turn, with no fixed priority, as the published
// allocator requires. The pointer form and the reset value (requester 0
// first) are this design's choices.
module rr_arbiter #(
  parameter int unsigned N = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  logic [IDX_W-1:0] ptr;
  logic [IDX_W-1:0] winner;
  logic             found;

  always_comb begin
    grant  = '0;
    winner = '0;
    found  = 1'b0;
    for (int k = 0; k < N; k++) begin
      logic [IDX_W:0] idx;
      idx = {1'b0, ptr} + (IDX_W+1)'(k);
      if (idx >= (IDX_W+1)'(N)) idx = idx - (IDX_W+1)'(N);
      if (!found && req[idx[IDX_W-1:0]]) begin
        found                = 1'b1;
        winner               = idx[IDX_W-1:0];
        grant[idx[IDX_W-1:0]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && found) begin
      ptr <= (winner == IDX_W'(N - 1)) ? '0 : winner + 1'b1;
    end
  end

endmodule
