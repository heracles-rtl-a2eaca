// rr_arbiter: strict round-robin arbiter.
// Grants one of N requesters, searching from the one after the requester
// granted last. The grant is combinational from req; the priority pointer
// moves only in a cycle where advance is high (the grant was used), so a
// requester that was granted but not served keeps its turn.
// Interface: req[N], advance, grant[N] (one-hot or zero), grant_idx.
// The round-robin policy follows the document's "strict round-robin"
// router arbiter; the pointer update rule is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                req,
  input  logic                        advance,
  output logic [N-1:0]                grant,
  output logic [$clog2(N+1)-1:0]      grant_idx
);
  localparam int unsigned IW = $clog2(N+1);
  logic [IW-1:0] last_q;   // index of the last granted requester

  function automatic int unsigned nth(logic [IW-1:0] last, int unsigned i);
    return (int'(last) + i) % N;
  endfunction

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int unsigned i = 1; i <= N; i++)
      if (req[nth(last_q, i)] && grant == '0) begin
        grant[nth(last_q, i)] = 1'b1;
        grant_idx             = IW'(nth(last_q, i));
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last_q <= IW'(N - 1);
    else if (advance && grant != '0) last_q <= grant_idx;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
endmodule
