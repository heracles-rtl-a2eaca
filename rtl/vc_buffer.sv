// vc_buffer: flit FIFO of one virtual channel at a router or network
// interface input. Circular buffer of DEPTH entries with first-word
// fall-through: dout shows the oldest entry whenever empty is low.
// push and pop may happen in the same cycle. The sender's credit counter
// guarantees that push never finds the buffer full; an assertion checks it.
// Depth follows the document (8 buffers per channel); the organisation is
// this design's choice.
module vc_buffer #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 34
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push,
  input  logic [W-1:0]                 din,
  input  logic                         pop,
  output logic [W-1:0]                 dout,
  output logic                         empty,
  output logic [$clog2(DEPTH+1)-1:0]   count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNTW = $clog2(DEPTH + 1);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == '0);
  assign dout  = mem[rd_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      count <= '0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      count <= count + CNTW'(push) - CNTW'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wr_q] <= din;

  assert property (@(posedge clk) disable iff (!rst_n) push |-> (int'(count) < int'(DEPTH) || pop));
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
