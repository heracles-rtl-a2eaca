// route_compute: routing logic and routing table of one router.
// For each of NQ queries (one per input virtual channel) it returns the
// output port towards the destination node, either by dimension-order
// routing (X first, then Y) or from a routing table indexed by the
// destination's node number (y*MESH_X + x). The table is written one entry
// per cycle through tbl_we/tbl_addr/tbl_data, before or between runs, and
// is read combinationally. Packets addressed to this router go to PORT_L.
// The two routing modes and the off-line programmable table follow the
// document; the port numbering (N=0,E=1,S=2,W=3,L=4, y growing towards S)
// and the table index are this design's choices.
module route_compute
  import heracles_pkg::*;
#(
  parameter int unsigned MESH_X = 3,
  parameter int unsigned MESH_Y = 3,
  parameter int unsigned NQ     = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  node_id_t          my_id,
  input  logic              use_table,
  input  logic              tbl_we,
  input  logic [7:0]        tbl_addr,
  input  logic [2:0]        tbl_data,
  input  node_id_t          dst     [NQ],
  output logic [2:0]        out_port[NQ]
);
  localparam int unsigned NODES = MESH_X * MESH_Y;
  logic [2:0] table_q [NODES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NODES); i++) table_q[i] <= PORT_L;
    end else if (tbl_we && int'(tbl_addr) < int'(NODES)) begin
      table_q[int'(tbl_addr)] <= tbl_data;
    end
  end

  function automatic logic [2:0] dor(node_id_t here, node_id_t d);
    if      (d.x > here.x) return PORT_E;
    else if (d.x < here.x) return PORT_W;
    else if (d.y > here.y) return PORT_S;
    else if (d.y < here.y) return PORT_N;
    else                   return PORT_L;
  endfunction

  function automatic int unsigned node_num(node_id_t d);
    return int'(d.y) * MESH_X + int'(d.x);
  endfunction

  always_comb
    for (int q = 0; q < int'(NQ); q++) begin
      if (dst[q] == my_id)                                out_port[q] = PORT_L;
      else if (use_table && node_num(dst[q]) < NODES)     out_port[q] = table_q[node_num(dst[q])];
      else                                                out_port[q] = dor(my_id, dst[q]);
    end
endmodule
