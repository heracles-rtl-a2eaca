// vc_router: input-buffered virtual-channel wormhole router.
// Each of NPORTS input ports has VC_PER_PORT flit buffers (vc_buffer). A
// packet's head flit goes through four pipeline stages, one cycle each:
//   RC  route computation (route_compute: XY order or routing table),
//   VA  virtual-channel allocation: one round-robin arbiter per output port
//       picks one waiting input VC and gives it a free output VC of the
//       packet's class,
//   SA  switch allocation: per input port a round-robin arbiter picks one VC
//       that has a flit and a downstream credit, then per output port a
//       round-robin arbiter picks one input port,
//   ST  switch traversal: the winner is popped through the crossbar into the
//       output register, which drives the link in the next cycle.
// Body and tail flits use only SA and ST; the tail releases the output VC.
// Flow control is credit based: a router sends a flit only when it holds a
// credit for the downstream buffer, and returns one credit (in_credit, one
// bit per VC, registered) for every flit it removes from an input buffer.
// Message classes: requests use VCs [0, VC/2), responses VCs [VC/2, VC), so
// responses can never be blocked behind requests. 
// The four-stage pipeline, the VC_PER_PORT/VC_DEPTH parameters, the table
// or dimension-ordered routing and round-robin arbitration follow the
// document; credits, the separable allocator and the class split are this
// design's choices.
module vc_router
  import heracles_pkg::*;
#(
  parameter int unsigned NPORTS      = 5,
  parameter int unsigned VC_PER_PORT = 2,
  parameter int unsigned VC_DEPTH    = 8,
  parameter int unsigned MESH_X      = 3,
  parameter int unsigned MESH_Y      = 3,
  localparam int unsigned VCB        = (VC_PER_PORT > 1) ? $clog2(VC_PER_PORT) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  node_id_t                my_id,
  input  logic                    use_table,
  input  logic                    tbl_we,
  input  logic [7:0]              tbl_addr,
  input  logic [2:0]              tbl_data,
  // incoming links
  input  logic                    in_valid  [NPORTS],
  input  flit_t                   in_flit   [NPORTS],
  input  logic [VCB-1:0]          in_vc     [NPORTS],
  output logic [VC_PER_PORT-1:0]  in_credit [NPORTS],
  // outgoing links
  output logic                    out_valid [NPORTS],
  output flit_t                   out_flit  [NPORTS],
  output logic [VCB-1:0]          out_vc    [NPORTS],
  input  logic [VC_PER_PORT-1:0]  out_credit[NPORTS]
);
  localparam int unsigned V    = VC_PER_PORT;
  localparam int unsigned NV   = NPORTS * V;
  localparam int unsigned HALF = (V > 1) ? V / 2 : 1;
  localparam int unsigned CW   = $clog2(VC_DEPTH + 1);
  localparam int unsigned PW   = $clog2(NPORTS + 1);
  localparam int unsigned NVW  = $clog2(NV + 1);
  localparam int unsigned VW   = $clog2(V + 1);

  typedef enum logic [1:0] {S_IDLE, S_VA, S_ACT} ivc_state_t;

  // ---------------- input VC buffers ----------------
  flit_t                buf_dout [NV];
  logic                 buf_empty[NV];
  logic [CW-1:0]        buf_count[NV];
  logic [NV-1:0]        buf_pop;

  for (genvar iv = 0; iv < int'(NV); iv++) begin : g_buf
    localparam int P = iv / V;
    localparam int VV = iv % V;
    logic [FLIT_W-1:0] dout_raw;
    vc_buffer #(.DEPTH(VC_DEPTH), .W(FLIT_W)) u_buf (
      .clk, .rst_n,
      .push (in_valid[P] && int'(in_vc[P]) == VV),
      .din  (in_flit[P]),
      .pop  (buf_pop[iv]),
      .dout (dout_raw),
      .empty(buf_empty[iv]),
      .count(buf_count[iv])
    );
    assign buf_dout[iv] = flit_t'(dout_raw);
  end

  // ---------------- per input VC state ----------------
  ivc_state_t     st_q   [NV];
  logic [2:0]     route_q[NV];
  logic [VCB-1:0] ovc_q  [NV];

  // ---------------- RC ----------------
  node_id_t   rc_dst [NV];
  logic [2:0] rc_port[NV];
  always_comb
    for (int iv = 0; iv < int'(NV); iv++) rc_dst[iv] = as_head(buf_dout[iv].data).dst;

  route_compute #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .NQ(NV)) u_rc (
    .clk, .rst_n, .my_id, .use_table, .tbl_we, .tbl_addr, .tbl_data,
    .dst(rc_dst), .out_port(rc_port)
  );

  // ---------------- output VC bookkeeping ----------------
  logic [V-1:0]  ovc_busy_q[NPORTS];
  logic [CW-1:0] cred_q    [NPORTS][V];

  // class of the packet waiting at an input VC: 1 for responses
  function automatic logic pkt_class(flit_t f);
    return (V > 1) ? msg_is_resp(as_head(f.data).msg) : 1'b0;
  endfunction

  // first free output VC of class c at output port op (valid flag + index)
  function automatic logic [VCB:0] free_vc(logic [V-1:0] busy, logic c);
    int lo, hi;
    lo = (V > 1 && c) ? int'(HALF) : 0;
    hi = (V > 1 && !c) ? int'(HALF) : int'(V);
    for (int v = 0; v < int'(V); v++)
      if (v >= lo && v < hi && !busy[v]) return {1'b1, VCB'(v)};
    return '0;
  endfunction

  // ---------------- VA ----------------
  logic [NV-1:0]  va_req  [NPORTS];
  logic [NV-1:0]  va_gnt  [NPORTS];
  logic [NVW-1:0] va_idx  [NPORTS];
  logic [VCB:0]   va_free [NV];

  always_comb begin
    for (int iv = 0; iv < int'(NV); iv++)
      va_free[iv] = free_vc(ovc_busy_q[int'(route_q[iv]) < int'(NPORTS) ? route_q[iv] : 3'd0], pkt_class(buf_dout[iv]));
    for (int op = 0; op < int'(NPORTS); op++)
      for (int iv = 0; iv < int'(NV); iv++)
        va_req[op][iv] = (st_q[iv] == S_VA) && (int'(route_q[iv]) == op) && va_free[iv][VCB];
  end

  for (genvar op = 0; op < int'(NPORTS); op++) begin : g_va
    rr_arbiter #(.N(NV)) u_arb (
      .clk, .rst_n, .req(va_req[op]), .advance(1'b1), .grant(va_gnt[op]), .grant_idx(va_idx[op])
    );
  end

  // ---------------- SA ----------------
  logic [V-1:0]  sa1_req [NPORTS];
  logic [V-1:0]  sa1_gnt [NPORTS];
  logic [VW-1:0] sa1_idx [NPORTS];
  logic          sa1_any [NPORTS];
  logic [2:0]    sa1_port[NPORTS];
  logic [NPORTS-1:0] sa2_req[NPORTS];
  logic [NPORTS-1:0] sa2_gnt[NPORTS];
  logic [PW-1:0]     sa2_idx[NPORTS];
  logic          sa1_won [NPORTS];

  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++)
      for (int v = 0; v < int'(V); v++) begin
        automatic int iv = p * int'(V) + v;
        sa1_req[p][v] = (st_q[iv] == S_ACT) && !buf_empty[iv] &&
                        (cred_q[int'(route_q[iv]) < int'(NPORTS) ? route_q[iv] : 3'd0][ovc_q[iv]] != '0);
      end
  end

  always_comb begin    for (int p = 0; p < int'(NPORTS); p++) begin
      sa1_any[p]  = sa1_req[p] != '0;
      sa1_port[p] = route_q[p * int'(V) + int'(sa1_idx[p])];
    end
    for (int op = 0; op < int'(NPORTS); op++)
      for (int p = 0; p < int'(NPORTS); p++)
        sa2_req[op][p] = sa1_any[p] && int'(sa1_port[p]) == op;
  end

  always_comb begin    for (int p = 0; p < int'(NPORTS); p++) begin
      sa1_won[p] = 1'b0;
      for (int op = 0; op < int'(NPORTS); op++)
        if (sa2_gnt[op][p]) sa1_won[p] = 1'b1;
    end
    buf_pop = '0;
    for (int p = 0; p < int'(NPORTS); p++)
      if (sa1_won[p]) buf_pop[p * int'(V) + int'(sa1_idx[p])] = 1'b1;
  end

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_sa
    rr_arbiter #(.N(V)) u_sa1 (
      .clk, .rst_n, .req(sa1_req[p]), .advance(sa1_won[p]), .grant(sa1_gnt[p]), .grant_idx(sa1_idx[p])
    );
    rr_arbiter #(.N(NPORTS)) u_sa2 (
      .clk, .rst_n, .req(sa2_req[p]), .advance(1'b1), .grant(sa2_gnt[p]), .grant_idx(sa2_idx[p])
    );
  end

  // ---------------- state updates, ST ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int iv = 0; iv < int'(NV); iv++) begin
        st_q[iv]    <= S_IDLE;
        route_q[iv] <= '0;
        ovc_q[iv]   <= '0;
      end
      for (int op = 0; op < int'(NPORTS); op++) begin
        ovc_busy_q[op] <= '0;
        out_valid[op]  <= 1'b0;
        out_flit[op]   <= '0;
        out_vc[op]     <= '0;
        in_credit[op]  <= '0;
        for (int v = 0; v < int'(V); v++) cred_q[op][v] <= CW'(VC_DEPTH);
      end
    end else begin
      // RC
      for (int iv = 0; iv < int'(NV); iv++)
        if (st_q[iv] == S_IDLE && !buf_empty[iv] && is_head(buf_dout[iv])) begin
          route_q[iv] <= rc_port[iv];
          st_q[iv]    <= S_VA;
        end
      // VA
      for (int op = 0; op < int'(NPORTS); op++)
        if (va_gnt[op] != '0) begin
          automatic int iv = int'(va_idx[op]);
          st_q[iv]  <= S_ACT;
          ovc_q[iv] <= va_free[iv][VCB-1:0];
          ovc_busy_q[op][va_free[iv][VCB-1:0]] <= 1'b1;
        end
      // credits returned from downstream
      for (int op = 0; op < int'(NPORTS); op++)
        for (int v = 0; v < int'(V); v++) begin
          automatic logic dec = 1'b0;
          for (int p = 0; p < int'(NPORTS); p++)
            if (sa2_gnt[op][p] && int'(ovc_q[p * int'(V) + int'(sa1_idx[p])]) == v) dec = 1'b1;
          cred_q[op][v] <= cred_q[op][v] + CW'(out_credit[op][v]) - CW'(dec);
        end
      // SA winners traverse the crossbar into the output registers
      for (int op = 0; op < int'(NPORTS); op++) begin
        out_valid[op] <= 1'b0;
        if (sa2_gnt[op] != '0) begin
          automatic int p  = int'(sa2_idx[op]);
          automatic int iv = p * int'(V) + int'(sa1_idx[p]);
          out_valid[op] <= 1'b1;
          out_flit[op]  <= buf_dout[iv];
          out_vc[op]    <= ovc_q[iv];
          if (is_tail(buf_dout[iv])) begin
            st_q[iv] <= S_IDLE;
            ovc_busy_q[op][ovc_q[iv]] <= 1'b0;
          end
        end
      end
      // one credit upstream per flit removed
      for (int p = 0; p < int'(NPORTS); p++)
        for (int v = 0; v < int'(V); v++)
          in_credit[p][v] <= buf_pop[p * int'(V) + v];
    end
  end

  // a flit is only ever sent with a credit in hand
  for (genvar op = 0; op < int'(NPORTS); op++) begin : g_chk
    for (genvar v = 0; v < int'(V); v++) begin : g_v
      assert property (@(posedge clk) disable iff (!rst_n) cred_q[op][v] <= CW'(VC_DEPTH));
    end
  end
endmodule
