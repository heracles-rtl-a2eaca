// network_interface: joins the packetizer to the local port of the router.
// Two message classes, requests (0) and responses (1), each have their own
// flit stream towards and from the packetizer (valid/ready). Injection: each
// class always uses the first virtual channel of its half (VC 0 for
// requests, VC VC_PER_PORT/2 for responses); a flit is sent when the class
// holds a credit for that router buffer, classes alternating round-robin
// when both can send; the flit is registered onto the link. Ejection: every
// VC of the router's local output has a VC_DEPTH buffer here; a class stream
// stays on one VC from a head flit to its tail, and each popped flit returns
// one credit to the router (registered).
// The network interface block follows the document; its class split,
// buffering and credit handling are this design's choices.
module network_interface
  import heracles_pkg::*;
#(
  parameter int unsigned VC_PER_PORT = 2,
  parameter int unsigned VC_DEPTH    = 8,
  localparam int unsigned VCB        = (VC_PER_PORT > 1) ? $clog2(VC_PER_PORT) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // packetizer side
  input  logic                    tx_valid[2],
  input  flit_t                   tx_flit [2],
  output logic                    tx_ready[2],
  output logic                    rx_valid[2],
  output flit_t                   rx_flit [2],
  input  logic                    rx_ready[2],
  // to the router's local input
  output logic                    inj_valid,
  output flit_t                   inj_flit,
  output logic [VCB-1:0]          inj_vc,
  input  logic [VC_PER_PORT-1:0]  inj_credit,
  // from the router's local output
  input  logic                    ej_valid,
  input  flit_t                   ej_flit,
  input  logic [VCB-1:0]          ej_vc,
  output logic [VC_PER_PORT-1:0]  ej_credit
);
  localparam int unsigned V    = VC_PER_PORT;
  localparam int unsigned HALF = (V > 1) ? V / 2 : 0;
  localparam int unsigned CW   = $clog2(VC_DEPTH + 1);

  function automatic int unsigned class_vc(int unsigned c);
    return c * HALF;
  endfunction

  // ---------------- injection ----------------
  logic [CW-1:0] cred_q[V];
  logic [1:0]    can_send, tx_gnt;
  logic [1:0]    tx_gidx;

  always_comb
    for (int c = 0; c < 2; c++)
      can_send[c] = tx_valid[c] && cred_q[class_vc(c)] != '0;

  rr_arbiter #(.N(2)) u_tx_arb (
    .clk, .rst_n, .req(can_send), .advance(1'b1), .grant(tx_gnt), .grant_idx(tx_gidx)
  );

  always_comb
    for (int c = 0; c < 2; c++) tx_ready[c] = tx_gnt[c];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inj_valid <= 1'b0;
      inj_flit  <= '0;
      inj_vc    <= '0;
      for (int v = 0; v < int'(V); v++) cred_q[v] <= CW'(VC_DEPTH);
    end else begin
      inj_valid <= tx_gnt != '0;
      if (tx_gnt != '0) begin
        inj_flit <= tx_flit[tx_gidx[0]];
        inj_vc   <= VCB'(class_vc(tx_gidx[0]));
      end
      for (int v = 0; v < int'(V); v++) begin
        automatic logic dec = (tx_gnt != '0) && class_vc(int'(tx_gidx[0])) == v;
        cred_q[v] <= cred_q[v] + CW'(inj_credit[v]) - CW'(dec);
      end
    end
  end

  // ---------------- ejection ----------------
  flit_t         eb_dout [V];
  logic          eb_empty[V];
  logic [V-1:0]  eb_pop;
  logic [VCB-1:0] lock_vc_q[2];
  logic          locked_q [2];
  logic [VCB-1:0] sel_vc  [2];
  logic          sel_ok  [2];

  for (genvar v = 0; v < int'(V); v++) begin : g_eb
    logic [FLIT_W-1:0] raw;
    logic [CW-1:0]     unused_count;
    vc_buffer #(.DEPTH(VC_DEPTH), .W(FLIT_W)) u_buf (
      .clk, .rst_n,
      .push (ej_valid && int'(ej_vc) == v),
      .din  (ej_flit),
      .pop  (eb_pop[v]),
      .dout (raw),
      .empty(eb_empty[v]),
      .count(unused_count)
    );
    assign eb_dout[v] = flit_t'(raw);
  end

  always_comb begin
    eb_pop = '0;
    for (int c = 0; c < 2; c++) begin
      int lo, hi;
      lo = (c == 1) ? int'(HALF) : 0;
      hi = (c == 0 && V > 1) ? int'(HALF) : int'(V);
      sel_vc[c] = lock_vc_q[c];
      sel_ok[c] = locked_q[c];
      if (!locked_q[c])
        for (int v = hi - 1; v >= lo; v--)
          if (!eb_empty[v]) begin
            sel_vc[c] = VCB'(v);
            sel_ok[c] = 1'b1;
          end
      rx_valid[c] = sel_ok[c] && !eb_empty[sel_vc[c]];
      rx_flit[c]  = eb_dout[sel_vc[c]];
      if (rx_valid[c] && rx_ready[c]) eb_pop[sel_vc[c]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++) begin
        locked_q[c]  <= 1'b0;
        lock_vc_q[c] <= '0;
      end
      ej_credit <= '0;
    end else begin
      for (int c = 0; c < 2; c++)
        if (rx_valid[c] && rx_ready[c]) begin
          locked_q[c]  <= !is_tail(rx_flit[c]);
          lock_vc_q[c] <= sel_vc[c];
        end
      ej_credit <= eb_pop;
    end
  end
endmodule
