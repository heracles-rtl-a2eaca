// tb_vc_router: one router at (1,1) of a 3x3 mesh.
// 1) Latency: a lone single-flit packet, written at one clock edge, must be
//    on the output link four cycles after it is presented: buffer write,
//    RC, VA, then SA with switch traversal into the output register.
// 2) Traffic: every input port sends 40 packets of 1..4 flits to random
//    destinations on both message classes, respecting the router's credits.
//    Downstream sinks return credits, except that the east output withholds
//    its credits for a while (credit stall). Every packet must come out of
//    the dimension-order port towards its destination, flits in order and
//    unaltered, and no output may ever run more than VC_DEPTH flits ahead of
//    the credits returned to it.
// 3) Table routing: with use_table set and the table entry of node 8 set to
//    north, a packet to node 8 leaves through the north port.
module tb_vc_router;
  import heracles_pkg::*;

  localparam int NP = 5, V = 2, D = 8, NPKT = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  node_id_t my_id = '{y: 4'd1, x: 4'd1};
  logic use_table = 0, tbl_we = 0;
  logic [7:0] tbl_addr = 0;
  logic [2:0] tbl_data = 0;
  logic in_valid[NP], out_valid[NP];
  flit_t in_flit[NP], out_flit[NP];
  logic [0:0] in_vc[NP], out_vc[NP];
  logic [V-1:0] in_credit[NP], out_credit[NP];

  vc_router #(.NPORTS(NP), .VC_PER_PORT(V), .VC_DEPTH(D)) dut (
    .clk, .rst_n, .my_id, .use_table, .tbl_we, .tbl_addr, .tbl_data,
    .in_valid, .in_flit, .in_vc, .in_credit, .out_valid, .out_flit, .out_vc, .out_credit);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [2:0] xy_port(node_id_t d);
    if (d.x > 1) return PORT_E;
    if (d.x < 1) return PORT_W;
    if (d.y > 1) return PORT_S;
    if (d.y < 1) return PORT_N;
    return PORT_L;
  endfunction

  // ---------------- sources ----------------
  int src_cred[NP][V];
  int exp_port[int];     // packet id -> expected output port
  int exp_len [int];
  int sent = 0, received = 0;
  bit traffic_on = 0;

  // ---------------- sinks ----------------
  bit hold_east = 0;
  int owed[NP][V];        // credits not yet returned
  int cur_id[NP][V], cur_idx[NP][V];
  int stall_seen = 0;

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      for (int v = 0; v < V; v++) if (in_credit[p][v]) src_cred[p][v]++;
      // return one owed credit per VC per cycle
      for (int v = 0; v < V; v++) begin
        out_credit[p][v] <= 1'b0;
        if (owed[p][v] > 0 && !(hold_east && p == int'(PORT_E))) begin
          out_credit[p][v] <= 1'b1;
          owed[p][v]--;
        end
      end
      if (out_valid[p]) begin
        automatic int v = out_vc[p];
        owed[p][v]++;
        if (owed[p][v] > D) check(0, $sformatf("port %0d vc %0d overran credits", p, v));
        if (hold_east && p == int'(PORT_E) && owed[p][v] == D) stall_seen++;
        if (is_head(out_flit[p])) begin
          automatic int id = as_head(out_flit[p].data).rsvd;
          cur_id[p][v] = id; cur_idx[p][v] = 1;
          check(exp_port.exists(id) && exp_port[id] == p, $sformatf("packet %0d at port %0d", id, p));
          if (out_flit[p].kind == FK_HT) begin received++; exp_port.delete(id); end
        end else begin
          check(out_flit[p].data == {cur_id[p][v][15:0], 16'(cur_idx[p][v])}, $sformatf("body flit of packet %0d", cur_id[p][v]));
          cur_idx[p][v]++;
          if (is_tail(out_flit[p])) begin
            check(cur_idx[p][v] == exp_len[cur_id[p][v]], "packet length");
            received++; exp_port.delete(cur_id[p][v]);
          end
        end
      end
    end
  end

  task automatic send_packet(int p, int id, node_id_t dst, int len, logic cls);
    head_t h;
    h = '0; h.rsvd = 13'(id); h.dst = dst; h.msg = cls ? MSG_RD_RESP : MSG_RD_REQ;
    exp_port[id] = xy_port(dst);
    exp_len[id]  = len;
    for (int k = 0; k < len; k++) begin
      while (src_cred[p][cls] == 0) @(negedge clk);
      in_valid[p] = 1;
      in_vc[p]    = cls;
      if (k == 0) in_flit[p] = '{kind: (len == 1) ? FK_HT : FK_HEAD, data: h};
      else        in_flit[p] = '{kind: (k == len - 1) ? FK_TAIL : FK_BODY, data: {16'(id), 16'(k)}};
      src_cred[p][cls]--;
      @(negedge clk);
      in_valid[p] = 0;
    end
    sent++;
  endtask

  initial begin
    int t0, lat;
    for (int p = 0; p < NP; p++) begin
      in_valid[p] = 0; in_flit[p] = '0; in_vc[p] = '0; out_credit[p] = '0;
      for (int v = 0; v < V; v++) begin src_cred[p][v] = D; owed[p][v] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- 1) latency of a lone packet ----
    fork
      send_packet(int'(PORT_W), 1, '{y: 4'd1, x: 4'd2}, 1, 1'b0);
      begin
        t0 = 0;   // counted at falling edges, so the count equals rising edges passed
        while (!out_valid[PORT_E]) begin @(negedge clk); t0++; end
        lat = t0;
      end
    join
    check(lat == 4, $sformatf("head latency %0d cycles, expected 4", lat));
    repeat (5) @(negedge clk);
    // ---- 2) random traffic from all inputs ----
    hold_east = 1;
    fork
      begin repeat (150) @(negedge clk); hold_east = 0; end
    join_none
    for (int p0 = 0; p0 < NP; p0++) begin
      automatic int p = p0;
      fork
        for (int k = 0; k < NPKT; k++) begin
          automatic node_id_t d = '{y: 4'($urandom_range(0, 2)), x: 4'($urandom_range(0, 2))};
          send_packet(p, 100 + p * 100 + k, d, $urandom_range(1, 4), k[0]);
        end
      join_none
    end
    wait fork;
    repeat (200) @(negedge clk);
    check(received == sent && sent == 1 + NP * NPKT, $sformatf("received %0d of %0d packets", received, sent));
    check(exp_port.num() == 0, "every packet delivered");
    check(stall_seen > 0, "credit stall happened on the east port");
    // ---- 3) table routing ----
    use_table = 1; tbl_we = 1; tbl_addr = 8; tbl_data = PORT_N;
    @(negedge clk); tbl_we = 0;
    send_packet(int'(PORT_L), 7, '{y: 4'd2, x: 4'd2}, 2, 1'b0);
    exp_port[7] = PORT_N;
    repeat (20) @(negedge clk);
    check(received == sent, "table-routed packet left by the north port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
