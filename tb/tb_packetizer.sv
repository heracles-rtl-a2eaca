// tb_packetizer: node (0,0). Checks, flit by flit, the request packets built
// from outgoing cache requests (read: head + address; write: head + address
// + data) under random network back-pressure; the cache responses rebuilt
// from incoming read-response and write-ack packets; and the handling of
// remote read and write requests: the local-memory request it makes and the
// response packet it returns to the requesting node.
module tb_packetizer;
  import heracles_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  node_id_t my_id = '0;
  logic creq_valid = 0, creq_port = 0, creq_ready;
  mem_req_t creq = '0;
  node_id_t creq_dst = '0;
  logic cresp_valid, cresp_port;
  mem_resp_t cresp;
  logic mreq_valid, mreq_ready = 0, mresp_valid = 0;
  mem_req_t mreq;
  mem_resp_t mresp = '0;
  logic tx_valid[2], tx_ready[2], rx_valid[2], rx_ready[2];
  flit_t tx_flit[2], rx_flit[2];

  packetizer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // collect flits of tx class c with random back-pressure
  flit_t got[2][$];
  always @(posedge clk)
    for (int c = 0; c < 2; c++)
      if (tx_valid[c] && tx_ready[c]) got[c].push_back(tx_flit[c]);
  always @(negedge clk)
    for (int c = 0; c < 2; c++) tx_ready[c] <= ($urandom_range(0, 2) != 0);

  function automatic head_t mk_head(msg_t m, logic port, node_id_t src, node_id_t dst);
    head_t h;
    h = '0; h.msg = m; h.port = port; h.src = src; h.dst = dst;
    return h;
  endfunction

  task automatic send_rx(int c, flit_t f);
    rx_valid[c] = 1; rx_flit[c] = f;
    #1;
    while (!rx_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    rx_valid[c] = 0;
  endtask

  initial begin
    node_id_t far = '{y: 4'd1, x: 4'd2};
    for (int c = 0; c < 2; c++) begin rx_valid[c] = 0; rx_flit[c] = '0; tx_ready[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- outgoing read and write requests ----
    for (int we = 0; we < 2; we++) begin
      creq_valid = 1; creq = '{we: 1'(we), addr: 32'h0004_1230, wdata: 32'h7777_0000 + 32'(we)};
      creq_port = 1'(we); creq_dst = far;
      #1;
      while (!creq_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      creq_valid = 0;
      repeat (2) @(negedge clk);
      check(got[0].size() == 2 + we, $sformatf("request packet has %0d flits", got[0].size()));
      if (got[0].size() == 2 + we) begin
        check(got[0][0].kind == FK_HEAD && got[0][0].data == mk_head(we ? MSG_WR_REQ : MSG_RD_REQ, 1'(we), my_id, far), "request head");
        check(got[0][1].data == 32'h0004_1230 && got[0][1].kind == (we ? FK_BODY : FK_TAIL), "address flit");
        if (we) check(got[0][2].data == 32'h7777_0001 && got[0][2].kind == FK_TAIL, "data flit");
      end
      got[0].delete();
    end
    // ---- incoming read response and write ack ----
    fork
      begin
        send_rx(1, '{kind: FK_HEAD, data: mk_head(MSG_RD_RESP, 1'b1, far, my_id)});
        for (int k = 0; k < 8; k++) send_rx(1, '{kind: (k == 7) ? FK_TAIL : FK_BODY, data: 32'hA000 + 32'(k)});
        send_rx(1, '{kind: FK_HT, data: mk_head(MSG_WR_ACK, 1'b0, far, my_id)});
      end
      begin
        int n = 0;
        while (n < 9) begin
          @(posedge clk);
          if (cresp_valid) begin
            if (n < 8) check(cresp_port == 1'b1 && cresp.data == 32'hA000 + 32'(n) && cresp.last == (n == 7), $sformatf("response word %0d", n));
            else       check(cresp_port == 1'b0 && cresp.last, "write ack to instruction-cache index 0");
            n++;
          end
        end
      end
    join
    // ---- remote read request ----
    send_rx(0, '{kind: FK_HEAD, data: mk_head(MSG_RD_REQ, 1'b0, far, my_id)});
    send_rx(0, '{kind: FK_TAIL, data: 32'h0000_0240});
    #1;
    while (!mreq_valid) begin @(negedge clk); #1; end
    check(!mreq.we && mreq.addr == 32'h0000_0240, "memory read request");
    mreq_ready = 1; @(negedge clk); mreq_ready = 0;
    for (int k = 0; k < 8; k++) begin
      mresp_valid = 1; mresp = '{last: (k == 7), data: 32'hB000 + 32'(k)};
      @(negedge clk);
    end
    mresp_valid = 0;
    repeat (30) @(negedge clk);
    check(got[1].size() == 9, $sformatf("read response packet has %0d flits", got[1].size()));
    if (got[1].size() == 9) begin
      check(got[1][0].kind == FK_HEAD && got[1][0].data == mk_head(MSG_RD_RESP, 1'b0, my_id, far), "response head");
      for (int k = 1; k < 9; k++)
        check(got[1][k].data == 32'hB000 + 32'(k - 1) && got[1][k].kind == ((k == 8) ? FK_TAIL : FK_BODY), "response data flit");
    end
    got[1].delete();
    // ---- remote write request ----
    send_rx(0, '{kind: FK_HEAD, data: mk_head(MSG_WR_REQ, 1'b1, far, my_id)});
    send_rx(0, '{kind: FK_BODY, data: 32'h0000_0300});
    send_rx(0, '{kind: FK_TAIL, data: 32'h1234_4321});
    #1;
    while (!mreq_valid) begin @(negedge clk); #1; end
    check(mreq.we && mreq.addr == 32'h0000_0300 && mreq.wdata == 32'h1234_4321, "memory write request");
    mreq_ready = 1; @(negedge clk); mreq_ready = 0;
    mresp_valid = 1; mresp = '{last: 1'b1, data: '0}; @(negedge clk); mresp_valid = 0;
    repeat (10) @(negedge clk);
    check(got[1].size() == 1 && got[1][0].kind == FK_HT && got[1][0].data == mk_head(MSG_WR_ACK, 1'b1, my_id, far), "write ack packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
