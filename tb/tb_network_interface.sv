// tb_network_interface: the testbench plays the router's local port.
// Injection: both classes send 60 numbered flits at once; each must leave
// on its class's VC (requests VC 0, responses VC 1), in order, and the
// interface may never have more than 8 flits outstanding on a VC without a
// credit back (credits are returned late on purpose, so it must stall).
// Ejection: flits arriving on VC 0 and VC 1, sent only with credits the
// interface returned, must appear in order on the request and response
// streams under random back-pressure.
module tb_network_interface;
  import heracles_pkg::*;
  localparam int V = 2, D = 8, NF = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tx_valid[2], tx_ready[2], rx_valid[2], rx_ready[2];
  flit_t tx_flit[2], rx_flit[2];
  logic inj_valid, ej_valid = 0;
  flit_t inj_flit, ej_flit = '0;
  logic [0:0] inj_vc, ej_vc = '0;
  logic [V-1:0] inj_credit = '0, ej_credit;

  network_interface #(.VC_PER_PORT(V), .VC_DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- injection side ----------------
  int sent[2] = '{0, 0}, seen[2] = '{0, 0}, owed[V] = '{0, 0}, stalls = 0;
  always @(posedge clk) if (rst_n) for (int c = 0; c < 2; c++) if (tx_valid[c] && tx_ready[c]) sent[c]++;
  always @(negedge clk) if (rst_n) for (int c = 0; c < 2; c++) begin
    tx_valid[c] = sent[c] < NF;
    tx_flit[c]  = '{kind: FK_HT, data: {16'(c), 16'(sent[c])}};
  end
  always @(posedge clk) begin
    if (inj_valid) begin
      automatic int c = int'(inj_flit.data[31:16]);
      check(int'(inj_vc) == c, "class uses its own VC");
      check(int'(inj_flit.data[15:0]) == seen[c], $sformatf("class %0d flit %0d in order", c, seen[c]));
      seen[c]++;
      owed[inj_vc]++;
      check(owed[inj_vc] <= D, "never more than VC_DEPTH flits without credit");
    end
    for (int v = 0; v < V; v++) begin
      inj_credit[v] <= 1'b0;
      if (owed[v] > 0 && $urandom_range(0, 3) == 0) begin inj_credit[v] <= 1'b1; owed[v]--; end
      if (owed[v] == D) stalls++;
    end
  end

  // ---------------- ejection side ----------------
  int ecred[V] = '{D, D}, esent[V] = '{0, 0}, got[2] = '{0, 0};
  always @(posedge clk) for (int v = 0; v < V; v++) if (ej_credit[v]) ecred[v]++;
  always @(negedge clk) begin
    for (int c = 0; c < 2; c++) rx_ready[c] = $urandom_range(0, 2) == 0;
    ej_valid = 0;
    if (rst_n) begin
      automatic int v = $urandom_range(0, 1);
      if (ecred[v] > 0 && esent[v] < NF) begin
        ej_valid = 1; ej_vc = 1'(v);
        ej_flit  = '{kind: FK_HT, data: {16'(v), 16'(esent[v])}};
        ecred[v]--; esent[v]++;
      end
    end
  end
  always @(posedge clk) for (int c = 0; c < 2; c++) if (rx_valid[c] && rx_ready[c]) begin
    check(rx_flit[c].data == {16'(c), 16'(got[c])}, $sformatf("ejected class %0d flit %0d", c, got[c]));
    got[c]++;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin tx_valid[c] = 0; tx_flit[c] = '0; rx_ready[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2000) @(negedge clk);
    check(seen[0] == NF && seen[1] == NF, "all injected flits arrived");
    check(got[0] == NF && got[1] == NF, "all ejected flits delivered");
    check(stalls > 0, "credit stall happened");
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
