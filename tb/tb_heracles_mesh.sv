// tb_heracles_mesh: end-to-end test of the 3x3 multicore at its default
// sizes (256 KiB local memory per node, 2 VCs of 8 flits, 2 KiB caches).
// Every core runs the test program of test_prog_pkg. Core n keeps its data
// in the memory of node (n+4) mod 9, so loads and stores cross the network;
// core 4 also fetches its code from node 2's memory (a PC that points into
// another core's memory), all others fetch from their own node.
// Round 1 routes by dimension order (XY). Round 2 programs every routing
// table with Y-then-X routes, switches the routers to table routing, clears
// the results and restarts all cores.
// After each round all 90 result words are checked. The test also counts
// the mechanisms the design relies on and fails if one never happened:
// cache-miss freezes, load-use bubbles, bypasses, branch flushes, remote
// requests sent by a packetizer, remote requests served by a local memory,
// switch-allocation conflicts in a router, and table-routed flits.
module tb_heracles_mesh;
  import heracles_pkg::*;
  import test_prog_pkg::*;

  localparam int MX = 3, MY = 3, NODES = MX * MY, LAB = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start[NODES], halted[NODES];
  logic [31:0] start_pc[NODES];
  logic [31:0] perf[NODES][5];
  logic        use_table = 0, rt_we = 0;
  logic [7:0]  rt_node = 0, rt_addr = 0;
  logic [2:0]  rt_data = 0;

  heracles_mesh dut (.clk, .rst_n, .start, .start_pc, .halted, .perf,
                     .use_table, .rt_we, .rt_node, .rt_addr, .rt_data);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters via probes ----------------
  int remote_sent = 0, remote_served = 0, sa_conflicts = 0, table_flits = 0;
  for (genvar y = 0; y < MY; y++) begin : g_py
    for (genvar x = 0; x < MX; x++) begin : g_px
      // sampled at the falling edge, when the combinational handshakes are settled
      always @(negedge clk) begin
        if (dut.g_y[y].g_x[x].u_node.u_pkt.creq_ready) remote_sent++;
        if (dut.g_y[y].g_x[x].u_node.u_pkt.mreq_valid && dut.g_y[y].g_x[x].u_node.u_pkt.mreq_ready) remote_served++;
        for (int op = 0; op < 5; op++) begin
          if ($countones(dut.g_y[y].g_x[x].u_node.u_router.sa2_req[op]) > 1) sa_conflicts++;
          if (use_table && dut.g_y[y].g_x[x].u_node.u_router.out_valid[op]) table_flits++;
        end
      end
    end
  end

  // ---------------- memory access helpers (backdoor) ----------------
  function automatic logic [31:0] node_base(int n);
    return 32'(n) << LAB;
  endfunction

  task automatic mem_write(int n, int word, logic [31:0] val);
    case (n)
      0: dut.g_y[0].g_x[0].u_node.u_lm.mem[word] = val;
      1: dut.g_y[0].g_x[1].u_node.u_lm.mem[word] = val;
      2: dut.g_y[0].g_x[2].u_node.u_lm.mem[word] = val;
      3: dut.g_y[1].g_x[0].u_node.u_lm.mem[word] = val;
      4: dut.g_y[1].g_x[1].u_node.u_lm.mem[word] = val;
      5: dut.g_y[1].g_x[2].u_node.u_lm.mem[word] = val;
      6: dut.g_y[2].g_x[0].u_node.u_lm.mem[word] = val;
      7: dut.g_y[2].g_x[1].u_node.u_lm.mem[word] = val;
      default: dut.g_y[2].g_x[2].u_node.u_lm.mem[word] = val;
    endcase
  endtask

  function automatic logic [31:0] mem_read(int n, int word);
    case (n)
      0: return dut.g_y[0].g_x[0].u_node.u_lm.mem[word];
      1: return dut.g_y[0].g_x[1].u_node.u_lm.mem[word];
      2: return dut.g_y[0].g_x[2].u_node.u_lm.mem[word];
      3: return dut.g_y[1].g_x[0].u_node.u_lm.mem[word];
      4: return dut.g_y[1].g_x[1].u_node.u_lm.mem[word];
      5: return dut.g_y[1].g_x[2].u_node.u_lm.mem[word];
      6: return dut.g_y[2].g_x[0].u_node.u_lm.mem[word];
      7: return dut.g_y[2].g_x[1].u_node.u_lm.mem[word];
      default: return dut.g_y[2].g_x[2].u_node.u_lm.mem[word];
    endcase
  endfunction

  // code of core n lives in node code_node(n) at offset 0x100 + n*0x200
  function automatic int code_node(int n); return (n == 4) ? 2 : n; endfunction
  function automatic int data_node(int n); return (n + 4) % NODES; endfunction
  function automatic logic [31:0] code_addr(int n); return node_base(code_node(n)) + 32'h100 + 32'(n) * 32'h200; endfunction
  function automatic logic [31:0] data_addr(int n); return node_base(data_node(n)) + 32'h8000 + 32'(n) * 32'h40; endfunction

  task automatic run_round(int r);
    int cyc;
    for (int n = 0; n < NODES; n++)
      for (int i = 0; i < int'(RES_WORDS); i++)
        mem_write(data_node(n), int'((data_addr(n) & 32'h3FFFF) >> 2) + i, 32'hBAD0_0000 + 32'(r));
    @(negedge clk);
    for (int n = 0; n < NODES; n++) begin start[n] = 1; start_pc[n] = code_addr(n); end
    @(negedge clk);
    for (int n = 0; n < NODES; n++) start[n] = 0;
    cyc = 0;
    while (cyc < 20000) begin
      automatic bit all = 1;
      for (int n = 0; n < NODES; n++) all &= halted[n];
      if (all) break;
      @(negedge clk); cyc++;
    end
    repeat (50) @(negedge clk);
    for (int n = 0; n < NODES; n++) begin
      check(halted[n], $sformatf("round %0d core %0d halted", r, n));
      for (int i = 0; i < int'(RES_WORDS); i++) begin
        automatic logic [31:0] got = mem_read(data_node(n), int'((data_addr(n) & 32'h3FFFF) >> 2) + i);
        check(got == expected(i), $sformatf("round %0d core %0d word %0d = %h, expected %h", r, n, i, got, expected(i)));
      end
    end
    $display("round %0d finished in %0d cycles", r, cyc);
  endtask

  initial begin
    logic [31:0] prog[PROG_WORDS];
    for (int n = 0; n < NODES; n++) begin start[n] = 0; start_pc[n] = 0; end
    for (int n = 0; n < NODES; n++) begin
      build(code_addr(n), data_addr(n), prog);
      for (int i = 0; i < int'(PROG_WORDS); i++)
        mem_write(code_node(n), int'((code_addr(n) & 32'h3FFFF) >> 2) + i, prog[i]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_round(1);
    // Y-then-X routes in every routing table
    for (int r = 0; r < NODES; r++)
      for (int d = 0; d < NODES; d++) begin
        automatic int rx = r % MX, ry = r / MX, dx = d % MX, dy = d / MX;
        rt_we = 1; rt_node = 8'(r); rt_addr = 8'(d);
        rt_data = (dy > ry) ? PORT_S : (dy < ry) ? PORT_N : (dx > rx) ? PORT_E : (dx < rx) ? PORT_W : PORT_L;
        @(negedge clk);
      end
    rt_we = 0;
    use_table = 1;
    run_round(2);
    begin
      int frz = 0, lu = 0, byp = 0, fl = 0;
      for (int n = 0; n < NODES; n++) begin
        frz += perf[n][1]; lu += perf[n][2]; byp += perf[n][3]; fl += perf[n][4];
      end
      $display("freeze=%0d loaduse=%0d bypass=%0d flush=%0d remote_sent=%0d remote_served=%0d sa_conflicts=%0d table_flits=%0d",
               frz, lu, byp, fl, remote_sent, remote_served, sa_conflicts, table_flits);
      check(frz > 0, "cache-miss freeze happened");
      check(lu > 0, "load-use bubble happened");
      check(byp > 0, "bypass happened");
      check(fl > 0, "branch flush happened");
      check(remote_sent > 0, "remote request sent");
      check(remote_served == remote_sent, "every remote request served by a local memory");
      check(sa_conflicts > 0, "switch allocation conflict happened");
      check(table_flits > 0, "table routing carried flits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
