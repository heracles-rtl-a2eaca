// tb_workload_fib: Fibonacci numbers on 1, 3 and 7 cores of the default
// 3x3 multicore (no parameter changes), with two data placements.
// Core c of P computes F(k) for k = c, c+P, c+2P, ... below K by plain
// iteration and stores each at out[k]. The cores never share a word.
// "Single-memory" placement puts every core's code and results in node 0's
// memory, so all misses and write-through stores of all cores go to one
// node, as if it held the only main memory. "Distributed" placement keeps
// each core's code and results in its own node.
// Every F(k) is compared with a value computed here (32-bit wrap-around).
// Checks on the run lengths: more cores finish sooner in both placements,
// and on 7 cores the distributed placement is not slower.
module tb_workload_fib;
  import heracles_pkg::*;
  import mips_asm_pkg::*;

  localparam int MX = 3, MY = 3, NODES = MX * MY, LAB = 18;
  localparam int K = 200;          // F(0) .. F(K-1) are computed
  localparam int PROG_WORDS = 22;

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

  // ---------------- backdoor access to the local memories ----------------
  task automatic mem_write(logic [31:0] addr, logic [31:0] val);
    automatic int n = int'(addr >> LAB);
    automatic int word = int'((addr & 32'h3FFFF) >> 2);
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

  function automatic logic [31:0] mem_read(logic [31:0] addr);
    automatic int n = int'(addr >> LAB);
    automatic int word = int'((addr & 32'h3FFFF) >> 2);
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

  // Where core c of a run keeps its code and results. ssm: all in node 0;
  // otherwise in the core's own node.
  function automatic logic [31:0] code_addr(int c, bit ssm);
    return ssm ? 32'h100 + 32'(c) * 32'h100 : (32'(c) << LAB) + 32'h100;
  endfunction
  function automatic logic [31:0] out_addr(int c, bit ssm);
    return ssm ? 32'h10000 : (32'(c) << LAB) + 32'h10000;
  endfunction

  function automatic logic [31:0] fib(int k);
    logic [31:0] a = 0, b = 1, t;
    for (int i = 0; i < k; i++) begin t = a + b; a = b; b = t; end
    return a;
  endfunction

  // Program of core c of p: for k = c, c+p, ... < K, iterate a, b = b, a+b
  // k times from (0, 1) and store a at out[k]. Registers: r1 k, r2 K,
  // r3 p, r4 out, r5 a, r6 b, r7 count, r8 scratch, r9 &out[k].
  task automatic build(int c, int p, bit ssm, output logic [31:0] w[PROG_WORDS]);
    automatic logic [31:0] base = code_addr(c, ssm);
    automatic logic [31:0] out = out_addr(c, ssm);
    w[0]  = LUI(4, out[31:16]);  w[1] = ORI(4, 4, out[15:0]);
    w[2]  = ADDIU(1, 0, 16'(c));
    w[3]  = ADDIU(2, 0, 16'(K));
    w[4]  = ADDIU(3, 0, 16'(p));
    // loop_k (5)
    w[5]  = SLT(8, 1, 2);
    w[6]  = BEQ(8, 0, 16'(21 - 7));
    w[7]  = ADDIU(5, 0, 0);
    w[8]  = ADDIU(6, 0, 1);
    w[9]  = ADDIU(7, 1, 0);
    // loop (10)
    w[10] = BEQ(7, 0, 16'(16 - 11));
    w[11] = ADDU(8, 5, 6);
    w[12] = ADDU(5, 6, 0);
    w[13] = ADDU(6, 8, 0);
    w[14] = ADDIU(7, 7, 16'hFFFF);
    w[15] = J(base + 32'd40);
    // store (16)
    w[16] = SLL(9, 1, 2);
    w[17] = ADDU(9, 9, 4);
    w[18] = SW(5, 0, 9);
    w[19] = ADDU(1, 1, 3);
    w[20] = J(base + 32'd20);
    // done (21)
    w[21] = BREAK();
  endtask

  task automatic run(int p, bit ssm, output int cycles);
    logic [31:0] prog[PROG_WORDS];
    int bad = 0;
    for (int c = 0; c < p; c++) begin
      build(c, p, ssm, prog);
      for (int i = 0; i < PROG_WORDS; i++) mem_write(code_addr(c, ssm) + 32'(i * 4), prog[i]);
      for (int k = 0; k < K; k++) mem_write(out_addr(c, ssm) + 32'(k * 4), 32'hDEAD_BEEF);
    end
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int c = 0; c < NODES; c++) begin start[c] = (c < p); start_pc[c] = code_addr(c, ssm); end
    @(negedge clk);
    for (int c = 0; c < NODES; c++) start[c] = 0;
    cycles = 0;
    while (cycles < 1000000) begin
      automatic bit all = 1;
      for (int c = 0; c < p; c++) all &= halted[c];
      if (all) break;
      @(negedge clk); cycles++;
    end
    repeat (20) @(negedge clk);
    for (int c = 0; c < p; c++) check(halted[c], $sformatf("%0d cores %s: core %0d halted", p, ssm ? "SSM" : "DSM", c));
    for (int k = 0; k < K; k++) begin
      automatic logic [31:0] got = mem_read(out_addr(k % p, ssm) + 32'(k * 4));
      checks++;
      if (got !== fib(k)) begin
        failures++;
        if (bad++ < 5) $display("FAIL: %0d cores %s: F(%0d) = %h, expected %h", p, ssm ? "SSM" : "DSM", k, got, fib(k));
      end
    end
    $display("Fibonacci on %0d cores, %s placement: %0d cycles", p, ssm ? "single-memory" : "distributed", cycles);
  endtask

  initial begin
    int t[2][3];
    int pc[3] = '{1, 3, 7};
    for (int c = 0; c < NODES; c++) begin start[c] = 0; start_pc[c] = 0; end
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 3; i++) run(pc[i], m == 0, t[m][i]);
    for (int m = 0; m < 2; m++)
      for (int i = 1; i < 3; i++)
        check(t[m][i] < t[m][i-1], $sformatf("%s: %0d cores faster than %0d", m == 0 ? "SSM" : "DSM", pc[i], pc[i-1]));
    check(t[1][2] <= t[0][2], $sformatf("7 cores: distributed (%0d) not slower than single memory (%0d)", t[1][2], t[0][2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
