// tb_workload_matmul: parallel matrix multiplication C = A x B on the
// default 3x3 multicore (no parameter changes), at several matrix sizes and
// core counts.
// A lives in node 0's memory, B in node 1's, C in node 2's (all at offset
// 0x10000), so almost every cache miss crosses the network. B is stored
// transposed, so the inner loop walks both operands with unit stride and
// uses whole cache lines. Core c of P computes rows c, c+P, c+2P, ... of C,
// running from its own node's memory. The inner loop is the i-j-k triple
// loop with MULT/MFLO. The elements are small signed numbers, and C is
// compared word by word with a product computed here in 32-bit arithmetic. The run length of every
// configuration is printed, and for each size the run on nine cores must be
// shorter than the run on four cores.
// Runs: 16x16 and 32x32 matrices, each on 4 and on 9 cores.
module tb_workload_matmul;
  import heracles_pkg::*;
  import mips_asm_pkg::*;

  localparam int MX = 3, MY = 3, NODES = MX * MY, LAB = 18;
  localparam logic [31:0] A_BASE = (32'd0 << LAB) + 32'h10000;
  localparam logic [31:0] B_BASE = (32'd1 << LAB) + 32'h10000;
  localparam logic [31:0] C_BASE = (32'd2 << LAB) + 32'h10000;
  localparam int PROG_WORDS = 41;

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

  function automatic logic [31:0] a_val(int i, int k); return 32'((i * 3 + k * 5) % 17 - 8); endfunction
  function automatic logic [31:0] b_val(int k, int j); return 32'((k * 7 + j * 2) % 13 - 6); endfunction

  function automatic logic [31:0] code_addr(int c); return (32'(c) << LAB) + 32'h100; endfunction

  // Program of core c of p for n x n matrices. Registers: r1 i, r2 n,
  // r3 A, r4 B (transposed), r5 C, r6 p, r7 j, r8 k, r9 sum, r10 &A[i][k],
  // r11 &B[k][j], r12 a, r13 b, r14 scratch, r15 row bytes, r16 &C[i][j].
  task automatic build(int c, int p, int n, output logic [31:0] w[PROG_WORDS]);
    automatic logic [31:0] base = code_addr(c);
    w[0]  = LUI(3, A_BASE[31:16]);   w[1] = ORI(3, 3, A_BASE[15:0]);
    w[2]  = LUI(4, B_BASE[31:16]);   w[3] = ORI(4, 4, B_BASE[15:0]);
    w[4]  = LUI(5, C_BASE[31:16]);   w[5] = ORI(5, 5, C_BASE[15:0]);
    w[6]  = ADDIU(1, 0, 16'(c));
    w[7]  = ADDIU(2, 0, 16'(n));
    w[8]  = ADDIU(6, 0, 16'(p));
    w[9]  = SLL(15, 2, 2);
    // loop_i (10)
    w[10] = SLT(14, 1, 2);
    w[11] = BEQ(14, 0, 16'(40 - 12));
    w[12] = ADDIU(7, 0, 0);
    // loop_j (13)
    w[13] = ADDIU(9, 0, 0);
    w[14] = MULT(1, 15);
    w[15] = MFLO(10);
    w[16] = ADDU(10, 10, 3);
    w[17] = MULT(7, 15);
    w[18] = MFLO(11);
    w[19] = ADDU(11, 11, 4);
    w[20] = ADDIU(8, 0, 0);
    // loop_k (21)
    w[21] = LW(12, 0, 10);
    w[22] = LW(13, 0, 11);
    w[23] = MULT(12, 13);
    w[24] = MFLO(14);
    w[25] = ADDU(9, 9, 14);
    w[26] = ADDIU(10, 10, 4);
    w[27] = ADDIU(11, 11, 4);
    w[28] = ADDIU(8, 8, 1);
    w[29] = BNE(8, 2, 16'(21 - 30));
    w[30] = MULT(1, 15);
    w[31] = MFLO(16);
    w[32] = SLL(14, 7, 2);
    w[33] = ADDU(16, 16, 14);
    w[34] = ADDU(16, 16, 5);
    w[35] = SW(9, 0, 16);
    w[36] = ADDIU(7, 7, 1);
    w[37] = BNE(7, 2, 16'(13 - 38));
    w[38] = ADDU(1, 1, 6);
    w[39] = J(base + 32'd40);
    // done (40)
    w[40] = BREAK();
  endtask

  task automatic run(int n, int p, output int cycles);
    logic [31:0] prog[PROG_WORDS];
    int bad = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        mem_write(A_BASE + 32'((i * n + j) * 4), a_val(i, j));
        mem_write(B_BASE + 32'((j * n + i) * 4), b_val(i, j));  // B stored transposed
        mem_write(C_BASE + 32'((i * n + j) * 4), 32'hDEAD_BEEF);
      end
    for (int c = 0; c < p; c++) begin
      build(c, p, n, prog);
      for (int i = 0; i < PROG_WORDS; i++) mem_write(code_addr(c) + 32'(i * 4), prog[i]);
    end
    // Pulse reset between runs so that no cache holds lines of an earlier run.
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int c = 0; c < NODES; c++) begin start[c] = (c < p); start_pc[c] = code_addr(c); end
    @(negedge clk);
    for (int c = 0; c < NODES; c++) start[c] = 0;
    cycles = 0;
    while (cycles < 2000000) begin
      automatic bit all = 1;
      for (int c = 0; c < p; c++) all &= halted[c];
      if (all) break;
      @(negedge clk); cycles++;
    end
    repeat (20) @(negedge clk);
    for (int c = 0; c < p; c++) check(halted[c], $sformatf("%0dx%0d on %0d cores: core %0d halted", n, n, p, c));
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        automatic logic [31:0] exp = 0;
        automatic logic [31:0] got = mem_read(C_BASE + 32'((i * n + j) * 4));
        for (int k = 0; k < n; k++) exp += a_val(i, k) * b_val(k, j);
        checks++;
        if (got !== exp) begin
          failures++;
          if (bad++ < 5) $display("FAIL: %0dx%0d on %0d cores: C[%0d][%0d] = %h, expected %h", n, n, p, i, j, got, exp);
        end
      end
    $display("matrix %0dx%0d on %0d cores: %0d cycles", n, n, p, cycles);
  endtask

  initial begin
    int t4, t9;
    for (int c = 0; c < NODES; c++) begin start[c] = 0; start_pc[c] = 0; end
    for (int s = 0; s < 2; s++) begin
      automatic int n = (s == 0) ? 16 : 32;
      run(n, 4, t4);
      run(n, 9, t9);
      check(t9 < t4, $sformatf("%0dx%0d: 9 cores (%0d cycles) faster than 4 cores (%0d cycles)", n, n, t9, t4));
    end
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
