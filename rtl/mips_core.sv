// mips_core: single-threaded 32-bit MIPS integer core with seven in-order
// pipeline stages:
//   F1  PC drives the instruction cache (stage 1 of the cache)
//   F2  instruction cache tag check / data (stage 2)
//   D   decode, register read, jumps (J, JAL) redirect the PC
//   X   ALU, multiply, branch and JR/JALR resolution, address generation
//   M1  data cache stage 1
//   M2  data cache stage 2 (load data arrives)
//   W   register write
// Fetch and data access take two cycles each because the caches are built
// like block RAMs. Bypassing is full: X takes its operands from M1, M2 or W
// when an older instruction there writes them, and the register file writes
// through to D. A load's data exists only at the end of M2, so an
// instruction in D that needs a load still in X or M1 waits (up to two
// bubbles). Branches are predicted not taken and there is no delay slot: a
// taken branch or JR/JALR in X flushes the three younger instructions; J and
// JAL in D flush two. A cache miss freezes the whole pipeline until the line
// is present (miss from either cache).
// Supported: ADD(U) ADDI(U) SUB(U) AND(I) OR(I) XOR(I) NOR SLT(I)(U) LUI
// SLL SRL SRA SLLV SRLV SRAV MULT(U) MFHI MFLO MTHI MTLO LW SW BEQ BNE BLEZ
// BGTZ BLTZ BGEZ J JAL JR JALR; BREAK or SYSCALL stops the core (halted
// rises when the pipeline has drained). ADD/SUB do not trap; other opcodes
// execute as no-ops. The core sleeps after reset until start, which loads
// start_pc.
// The stage count, two-cycle caches, full bypassing, no branch prediction
// and no delay slot follow the document. The ISA subset, the stage at which
// each kind of branch resolves, halting and the event counters (perf_*) are
// this design's choices.
module mips_core
  import heracles_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] start_pc,
  output logic        halted,
  // instruction cache
  output logic        ic_hold,
  output logic        ic_valid,
  output logic [31:0] ic_addr,
  input  logic [31:0] ic_rdata,
  input  logic        ic_miss,
  // data cache
  output logic        dc_hold,
  output logic        dc_valid,
  output logic [31:0] dc_addr,
  output logic        dc_we,
  output logic [31:0] dc_wdata,
  input  logic [31:0] dc_rdata,
  input  logic        dc_miss,
  // event counters
  output logic [31:0] perf_retired,
  output logic [31:0] perf_freeze,
  output logic [31:0] perf_loaduse,
  output logic [31:0] perf_bypass,
  output logic [31:0] perf_flush
);
  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_NOR, A_SLT, A_SLTU,
    A_SLL, A_SRL, A_SRA, A_IMM, A_LINK, A_MFHI, A_MFLO
  } alu_t;

  typedef enum logic [2:0] {
    B_NONE, B_EQ, B_NE, B_LEZ, B_GTZ, B_LTZ, B_GEZ, B_JR
  } br_t;

  typedef struct packed {
    alu_t        alu;
    br_t         br;
    logic        use_imm;
    logic        sh_var;
    logic        wen;
    logic        load;
    logic        store;
    logic        mult;
    logic        mult_s;
    logic        mthi;
    logic        mtlo;
    logic        halt;
    logic        rd_rs;     // reads rs
    logic        rd_rt;     // reads rt
    logic [4:0]  dst;
  } ctrl_t;

  // ---------------- pipeline state ----------------
  logic        running_q, halted_q;
  logic [31:0] pc_q;
  logic        f2_valid;  logic [31:0] f2_pc;
  logic        d_valid;   logic [31:0] d_pc, d_instr;
  logic        x_valid;   logic [31:0] x_pc, x_rsv, x_rtv, x_imm, x_target;
  ctrl_t       x_c;       logic [4:0] x_rs, x_rt, x_sh;
  logic        m1_valid;  logic [31:0] m1_res, m1_sdata; ctrl_t m1_c;
  logic        m2_valid;  logic [31:0] m2_res; ctrl_t m2_c;
  logic        w_valid;   logic [31:0] w_res;  ctrl_t w_c;
  logic [31:0] hi_q, lo_q;
  logic [31:0] rf [32];

  logic freeze, luse, redir_x, redir_d;
  logic [31:0] target_x, target_d;

  assign freeze = ic_miss || dc_miss;

  // ---------------- D: decode ----------------
  logic [5:0]  op, fn;
  logic [4:0]  rs, rt, rd, sh;
  logic [31:0] simm, zimm;
  ctrl_t       dc;
  logic [31:0] rs_rd, rt_rd;

  assign op   = d_instr[31:26];
  assign rs   = d_instr[25:21];
  assign rt   = d_instr[20:16];
  assign rd   = d_instr[15:11];
  assign sh   = d_instr[10:6];
  assign fn   = d_instr[5:0];
  assign simm = {{16{d_instr[15]}}, d_instr[15:0]};
  assign zimm = {16'b0, d_instr[15:0]};

  logic [31:0] d_imm;
  logic        d_jump;
  always_comb begin
    dc       = '0;
    dc.alu   = A_ADD;
    dc.br    = B_NONE;
    d_imm    = simm;
    d_jump   = 1'b0;
    target_d = {d_pc[31:28], d_instr[25:0], 2'b00};
    unique case (op)
      6'h00: begin                                   // SPECIAL
        dc.rd_rs = 1'b1; dc.rd_rt = 1'b1; dc.wen = 1'b1; dc.dst = rd;
        unique case (fn)
          6'h00: dc.alu = A_SLL;
          6'h02: dc.alu = A_SRL;
          6'h03: dc.alu = A_SRA;
          6'h04: begin dc.alu = A_SLL; dc.sh_var = 1'b1; end
          6'h06: begin dc.alu = A_SRL; dc.sh_var = 1'b1; end
          6'h07: begin dc.alu = A_SRA; dc.sh_var = 1'b1; end
          6'h08: begin dc.br = B_JR; dc.wen = 1'b0; end
          6'h09: begin dc.br = B_JR; dc.alu = A_LINK; end
          6'h0c, 6'h0d: begin dc.halt = 1'b1; dc.wen = 1'b0; end
          6'h10: dc.alu = A_MFHI;
          6'h11: begin dc.mthi = 1'b1; dc.wen = 1'b0; end
          6'h12: dc.alu = A_MFLO;
          6'h13: begin dc.mtlo = 1'b1; dc.wen = 1'b0; end
          6'h18: begin dc.mult = 1'b1; dc.mult_s = 1'b1; dc.wen = 1'b0; end
          6'h19: begin dc.mult = 1'b1; dc.wen = 1'b0; end
          6'h20, 6'h21: dc.alu = A_ADD;
          6'h22, 6'h23: dc.alu = A_SUB;
          6'h24: dc.alu = A_AND;
          6'h25: dc.alu = A_OR;
          6'h26: dc.alu = A_XOR;
          6'h27: dc.alu = A_NOR;
          6'h2a: dc.alu = A_SLT;
          6'h2b: dc.alu = A_SLTU;
          default: dc.wen = 1'b0;
        endcase
      end
      6'h01: begin                                   // REGIMM
        dc.rd_rs = 1'b1;
        dc.br    = rt[0] ? B_GEZ : B_LTZ;
      end
      6'h02: d_jump = 1'b1;                          // J
      6'h03: begin                                   // JAL
        d_jump = 1'b1; dc.wen = 1'b1; dc.dst = 5'd31; dc.alu = A_LINK;
      end
      6'h04: begin dc.br = B_EQ;  dc.rd_rs = 1'b1; dc.rd_rt = 1'b1; end
      6'h05: begin dc.br = B_NE;  dc.rd_rs = 1'b1; dc.rd_rt = 1'b1; end
      6'h06: begin dc.br = B_LEZ; dc.rd_rs = 1'b1; end
      6'h07: begin dc.br = B_GTZ; dc.rd_rs = 1'b1; end
      6'h08, 6'h09: begin dc.alu = A_ADD;  dc.use_imm = 1'b1; dc.rd_rs = 1'b1; dc.wen = 1'b1; dc.dst = rt; end
      6'h0a:        begin dc.alu = A_SLT;  dc.use_imm = 1'b1; dc.rd_rs = 1'b1; dc.wen = 1'b1; dc.dst = rt; end
      6'h0b:        begin dc.alu = A_SLTU; dc.use_imm = 1'b1; dc.rd_rs = 1'b1; dc.wen = 1'b1; dc.dst = rt; end
      6'h0c: begin dc.alu = A_AND; dc.use_imm = 1'b1; dc.rd_rs = 1'b1; dc.wen = 1'b1; dc.dst = rt; d_imm = zimm; end
      6'h0d: begin dc.alu = A_OR;  dc.use_imm = 1'b1; dc.rd_rs = 1'b1; dc.wen = 1'b1; dc.dst = rt; d_imm = zimm; end
      6'h0e: begin dc.alu = A_XOR; dc.use_imm = 1'b1; dc.rd_rs = 1'b1; dc.wen = 1'b1; dc.dst = rt; d_imm = zimm; end
      6'h0f: begin dc.alu = A_IMM; dc.wen = 1'b1; dc.dst = rt; d_imm = {d_instr[15:0], 16'b0}; end
      6'h23: begin dc.load  = 1'b1; dc.use_imm = 1'b1; dc.rd_rs = 1'b1; dc.wen = 1'b1; dc.dst = rt; end
      6'h2b: begin dc.store = 1'b1; dc.use_imm = 1'b1; dc.rd_rs = 1'b1; dc.rd_rt = 1'b1; end
      default: ;
    endcase
    if (dc.dst == 5'd0) dc.wen = 1'b0;
  end

  // register file read with write-through from W
  function automatic logic [31:0] rf_read(logic [4:0] r);
    if (r == 5'd0) return '0;
    if (w_valid && w_c.wen && w_c.dst == r) return w_res;
    return rf[r];
  endfunction
  assign rs_rd = rf_read(rs);
  assign rt_rd = rf_read(rt);

  // load-use interlock: the value is produced at the end of M2
  function automatic logic needs(ctrl_t c, logic [4:0] r, logic vld, ctrl_t p);
    return vld && p.load && p.wen && p.dst == r && r != 5'd0;
  endfunction
  assign luse = d_valid &&
                ((dc.rd_rs && (needs(dc, rs, x_valid, x_c) || needs(dc, rs, m1_valid, m1_c))) ||
                 (dc.rd_rt && (needs(dc, rt, x_valid, x_c) || needs(dc, rt, m1_valid, m1_c))));
  assign redir_d = d_valid && d_jump && !luse;

  // ---------------- X: execute ----------------
  logic [31:0] xa, xb, opb, alu_res;
  logic [4:0]  shamt;
  logic        taken, fwd_a, fwd_b;

  function automatic logic [32:0] fwd(logic [4:0] r, logic [31:0] regval);
    if (r == 5'd0)                                 return {1'b0, 32'b0};
    if (m1_valid && m1_c.wen && m1_c.dst == r)     return {1'b1, m1_res};
    if (m2_valid && m2_c.wen && m2_c.dst == r)     return {1'b1, m2_res};
    if (w_valid  && w_c.wen  && w_c.dst  == r)     return {1'b1, w_res};
    return {1'b0, regval};
  endfunction

  always_comb begin
    {fwd_a, xa} = fwd(x_rs, x_rsv);
    {fwd_b, xb} = fwd(x_rt, x_rtv);
    opb   = x_c.use_imm ? x_imm : xb;
    shamt = x_c.sh_var ? xa[4:0] : x_sh;
    unique case (x_c.alu)
      A_ADD:   alu_res = xa + opb;
      A_SUB:   alu_res = xa - opb;
      A_AND:   alu_res = xa & opb;
      A_OR:    alu_res = xa | opb;
      A_XOR:   alu_res = xa ^ opb;
      A_NOR:   alu_res = ~(xa | opb);
      A_SLT:   alu_res = {31'b0, $signed(xa) < $signed(opb)};
      A_SLTU:  alu_res = {31'b0, xa < opb};
      A_SLL:   alu_res = xb << shamt;
      A_SRL:   alu_res = xb >> shamt;
      A_SRA:   alu_res = $unsigned($signed(xb) >>> shamt);
      A_IMM:   alu_res = x_imm;
      A_LINK:  alu_res = x_pc + 32'd4;
      A_MFHI:  alu_res = hi_q;
      A_MFLO:  alu_res = lo_q;
      default: alu_res = '0;
    endcase
    unique case (x_c.br)
      B_EQ:    taken = xa == xb;
      B_NE:    taken = xa != xb;
      B_LEZ:   taken = $signed(xa) <= 0;
      B_GTZ:   taken = $signed(xa) > 0;
      B_LTZ:   taken = $signed(xa) < 0;
      B_GEZ:   taken = $signed(xa) >= 0;
      B_JR:    taken = 1'b1;
      default: taken = 1'b0;
    endcase
    target_x = (x_c.br == B_JR) ? xa : x_target;
    redir_x  = x_valid && (taken || x_c.halt);
  end

  // ---------------- caches ----------------
  logic f1_valid;
  assign f1_valid = running_q && !redir_x && !redir_d;
  assign ic_hold  = freeze || (luse && !redir_x);
  assign ic_valid = f1_valid;
  assign ic_addr  = pc_q;

  assign dc_hold  = freeze;
  assign dc_valid = m1_valid && (m1_c.load || m1_c.store);
  assign dc_addr  = m1_res;
  assign dc_we    = m1_c.store;
  assign dc_wdata = m1_sdata;

  assign halted = halted_q && !x_valid && !m1_valid && !m2_valid && !w_valid;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q <= 1'b0; halted_q <= 1'b0; pc_q <= '0;
      f2_valid <= 1'b0; f2_pc <= '0;
      d_valid <= 1'b0; d_pc <= '0; d_instr <= '0;
      x_valid <= 1'b0; x_pc <= '0; x_rsv <= '0; x_rtv <= '0; x_imm <= '0; x_target <= '0;
      x_c <= '0; x_rs <= '0; x_rt <= '0; x_sh <= '0;
      m1_valid <= 1'b0; m1_res <= '0; m1_sdata <= '0; m1_c <= '0;
      m2_valid <= 1'b0; m2_res <= '0; m2_c <= '0;
      w_valid <= 1'b0; w_res <= '0; w_c <= '0;
      hi_q <= '0; lo_q <= '0;
      perf_retired <= '0; perf_freeze <= '0; perf_loaduse <= '0; perf_bypass <= '0; perf_flush <= '0;
    end else if (start && !running_q) begin
      running_q <= 1'b1;
      halted_q  <= 1'b0;
      pc_q      <= start_pc;
    end else if (freeze) begin
      perf_freeze <= perf_freeze + 1'b1;
    end else begin
      // W
      w_valid <= m2_valid;
      w_c     <= m2_c;
      w_res   <= m2_c.load ? dc_rdata : m2_res;
      if (w_valid) perf_retired <= perf_retired + 1'b1;
      // M2
      m2_valid <= m1_valid;
      m2_c     <= m1_c;
      m2_res   <= m1_res;
      // M1
      m1_valid <= x_valid;
      m1_c     <= x_c;
      m1_res   <= alu_res;
      m1_sdata <= xb;
      if (x_valid && (fwd_a || fwd_b)) perf_bypass <= perf_bypass + 1'b1;
      if (x_valid && x_c.mult) {hi_q, lo_q} <= x_c.mult_s ? $unsigned($signed({{32{xa[31]}}, xa}) * $signed({{32{xb[31]}}, xb}))
                                                          : {32'b0, xa} * {32'b0, xb};
      if (x_valid && x_c.mthi) hi_q <= xa;
      if (x_valid && x_c.mtlo) lo_q <= xa;
      if (x_valid && x_c.halt) begin
        running_q <= 1'b0;
        halted_q  <= 1'b1;
      end
      // X, D, F2, F1
      if (redir_x) begin
        x_valid  <= 1'b0;
        d_valid  <= 1'b0;
        f2_valid <= 1'b0;
        pc_q     <= target_x;
        if (!x_c.halt) perf_flush <= perf_flush + 1'b1;
      end else if (luse) begin
        x_valid      <= 1'b0;
        perf_loaduse <= perf_loaduse + 1'b1;
      end else begin
        x_valid  <= d_valid;
        x_pc     <= d_pc;
        x_c      <= dc;
        x_rs     <= dc.rd_rs ? rs : 5'd0;
        x_rt     <= dc.rd_rt ? rt : 5'd0;
        x_rsv    <= rs_rd;
        x_rtv    <= rt_rd;
        x_sh     <= sh;
        x_imm    <= d_imm;
        x_target <= d_pc + 32'd4 + {simm[29:0], 2'b00};
        d_valid  <= f2_valid && !redir_d;
        d_pc     <= f2_pc;
        d_instr  <= ic_rdata;
        f2_valid <= f1_valid;
        f2_pc    <= pc_q;
        if (redir_d) begin
          pc_q <= target_d;
          perf_flush <= perf_flush + 1'b1;
        end else if (running_q) begin
          pc_q <= pc_q + 32'd4;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (!freeze && w_valid && w_c.wen) rf[w_c.dst] <= w_res;

  assert property (@(posedge clk) disable iff (!rst_n) !(m1_valid && m1_c.load && x_valid &&
                   ((x_c.rd_rs && x_rs == m1_c.dst) || (x_c.rd_rt && x_rt == m1_c.dst)) && m1_c.wen && m1_c.dst != 0));
endmodule
