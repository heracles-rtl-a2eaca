// mips_asm_pkg: instruction encoders used by the testbenches to build small
// MIPS programs in memory (standard MIPS32 encodings of the instructions the
// core supports).
package mips_asm_pkg;
  function automatic logic [31:0] rtype(logic [5:0] fn, logic [4:0] rs, logic [4:0] rt, logic [4:0] rd, logic [4:0] sh = 0);
    return {6'h00, rs, rt, rd, sh, fn};
  endfunction
  function automatic logic [31:0] itype(logic [5:0] op, logic [4:0] rs, logic [4:0] rt, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic logic [31:0] ADDU (logic [4:0] rd, rs, rt); return rtype(6'h21, rs, rt, rd); endfunction
  function automatic logic [31:0] SUBU (logic [4:0] rd, rs, rt); return rtype(6'h23, rs, rt, rd); endfunction
  function automatic logic [31:0] AND_ (logic [4:0] rd, rs, rt); return rtype(6'h24, rs, rt, rd); endfunction
  function automatic logic [31:0] OR_  (logic [4:0] rd, rs, rt); return rtype(6'h25, rs, rt, rd); endfunction
  function automatic logic [31:0] XOR_ (logic [4:0] rd, rs, rt); return rtype(6'h26, rs, rt, rd); endfunction
  function automatic logic [31:0] NOR_ (logic [4:0] rd, rs, rt); return rtype(6'h27, rs, rt, rd); endfunction
  function automatic logic [31:0] SLT  (logic [4:0] rd, rs, rt); return rtype(6'h2a, rs, rt, rd); endfunction
  function automatic logic [31:0] SLTU (logic [4:0] rd, rs, rt); return rtype(6'h2b, rs, rt, rd); endfunction
  function automatic logic [31:0] SLLV (logic [4:0] rd, rt, rs); return rtype(6'h04, rs, rt, rd); endfunction
  function automatic logic [31:0] SLL  (logic [4:0] rd, rt, logic [4:0] sh); return rtype(6'h00, 5'd0, rt, rd, sh); endfunction
  function automatic logic [31:0] SRL  (logic [4:0] rd, rt, logic [4:0] sh); return rtype(6'h02, 5'd0, rt, rd, sh); endfunction
  function automatic logic [31:0] SRA  (logic [4:0] rd, rt, logic [4:0] sh); return rtype(6'h03, 5'd0, rt, rd, sh); endfunction
  function automatic logic [31:0] JR   (logic [4:0] rs); return rtype(6'h08, rs, 5'd0, 5'd0); endfunction
  function automatic logic [31:0] JALR (logic [4:0] rd, rs); return rtype(6'h09, rs, 5'd0, rd); endfunction
  function automatic logic [31:0] MULT (logic [4:0] rs, rt); return rtype(6'h18, rs, rt, 5'd0); endfunction
  function automatic logic [31:0] MULTU(logic [4:0] rs, rt); return rtype(6'h19, rs, rt, 5'd0); endfunction
  function automatic logic [31:0] MFHI (logic [4:0] rd); return rtype(6'h10, 5'd0, 5'd0, rd); endfunction
  function automatic logic [31:0] MFLO (logic [4:0] rd); return rtype(6'h12, 5'd0, 5'd0, rd); endfunction
  function automatic logic [31:0] BREAK(); return rtype(6'h0d, 5'd0, 5'd0, 5'd0); endfunction
  function automatic logic [31:0] ADDIU(logic [4:0] rt, rs, logic [15:0] imm); return itype(6'h09, rs, rt, imm); endfunction
  function automatic logic [31:0] SLTI (logic [4:0] rt, rs, logic [15:0] imm); return itype(6'h0a, rs, rt, imm); endfunction
  function automatic logic [31:0] ANDI (logic [4:0] rt, rs, logic [15:0] imm); return itype(6'h0c, rs, rt, imm); endfunction
  function automatic logic [31:0] ORI  (logic [4:0] rt, rs, logic [15:0] imm); return itype(6'h0d, rs, rt, imm); endfunction
  function automatic logic [31:0] XORI (logic [4:0] rt, rs, logic [15:0] imm); return itype(6'h0e, rs, rt, imm); endfunction
  function automatic logic [31:0] LUI  (logic [4:0] rt, logic [15:0] imm); return itype(6'h0f, 5'd0, rt, imm); endfunction
  function automatic logic [31:0] LW   (logic [4:0] rt, logic [15:0] off, logic [4:0] base); return itype(6'h23, base, rt, off); endfunction
  function automatic logic [31:0] SW   (logic [4:0] rt, logic [15:0] off, logic [4:0] base); return itype(6'h2b, base, rt, off); endfunction
  function automatic logic [31:0] BEQ  (logic [4:0] rs, rt, logic [15:0] off); return itype(6'h04, rs, rt, off); endfunction
  function automatic logic [31:0] BNE  (logic [4:0] rs, rt, logic [15:0] off); return itype(6'h05, rs, rt, off); endfunction
  function automatic logic [31:0] BLEZ (logic [4:0] rs, logic [15:0] off); return itype(6'h06, rs, 5'd0, off); endfunction
  function automatic logic [31:0] BGTZ (logic [4:0] rs, logic [15:0] off); return itype(6'h07, rs, 5'd0, off); endfunction
  function automatic logic [31:0] BGEZ (logic [4:0] rs, logic [15:0] off); return itype(6'h01, rs, 5'd1, off); endfunction
  function automatic logic [31:0] J    (logic [31:0] target); return {6'h02, target[27:2]}; endfunction
  function automatic logic [31:0] JAL  (logic [31:0] target); return {6'h03, target[27:2]}; endfunction
endpackage
