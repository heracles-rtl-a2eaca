// test_prog_pkg: a small MIPS program used by the core, node and mesh
// testbenches, and the values it must leave in memory. It sums 10..1 in a
// loop (taken branches, ALU bypassing), stores and reloads the sum (load-use
// interlock), calls a function (JAL/JR), multiplies signed numbers
// (MULT/MFLO/MFHI), builds a constant with LUI/ORI, shifts and compares, skips
// an instruction with a taken BEQ, and stops with BREAK. All results go to
// ten words at data_base. The expected values are worked out by hand below.
package test_prog_pkg;
  import mips_asm_pkg::*;

  localparam int unsigned PROG_WORDS = 37;
  localparam int unsigned RES_WORDS  = 10;

  function automatic void build(input logic [31:0] code_base, input logic [31:0] data_base,
                                output logic [31:0] w[PROG_WORDS]);
    w[0]  = LUI(10, data_base[31:16]);
    w[1]  = ORI(10, 10, data_base[15:0]);
    w[2]  = ADDIU(1, 0, 0);
    w[3]  = ADDIU(2, 0, 10);
    w[4]  = ADDU(1, 1, 2);              // loop:
    w[5]  = ADDIU(2, 2, 16'hFFFF);
    w[6]  = BNE(2, 0, 16'hFFFD);        // back to loop
    w[7]  = SW(1, 0, 10);
    w[8]  = LW(3, 0, 10);
    w[9]  = ADDIU(4, 3, 1);
    w[10] = SW(4, 4, 10);
    w[11] = JAL(code_base + 32'd4 * 35);
    w[12] = SW(5, 8, 10);
    w[13] = ADDIU(6, 0, 16'hFFF9);      // -7
    w[14] = ADDIU(7, 0, 9);
    w[15] = MULT(6, 7);
    w[16] = MFLO(8);
    w[17] = MFHI(9);
    w[18] = SW(8, 12, 10);
    w[19] = SW(9, 16, 10);
    w[20] = LUI(11, 16'h1234);
    w[21] = ORI(11, 11, 16'h5678);
    w[22] = SW(11, 20, 10);
    w[23] = SRA(12, 6, 1);
    w[24] = SLT(13, 6, 7);
    w[25] = SLTU(14, 6, 7);
    w[26] = SW(12, 24, 10);
    w[27] = SW(13, 28, 10);
    w[28] = SW(14, 32, 10);
    w[29] = ADDIU(15, 0, 1);
    w[30] = BEQ(0, 0, 16'd1);
    w[31] = ADDIU(15, 0, 99);           // skipped
    w[32] = ADDIU(15, 15, 5);
    w[33] = SW(15, 36, 10);
    w[34] = BREAK();
    w[35] = ADDIU(5, 0, 77);            // function
    w[36] = JR(31);
  endfunction

  function automatic logic [31:0] expected(int i);
    case (i)
      0: return 32'd55;          // 10+9+...+1
      1: return 32'd56;          // reloaded sum + 1
      2: return 32'd77;          // function result
      3: return 32'hFFFF_FFC1;   // -63, low word of -7*9
      4: return 32'hFFFF_FFFF;   // high word of -63
      5: return 32'h1234_5678;
      6: return 32'hFFFF_FFFC;   // -7 >>> 1
      7: return 32'd1;           // -7 < 9 signed
      8: return 32'd0;           // 0xFFFFFFF9 < 9 unsigned is false
      9: return 32'd6;           // 1 + 5, 99 skipped
      default: return '0;
    endcase
  endfunction
endpackage
