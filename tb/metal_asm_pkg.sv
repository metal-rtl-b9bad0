// metal_asm_pkg: instruction encoders used by the testbenches to write
// programs and mroutines for the Metal processor. Each function returns one
// 32-bit instruction word in the encoding described in metal_pkg.
package metal_asm_pkg;
  import metal_pkg::*;

  // register numbers (RISC-V ABI names)
  localparam logic [4:0] ZERO = 0, RA = 1, SP = 2, T0 = 5, T1 = 6, T2 = 7,
                         S0 = 8, S1 = 9, A0 = 10, A1 = 11, A2 = 12, A3 = 13,
                         A4 = 14, A5 = 15, S2 = 18, S3 = 19, S4 = 20, S5 = 21,
                         S6 = 22, S7 = 23, S8 = 24, S9 = 25, S10 = 26, T3 = 28,
                         T4 = 29;

  function automatic logic [31:0] r_type(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] i_type(int imm, logic [4:0] rs1, logic [2:0] f3,
                                         logic [4:0] rd, logic [6:0] opc);
    logic [11:0] i = 12'(imm);
    return {i, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] s_type(int imm, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3, logic [6:0] opc);
    logic [11:0] i = 12'(imm);
    return {i[11:5], rs2, rs1, f3, i[4:0], opc};
  endfunction
  function automatic logic [31:0] b_type(int off, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [12:0] o = 13'(off);
    return {o[12], o[10:5], rs2, rs1, f3, o[4:1], o[11], OP_BRANCH};
  endfunction

  function automatic logic [31:0] addi(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, OP_IMM);
  endfunction
  function automatic logic [31:0] andi(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b111, rd, OP_IMM);
  endfunction
  function automatic logic [31:0] slli(logic [4:0] rd, logic [4:0] rs1, int sh);
    return i_type(sh & 63, rs1, 3'b001, rd, OP_IMM);
  endfunction
  function automatic logic [31:0] srli(logic [4:0] rd, logic [4:0] rs1, int sh);
    return i_type(sh & 63, rs1, 3'b101, rd, OP_IMM);
  endfunction
  function automatic logic [31:0] srai(logic [4:0] rd, logic [4:0] rs1, int sh);
    return i_type('h400 | (sh & 63), rs1, 3'b101, rd, OP_IMM);
  endfunction
  function automatic logic [31:0] or_(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b110, rd, OP_REG);
  endfunction
  function automatic logic [31:0] srl(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b101, rd, OP_REG);
  endfunction
  function automatic logic [31:0] add(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b000, rd, OP_REG);
  endfunction
  function automatic logic [31:0] sub(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0100000, rs2, rs1, 3'b000, rd, OP_REG);
  endfunction
  function automatic logic [31:0] lui(logic [4:0] rd, int imm20);
    return {20'(imm20), rd, OP_LUI};
  endfunction
  function automatic logic [31:0] ld(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b011, rd, OP_LOAD);
  endfunction
  function automatic logic [31:0] lw(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b010, rd, OP_LOAD);
  endfunction
  function automatic logic [31:0] sd(logic [4:0] rs2, logic [4:0] rs1, int imm);
    return s_type(imm, rs2, rs1, 3'b011, OP_STORE);
  endfunction
  function automatic logic [31:0] beq(logic [4:0] rs1, logic [4:0] rs2, int off);
    return b_type(off, rs2, rs1, 3'b000);
  endfunction
  function automatic logic [31:0] bne(logic [4:0] rs1, logic [4:0] rs2, int off);
    return b_type(off, rs2, rs1, 3'b001);
  endfunction
  function automatic logic [31:0] bge(logic [4:0] rs1, logic [4:0] rs2, int off);
    return b_type(off, rs2, rs1, 3'b101);
  endfunction
  function automatic logic [31:0] jal(logic [4:0] rd, int off);
    logic [20:0] o = 21'(off);
    return {o[20], o[10:1], o[11], o[19:12], rd, OP_JAL};
  endfunction
  function automatic logic [31:0] jalr(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, OP_JALR);
  endfunction
  function automatic logic [31:0] nop();
    return addi(ZERO, ZERO, 0);
  endfunction

  // Metal instructions
  function automatic logic [31:0] menter(int entry);
    return i_type(entry & 63, 5'd0, MF_MENTER, 5'd0, OP_METAL);
  endfunction
  function automatic logic [31:0] mexit();
    return i_type(0, 5'd0, MF_MEXIT, 5'd0, OP_METAL);
  endfunction
  function automatic logic [31:0] rmr(logic [4:0] rd, int m);
    return i_type(m & 31, 5'd0, MF_RMR, rd, OP_METAL);
  endfunction
  function automatic logic [31:0] wmr(int m, logic [4:0] rs1);
    return i_type(m & 31, rs1, MF_WMR, 5'd0, OP_METAL);
  endfunction
  function automatic logic [31:0] mld(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, MF_MLD, rd, OP_METAL);
  endfunction
  function automatic logic [31:0] mst(logic [4:0] rs2, logic [4:0] rs1, int imm);
    return s_type(imm, rs2, rs1, MF_MST, OP_METAL);
  endfunction
  function automatic logic [31:0] mcr(int cr, logic [4:0] rs1);
    return i_type(cr, rs1, MF_MCR, 5'd0, OP_METAL);
  endfunction
  function automatic logic [31:0] tlbw(logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, MF_TLBW, 5'd0, OP_METAL);
  endfunction
endpackage
