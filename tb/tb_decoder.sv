// tb_decoder: decodes one instruction of every supported kind and compares
// the interesting control fields with values written out by hand; also
// checks that unknown encodings are flagged and that every Metal
// instruction except menter is marked Metal-only.
module tb_decoder;
  import metal_pkg::*;
  import metal_asm_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] instr;
  ctrl_t c;

  decoder dut (.instr(instr), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s instr=%h got=%h exp=%h", what, instr, got, exp);
    end
  endtask

  task automatic put(logic [31:0] i);
    instr = i; #1;
  endtask

  initial begin
    put(addi(T0, A0, -5));
    chk(c.valid_op, 1, "addi valid"); chk(c.reg_write, 1, "addi we"); chk(c.rd, T0, "addi rd");
    chk(c.rs1, A0, "addi rs1"); chk(c.imm, 64'hffff_ffff_ffff_fffb, "addi imm");
    chk(c.alu_b_imm, 1, "addi bimm"); chk(64'(c.alu_op), 64'(ALU_ADD), "addi op");
    put(sub(T0, A0, A1));
    chk(64'(c.alu_op), 64'(ALU_SUB), "sub op"); chk(c.uses_rs2, 1, "sub rs2"); chk(c.alu_b_imm, 0, "sub bimm");
    put(slli(A0, A0, 3));
    chk(64'(c.alu_op), 64'(ALU_SLL), "slli op"); chk(c.imm[5:0], 3, "slli sh");
    put(ld(T0, T0, 16));
    chk(64'(c.mem_op), 64'(MEM_LOAD), "ld mem"); chk(c.mem_size, 3, "ld size");
    chk(64'(c.wb_sel), 64'(WB_MEM), "ld wb"); chk(c.imm, 16, "ld imm");
    put(sd(A1, SP, -8));
    chk(64'(c.mem_op), 64'(MEM_STORE), "sd mem"); chk(c.reg_write, 0, "sd we");
    chk(c.imm, 64'hffff_ffff_ffff_fff8, "sd imm"); chk(c.rs2, A1, "sd rs2");
    put(beq(A0, A1, -12));
    chk(c.branch, 1, "beq br"); chk(c.imm, 64'hffff_ffff_ffff_fff4, "beq imm"); chk(c.reg_write, 0, "beq we");
    put(jal(RA, 2048));
    chk(c.jal, 1, "jal"); chk(c.imm, 2048, "jal imm"); chk(64'(c.wb_sel), 64'(WB_PC4), "jal wb");
    put(jalr(ZERO, RA, 4));
    chk(c.jalr, 1, "jalr"); chk(c.imm, 4, "jalr imm");
    put(lui(T0, 20'h12345));
    chk(c.imm, 64'h0000_0000_1234_5000, "lui imm"); chk(64'(c.alu_op), 64'(ALU_PASSB), "lui op");
    put(menter(5));
    chk(c.is_menter, 1, "menter"); chk(c.metal_only, 0, "menter mo"); chk(c.imm[5:0], 5, "menter entry");
    put(mexit());
    chk(c.is_mexit, 1, "mexit"); chk(c.metal_only, 1, "mexit mo");
    put(rmr(RA, 31));
    chk(c.mreg_read, 1, "rmr"); chk(c.mreg_idx, 31, "rmr idx"); chk(c.rd, RA, "rmr rd");
    chk(64'(c.wb_sel), 64'(WB_MREG), "rmr wb"); chk(c.metal_only, 1, "rmr mo");
    put(wmr(0, T0));
    chk(c.mreg_write, 1, "wmr"); chk(c.mreg_idx, 0, "wmr idx"); chk(c.rs1, T0, "wmr rs1");
    chk(c.reg_write, 0, "wmr we");
    put(mld(T0, T1, 24));
    chk(64'(c.mem_op), 64'(MEM_MLD), "mld"); chk(c.imm, 24, "mld imm"); chk(c.reg_write, 1, "mld we");
    put(mst(T0, T1, 8));
    chk(64'(c.mem_op), 64'(MEM_MST), "mst"); chk(c.imm, 8, "mst imm"); chk(c.metal_only, 1, "mst mo");
    put(mcr(1, T0));
    chk(c.cr_write, 1, "mcr"); chk(c.imm[11:0], 1, "mcr addr");
    put(tlbw(T0, T1));
    chk(c.tlb_write, 1, "tlbw"); chk(c.metal_only, 1, "tlbw mo");
    put(32'h0000_007f);
    chk(c.valid_op, 0, "unknown"); chk(c.reg_write, 0, "unknown we");
    put(32'h0200_0033);  // funct7 = 1 (multiply), not supported
    chk(c.valid_op, 0, "mul"); 
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
