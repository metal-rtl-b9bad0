// decoder: turns one 32-bit instruction into the pipeline's control word.
//
// Decodes the integer base set (lui, auipc, jal, jalr, branches, loads and
// stores of 1/2/4/8 bytes, register-immediate and register-register ALU
// operations) and the Metal instructions in the custom-0 opcode (see
// metal_pkg). Unknown encodings leave valid_op low; Metal instructions other
// than menter set metal_only, as the Metal architecture makes them available
// only in Metal mode. The pipeline, not the decoder, decides what an illegal
// or out-of-mode instruction does. Combinational. The host instruction set
// and its encoding are this design's choice.
module decoder
  import metal_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       c
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [XLEN-1:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];
  assign imm_i = {{(XLEN-12){instr[31]}}, instr[31:20]};
  assign imm_s = {{(XLEN-12){instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b = {{(XLEN-13){instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u = {{(XLEN-32){instr[31]}}, instr[31:12], 12'b0};
  assign imm_j = {{(XLEN-21){instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  always_comb begin
    c = '0;
    c.rd        = instr[11:7];
    c.rs1       = instr[19:15];
    c.rs2       = instr[24:20];
    c.mem_size  = f3;
    c.br_funct3 = f3;
    c.alu_op    = ALU_ADD;
    c.mem_op    = MEM_NONE;
    c.wb_sel    = WB_ALU;
    c.mreg_idx  = instr[24:20];
    unique case (opc)
      OP_LUI: begin
        c.valid_op = 1'b1; c.reg_write = 1'b1; c.imm = imm_u;
        c.alu_op = ALU_PASSB; c.alu_b_imm = 1'b1;
      end
      OP_AUIPC: begin
        c.valid_op = 1'b1; c.reg_write = 1'b1; c.imm = imm_u;
        c.alu_a_pc = 1'b1; c.alu_b_imm = 1'b1;
      end
      OP_JAL: begin
        c.valid_op = 1'b1; c.reg_write = 1'b1; c.imm = imm_j;
        c.jal = 1'b1; c.wb_sel = WB_PC4;
      end
      OP_JALR: begin
        c.valid_op = (f3 == 3'b000); c.reg_write = 1'b1; c.imm = imm_i;
        c.jalr = 1'b1; c.uses_rs1 = 1'b1; c.wb_sel = WB_PC4;
      end
      OP_BRANCH: begin
        c.valid_op = (f3 != 3'b010 && f3 != 3'b011); c.imm = imm_b;
        c.branch = 1'b1; c.uses_rs1 = 1'b1; c.uses_rs2 = 1'b1;
      end
      OP_LOAD: begin
        c.valid_op = (f3 != 3'b111); c.reg_write = 1'b1; c.imm = imm_i;
        c.uses_rs1 = 1'b1; c.alu_b_imm = 1'b1; c.mem_op = MEM_LOAD; c.wb_sel = WB_MEM;
      end
      OP_STORE: begin
        c.valid_op = (f3[2] == 1'b0); c.imm = imm_s;
        c.uses_rs1 = 1'b1; c.uses_rs2 = 1'b1; c.alu_b_imm = 1'b1; c.mem_op = MEM_STORE;
      end
      OP_IMM: begin
        c.valid_op = 1'b1; c.reg_write = 1'b1; c.imm = imm_i;
        c.uses_rs1 = 1'b1; c.alu_b_imm = 1'b1;
        unique case (f3)
          3'b000: c.alu_op = ALU_ADD;
          3'b001: begin c.alu_op = ALU_SLL; c.valid_op = (instr[31:26] == 6'b0); end
          3'b010: c.alu_op = ALU_SLT;
          3'b011: c.alu_op = ALU_SLTU;
          3'b100: c.alu_op = ALU_XOR;
          3'b101: begin
            c.alu_op   = instr[30] ? ALU_SRA : ALU_SRL;
            c.valid_op = (instr[31] == 1'b0 && instr[29:26] == 4'b0);
          end
          3'b110: c.alu_op = ALU_OR;
          default: c.alu_op = ALU_AND;
        endcase
      end
      OP_REG: begin
        c.reg_write = 1'b1; c.uses_rs1 = 1'b1; c.uses_rs2 = 1'b1;
        c.valid_op  = (f7 == 7'b0) || (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101));
        unique case (f3)
          3'b000: c.alu_op = f7[5] ? ALU_SUB : ALU_ADD;
          3'b001: c.alu_op = ALU_SLL;
          3'b010: c.alu_op = ALU_SLT;
          3'b011: c.alu_op = ALU_SLTU;
          3'b100: c.alu_op = ALU_XOR;
          3'b101: c.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
          3'b110: c.alu_op = ALU_OR;
          default: c.alu_op = ALU_AND;
        endcase
      end
      OP_METAL: begin
        c.valid_op   = 1'b1;
        c.metal_only = (f3 != MF_MENTER);
        c.imm        = imm_i;
        unique case (f3)
          MF_MENTER: c.is_menter = 1'b1;
          MF_MEXIT:  c.is_mexit  = 1'b1;
          MF_RMR: begin
            c.mreg_read = 1'b1; c.reg_write = 1'b1; c.wb_sel = WB_MREG;
            c.mreg_idx  = instr[24:20];
          end
          MF_WMR: begin
            c.mreg_write = 1'b1; c.uses_rs1 = 1'b1; c.mreg_idx = instr[24:20];
          end
          MF_MLD: begin
            c.reg_write = 1'b1; c.uses_rs1 = 1'b1; c.alu_b_imm = 1'b1;
            c.mem_op = MEM_MLD; c.wb_sel = WB_MEM; c.mem_size = 3'b011;
          end
          MF_MST: begin
            c.imm = imm_s; c.uses_rs1 = 1'b1; c.uses_rs2 = 1'b1; c.alu_b_imm = 1'b1;
            c.mem_op = MEM_MST; c.mem_size = 3'b011;
          end
          MF_MCR: begin
            c.cr_write = 1'b1; c.uses_rs1 = 1'b1;
          end
          default: begin
            c.tlb_write = 1'b1; c.uses_rs1 = 1'b1; c.uses_rs2 = 1'b1;
          end
        endcase
      end
      default: c.valid_op = 1'b0;
    endcase
    if (!c.valid_op) begin
      c.reg_write = 1'b0;
      c.mem_op    = MEM_NONE;
    end
  end
endmodule
