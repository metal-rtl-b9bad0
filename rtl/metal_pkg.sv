// metal_pkg: types, encodings and constants shared by the Metal processor.
//
// The processor is a 5-stage RISC pipeline (fetch, decode, execute, memory,
// writeback) that executes a 64-bit RISC-V style integer instruction set and
// adds a Metal mode. The base instruction set, its encodings and all field
// layouts below are this design's choices; the six Metal instructions
// (menter, mexit, rmr, wmr, mld, mst), the 64 mroutine entries and the 32
// Metal registers m0-m31 with m31 holding the return address follow the
// Metal architecture. The TLB write and control register write instructions
// expose the TLB, page keys, address space IDs and instruction interception,
// which the architecture names but does not encode.
//
// All Metal instructions live in the RISC-V custom-0 major opcode (0001011)
// and are told apart by funct3:
//   000 menter  imm[5:0] = mroutine entry number          (I-type)
//   001 mexit                                              (no operands)
//   010 rmr     rd <= m[imm[4:0]]                          (I-type)
//   011 wmr     m[imm[4:0]] <= rs1                         (I-type)
//   100 mld     rd <= MRAM.data[(rs1+imm)>>3]              (I-type)
//   101 mst     MRAM.data[(rs1+imm)>>3] <= rs2             (S-type)
//   110 mcr     control register imm[11:0] <= rs1          (I-type)
//   111 tlbw    TLB[rs1[63:56]] <= {tag rs1, data rs2}     (R-type layout)
package metal_pkg;

  localparam int XLEN = 64;

  // Major opcodes (instr[6:0])
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_METAL  = 7'b0001011;

  // Metal funct3 values
  localparam logic [2:0] MF_MENTER = 3'b000;
  localparam logic [2:0] MF_MEXIT  = 3'b001;
  localparam logic [2:0] MF_RMR    = 3'b010;
  localparam logic [2:0] MF_WMR    = 3'b011;
  localparam logic [2:0] MF_MLD    = 3'b100;
  localparam logic [2:0] MF_MST    = 3'b101;
  localparam logic [2:0] MF_MCR    = 3'b110;
  localparam logic [2:0] MF_TLBW   = 3'b111;

  // Number of mroutine entries and fixed entries used by the hardware
  localparam int MROUTINES      = 64;
  localparam logic [5:0] ENT_INTERRUPT = 6'd63;  // external interrupt
  localparam logic [5:0] ENT_PAGEFAULT = 6'd62;  // TLB miss or page permission fault
  localparam logic [5:0] ENT_ILLEGAL   = 6'd61;  // illegal or Metal-only instruction

  // Metal registers written by hardware on entry to Metal mode
  localparam logic [4:0] MR_RET  = 5'd31;  // return address
  localparam logic [4:0] MR_INFO = 5'd30;  // faulting address / instruction word

  // Control registers (mcr)
  localparam logic [11:0] CR_ASID      = 12'h000;  // current address space ID
  localparam logic [11:0] CR_PKR       = 12'h001;  // page key rights: {WD,AD} per key
  localparam logic [11:0] CR_INTERCEPT = 12'h020;  // 0x020-0x03F: intercept entry per opcode[6:2],
                                                   // value {funct3 skip mask[15:8], enable[6], entry[5:0]}

  // ALU operations
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  // What the memory stage does
  typedef enum logic [2:0] {
    MEM_NONE, MEM_LOAD, MEM_STORE, MEM_MLD, MEM_MST
  } mem_op_e;

  // Where the writeback value comes from
  typedef enum logic [1:0] {
    WB_ALU, WB_MEM, WB_PC4, WB_MREG
  } wb_sel_e;

  // Decoded control word
  typedef struct packed {
    logic        valid_op;    // instruction is known
    logic        metal_only;  // legal only in Metal mode
    logic        uses_rs1;
    logic        uses_rs2;
    logic        reg_write;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [XLEN-1:0] imm;
    alu_op_e     alu_op;
    logic        alu_b_imm;   // ALU operand B is the immediate
    logic        alu_a_pc;    // ALU operand A is the pc
    logic        branch;
    logic [2:0]  br_funct3;
    logic        jal;
    logic        jalr;
    mem_op_e     mem_op;
    logic [2:0]  mem_size;    // funct3 of load/store
    wb_sel_e     wb_sel;
    logic        is_menter;
    logic        is_mexit;
    logic        mreg_read;   // rmr
    logic        mreg_write;  // wmr
    logic [4:0]  mreg_idx;
    logic        cr_write;    // mcr
    logic        tlb_write;   // tlbw
  } ctrl_t;

  // TLB geometry
  localparam int VA_BITS   = 39;
  localparam int PAGE_BITS = 12;
  localparam int VPN_W     = VA_BITS - PAGE_BITS;  // 27
  localparam int PPN_W     = 28;                   // 40-bit physical address
  localparam int ASID_W    = 8;
  localparam int KEY_W     = 4;
  localparam int NKEYS     = 1 << KEY_W;

  typedef struct packed {
    logic              valid;
    logic [ASID_W-1:0] asid;
    logic [VPN_W-1:0]  vpn;
    logic [PPN_W-1:0]  ppn;
    logic [KEY_W-1:0]  key;
    logic              r;
    logic              w;
  } tlb_entry_t;

  // tlbw operand layout
  //   rs1: [26:0] vpn, [39:32] asid, [63:56] entry index
  //   rs2: [27:0] ppn, [35:32] key, [40] read allowed, [41] write allowed, [63] valid
  function automatic tlb_entry_t tlb_pack(input logic [XLEN-1:0] tag, input logic [XLEN-1:0] data);
    tlb_entry_t e;
    e.valid = data[63];
    e.asid  = tag[32 +: ASID_W];
    e.vpn   = tag[VPN_W-1:0];
    e.ppn   = data[PPN_W-1:0];
    e.key   = data[32 +: KEY_W];
    e.r     = data[40];
    e.w     = data[41];
    return e;
  endfunction

endpackage
