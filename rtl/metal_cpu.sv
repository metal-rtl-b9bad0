// metal_cpu: a 5-stage pipelined RISC processor with the Metal extension.
//
// Metal lets software add instructions. Code in a small on-chip RAM next to
// the fetch unit (MRAM) is organised as up to 64 mroutines; a program calls
// one with `menter <n>` and the processor switches to Metal mode, in which
// the Metal-only instructions (rmr/wmr on the 32 Metal registers, mld/mst on
// the MRAM data segment, mcr on control registers, tlbw on the TLB) are
// legal, data accesses bypass the TLB and interrupts are held off. mexit
// returns to the address held in Metal register m31.
//
// Pipeline: fetch (F), decode (D), execute (E), memory (M), writeback (W).
//  * Fetch reads main memory in normal mode and the MRAM code segment in
//    Metal mode. A predecoder looks at the fetched word: for menter, or for
//    an instruction the interception table selects, the next fetch goes to
//    the second instruction of the target mroutine, and in decode the
//    instruction itself is replaced by the mroutine's first instruction
//    (read through a second MRAM port), so entering costs no cycle. The
//    replacing instruction carries a "link" that writes m31 = pc+4 (and, for
//    an interception, m30 = the intercepted instruction word) when it
//    executes.
//  * For mexit, fetch stalls for one cycle; while mexit is in decode the
//    fetch port reads the instruction at m31 in normal mode, and mexit leaves
//    a single bubble. m31 is forwarded from a wmr or link in execute.
//  * Metal registers and control registers are read and written in execute,
//    in program order, so Metal instructions need no hazard logic among
//    themselves. GPR results are forwarded from M and W into E; a load or
//    mld followed by a dependent instruction stalls decode one cycle.
//    Branches and jumps resolve in E and flush F and D.
//  * Exceptions and interrupts are delivered to fixed mroutines from the
//    memory stage (precise): illegal or Metal-only instruction in normal
//    mode -> entry 61 (m30 = instruction word), TLB miss or page key /
//    permission fault -> entry 62 (m30 = virtual address), interrupt -> entry
//    63 (m30 = 0). m31 gets the pc of the instruction in M, which has not
//    taken effect, so mexit re-executes it. Interrupts are taken only when
//    the instruction in M runs in normal mode. In Metal mode an illegal
//    instruction does nothing.
//
// Interfaces. Instruction memory: imem_addr out, imem_rdata in the same
// cycle. Data memory: 64-bit words, dmem_addr (physical byte address),
// dmem_be byte enables, dmem_rdata in the same cycle, writes take effect at
// the clock edge. Accesses must be naturally aligned. irq is a level
// request; irq_ack pulses for one cycle when it is taken. The mram_load_*
// ports fill the MRAM before or while reset is held.
//
// From the Metal architecture: Metal mode, the six instructions of its
// instruction table, 64 mroutines in MRAM split into code and data, 32
// Metal registers with the return address in m31, replacement of menter in
// decode and a fetch stall for mexit, direct physical access, TLB with page
// keys and ASIDs, delivery of all exceptions and interrupts to mroutines,
// interception of any instruction and non-interruptible mroutines. This
// design's own choices: the RISC-V style base instruction set and all
// encodings, the entry numbers of the exception mroutines, the use of m30,
// the control register map, the sizes, and the memory interfaces.
module metal_cpu
  import metal_pkg::*;
#(
  parameter int              SLOT_WORDS  = 32,
  parameter int              DATA_WORDS  = 512,
  parameter int              TLB_ENTRIES = 16,
  parameter logic [XLEN-1:0] RESET_PC    = '0,
  localparam int CODE_WORDS = MROUTINES * SLOT_WORDS,
  localparam int CA = $clog2(CODE_WORDS),
  localparam int DA = $clog2(DATA_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction memory
  output logic [XLEN-1:0] imem_addr,
  input  logic [31:0]     imem_rdata,
  // data memory
  output logic            dmem_req,
  output logic            dmem_we,
  output logic [7:0]      dmem_be,
  output logic [XLEN-1:0] dmem_addr,
  output logic [XLEN-1:0] dmem_wdata,
  input  logic [XLEN-1:0] dmem_rdata,
  // interrupt
  input  logic            irq,
  output logic            irq_ack,
  // MRAM boot load
  input  logic            mram_load_code_we,
  input  logic [CA-1:0]   mram_load_code_addr,
  input  logic [31:0]     mram_load_code_data,
  input  logic            mram_load_data_we,
  input  logic [DA-1:0]   mram_load_data_addr,
  input  logic [XLEN-1:0] mram_load_data_data,
  // status
  output logic            retire,       // an instruction completed this cycle
  output logic            retire_metal  // ... and it ran in Metal mode
);

  function automatic logic [XLEN-1:0] entry_base(input logic [5:0] e);
    return XLEN'(e) * XLEN'(SLOT_WORDS * 4);
  endfunction

  // ---------------------------------------------------------------------
  // Pipeline registers
  // ---------------------------------------------------------------------
  // F
  logic [XLEN-1:0] pc_f;
  logic            metal_f;
  // D
  logic            d_valid;
  logic [XLEN-1:0] d_pc;
  logic [31:0]     d_instr;
  logic            d_metal;
  logic            d_enter;      // menter or intercepted instruction
  logic            d_intercept;
  logic [5:0]      d_entry;
  // E
  logic            e_valid;
  logic [XLEN-1:0] e_pc;
  logic [31:0]     e_instr;
  ctrl_t           e_c;
  logic [XLEN-1:0] e_rs1v, e_rs2v;
  logic            e_metal;
  logic            e_illegal;
  logic            e_link;
  logic [XLEN-1:0] e_link_ret;
  logic            e_link_info_we;
  logic [XLEN-1:0] e_link_info;
  // M
  logic            m_valid;
  logic [XLEN-1:0] m_pc;
  logic [31:0]     m_instr;
  ctrl_t           m_c;
  logic [XLEN-1:0] m_result;
  logic [XLEN-1:0] m_sdata;
  logic            m_metal;
  logic            m_illegal;
  // W
  logic            w_valid;
  logic            w_we;
  logic [4:0]      w_rd;
  logic [XLEN-1:0] w_val;
  logic            w_metal;

  // control registers
  logic [ASID_W-1:0]  cr_asid;
  logic [2*NKEYS-1:0] cr_pkr;

  // global control
  logic            trap;
  logic [5:0]      trap_entry;
  logic [XLEN-1:0] trap_info;
  logic            br_taken;
  logic [XLEN-1:0] br_target;
  logic            stall;

  // ---------------------------------------------------------------------
  // Shared blocks
  // ---------------------------------------------------------------------
  logic [31:0]     mram_fetch_instr, mram_entry_instr;
  logic [XLEN-1:0] mram_data_rdata;
  logic            mram_data_we;
  logic [XLEN-1:0] f_addr;

  mram #(
    .MROUTINES (MROUTINES),
    .SLOT_WORDS(SLOT_WORDS),
    .DATA_WORDS(DATA_WORDS)
  ) u_mram (
    .clk           (clk),
    .fetch_addr    (f_addr[CA+1:0]),
    .fetch_instr   (mram_fetch_instr),
    .entry         (d_entry),
    .entry_instr   (mram_entry_instr),
    .data_addr     (m_result[DA+2:0]),
    .data_rdata    (mram_data_rdata),
    .data_we       (mram_data_we),
    .data_wdata    (m_sdata),
    .load_code_we  (mram_load_code_we),
    .load_code_addr(mram_load_code_addr),
    .load_code_data(mram_load_code_data),
    .load_data_we  (mram_load_data_we),
    .load_data_addr(mram_load_data_addr),
    .load_data_data(mram_load_data_data)
  );

  logic [XLEN-1:0] mr_rdata, mr_ret;
  logic            mr_we;
  logic            mr_entry_we, mr_entry_info_we;
  logic [XLEN-1:0] mr_entry_ret, mr_entry_info;
  logic [XLEN-1:0] e_rs1f, e_rs2f;

  mreg u_mreg (
    .clk          (clk),
    .rst_n        (rst_n),
    .raddr        (e_c.mreg_idx),
    .rdata        (mr_rdata),
    .ret_addr     (mr_ret),
    .we           (mr_we),
    .waddr        (e_c.mreg_idx),
    .wdata        (e_rs1f),
    .entry_we     (mr_entry_we),
    .entry_ret    (mr_entry_ret),
    .entry_info_we(mr_entry_info_we),
    .entry_info   (mr_entry_info)
  );

  // ---------------------------------------------------------------------
  // Fetch
  // ---------------------------------------------------------------------
  logic            id_mexit;
  logic [XLEN-1:0] m31_fwd;
  logic            f_metal;
  logic [31:0]     f_instr;
  logic            pd_menter, pd_mexit, pd_enter;
  logic            ic_hit;
  logic [5:0]      ic_entry, pd_entry;
  logic            ic_we;
  logic [11:0]     cr_addr;

  // while mexit sits in decode, the fetch port reads the return instruction
  assign f_addr    = id_mexit ? m31_fwd : pc_f;
  assign f_metal   = id_mexit ? 1'b0 : metal_f;
  assign imem_addr = f_addr;
  assign f_instr   = f_metal ? mram_fetch_instr : imem_rdata;

  intercept_table u_icept (
    .clk       (clk),
    .rst_n     (rst_n),
    .instr     (f_instr),
    .metal_mode(f_metal),
    .hit       (ic_hit),
    .entry     (ic_entry),
    .we        (ic_we),
    .widx      (cr_addr[4:0]),
    .wen       (e_rs1f[6]),
    .wentry    (e_rs1f[5:0]),
    .wskip     (e_rs1f[15:8])
  );

  assign pd_menter = !f_metal && f_instr[6:0] == OP_METAL && f_instr[14:12] == MF_MENTER;
  assign pd_mexit  =  f_metal && f_instr[6:0] == OP_METAL && f_instr[14:12] == MF_MEXIT;
  assign pd_enter  = pd_menter || ic_hit;
  assign pd_entry  = pd_menter ? f_instr[25:20] : ic_entry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f    <= RESET_PC;
      metal_f <= 1'b0;
    end else if (trap) begin
      pc_f    <= entry_base(trap_entry);
      metal_f <= 1'b1;
    end else if (br_taken) begin
      pc_f    <= br_target;
      metal_f <= e_metal;
    end else if (stall) begin
      pc_f    <= pc_f;
    end else if (pd_enter) begin
      pc_f    <= entry_base(pd_entry) + XLEN'(4);
      metal_f <= 1'b1;
    end else if (pd_mexit) begin
      pc_f    <= pc_f;  // fetch stalls; decode redirects it to m31
    end else begin
      pc_f    <= f_addr + XLEN'(4);
      metal_f <= f_metal;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid     <= 1'b0;
      d_pc        <= '0;
      d_instr     <= '0;
      d_metal     <= 1'b0;
      d_enter     <= 1'b0;
      d_intercept <= 1'b0;
      d_entry     <= '0;
    end else if (trap || br_taken) begin
      d_valid     <= 1'b0;
      d_enter     <= 1'b0;
    end else if (!stall) begin
      d_valid     <= 1'b1;
      d_pc        <= f_addr;
      d_instr     <= f_instr;
      d_metal     <= f_metal;
      d_enter     <= pd_enter;
      d_intercept <= ic_hit && !pd_menter;
      d_entry     <= pd_entry;
    end
  end

  // ---------------------------------------------------------------------
  // Decode
  // ---------------------------------------------------------------------
  logic [31:0]     id_instr;
  logic [XLEN-1:0] id_pc;
  logic            id_metal;
  ctrl_t           id_c_raw, id_c;
  logic            id_illegal;
  logic [XLEN-1:0] id_rs1v, id_rs2v;

  assign id_mexit = d_valid && !d_enter && d_metal &&
                    d_instr[6:0] == OP_METAL && d_instr[14:12] == MF_MEXIT;

  // menter / interception: replace the instruction by the mroutine's first one
  always_comb begin
    if (d_enter) begin
      id_instr = mram_entry_instr;
      id_pc    = entry_base(d_entry);
      id_metal = 1'b1;
    end else begin
      id_instr = d_instr;
      id_pc    = d_pc;
      id_metal = d_metal;
    end
  end

  decoder u_dec (.instr(id_instr), .c(id_c_raw));

  // menter inside an mroutine and Metal-only instructions in normal mode are
  // illegal; mexit is consumed here and never travels further
  assign id_illegal = !id_c_raw.valid_op || (id_c_raw.metal_only && !id_metal) ||
                      id_c_raw.is_menter || id_mexit;
  always_comb begin
    id_c = id_c_raw;
    if (id_illegal) id_c = '0;
  end

  regfile u_rf (
    .clk  (clk),
    .rst_n(rst_n),
    .ra1  (id_c_raw.rs1),
    .ra2  (id_c_raw.rs2),
    .rd1  (id_rs1v),
    .rd2  (id_rs2v),
    .we   (w_valid && w_we),
    .wa   (w_rd),
    .wd   (w_val)
  );

  // load-use hazard on a load or mld in execute
  logic e_is_load;
  assign e_is_load = e_valid && (e_c.mem_op == MEM_LOAD || e_c.mem_op == MEM_MLD) &&
                     e_c.reg_write && e_c.rd != '0;
  assign stall = d_valid && e_is_load &&
                 ((id_c.uses_rs1 && id_c.rs1 == e_c.rd) ||
                  (id_c.uses_rs2 && id_c.rs2 == e_c.rd));

  // m31 as seen by mexit in decode: a wmr or link in execute is newer
  always_comb begin
    if (e_valid && e_c.mreg_write && e_c.mreg_idx == MR_RET) m31_fwd = e_rs1f;
    else if (e_valid && e_link)                              m31_fwd = e_link_ret;
    else                                                     m31_fwd = mr_ret;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid        <= 1'b0;
      e_pc           <= '0;
      e_instr        <= '0;
      e_c            <= '0;
      e_rs1v         <= '0;
      e_rs2v         <= '0;
      e_metal        <= 1'b0;
      e_illegal      <= 1'b0;
      e_link         <= 1'b0;
      e_link_ret     <= '0;
      e_link_info_we <= 1'b0;
      e_link_info    <= '0;
    end else if (trap || br_taken || stall || !d_valid || id_mexit) begin
      e_valid        <= 1'b0;
      e_c            <= '0;
      e_illegal      <= 1'b0;
      e_link         <= 1'b0;
    end else begin
      e_valid        <= 1'b1;
      e_pc           <= id_pc;
      e_instr        <= id_instr;
      e_c            <= id_c;
      e_rs1v         <= id_rs1v;
      e_rs2v         <= id_rs2v;
      e_metal        <= id_metal;
      e_illegal      <= id_illegal && !id_metal;
      e_link         <= d_enter;
      e_link_ret     <= d_pc + XLEN'(4);
      e_link_info_we <= d_intercept;
      e_link_info    <= XLEN'(d_instr);
    end
  end

  // ---------------------------------------------------------------------
  // Execute
  // ---------------------------------------------------------------------
  logic [XLEN-1:0] m_fwd_val;
  logic [XLEN-1:0] alu_a, alu_b, alu_y;
  logic [XLEN-1:0] rmr_val, e_result;
  logic            br_cond;
  logic            e_act;

  // forwarding from M (not a load: those stall) and W
  always_comb begin
    e_rs1f = e_rs1v;
    e_rs2f = e_rs2v;
    if (e_c.rs1 != '0) begin
      if (m_valid && m_c.reg_write && m_c.rd == e_c.rs1)      e_rs1f = m_fwd_val;
      else if (w_valid && w_we && w_rd == e_c.rs1)            e_rs1f = w_val;
    end
    if (e_c.rs2 != '0) begin
      if (m_valid && m_c.reg_write && m_c.rd == e_c.rs2)      e_rs2f = m_fwd_val;
      else if (w_valid && w_we && w_rd == e_c.rs2)            e_rs2f = w_val;
    end
  end

  assign alu_a = e_c.alu_a_pc ? e_pc : e_rs1f;
  assign alu_b = e_c.alu_b_imm ? e_c.imm : e_rs2f;

  alu u_alu (.op(e_c.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  always_comb begin
    unique case (e_c.br_funct3)
      3'b000:  br_cond = (e_rs1f == e_rs2f);
      3'b001:  br_cond = (e_rs1f != e_rs2f);
      3'b100:  br_cond = ($signed(e_rs1f) <  $signed(e_rs2f));
      3'b101:  br_cond = ($signed(e_rs1f) >= $signed(e_rs2f));
      3'b110:  br_cond = (e_rs1f <  e_rs2f);
      default: br_cond = (e_rs1f >= e_rs2f);
    endcase
  end

  assign br_taken  = e_valid && !trap && (e_c.jal || e_c.jalr || (e_c.branch && br_cond));
  assign br_target = e_c.jalr ? ((e_rs1f + e_c.imm) & ~XLEN'(1)) : (e_pc + e_c.imm);

  // the link of the first mroutine instruction happens before the instruction
  always_comb begin
    if (e_link && e_c.mreg_idx == MR_RET)                        rmr_val = e_link_ret;
    else if (e_link && e_link_info_we && e_c.mreg_idx == MR_INFO) rmr_val = e_link_info;
    else                                                          rmr_val = mr_rdata;
  end

  always_comb begin
    unique case (e_c.wb_sel)
      WB_PC4:  e_result = e_pc + XLEN'(4);
      WB_MREG: e_result = rmr_val;
      default: e_result = alu_y;
    endcase
  end

  // Metal side effects happen here unless an older instruction traps
  assign e_act   = e_valid && !trap;
  assign mr_we   = e_act && e_c.mreg_write;
  assign cr_addr = e_c.imm[11:0];
  assign ic_we   = e_act && e_c.cr_write && cr_addr[11:5] == CR_INTERCEPT[11:5];

  always_comb begin
    if (trap) begin
      mr_entry_we      = 1'b1;
      mr_entry_ret     = m_pc;
      mr_entry_info_we = 1'b1;
      mr_entry_info    = trap_info;
    end else begin
      mr_entry_we      = e_valid && e_link;
      mr_entry_ret     = e_link_ret;
      mr_entry_info_we = e_link_info_we;
      mr_entry_info    = e_link_info;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr_asid <= '0;
      cr_pkr  <= '0;
    end else if (e_act && e_c.cr_write) begin
      if (cr_addr == CR_ASID) cr_asid <= e_rs1f[ASID_W-1:0];
      if (cr_addr == CR_PKR)  cr_pkr  <= e_rs1f[2*NKEYS-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid   <= 1'b0;
      m_pc      <= '0;
      m_instr   <= '0;
      m_c       <= '0;
      m_result  <= '0;
      m_sdata   <= '0;
      m_metal   <= 1'b0;
      m_illegal <= 1'b0;
    end else if (trap || !e_valid) begin
      m_valid   <= 1'b0;
      m_c       <= '0;
      m_illegal <= 1'b0;
    end else begin
      m_valid   <= 1'b1;
      m_pc      <= e_pc;
      m_instr   <= e_instr;
      m_c       <= e_c;
      m_result  <= e_result;
      m_sdata   <= e_rs2f;
      m_metal   <= e_metal;
      m_illegal <= e_illegal;
    end
  end

  // ---------------------------------------------------------------------
  // Memory
  // ---------------------------------------------------------------------
  logic            tlb_req, tlb_fault;
  logic [XLEN-1:0] paddr;
  logic [XLEN-1:0] ld_raw, ld_val;
  logic [5:0]      boff;
  logic            take_irq;

  assign tlb_req = m_valid && (m_c.mem_op == MEM_LOAD || m_c.mem_op == MEM_STORE);

  tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (tlb_req),
    .is_store  (m_c.mem_op == MEM_STORE),
    .metal_mode(m_metal),
    .vaddr     (m_result),
    .asid      (cr_asid),
    .pkr       (cr_pkr),
    .paddr     (paddr),
    .fault     (tlb_fault),
    .we        (e_act && e_c.tlb_write),
    .widx      (e_rs1f[56 +: $clog2(TLB_ENTRIES)]),
    .wentry    (tlb_pack(e_rs1f, e_rs2f))
  );

  // exceptions and interrupts, taken in M (never in Metal mode)
  assign take_irq = irq && m_valid && !m_metal && !m_illegal && !tlb_fault;
  assign trap     = m_valid && !m_metal && (m_illegal || tlb_fault || irq);
  assign irq_ack  = take_irq;
  always_comb begin
    if (m_illegal) begin
      trap_entry = ENT_ILLEGAL;
      trap_info  = XLEN'(m_instr);
    end else if (tlb_fault) begin
      trap_entry = ENT_PAGEFAULT;
      trap_info  = m_result;
    end else begin
      trap_entry = ENT_INTERRUPT;
      trap_info  = '0;
    end
  end

  assign boff       = {paddr[2:0], 3'b000};
  assign dmem_req   = tlb_req && !trap;
  assign dmem_we    = dmem_req && m_c.mem_op == MEM_STORE;
  assign dmem_addr  = paddr;
  assign dmem_wdata = m_sdata << boff;
  always_comb begin
    unique case (m_c.mem_size[1:0])
      2'b00:   dmem_be = 8'h01 << paddr[2:0];
      2'b01:   dmem_be = 8'h03 << paddr[2:0];
      2'b10:   dmem_be = 8'h0f << paddr[2:0];
      default: dmem_be = 8'hff;
    endcase
  end

  assign ld_raw = dmem_rdata >> boff;
  always_comb begin
    unique case (m_c.mem_size)
      3'b000:  ld_val = {{(XLEN-8){ld_raw[7]}},   ld_raw[7:0]};
      3'b001:  ld_val = {{(XLEN-16){ld_raw[15]}}, ld_raw[15:0]};
      3'b010:  ld_val = {{(XLEN-32){ld_raw[31]}}, ld_raw[31:0]};
      3'b100:  ld_val = XLEN'(ld_raw[7:0]);
      3'b101:  ld_val = XLEN'(ld_raw[15:0]);
      3'b110:  ld_val = XLEN'(ld_raw[31:0]);
      default: ld_val = ld_raw;
    endcase
  end

  assign mram_data_we = m_valid && m_c.mem_op == MEM_MST;

  always_comb begin
    unique case (m_c.mem_op)
      MEM_LOAD: m_fwd_val = ld_val;
      MEM_MLD:  m_fwd_val = mram_data_rdata;
      default:  m_fwd_val = m_result;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_valid <= 1'b0;
      w_we    <= 1'b0;
      w_rd    <= '0;
      w_val   <= '0;
      w_metal <= 1'b0;
    end else begin
      w_valid <= m_valid && !trap;
      w_we    <= m_c.reg_write && m_c.rd != '0;
      w_rd    <= m_c.rd;
      w_val   <= m_fwd_val;
      w_metal <= m_metal;
    end
  end

  // ---------------------------------------------------------------------
  // Writeback
  // ---------------------------------------------------------------------
  assign retire       = w_valid;
  assign retire_metal = w_valid && w_metal;

  // an mroutine is never interrupted and never traps
  a_no_trap_in_metal: assert property (@(posedge clk) disable iff (!rst_n)
    trap |-> !m_metal);
  // fetch is never redirected by predecode while the pipeline is stalled
  a_stall_holds_pc: assert property (@(posedge clk) disable iff (!rst_n)
    (stall && !trap && !br_taken) |=> $stable(pc_f));

endmodule
