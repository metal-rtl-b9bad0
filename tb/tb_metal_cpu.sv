// tb_metal_cpu: end-to-end test of the Metal processor at its default sizes.
//
// A behavioural main memory (64 KiB, combinational reads) serves both the
// instruction and the data port. Before reset is released the testbench
// fills main memory with a user program, a syscall table and two page
// tables, and loads a set of mroutines into MRAM through the boot port:
//   1 kenter   system call entry (sets privilege m0, jumps through the table)
//   2 kexit    system call exit (clears m0, returns to the saved address)
//   3 tstart   turns on interception of the load opcode class (-> 5),
//              except lw (funct3 010 in the skip mask)
//   4 tcommit  turns interception off again
//   5 tread    intercepted load: logs the instruction word, counts, skips it
//   6 keyprot  write-disables page key 1
//   7 setasid  sets the address space ID (and a copy in m1)
//   8 halt     writes a done flag to physical memory and spins
//  61 illegal  counts and skips the faulting instruction
//  62 pagefault software TLB refill from a linear page table per ASID; a
//             second fault at the same address is a protection fault that
//             is counted and skipped
//  63 irq      counts interrupts
// The user program makes system calls in a loop, stores and loads through
// the TLB (misses, ASID switch, page key write-disable), executes a
// Metal-only instruction in normal mode, brackets a load with interception,
// and runs a loop during which the testbench raises an interrupt. The
// testbench then checks registers, memory and MRAM data against values
// worked out by hand, checks that menter costs no cycle and mexit one, and
// counts how often each pipeline mechanism occurred.
module tb_metal_cpu;
  import metal_pkg::*;
  import metal_asm_pkg::*;

  localparam int MEMW = 8192;   // 64-bit words of main memory
  localparam int SLOT = 32;     // default mroutine slot size

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [63:0] mem [MEMW];

  logic [63:0] imem_addr, dmem_addr, dmem_wdata, dmem_rdata;
  logic [31:0] imem_rdata;
  logic        dmem_req, dmem_we, irq, irq_ack, retire, retire_metal;
  logic [7:0]  dmem_be;
  logic        lc_we, ld_we;
  logic [10:0] lc_addr;
  logic [31:0] lc_data;
  logic [8:0]  ldd_addr;
  logic [63:0] ldd_data;

  metal_cpu dut (
    .clk, .rst_n,
    .imem_addr, .imem_rdata,
    .dmem_req, .dmem_we, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .irq, .irq_ack,
    .mram_load_code_we(lc_we), .mram_load_code_addr(lc_addr), .mram_load_code_data(lc_data),
    .mram_load_data_we(ld_we), .mram_load_data_addr(ldd_addr), .mram_load_data_data(ldd_data),
    .retire, .retire_metal
  );

  // main memory model
  wire [63:0] iword = mem[imem_addr[15:3]];
  assign imem_rdata = imem_addr[2] ? iword[63:32] : iword[31:0];
  assign dmem_rdata = mem[dmem_addr[15:3]];
  always_ff @(posedge clk) begin
    if (dmem_req && dmem_we)
      for (int b = 0; b < 8; b++)
        if (dmem_be[b]) mem[dmem_addr[15:3]][8*b +: 8] <= dmem_wdata[8*b +: 8];
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------------
  // program images
  // ---------------------------------------------------------------------
  function automatic void put_instr(int addr, logic [31:0] w);
    if (addr % 8 == 0) mem[addr / 8][31:0]  = w;
    else               mem[addr / 8][63:32] = w;
  endfunction

  logic [31:0] code [64][SLOT];
  int          code_len [64];

  function automatic void emit(int e, logic [31:0] w);
    if (code_len[e] >= SLOT) $fatal(1, "mroutine %0d too long", e);
    code[e][code_len[e]] = w;
    code_len[e]++;
  endfunction

  // MRAM data segment layout (byte offsets)
  localparam int SV_T0 = 'h00, SV_T1 = 'h08, SV_T2 = 'h10, LASTVA = 'h18,
                 N_PROT = 'h20, N_IRQ = 'h28, N_ILL = 'h30, N_ICPT = 'h38,
                 ICPT_LOG = 'h40, N_REFILL = 'h48;

  logic [31:0] ld_s7;

  function automatic int slot_off(int from_e, int from_i, int to_e, int to_i);
    return (to_e * SLOT + to_i) * 4 - (from_e * SLOT + from_i) * 4;
  endfunction

  int user_pc [string];

  initial begin : build
    int p;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    for (int e = 0; e < 64; e++) code_len[e] = 0;

    // user program
    p = 0;
    put_instr(p, addi(S2, ZERO, 3));       p += 4;
    user_pc["loop"] = p;
    put_instr(p, addi(A0, ZERO, 2));       p += 4;  // system call number 2
    user_pc["menter"] = p;
    put_instr(p, menter(1));               p += 4;
    user_pc["ret"] = p;
    put_instr(p, addi(S1, S1, 1));         p += 4;
    put_instr(p, addi(S2, S2, -1));        p += 4;
    put_instr(p, bne(S2, ZERO, -16));      p += 4;
    put_instr(p, lui(A2, 'h10));           p += 4;  // a2 = 0x10000 (vpn 0x10)
    put_instr(p, addi(A3, ZERO, 'h55));    p += 4;
    put_instr(p, sd(A3, A2, 8));           p += 4;  // TLB miss, refill, retry
    put_instr(p, ld(A4, A2, 8));           p += 4;
    put_instr(p, add(A5, A4, A4));         p += 4;  // load-use stall
    put_instr(p, lui(A1, 'h11));           p += 4;  // a1 = 0x11000 (vpn 0x11, key 1)
    put_instr(p, sd(A3, A1, 0));           p += 4;  // miss, refill
    put_instr(p, menter(6));               p += 4;  // write-disable key 1
    put_instr(p, addi(A3, ZERO, 'h66));    p += 4;
    put_instr(p, sd(A3, A1, 0));           p += 4;  // protection fault, skipped
    put_instr(p, ld(S3, A1, 0));           p += 4;  // reads still allowed
    put_instr(p, addi(A0, ZERO, 1));       p += 4;
    put_instr(p, menter(7));               p += 4;  // ASID 1
    put_instr(p, ld(S4, A2, 8));           p += 4;  // miss in ASID 1, other frame
    put_instr(p, addi(A0, ZERO, 0));       p += 4;
    put_instr(p, menter(7));               p += 4;  // ASID 0
    put_instr(p, ld(S5, A2, 8));           p += 4;  // hits the ASID 0 entry
    put_instr(p, rmr(S6, 0));              p += 4;  // Metal-only in normal mode
    put_instr(p, menter(3));               p += 4;  // intercept loads
    ld_s7 = ld(S7, A2, 8);
    put_instr(p, ld_s7);                   p += 4;  // intercepted
    put_instr(p, lw(A3, A2, 8));           p += 4;  // in the skip mask: executes
    put_instr(p, menter(4));               p += 4;  // stop intercepting
    put_instr(p, ld(S8, A2, 8));           p += 4;
    put_instr(p, addi(S9, ZERO, 20));      p += 4;
    user_pc["irqloop"] = p;
    put_instr(p, addi(S9, S9, -1));        p += 4;
    put_instr(p, bne(S9, ZERO, -4));       p += 4;
    put_instr(p, addi(S10, ZERO, 7));      p += 4;
    put_instr(p, menter(8));               p += 4;

    // syscall table pointer and table (8 bytes per entry)
    mem['h3f8 / 8] = 64'h400;
    put_instr('h410, addi(S0, S0, 5));      // syscall 2 handler
    put_instr('h414, menter(2));            // return to user

    // page tables: word at 0x600 + asid*0x100 + vpn*8, tlbw data format
    mem[('h600 + 'h10 * 8) / 8] = (64'd1 << 63) | (64'd1 << 41) | (64'd1 << 40) | 64'h8;
    mem[('h600 + 'h11 * 8) / 8] = (64'd1 << 63) | (64'd1 << 41) | (64'd1 << 40) | (64'd1 << 32) | 64'h9;
    mem[('h700 + 'h10 * 8) / 8] = (64'd1 << 63) | (64'd1 << 41) | (64'd1 << 40) | 64'hA;
    mem['hA008 / 8] = 64'h1234;

    // 1: kenter
    emit(1, addi(T0, ZERO, 1));
    emit(1, wmr(0, T0));                   // m0 = 1: kernel
    emit(1, andi(A0, A0, 'hff));           // at most 256 calls
    emit(1, slli(A0, A0, 3));
    emit(1, ld(T0, ZERO, 'h3f8));          // table base, physical access
    emit(1, add(T0, T0, A0));
    emit(1, rmr(RA, 31));                  // user return address
    emit(1, wmr(31, T0));
    emit(1, mexit());
    // 2: kexit
    emit(2, wmr(0, ZERO));
    emit(2, wmr(31, RA));
    emit(2, mexit());
    // 3: tstart: intercept opcode class 0 (loads) with mroutine 5
    emit(3, addi(T0, ZERO, 'h445));
    emit(3, mcr('h20, T0));
    emit(3, mexit());
    // 4: tcommit
    emit(4, mcr('h20, ZERO));
    emit(4, mexit());
    // 5: tread
    emit(5, mst(T0, ZERO, SV_T0));
    emit(5, rmr(T0, 30));
    emit(5, mst(T0, ZERO, ICPT_LOG));
    emit(5, mld(T0, ZERO, N_ICPT));
    emit(5, addi(T0, T0, 1));
    emit(5, mst(T0, ZERO, N_ICPT));
    emit(5, mld(T0, ZERO, SV_T0));
    emit(5, mexit());
    // 6: key 1 write-disable (PKR bit 3)
    emit(6, addi(T0, ZERO, 8));
    emit(6, mcr(1, T0));
    emit(6, mexit());
    // 7: set ASID
    emit(7, wmr(1, A0));
    emit(7, mcr(0, A0));
    emit(7, mexit());
    // 8: halt
    emit(8, lui(T0, 'h10));
    emit(8, addi(T0, T0, -8));             // 0xfff8
    emit(8, addi(T1, ZERO, 1));
    emit(8, sd(T1, T0, 0));
    emit(8, jal(ZERO, 0));
    // 61: illegal instruction: count and skip
    emit(61, mst(T0, ZERO, SV_T0));
    emit(61, mld(T0, ZERO, N_ILL));
    emit(61, addi(T0, T0, 1));
    emit(61, mst(T0, ZERO, N_ILL));
    emit(61, rmr(T0, 31));
    emit(61, addi(T0, T0, 4));
    emit(61, wmr(31, T0));
    emit(61, mld(T0, ZERO, SV_T0));
    emit(61, mexit());
    // 62: page fault
    emit(62, mst(T0, ZERO, SV_T0));
    emit(62, mst(T1, ZERO, SV_T1));
    emit(62, mst(T2, ZERO, SV_T2));
    emit(62, rmr(T0, 30));                 // faulting address
    emit(62, mld(T1, ZERO, LASTVA));
    emit(62, beq(T0, T1, slot_off(62, 5, 41, 0)));  // same address again: protection
    emit(62, mst(T0, ZERO, LASTVA));
    emit(62, srli(T0, T0, 12));            // vpn
    emit(62, rmr(T2, 1));                  // asid
    emit(62, slli(T1, T2, 8));             // asid * 0x100
    emit(62, add(T2, T2, T0));             // TLB index = (asid + vpn) & 15
    emit(62, andi(T2, T2, 15));
    emit(62, slli(T2, T2, 56));
    emit(62, slli(T0, T0, 3));
    emit(62, add(T1, T1, T0));             // page table offset
    emit(62, srli(T0, T0, 3));
    emit(62, or_(T0, T0, T2));
    emit(62, ld(T1, T1, 'h600));           // page table entry, physical access
    emit(62, rmr(T2, 1));
    emit(62, slli(T2, T2, 32));
    emit(62, or_(T0, T0, T2));             // tag: index | asid | vpn
    emit(62, tlbw(T0, T1));
    emit(62, mld(T2, ZERO, N_REFILL));
    emit(62, addi(T2, T2, 1));
    emit(62, mst(T2, ZERO, N_REFILL));
    emit(62, jal(ZERO, slot_off(62, 25, 40, 0)));
    // 41: protection fault: count, skip the instruction
    emit(41, mld(T1, ZERO, N_PROT));
    emit(41, addi(T1, T1, 1));
    emit(41, mst(T1, ZERO, N_PROT));
    emit(41, mst(ZERO, ZERO, LASTVA));
    emit(41, rmr(T0, 31));
    emit(41, addi(T0, T0, 4));
    emit(41, wmr(31, T0));
    emit(41, jal(ZERO, slot_off(41, 7, 40, 0)));
    // 40: restore and return
    emit(40, mld(T0, ZERO, SV_T0));
    emit(40, mld(T1, ZERO, SV_T1));
    emit(40, mld(T2, ZERO, SV_T2));
    emit(40, mexit());
    // 63: interrupt
    emit(63, mst(T0, ZERO, SV_T0));
    emit(63, mld(T0, ZERO, N_IRQ));
    emit(63, addi(T0, T0, 1));
    emit(63, mst(T0, ZERO, N_IRQ));
    emit(63, mld(T0, ZERO, SV_T0));
    emit(63, mexit());
  end

  // ---------------------------------------------------------------------
  // mechanism counters
  // ---------------------------------------------------------------------
  int n_menter, n_intercept, n_mexit, n_m31_fwd, n_stall, n_fwd_m, n_fwd_w, n_branch;
  int n_pagefault, n_illegal, n_irq, n_tlb_hit, n_phys, n_mld, n_mst, n_tlbw, n_cr;
  int cyc;
  int c_before_menter = -1, c_first_mroutine = -1, c_before_mexit = -1, c_after_mexit = -1;
  bit done = 0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (dut.e_valid && dut.e_link && !dut.e_link_info_we && !dut.trap) n_menter++;
      if (dut.e_valid && dut.e_link &&  dut.e_link_info_we && !dut.trap) n_intercept++;
      if (dut.id_mexit && !dut.trap && !dut.br_taken) n_mexit++;
      if (dut.id_mexit && dut.e_valid && dut.e_c.mreg_write && dut.e_c.mreg_idx == 31) n_m31_fwd++;
      if (dut.stall && !dut.trap && !dut.br_taken) n_stall++;
      if (dut.e_valid && dut.e_c.uses_rs1 && dut.e_c.rs1 != 0 && dut.m_valid &&
          dut.m_c.reg_write && dut.m_c.rd == dut.e_c.rs1) n_fwd_m++;
      if (dut.e_valid && dut.e_c.uses_rs1 && dut.e_c.rs1 != 0 &&
          !(dut.m_valid && dut.m_c.reg_write && dut.m_c.rd == dut.e_c.rs1) &&
          dut.w_valid && dut.w_we && dut.w_rd == dut.e_c.rs1) n_fwd_w++;
      if (dut.br_taken) n_branch++;
      if (dut.trap && dut.trap_entry == ENT_PAGEFAULT) n_pagefault++;
      if (dut.trap && dut.trap_entry == ENT_ILLEGAL) n_illegal++;
      if (irq_ack) n_irq++;
      if (dut.tlb_req && !dut.m_metal && !dut.tlb_fault) n_tlb_hit++;
      if (dut.tlb_req && dut.m_metal) n_phys++;
      if (dut.m_valid && dut.m_c.mem_op == MEM_MLD) n_mld++;
      if (dut.m_valid && dut.m_c.mem_op == MEM_MST) n_mst++;
      if (dut.e_act && dut.e_c.tlb_write) n_tlbw++;
      if (dut.e_act && dut.e_c.cr_write) n_cr++;
      // timing of the first system call
      if (dut.m_valid && !dut.m_metal && dut.m_pc == 64'(user_pc["loop"]) && c_before_menter < 0)
        c_before_menter <= cyc;
      if (dut.m_valid && dut.m_metal && dut.m_pc == 64'(1 * SLOT * 4) && c_first_mroutine < 0)
        c_first_mroutine <= cyc;
      if (dut.m_valid && dut.m_metal && dut.m_pc == 64'(2 * SLOT * 4 + 4) && c_before_mexit < 0)
        c_before_mexit <= cyc;
      if (dut.m_valid && !dut.m_metal && dut.m_pc == 64'(user_pc["ret"]) && c_after_mexit < 0)
        c_after_mexit <= cyc;
      if (dmem_req && dmem_we && dmem_addr == 64'hfff8) done <= 1;
    end
  end

  // interrupt source: raised once the program is in its final loop
  bit irq_sent = 0;
  always_ff @(posedge clk) begin
    if (!rst_n) irq <= 0;
    else if (irq_ack) begin irq <= 0; irq_sent <= 1; end
    else if (!irq_sent && dut.m_valid && dut.m_pc == 64'(user_pc["irqloop"]) + 4) irq <= 1;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] mdata(int off);
    return dut.u_mram.data[off / 8];
  endfunction

  initial begin : run
    cyc = 0;
    lc_we = 0; ld_we = 0; lc_addr = 0; lc_data = 0; ldd_addr = 0; ldd_data = 0;
    #1;
    // boot: load mroutines and clear the data segment while reset is held
    for (int e = 0; e < 64; e++)
      for (int i = 0; i < code_len[e]; i++) begin
        @(negedge clk);
        lc_we = 1; lc_addr = 11'(e * SLOT + i); lc_data = code[e][i];
      end
    @(negedge clk);
    lc_we = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      ld_we = 1; ldd_addr = 9'(i); ldd_data = '0;
    end
    @(negedge clk);
    ld_we = 0;
    rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    #1;
    // architectural results
    chk(dut.u_rf.regs[S0], 15, "s0: three syscalls ran the kernel handler");
    chk(dut.u_rf.regs[S1], 3, "s1: three returns to user");
    chk(dut.u_rf.regs[S2], 0, "s2");
    chk(mem['h8008 / 8], 64'h55, "store through TLB to frame 8");
    chk(dut.u_rf.regs[A4], 64'h55, "a4 load");
    chk(dut.u_rf.regs[A5], 64'haa, "a5 after load-use stall");
    chk(mem['h9000 / 8], 64'h55, "write-disabled store did not happen");
    chk(dut.u_rf.regs[S3], 64'h55, "s3 read of key 1 page");
    chk(dut.u_rf.regs[S4], 64'h1234, "s4 load in ASID 1");
    chk(dut.u_rf.regs[S5], 64'h55, "s5 load in ASID 0");
    chk(dut.u_rf.regs[S6], 0, "s6 illegal rmr skipped");
    chk(dut.u_rf.regs[S7], 0, "s7 intercepted load did not execute");
    chk(dut.u_rf.regs[S8], 64'h55, "s8 load after interception off");
    chk(dut.u_rf.regs[A3], 64'h55, "a3 lw not intercepted (skip mask)");
    chk(dut.u_rf.regs[S9], 0, "s9 loop");
    chk(dut.u_rf.regs[S10], 7, "s10");
    chk(dut.u_rf.regs[RA], 64'(user_pc["ret"]), "ra saved by kenter");
    chk(dut.u_mreg.m[0], 0, "m0 user privilege after kexit");
    chk(dut.u_mreg.m[1], 0, "m1 asid copy");
    chk(dut.cr_asid, 0, "asid");
    chk(dut.cr_pkr, 8, "pkr");
    chk(mdata(N_PROT), 1, "protection faults");
    chk(mdata(N_IRQ), 1, "interrupts handled");
    chk(mdata(N_ILL), 1, "illegal instructions");
    chk(mdata(N_ICPT), 1, "intercepted loads");
    chk(mdata(ICPT_LOG), 64'(ld_s7), "intercepted instruction word in m30");
    chk(mdata(N_REFILL), 3, "TLB refills");
    // timing: menter costs no cycle, mexit one
    chk(64'(c_first_mroutine - c_before_menter), 1, "menter overhead");
    chk(64'(c_after_mexit - c_before_mexit), 2, "mexit overhead");
    $display("menter=%0d intercept=%0d mexit=%0d m31_fwd=%0d stall=%0d fwd_m=%0d fwd_w=%0d branch=%0d",
             n_menter, n_intercept, n_mexit, n_m31_fwd, n_stall, n_fwd_m, n_fwd_w, n_branch);
    $display("pagefault=%0d illegal=%0d irq=%0d tlb_hit=%0d phys=%0d mld=%0d mst=%0d tlbw=%0d cr=%0d cycles=%0d",
             n_pagefault, n_illegal, n_irq, n_tlb_hit, n_phys, n_mld, n_mst, n_tlbw, n_cr, cyc);
    // every mechanism happened
    chk(64'(n_menter > 0), 1, "menter happened");
    chk(64'(n_intercept > 0), 1, "interception happened");
    chk(64'(n_mexit > 0), 1, "mexit happened");
    chk(64'(n_m31_fwd > 0), 1, "m31 forwarding happened");
    chk(64'(n_stall > 0), 1, "load-use stall happened");
    chk(64'(n_fwd_m > 0), 1, "forwarding from M happened");
    chk(64'(n_fwd_w > 0), 1, "forwarding from W happened");
    chk(64'(n_branch > 0), 1, "taken branch happened");
    chk(64'(n_pagefault), 4, "page faults delivered: 3 misses, 1 protection");
    chk(64'(n_illegal), 1, "illegal delivered");
    chk(64'(n_irq), 1, "interrupt delivered");
    chk(64'(n_tlb_hit > 0), 1, "TLB hits happened");
    chk(64'(n_phys > 0), 1, "physical access happened");
    chk(64'(n_mld > 0 && n_mst > 0), 1, "mld and mst happened");
    chk(64'(n_tlbw), 3, "TLB writes");
    chk(64'(n_cr > 0), 1, "control register writes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
