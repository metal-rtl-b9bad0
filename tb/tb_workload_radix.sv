// tb_workload_radix: custom page tables. The page-fault mroutine walks a
// three-level radix page table (9 index bits per level, 4 KiB pages, 39-bit
// virtual addresses) in physical memory and fills the TLB with tlbw. A page
// that is not present, or an access the leaf entry does not allow, is
// delivered to an operating system handler running in normal mode, with
// a0 = faulting address and a1 = faulting pc. To tell a load from a store
// the walker reads the faulting instruction at the pc (instruction fetch is
// not translated, so the pc is a physical address).
//
// Page table entry format (same as the tlbw data operand):
//   bit 63 present, bit 41 W, bit 40 R, bits 35:32 page key, bits 27:0 ppn;
//   an upper-level entry points to the next table with its ppn.
// The root table's physical address is kept in the MRAM data segment.
//
// The user program stores to and loads from pages that use different
// upper-level tables, reloads a page (TLB hit, no walk), loads from and then
// stores to a read-only page, and touches a page that is not present. Checks: memory contents, loaded values, the number of
// walks, and that the OS handler saw the right address and pc. Runs at the
// processor's default parameters.
module tb_workload_radix;
  import metal_pkg::*;
  import metal_asm_pkg::*;

  localparam int MEMW = 8192;
  localparam int SLOT = 32;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [63:0] mem [MEMW];
  logic [63:0] imem_addr, dmem_addr, dmem_wdata, dmem_rdata;
  logic [31:0] imem_rdata;
  logic        dmem_req, dmem_we, irq_ack, retire, retire_metal;
  logic [7:0]  dmem_be;
  logic        lc_we = 0, ld_we = 0;
  logic [10:0] lc_addr = 0;
  logic [31:0] lc_data = 0;
  logic [8:0]  ldd_addr = 0;
  logic [63:0] ldd_data = 0;

  metal_cpu dut (
    .clk, .rst_n,
    .imem_addr, .imem_rdata,
    .dmem_req, .dmem_we, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .irq(1'b0), .irq_ack,
    .mram_load_code_we(lc_we), .mram_load_code_addr(lc_addr), .mram_load_code_data(lc_data),
    .mram_load_data_we(ld_we), .mram_load_data_addr(ldd_addr), .mram_load_data_data(ldd_data),
    .retire, .retire_metal
  );

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

  function automatic void put_instr(int addr, logic [31:0] w);
    if (addr % 8 == 0) mem[addr / 8][31:0]  = w;
    else               mem[addr / 8][63:32] = w;
  endfunction

  // mroutine code, written as streams that may span consecutive slots
  logic [31:0] code [64 * SLOT];
  bit          used [64 * SLOT];
  int          wp;
  function automatic void org(int e); wp = e * SLOT; endfunction
  function automatic void emit(logic [31:0] w); code[wp] = w; used[wp] = 1; wp++; endfunction
  function automatic int here(); return wp; endfunction
  function automatic int off_to(int target); return (target - wp) * 4; endfunction

  localparam int SV0 = 'h00, SV1 = 'h08, SV2 = 'h10, SV3 = 'h18, ROOT = 'h20,
                 OSFAULT = 'h28, N_WALK = 'h30, N_ABSENT = 'h38;

  function automatic logic [63:0] pte(int ppn, bit leaf, bit writable = 1);
    return (64'd1 << 63) | (leaf ? ((64'(writable) << 41) | (64'd1 << 40)) : 64'd0) | 64'(ppn);
  endfunction

  int os_pc, fault_pc, ro_pc;

  initial begin : build
    int p, loop, leaf, absent, restore, b_absent, b_leaf, b_perm;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    for (int i = 0; i < 64 * SLOT; i++) begin code[i] = nop(); used[i] = 0; end

    // page tables (physical): root 0x1000; level-1 tables 0x2000, 0x3000;
    // level-0 tables 0x4000, 0x5000, 0x6000; frames 0x8000, 0x9000, 0xA000
    mem[('h1000 + 0 * 8) / 8] = pte('h2, 0);      // va[38:30] = 0
    mem[('h1000 + 1 * 8) / 8] = pte('h3, 0);      // va[38:30] = 1
    mem[('h2000 + 0 * 8) / 8] = pte('h4, 0);      // va[29:21] = 0
    mem[('h2000 + 1 * 8) / 8] = pte('h5, 0);      // va[29:21] = 1
    mem[('h3000 + 0 * 8) / 8] = pte('h6, 0);
    mem[('h4000 + 1 * 8) / 8] = pte('h8, 1);      // va 0x0000_1000 -> 0x8000
    mem[('h6000 + 3 * 8) / 8] = pte('h9, 1);      // va 0x4000_3000 -> 0x9000
    mem[('h5000 + 0 * 8) / 8] = pte('hA, 1);      // va 0x0020_0000 -> 0xA000
    mem[('h4000 + 2 * 8) / 8] = pte('hB, 1, 0);   // va 0x0000_2000 -> 0xB000, read only
    mem['hB000 / 8] = 64'h4444;
    mem['hA010 / 8] = 64'h3333;                   // va 0x5000 has no entry

    // user program
    p = 0;
    put_instr(p, lui(A2, 'h1));            p += 4;
    put_instr(p, addi(A3, ZERO, 'h11));    p += 4;
    put_instr(p, sd(A3, A2, 0));           p += 4;   // walk
    put_instr(p, lui(A2, 'h40003));        p += 4;
    put_instr(p, addi(A3, ZERO, 'h22));    p += 4;
    put_instr(p, sd(A3, A2, 8));           p += 4;   // walk through the second root entry
    put_instr(p, lui(A2, 'h200));          p += 4;
    put_instr(p, ld(S1, A2, 16));          p += 4;   // walk through the second level-1 entry
    put_instr(p, lui(A2, 'h1));            p += 4;
    put_instr(p, ld(S2, A2, 0));           p += 4;   // TLB hit
    put_instr(p, lui(A2, 'h2));            p += 4;
    put_instr(p, ld(S8, A2, 0));           p += 4;   // read-only page: load allowed
    ro_pc = p;
    put_instr(p, sd(A3, A2, 0));           p += 4;   // store refused, goes to the OS
    put_instr(p, addi(S9, S6, 0));         p += 4;   // pc the OS saw
    put_instr(p, lui(A2, 'h5));            p += 4;
    fault_pc = p;
    put_instr(p, ld(S3, A2, 0));           p += 4;   // not present
    put_instr(p, addi(S5, ZERO, 9));       p += 4;
    put_instr(p, menter(8));               p += 4;   // halt
    // operating system page fault handler (normal mode)
    os_pc = 'h200;
    put_instr(os_pc + 0, addi(S4, A0, 0));          // record the address
    put_instr(os_pc + 4, addi(S6, A1, 0));          // and the pc
    put_instr(os_pc + 8, addi(S7, S7, 1));          // count deliveries
    put_instr(os_pc + 12, jalr(ZERO, A1, 4));       // skip the instruction

    // 62: page fault -> walker in slots 20-21
    org(62);
    emit(jal(ZERO, (20 - 62) * SLOT * 4));
    org(20);
    emit(mst(T0, ZERO, SV0));
    emit(mst(T1, ZERO, SV1));
    emit(mst(T2, ZERO, SV2));
    emit(mst(T3, ZERO, SV3));
    emit(rmr(T0, 30));
    emit(srli(T0, T0, 12));                // vpn
    emit(mld(T1, ZERO, ROOT));             // root table
    emit(addi(T3, ZERO, 18));              // shift of the top index
    loop = here();
    emit(srl(T2, T0, T3));
    emit(andi(T2, T2, 511));
    emit(slli(T2, T2, 3));
    emit(add(T2, T2, T1));
    emit(ld(T1, T2, 0));                   // entry, physical access
    b_absent = here(); emit(nop());        // bge t1, zero, absent (patched)
    b_leaf = here();   emit(nop());        // beq t3, zero, leaf (patched)
    emit(slli(T1, T1, 36));
    emit(srli(T1, T1, 24));                // next table = ppn << 12
    emit(addi(T3, T3, -9));
    emit(jal(ZERO, off_to(loop)));
    leaf = here();
    emit(rmr(T2, 31));
    emit(lw(T2, T2, 0));                   // faulting instruction
    emit(andi(T2, T2, 32));                // opcode bit 5: store
    emit(srli(T2, T2, 5));
    emit(addi(T2, T2, 40));                // bit 40 R for a load, 41 W for a store
    emit(srl(T2, T1, T2));
    emit(andi(T2, T2, 1));
    b_perm = here(); emit(nop());          // beq t2, zero, absent (patched)
    emit(andi(T2, T0, 15));                // TLB index = vpn & 15
    emit(slli(T2, T2, 56));
    emit(or_(T0, T0, T2));
    emit(rmr(T2, 1));                      // asid copy in m1
    emit(slli(T2, T2, 32));
    emit(or_(T0, T0, T2));
    emit(tlbw(T0, T1));
    emit(mld(T2, ZERO, N_WALK));
    emit(addi(T2, T2, 1));
    emit(mst(T2, ZERO, N_WALK));
    restore = here() + 9;
    emit(jal(ZERO, off_to(restore)));
    absent = here();                       // deliver to the OS in normal mode:
                                           // not present or not allowed
    emit(mld(T2, ZERO, N_ABSENT));
    emit(addi(T2, T2, 1));
    emit(mst(T2, ZERO, N_ABSENT));
    emit(rmr(A0, 30));
    emit(rmr(A1, 31));
    emit(mld(T2, ZERO, OSFAULT));
    emit(wmr(31, T2));
    emit(nop());
    if (here() != restore) $fatal(1, "layout");
    emit(mld(T0, ZERO, SV0));
    emit(mld(T1, ZERO, SV1));
    emit(mld(T2, ZERO, SV2));
    emit(mld(T3, ZERO, SV3));
    emit(mexit());
    wp = b_absent; emit(bge(T1, ZERO, (absent - b_absent) * 4));
    wp = b_leaf;   emit(beq(T3, ZERO, (leaf - b_leaf) * 4));
    wp = b_perm;   emit(beq(T2, ZERO, (absent - b_perm) * 4));
    // 8: halt
    org(8);
    emit(lui(T0, 'h10));
    emit(addi(T0, T0, -8));
    emit(addi(T1, ZERO, 1));
    emit(sd(T1, T0, 0));
    emit(jal(ZERO, 0));
  end

  bit done = 0;
  int cyc = 0;
  always_ff @(posedge clk) begin
    if (rst_n) cyc <= cyc + 1;
    if (rst_n && dmem_req && dmem_we && dmem_addr == 64'hfff8) done <= 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : run
    #1;
    for (int i = 0; i < 64 * SLOT; i++)
      if (used[i]) begin
        @(negedge clk);
        lc_we = 1; lc_addr = 11'(i); lc_data = code[i];
      end
    @(negedge clk);
    lc_we = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      ld_we = 1; ldd_addr = 9'(i);
      ldd_data = (i == ROOT / 8) ? 64'h1000 : (i == OSFAULT / 8) ? 64'(os_pc) : 64'd0;
    end
    @(negedge clk);
    ld_we = 0;
    rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    #1;
    chk(mem['h8000 / 8], 64'h11, "store through 3-level walk");
    chk(mem['h9008 / 8], 64'h22, "store through second root entry");
    chk(dut.u_rf.regs[S1], 64'h3333, "load through second level-1 entry");
    chk(dut.u_rf.regs[S2], 64'h11, "reload hits the TLB");
    chk(dut.u_rf.regs[S3], 0, "absent page load skipped");
    chk(dut.u_rf.regs[S4], 64'h5000, "OS saw the faulting address");
    chk(dut.u_rf.regs[S6], 64'(fault_pc), "OS saw the faulting pc");
    chk(dut.u_rf.regs[S5], 9, "program continued");
    chk(dut.u_mram.data[N_WALK / 8], 4, "four successful walks");
    chk(dut.u_mram.data[N_ABSENT / 8], 2, "two faults delivered to the OS");
    chk(dut.u_rf.regs[S7], 2, "OS handler ran twice");
    chk(dut.u_rf.regs[S8], 64'h4444, "load from the read-only page");
    chk(mem['hB000 / 8], 64'h4444, "store to the read-only page refused");
    chk(dut.u_rf.regs[S9], 64'(ro_pc), "OS saw the pc of the refused store");
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
