// tb_workload_tm: software transactional memory built from instruction
// interception. tstart (mroutine 3) records an abort address (a0), clears
// the logs and enables interception of the 64-bit loads and stores (the
// other funct3 values of the two opcode classes are in the skip mask); from
// then on every ld/sd of the program runs an mroutine instead:
//   tload  (16): decodes the intercepted instruction from m30, reads the
//                base register through a register read table, returns the
//                newest buffered value for the address if the transaction
//                wrote it, otherwise loads from memory and appends
//                (address, value) to the read log; writes rd through a
//                register write table.
//   tstore (18): buffers (address, value) in the write log (lazy versioning).
// tcommit (6) validates the read log against memory (value based), writes
// the write log to memory and turns interception off. tabort (5), or a
// failed validation, drops the logs, turns interception off and resumes at
// the abort address. Logs live in the MRAM data segment. The register
// tables (slots 12-15) hold one "move and return" pair per register.
// Transactional code must not use t0-t4 as load/store operands, because
// the mroutines use them as scratch registers.
//
// Program: a committed transfer between two words (reads see the buffered
// writes, an lw inside it is not intercepted and reads memory), a transaction whose read is overwritten by another agent before
// commit (validation fails, the abort handler retries, the retry commits),
// and an explicitly aborted transaction (memory unchanged). Ordinary loads
// and stores outside transactions go through the TLB, which the page-fault
// mroutine fills with identity mappings. Checks registers, memory, abort
// counts and that no normal-mode store reached the transactional words.
// Runs at the processor's default parameters.
module tb_workload_tm;
  import metal_pkg::*;
  import metal_asm_pkg::*;

  localparam int MEMW = 8192;
  localparam int SLOT = 32;
  localparam int X_ADDR = 'h4010;

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
  logic inject = 0;
  always_ff @(posedge clk) begin
    if (inject) mem[X_ADDR / 8] <= 64'd40;   // another agent updates X
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

  localparam int SV0 = 'h00, SV1 = 'h08, SV2 = 'h10, SV3 = 'h18, SV4 = 'h20,
                 WCNT = 'h40, RCNT = 'h48, ABORTPC = 'h50, TMPA = 'h58,
                 N_ABORT = 'h60, WLOG = 'h100, RLOG = 'h200;
  localparam int RT = 12 * SLOT * 4, WT = 14 * SLOT * 4;   // register tables
  localparam int E_TSTART = 3, E_TABORT = 5, E_TCOMMIT = 6, E_TLOAD = 16, E_TSTORE = 18;
  localparam int CR_LOAD = 'h020 + 0, CR_STORE = 'h020 + 8;   // opcode[6:2] of ld / sd
  localparam int ICPT_SKIP = ('hff & ~(1 << 3)) << 8;          // intercept funct3 011 only

  int abort1_pc, abort2_pc, tx2_pc, tx3_pc, after3_pc;

  function automatic void save(int n);
    logic [4:0] r [5] = '{T0, T1, T2, T3, T4};
    for (int i = 0; i < n; i++) emit(mst(r[i], ZERO, SV0 + 8 * i));
  endfunction
  function automatic void restore(int n);
    logic [4:0] r [5] = '{T0, T1, T2, T3, T4};
    for (int i = 0; i < n; i++) emit(mld(r[i], ZERO, SV0 + 8 * i));
  endfunction
  // t1 = table + 8 * instr[lsb +: 5]; call it with the link in t3
  function automatic void call_table(int table_base, int lsb);
    emit(srli(T1, T2, lsb));
    emit(andi(T1, T1, 31));
    emit(slli(T1, T1, 3));
    emit(addi(T1, T1, table_base));
    emit(jalr(T3, T1, 0));
  endfunction

  initial begin : build
    int p, lp, b1, b2, b3, found, nf, wr, ap, dn;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    for (int i = 0; i < 64 * SLOT; i++) begin code[i] = nop(); used[i] = 0; end
    mem['h4000 / 8] = 100;     // A
    mem['h4008 / 8] = 200;     // B
    mem['h4010 / 8] = 5;       // X
    mem['h4018 / 8] = 0;       // Y
    mem['h4020 / 8] = 'h55;    // Z

    // user program
    tx2_pc = 'h100; abort2_pc = 'h140; tx3_pc = 'h180; after3_pc = 'h1c0; abort1_pc = 'h240;
    p = 0;
    put_instr(p, lui(S0, 'h4));                p += 4;
    // transaction 1: move 30 from A to B
    put_instr(p, addi(A0, ZERO, abort1_pc));   p += 4;
    put_instr(p, menter(E_TSTART));            p += 4;
    put_instr(p, ld(S1, S0, 0));               p += 4;
    put_instr(p, addi(S1, S1, -30));           p += 4;
    put_instr(p, sd(S1, S0, 0));               p += 4;
    put_instr(p, ld(S2, S0, 0));               p += 4;   // sees the buffered value
    put_instr(p, ld(S3, S0, 8));               p += 4;
    put_instr(p, addi(S3, S3, 30));            p += 4;
    put_instr(p, sd(S3, S0, 8));               p += 4;
    put_instr(p, lw(A4, S0, 0));               p += 4;   // not intercepted: memory
    put_instr(p, menter(E_TCOMMIT));           p += 4;
    put_instr(p, jal(ZERO, tx2_pc - p));       p += 4;
    // transaction 2: Y = X + 1, retried after a conflict
    p = tx2_pc;
    put_instr(p, addi(A0, ZERO, abort2_pc));   p += 4;
    put_instr(p, menter(E_TSTART));            p += 4;
    put_instr(p, ld(S4, S0, 16));              p += 4;
    put_instr(p, addi(S4, S4, 1));             p += 4;
    put_instr(p, sd(S4, S0, 24));              p += 4;
    put_instr(p, menter(E_TCOMMIT));           p += 4;
    put_instr(p, jal(ZERO, tx3_pc - p));       p += 4;
    p = abort2_pc;
    put_instr(p, addi(S5, S5, 1));             p += 4;
    put_instr(p, jal(ZERO, tx2_pc - p));       p += 4;
    // transaction 3: write Z, then abort explicitly
    p = tx3_pc;
    put_instr(p, addi(A0, ZERO, after3_pc));   p += 4;
    put_instr(p, menter(E_TSTART));            p += 4;
    put_instr(p, addi(S6, ZERO, 77));          p += 4;
    put_instr(p, sd(S6, S0, 32));              p += 4;
    put_instr(p, ld(S10, S0, 32));             p += 4;   // 77 inside the transaction
    put_instr(p, menter(E_TABORT));            p += 4;
    put_instr(p, addi(S7, ZERO, 1));           p += 4;   // not reached
    p = after3_pc;
    put_instr(p, ld(S8, S0, 32));              p += 4;   // ordinary loads, through the TLB
    put_instr(p, ld(S9, S0, 24));              p += 4;
    put_instr(p, menter(8));                   p += 4;
    p = abort1_pc;
    put_instr(p, addi(A5, ZERO, 1));           p += 4;   // transaction 1 must not abort
    put_instr(p, jal(ZERO, tx2_pc - p));       p += 4;

    // register tables: read x[n] into t0 / write t0 into x[n], return via t3
    for (int n = 0; n < 32; n++) begin
      wp = 12 * SLOT + 2 * n; emit(addi(T0, 5'(n), 0)); emit(jalr(ZERO, T3, 0));
      wp = 14 * SLOT + 2 * n; emit(addi(5'(n), T0, 0)); emit(jalr(ZERO, T3, 0));
    end

    // 3: tstart
    org(E_TSTART);
    save(1);
    emit(mst(A0, ZERO, ABORTPC));
    emit(mst(ZERO, ZERO, WCNT));
    emit(mst(ZERO, ZERO, RCNT));
    emit(lui(T0, ICPT_SKIP >> 12));
    emit(addi(T0, T0, (ICPT_SKIP & 'hfff) | 'h40 | E_TLOAD));
    emit(mcr(CR_LOAD, T0));
    emit(lui(T0, ICPT_SKIP >> 12));
    emit(addi(T0, T0, (ICPT_SKIP & 'hfff) | 'h40 | E_TSTORE));
    emit(mcr(CR_STORE, T0));
    restore(1);
    emit(mexit());

    // 5: tabort (also reached from a failed commit)
    org(E_TABORT);
    emit(mcr(CR_LOAD, ZERO));
    emit(mcr(CR_STORE, ZERO));
    emit(mst(ZERO, ZERO, WCNT));
    emit(mst(ZERO, ZERO, RCNT));
    save(1);
    emit(mld(T0, ZERO, N_ABORT));
    emit(addi(T0, T0, 1));
    emit(mst(T0, ZERO, N_ABORT));
    emit(mld(T0, ZERO, ABORTPC));
    emit(wmr(31, T0));
    restore(1);
    emit(mexit());

    // 6: tcommit
    org(E_TCOMMIT);
    save(3);
    emit(mld(T1, ZERO, RCNT));
    lp = here();
    b1 = here(); emit(nop());                  // beq t1, zero, writeback
    emit(addi(T1, T1, -16));
    emit(mld(T0, T1, RLOG));
    emit(ld(T0, T0, 0));                       // current value
    emit(mld(T2, T1, RLOG + 8));               // value the transaction read
    emit(beq(T0, T2, off_to(lp)));
    restore(3);
    emit(jal(ZERO, off_to(E_TABORT * SLOT)));
    wr = here();
    wp = b1; emit(beq(T1, ZERO, (wr - b1) * 4)); wp = wr;
    emit(mld(T1, ZERO, WCNT));
    lp = here();
    b2 = here(); emit(nop());                  // beq t1, zero, done
    emit(addi(T1, T1, -16));
    emit(mld(T0, T1, WLOG));
    emit(mld(T2, T1, WLOG + 8));
    emit(sd(T2, T0, 0));
    emit(jal(ZERO, off_to(lp)));
    dn = here();
    wp = b2; emit(beq(T1, ZERO, (dn - b2) * 4)); wp = dn;
    emit(mcr(CR_LOAD, ZERO));
    emit(mcr(CR_STORE, ZERO));
    emit(mst(ZERO, ZERO, WCNT));
    emit(mst(ZERO, ZERO, RCNT));
    restore(3);
    emit(mexit());
    if (here() > (E_TCOMMIT + 1) * SLOT) $fatal(1, "tcommit too long");

    // 16-17: tload
    org(E_TLOAD);
    save(5);
    emit(rmr(T2, 30));                         // intercepted instruction
    call_table(RT, 15);                        // t0 = x[rs1]
    emit(slli(T4, T2, 32));
    emit(srai(T4, T4, 52));                    // imm[11:0]
    emit(add(T0, T0, T4));                     // address
    emit(mld(T1, ZERO, WCNT));
    lp = here();
    b1 = here(); emit(nop());                  // beq t1, zero, not found
    emit(addi(T1, T1, -16));
    emit(mld(T4, T1, WLOG));
    emit(bne(T4, T0, off_to(lp)));
    emit(mld(T0, T1, WLOG + 8));               // buffered value
    found = here(); emit(nop());               // jal write rd
    nf = here();
    wp = b1; emit(beq(T1, ZERO, (nf - b1) * 4)); wp = nf;
    emit(ld(T4, T0, 0));
    emit(mld(T1, ZERO, RCNT));
    emit(mst(T0, T1, RLOG));
    emit(mst(T4, T1, RLOG + 8));
    emit(addi(T1, T1, 16));
    emit(mst(T1, ZERO, RCNT));
    emit(addi(T0, T4, 0));
    wr = here();
    wp = found; emit(jal(ZERO, (wr - found) * 4)); wp = wr;
    call_table(WT, 7);                         // x[rd] = t0
    restore(5);
    emit(mexit());
    if (here() > (E_TLOAD + 2) * SLOT) $fatal(1, "tload too long");

    // 18-19: tstore
    org(E_TSTORE);
    save(5);
    emit(rmr(T2, 30));
    call_table(RT, 15);                        // t0 = x[rs1]
    emit(slli(T4, T2, 32));
    emit(srai(T4, T4, 57));
    emit(slli(T4, T4, 5));                     // imm[11:5]
    emit(srli(T1, T2, 7));
    emit(andi(T1, T1, 31));                    // imm[4:0]
    emit(or_(T4, T4, T1));
    emit(add(T0, T0, T4));
    emit(mst(T0, ZERO, TMPA));                 // address
    call_table(RT, 20);                        // t0 = x[rs2]
    emit(mld(T4, ZERO, TMPA));
    emit(mld(T1, ZERO, WCNT));
    lp = here();
    b1 = here(); emit(nop());                  // beq t1, zero, append
    emit(addi(T1, T1, -16));
    emit(mld(T2, T1, WLOG));
    emit(bne(T2, T4, off_to(lp)));
    emit(mst(T0, T1, WLOG + 8));               // overwrite the buffered value
    b2 = here(); emit(nop());                  // jal done
    ap = here();
    wp = b1; emit(beq(T1, ZERO, (ap - b1) * 4)); wp = ap;
    emit(mld(T1, ZERO, WCNT));
    emit(mst(T4, T1, WLOG));
    emit(mst(T0, T1, WLOG + 8));
    emit(addi(T1, T1, 16));
    emit(mst(T1, ZERO, WCNT));
    dn = here();
    wp = b2; emit(jal(ZERO, (dn - b2) * 4)); wp = dn;
    restore(5);
    emit(mexit());
    if (here() > (E_TSTORE + 2) * SLOT) $fatal(1, "tstore too long");

    // 62: page fault, identity mapping with read and write rights
    org(62);
    save(3);
    emit(rmr(T0, 30));
    emit(srli(T0, T0, 12));                    // vpn
    emit(andi(T1, T0, 15));
    emit(slli(T1, T1, 56));
    emit(or_(T1, T1, T0));                     // tag: index, asid 0, vpn
    emit(addi(T2, ZERO, 3));
    emit(slli(T2, T2, 40));
    emit(or_(T0, T0, T2));                     // R, W, ppn = vpn
    emit(addi(T2, ZERO, 1));
    emit(slli(T2, T2, 63));
    emit(or_(T0, T0, T2));                     // valid
    emit(tlbw(T1, T0));
    restore(3);
    emit(mexit());

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
  bit injected = 0;
  bit user_store_tx = 0;
  int metal_store_tx = 0;
  always_ff @(posedge clk) begin
    if (rst_n) cyc <= cyc + 1;
    if (rst_n && dmem_req && dmem_we && dmem_addr == 64'hfff8) done <= 1;
    // another agent changes X after transaction 2 has read it the first time
    inject <= 0;
    if (rst_n && !injected && dut.u_mram.data[ABORTPC / 8] == 64'(abort2_pc)
        && dut.u_mram.data[RCNT / 8] != 0) begin
      inject <= 1;
      injected <= 1;
    end
    if (rst_n && dmem_req && dmem_we && dmem_addr >= 64'h4000 && dmem_addr < 64'h4028) begin
      if (dut.m_metal) metal_store_tx <= metal_store_tx + 1;
      else user_store_tx <= 1;
    end
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
      ld_we = 1; ldd_addr = 9'(i); ldd_data = '0;
    end
    @(negedge clk);
    ld_we = 0;
    rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    #1;
    chk(dut.u_rf.regs[S1], 70, "transaction 1 read and update of A");
    chk(dut.u_rf.regs[S2], 70, "read after write sees the buffered value");
    chk(dut.u_rf.regs[S3], 230, "transaction 1 update of B");
    chk(dut.u_rf.regs[A4], 100, "lw is not intercepted and reads memory");
    chk(mem['h4000 / 8], 70, "A committed");
    chk(mem['h4008 / 8], 230, "B committed");
    chk(dut.u_rf.regs[A5], 0, "transaction 1 did not abort");
    chk(64'(injected), 1, "conflicting write happened");
    chk(dut.u_rf.regs[S5], 1, "transaction 2 aborted once");
    chk(dut.u_rf.regs[S4], 41, "transaction 2 retry read the new X");
    chk(mem['h4018 / 8], 41, "Y committed by the retry");
    chk(dut.u_rf.regs[S9], 41, "ordinary load of Y");
    chk(dut.u_rf.regs[S10], 77, "transaction 3 saw its own write");
    chk(mem['h4020 / 8], 'h55, "aborted write to Z discarded");
    chk(dut.u_rf.regs[S8], 'h55, "ordinary load of Z");
    chk(dut.u_rf.regs[S7], 0, "abort resumed at the abort address");
    chk(dut.u_mram.data[N_ABORT / 8], 2, "two aborts (conflict, explicit)");
    chk(64'(user_store_tx), 0, "no normal-mode store reached the transactional words");
    chk(64'(metal_store_tx), 3, "three committed write-backs");
    chk(dut.u_mreg.m[0], 0, "m0 untouched");
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
