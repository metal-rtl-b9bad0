// tb_workload_uintr: user level interrupts. The interrupt mroutine (entry
// 63) redirects an interrupt to a handler registered by a user process, in
// user mode and without changing the privilege level kept in m0, provided
// the registered process is the one running on the core (its ID is held in
// m2). Otherwise the interrupt is handled on the kernel path (here: counted).
// Which privilege levels may receive interrupts is a mask in MRAM data (bit
// n allows level n); only the kernel (m0 = 1) may change it.
// mroutines: 9 set the mask to a0 (kernel only); 10 register the caller as
// receiver with handler a0, if its level is allowed (a0 = 1 on success,
// 0 if refused); 11 return from the user handler to the interrupted pc;
// 12 switch the running process ID to a0; 14 / 15 enter / leave kernel
// level. The user program is first refused registration and refused a
// mask change, enters the kernel level to allow level 0, then registers a
// handler and spins in a loop during which the testbench raises an
// interrupt (delivered to the user handler), switches to another process
// ID, spins again and gets a second interrupt (kernel path). Checks: the
// refusals, the user handler ran exactly once and at level 0, the kernel
// path once, both loops completed, and the interrupted loop resumed where
// it was stopped. Runs at the processor's default parameters.
module tb_workload_uintr;
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
  logic        dmem_req, dmem_we, irq, irq_ack, retire, retire_metal;
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
    .irq, .irq_ack,
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

  localparam int SV0 = 'h00, SV1 = 'h08, UHANDLER = 'h20, UOWNER = 'h28, LEVELS = 'h48,
                 UIPC = 'h30, N_KIRQ = 'h38, N_UIRQ = 'h40;

  int uh_pc, loop1, loop2;

  initial begin : build
    int p, kpath, restore, b_own, b_nul;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    for (int i = 0; i < 64 * SLOT; i++) begin code[i] = nop(); used[i] = 0; end

    // user program
    uh_pc = 'h200;
    p = 0;
    put_instr(p, addi(A0, ZERO, uh_pc));   p += 4;
    put_instr(p, menter(10));              p += 4;   // refused: level 0 not allowed
    put_instr(p, addi(S4, A0, 0));         p += 4;
    put_instr(p, addi(A0, ZERO, 1));       p += 4;
    put_instr(p, menter(9));               p += 4;   // refused: not kernel
    put_instr(p, menter(14));              p += 4;   // kernel level
    put_instr(p, addi(A0, ZERO, 3));       p += 4;
    put_instr(p, menter(9));               p += 4;   // allow levels 0 and 1
    put_instr(p, menter(15));              p += 4;   // back to level 0
    put_instr(p, addi(A0, ZERO, uh_pc));   p += 4;
    put_instr(p, menter(10));              p += 4;   // register handler
    put_instr(p, addi(S5, A0, 0));         p += 4;
    put_instr(p, addi(S2, ZERO, 30));      p += 4;
    loop1 = p;
    put_instr(p, addi(S2, S2, -1));        p += 4;
    put_instr(p, addi(S3, S3, 1));         p += 4;
    put_instr(p, bne(S2, ZERO, -8));       p += 4;
    put_instr(p, addi(A0, ZERO, 2));       p += 4;
    put_instr(p, menter(12));              p += 4;   // another process runs
    put_instr(p, addi(S2, ZERO, 30));      p += 4;
    loop2 = p;
    put_instr(p, addi(S2, S2, -1));        p += 4;
    put_instr(p, addi(S3, S3, 1));         p += 4;
    put_instr(p, bne(S2, ZERO, -8));       p += 4;
    put_instr(p, menter(8));               p += 4;   // halt
    // user interrupt handler (normal mode)
    put_instr(uh_pc + 0, addi(S1, S1, 1));
    put_instr(uh_pc + 4, menter(11));

    // 9: set the mask of levels that may receive interrupts (kernel only)
    org(9);
    emit(mst(T0, ZERO, SV0));
    emit(rmr(T0, 0));
    emit(beq(T0, ZERO, 8));
    emit(mst(A0, ZERO, LEVELS));
    emit(mld(T0, ZERO, SV0));
    emit(mexit());
    // 10: register: owner = running process, handler = a0
    org(10);
    emit(mst(T0, ZERO, SV0));
    emit(mst(T1, ZERO, SV1));
    emit(mld(T0, ZERO, LEVELS));
    emit(rmr(T1, 0));
    emit(srl(T0, T0, T1));
    emit(andi(T0, T0, 1));
    emit(beq(T0, ZERO, 4 * 6));            // level not allowed
    emit(mst(A0, ZERO, UHANDLER));
    emit(rmr(T0, 2));
    emit(mst(T0, ZERO, UOWNER));
    emit(addi(A0, ZERO, 1));
    emit(jal(ZERO, 8));
    emit(addi(A0, ZERO, 0));
    emit(mld(T0, ZERO, SV0));
    emit(mld(T1, ZERO, SV1));
    emit(mexit());
    // 14 / 15: enter / leave kernel level
    org(14);
    emit(mst(T0, ZERO, SV0));
    emit(addi(T0, ZERO, 1));
    emit(wmr(0, T0));
    emit(mld(T0, ZERO, SV0));
    emit(mexit());
    org(15);
    emit(wmr(0, ZERO));
    emit(mexit());
    // 11: return from the user handler
    org(11);
    emit(mst(T0, ZERO, SV0));
    emit(mld(T0, ZERO, UIPC));
    emit(wmr(31, T0));
    emit(mld(T0, ZERO, SV0));
    emit(mexit());
    // 12: set running process ID
    org(12);
    emit(wmr(2, A0));
    emit(mexit());
    // 63: interrupt
    org(63);
    emit(mst(T0, ZERO, SV0));
    emit(mst(T1, ZERO, SV1));
    emit(mld(T0, ZERO, UHANDLER));
    emit(mld(T1, ZERO, UOWNER));
    emit(rmr(T2, 2));
    b_own = here(); emit(nop());            // bne t1, t2, kpath (patched)
    b_nul = here(); emit(nop());            // beq t0, zero, kpath (patched)
    emit(rmr(T1, 31));
    emit(mst(T1, ZERO, UIPC));              // interrupted pc
    emit(wmr(31, T0));                      // resume in the user handler
    emit(mld(T1, ZERO, N_UIRQ));
    emit(addi(T1, T1, 1));
    emit(mst(T1, ZERO, N_UIRQ));
    restore = here() + 4;
    emit(jal(ZERO, off_to(restore)));
    kpath = here();
    emit(mld(T1, ZERO, N_KIRQ));
    emit(addi(T1, T1, 1));
    emit(mst(T1, ZERO, N_KIRQ));
    if (here() != restore) $fatal(1, "layout");
    emit(mld(T0, ZERO, SV0));
    emit(mld(T1, ZERO, SV1));
    emit(mexit());
    wp = b_own; emit(bne(T1, T2, (kpath - b_own) * 4));   // owner not running
    wp = b_nul; emit(beq(T0, ZERO, (kpath - b_nul) * 4)); // no handler registered
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
  int n_irq = 0;
  logic [63:0] irq_pc [2];
  always_ff @(posedge clk) begin
    if (rst_n) cyc <= cyc + 1;
    if (rst_n && dmem_req && dmem_we && dmem_addr == 64'hfff8) done <= 1;
  end

  // interrupt source: once in each loop, after a few iterations
  int seen1 = 0, seen2 = 0;
  always_ff @(posedge clk) begin
    if (!rst_n) irq <= 0;
    else if (irq_ack) begin
      irq <= 0;
      irq_pc[n_irq] <= dut.m_pc;
      n_irq <= n_irq + 1;
    end else begin
      if (dut.m_valid && !dut.m_metal && dut.m_pc == 64'(loop1)) seen1 <= seen1 + 1;
      if (dut.m_valid && !dut.m_metal && dut.m_pc == 64'(loop2)) seen2 <= seen2 + 1;
      if ((n_irq == 0 && seen1 == 10) || (n_irq == 1 && seen2 == 10)) irq <= 1;
    end
  end

  // privilege level while the user handler runs
  logic [63:0] uh_m0 = '1;
  always_ff @(posedge clk)
    if (rst_n && dut.m_valid && !dut.m_metal && dut.m_pc == 64'(uh_pc)) uh_m0 <= dut.u_mreg.m[0];

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
      ld_we = 1; ldd_addr = 9'(i); ldd_data = (i == LEVELS / 8) ? 64'd2 : 64'd0;
    end
    @(negedge clk);
    ld_we = 0;
    rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    #1;
    chk(64'(n_irq), 2, "two interrupts taken");
    chk(dut.u_rf.regs[S1], 1, "user handler ran once");
    chk(dut.u_mram.data[N_UIRQ / 8], 1, "one interrupt delivered to user");
    chk(dut.u_mram.data[N_KIRQ / 8], 1, "one interrupt on the kernel path");
    chk(dut.u_rf.regs[S3], 60, "both loops ran every iteration");
    chk(dut.u_rf.regs[S2], 0, "loop counter");
    chk(uh_m0, 0, "user handler ran at level 0");
    chk(dut.u_mreg.m[0], 0, "level 0 at the end");
    chk(dut.u_rf.regs[S4], 0, "registration refused while level 0 not allowed");
    chk(dut.u_rf.regs[S5], 1, "registration accepted");
    chk(dut.u_mram.data[LEVELS / 8], 3, "mask set by the kernel only");
    chk(dut.u_mram.data[UIPC / 8], irq_pc[0], "user handler returned to the interrupted pc");
    chk(dut.u_mreg.m[2], 2, "running process ID");
    chk(64'(irq_pc[0] >= 64'(loop1) && irq_pc[0] <= 64'(loop1 + 8)), 1, "first interrupt inside the first loop");
    chk(64'(irq_pc[1] >= 64'(loop2) && irq_pc[1] <= 64'(loop2 + 8)), 1, "second interrupt inside the second loop");
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
