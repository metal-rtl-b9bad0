// tb_workload_priv: privilege levels defined by mroutines. The current
// level is kept in m0: 0 user, 1 kernel, 2 an isolated domain inside the
// user process that alone may read a secret page.
//   1 kenter  system call: level 1, ra = return address, continue at the
//             kernel entry for syscall a0 (table in MRAM data)
//   2 kexit   level 0, continue at ra
//   7 setasid kernel only: sets the address space ID
//  16 denter  enter the domain at its fixed entry point: level 2, page key 5
//             (the secret page's key) enabled; the caller's level and return
//             address are saved in MRAM data
//  17 dexit   domain only: key 5 disabled again, back to the caller
//  18 boot    sets the page key rights (key 5 access-disabled)
//  62 page fault: identity refill with page key = vpn[3:0]; an access to a
//             page whose key is access-disabled is not refilled
// A privilege violation (a0 = 1, a1 = return pc) or a page key violation
// (a0 = 2, a1 = address, a2 = pc) is delivered to a kernel handler in
// normal mode at level 1, which logs the cause in memory and returns with
// kexit. The user program calls setasid directly (refused), makes a system
// call that does it (allowed), reads the secret page (refused), calls into
// the domain that reads it (allowed), calls dexit from level 0 (refused) and
// reads the secret page again with its translation now cached in the TLB
// (refused by the page key). Runs at the processor's default parameters.
module tb_workload_priv;
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

  localparam int SV0 = 'h00, SV1 = 'h08, SV2 = 'h10, KFAULT = 'h20, PKRCOPY = 'h28,
                 DRET = 'h30, DLVL = 'h38, DOMENTRY = 'h40, SYSTAB = 'h100;
  localparam int SECRET_KEY = 5;
  localparam int PKR_BOOT = 1 << (2 * SECRET_KEY);   // access-disable key 5

  int kf_pc, ksys_pc, dom_pc;

  initial begin : build
    int p, v, d;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    for (int i = 0; i < 64 * SLOT; i++) begin code[i] = nop(); used[i] = 0; end
    mem['h5000 / 8] = 64'h1234;                  // the secret, page key 5

    kf_pc = 'h200; ksys_pc = 'h280; dom_pc = 'h300;
    // user program
    p = 0;
    put_instr(p, menter(18));              p += 4;   // boot
    put_instr(p, addi(A0, ZERO, 1));       p += 4;
    put_instr(p, menter(7));               p += 4;   // refused
    put_instr(p, addi(A0, ZERO, 0));       p += 4;
    put_instr(p, menter(1));               p += 4;   // syscall 0 sets ASID 3
    put_instr(p, lui(S0, 'h5));            p += 4;
    put_instr(p, ld(S9, S0, 0));           p += 4;   // refused
    put_instr(p, addi(A0, ZERO, 7));       p += 4;
    put_instr(p, menter(16));              p += 4;   // into the domain
    put_instr(p, menter(17));              p += 4;   // refused
    put_instr(p, ld(S9, S0, 0));           p += 4;   // refused, TLB hit
    put_instr(p, menter(8));               p += 4;   // halt
    // kernel fault handler: log a0, count, return with kexit
    p = kf_pc;
    put_instr(p, slli(T1, S7, 3));         p += 4;
    put_instr(p, lui(T2, 'h4));            p += 4;
    put_instr(p, add(T1, T1, T2));         p += 4;
    put_instr(p, sd(A0, T1, 0));           p += 4;
    put_instr(p, addi(S7, S7, 1));         p += 4;
    put_instr(p, addi(T1, ZERO, 1));       p += 4;
    put_instr(p, beq(A0, T1, 12));         p += 4;
    put_instr(p, addi(RA, A2, 4));         p += 4;   // page key: skip the access
    put_instr(p, jal(ZERO, 8));            p += 4;
    put_instr(p, addi(RA, A1, 0));         p += 4;   // privilege: after the menter
    put_instr(p, menter(2));               p += 4;
    // kernel syscall 0
    p = ksys_pc;
    put_instr(p, addi(A0, ZERO, 3));       p += 4;
    put_instr(p, menter(7));               p += 4;
    put_instr(p, menter(2));               p += 4;
    // domain code
    p = dom_pc;
    put_instr(p, lui(T1, 'h5));            p += 4;
    put_instr(p, ld(T1, T1, 0));           p += 4;
    put_instr(p, add(S8, T1, A0));         p += 4;
    put_instr(p, menter(17));              p += 4;

    // 24: deliver to the kernel handler (a0-a2 already set)
    org(24);
    d = here();
    emit(mst(T0, ZERO, SV0));
    emit(addi(T0, ZERO, 1));
    emit(wmr(0, T0));
    emit(mld(T0, ZERO, KFAULT));
    emit(wmr(31, T0));
    emit(mld(T0, ZERO, SV0));
    emit(mexit());
    // 1: kenter
    org(1);
    emit(addi(T0, ZERO, 1));
    emit(wmr(0, T0));
    emit(andi(A0, A0, 255));
    emit(slli(A0, A0, 3));
    emit(mld(T0, A0, SYSTAB));
    emit(rmr(RA, 31));
    emit(wmr(31, T0));
    emit(mexit());
    // 2: kexit
    org(2);
    emit(wmr(0, ZERO));
    emit(wmr(31, RA));
    emit(mexit());
    // 7: setasid, kernel only
    org(7);
    emit(mst(T0, ZERO, SV0));
    emit(rmr(T0, 0));
    emit(addi(T0, T0, -1));
    v = here(); emit(nop());               // bne t0, zero, violation
    emit(wmr(1, A0));
    emit(mcr(CR_ASID, A0));
    emit(mld(T0, ZERO, SV0));
    emit(mexit());
    wp = v; emit(bne(T0, ZERO, (7 * SLOT + 8 - v) * 4)); wp = 7 * SLOT + 8;
    emit(mld(T0, ZERO, SV0));
    emit(addi(A0, ZERO, 1));
    emit(rmr(A1, 31));
    emit(jal(ZERO, off_to(d)));
    // 16: denter
    org(16);
    emit(mst(T0, ZERO, SV0));
    emit(rmr(T0, 31));
    emit(mst(T0, ZERO, DRET));
    emit(rmr(T0, 0));
    emit(mst(T0, ZERO, DLVL));
    emit(addi(T0, ZERO, 2));
    emit(wmr(0, T0));
    emit(mld(T0, ZERO, PKRCOPY));
    emit(andi(T0, T0, ~PKR_BOOT));         // enable key 5
    emit(mcr(CR_PKR, T0));
    emit(mst(T0, ZERO, PKRCOPY));
    emit(mld(T0, ZERO, DOMENTRY));
    emit(wmr(31, T0));
    emit(mld(T0, ZERO, SV0));
    emit(mexit());
    // 17: dexit, domain only
    org(17);
    emit(mst(T0, ZERO, SV0));
    emit(rmr(T0, 0));
    emit(addi(T0, T0, -2));
    v = here(); emit(nop());               // bne t0, zero, violation
    emit(mld(T0, ZERO, PKRCOPY));
    emit(addi(T0, T0, PKR_BOOT));          // disable key 5 (bit is clear here)
    emit(mcr(CR_PKR, T0));
    emit(mst(T0, ZERO, PKRCOPY));
    emit(mld(T0, ZERO, DLVL));
    emit(wmr(0, T0));
    emit(mld(T0, ZERO, DRET));
    emit(wmr(31, T0));
    emit(mld(T0, ZERO, SV0));
    emit(mexit());
    wp = v; emit(bne(T0, ZERO, (17 * SLOT + 14 - v) * 4)); wp = 17 * SLOT + 14;
    emit(mld(T0, ZERO, SV0));
    emit(addi(A0, ZERO, 1));
    emit(rmr(A1, 31));
    emit(jal(ZERO, off_to(d)));
    // 18: boot
    org(18);
    emit(mst(T0, ZERO, SV0));
    emit(addi(T0, ZERO, PKR_BOOT));
    emit(mcr(CR_PKR, T0));
    emit(mst(T0, ZERO, PKRCOPY));
    emit(mld(T0, ZERO, SV0));
    emit(mexit());
    // 62: page fault -> slots 20-21
    org(62);
    emit(jal(ZERO, (20 - 62) * SLOT * 4));
    org(20);
    emit(mst(T0, ZERO, SV0));
    emit(mst(T1, ZERO, SV1));
    emit(mst(T2, ZERO, SV2));
    emit(rmr(T0, 30));
    emit(srli(T0, T0, 12));                // vpn
    emit(andi(T1, T0, 15));                // page key
    emit(slli(T1, T1, 1));
    emit(mld(T2, ZERO, PKRCOPY));
    emit(srl(T2, T2, T1));
    emit(andi(T2, T2, 1));                 // access-disable bit of the key
    v = here(); emit(nop());               // bne t2, zero, key violation
    emit(andi(T1, T0, 15));
    emit(slli(T2, T1, 32));
    emit(or_(T2, T2, T0));                 // key, ppn = vpn
    emit(addi(T1, ZERO, 3));
    emit(slli(T1, T1, 40));
    emit(or_(T2, T2, T1));                 // R, W
    emit(addi(T1, ZERO, 1));
    emit(slli(T1, T1, 63));
    emit(or_(T2, T2, T1));                 // valid
    emit(andi(T1, T0, 15));
    emit(slli(T1, T1, 56));
    emit(or_(T0, T0, T1));                 // index
    emit(rmr(T1, 1));
    emit(slli(T1, T1, 32));
    emit(or_(T0, T0, T1));                 // asid
    emit(tlbw(T0, T2));
    emit(mld(T0, ZERO, SV0));
    emit(mld(T1, ZERO, SV1));
    emit(mld(T2, ZERO, SV2));
    emit(mexit());
    wp = v; emit(bne(T2, ZERO, (20 * SLOT + 31 - v) * 4)); wp = 20 * SLOT + 31;
    emit(mld(T0, ZERO, SV0));
    emit(mld(T1, ZERO, SV1));
    emit(mld(T2, ZERO, SV2));
    emit(addi(A0, ZERO, 2));
    emit(rmr(A1, 30));
    emit(rmr(A2, 31));
    emit(jal(ZERO, off_to(d)));
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
  logic [63:0] dom_m0 = '1;
  int kf_runs = 0, kf_bad_level = 0;
  always_ff @(posedge clk) begin
    if (rst_n) cyc <= cyc + 1;
    if (rst_n && dmem_req && dmem_we && dmem_addr == 64'hfff8) done <= 1;
    // privilege level seen by the first instruction of the domain and of
    // the kernel handler
    if (rst_n && dut.m_valid && !dut.m_metal && dut.m_pc == 64'(dom_pc)) dom_m0 <= dut.u_mreg.m[0];
    if (rst_n && dut.m_valid && !dut.m_metal && dut.m_pc == 64'(kf_pc)) begin
      kf_runs <= kf_runs + 1;
      if (dut.u_mreg.m[0] != 1) kf_bad_level <= kf_bad_level + 1;
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
      ld_we = 1; ldd_addr = 9'(i);
      ldd_data = (i == KFAULT / 8) ? 64'(kf_pc) : (i == DOMENTRY / 8) ? 64'(dom_pc) :
                 (i == SYSTAB / 8) ? 64'(ksys_pc) : 64'd0;
    end
    @(negedge clk);
    ld_we = 0;
    rst_n = 1;
    wait (done);
    repeat (5) @(posedge clk);
    #1;
    chk(mem['h4000 / 8], 1, "1st violation: setasid from level 0");
    chk(mem['h4008 / 8], 2, "2nd violation: secret page from level 0");
    chk(mem['h4010 / 8], 1, "3rd violation: dexit from level 0");
    chk(mem['h4018 / 8], 2, "4th violation: secret page, TLB hit");
    chk(dut.u_rf.regs[S7], 4, "four violations delivered");
    chk(64'(kf_runs), 4, "kernel handler ran four times");
    chk(64'(kf_bad_level), 0, "kernel handler ran at level 1");
    chk(dut.cr_asid, 3, "ASID set by the system call");
    chk(dut.u_mreg.m[1], 3, "ASID copy");
    chk(dut.u_rf.regs[S8], 64'h1234 + 7, "domain read the secret");
    chk(dom_m0, 2, "domain ran at level 2");
    chk(dut.u_rf.regs[S9], 0, "level 0 never got the secret");
    chk(64'(dut.cr_pkr), PKR_BOOT, "key 5 disabled again after the domain");
    chk(dut.u_mreg.m[0], 0, "back at level 0");
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
