// tb_tlb: fills the TLB with random translations and checks lookups against
// a reference model: hits and misses, ASID separation, read/write
// permissions, page key access-disable and write-disable bits, out-of-range
// addresses, and the Metal-mode bypass (physical address = virtual, no
// fault).
module tb_tlb;
  import metal_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req, is_store, metal_mode, fault, we;
  logic [63:0] vaddr, paddr;
  logic [ASID_W-1:0] asid;
  logic [2*NKEYS-1:0] pkr;
  logic [$clog2(N)-1:0] widx;
  tlb_entry_t wentry;
  tlb_entry_t model [N];

  tlb #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h (va=%h asid=%0d st=%0d)", what, got, exp, vaddr, asid, is_store);
    end
  endtask

  task automatic lookup_check();
    logic h, ok;
    tlb_entry_t e;
    h = 0; e = '0;
    for (int i = 0; i < N; i++)
      if (!h && model[i].valid && model[i].asid == asid && model[i].vpn == vaddr[38:12]) begin
        h = 1; e = model[i];
      end
    ok = (vaddr[63:39] == 0) && h &&
         (is_store ? (e.w && !pkr[2*e.key] && !pkr[2*e.key+1]) : (e.r && !pkr[2*e.key]));
    #1;
    if (metal_mode) begin
      chk(paddr, vaddr, "bypass paddr");
      chk(64'(fault), 0, "bypass fault");
    end else begin
      chk(64'(fault), 64'(!ok), "fault");
      if (ok) chk(paddr, {24'd0, e.ppn, vaddr[11:0]}, "paddr");
    end
  endtask

  initial begin
    req = 0; is_store = 0; metal_mode = 0; we = 0; vaddr = 0; asid = 0; pkr = 0;
    widx = 0; wentry = '0;
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill: distinct vpns in a small range so random lookups often hit
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1; widx = 4'(i);
      wentry.valid = ($urandom % 8) != 0;
      wentry.asid  = ASID_W'($urandom % 2);
      wentry.vpn   = VPN_W'(i);
      wentry.ppn   = PPN_W'({$urandom});
      wentry.key   = KEY_W'($urandom % 4);
      wentry.r     = ($urandom % 4) != 0;
      wentry.w     = ($urandom % 2) != 0;
      model[i]     = wentry;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      req        = 1;
      is_store   = ($urandom % 2) != 0;
      metal_mode = ($urandom % 8) == 0;
      asid       = ASID_W'($urandom % 2);
      pkr        = (n % 3 == 0) ? '0 : 32'($urandom & 32'h0000_00ff);
      vaddr      = {(n % 50 == 0) ? 25'd1 : 25'd0, 15'd0, 12'($urandom % 20), 12'($urandom)};
      lookup_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
