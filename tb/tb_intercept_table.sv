// tb_intercept_table: programs entries for some opcode classes and checks
// that normal-mode instructions of those classes hit with the programmed
// mroutine number, that Metal-mode instructions, disabled classes, funct3
// values in an entry's skip mask and the Metal opcode never hit, that a write is forwarded to a lookup in the same
// cycle, and that reset disables every entry.
module tb_intercept_table;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] instr;
  logic metal_mode, hit, we, wen;
  logic [5:0] entry, wentry;
  logic [4:0] widx;
  logic       m_en [32];
  logic [5:0] m_ent [32];
  logic [7:0] wskip;
  logic [7:0] m_skip [32];

  intercept_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h instr=%h", what, got, exp, instr);
    end
  endtask

  initial begin
    instr = 0; metal_mode = 0; we = 0; wen = 0; wentry = 0; widx = 0; wskip = 0;
    for (int i = 0; i < 32; i++) begin m_en[i] = 0; m_ent[i] = 0; m_skip[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      instr = {25'($urandom), 5'(i), 2'b11}; #1;
      chk(64'(hit), 0, "after reset");
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we     = ($urandom % 4) == 0;
      widx   = 5'($urandom);
      wen    = ($urandom % 2) != 0;
      wentry = 6'($urandom);
      wskip  = ($urandom % 2) ? 8'($urandom) : 8'h00;
      instr  = {25'($urandom), 5'($urandom), (n % 10 == 0) ? 2'b01 : 2'b11};
      metal_mode = ($urandom % 5) == 0;
      #1;
      begin
        logic e, f;
        logic [7:0] sk;
        f = we && widx == instr[6:2];
        sk = f ? wskip : m_skip[instr[6:2]];
        e = !metal_mode && instr[1:0] == 2'b11 && instr[6:0] != 7'b0001011 &&
            (f ? wen : m_en[instr[6:2]]) && !sk[instr[14:12]];
        chk(64'(hit), 64'(e), "hit");
        if (e) chk(64'(entry), 64'(f ? wentry : m_ent[instr[6:2]]), "entry");
      end
      @(posedge clk);
      if (we) begin m_en[widx] = wen; m_ent[widx] = wentry; m_skip[widx] = wskip; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
