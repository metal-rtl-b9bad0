// tb_regfile: writes random values into random registers, compares both
// read ports with a shadow array every cycle, and checks that x0 reads zero
// and that a write is visible to a read in the same cycle.
module tb_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1, ra2, wa;
  logic [63:0] rd1, rd2, wd;
  logic we;
  logic [63:0] shadow [32];

  regfile dut (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we  = ($urandom % 3) != 0;
      wa  = 5'($urandom);
      wd  = {$urandom, $urandom};
      ra1 = (n % 7 == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      #1;
      chk(rd1, (we && wa == ra1 && ra1 != 0) ? wd : shadow[ra1], "rd1");
      chk(rd2, (we && wa == ra2 && ra2 != 0) ? wd : shadow[ra2], "rd2");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    ra1 = 0; we = 1; wa = 0; wd = '1;
    @(posedge clk); #1;
    chk(rd1, 64'd0, "x0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
