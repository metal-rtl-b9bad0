// tb_mreg: checks the Metal register file: wmr writes, rmr reads, the entry
// port writing m31 (return address) and optionally m30, the priority of a
// wmr over the entry port in the same cycle, and reset to zero.
module tb_mreg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] raddr, waddr;
  logic [63:0] rdata, ret_addr, wdata, entry_ret, entry_info;
  logic we, entry_we, entry_info_we;
  logic [63:0] shadow [32];

  mreg dut (.clk, .rst_n, .raddr, .rdata, .ret_addr, .we, .waddr, .wdata,
            .entry_we, .entry_ret, .entry_info_we, .entry_info);

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
    {we, entry_we, entry_info_we} = '0;
    raddr = 0; waddr = 0; wdata = 0; entry_ret = 0; entry_info = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      raddr = 5'(i); #1; chk(rdata, 64'd0, "reset");
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we            = ($urandom % 2) != 0;
      waddr         = (n % 5 == 0) ? 5'd31 : (n % 5 == 1) ? 5'd30 : 5'($urandom);
      wdata         = {$urandom, $urandom};
      entry_we      = ($urandom % 4) == 0;
      entry_info_we = ($urandom % 2) != 0;
      entry_ret     = {$urandom, $urandom};
      entry_info    = {$urandom, $urandom};
      @(posedge clk);
      if (entry_we) shadow[31] = entry_ret;
      if (entry_we && entry_info_we) shadow[30] = entry_info;
      if (we) shadow[waddr] = wdata;
      #1;
      raddr = 5'($urandom);
      #1;
      chk(rdata, shadow[raddr], "rmr");
      chk(ret_addr, shadow[31], "m31");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
