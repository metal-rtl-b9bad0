// tb_mram: loads the code segment with a pattern through the boot port and
// checks the fetch port (byte addresses) and the entry port (first word of
// each of the 64 mroutine slots); then writes and reads the data segment
// through both the boot port and the mld/mst port.
module tb_mram;
  localparam int SLOT = 32;
  localparam int DW   = 512;
  localparam int CW   = 64 * SLOT;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [$clog2(CW)+1:0] fetch_addr;
  logic [31:0] fetch_instr, entry_instr, load_code_data;
  logic [5:0] entry;
  logic [$clog2(DW)+2:0] data_addr;
  logic [63:0] data_rdata, data_wdata, load_data_data;
  logic data_we, load_code_we, load_data_we;
  logic [$clog2(CW)-1:0] load_code_addr;
  logic [$clog2(DW)-1:0] load_data_addr;
  logic [63:0] dshadow [DW];

  mram #(.SLOT_WORDS(SLOT), .DATA_WORDS(DW)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] pat(int i);
    return 32'(i) * 32'h9e37_79b1 ^ 32'h1234_5678;
  endfunction

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
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    {data_we, load_code_we, load_data_we} = '0;
    fetch_addr = 0; entry = 0; data_addr = 0; data_wdata = 0;
    load_code_addr = 0; load_code_data = 0; load_data_addr = 0; load_data_data = 0;
    for (int i = 0; i < CW; i++) begin
      @(negedge clk);
      load_code_we = 1; load_code_addr = $bits(load_code_addr)'(i); load_code_data = pat(i);
    end
    for (int i = 0; i < DW; i++) begin
      @(negedge clk);
      load_code_we = 0;
      load_data_we = 1; load_data_addr = $bits(load_data_addr)'(i);
      load_data_data = {pat(i), ~pat(i)}; dshadow[i] = load_data_data;
    end
    @(negedge clk);
    load_data_we = 0;
    for (int i = 0; i < 64; i++) begin
      entry = 6'(i); #1;
      chk(64'(entry_instr), 64'(pat(i * SLOT)), "entry");
    end
    for (int n = 0; n < 1000; n++) begin
      int w;
      w = $urandom % CW;
      fetch_addr = $bits(fetch_addr)'(w * 4); #1;
      chk(64'(fetch_instr), 64'(pat(w)), "fetch");
    end
    for (int n = 0; n < 1000; n++) begin
      int w;
      @(negedge clk);
      w = $urandom % DW;
      data_addr  = $bits(data_addr)'(w * 8);
      data_we    = ($urandom % 2) != 0;
      data_wdata = {$urandom, $urandom};
      #1;
      chk(data_rdata, dshadow[w], "mld");
      @(posedge clk);
      if (data_we) dshadow[w] = data_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
