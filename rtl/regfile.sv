// regfile: the general purpose register file of the decode stage.
//
// 32 registers of XLEN bits with two asynchronous read ports and one
// synchronous write port; register 0 always reads zero. A write is visible
// to a read of the same register in the same cycle (write-through), so the
// writeback stage needs no separate bypass into decode. Sizes follow the
// usual RISC convention; the document only names the block.
module regfile
  import metal_pkg::*;
#(
  parameter int W = XLEN,
  parameter int N = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] ra1,
  input  logic [$clog2(N)-1:0] ra2,
  output logic [W-1:0]         rd1,
  output logic [W-1:0]         rd2,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  logic [W-1:0]         wd
);
  logic [W-1:0] regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == '0) ? '0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == '0) ? '0 : (we && wa == ra2) ? wd : regs[ra2];
  end
endmodule
