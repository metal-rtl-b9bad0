// mreg: the Metal register file, m0-m31.
//
// Holds Metal's internal state across mroutine invocations. It has one
// general read port (rmr), a dedicated read port for m31 (the return
// address that mexit resumes at), one general write port (wmr) and an entry
// port that the pipeline uses on entry to Metal mode to store the return
// address in m31 and, when requested, extra information in m30. When both
// write ports hit the same register in one cycle the general port wins: it
// belongs to the first mroutine instruction, which is younger than the entry
// itself. Reads are asynchronous and see the array only; the pipeline
// forwards in-flight writes itself. 32 registers and m31 as return address
// follow the Metal architecture; the port structure and the use of m30 are
// this design's choices. All registers reset to zero.
module mreg
  import metal_pkg::*;
#(
  parameter int W = XLEN,
  parameter int N = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // rmr
  input  logic [$clog2(N)-1:0] raddr,
  output logic [W-1:0]         rdata,
  // m31 for mexit
  output logic [W-1:0]         ret_addr,
  // wmr
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  // entry to Metal mode
  input  logic                 entry_we,
  input  logic [W-1:0]         entry_ret,
  input  logic                 entry_info_we,
  input  logic [W-1:0]         entry_info
);
  logic [W-1:0] m [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) m[i] <= '0;
    end else begin
      if (entry_we) m[N-1] <= entry_ret;
      if (entry_we && entry_info_we) m[N-2] <= entry_info;
      if (we) m[waddr] <= wdata;
    end
  end

  assign rdata    = m[raddr];
  assign ret_addr = m[N-1];
endmodule
