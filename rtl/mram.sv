// mram: the Metal RAM, next to the instruction fetch unit.
//
// Split into a code segment that holds the mroutines and a data segment for
// their private data. The code segment has room for MROUTINES mroutines; each
// entry number owns a fixed slot of SLOT_WORDS 32-bit instructions, so the
// entry point of mroutine e is byte address e*SLOT_WORDS*4 of the code
// segment (an mroutine longer than its slot branches to spare code space).
// Code has two asynchronous read ports: one for the fetch stage and one for
// the decode stage, which replaces menter with the first instruction of the
// target mroutine. The data segment holds DATA_WORDS 64-bit words with one
// asynchronous read port and one synchronous write port (mld / mst). A load
// port writes code and data at boot. 64 mroutines and the code/data split
// follow the Metal architecture; slot and data sizes and the port structure
// are this design's choices. Contents are not reset; they are loaded.
module mram
#(
  parameter int MROUTINES  = metal_pkg::MROUTINES,
  parameter int SLOT_WORDS = 32,
  parameter int DATA_WORDS = 512,
  parameter int W          = metal_pkg::XLEN,
  localparam int CODE_WORDS = MROUTINES * SLOT_WORDS,
  localparam int CA = $clog2(CODE_WORDS),
  localparam int DA = $clog2(DATA_WORDS)
) (
  input  logic          clk,
  // fetch port (byte address within the code segment)
  input  logic [CA+1:0] fetch_addr,
  output logic [31:0]   fetch_instr,
  // decode port: first instruction of mroutine `entry`
  input  logic [5:0]    entry,
  output logic [31:0]   entry_instr,
  // data port (byte address within the data segment)
  input  logic [DA+2:0] data_addr,
  output logic [W-1:0]  data_rdata,
  input  logic          data_we,
  input  logic [W-1:0]  data_wdata,
  // boot-time load port
  input  logic          load_code_we,
  input  logic [CA-1:0] load_code_addr,
  input  logic [31:0]   load_code_data,
  input  logic          load_data_we,
  input  logic [DA-1:0] load_data_addr,
  input  logic [W-1:0]  load_data_data
);
  logic [31:0]  code [CODE_WORDS];
  logic [W-1:0] data [DATA_WORDS];

  always_ff @(posedge clk) begin
    if (load_code_we) code[load_code_addr] <= load_code_data;
  end

  always_ff @(posedge clk) begin
    if (data_we)           data[data_addr[DA+2:3]] <= data_wdata;
    else if (load_data_we) data[load_data_addr]    <= load_data_data;
  end

  localparam int EB = $clog2(MROUTINES);
  logic [CA-1:0] entry_word;
  assign entry_word  = CA'(entry[EB-1:0]) * CA'(SLOT_WORDS);

  assign fetch_instr = code[fetch_addr[CA+1:2]];
  assign entry_instr = code[entry_word];
  assign data_rdata  = data[data_addr[DA+2:3]];
endmodule
