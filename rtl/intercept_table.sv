// intercept_table: instruction interception.
//
// One entry per major opcode class (instruction bits [6:2], 32 classes).
// An entry holds an enable bit, the number of the mroutine that replaces
// the instructions of that class executed in normal mode, and a skip mask
// over funct3 (instruction bits [14:12]): an instruction whose funct3 bit is
// set in the mask is not intercepted, so a single instruction such as sd can
// be caught without its class (sb, sh, sw). For classes without a funct3
// field the mask should be left 0. Metal-mode code is never intercepted, so
// an mroutine can execute the instruction it emulates. Written by the mcr
// Metal instruction at control register addresses 0x020-0x03F with value
// {skip mask in bits 15:8, enable at bit 6, entry in bits 5:0}; reset
// disables every entry. Lookup is combinational and is used by the
// fetch stage; a write is forwarded to a lookup of the same class in the
// same cycle. Intercepting instructions with an mroutine and switching it
// on and off at run time follow the Metal architecture; the per-opcode
// and funct3 granularity is this design's choice. The Metal opcode itself cannot be
// intercepted.
module intercept_table
  import metal_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // lookup
  input  logic [31:0] instr,
  input  logic        metal_mode,
  output logic        hit,
  output logic [5:0]  entry,
  // write
  input  logic        we,
  input  logic [4:0]  widx,
  input  logic        wen,
  input  logic [5:0]  wentry,
  input  logic [7:0]  wskip
);
  logic [4:0] en_idx;
  logic       en   [32];
  logic [5:0] ent  [32];
  logic [7:0] skip [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) begin
        en[i]  <= 1'b0;
        ent[i] <= '0;
        skip[i] <= '0;
      end
    end else if (we) begin
      en[widx]  <= wen;
      ent[widx] <= wentry;
      skip[widx] <= wskip;
    end
  end

  // a write in the same cycle is already visible to the lookup, so the
  // instruction fetched while the writing mcr executes sees the new entry
  logic       cur_en;
  logic [5:0] cur_ent;
  logic [7:0] cur_skip;
  logic       fwd;
  assign en_idx  = instr[6:2];
  assign fwd     = we && widx == en_idx;
  assign cur_en  = fwd ? wen    : en[en_idx];
  assign cur_ent = fwd ? wentry : ent[en_idx];
  assign cur_skip = fwd ? wskip : skip[en_idx];
  assign hit     = !metal_mode && instr[1:0] == 2'b11 && instr[6:0] != OP_METAL && cur_en
                   && !cur_skip[instr[14:12]];
  assign entry   = cur_ent;
endmodule
