// alu: the integer ALU of the execute stage.
//
// A purely combinational 64-bit unit for the base instruction set: add,
// subtract, shifts, set-less-than (signed and unsigned), the logic
// operations and a pass-through of operand B (used for lui). The
// operation set is this design's choice; the Metal architecture only
// places an ALU in the execute stage. Result is valid in the same cycle.
module alu
  import metal_pkg::*;
#(
  parameter int W = XLEN
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  localparam int SH = $clog2(W);

  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[SH-1:0];
      ALU_SLT:   y = W'($signed(a) < $signed(b));
      ALU_SLTU:  y = W'(a < b);
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[SH-1:0];
      ALU_SRA:   y = W'($signed(a) >>> b[SH-1:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
