// tb_alu: self-checking test of the ALU against a reference model written
// with plain 64-bit arithmetic, over directed corner cases and random
// operands for every operation.
module tb_alu;
  import metal_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [63:0] a, b, y, exp;

  alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [63:0] ref_model(alu_op_e o, logic [63:0] x, logic [63:0] z);
    longint sx, sz;
    sx = x; sz = z;
    case (o)
      ALU_ADD:   return x + z;
      ALU_SUB:   return x - z;
      ALU_SLL:   return x << z[5:0];
      ALU_SLT:   return (sx < sz) ? 64'd1 : 64'd0;
      ALU_SLTU:  return (x < z) ? 64'd1 : 64'd0;
      ALU_XOR:   return x ^ z;
      ALU_SRL:   return x >> z[5:0];
      ALU_SRA:   return sx >>> z[5:0];
      ALU_OR:    return x | z;
      ALU_AND:   return x & z;
      default:   return z;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [63:0] x, logic [63:0] z);
    op = o; a = x; b = z;
    #1;
    exp = ref_model(o, x, z);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(ALU_SRA, 64'h8000_0000_0000_0000, 64'd63);
    check(ALU_SLT, 64'hffff_ffff_ffff_ffff, 64'd1);
    check(ALU_SLTU, 64'hffff_ffff_ffff_ffff, 64'd1);
    check(ALU_SUB, 64'd0, 64'd1);
    for (int i = 0; i < 11; i++) begin
      for (int k = 0; k < 200; k++) begin
        check(alu_op_e'(i), {$urandom, $urandom}, (k % 2) ? 64'($urandom % 64) : {$urandom, $urandom});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
