// tb_alu: random and corner-case test of the ALU. Expected values are
// computed here from the instruction semantics (two's-complement add and
// subtract, bitwise logic, signed/unsigned compare, shifts by a[4:0], LUI).
`timescale 1ns/1ps
module tb_alu;
  import mips150_pkg::*;
  alu_op_t op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [31:0] model(alu_op_t o, logic [31:0] x, logic [31:0] z);
    longint sx, sz;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    case (o)
      ALU_ADD:  return 32'(x + z);
      ALU_SUB:  return 32'(x + ~z + 1);
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~x & ~z;
      ALU_SLT:  return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU: return ({1'b0, x} < {1'b0, z}) ? 32'd1 : 32'd0;
      ALU_SLL:  begin logic [31:0] r; r = z; repeat (x[4:0]) r = {r[30:0], 1'b0}; return r; end
      ALU_SRL:  begin logic [31:0] r; r = z; repeat (x[4:0]) r = {1'b0, r[31:1]}; return r; end
      ALU_SRA:  begin logic [31:0] r; r = z; repeat (x[4:0]) r = {r[31], r[31:1]}; return r; end
      default:  return {z[15:0], 16'h0};
    endcase
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h1f};
    for (int o = 0; o <= int'(ALU_LUI); o++) begin
      op = alu_op_t'(o);
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          a = corners[i]; b = corners[j]; #1;
          checks++;
          if (y !== model(op, a, b)) begin
            failures++;
            $display("FAIL %s a=%h b=%h y=%h", op.name(), a, b, y);
          end
        end
      for (int k = 0; k < 400; k++) begin
        a = $urandom; b = $urandom; #1;
        checks++;
        if (y !== model(op, a, b)) begin
          failures++;
          $display("FAIL %s a=%h b=%h y=%h", op.name(), a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
