// tb_asip_alu: checks every ALU operation on random 16 bit operands against
// a reference model written with plain integer arithmetic.
module tb_asip_alu;
  import asip_pkg::*;
  alu_op_e op;
  data_t a, b, y;
  logic we;
  int checks = 0, failures = 0;

  asip_alu dut (.op, .a, .b, .we, .y);

  function automatic int unsigned model(alu_op_e o, int unsigned x, int unsigned z);
    case (o)
      ALU_MOV: return z;
      ALU_ADD: return (x + z) & 16'hFFFF;
      ALU_SUB: return (x - z) & 16'hFFFF;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;
      ALU_SHL: return (x << (z % 16)) & 16'hFFFF;
      ALU_SHR: return x >> (z % 16);
      ALU_SEQ: return (x == z) ? 1 : 0;
      ALU_SLT: return (x < z) ? 1 : 0;
      default: return x;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1100; t++) begin
      op = alu_op_e'(t % 11);
      a = data_t'($urandom);
      b = (t % 5 == 0) ? a : data_t'($urandom);
      #1;
      checks++;
      if (op == ALU_NOP) begin
        if (we) failures++;
      end else if (!we || y != data_t'(model(op, a, b))) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h y=%h", op, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
