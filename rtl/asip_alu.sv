// asip_alu: 16 bit ALU of the ASIP. All operations are read-modify-write:
// rd = rd op b, where b is REG_DATA[rs] or the 16 bit immediate. It works in
// the E1 stage and is combinational; the core writes the result at the end
// of E1. The width and the read-modify-write form follow the architecture;
// the operation list is this design's choice (a compact integer set plus
// compare operations whose 0/1 results feed conditional branches).
module asip_alu
  import asip_pkg::*;
(
  input  alu_op_e op,
  input  data_t   a,        // REG_DATA[rd]
  input  data_t   b,        // REG_DATA[rs] or immediate
  output logic    we,       // result is written back
  output data_t   y
);

  always_comb begin
    we = 1'b1;
    y  = a;
    unique case (op)
      ALU_NOP: we = 1'b0;
      ALU_MOV: y = b;
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SHL: y = a << b[3:0];
      ALU_SHR: y = a >> b[3:0];
      ALU_SEQ: y = data_t'(a == b);
      ALU_SLT: y = data_t'(a < b);
      default: we = 1'b0;
    endcase
  end

endmodule
