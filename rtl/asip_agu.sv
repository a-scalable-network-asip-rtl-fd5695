// asip_agu: address generation unit. The core has two: AGU1 makes source
// addresses, AGU2 destination addresses, both from the pointer register file
// REG_PTR (12 bit byte addresses).
//
// Addressing modes (all three are the ones the architecture names):
//   AGU_IMM     address = immediate
//   AGU_POSTINC address = pointer, pointer += signed offset
//   AGU_INDEX   address = pointer + signed offset (indexed immediate)
// Purely combinational; it works in the ID stage. ptr_we/ptr_wdata tell the
// core to write the incremented pointer back at the end of ID. The 5 bit
// signed offset field is this design's choice.
module asip_agu
  import asip_pkg::*;
(
  input  agu_f_t     f,
  input  ptr_t       ptr,      // value of REG_PTR[f.ptr]
  input  ptr_t       imm,      // absolute address for AGU_IMM
  output logic       active,   // an address is generated
  output ptr_t       addr,
  output logic       ptr_we,
  output ptr_t       ptr_wdata
);

  ptr_t off;
  assign off = ptr_t'(signed'(f.off));

  always_comb begin
    active    = 1'b1;
    addr      = ptr;
    ptr_we    = 1'b0;
    ptr_wdata = ptr + off;
    unique case (f.mode)
      AGU_NONE:    active = 1'b0;
      AGU_IMM:     addr = imm;
      AGU_POSTINC: ptr_we = 1'b1;
      AGU_INDEX:   addr = ptr + off;
    endcase
  end

endmodule
