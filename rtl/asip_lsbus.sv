// asip_lsbus: the 32 bit Load/Store bus. Any storage can drive it and any
// storage can take from it; one transfer per instruction, in E1. This block
// is the source multiplexer: it puts the selected storage's value on the
// bus, zero-extended. REG_CSUM is read inverted, because packet headers
// carry the bitwise inverse of the checksum sum. The set of sources follows
// the data path (IOM, PKM, DM/TKM, REG_PTR, REG_DATA, REG_CSUM, 16 bit
// immediate); zero extension is this design's choice.
module asip_lsbus
  import asip_pkg::*;
(
  input  ls_src_e src,
  input  bus_t    pkm_rdata,
  input  bus_t    dm_rdata,
  input  bus_t    iom_rdata,
  input  data_t   rdata_val,
  input  ptr_t    rptr_val,
  input  data_t   rcsum_val,
  input  data_t   imm16,
  output logic    active,
  output bus_t    bus
);

  always_comb begin
    active = 1'b1;
    unique case (src)
      SRC_NONE:  begin bus = '0; active = 1'b0; end
      SRC_PKM:   bus = pkm_rdata;
      SRC_DM:    bus = dm_rdata;
      SRC_IOM:   bus = iom_rdata;
      SRC_RDATA: bus = bus_t'(rdata_val);
      SRC_RPTR:  bus = bus_t'(rptr_val);
      SRC_RCSUM: bus = bus_t'(data_t'(~rcsum_val));
      SRC_IMM:   bus = bus_t'(imm16);
    endcase
  end

endmodule
