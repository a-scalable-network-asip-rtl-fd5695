// asip_decoder: turns a 72 bit VLIW instruction word into the enables the
// pipeline stages use (the ID stage "generates various enable signals").
//
// A Load/Store bus transfer happens whenever the word names a source; the
// destination may be none, which lets the checksum engine sum memory
// contents without storing them. Memory sources are read in ID at the AGU1
// address, memory destinations written in E1 at the AGU2 address. All
// enables are forced low for an invalid (squashed or empty) slot.
// Combinational. The field layout and this decoding are this design's own.
module asip_decoder
  import asip_pkg::*;
(
  input  logic   valid,
  input  instr_t instr,
  output dec_t   dec
);

  logic x;
  assign x = valid && (instr.ls_src != SRC_NONE);

  always_comb begin
    dec          = '0;
    dec.xfer     = x;
    dec.rd_pkm   = x && instr.ls_src == SRC_PKM;
    dec.rd_dm    = x && instr.ls_src == SRC_DM;
    dec.rd_iom   = x && instr.ls_src == SRC_IOM;
    dec.wr_pkm   = x && instr.ls_dst == DST_PKM;
    dec.wr_dm    = x && instr.ls_dst == DST_DM;
    dec.wr_iom   = x && instr.ls_dst == DST_IOM;
    dec.wr_rdata = x && instr.ls_dst == DST_RDATA;
    dec.wr_rptr  = x && instr.ls_dst == DST_RPTR;
    dec.wr_rcsum = x && instr.ls_dst == DST_RCSUM;
    dec.branch   = valid && instr.br_op inside {BR_JMP, BR_BZ, BR_BNZ, BR_SWITCH};
    dec.halt     = valid && instr.br_op == BR_HALT;
  end

endmodule
