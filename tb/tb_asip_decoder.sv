// tb_asip_decoder: checks the enables decoded from random instruction words
// against the field meanings: transfers need a source, memory reads and
// writes follow source and destination, branch and halt follow br_op, and a
// squashed slot decodes to nothing.
module tb_asip_decoder;
  import asip_pkg::*;
  logic valid;
  instr_t instr;
  dec_t dec;
  int checks = 0, failures = 0;

  asip_decoder dut (.valid, .instr, .dec);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      dec_t e;
      logic x;
      instr = {$urandom, $urandom, $urandom};
      instr.br_op  = br_op_e'($urandom_range(0, 5));
      instr.ls_dst = ls_dst_e'($urandom_range(0, 6));
      valid = (t % 4 != 0);
      x = valid && instr.ls_src != SRC_NONE;
      e = '0;
      e.xfer = x;
      e.rd_pkm = x && instr.ls_src == SRC_PKM;
      e.rd_dm  = x && instr.ls_src == SRC_DM;
      e.rd_iom = x && instr.ls_src == SRC_IOM;
      e.wr_pkm = x && instr.ls_dst == DST_PKM;
      e.wr_dm  = x && instr.ls_dst == DST_DM;
      e.wr_iom = x && instr.ls_dst == DST_IOM;
      e.wr_rdata = x && instr.ls_dst == DST_RDATA;
      e.wr_rptr  = x && instr.ls_dst == DST_RPTR;
      e.wr_rcsum = x && instr.ls_dst == DST_RCSUM;
      e.branch = valid && (instr.br_op == BR_JMP || instr.br_op == BR_BZ ||
                           instr.br_op == BR_BNZ || instr.br_op == BR_SWITCH);
      e.halt = valid && instr.br_op == BR_HALT;
      #1;
      checks++;
      if (dec !== e) begin failures++; $display("FAIL %h: %b vs %b", instr, dec, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
