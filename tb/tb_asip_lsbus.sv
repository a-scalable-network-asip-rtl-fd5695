// tb_asip_lsbus: checks that the Load/Store bus carries the selected
// source, zero-extended, that REG_CSUM is read inverted and that no source
// leaves the bus idle at zero.
module tb_asip_lsbus;
  import asip_pkg::*;
  ls_src_e src;
  bus_t pkm, dm, iom, bus;
  data_t rd, rc, imm;
  ptr_t rp;
  logic active;
  int checks = 0, failures = 0;

  asip_lsbus dut (.src, .pkm_rdata(pkm), .dm_rdata(dm), .iom_rdata(iom),
                  .rdata_val(rd), .rptr_val(rp), .rcsum_val(rc), .imm16(imm),
                  .active, .bus);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      bus_t exp;
      src = ls_src_e'(t % 8);
      pkm = $urandom; dm = $urandom; iom = $urandom;
      rd = data_t'($urandom); rp = ptr_t'($urandom); rc = data_t'($urandom); imm = data_t'($urandom);
      case (src)
        SRC_NONE:  exp = 0;
        SRC_PKM:   exp = pkm;
        SRC_DM:    exp = dm;
        SRC_IOM:   exp = iom;
        SRC_RDATA: exp = {16'd0, rd};
        SRC_RPTR:  exp = {20'd0, rp};
        SRC_RCSUM: exp = {16'd0, ~rc};
        default:   exp = {16'd0, imm};
      endcase
      #1;
      checks++;
      if (bus !== exp || active !== (src != SRC_NONE)) begin
        failures++;
        $display("FAIL src=%0d bus=%h exp=%h", src, bus, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
