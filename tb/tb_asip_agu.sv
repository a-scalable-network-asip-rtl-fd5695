// tb_asip_agu: checks the three addressing modes of the AGU (immediate,
// post-increment, indexed immediate) and the "no address" mode against
// arithmetic done in the testbench, over random pointers and offsets.
module tb_asip_agu;
  import asip_pkg::*;
  agu_f_t f;
  ptr_t ptr, imm, addr, wd;
  logic active, we;
  int checks = 0, failures = 0;

  asip_agu dut (.f, .ptr, .imm, .active, .addr, .ptr_we(we), .ptr_wdata(wd));

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s mode=%0d ptr=%h off=%h", m, f.mode, ptr, f.off); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int soff;
      f.mode = agu_mode_e'(t % 4);
      f.ptr  = 3'($urandom);
      f.off  = 5'($urandom);
      ptr    = ptr_t'($urandom);
      imm    = ptr_t'($urandom);
      soff   = (f.off >= 16) ? int'(f.off) - 32 : int'(f.off);
      #1;
      case (f.mode)
        AGU_NONE: begin chk(!active, "none active"); chk(!we, "none we"); end
        AGU_IMM: begin chk(active && addr == imm, "imm addr"); chk(!we, "imm we"); end
        AGU_POSTINC: begin
          chk(active && addr == ptr, "postinc addr");
          chk(we && wd == ptr_t'(int'(ptr) + soff), "postinc update");
        end
        AGU_INDEX: begin
          chk(active && addr == ptr_t'(int'(ptr) + soff), "index addr");
          chk(!we, "index we");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
