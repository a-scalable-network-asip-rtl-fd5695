// tb_asip_dpram: checks a 4 KiB dual-ported memory against a byte array.
// Port A (ASIP): random 8/16/32 bit reads and writes; a read returns the
// value one cycle later, a write returns the overwritten value one cycle
// later (read-before-write). Port B (DMA): 64 bit reads and writes with
// byte enables, interleaved with port A traffic on other addresses.
module tb_asip_dpram;
  import asip_pkg::*;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  ptr_t a_addr;
  size_e a_size;
  bus_t a_wdata, a_rdata;
  logic [8:0] b_addr;
  logic [7:0] b_be;
  logic [63:0] b_wdata, b_rdata;
  logic [7:0] mem [4096];
  int checks = 0, failures = 0;

  logic clk_env;
  assign clk_env = clk;   // both ports on one clock here; tb_asip_top runs two
  asip_dpram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bus_t model_rd(int a, size_e s);
    case (s)
      SZ8:  return {24'd0, mem[a]};
      SZ16: return {16'd0, mem[a], mem[a+1]};
      default: return {mem[a], mem[a+1], mem[a+2], mem[a+3]};
    endcase
  endfunction

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; a_size = SZ8;
    a_wdata = 0; b_addr = 0; b_be = 0; b_wdata = 0;
    // fill through port B
    for (int w = 0; w < 512; w++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_be = 8'hFF; b_addr = 9'(w);
      b_wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) mem[8*w+k] = b_wdata[63-8*k -: 8];
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int t = 0; t < 4000; t++) begin
      int a, w;
      bus_t exp;
      @(negedge clk);
      a_size = size_e'($urandom_range(0, 2));
      a = $urandom_range(0, 2043);       // port A in the low half
      if (a_size == SZ32) a = a & ~1;
      a_addr = ptr_t'(a); a_en = 1; a_we = 1'($urandom); a_wdata = $urandom;
      exp = model_rd(a, a_size);
      w = $urandom_range(256, 511);      // port B in the high half
      b_en = 1'($urandom); b_we = 1'($urandom); b_addr = 9'(w);
      b_be = 8'($urandom); b_wdata = {$urandom, $urandom};
      @(posedge clk);
      begin
        logic [63:0] bexp;
        for (int k = 0; k < 8; k++) bexp[63-8*k -: 8] = mem[8*w+k];
        if (a_we) case (a_size)
          SZ8:  mem[a] = a_wdata[7:0];
          SZ16: begin mem[a] = a_wdata[15:8]; mem[a+1] = a_wdata[7:0]; end
          default: for (int k = 0; k < 4; k++) mem[a+k] = a_wdata[31-8*k -: 8];
        endcase
        if (b_en && b_we) for (int k = 0; k < 8; k++)
          if (b_be[7-k]) mem[8*w+k] = b_wdata[63-8*k -: 8];
        #1;
        checks++;
        if (a_rdata !== exp) begin
          failures++; $display("FAIL A a=%0d sz=%0d we=%b %h vs %h", a, a_size, a_we, a_rdata, exp);
        end
        if (b_en) begin
          checks++;
          if (b_rdata !== bexp) begin failures++; $display("FAIL B w=%0d", w); end
        end
      end
    end
    // final sweep through port B
    @(negedge clk); a_en = 0;
    for (int w = 0; w < 512; w++) begin
      logic [63:0] bexp;
      @(negedge clk); b_en = 1; b_we = 0; b_addr = 9'(w);
      for (int k = 0; k < 8; k++) bexp[63-8*k -: 8] = mem[8*w+k];
      @(posedge clk); #1;
      checks++;
      if (b_rdata !== bexp) begin failures++; $display("FAIL sweep w=%0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
