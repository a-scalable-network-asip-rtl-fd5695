// tb_asip_pmem: writes random 72 bit words into the program memory and reads
// them back, checking the one-cycle synchronous read latency.
module tb_asip_pmem;
  import asip_pkg::*;
  logic clk = 0;
  logic [7:0] raddr, waddr;
  instr_t rdata, wdata;
  logic we;
  logic [71:0] ref_m [256];
  int checks = 0, failures = 0;

  asip_pmem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = '0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = {$urandom, $urandom, $urandom};
      ref_m[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 600; t++) begin
      raddr = 8'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_m[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
