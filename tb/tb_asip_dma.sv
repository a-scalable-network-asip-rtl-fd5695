// tb_asip_dma: checks one DMA engine attached to a dual-ported memory.
// Random write commands fill regions of the memory from a valid/ready
// stream with random gaps; read commands stream them back under random
// back-pressure. Every word read must match what was written, the done
// pulse must come once per command, and with a source and sink that never
// stall a command of N words must take N cycles of streaming (one 64 bit
// word per clock).
module tb_asip_dma;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, cmd_write, done;
  logic [8:0] cmd_addr;
  logic [9:0] cmd_len;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [63:0] s_data, m_data;
  logic b_en, b_we;
  logic [8:0] b_addr;
  logic [7:0] b_be;
  logic [63:0] b_wdata, b_rdata;
  logic [63:0] ref_m [512];
  int checks = 0, failures = 0;
  int dones = 0;

  asip_dma dut (.*);
  asip_dpram mem (.clk, .clk_env(clk), .a_en(1'b0), .a_we(1'b0), .a_addr('0), .a_size(SZ8),
                  .a_wdata('0), .a_rdata(),
                  .b_en, .b_we, .b_addr, .b_be, .b_wdata, .b_rdata);
  always #5 clk = ~clk;
  always @(posedge clk) if (done) dones++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(logic wr, int addr, int len, int gap_pct);
    int got, cyc, d0;
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_addr = 9'(addr); cmd_len = 10'(len);
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0;
    d0 = dones;
    got = 0; cyc = 0;
    while (got < len) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      s_valid = wr && ($urandom_range(0, 99) >= gap_pct);
      s_data = v;
      m_ready = !wr && ($urandom_range(0, 99) >= gap_pct);
      @(posedge clk);
      cyc++;
      if (s_valid && s_ready) begin ref_m[addr + got] = v; got++; end
      if (m_valid && m_ready) begin
        checks++;
        if (m_data !== ref_m[addr + got]) begin
          failures++; $display("FAIL read word %0d: %h vs %h", addr + got, m_data, ref_m[addr + got]);
        end
        got++;
      end
      @(negedge clk);
    end
    s_valid = 0; m_ready = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (dones != d0 + 1) begin failures++; $display("FAIL done count %0d", dones - d0); end
    if (gap_pct == 0) begin
      checks++;
      if (cyc > len + 1) begin failures++; $display("FAIL rate: %0d words in %0d cycles", len, cyc); end
    end
  endtask

  initial begin
    cmd_valid = 0; cmd_write = 0; cmd_addr = 0; cmd_len = 0;
    s_valid = 0; s_data = 0; m_ready = 0;
    #12 rst_n = 1;
    command(1, 0, 512, 0);
    command(0, 0, 512, 0);
    for (int t = 0; t < 30; t++) begin
      int a, l;
      a = $urandom_range(0, 500);
      l = $urandom_range(1, 512 - a);
      command(1, a, l, 30);
      command(0, $urandom_range(0, 400), 50, 40);
      command(0, a, l, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
