// tb_asip_regfile: checks the register file used for REG_DATA and REG_PTR
// against a reference array: reset to zero, random writes on several ports
// with highest-port-wins priority, asynchronous reads on every port.
module tb_asip_regfile;
  localparam int W = 16, D = 8, NR = 3, NW = 2;
  logic clk = 0, rst_n = 0;
  logic [NR-1:0][2:0]   raddr;
  logic [NR-1:0][W-1:0] rdata;
  logic [NW-1:0]        we;
  logic [NW-1:0][2:0]   waddr;
  logic [NW-1:0][W-1:0] wdata;
  logic [W-1:0] ref_m [D];
  int checks = 0, failures = 0;

  asip_regfile #(.WIDTH(W), .DEPTH(D), .NR(NR), .NW(NW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < D; i++) ref_m[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < D; i++) begin
      raddr[0] = 3'(i); #1;
      checks++; if (rdata[0] !== 0) failures++;
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        we[p] = 1'($urandom);
        waddr[p] = 3'($urandom);
        wdata[p] = W'($urandom);
      end
      if (t % 7 == 0) begin waddr[1] = waddr[0]; we = '1; end
      @(posedge clk);
      for (int p = 0; p < NW; p++) if (we[p]) ref_m[waddr[p]] = wdata[p];
      #1;
      for (int p = 0; p < NR; p++) raddr[p] = 3'($urandom);
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== ref_m[raddr[p]]) begin
          failures++;
          $display("mismatch port %0d reg %0d: %h vs %h", p, raddr[p], rdata[p], ref_m[raddr[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
