// tb_asip_ctrl: checks the bank controller with a small model of the ASIP
// (halted drops the cycle after restart and rises again a random number of
// cycles later). Checked: the ASIP only starts when a bank has been loaded,
// every start flips bank_sel and gives exactly one restart pulse,
// result_valid follows every start except the first, free_bank is always
// the bank the ASIP is not using, and a load that arrives while the ASIP
// runs is held until it halts.
module tb_asip_ctrl;
  logic clk = 0, rst_n = 0;
  logic load_done, result_valid, free_bank, busy, bank_sel, restart, halted;
  int checks = 0, failures = 0;
  int run_left;

  asip_ctrl dut (.*);
  always #5 clk = ~clk;

  // ASIP model
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin halted <= 1; run_left <= 0; end
    else if (restart) begin halted <= 0; run_left <= $urandom_range(3, 30); end
    else if (!halted) begin
      if (run_left == 0) halted <= 1; else run_left <= run_left - 1;
    end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int starts = 0, results = 0, restarts = 0;
  logic prev_bank;
  always @(posedge clk) if (rst_n) begin
    if (restart) restarts++;
    if (result_valid) results++;
    checks++;
    if (free_bank !== !bank_sel) failures++;
  end

  initial begin
    load_done = 0;
    #12 rst_n = 1;
    repeat (20) @(posedge clk);
    checks++; if (restarts != 0) begin failures++; $display("FAIL start without load"); end
    for (int p = 0; p < 100; p++) begin
      @(negedge clk);
      prev_bank = bank_sel;
      load_done = 1;
      @(negedge clk); load_done = 0;
      // wait for the start caused by this load
      while (!restart) @(negedge clk);
      starts++;
      checks++; if (bank_sel === prev_bank) begin failures++; $display("FAIL no bank flip"); end
      @(negedge clk);
      checks++; if (restart) begin failures++; $display("FAIL restart longer than a cycle"); end
      checks++; if (!busy) begin failures++; $display("FAIL not busy"); end
      // sometimes load the next one while running
      if (p % 3 == 0) begin
        repeat (2) @(negedge clk);
        prev_bank = bank_sel;
        load_done = 1; @(negedge clk); load_done = 0;
        while (!restart) @(negedge clk);
        starts++;
        checks++; if (bank_sel === prev_bank) begin failures++; $display("FAIL held load"); end
        @(negedge clk);
      end
      while (!halted) @(negedge clk);
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (restarts != starts || results != starts - 1) begin
      failures++; $display("FAIL counts restarts=%0d starts=%0d results=%0d", restarts, starts, results);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
