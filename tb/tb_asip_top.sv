// tb_asip_top: end-to-end test of the processing tile at its default sizes.
// The ASIP clock and the environment clock run at different rates (5:3),
// so every hand-off crosses the tile's clock-domain boundary.
//
// The tile runs a packet-manipulation program (replace both MAC addresses
// with values from the ticket, decrement the IPv4 TTL, update the IPv4
// header checksum incrementally) selected per packet by an action byte in
// the ticket: 0 = modify, 1 = only tag the ticket, other = leave untouched.
// The environment streams packets and tickets into the free banks through
// the two DMA engines, signals load_done, and reads each finished packet
// and ticket back while the ASIP already works on the next one. Every
// returned packet is compared with a reference made in the testbench, the
// returned IPv4 checksum is recomputed from scratch, and the run length of
// each packet is compared with the hand-counted cycle count (19 cycles for a
// modified packet, 10 for a tagged one, both inside the 80 cycle budget of
// one gigabit Ethernet port at 120 MHz).
//
// Mechanisms that must each occur at least once: bank switch, restart,
// halt, result hand-back, load arriving while the ASIP is busy, structural
// stall, taken stalling branch, delayed-branch slot, switch to either target and fall-through,
// read-before-write checksum update, memory-mapped IO write, DMA
// back-pressure.
module tb_asip_top;
  import asip_pkg::*;
  import asip_asm_pkg::*;

  localparam int NPKT = 40;
  localparam int PKT_WORDS = 8;   // 64 byte frames
  localparam int TKT_WORDS = 2;   // 16 byte tickets

  logic clk = 0, clk_env = 0, rst_n = 0;
  logic pm_we = 0; logic [7:0] pm_waddr = 0; logic [71:0] pm_wdata = 0;
  logic pkm_cmd_valid = 0, pkm_cmd_ready, pkm_cmd_write = 0, pkm_done;
  logic [8:0] pkm_cmd_addr = 0; logic [9:0] pkm_cmd_len = 0;
  logic pkm_s_valid = 0, pkm_s_ready, pkm_m_valid, pkm_m_ready = 0;
  logic [63:0] pkm_s_data = 0, pkm_m_data;
  logic tkm_cmd_valid = 0, tkm_cmd_ready, tkm_cmd_write = 0, tkm_done;
  logic [8:0] tkm_cmd_addr = 0; logic [9:0] tkm_cmd_len = 0;
  logic tkm_s_valid = 0, tkm_s_ready, tkm_m_valid, tkm_m_ready = 0;
  logic [63:0] tkm_s_data = 0, tkm_m_data;
  logic load_done = 0, result_valid, free_bank, busy;
  logic io_re, io_we;
  logic [11:0] io_raddr, io_waddr;
  logic [31:0] io_rdata = 0, io_wdata;
  logic halted, bank_sel, ev_stall, ev_branch_taken, ev_squash;
  int checks = 0, failures = 0;

  asip_top dut (.*);
  always #5 clk = ~clk;          // ASIP clock
  always #3 clk_env = ~clk_env;  // environment clock, 5:3 faster

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------------------------------------------------------- events
  int n_bank_sw = 0, n_restart = 0, n_halt = 0, n_result = 0, n_load_busy = 0;
  int n_stall = 0, n_slot = 0, n_sw0 = 0, n_sw1 = 0, n_swfall = 0, n_rbw = 0;
  int n_io = 0, n_bp = 0, n_sqbr = 0;
  logic prev_bank = 0, prev_halted = 1;
  int cyc_cnt = 0; logic timing = 0; int last_run = 0;
  logic [7:0] io_seen [$];
  always @(posedge clk_env) if (rst_n) begin
    if (result_valid) n_result++;
    if (load_done && busy) n_load_busy++;
    if ((pkm_m_valid && !pkm_m_ready) || (tkm_m_valid && !tkm_m_ready)) n_bp++;
  end
  always @(posedge clk) if (rst_n) begin
    if (bank_sel != prev_bank) n_bank_sw++;
    prev_bank = bank_sel;
    if (halted && !prev_halted) n_halt++;
    prev_halted = halted;
    if (dut.restart) n_restart++;
    if (ev_stall) n_stall++;
    if (ev_squash && dut.u_core.id_pc == 8'd7) n_sqbr++;
    if (dut.u_core.id_valid && dut.u_core.running && dut.u_core.id_pc == 8'd4) n_slot++;
    if (dut.u_core.id_valid && dut.u_core.running && dut.u_core.id_pc == 8'd3 && !ev_stall) begin
      if (!ev_branch_taken) n_swfall++;
      else if (dut.u_core.target == 8'd24) n_sw0++;
      else n_sw1++;
    end
    if (dut.u_core.e2_rbw_pkm && dut.u_core.u_csum.ctl2_q.en1) n_rbw++;
    if (io_we) begin n_io++; io_seen.push_back(io_wdata[7:0]); end
    // run length: cycles from restart to halted
    if (dut.restart) begin cyc_cnt = 0; timing = 1; end
    else if (timing) begin
      cyc_cnt++;
      if (halted) begin last_run = cyc_cnt; timing = 0; end
    end
  end

  // ---------------------------------------------------------------- program
  task automatic put(int a, instr_t w);
    @(negedge clk); pm_we = 1; pm_waddr = 8'(a); pm_wdata = w;
    @(negedge clk); pm_we = 0;
  endtask

  task automatic load_program();
    for (int a = 0; a < 48; a++) put(a, '0);
    put(0,  mv(SRC_DM, DST_RDATA, SZ8, 0, 1) | agu1(AGU_IMM, 0) | imm(12)); // r1 = action
    put(1,  mv(SRC_IMM, DST_RPTR, SZ16, 0, 0) | imm(0));                    // p0 = 0
    put(2,  mv(SRC_IMM, DST_RPTR, SZ16, 0, 1) | imm(0));                    // p1 = 0
    put(3,  br(BR_SWITCH, 1, 24, 40, 1));                                   // delayed switch
    put(4,  mv(SRC_PKM, DST_RCSUM, SZ16, 0, 1) | agu1(AGU_IMM, 0) | imm(24)); // slot: csum1 = ~HC
    // other actions: wait loop of ticket[13] rounds, packet untouched
    put(5,  mv(SRC_DM, DST_RDATA, SZ8, 0, 2) | agu1(AGU_IMM, 0) | imm(13)); // r2 = count
    put(6,  alui(ALU_SUB, 2, 1));
    put(7,  br(BR_BNZ, 2, 6));                                              // stalling branch
    put(8,  halt());
    // action 0: replace MACs, decrement TTL, update the IPv4 checksum
    put(24, mv(SRC_DM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4));
    put(25, mv(SRC_DM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4));
    put(26, mv(SRC_DM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4));
    put(27, mv(SRC_PKM, DST_RDATA, SZ8, 0, 0) | agu1(AGU_IMM, 0) | imm(22)); // r0 = TTL (stalls)
    put(28, alui(ALU_SUB, 0, 1));
    put(29, mv(SRC_RDATA, DST_PKM, SZ8, 0, 0) | agu2(AGU_IMM, 0) | imm(22) | cs(0, 1, 1));
    put(30, mv(SRC_RDATA, DST_IOM, SZ16, 1, 0) | agu2(AGU_INDEX, 1, 0));    // statistics
    put(31, '0);
    put(32, mv(SRC_RCSUM, DST_PKM, SZ16, 1, 0) | agu2(AGU_IMM, 0) | imm(24) | halt());
    // action 1: tag the ticket
    put(40, mv(SRC_IMM, DST_DM, SZ16) | agu2(AGU_INDEX, 0, 14) | imm(16'hBEEF) | halt());
  endtask

  // ---------------------------------------------------------------- packets
  logic [7:0] pkt [NPKT+1][64];
  logic [7:0] tkt [NPKT+1][16];
  logic [7:0] exp_p [NPKT+1][64];
  logic [7:0] exp_t [NPKT+1][16];

  function automatic logic [15:0] ip_csum(logic [7:0] p [64]);
    int unsigned s = 0;
    for (int i = 14; i < 34; i += 2) if (i != 24) s += {p[i], p[i+1]};
    return ~16'(oc_fold(s));
  endfunction

  task automatic make_packet(int n);
    logic [7:0] p [64];
    for (int i = 0; i < 64; i++) p[i] = 8'($urandom);
    p[12] = 8'h08; p[13] = 8'h00; p[14] = 8'h45;
    p[22] = 8'($urandom_range(1, 255));
    {p[24], p[25]} = 16'h0;
    {p[24], p[25]} = ip_csum(p);
    pkt[n] = p;
    for (int i = 0; i < 16; i++) tkt[n][i] = 8'($urandom);
    tkt[n][12] = (n == NPKT) ? 8'd7 : 8'(n % 5 == 3 ? 1 : n % 7 == 5 ? 9 : 0);
    tkt[n][13] = (n == NPKT) ? 8'd1 : 8'($urandom_range(20, 40));
    exp_p[n] = p; exp_t[n] = tkt[n];
    if (tkt[n][12] == 0) begin
      for (int i = 0; i < 12; i++) exp_p[n][i] = tkt[n][i];
      exp_p[n][22] = p[22] - 1;
      {exp_p[n][24], exp_p[n][25]} = 16'h0;
      {exp_p[n][24], exp_p[n][25]} = ip_csum(exp_p[n]);
    end else if (tkt[n][12] == 1) begin
      exp_t[n][14] = 8'hBE; exp_t[n][15] = 8'hEF;
    end
  endtask

  task automatic dma_write_pkm(int waddr, int n);
    @(negedge clk_env); pkm_cmd_valid = 1; pkm_cmd_write = 1;
    pkm_cmd_addr = 9'(waddr); pkm_cmd_len = 10'(PKT_WORDS);
    @(negedge clk_env); pkm_cmd_valid = 0;
    for (int w = 0; w < PKT_WORDS; ) begin
      pkm_s_valid = 1;
      for (int k = 0; k < 8; k++) pkm_s_data[63-8*k -: 8] = pkt[n][8*w+k];
      @(posedge clk_env);
      if (pkm_s_ready) w++;
      @(negedge clk_env);
    end
    pkm_s_valid = 0;
  endtask

  task automatic dma_write_tkm(int waddr, int n);
    @(negedge clk_env); tkm_cmd_valid = 1; tkm_cmd_write = 1;
    tkm_cmd_addr = 9'(waddr); tkm_cmd_len = 10'(TKT_WORDS);
    @(negedge clk_env); tkm_cmd_valid = 0;
    for (int w = 0; w < TKT_WORDS; ) begin
      tkm_s_valid = 1;
      for (int k = 0; k < 8; k++) tkm_s_data[63-8*k -: 8] = tkt[n][8*w+k];
      @(posedge clk_env);
      if (tkm_s_ready) w++;
      @(negedge clk_env);
    end
    tkm_s_valid = 0;
  endtask

  task automatic dma_read_check(int bank, int n);
    logic [7:0] got_p [64];
    logic [7:0] got_t [16];
    @(negedge clk_env); pkm_cmd_valid = 1; pkm_cmd_write = 0;
    pkm_cmd_addr = 9'(bank * 256); pkm_cmd_len = 10'(PKT_WORDS);
    @(negedge clk_env); pkm_cmd_valid = 0;
    for (int w = 0; w < PKT_WORDS; ) begin
      pkm_m_ready = 1'($urandom);
      @(posedge clk_env);
      if (pkm_m_valid && pkm_m_ready) begin
        for (int k = 0; k < 8; k++) got_p[8*w+k] = pkm_m_data[63-8*k -: 8];
        w++;
      end
      @(negedge clk_env);
    end
    pkm_m_ready = 0;
    @(negedge clk_env); tkm_cmd_valid = 1; tkm_cmd_write = 0;
    tkm_cmd_addr = 9'(bank * 16); tkm_cmd_len = 10'(TKT_WORDS);
    @(negedge clk_env); tkm_cmd_valid = 0;
    for (int w = 0; w < TKT_WORDS; ) begin
      tkm_m_ready = 1'($urandom);
      @(posedge clk_env);
      if (tkm_m_valid && tkm_m_ready) begin
        for (int k = 0; k < 8; k++) got_t[8*w+k] = tkm_m_data[63-8*k -: 8];
        w++;
      end
      @(negedge clk_env);
    end
    tkm_m_ready = 0;
    chk(got_p == exp_p[n], $sformatf("packet %0d contents", n));
    chk(got_t == exp_t[n], $sformatf("ticket %0d contents", n));
    chk({got_p[24], got_p[25]} == ip_csum(got_p), $sformatf("packet %0d IPv4 checksum", n));
  endtask

  // hand-counted run length, restart to halted: ID cycles plus 4 (the
  // restart cycle and the E1..E3 drain of the halt word)
  //   action 0: words 0-4, 24-26, 27 + stall, 28-32          15 ID cycles
  //   action 1: words 0-4, 40                                  6 ID cycles
  //   other:    words 0-5, c rounds of 6-7, c-1 squashed slots, 8: 3c+6
  function automatic int run_len(int n);
    if (tkt[n][12] == 0) return 19;
    if (tkt[n][12] == 1) return 10;
    return 3 * int'(tkt[n][13]) + 10;
  endfunction

  // ---------------------------------------------------------------- main
  initial begin
    int runs [NPKT+1];
    #12 rst_n = 1;
    load_program();
    for (int n = 0; n <= NPKT; n++) make_packet(n);
    for (int n = 0; n <= NPKT; n++) begin
      int fb;
      fb = free_bank;
      dma_write_pkm(fb * 256, n);
      dma_write_tkm(fb * 16, n);
      repeat (2) @(negedge clk_env);
      load_done = 1; @(negedge clk_env); load_done = 0;
      while (!dut.restart) @(negedge clk);
      @(negedge clk);
      while (free_bank == bank_sel) @(negedge clk_env);   // status crossing settles
      if (n > 0) begin
        // previous packet's run is finished (it halted before the switch)
        chk(last_run == run_len(n - 1), $sformatf("packet %0d ran %0d cycles, expected %0d",
            n - 1, last_run, run_len(n - 1)));
        if (tkt[n-1][12] <= 1) chk(last_run <= 80, "within the gigabit cycle budget");
        dma_read_check(1 - bank_sel, n - 1);
      end
      if (n % 4 == 0) repeat (40) @(negedge clk);   // sometimes let the ASIP halt first
    end
    chk(n_bank_sw > 0, "bank switch");
    chk(n_restart > 0, "restart");
    chk(n_halt > 0, "halt");
    chk(n_result > 0, "result hand-back");
    chk(n_load_busy > 0, "load while busy");
    chk(n_stall > 0, "structural stall");
    chk(n_slot > 0, "delayed slot executed");
    chk(n_sqbr > 0, "stalling branch squashed its slot");
    chk(n_sw0 > 0 && n_sw1 > 0 && n_swfall > 0, "switch targets and fall-through");
    chk(n_rbw > 0, "read-before-write checksum update");
    chk(n_io > 0 && io_seen.size() == n_io, "memory-mapped IO write");
    chk(n_bp > 0, "DMA back-pressure");
    $display("events: bank_sw=%0d restart=%0d halt=%0d result=%0d load_busy=%0d stall=%0d slot=%0d sw0=%0d sw1=%0d fall=%0d rbw=%0d io=%0d bp=%0d sqbr=%0d",
      n_bank_sw, n_restart, n_halt, n_result, n_load_busy, n_stall, n_slot, n_sw0, n_sw1, n_swfall, n_rbw, n_io, n_bp, n_sqbr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
