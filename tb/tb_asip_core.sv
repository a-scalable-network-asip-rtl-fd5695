// tb_asip_core: runs a hand-written program on the ASIP core with its
// program memory, packet memory, ticket/data memory and a memory-mapped IO
// peripheral model, once on bank 0 and once on bank 1. The program covers:
// immediate moves into REG_PTR, a post-increment copy loop PKM -> DM closed
// by a conditional branch that needs the ALU result of the word before
// (forwarding), a 32 bit PKM -> PKM copy followed by a PKM read (one-cycle
// structural stall), IO read and write, a two-target switch jump, a delayed
// branch (slot executes) and a stalling branch (slot squashed), a fresh
// checksum over packet bytes in REG_CSUM[0], an incremental update through
// the Read-Before-Write bus in REG_CSUM[1], a ticket write (banked) and halt.
// Expected memory contents are computed in the testbench from the packet
// bytes it loaded. The run length in cycles, the stall count and the
// number of squashed slots are checked against hand-counted values.
module tb_asip_core;
  import asip_pkg::*;
  import asip_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic bank_sel = 0, restart = 0, halted;
  pc_t pm_raddr;
  instr_t pm_rdata;
  logic pm_we = 0; pc_t pm_waddr = 0; instr_t pm_wdata = '0;
  logic pkm_en, pkm_we, dm_en, dm_we;
  ptr_t pkm_addr, dm_addr;
  size_e pkm_size, dm_size;
  bus_t pkm_wdata, pkm_rdata, dm_wdata, dm_rdata;
  logic io_re, io_we;
  ptr_t io_raddr, io_waddr;
  bus_t io_rdata, io_wdata;
  logic ev_stall, ev_branch_taken, ev_squash;
  logic pb_en = 0, pb_we = 0, db_en = 0, db_we = 0;
  logic [8:0] pb_addr = 0, db_addr = 0;
  logic [63:0] pb_wdata = 0, pb_rdata, db_wdata = 0, db_rdata;
  int checks = 0, failures = 0;

  asip_core dut (.*);
  asip_pmem pm (.clk, .raddr(pm_raddr), .rdata(pm_rdata), .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata));
  asip_dpram pkm (.clk, .clk_env(clk), .a_en(pkm_en), .a_we(pkm_we), .a_addr(pkm_addr), .a_size(pkm_size),
                  .a_wdata(pkm_wdata), .a_rdata(pkm_rdata), .b_en(pb_en), .b_we(pb_we),
                  .b_addr(pb_addr), .b_be(8'hFF), .b_wdata(pb_wdata), .b_rdata(pb_rdata));
  asip_dpram dmm (.clk, .clk_env(clk), .a_en(dm_en), .a_we(dm_we), .a_addr(dm_addr), .a_size(dm_size),
                  .a_wdata(dm_wdata), .a_rdata(dm_rdata), .b_en(db_en), .b_we(db_we),
                  .b_addr(db_addr), .b_be(8'hFF), .b_wdata(db_wdata), .b_rdata(db_rdata));

  always #5 clk = ~clk;

  // IO peripheral model: read data one cycle after the address
  bus_t io_last_w; ptr_t io_last_wa; int io_writes = 0;
  always_ff @(posedge clk) begin
    if (io_re) io_rdata <= 32'h0001_0000 + 32'(io_raddr) * 3;
    if (io_we) begin io_last_w <= io_wdata; io_last_wa <= io_waddr; io_writes++; end
  end
  int stalls = 0, squashes = 0;
  always @(posedge clk) begin
    if (ev_stall) stalls++;
    if (ev_squash) squashes++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] pk [4096];
  logic [7:0] dmb [4096];

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic put(int a, instr_t w);
    @(negedge clk); pm_we = 1; pm_waddr = pc_t'(a); pm_wdata = w;
    @(negedge clk); pm_we = 0;
  endtask

  task automatic load_program();
    for (int a = 0; a < 64; a++) put(a, '0);
    put(0,  mv(SRC_IMM, DST_RPTR, SZ16, 0, 0) | imm(16'h0100));   // p0 = 0x100
    put(1,  alui(ALU_MOV, 1, 3));                                 // r1 = 3
    put(2,  mv(SRC_IMM, DST_RPTR, SZ16, 0, 1) | imm(4));          // p1 = 4
    put(3,  mv(SRC_PKM, DST_DM, SZ16) | agu1(AGU_POSTINC, 1, 2) | agu2(AGU_POSTINC, 0, 2)
            | alui(ALU_SUB, 1, 1));
    put(4,  br(BR_BNZ, 1, 3));
    put(5,  mv(SRC_PKM, DST_PKM, SZ32) | agu1(AGU_INDEX, 1, 0) | agu2(AGU_POSTINC, 2, 4)
            | alui(ALU_MOV, 7, 0));
    put(6,  mv(SRC_PKM, DST_RDATA, SZ16, 0, 3) | agu1(AGU_INDEX, 1, 4));
    put(7,  mv(SRC_RDATA, DST_DM, SZ16, 3, 0) | agu2(AGU_IMM, 0) | imm(16'h0200));
    put(8,  mv(SRC_IOM, DST_RDATA, SZ32, 0, 4) | agu1(AGU_IMM, 0) | imm(16'h0010));
    put(9,  mv(SRC_RDATA, DST_IOM, SZ16, 4, 0) | agu2(AGU_IMM, 0) | imm(16'h0020));
    put(10, alui(ALU_MOV, 5, 1));
    put(11, br(BR_SWITCH, 5, 20, 30));
    put(20, alui(ALU_MOV, 6, 16'h0BAD));
    put(21, br(BR_JMP, 0, 31));
    put(30, alui(ALU_MOV, 6, 16'h600D));
    put(31, br(BR_JMP, 0, 40, 0, 1));                             // delayed
    put(32, alui(ALU_ADD, 7, 1));                                 // slot: executes
    put(33, alui(ALU_ADD, 7, 16'h10));                            // skipped
    put(40, br(BR_JMP, 0, 42));                                   // stalling
    put(41, alui(ALU_ADD, 7, 16'h100));                           // squashed
    put(42, mv(SRC_RDATA, DST_DM, SZ16, 6, 0) | agu2(AGU_INDEX, 0, 0));
    put(43, mv(SRC_RDATA, DST_DM, SZ16, 7, 0) | agu2(AGU_INDEX, 0, 2));
    put(44, mv(SRC_IMM, DST_RCSUM, SZ16, 0, 0) | imm(16'hFFFF));  // csum0 = 0
    put(45, mv(SRC_PKM, DST_NONE, SZ32) | agu1(AGU_IMM, 0) | imm(16'h0040) | cs(1, 0));
    put(46, mv(SRC_PKM, DST_NONE, SZ16) | agu1(AGU_IMM, 0) | imm(16'h0044) | cs(1, 0));
    put(47, mv(SRC_IMM, DST_RCSUM, SZ16, 0, 1) | imm(16'hFFFF));  // csum1 = 0
    put(48, mv(SRC_IMM, DST_RPTR, SZ16, 0, 4) | imm(16'h0050));   // p4 = 0x50
    put(49, mv(SRC_RCSUM, DST_DM, SZ16, 0, 0) | agu2(AGU_IMM, 0) | imm(16'h020A));
    put(50, mv(SRC_IMM, DST_PKM, SZ16) | agu2(AGU_INDEX, 4, 0) | imm(16'h1234) | cs(0, 1));
    put(51, mv(SRC_RDATA, DST_DM, SZ16, 3, 0) | agu2(AGU_IMM, 0) | imm(16'h0010)); // ticket
    put(52, '0);
    put(53, mv(SRC_RCSUM, DST_DM, SZ16, 1, 0) | agu2(AGU_IMM, 0) | imm(16'h020C) | halt());
  endtask

  task automatic run_and_check(int bank);
    int base, cyc, st0, sq0, iow0;
    int unsigned s;
    base = bank * 2048;
    for (int i = 0; i < 2048; i++) pk[base + i] = 8'($urandom);
    for (int w = 0; w < 256; w++) begin
      @(negedge clk); pb_en = 1; pb_we = 1; pb_addr = 9'(base / 8 + w);
      for (int k = 0; k < 8; k++) pb_wdata[63-8*k -: 8] = pk[base + 8*w + k];
    end
    @(negedge clk); pb_en = 0; pb_we = 0;
    bank_sel = 1'(bank);
    st0 = stalls; sq0 = squashes; iow0 = io_writes;
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    cyc = 1;
    while (!halted) begin @(negedge clk); cyc++; end
    // hand count of ID cycles: words 0-2 (3), loop words 3,4 three times (6),
    // two squashed slots after the taken stalling branch (2), word 5 (1),
    // word 6 plus one stall (2), words 7-11 (5), switch slot (1), words 30-32
    // (3), word 40 and its squashed slot (2), words 42-53 (12): 37 cycles,
    // then E1, E2, E3 drain the halt word: halted is seen in cycle 41.
    chk(cyc == 41, $sformatf("run length %0d cycles, expected 41", cyc));
    chk(stalls - st0 == 1, $sformatf("stalls %0d", stalls - st0));
    chk(squashes - sq0 == 5, $sformatf("squashes %0d", squashes - sq0));
    // read DM back through port B
    for (int w = 0; w < 512; w++) begin
      @(negedge clk); db_en = 1; db_addr = 9'(w);
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++) dmb[8*w+k] = db_rdata[63-8*k -: 8];
    end
    @(negedge clk); db_en = 0;
    for (int i = 0; i < 6; i++)
      chk(dmb[16'h100 + i] == pk[base + 4 + i], $sformatf("copy loop byte %0d", i));
    chk({dmb[16'h200], dmb[16'h201]} == {pk[base + 14], pk[base + 15]}, "read after stalled copy");
    chk(io_writes - iow0 == 1 && io_last_wa == 12'h020 &&
        io_last_w == (32'h0000_FFFF & (32'h0001_0000 + 32'h10 * 3)), "io round trip");
    chk({dmb[16'h106], dmb[16'h107]} == 16'h600D, "switch target");
    chk({dmb[16'h108], dmb[16'h109]} == 16'h0001, "delayed/stalling branch slots");
    s = {pk[base+16'h40], pk[base+16'h41]} + {pk[base+16'h42], pk[base+16'h43]} +
        {pk[base+16'h44], pk[base+16'h45]};
    chk({dmb[16'h20A], dmb[16'h20B]} == ~16'(oc_fold(s)), "fresh checksum");
    s = 16'h1234 + 16'(~{pk[base+16'h50], pk[base+16'h51]});
    chk({dmb[16'h20C], dmb[16'h20D]} == ~16'(oc_fold(s)), "read-before-write checksum");
    chk({dmb[128*bank + 16'h10], dmb[128*bank + 16'h11]} == {pk[base + 14], pk[base + 15]},
        "ticket bank write");
    // PKM: 32 bit copy of bytes 10..13 to 0..3, 0x1234 at 0x50
    for (int w = 0; w < 16; w++) begin
      @(negedge clk); pb_en = 1; pb_we = 0; pb_addr = 9'(base / 8 + w);
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++) pk[base + 8*w + k] = pb_rdata[63-8*k -: 8];
    end
    @(negedge clk); pb_en = 0;
    for (int k = 0; k < 4; k++)
      chk(pk[base + 4*bank + k] == pk[base + 10 + k], "32 bit pkm to pkm copy");
    chk({pk[base+16'h50], pk[base+16'h51]} == 16'h1234, "pkm store");
  endtask

  initial begin
    #12 rst_n = 1;
    load_program();
    chk(halted, "halted after reset");
    run_and_check(0);
    run_and_check(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
