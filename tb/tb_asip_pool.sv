// tb_asip_pool: a pool of tiles working in parallel on one 10 Gbit/s
// Ethernet stream of minimum-size frames.
//
// At 10 Gbit/s a 64 byte frame (with preamble and inter-frame gap) arrives
// every 67.2 ns, 14.88 Mpackets/s: eight cycles of a 120 MHz ASIP, far less
// than one packet's program. NT tiles take the frames in turn (round
// robin), each with its own environment process that loads the frame and
// its ticket through the tile's DMA engines (200 MHz side), signals
// load_done, and reads the previous result back after the bank switch. The
// tiles run a header rewrite (new MAC addresses from the ticket, TTL
// decrement, incremental IPv4 checksum update).
//
// Checks: every returned frame against a reference with a from-scratch
// checksum, and that the pool keeps up with the line: no frame may wait
// longer than one round of the pool (NT x 67.2 ns) before its load starts.
// If the pool were too slow, the wait would grow with every round. For
// this program 3 tiles are the fewest that keep up; 1 or 2 fall behind.
//
// The line rate, the frame spacing and the two clock rates are the published
// ones; sharing frames out in turn among identical tiles is one of the
// published arrangements (a pool), but how frames are handed out here is
// this testbench's own choice.
//
// Delays count ticks of 1/60 ns, so that both clock periods and the frame
// spacing are whole numbers whatever time unit the simulator uses.
module tb_asip_pool;
  import asip_pkg::*;
  import asip_asm_pkg::*;

  localparam int    NT    = 4;       // tiles in the pool
  localparam int    NPKT  = 160;     // frames in the stream
  localparam real   TICK  = 60.0;    // ticks per ns
  localparam real   T_PKT = 4032.0;  // 67.2 ns between frames at 10 Gbit/s
  localparam real   T0    = 60000.0; // first arrival, 1 us

  logic clk = 0, clk_env = 0, rst_n = 0;
  always #250 clk = ~clk;            // 120 MHz
  always #150 clk_env = ~clk_env;    // 200 MHz
  int checks = 0, failures = 0;

  initial begin
    #6000000;   // 100 us
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------------------------------------------------------- frames
  logic [7:0] pkt [NPKT][64];
  logic [7:0] tkt [NPKT][16];
  logic [7:0] exp_p [NPKT][64];
  real max_wait = 0.0;
  int  n_done = 0;
  real t_last = 0.0;

  function automatic logic [15:0] ip_csum(logic [7:0] p [64]);
    int unsigned s = 0;
    for (int i = 14; i < 34; i += 2) if (i != 24) s += 32'({p[i], p[i+1]});
    return ~16'(oc_fold(s));
  endfunction

  initial begin
    for (int n = 0; n < NPKT; n++) begin
      logic [7:0] p [64];
      for (int i = 0; i < 64; i++) p[i] = 8'($urandom);
      p[12] = 8'h08; p[13] = 8'h00; p[14] = 8'h45;
      p[22] = 8'($urandom_range(1, 255));
      {p[24], p[25]} = ip_csum(p);
      pkt[n] = p;
      for (int i = 0; i < 16; i++) tkt[n][i] = 8'($urandom);
      exp_p[n] = p;
      for (int i = 0; i < 12; i++) exp_p[n][i] = tkt[n][i];
      exp_p[n][22] = p[22] - 1;
      {exp_p[n][24], exp_p[n][25]} = ip_csum(exp_p[n]);
    end
  end

  function automatic instr_t prog(int a);
    case (a)
      0: return mv(SRC_IMM, DST_RPTR, SZ16, 0, 0) | imm(0);
      1: return mv(SRC_IMM, DST_RPTR, SZ16, 0, 1) | imm(0);
      2: return mv(SRC_PKM, DST_RCSUM, SZ16, 0, 1) | agu1(AGU_IMM, 0) | imm(24);
      3, 4, 5: return mv(SRC_DM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4);
      6: return mv(SRC_PKM, DST_RDATA, SZ8, 0, 0) | agu1(AGU_IMM, 0) | imm(22);
      7: return alui(ALU_SUB, 0, 1);
      8: return mv(SRC_RDATA, DST_PKM, SZ8, 0, 0) | agu2(AGU_IMM, 0) | imm(22) | cs(0, 1, 1);
      11: return mv(SRC_RCSUM, DST_PKM, SZ16, 1, 0) | agu2(AGU_IMM, 0) | imm(24) | halt();
      default: return '0;
    endcase
  endfunction

  // ---------------------------------------------------------------- tiles
  for (genvar t = 0; t < NT; t++) begin : g_tile
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

    asip_top dut (.*);

    // write n words of a byte image to a memory through its DMA engine
    task automatic dma_write(bit tkm, int waddr, int n, logic [7:0] d [64]);
      @(negedge clk_env);
      if (tkm) begin tkm_cmd_valid = 1; tkm_cmd_write = 1; tkm_cmd_addr = 9'(waddr); tkm_cmd_len = 10'(n); end
      else     begin pkm_cmd_valid = 1; pkm_cmd_write = 1; pkm_cmd_addr = 9'(waddr); pkm_cmd_len = 10'(n); end
      @(negedge clk_env); tkm_cmd_valid = 0; pkm_cmd_valid = 0;
      for (int w = 0; w < n; ) begin
        logic [63:0] v;
        for (int k = 0; k < 8; k++) v[63-8*k -: 8] = d[8*w+k];
        if (tkm) begin tkm_s_valid = 1; tkm_s_data = v; end
        else     begin pkm_s_valid = 1; pkm_s_data = v; end
        @(posedge clk_env);
        if (tkm ? tkm_s_ready : pkm_s_ready) w++;
        @(negedge clk_env);
      end
      tkm_s_valid = 0; pkm_s_valid = 0;
    endtask

    task automatic dma_read(int waddr, output logic [7:0] d [64]);
      @(negedge clk_env); pkm_cmd_valid = 1; pkm_cmd_write = 0;
      pkm_cmd_addr = 9'(waddr); pkm_cmd_len = 10'd8;
      @(negedge clk_env); pkm_cmd_valid = 0;
      for (int w = 0; w < 8; ) begin
        pkm_m_ready = 1;
        @(posedge clk_env);
        if (pkm_m_valid) begin
          for (int k = 0; k < 8; k++) d[8*w+k] = pkm_m_data[63-8*k -: 8];
          w++;
        end
        @(negedge clk_env);
      end
      pkm_m_ready = 0;
    endtask

    // this tile's share of the stream: frames t, t+NT, t+2NT, ...
    initial begin
      logic [7:0] tk [64];
      logic [7:0] got [64];
      automatic int prev = -1;
      #1200 rst_n = 1;
      for (int a = 0; a < 16; a++) begin
        @(negedge clk); pm_we = 1; pm_waddr = 8'(a); pm_wdata = prog(a);
      end
      @(negedge clk); pm_we = 0;
      for (int n = t; n < NPKT + NT; n += NT) begin
        automatic real arrive = T0 + T_PKT * real'(n);
        automatic int  fb;
        if (n < NPKT) begin
          while ($realtime < arrive) @(negedge clk_env);
          if ($realtime - arrive > max_wait) max_wait = $realtime - arrive;
          fb = int'(free_bank);
          tk = '{default: 0};
          for (int i = 0; i < 16; i++) tk[i] = tkt[n][i];
          dma_write(0, fb * 256, 8, pkt[n]);
          dma_write(1, fb * 16, 2, tk);
        end else begin
          fb = int'(free_bank);   // flush: one more (empty) load returns the last frame
        end
        @(negedge clk_env); load_done = 1; @(negedge clk_env); load_done = 0;
        while (!dut.restart) @(negedge clk);
        @(negedge clk);
        while (free_bank == bank_sel) @(negedge clk_env);
        if (prev >= 0) begin
          dma_read((1 - bank_sel) * 256, got);
          chk(got == exp_p[prev], $sformatf("tile %0d frame %0d", t, prev));
          n_done++;
          if ($realtime > t_last) t_last = $realtime;
        end
        prev = n;
      end
    end
  end

  initial begin
    wait (n_done == NPKT);
    chk(max_wait <= NT * T_PKT, $sformatf("longest wait before loading %0.1f ns", max_wait / TICK));
    $display("%0d tiles, %0d frames: longest wait %0.1f ns (one pool round %0.1f ns), all results back %0.1f ns after the last arrival",
             NT, NPKT, max_wait / TICK, NT * T_PKT / TICK, (t_last - (T0 + T_PKT * real'(NPKT - 1))) / TICK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
