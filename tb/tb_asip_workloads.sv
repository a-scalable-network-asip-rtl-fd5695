// tb_asip_workloads: the three kinds of per-packet tasks the tile is built
// for, each as a hand-written program running on the complete tile.
//
//   parser      Ethernet / stacked VLAN / PPPoE / IPv4 (with options) /
//               IPv6 / TCP / UDP;
//               ICMP, IGMP, ICMPv6 and all non-IP frames flagged as control
//               traffic. Results go to the ticket.
//   classifier  the ticket fields produced by the parser are written as a
//               128 bit key to a TCAM on the memory-mapped IO port; the
//               program polls the result register and stores the flow id.
//               The TCAM is a behavioural model in this testbench (first
//               matching entry wins, fixed latency).
//   vlan_insert insert an 802.1Q tag: the frame starts at PKM byte 8, the
//               MAC addresses move 4 bytes down, the tag is written behind
//               them and the new start offset goes to the ticket.
//   rewrite     replace both MACs, decrement TTL, replace the IPv4 source
//               address and the TCP source port, and update both the IPv4
//               header checksum and the TCP checksum incrementally.
//
// The parser also runs on 2000 byte frames (IEEE 802.3as size) with
// stacked tags, which go in and come back whole.
//
// Every returned packet and ticket is compared with a reference computed
// here from scratch (checksums included), and every run must fit the 80
// cycle budget of a gigabit Ethernet port at 120 MHz.
module tb_asip_workloads;
  import asip_pkg::*;
  import asip_asm_pkg::*;

  localparam int WORDS = 16;       // 128 byte packet image and ticket
  localparam int MAXP  = 32;       // packets per phase
  localparam int TCAM_N = 8;
  localparam int TCAM_LAT = 12;

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
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  typedef logic [7:0] img_t [128];

  // ---------------------------------------------------------------- TCAM
  // key registers 0x000..0x00C, a write to 0x00C starts a lookup; 0x014
  // reads {valid, hit, index[13:0]} in its low 16 bits.
  logic [127:0] tc_val [TCAM_N], tc_msk [TCAM_N];
  logic [31:0] key [4];
  int tc_cnt = -1;
  logic [15:0] tc_res = 0;
  int n_lookups = 0, n_polls = 0;

  function automatic logic [15:0] tcam_search(logic [127:0] k);
    for (int e = 0; e < TCAM_N; e++)
      if (((k ^ tc_val[e]) & tc_msk[e]) == '0) return {2'b11, 14'(e)};
    return 16'h8000;
  endfunction

  always @(posedge clk) begin
    if (io_we) begin
      key[io_waddr[3:2]] = io_wdata;
      if (io_waddr == 12'h00C) begin
        tc_cnt = TCAM_LAT; tc_res = 0; n_lookups++;
      end
    end else if (tc_cnt > 0) begin
      tc_cnt--;
      if (tc_cnt == 0) tc_res = tcam_search({key[0], key[1], key[2], key[3]});
    end
    if (io_re) begin
      io_rdata <= (io_raddr == 12'h014) ? {16'h0, tc_res} : 32'hDEAD_0000;
      if (io_raddr == 12'h014) n_polls++;
    end
  end

  // ---------------------------------------------------------------- run length
  int cyc_cnt = 0; logic timing = 0; int last_run = 0;
  int n_stall = 0, n_taken = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.restart) begin cyc_cnt = 0; timing = 1; end
    else if (timing) begin
      cyc_cnt++;
      if (halted) begin last_run = cyc_cnt; timing = 0; end
    end
    if (ev_stall) n_stall++;
    if (ev_branch_taken) n_taken++;
  end

  // ---------------------------------------------------------------- programs
  task automatic put(int a, instr_t w);
    @(negedge clk); pm_we = 1; pm_waddr = 8'(a); pm_wdata = w;
    @(negedge clk); pm_we = 0;
  endtask

  task automatic clear_pm();
    for (int a = 0; a < 112; a++) put(a, '0);
  endtask

  // convention: p7 is never written and stays 0 (ticket base).
  // Registers: r0 protocol id, r2 {type, flags}, r5 offset of the protocol
  // id field (then of layer 3), r6 layer 4 protocol; p1 header pointer,
  // p2 layer 4, p4 tag list in the ticket.
  task automatic load_parser();
    clear_pm();
    put(0,  mv(SRC_PKM, DST_RDATA, SZ16, 0, 0) | agu1(AGU_IMM, 0) | imm(12) | alui(ALU_MOV, 5, 12));
    put(1,  mv(SRC_IMM, DST_RPTR, SZ16, 0, 1) | imm(12) | alu(ALU_XOR, 2, 2));
    put(2,  mv(SRC_IMM, DST_RPTR, SZ16, 0, 4) | imm(24) | alu(ALU_MOV, 1, 0));
    // VLAN / stacked VLAN: 0x8100 or 0x88A8, any number of tags
    put(3,  alui(ALU_SEQ, 1, 16'h8100));
    put(4,  alu(ALU_MOV, 4, 0));
    put(5,  alui(ALU_SEQ, 4, 16'h88A8));
    put(6,  alu(ALU_OR, 1, 4));
    put(7,  br(BR_BZ, 1, 14));
    put(8,  mv(SRC_PKM, DST_DM, SZ16) | agu1(AGU_INDEX, 1, 2) | agu2(AGU_POSTINC, 4, 2));
    put(9,  mv(SRC_PKM, DST_RDATA, SZ16, 0, 0) | agu1(AGU_INDEX, 1, 4) | agu2(AGU_POSTINC, 1, 4));
    put(10, alui(ALU_ADD, 5, 4));
    put(11, alu(ALU_MOV, 1, 0) | br(BR_JMP, 0, 3, 0, 1));                      // delayed
    put(12, alui(ALU_OR, 2, 2));                                               // slot: VLAN flag
    // PPPoE session: 6 byte header, then the PPP protocol id
    put(14, alu(ALU_MOV, 1, 0));
    put(15, alui(ALU_SEQ, 1, 16'h8864));
    put(16, br(BR_BZ, 1, 22));
    put(17, mv(SRC_PKM, DST_RDATA, SZ16, 0, 0) | agu1(AGU_INDEX, 1, 8));
    put(18, alui(ALU_ADD, 5, 8));
    put(19, alui(ALU_OR, 2, 4));
    // dispatch on the protocol id (Ethernet type or PPP protocol)
    put(22, alui(ALU_ADD, 5, 2) | mv(SRC_RDATA, DST_DM, SZ16, 0, 0) | agu2(AGU_INDEX, 7, 4));
    put(23, alu(ALU_MOV, 3, 0) | mv(SRC_RDATA, DST_RPTR, SZ16, 5, 1));         // p1 = L3
    put(24, alui(ALU_SEQ, 3, 16'h0800) | mv(SRC_RDATA, DST_RDATA, SZ16, 0, 4));
    put(25, alui(ALU_SEQ, 4, 16'h86DD) | mv(SRC_RDATA, DST_RDATA, SZ16, 0, 6));
    put(26, alui(ALU_SEQ, 6, 16'h0021) | mv(SRC_RDATA, DST_RDATA, SZ16, 0, 1));
    put(27, alui(ALU_SEQ, 1, 16'h0057));
    put(28, alu(ALU_OR, 3, 6));
    put(29, alu(ALU_OR, 4, 1) | br(BR_BNZ, 3, 40));
    put(30, br(BR_BNZ, 4, 80));
    put(31, alui(ALU_OR, 2, 1));                                               // not IP: control
    put(32, mv(SRC_RDATA, DST_DM, SZ16, 2, 0) | agu2(AGU_INDEX, 7, 0) | halt());
    // IPv4
    put(40, mv(SRC_PKM, DST_RDATA, SZ8, 0, 3) | agu1(AGU_POSTINC, 1, 9) | alui(ALU_OR, 2, 16'h100));
    put(41, mv(SRC_PKM, DST_RDATA, SZ8, 0, 6) | agu1(AGU_POSTINC, 1, 3) | alui(ALU_AND, 3, 15));
    put(42, mv(SRC_PKM, DST_DM, SZ32) | agu1(AGU_POSTINC, 1, 4) | agu2(AGU_INDEX, 7, 8) | alui(ALU_SHL, 3, 2));
    put(43, mv(SRC_PKM, DST_DM, SZ32) | agu1(AGU_INDEX, 1, 0) | agu2(AGU_INDEX, 7, 12) | alu(ALU_ADD, 3, 5));
    put(44, mv(SRC_RDATA, DST_DM, SZ8, 6, 0) | agu2(AGU_INDEX, 7, 6) | alu(ALU_MOV, 4, 6));
    put(45, mv(SRC_RDATA, DST_RPTR, SZ16, 3, 2) | alui(ALU_SEQ, 4, 6));        // p2 = L4
    put(46, alu(ALU_MOV, 7, 6));
    put(47, alui(ALU_SEQ, 7, 17));
    put(48, br(BR_BNZ, 4, 60));
    put(49, br(BR_BNZ, 7, 60));
    put(50, alu(ALU_MOV, 7, 6));                                               // ICMP/IGMP?
    put(51, alui(ALU_SUB, 7, 1));
    put(52, alui(ALU_SLT, 7, 2));
    put(53, alu(ALU_OR, 2, 7));
    put(54, mv(SRC_RDATA, DST_DM, SZ16, 2, 0) | agu2(AGU_INDEX, 7, 0) | halt());
    // TCP / UDP ports
    put(60, mv(SRC_PKM, DST_DM, SZ32) | agu1(AGU_INDEX, 2, 0) | agu2(AGU_IMM, 0) | imm(16));
    put(61, mv(SRC_RDATA, DST_DM, SZ16, 2, 0) | agu2(AGU_INDEX, 7, 0) | halt());
    // IPv6: next header, then both addresses to ticket bytes 32..63
    put(80, mv(SRC_PKM, DST_RDATA, SZ8, 0, 6) | agu1(AGU_INDEX, 1, 6) | agu2(AGU_POSTINC, 1, 8)
            | alui(ALU_OR, 2, 16'h200));
    put(81, mv(SRC_IMM, DST_RPTR, SZ16, 0, 3) | imm(32));
    for (int i = 0; i < 8; i++)
      put(82 + i, mv(SRC_PKM, DST_DM, SZ32) | agu1(AGU_POSTINC, 1, 4) | agu2(AGU_POSTINC, 3, 4));
    put(90, alui(ALU_ADD, 5, 40) | mv(SRC_RDATA, DST_DM, SZ8, 6, 0) | agu2(AGU_INDEX, 7, 6));
    put(91, mv(SRC_RDATA, DST_RPTR, SZ16, 5, 2) | alu(ALU_MOV, 4, 6));
    put(92, alui(ALU_SEQ, 4, 6));
    put(93, alu(ALU_MOV, 7, 6));
    put(94, alui(ALU_SEQ, 7, 17));
    put(95, br(BR_BNZ, 4, 60));
    put(96, br(BR_BNZ, 7, 60));
    put(97, alu(ALU_MOV, 7, 6));                                               // ICMPv6?
    put(98, alui(ALU_SEQ, 7, 58));
    put(99, alu(ALU_OR, 2, 7));
    put(100, mv(SRC_RDATA, DST_DM, SZ16, 2, 0) | agu2(AGU_INDEX, 7, 0) | halt());
  endtask

  task automatic load_classifier();
    clear_pm();
    put(0, mv(SRC_IMM, DST_RPTR, SZ16, 0, 6) | imm(12));
    put(1, mv(SRC_DM, DST_IOM, SZ32) | agu1(AGU_INDEX, 7, 8) | agu2(AGU_IMM, 0) | imm(0));
    put(2, mv(SRC_DM, DST_IOM, SZ32) | agu1(AGU_INDEX, 7, 12) | agu2(AGU_IMM, 0) | imm(4));
    put(3, mv(SRC_DM, DST_IOM, SZ32) | agu1(AGU_INDEX, 7, 4) | agu2(AGU_IMM, 0) | imm(8));
    put(4, mv(SRC_DM, DST_IOM, SZ32) | agu1(AGU_IMM, 0) | imm(16) | agu2(AGU_INDEX, 6, 0));
    put(5, mv(SRC_IOM, DST_RDATA, SZ32, 0, 0) | agu1(AGU_IMM, 0) | imm(12'h014)); // poll
    put(6, alu(ALU_MOV, 1, 0));
    put(7, alui(ALU_SHR, 1, 15));
    put(8, br(BR_BZ, 1, 5));
    put(9, mv(SRC_RDATA, DST_DM, SZ16, 0, 0) | agu2(AGU_IMM, 0) | imm(20) | halt());
  endtask

  task automatic load_vlan_insert();
    clear_pm();
    put(0, mv(SRC_IMM, DST_RPTR, SZ16, 0, 0) | imm(8));
    put(1, mv(SRC_IMM, DST_RPTR, SZ16, 0, 1) | imm(4));
    put(2, mv(SRC_PKM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4));
    put(3, mv(SRC_PKM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4));
    put(4, mv(SRC_PKM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4));
    put(5, mv(SRC_IMM, DST_PKM, SZ16) | agu2(AGU_POSTINC, 1, 2) | imm(16'h8100));
    put(6, mv(SRC_DM, DST_PKM, SZ16) | agu1(AGU_INDEX, 7, 2) | agu2(AGU_INDEX, 1, 0));
    put(7, mv(SRC_IMM, DST_DM, SZ8) | agu2(AGU_INDEX, 7, 12) | imm(4) | halt());
  endtask

  // ticket: 64..75 new MACs, 76..79 new source address, 80..81 new port
  task automatic load_rewrite();
    clear_pm();
    put(0,  mv(SRC_IMM, DST_RPTR, SZ16, 0, 0) | imm(64));
    put(1,  mv(SRC_IMM, DST_RPTR, SZ16, 0, 1) | imm(0));
    put(2,  mv(SRC_PKM, DST_RCSUM, SZ16, 0, 1) | agu1(AGU_IMM, 0) | imm(24));   // IPv4 header
    put(3,  mv(SRC_PKM, DST_RCSUM, SZ16, 0, 0) | agu1(AGU_IMM, 0) | imm(50));   // TCP
    put(4,  mv(SRC_DM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4));
    put(5,  mv(SRC_DM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4));
    put(6,  mv(SRC_DM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_POSTINC, 1, 4));
    put(7,  mv(SRC_PKM, DST_RDATA, SZ8, 0, 0) | agu1(AGU_IMM, 0) | imm(22));    // TTL
    put(8,  mv(SRC_DM, DST_PKM, SZ32) | agu1(AGU_POSTINC, 0, 4) | agu2(AGU_IMM, 0) | imm(26)
            | cs(1, 1, 0));                                                     // in both sums
    put(9,  alui(ALU_SUB, 0, 1));
    put(10, mv(SRC_RDATA, DST_PKM, SZ8, 0, 0) | agu2(AGU_IMM, 0) | imm(22) | cs(0, 1, 1));
    put(11, mv(SRC_DM, DST_PKM, SZ16) | agu1(AGU_INDEX, 0, 0) | agu2(AGU_IMM, 0) | imm(34)
            | cs(1, 0, 0));
    put(14, mv(SRC_RCSUM, DST_PKM, SZ16, 1, 0) | agu2(AGU_IMM, 0) | imm(24));
    put(15, mv(SRC_RCSUM, DST_PKM, SZ16, 0, 0) | agu2(AGU_IMM, 0) | imm(50) | halt());
  endtask

  // ---------------------------------------------------------------- references
  function automatic int unsigned sum16(img_t p, int from, int len);
    int unsigned s = 0;
    for (int i = 0; i < len; i += 2)
      s += {p[from+i], (i + 1 < len) ? p[from+i+1] : 8'h00};
    return s;
  endfunction

  function automatic logic [15:0] ipv4_csum(img_t p, int l3);
    img_t q = p;
    q[l3+10] = 0; q[l3+11] = 0;
    return ~16'(oc_fold(sum16(q, l3, 4 * int'(p[l3][3:0]))));
  endfunction

  function automatic logic [15:0] tcp_csum(img_t p, int l3);
    img_t q = p;
    int ihl = 4 * int'(p[l3][3:0]);
    int tl = int'({p[l3+2], p[l3+3]}) - ihl;
    int unsigned s;
    q[l3+ihl+16] = 0; q[l3+ihl+17] = 0;
    s = sum16(q, l3 + 12, 8) + 6 + tl + sum16(q, l3 + ihl, tl);
    return ~16'(oc_fold(s));
  endfunction

  // ticket: 0 type (1 IPv4, 2 IPv6, 0 other), 1 flags (bit 0 control
  // traffic, bit 1 VLAN, bit 2 PPPoE), 4..5 protocol id, 6 layer 4
  // protocol, 8..15 IPv4 addresses, 16..19 ports, 24.. VLAN tag control
  // words outermost first, 32..63 IPv6 addresses
  function automatic img_t parse_ref(img_t p);
    img_t t = '{default: 0};
    int e = 12, l3, l4, ntag = 0;
    logic [15:0] et = {p[12], p[13]};
    logic [7:0] pr;
    while (et == 16'h8100 || et == 16'h88A8) begin
      t[24+2*ntag] = p[e+2]; t[25+2*ntag] = p[e+3]; ntag++;
      t[1] |= 8'h02;
      e += 4; et = {p[e], p[e+1]};
    end
    if (et == 16'h8864) begin
      t[1] |= 8'h04;
      e += 8; et = {p[e], p[e+1]};
    end
    l3 = e + 2;
    {t[4], t[5]} = et;
    if (et == 16'h0800 || et == 16'h0021) begin
      t[0] = 1; pr = p[l3+9]; t[6] = pr;
      for (int i = 0; i < 8; i++) t[8+i] = p[l3+12+i];
      l4 = l3 + 4 * int'(p[l3][3:0]);
      if (pr == 1 || pr == 2) t[1] |= 8'h01;
    end else if (et == 16'h86DD || et == 16'h0057) begin
      t[0] = 2; pr = p[l3+6]; t[6] = pr;
      for (int i = 0; i < 32; i++) t[32+i] = p[l3+8+i];
      l4 = l3 + 40;
      if (pr == 58) t[1] |= 8'h01;
    end else begin
      t[1] |= 8'h01;
      return t;
    end
    if (pr == 6 || pr == 17) for (int i = 0; i < 4; i++) t[16+i] = p[l4+i];
    return t;
  endfunction

  // ---------------------------------------------------------------- packets
  img_t in_p [MAXP], in_t [MAXP], ex_p [MAXP], ex_t [MAXP], out_p [MAXP], out_t [MAXP];
  int runs [MAXP];
  int npkt;

  function automatic img_t rand_img();
    img_t p;
    foreach (p[i]) p[i] = 8'($urandom);
    return p;
  endfunction

  // kinds: 0 v4/TCP 1 v4/UDP 2 v4/ICMP 3 v4 options/UDP 4 v6/TCP 5 v6/UDP
  //        6 v6/ICMPv6 7 ARP 8 LLDP; ntag VLAN tags (the outer one of two
  //        is 0x88A8), pppoe puts a PPPoE session header in front of layer 3
  function automatic img_t make_frame(int k, int ntag, bit pppoe);
    img_t p = rand_img();
    int e = 12, l3;
    logic [15:0] id;
    for (int i = 0; i < ntag; i++) begin
      {p[e], p[e+1]} = (ntag == 2 && i == 0) ? 16'h88A8 : 16'h8100;
      e += 4;
    end
    if (pppoe) begin
      {p[e], p[e+1]} = 16'h8864;
      e += 8;
    end
    l3 = e + 2;
    if (k <= 3) begin
      id = pppoe ? 16'h0021 : 16'h0800;
      p[l3] = (k == 3) ? 8'h46 : 8'h45;
      p[l3+9] = (k == 0) ? 8'd6 : (k == 2) ? 8'd1 : 8'd17;
    end else if (k <= 6) begin
      id = pppoe ? 16'h0057 : 16'h86DD;
      p[l3+6] = (k == 4) ? 8'd6 : (k == 5) ? 8'd17 : 8'd58;
    end else begin
      id = pppoe ? 16'hC021 : (k == 7) ? 16'h0806 : 16'h88CC;
    end
    {p[e], p[e+1]} = id;
    return p;
  endfunction

  // IPv4/TCP frame with consistent checksums; total length 40 + pay bytes
  function automatic img_t make_tcp(int pay);
    img_t p = rand_img();
    {p[12], p[13]} = 16'h0800;
    p[14] = 8'h45; {p[16], p[17]} = 16'(40 + pay);
    p[22] = 8'($urandom_range(2, 255)); p[23] = 8'd6;
    p[46] = 8'h50;
    {p[24], p[25]} = ipv4_csum(p, 14);
    {p[50], p[51]} = tcp_csum(p, 14);
    return p;
  endfunction

  // ---------------------------------------------------------------- DMA
  task automatic dma_write(bit tkm, int waddr, img_t d);
    @(negedge clk_env);
    if (tkm) begin tkm_cmd_valid = 1; tkm_cmd_write = 1; tkm_cmd_addr = 9'(waddr); tkm_cmd_len = 10'(WORDS); end
    else     begin pkm_cmd_valid = 1; pkm_cmd_write = 1; pkm_cmd_addr = 9'(waddr); pkm_cmd_len = 10'(WORDS); end
    @(negedge clk_env); tkm_cmd_valid = 0; pkm_cmd_valid = 0;
    for (int w = 0; w < WORDS; ) begin
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

  task automatic dma_read(bit tkm, int waddr, output img_t d);
    @(negedge clk_env);
    if (tkm) begin tkm_cmd_valid = 1; tkm_cmd_write = 0; tkm_cmd_addr = 9'(waddr); tkm_cmd_len = 10'(WORDS); end
    else     begin pkm_cmd_valid = 1; pkm_cmd_write = 0; pkm_cmd_addr = 9'(waddr); pkm_cmd_len = 10'(WORDS); end
    @(negedge clk_env); tkm_cmd_valid = 0; pkm_cmd_valid = 0;
    for (int w = 0; w < WORDS; ) begin
      tkm_m_ready = tkm; pkm_m_ready = !tkm;
      @(posedge clk_env);
      if (tkm ? tkm_m_valid : pkm_m_valid) begin
        for (int k = 0; k < 8; k++) d[8*w+k] = tkm ? tkm_m_data[63-8*k -: 8] : pkm_m_data[63-8*k -: 8];
        w++;
      end
      @(negedge clk_env);
    end
    tkm_m_ready = 0; pkm_m_ready = 0;
  endtask

  // whole 2000 byte frames (250 words)
  img_t tk_prev;
  logic [7:0] big_prev [2000];

  task automatic dma_write_big(int waddr, logic [7:0] d [2000]);
    @(negedge clk_env);
    pkm_cmd_valid = 1; pkm_cmd_write = 1; pkm_cmd_addr = 9'(waddr); pkm_cmd_len = 10'd250;
    @(negedge clk_env); pkm_cmd_valid = 0;
    for (int w = 0; w < 250; ) begin
      for (int k = 0; k < 8; k++) pkm_s_data[63-8*k -: 8] = d[8*w+k];
      pkm_s_valid = 1;
      @(posedge clk_env);
      if (pkm_s_ready) w++;
      @(negedge clk_env);
    end
    pkm_s_valid = 0;
  endtask

  task automatic dma_read_big(int waddr, output logic [7:0] d [2000]);
    @(negedge clk_env);
    pkm_cmd_valid = 1; pkm_cmd_write = 0; pkm_cmd_addr = 9'(waddr); pkm_cmd_len = 10'd250;
    @(negedge clk_env); pkm_cmd_valid = 0;
    for (int w = 0; w < 250; ) begin
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

  // streams npkt packets plus one flush packet through the tile; out_p and
  // out_t receive the finished images, runs the cycle counts
  task automatic run_phase();
    img_t z = '{default: 0};
    for (int n = 0; n <= npkt; n++) begin
      int fb = free_bank;
      dma_write(0, fb * 256, n < npkt ? in_p[n] : z);
      dma_write(1, fb * 16, n < npkt ? in_t[n] : z);
      @(negedge clk_env); load_done = 1; @(negedge clk_env); load_done = 0;
      while (!dut.restart) @(negedge clk);
      @(negedge clk);
      while (free_bank == bank_sel) @(negedge clk_env);   // status crossing settles
      if (n > 0) begin
        runs[n-1] = last_run;
        dma_read(0, (1 - bank_sel) * 256, out_p[n-1]);
        dma_read(1, (1 - bank_sel) * 16, out_t[n-1]);
      end
    end
    while (!halted) @(negedge clk);
  endtask

  task automatic check_phase(string name);
    int mx = 0;
    for (int n = 0; n < npkt; n++) begin
      chk(out_p[n] == ex_p[n], $sformatf("%s %0d packet", name, n));
      chk(out_t[n] == ex_t[n], $sformatf("%s %0d ticket", name, n));
      chk(runs[n] <= 80, $sformatf("%s %0d ran %0d cycles", name, n, runs[n]));
      if (runs[n] > mx) mx = runs[n];
    end
    $display("%s: %0d packets, longest run %0d cycles", name, npkt, mx);
    for (int n = 0; n < npkt; n++) $write("%0d ", runs[n]);
    $display("");
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    img_t parsed [MAXP];
    int v6tcp = 0;
    #12 rst_n = 1;

    // parser: every frame kind, some with one or two VLAN tags or PPPoE
    load_parser();
    npkt = 0;
    for (int k = 0; k < 9; k++) begin
      in_p[npkt] = make_frame(k, 0, 0); npkt++;
      if (k inside {0, 1, 4, 5}) begin in_p[npkt] = make_frame(k, 1, 0); npkt++; end
      if (k inside {0, 4})       begin in_p[npkt] = make_frame(k, 2, 0); npkt++; end
      if (k != 3 && k != 8)      begin in_p[npkt] = make_frame(k, 0, 1); npkt++; end
      if (k inside {1, 5})       begin in_p[npkt] = make_frame(k, 1, 1); npkt++; end
    end
    for (int n = 0; n < npkt; n++) begin
      in_t[n] = '{default: 0};
      ex_p[n] = in_p[n];
      ex_t[n] = parse_ref(in_p[n]);
    end
    run_phase();
    check_phase("parser");
    parsed = out_t;

    // classifier on the parser's tickets. Key = ticket bytes 8..15, 4..7,
    // 16..19: addresses, {ethertype, protocol, byte 7}, ports.
    load_classifier();
    for (int e = 0; e < TCAM_N; e++) begin tc_val[e] = '1; tc_msk[e] = '1; end  // unused: never match
    tc_val[0] = {parsed[0][8], parsed[0][9], parsed[0][10], parsed[0][11], 32'h0, 32'h0, 32'h0};
    tc_msk[0] = {32'hFFFF_FFFF, 96'h0};                                  // one source host
    tc_val[1] = {64'h0, 16'h0800, 8'd17, 8'h0, 32'h0};
    tc_msk[1] = {64'h0, 16'hFFFF, 8'hFF, 8'h0, 32'h0};                 // all IPv4/UDP
    for (int n = npkt - 1; n >= 0; n--) if (parsed[n][0] == 2 && parsed[n][6] == 6) v6tcp = n;
    tc_val[2] = {64'h0, 16'h0, 8'd6, 8'h0, 16'h0, parsed[v6tcp][18], parsed[v6tcp][19]};
    tc_msk[2] = {64'h0, 16'h0, 8'hFF, 8'h0, 16'h0, 16'hFFFF};          // TCP to one port
    tc_val[3] = {64'h0, 16'h86DD, 16'h0, 32'h0};
    tc_msk[3] = {64'h0, 16'hFFFF, 16'h0, 32'h0};                       // rest of IPv6
    tc_val[4] = {64'h0, 16'h0806, 16'h0, 32'h0};
    tc_msk[4] = {64'h0, 16'hFFFF, 16'h0, 32'h0};                       // ARP
    // no rule for other frames: they miss
    for (int n = 0; n < npkt; n++) begin
      logic [127:0] k;
      in_p[n] = ex_p[n];
      in_t[n] = parsed[n];
      ex_t[n] = parsed[n];
      k = {parsed[n][8], parsed[n][9], parsed[n][10], parsed[n][11],
           parsed[n][12], parsed[n][13], parsed[n][14], parsed[n][15],
           parsed[n][4], parsed[n][5], parsed[n][6], parsed[n][7],
           parsed[n][16], parsed[n][17], parsed[n][18], parsed[n][19]};
      {ex_t[n][20], ex_t[n][21]} = tcam_search(k);
    end
    begin
      int hits = 0, misses = 0;
      for (int n = 0; n < npkt; n++) begin
        if (ex_t[n][20][6]) hits++; else misses++;
      end
      chk(hits > 0 && misses > 0, "classifier sees hits and misses");
    end
    n_lookups = 0; n_polls = 0;
    run_phase();
    check_phase("classifier");
    chk(n_lookups == npkt + 1, "one TCAM lookup per packet");
    chk(n_polls > n_lookups, "the program polled the TCAM");

    // VLAN tag insertion, frame at byte 8
    load_vlan_insert();
    npkt = 6;
    for (int n = 0; n < npkt; n++) begin
      in_p[n] = rand_img();
      in_t[n] = rand_img(); in_t[n][12] = 8;
      ex_p[n] = in_p[n]; ex_t[n] = in_t[n]; ex_t[n][12] = 4;
      for (int i = 0; i < 12; i++) ex_p[n][4+i] = in_p[n][8+i];
      {ex_p[n][16], ex_p[n][17]} = 16'h8100;
      {ex_p[n][18], ex_p[n][19]} = {in_t[n][2], in_t[n][3]};
    end
    run_phase();
    check_phase("vlan_insert");
    for (int n = 0; n < npkt; n++) begin
      // the frame seen from the new start: tag after the MACs, rest intact
      automatic bit ok = 1;
      for (int i = 0; i < 12; i++) ok &= out_p[n][4+i] == in_p[n][8+i];
      ok &= {out_p[n][16], out_p[n][17], out_p[n][18], out_p[n][19]} == {16'h8100, in_t[n][2], in_t[n][3]};
      for (int i = 16; i < 100; i++) ok &= out_p[n][4+i] == in_p[n][8+i-4];
      chk(ok, $sformatf("vlan_insert %0d frame layout", n));
    end

    // rewrite with two incremental checksums
    load_rewrite();
    npkt = 10;
    for (int n = 0; n < npkt; n++) begin
      in_p[n] = make_tcp($urandom_range(6, 74));
      in_t[n] = rand_img();
      ex_t[n] = in_t[n];
      ex_p[n] = in_p[n];
      for (int i = 0; i < 12; i++) ex_p[n][i] = in_t[n][64+i];
      ex_p[n][22] = in_p[n][22] - 1;
      for (int i = 0; i < 4; i++) ex_p[n][26+i] = in_t[n][76+i];
      {ex_p[n][34], ex_p[n][35]} = {in_t[n][80], in_t[n][81]};
      {ex_p[n][24], ex_p[n][25]} = ipv4_csum(ex_p[n], 14);
      {ex_p[n][50], ex_p[n][51]} = tcp_csum(ex_p[n], 14);
    end
    run_phase();
    check_phase("rewrite");
    for (int n = 0; n < npkt; n++) begin
      chk({out_p[n][24], out_p[n][25]} == ipv4_csum(out_p[n], 14), $sformatf("rewrite %0d IPv4 checksum", n));
      chk({out_p[n][50], out_p[n][51]} == tcp_csum(out_p[n], 14), $sformatf("rewrite %0d TCP checksum", n));
    end

    // parser on 2000 byte frames (the largest frames of IEEE 802.3as) with
    // several tags in front of layer 3; the whole frame goes in and comes
    // back through the DMA engines and must be unchanged
    load_parser();
    for (int n = 0; n <= 3; n++) begin
      automatic int fb = int'(free_bank);
      logic [7:0] big [2000];
      logic [7:0] back [2000];
      img_t hd, tk;
      hd = (n == 0) ? make_frame(4, 3, 0) : (n == 1) ? make_frame(1, 2, 1) : make_frame(0, 1, 0);
      tk = '{default: 0};
      for (int i = 0; i < 2000; i++) big[i] = (n == 3) ? 8'h00 : (i < 128) ? hd[i] : 8'($urandom);
      dma_write_big(fb * 256, big);
      dma_write(1, fb * 16, tk);
      @(negedge clk_env); load_done = 1; @(negedge clk_env); load_done = 0;
      while (!dut.restart) @(negedge clk);
      @(negedge clk);
      while (free_bank == bank_sel) @(negedge clk_env);
      if (n > 0) begin
        automatic int run = last_run;
        dma_read(1, (1 - bank_sel) * 16, tk);
        dma_read_big((1 - bank_sel) * 256, back);
        chk(tk == tk_prev, $sformatf("2000 byte frame %0d ticket", n - 1));
        chk(back == big_prev, $sformatf("2000 byte frame %0d unchanged", n - 1));
        chk(run <= 80, $sformatf("2000 byte frame %0d ran %0d cycles", n - 1, run));
        $display("2000 byte frame %0d parsed in %0d cycles", n - 1, run);
      end
      tk_prev = parse_ref(hd);
      big_prev = big;
    end
    while (!halted) @(negedge clk);

    chk(n_stall > 0 && n_taken > 0, "stalls and taken branches occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
