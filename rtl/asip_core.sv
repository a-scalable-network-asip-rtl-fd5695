// asip_core: the packet-processing ASIP: a VLIW processor with a 16 bit
// data path and a 32 bit Load/Store path.
//
// Pipeline: IF, ID, E1, E2, E3.
//   IF  the program memory is addressed with the fetch PC.
//   ID  the word is decoded; both AGUs compute addresses from REG_PTR and
//       the source address is applied to its memory (PKM, DM/TKM or IO);
//       post-increments are written back; branches and halt resolve here.
//   E1  the Load/Store bus carries one transfer from any storage to any
//       storage (memory read data arrives now; memory writes happen at the
//       end of E1); the ALU does its read-modify-write on REG_DATA.
//   E2  the checksum engine folds new and old (read-before-write) data.
//   E3  the checksum engine updates REG_CSUM.
// Most instructions are finished after E1.
//
// Hazards. Values written in E1 (ALU results, bus writes into REG_DATA or
// REG_PTR) are forwarded to the ID reads of the next instruction, so branch
// conditions and pointers are always current. A memory read in ID that meets
// a write to the same memory in E1 (one BRAM port) stalls ID for one cycle.
// REG_CSUM is updated in E3 and not forwarded: a bus read of REG_CSUM sees
// the effect of a checksum update only three instructions later.
//
// Branches. A taken branch redirects the fetch PC; the word fetched behind
// it (the slot) executes when br_delay = 1 (delayed branch) and is squashed
// otherwise (stalling branch, one cycle lost). BR_SWITCH carries two jump
// targets in one word. BR_HALT squashes the slot, stops issuing, sets the
// fetch PC back to START_PC and raises halted once E1..E3 are empty. The
// core starts halted and runs from START_PC after a one-cycle restart pulse.
//
// Banks. bank_sel picks the active PKM half (2 KiB) and the active ticket
// half (128 B) so that programs always use addresses 0..2047 (PKM) and
// 0..127 (ticket); address bit 11 (PKM) or 7 (ticket, below 256) is XORed
// with bank_sel. DM addresses 256..4095 are not banked.
//
// Memory-mapped IO: 32 bit, read address in ID with data expected the next
// cycle (like a BRAM), write address and data in E1.
//
// What follows the architecture: 5 stages and their roles, 8 x 16 bit
// REG_DATA, 8 x 12 bit REG_PTR, two AGUs, the 32 bit any-to-any bus, the
// checksum engine in E2/E3, delayed and stalling branches, multi-target
// jumps, halt behaviour, bank select. This design's choices: instruction
// encoding, forwarding, the structural stall, register write priorities.
module asip_core
  import asip_pkg::*;
#(
  parameter pc_t START_PC = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  // controller
  input  logic        bank_sel,
  input  logic        restart,
  output logic        halted,
  // program memory
  output pc_t         pm_raddr,
  input  instr_t      pm_rdata,
  // PKM port A
  output logic        pkm_en,
  output logic        pkm_we,
  output ptr_t        pkm_addr,
  output size_e       pkm_size,
  output bus_t        pkm_wdata,
  input  bus_t        pkm_rdata,
  // DM/TKM port A
  output logic        dm_en,
  output logic        dm_we,
  output ptr_t        dm_addr,
  output size_e       dm_size,
  output bus_t        dm_wdata,
  input  bus_t        dm_rdata,
  // memory-mapped IO
  output logic        io_re,
  output ptr_t        io_raddr,
  input  bus_t        io_rdata,
  output logic        io_we,
  output ptr_t        io_waddr,
  output bus_t        io_wdata,
  // observation (event pulses, for counters and tests)
  output logic        ev_stall,
  output logic        ev_branch_taken,
  output logic        ev_squash
);

  // ------------------------------------------------------------------
  // state
  logic   running;
  pc_t    pc_if;
  pc_t    id_pc;
  logic   id_valid;

  // E1 pipeline register
  typedef struct packed {
    logic   valid;
    dec_t   dec;
    ls_src_e src;
    size_e  size;
    ridx_t  sreg;
    ridx_t  dreg;
    alu_f_t alu;
    csum_f_t csum;
    data_t  imm16;
    ptr_t   daddr;     // AGU2 address, bank-mapped
  } e1_t;
  e1_t e1;
  logic e2_valid, e2_rbw_pkm, e2_rbw_dm, e3_valid;

  // ------------------------------------------------------------------
  // ID
  instr_t id_instr;
  dec_t   id_dec;
  assign id_instr = pm_rdata;

  asip_decoder u_dec (.valid(id_valid && running), .instr(id_instr), .dec(id_dec));

  // register files
  logic [3:0][2:0]  rd_raddr;
  logic [3:0][15:0] rd_rdata;
  logic [1:0]       rd_we;
  logic [1:0][2:0]  rd_waddr;
  logic [1:0][15:0] rd_wdata;
  logic [2:0][2:0]  rp_raddr;
  logic [2:0][11:0] rp_rdata;
  logic [2:0]       rp_we;
  logic [2:0][2:0]  rp_waddr;
  logic [2:0][11:0] rp_wdata;

  asip_regfile #(.WIDTH(DATA_W), .DEPTH(NREGS), .NR(4), .NW(2)) u_reg_data (
    .clk, .rst_n, .raddr(rd_raddr), .rdata(rd_rdata),
    .we(rd_we), .waddr(rd_waddr), .wdata(rd_wdata));
  asip_regfile #(.WIDTH(PTR_W), .DEPTH(NREGS), .NR(3), .NW(3)) u_reg_ptr (
    .clk, .rst_n, .raddr(rp_raddr), .rdata(rp_rdata),
    .we(rp_we), .waddr(rp_waddr), .wdata(rp_wdata));

  // E1 values needed for forwarding
  bus_t  bus;
  logic  bus_active;
  logic  alu_we;
  data_t alu_y;

  // forwarded ID reads
  data_t br_val;
  ptr_t  p1_val, p2_val;
  always_comb begin
    br_val = rd_rdata[0];
    if (e1.valid && alu_we && e1.alu.rd == id_instr.br_reg) br_val = alu_y;
    if (e1.dec.wr_rdata && e1.dreg == id_instr.br_reg) br_val = bus[15:0];
    p1_val = rp_rdata[0];
    if (e1.dec.wr_rptr && e1.dreg == id_instr.agu1.ptr) p1_val = bus[11:0];
    p2_val = rp_rdata[1];
    if (e1.dec.wr_rptr && e1.dreg == id_instr.agu2.ptr) p2_val = bus[11:0];
  end

  logic a1_act, a2_act, a1_we, a2_we;
  ptr_t a1_addr, a2_addr, a1_wd, a2_wd;
  asip_agu u_agu1 (.f(id_instr.agu1), .ptr(p1_val), .imm(id_instr.imm16[11:0]),
                   .active(a1_act), .addr(a1_addr), .ptr_we(a1_we), .ptr_wdata(a1_wd));
  asip_agu u_agu2 (.f(id_instr.agu2), .ptr(p2_val), .imm(id_instr.imm16[11:0]),
                   .active(a2_act), .addr(a2_addr), .ptr_we(a2_we), .ptr_wdata(a2_wd));

  function automatic ptr_t pkm_phys(ptr_t a, logic bs);
    return {a[11] ^ bs, a[10:0]};
  endfunction
  function automatic ptr_t dm_phys(ptr_t a, logic bs);
    return (a[11:8] == 4'd0) ? {4'd0, a[7] ^ bs, a[6:0]} : a;
  endfunction

  // structural stall: one BRAM port per memory for the ASIP
  logic stall, advance;
  assign stall   = (id_dec.rd_pkm && e1.dec.wr_pkm) || (id_dec.rd_dm && e1.dec.wr_dm);
  assign advance = id_valid && running && !stall;

  // branch resolution
  logic taken;
  pc_t  target;
  always_comb begin
    taken  = 1'b0;
    target = id_instr.imm16[PC_W-1:0];
    unique case (id_instr.br_op)
      BR_JMP:    taken = 1'b1;
      BR_BZ:     taken = (br_val == '0);
      BR_BNZ:    taken = (br_val != '0);
      BR_SWITCH: begin
        taken = (br_val == 16'd0) || (br_val == 16'd1);
        if (br_val == 16'd1) target = id_instr.imm16[8 +: PC_W];
      end
      default:   taken = 1'b0;
    endcase
    taken = taken && id_dec.branch && !stall;
  end

  // fetch
  logic squash_slot;
  assign squash_slot = (taken && !id_instr.br_delay) || (id_dec.halt && !stall);
  assign pm_raddr    = stall ? id_pc : pc_if;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      pc_if    <= START_PC;
      id_pc    <= START_PC;
      id_valid <= 1'b0;
    end else if (!running) begin
      id_valid <= 1'b0;
      pc_if    <= START_PC;
      if (restart) begin
        running  <= 1'b1;
        id_pc    <= START_PC;
        id_valid <= 1'b1;
        pc_if    <= START_PC + pc_t'(1);
      end
    end else if (!stall) begin
      id_pc    <= pc_if;
      id_valid <= !squash_slot;
      pc_if    <= taken ? target : pc_if + pc_t'(1);
      if (id_dec.halt) begin
        running <= 1'b0;
        pc_if   <= START_PC;
      end
    end
  end

  // ------------------------------------------------------------------
  // ID -> E1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= '0;
    end else begin
      e1.valid <= advance;
      e1.dec   <= advance ? id_dec : '0;
      e1.src   <= id_instr.ls_src;
      e1.size  <= id_instr.ls_size;
      e1.sreg  <= id_instr.ls_sreg;
      e1.dreg  <= id_instr.ls_dreg;
      e1.alu   <= id_instr.alu;
      e1.csum  <= advance ? id_instr.csum : '0;
      e1.imm16 <= id_instr.imm16;
      e1.daddr <= id_dec.wr_pkm ? pkm_phys(a2_addr, bank_sel) :
                  id_dec.wr_dm  ? dm_phys(a2_addr, bank_sel)  : a2_addr;
    end
  end

  // ------------------------------------------------------------------
  // E1: Load/Store bus, ALU
  data_t csum_q [2];
  asip_lsbus u_bus (
    .src(e1.dec.xfer ? e1.src : SRC_NONE),
    .pkm_rdata, .dm_rdata, .iom_rdata(io_rdata),
    .rdata_val(rd_rdata[1]), .rptr_val(rp_rdata[2]),
    .rcsum_val(csum_q[e1.sreg[0]]), .imm16(e1.imm16),
    .active(bus_active), .bus(bus));

  logic alu_we_raw;
  asip_alu u_alu (.op(e1.alu.op), .a(rd_rdata[2]),
                  .b(e1.alu.use_imm ? e1.imm16 : rd_rdata[3]),
                  .we(alu_we_raw), .y(alu_y));
  assign alu_we = alu_we_raw && e1.valid;

  always_comb begin
    rd_raddr[0] = id_instr.br_reg;
    rd_raddr[1] = e1.sreg;
    rd_raddr[2] = e1.alu.rd;
    rd_raddr[3] = e1.alu.rs;
    // port 0: ALU, port 1: bus (bus wins on the same register)
    rd_we[0] = alu_we;            rd_waddr[0] = e1.alu.rd; rd_wdata[0] = alu_y;
    rd_we[1] = e1.dec.wr_rdata;   rd_waddr[1] = e1.dreg;   rd_wdata[1] = bus[15:0];
    rp_raddr[0] = id_instr.agu1.ptr;
    rp_raddr[1] = id_instr.agu2.ptr;
    rp_raddr[2] = e1.sreg;
    // port 0: bus (older instruction), ports 1/2: AGU post-increments
    rp_we[0] = e1.dec.wr_rptr;         rp_waddr[0] = e1.dreg;            rp_wdata[0] = bus[11:0];
    rp_we[1] = advance && a1_we;       rp_waddr[1] = id_instr.agu1.ptr;  rp_wdata[1] = a1_wd;
    rp_we[2] = advance && a2_we;       rp_waddr[2] = id_instr.agu2.ptr;  rp_wdata[2] = a2_wd;
  end

  // memory ports: an E1 write has the port; otherwise an ID read may use it
  always_comb begin
    pkm_en    = e1.dec.wr_pkm || (advance && id_dec.rd_pkm);
    pkm_we    = e1.dec.wr_pkm;
    pkm_addr  = e1.dec.wr_pkm ? e1.daddr : pkm_phys(a1_addr, bank_sel);
    pkm_size  = e1.dec.wr_pkm ? e1.size : id_instr.ls_size;
    pkm_wdata = bus;
    dm_en     = e1.dec.wr_dm || (advance && id_dec.rd_dm);
    dm_we     = e1.dec.wr_dm;
    dm_addr   = e1.dec.wr_dm ? e1.daddr : dm_phys(a1_addr, bank_sel);
    dm_size   = e1.dec.wr_dm ? e1.size : id_instr.ls_size;
    dm_wdata  = bus;
    io_re     = advance && id_dec.rd_iom;
    io_raddr  = a1_addr;
    io_we     = e1.dec.wr_iom;
    io_waddr  = e1.daddr;
    io_wdata  = bus;
  end

  // ------------------------------------------------------------------
  // E2/E3: checksum engine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e2_valid   <= 1'b0;
      e2_rbw_pkm <= 1'b0;
      e2_rbw_dm  <= 1'b0;
      e3_valid   <= 1'b0;
    end else begin
      e2_valid   <= e1.valid;
      e2_rbw_pkm <= e1.dec.wr_pkm;
      e2_rbw_dm  <= e1.dec.wr_dm;
      e3_valid   <= e2_valid;
    end
  end

  asip_csum u_csum (
    .clk, .rst_n,
    .e1_ctl(e1.csum), .e1_new_valid(bus_active), .e1_bus(bus),
    .e2_old_valid(e2_rbw_pkm || e2_rbw_dm),
    .e2_rbw(e2_rbw_pkm ? pkm_rdata : e2_rbw_dm ? dm_rdata : '0),
    .wr_en(e1.dec.wr_rcsum), .wr_idx(e1.dreg[0]), .wr_data(bus[15:0]),
    .csum(csum_q));

  assign halted = !running && !id_valid && !e1.valid && !e2_valid && !e3_valid;

  assign ev_stall        = id_valid && running && stall;
  assign ev_branch_taken = taken;
  assign ev_squash       = running && squash_slot && !stall;

  // the AGU that supplies a memory address must be active
  a_src_addr: assert property (@(posedge clk) disable iff (!rst_n)
    (advance && (id_dec.rd_pkm || id_dec.rd_dm || id_dec.rd_iom)) |-> a1_act);
  a_dst_addr: assert property (@(posedge clk) disable iff (!rst_n)
    (advance && (id_dec.wr_pkm || id_dec.wr_dm || id_dec.wr_iom)) |-> a2_act);

endmodule
