// asip_top: one processing tile of a flow-aware Ethernet access node: the
// packet-processing ASIP with its program memory, its two dual-ported
// 4 KiB memories, the two DMA engines that reach those memories from the
// multicore environment, and the controller that switches banks.
//
//   PKM     packet memory, two 2 KiB banks (byte addresses 0..2047, 2048..4095)
//   TKM/DM  ticket memory, two 128 byte banks (0..127, 128..255), then
//           3840 bytes of data memory (256..4095)
// While the ASIP works on one bank of each, the environment writes the next
// packet and ticket into the other banks, and reads back the previous
// results, through the DMA engines (64 bit words, port B). When the program
// executes halt and a new packet is waiting, the controller flips bank_sel
// and restarts the ASIP; programs always see their packet at PKM address 0
// and their ticket at DM address 0.
//
// Two clocks: clk runs the ASIP, its program memory, port A of both
// memories and the controller; clk_env runs the DMA engines and port B of
// both memories, so the environment side can run faster than the processor
// (e.g. 200 MHz against 120 MHz) and a 64 bit DMA port keeps up with the
// link without rate-adaptation buffers. The dual-ported memories are the
// boundary for data; the hand-off signals cross through synchronizers.
// rst_n is asynchronous; the clk_env side leaves reset two clk_env cycles
// after it is released.
//
// Environment interface:
//   pm_*       program load port, clk (one 72 bit word per cycle)
//   pkm_*/tkm_* DMA command and 64 bit valid/ready streams, clk_env; word
//              addresses are physical (PKM bank 1 starts at word 256, TKM
//              bank 1 at word 16)
//   load_done  clk_env pulse after both banks of the free side hold the
//              next packet (pulses at least 3 clk cycles apart)
//   result_valid clk_env pulse when the previous packet's bank becomes free
//   free_bank, busy  clk_env, follow the controller 2-3 clk_env cycles late
//   io_*       the ASIP's 32 bit memory-mapped IO port (e.g. a TCAM), clk
//   halted, bank_sel, ev_*  status of the ASIP, clk
// The tile structure and the two clock domains follow the architecture; the
// synchronizers and the DMA and hand-off interfaces are this design's own.
module asip_top
  import asip_pkg::*;
(
  input  logic        clk,
  input  logic        clk_env,
  input  logic        rst_n,
  // program load
  input  logic        pm_we,
  input  logic [PC_W-1:0] pm_waddr,
  input  logic [INSTR_W-1:0] pm_wdata,
  // PKM DMA
  input  logic        pkm_cmd_valid,
  output logic        pkm_cmd_ready,
  input  logic        pkm_cmd_write,
  input  logic [DMA_AW-1:0] pkm_cmd_addr,
  input  logic [DMA_AW:0]   pkm_cmd_len,
  output logic        pkm_done,
  input  logic        pkm_s_valid,
  output logic        pkm_s_ready,
  input  logic [63:0] pkm_s_data,
  output logic        pkm_m_valid,
  input  logic        pkm_m_ready,
  output logic [63:0] pkm_m_data,
  // TKM DMA
  input  logic        tkm_cmd_valid,
  output logic        tkm_cmd_ready,
  input  logic        tkm_cmd_write,
  input  logic [DMA_AW-1:0] tkm_cmd_addr,
  input  logic [DMA_AW:0]   tkm_cmd_len,
  output logic        tkm_done,
  input  logic        tkm_s_valid,
  output logic        tkm_s_ready,
  input  logic [63:0] tkm_s_data,
  output logic        tkm_m_valid,
  input  logic        tkm_m_ready,
  output logic [63:0] tkm_m_data,
  // controller
  input  logic        load_done,
  output logic        result_valid,
  output logic        free_bank,
  output logic        busy,
  // memory-mapped IO
  output logic        io_re,
  output logic [PTR_W-1:0] io_raddr,
  input  logic [BUS_W-1:0] io_rdata,
  output logic        io_we,
  output logic [PTR_W-1:0] io_waddr,
  output logic [BUS_W-1:0] io_wdata,
  // status and events
  output logic        halted,
  output logic        bank_sel,
  output logic        ev_stall,
  output logic        ev_branch_taken,
  output logic        ev_squash
);

  logic   restart;
  pc_t    pm_raddr;
  instr_t pm_rdata;

  logic  pkm_en, pkm_we, dm_en, dm_we;
  ptr_t  pkm_addr, dm_addr;
  size_e pkm_size, dm_size;
  bus_t  pkm_wdata, pkm_rdata, dm_wdata, dm_rdata;

  logic              pb_en, pb_we, tb_en, tb_we;
  logic [DMA_AW-1:0] pb_addr, tb_addr;
  logic [7:0]        pb_be, tb_be;
  logic [63:0]       pb_wdata, pb_rdata, tb_wdata, tb_rdata;

  // hand-off signals between the clk_env and clk domains
  logic env_rst_n, load_done_c, result_valid_c, free_bank_c, busy_c;
  asip_sync #(.W(1), .RESET_VAL(1'b0)) u_env_rst (
    .clk(clk_env), .rst_n, .d(1'b1), .q(env_rst_n));
  asip_pulse_sync u_load_sync (
    .src_clk(clk_env), .src_rst_n(env_rst_n), .src_pulse(load_done),
    .dst_clk(clk), .dst_rst_n(rst_n), .dst_pulse(load_done_c));
  asip_pulse_sync u_result_sync (
    .src_clk(clk), .src_rst_n(rst_n), .src_pulse(result_valid_c),
    .dst_clk(clk_env), .dst_rst_n(env_rst_n), .dst_pulse(result_valid));
  asip_sync #(.W(2), .RESET_VAL(2'b10)) u_status_sync (
    .clk(clk_env), .rst_n(env_rst_n), .d({free_bank_c, busy_c}), .q({free_bank, busy}));

  asip_ctrl u_ctrl (
    .clk, .rst_n, .load_done(load_done_c), .result_valid(result_valid_c),
    .free_bank(free_bank_c), .busy(busy_c),
    .bank_sel, .restart, .halted);

  asip_pmem u_pm (
    .clk, .raddr(pm_raddr), .rdata(pm_rdata),
    .we(pm_we), .waddr(pm_waddr), .wdata(instr_t'(pm_wdata)));

  asip_core u_core (
    .clk, .rst_n, .bank_sel, .restart, .halted,
    .pm_raddr, .pm_rdata,
    .pkm_en, .pkm_we, .pkm_addr, .pkm_size, .pkm_wdata, .pkm_rdata,
    .dm_en, .dm_we, .dm_addr, .dm_size, .dm_wdata, .dm_rdata,
    .io_re, .io_raddr, .io_rdata, .io_we, .io_waddr, .io_wdata,
    .ev_stall, .ev_branch_taken, .ev_squash);

  asip_dpram u_pkm (
    .clk, .clk_env,
    .a_en(pkm_en), .a_we(pkm_we), .a_addr(pkm_addr), .a_size(pkm_size),
    .a_wdata(pkm_wdata), .a_rdata(pkm_rdata),
    .b_en(pb_en), .b_we(pb_we), .b_addr(pb_addr), .b_be(pb_be),
    .b_wdata(pb_wdata), .b_rdata(pb_rdata));

  asip_dpram u_tkm_dm (
    .clk, .clk_env,
    .a_en(dm_en), .a_we(dm_we), .a_addr(dm_addr), .a_size(dm_size),
    .a_wdata(dm_wdata), .a_rdata(dm_rdata),
    .b_en(tb_en), .b_we(tb_we), .b_addr(tb_addr), .b_be(tb_be),
    .b_wdata(tb_wdata), .b_rdata(tb_rdata));

  asip_dma u_pkm_dma (
    .clk(clk_env), .rst_n(env_rst_n),
    .cmd_valid(pkm_cmd_valid), .cmd_ready(pkm_cmd_ready), .cmd_write(pkm_cmd_write),
    .cmd_addr(pkm_cmd_addr), .cmd_len(pkm_cmd_len), .done(pkm_done),
    .s_valid(pkm_s_valid), .s_ready(pkm_s_ready), .s_data(pkm_s_data),
    .m_valid(pkm_m_valid), .m_ready(pkm_m_ready), .m_data(pkm_m_data),
    .b_en(pb_en), .b_we(pb_we), .b_addr(pb_addr), .b_be(pb_be),
    .b_wdata(pb_wdata), .b_rdata(pb_rdata));

  asip_dma u_tkm_dma (
    .clk(clk_env), .rst_n(env_rst_n),
    .cmd_valid(tkm_cmd_valid), .cmd_ready(tkm_cmd_ready), .cmd_write(tkm_cmd_write),
    .cmd_addr(tkm_cmd_addr), .cmd_len(tkm_cmd_len), .done(tkm_done),
    .s_valid(tkm_s_valid), .s_ready(tkm_s_ready), .s_data(tkm_s_data),
    .m_valid(tkm_m_valid), .m_ready(tkm_m_ready), .m_data(tkm_m_data),
    .b_en(tb_en), .b_we(tb_we), .b_addr(tb_addr), .b_be(tb_be),
    .b_wdata(tb_wdata), .b_rdata(tb_rdata));

endmodule
