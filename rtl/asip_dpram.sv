// asip_dpram: one of the ASIP's two 4 KiB dual-ported memories (the packet
// memory PKM, or the ticket memory TKM plus data memory DM).
//
// Physically two Block RAMs. Port A belongs to the ASIP: it sees each BRAM
// 16 bits wide and reaches bytes through asip_memctrl (8/16/32 bit accesses,
// big-endian). Port A runs in read-before-write mode: on a write the old
// contents of the addressed bytes appear on a_rdata the next cycle, which
// feeds the Read-Before-Write bus of the checksum engine. Port B belongs to
// the multicore environment (its DMA engine): both BRAMs 32 bits wide side by
// side, one 64 bit word per access, with byte enables.
//
// Port A runs on clk (the ASIP clock), port B on clk_env (the environment
// clock), so the memory is also the clock-domain boundary of the tile. Both
// ports are synchronous with one cycle read latency; the read data holds
// while a port is idle. Port B word w holds bytes 8w..8w+7, first byte in
// bits 63:56. The two ports must not touch the same bytes at the same time;
// the bank scheme guarantees that (the ASIP and the environment always use
// different banks). Bank (PKM 2 x 2 KiB, TKM 2 x 128 B) selection happens in
// the address the ASIP presents; this memory is flat. Each port is written
// in its own plain always block (the usual true dual-port RAM description):
// always_ff would forbid the second writer of the array. Lint tools report
// the arrays as driven from two blocks with different clocks; that is what
// a memory with two independently clocked write ports is, and synthesis
// maps it onto dual-ported block RAM.
//
// Follows the architecture: size, dual porting with one port per side, the
// 16 bit ASIP-side and 64 bit environment-side organisation, separate
// clocks, read-before-write. This design's choice: byte order.
module asip_dpram
  import asip_pkg::*;
(
  input  logic        clk,
  input  logic        clk_env,
  // port A: ASIP
  input  logic        a_en,
  input  logic        a_we,
  input  ptr_t        a_addr,
  input  size_e       a_size,
  input  bus_t        a_wdata,
  output bus_t        a_rdata,   // load value, or old value after a write
  // port B: DMA, 64 bit
  input  logic        b_en,
  input  logic        b_we,
  input  logic [DMA_AW-1:0] b_addr,
  input  logic [7:0]  b_be,
  input  logic [63:0] b_wdata,
  output logic [63:0] b_rdata
);

  localparam int unsigned HWORDS = MEM_BYTES / 4;  // entries per bank

  logic [15:0] bank0 [HWORDS];
  logic [15:0] bank1 [HWORDS];

  logic [9:0]  idx0, idx1;
  logic [1:0]  be0, be1;
  logic [15:0] wd0, wd1;
  logic [15:0] rd0_q, rd1_q;
  logic        r_odd_q, r_swapped_q;
  size_e       r_size_q;

  asip_memctrl u_ctrl (
    .addr(a_addr), .size(a_size), .wdata(a_wdata),
    .idx0, .idx1, .be0, .be1, .wd0, .wd1,
    .r_odd(r_odd_q), .r_swapped(r_swapped_q), .r_size(r_size_q),
    .rd0(rd0_q), .rd1(rd1_q), .rvalue(a_rdata)
  );

  // port B entry pair: word w covers halfwords 4w..4w+3
  logic [9:0] bi0, bi1;
  assign bi0 = {b_addr, 1'b0};
  assign bi1 = {b_addr, 1'b1};

  // port B, environment clock
  always @(posedge clk_env) begin
    if (b_en) begin
      b_rdata <= {bank0[bi0], bank1[bi0], bank0[bi1], bank1[bi1]};
      if (b_we) begin
        if (b_be[7]) bank0[bi0][15:8] <= b_wdata[63:56];
        if (b_be[6]) bank0[bi0][7:0]  <= b_wdata[55:48];
        if (b_be[5]) bank1[bi0][15:8] <= b_wdata[47:40];
        if (b_be[4]) bank1[bi0][7:0]  <= b_wdata[39:32];
        if (b_be[3]) bank0[bi1][15:8] <= b_wdata[31:24];
        if (b_be[2]) bank0[bi1][7:0]  <= b_wdata[23:16];
        if (b_be[1]) bank1[bi1][15:8] <= b_wdata[15:8];
        if (b_be[0]) bank1[bi1][7:0]  <= b_wdata[7:0];
      end
    end
  end

  // port A, ASIP clock, read-before-write
  always @(posedge clk) begin
    if (a_en) begin
      rd0_q       <= bank0[idx0];
      rd1_q       <= bank1[idx1];
      r_odd_q     <= a_addr[0] && (a_size != SZ32);
      r_swapped_q <= a_addr[1];
      r_size_q    <= a_size;
      if (a_we) begin
        if (be0[1]) bank0[idx0][15:8] <= wd0[15:8];
        if (be0[0]) bank0[idx0][7:0]  <= wd0[7:0];
        if (be1[1]) bank1[idx1][15:8] <= wd1[15:8];
        if (be1[0]) bank1[idx1][7:0]  <= wd1[7:0];
      end
    end
  end

endmodule
