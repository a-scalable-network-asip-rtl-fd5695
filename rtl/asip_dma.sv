// asip_dma: DMA engine between the multicore environment and the environment
// side (port B) of one of the ASIP's dual-ported memories. One instance
// serves the packet memory (PKM DMA), another the ticket memory (TKM DMA).
//
// A command names a first 64 bit word address, a word count and a direction.
//   write (memory <- environment): words arrive on the s_* valid/ready
//     stream and are written one per cycle.
//   read  (memory -> environment): words leave on the m_* valid/ready stream,
//     one per cycle while m_ready is high. The memory's registered read data
//     drives m_data directly; a new read is only issued when the word on
//     m_data is taken (or none is pending), so back-pressure needs no buffer.
// done pulses for one cycle when the last word has been written or taken.
// Only the environment's bank (the one the ASIP is not using) should be
// addressed; the engine does not check this.
// The 64 bit port follows the architecture; the command/stream interface is
// this design's own.
module asip_dma
  import asip_pkg::*;
#(
  parameter int unsigned AW = DMA_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  logic          cmd_write,
  input  logic [AW-1:0] cmd_addr,
  input  logic [AW:0]   cmd_len,     // number of 64 bit words, >= 1
  output logic          done,
  // environment -> memory
  input  logic          s_valid,
  output logic          s_ready,
  input  logic [63:0]   s_data,
  // memory -> environment
  output logic          m_valid,
  input  logic          m_ready,
  output logic [63:0]   m_data,
  // memory port B
  output logic          b_en,
  output logic          b_we,
  output logic [AW-1:0] b_addr,
  output logic [7:0]    b_be,
  output logic [63:0]   b_wdata,
  input  logic [63:0]   b_rdata
);

  typedef enum logic [1:0] {IDLE, WRITE, READ} state_e;
  state_e        state;
  logic [AW-1:0] addr;
  logic [AW:0]   left;      // words still to issue
  logic          pend;      // a read word is on b_rdata, not yet taken

  assign cmd_ready = (state == IDLE);
  assign s_ready   = (state == WRITE);
  assign m_valid   = pend;
  assign m_data    = b_rdata;

  logic issue_rd, take;
  assign take     = pend && m_ready;
  assign issue_rd = (state == READ) && (left != '0) && (!pend || m_ready);

  always_comb begin
    b_en    = (s_valid && s_ready) || issue_rd;
    b_we    = (state == WRITE);
    b_addr  = addr;
    b_be    = 8'hFF;
    b_wdata = s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      addr  <= '0;
      left  <= '0;
      pend  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (cmd_valid) begin
          state <= cmd_write ? WRITE : READ;
          addr  <= cmd_addr;
          left  <= cmd_len;
        end
        WRITE: if (s_valid) begin
          addr <= addr + 1'b1;
          left <= left - 1'b1;
          if (left == 1) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        READ: begin
          if (issue_rd) begin
            addr <= addr + 1'b1;
            left <= left - 1'b1;
          end
          if (issue_rd)  pend <= 1'b1;
          else if (take) pend <= 1'b0;
          if (take && !issue_rd && left == '0) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_len: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && cmd_ready) |-> cmd_len != '0);

endmodule
