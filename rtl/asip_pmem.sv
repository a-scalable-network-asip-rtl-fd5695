// asip_pmem: program memory of the ASIP (Harvard architecture), PM_DEPTH
// words of 72 bits.
//
// Synchronous read: the address presented in IF returns the instruction word
// in ID. A separate write port loads programs; nothing in the architecture
// fixes how programs get there, so this port is brought out to the tile
// boundary. Contents are not reset. The word width follows the architecture;
// the depth (256) and the load port are this design's choices.
module asip_pmem
  import asip_pkg::*;
#(
  parameter int unsigned DEPTH = PM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output instr_t        rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  instr_t        wdata
);

  instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
