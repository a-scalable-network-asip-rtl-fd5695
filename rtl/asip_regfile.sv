// asip_regfile: multi-ported register file, used for REG_DATA (8 x 16 bit)
// and REG_PTR (8 x 12 bit).
//
// NR asynchronous read ports and NW synchronous write ports. All entries
// reset to zero. When several write ports target the same entry in one
// cycle, the highest-numbered port wins; the core orders its write ports so
// that the youngest instruction has the highest number. The entry count and
// widths follow the architecture; port counts, reset value and write
// priority are this design's own choices.
module asip_regfile #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NR    = 3,
  parameter int unsigned NW    = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NR-1:0][AW-1:0]    raddr,
  output logic [NR-1:0][WIDTH-1:0] rdata,
  input  logic [NW-1:0]            we,
  input  logic [NW-1:0][AW-1:0]    waddr,
  input  logic [NW-1:0][WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < int'(NW); p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < int'(NR); p++) rdata[p] = regs[raddr[p]];

endmodule
