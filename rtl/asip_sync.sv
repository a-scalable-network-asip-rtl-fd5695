// asip_sync: two-flop synchronizer for level signals that cross from one
// clock domain into the domain of clk.
//
// Each bit of d passes through two flip-flops clocked by clk; q follows d
// two to three clk cycles later. Only use it for bits that change rarely
// and may be sampled independently (a bank number, a busy flag), or, with
// d tied high and RESET_VAL 0, as a reset synchronizer: q then drops with
// rst_n at once and rises two clk cycles after rst_n is released. The
// asynchronous reset loads RESET_VAL so that q starts at the value the
// source domain starts with.
module asip_sync #(
  parameter int unsigned   W         = 1,
  parameter logic [W-1:0]  RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
