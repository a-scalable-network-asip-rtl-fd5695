// asip_csum: checksum engine with its two checksum registers REG_CSUM[0..1].
//
// Keeps Internet (ones' complement) checksums up to date while the program
// moves data. Every Load/Store bus transfer can be added to a checksum
// register ("new" data), and every store to PKM or DM also yields the
// overwritten bytes on the Read-Before-Write bus ("old" data), which is
// subtracted. A single store thus performs the incremental update
// sum' = sum + new - old.
//
// Pipeline (one stage per clock):
//   E1  the bus value, or 0 when the instruction makes no transfer, is
//       registered.
//   E2  the 32 bit new value is folded into 16 bits with a ones' complement
//       add of its halves and optionally byte-swapped (for data that sits at
//       an odd offset of the checksummed region), then registered. The old
//       value arrives from the Read-Before-Write bus in this stage and is
//       folded, swapped, inverted (ones' complement negation) and registered
//       the same way; without a store its contribution is 0.
//   E3  REG_CSUM[i] = REG_CSUM[i] + new + (-old) for each enabled i.
// The Load/Store bus writes REG_CSUM in E1, storing the inverse of the bus
// value (headers carry the inverted sum); it wins over an E3 update of the
// same register in the same cycle since it belongs to a younger instruction.
// Reads (csum) are the raw register values; the bus source inverts them.
//
// Follows the architecture: the E1/E2/E3 split, the two-halves fold, swap,
// negation of the old value and the two registers. This design's choices:
// both registers take the same new - old term (a pure load gives old = 0),
// the swap being an instruction bit, and the write priority.
module asip_csum
  import asip_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // E1
  input  csum_f_t   e1_ctl,      // already gated with the E1 valid bit
  input  logic      e1_new_valid,
  input  bus_t      e1_bus,
  // E2
  input  logic      e2_old_valid,
  input  bus_t      e2_rbw,
  // Load/Store bus write (E1)
  input  logic      wr_en,
  input  logic      wr_idx,
  input  data_t     wr_data,     // bus value; the register takes ~wr_data
  // state
  output data_t     csum [2]
);

  function automatic data_t fold_swap(bus_t v, logic sw);
    data_t f;
    f = oc_add(v[31:16], v[15:0]);
    return sw ? {f[7:0], f[15:8]} : f;
  endfunction

  // E1 -> E2
  bus_t    new_q;
  csum_f_t ctl2_q;
  // E2 -> E3
  data_t   new_h_q, old_h_q;
  csum_f_t ctl3_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      new_q   <= '0;
      ctl2_q  <= '0;
      new_h_q <= '0;
      old_h_q <= '0;
      ctl3_q  <= '0;
      csum[0] <= '0;
      csum[1] <= '0;
    end else begin
      new_q   <= e1_new_valid ? e1_bus : '0;
      ctl2_q  <= e1_ctl;
      new_h_q <= fold_swap(new_q, ctl2_q.swap);
      old_h_q <= e2_old_valid ? ~fold_swap(e2_rbw, ctl2_q.swap) : '0;
      ctl3_q  <= ctl2_q;
      if (ctl3_q.en0) csum[0] <= oc_add(oc_add(csum[0], new_h_q), old_h_q);
      if (ctl3_q.en1) csum[1] <= oc_add(oc_add(csum[1], new_h_q), old_h_q);
      if (wr_en) csum[wr_idx] <= ~wr_data;
    end
  end

endmodule
