// asip_pulse_sync: carries single-cycle pulses from the src_clk domain to
// the dst_clk domain.
//
// Each source pulse flips a toggle flip-flop; the toggle level crosses
// through two flip-flops in the destination domain and a change of the
// synchronized level gives one dst_clk pulse, two to three dst_clk cycles
// after the source pulse. Pulses must be at least three dst_clk cycles
// apart to be seen separately (the bank hand-off sends at most one per
// packet). Each side has its own asynchronous reset.
module asip_pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);

  logic tgl, meta, sync, last;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     tgl <= 1'b0;
    else if (src_pulse) tgl <= !tgl;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      meta <= 1'b0; sync <= 1'b0; last <= 1'b0;
    end else begin
      meta <= tgl; sync <= meta; last <= sync;
    end
  end

  assign dst_pulse = sync ^ last;

endmodule
