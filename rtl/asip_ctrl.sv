// asip_ctrl: controller between one ASIP and the multicore environment.
//
// It owns the Bank Select signal and the Restart pulse and watches Halted.
// The environment fills the inactive PKM and ticket banks through the DMA
// engines and then pulses load_done. When the ASIP is halted and a loaded
// bank is waiting, the controller flips bank_sel (the ASIP now works on the
// new packet), pulses restart for one cycle and, if the bank it leaves held
// a packet the ASIP has just finished, pulses result_valid: the environment
// may now read that packet and ticket from the inactive bank and refill it.
//   free_bank   the bank the environment may use (= !bank_sel)
//   busy        the ASIP is working on a packet
// A load_done that arrives while a load is still waiting is not counted
// twice. The signal names follow the tile's block diagram; the handshake
// with the environment is this design's own.
module asip_ctrl (
  input  logic clk,
  input  logic rst_n,
  // environment
  input  logic load_done,
  output logic result_valid,
  output logic free_bank,
  output logic busy,
  // ASIP
  output logic bank_sel,
  output logic restart,
  input  logic halted
);

  typedef enum logic [1:0] {WAIT, START, RUN} state_e;
  state_e state;
  logic   loaded;     // the inactive bank holds a new packet
  logic   has_pkt;    // the active bank holds a packet (processed or not)

  assign restart   = (state == START);
  assign free_bank = !bank_sel;
  assign busy      = (state != WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= WAIT;
      loaded       <= 1'b0;
      has_pkt      <= 1'b0;
      bank_sel     <= 1'b0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      if (load_done) loaded <= 1'b1;
      unique case (state)
        WAIT: if (halted && (loaded || load_done)) begin
          bank_sel     <= !bank_sel;
          loaded       <= 1'b0;
          result_valid <= has_pkt;
          has_pkt      <= 1'b1;
          state        <= START;
        end
        START: state <= RUN;
        RUN:   if (halted) state <= WAIT;
        default: state <= WAIT;
      endcase
    end
  end

endmodule
