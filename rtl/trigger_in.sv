// trigger_in - trigger input of the ADC and DAC boards.
//
// A board is triggered either by software (a VME register write) or by an
// external DECL trigger line, as the board description states.  The external
// line is asynchronous: it passes a SYNC_STAGES flop synchroniser, and its
// rising edge makes a one-cycle pulse that is ORed with the software pulse.
// Edge triggering and the synchroniser depth are this design's choices.
// Latency from ext_trig to trig: SYNC_STAGES + 1 clocks; soft_trig: 1 clock.
module trigger_in #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic ext_trig,    // external trigger, after the DECL receiver
  input  logic soft_trig,   // one-cycle pulse from the register file
  output logic trig         // one-cycle trigger pulse
);

  logic [SYNC_STAGES-1:0] sync_q;
  logic                   last_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q <= '0;
      last_q <= 1'b0;
      trig   <= 1'b0;
    end else begin
      sync_q <= {sync_q[SYNC_STAGES-2:0], ext_trig};
      last_q <= sync_q[SYNC_STAGES-1];
      trig   <= (sync_q[SYNC_STAGES-1] & ~last_q) | soft_trig;
    end
  end

endmodule
