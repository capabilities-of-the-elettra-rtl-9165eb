// data_redirector - the "2 ways data redirector" of the ADC and DAC firmware.
//
// The live stream (ADC samples, or words arriving from the FPDP board on the
// DAC) can go to the forward path (FPDP board on the ADC, DAC on the DAC), to
// the ZBT ring memory, or to both.  The forward path can instead be fed by
// playback from the memory, which on the ADC generates FPDP streams from data
// written via VME and on the DAC plays a stored signal.  These routes are the
// ones the board description lists; their control by three register bits is
// this design's choice.  The memory always receives the live data; only its
// valid is gated.  The redirector is combinational (no latency): the
// blocks on either side register the data, and every stage saved shortens the
// feedback loop.
module data_redirector #(
  parameter int unsigned W = 32
) (
  input  logic         fwd_en,       // forward path on
  input  logic         ram_wr_en,    // live data into the memory
  input  logic         fwd_src_ram,  // forward path fed by playback
  input  logic [W-1:0] live_data,
  input  logic         live_valid,
  input  logic [W-1:0] play_data,
  input  logic         play_valid,
  output logic [W-1:0] fwd_data,
  output logic         fwd_valid,
  output logic [W-1:0] ram_data,
  output logic         ram_valid
);

  always_comb begin
    fwd_data  = fwd_src_ram ? play_data : live_data;
    fwd_valid = fwd_en & (fwd_src_ram ? play_valid : live_valid);
    ram_data  = live_data;
    ram_valid = ram_wr_en & live_valid;
  end

endmodule
