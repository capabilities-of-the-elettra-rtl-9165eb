// adc_demux_1to4 - capture of the 500 MS/s ADC stream and 1:4 demultiplexing.
//
// The ADC mezzanine delivers one 8 bit sample every 2 ns; the FPGA samples the
// bus on both edges of a 250 MHz clock (DDR).  The rising-edge and falling-edge
// samples are joined into a 16 bit pair on each rising edge, and two pairs make
// one 32 bit word that is handed to the 125 MHz domain.  The 1:4 ratio, the
// DDR clocking and the 8/32 bit widths follow the board description.  This
// design's own choices: the oldest sample sits in bits 7:0 of the word, clk125
// is derived from clk250 with aligned rising edges, and the 250 MHz side finds
// the clk125 phase with a toggle flop (t125) that it samples every cycle.
//
// Timing: a word is assembled at the clk250 rising edge that lies between two
// clk125 edges and stays unchanged for a full 125 MHz period around the next
// clk125 edge, which registers it in the receiving block (half a period of
// margin on either side).  The clk125 edge that takes a word comes 16 ns after
// the capture of its oldest sample and 10 ns after that of its newest.
module adc_demux_1to4
  import mbf_pkg::*;
(
  input  logic    clk250,
  input  logic    clk125,
  input  logic    rst,        // synchronous, active high (both domains)
  input  sample_t adc_d,      // new sample every clk250 edge
  output word_t   word        // stable around clk125 rising edges
);

  sample_t rise_q, fall_q;           // DDR input registers
  logic [2*SAMPLE_W-1:0] pair_q;     // {later, earlier} sample
  logic [2*SAMPLE_W-1:0] pair_prev;
  word_t   word250;
  logic    t125, t125_s;              // phase detector

  always_ff @(posedge clk250) rise_q <= adc_d;
  always_ff @(negedge clk250) fall_q <= adc_d;

  // clk125 toggle; seen from clk250 it differs from its last sample only at
  // the rising edge that lies between two clk125 edges.
  always_ff @(posedge clk125) begin
    if (rst) t125 <= 1'b0;
    else     t125 <= ~t125;
  end

  wire mid_edge = t125 ^ t125_s;

  always_ff @(posedge clk250) begin
    if (rst) begin
      t125_s    <= 1'b0;
      pair_q    <= '0;
      pair_prev <= '0;
      word250   <= '0;
    end else begin
      t125_s    <= t125;
      pair_q    <= {fall_q, rise_q};   // rise_q sampled 2 ns before fall_q
      pair_prev <= pair_q;
      if (mid_edge) word250 <= {pair_q, pair_prev};
    end
  end

  // word250 changes only at mid edges, so clk125 logic may sample it directly
  assign word = word250;

endmodule
