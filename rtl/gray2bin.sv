// gray2bin - Gray to binary decoder for the four samples of a 125 MHz word.
//
// The ADC output code is decoded lane by lane (8 bit reflected Gray code) and
// registered once.  That a Gray to binary decoder follows the demultiplexer is
// from the board description; the single pipeline register is this design's
// choice.  Latency: one clock.
module gray2bin
  import mbf_pkg::*;
#(
  parameter int unsigned NLANES = LANES
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [NLANES*SAMPLE_W-1:0]  in_word,
  output logic [NLANES*SAMPLE_W-1:0]  out_word
);

  logic [NLANES*SAMPLE_W-1:0] dec;

  always_comb begin
    for (int l = 0; l < NLANES; l++)
      dec[l*SAMPLE_W +: SAMPLE_W] = gray_to_bin(in_word[l*SAMPLE_W +: SAMPLE_W]);
  end

  always_ff @(posedge clk) begin
    if (rst) out_word <= '0;
    else     out_word <= dec;
  end

endmodule
