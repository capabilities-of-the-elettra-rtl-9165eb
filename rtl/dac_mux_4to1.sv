// dac_mux_4to1 - 4:1 multiplexer feeding the 500 MS/s DAC.
//
// After a START_DAC trigger the multiplexer takes one 32 bit word (four
// samples, oldest in bits 7:0) from the FIFO every 125 MHz cycle and sends it
// to the DAC mezzanine as two 16 bit sample pairs on consecutive 250 MHz
// cycles; the mezzanine's last 2:1 step (DDR) makes 500 MS/s.  The launch by
// START_DAC, the 16 bit 250 MHz bus and the 4:1 ratio follow the board
// description.  This design's own choices: when the FIFO is empty after the
// start, IDLE_CODE (mid-scale) is sent and `underflow` is set; `stop` ends
// the stream; clk125 is derived from clk250 with aligned rising edges and a
// toggle flop tells the 250 MHz side the phase.
//
// Timing: the word popped at clk125 edge k is registered in the 125 MHz domain
// at that edge, its low pair leaves on dac_d from the following clk250 edge
// (the one between clk125 edges) and its high pair one clk250 cycle later.
module dac_mux_4to1
  import mbf_pkg::*;
#(
  parameter sample_t IDLE_CODE = 8'h80
) (
  input  logic                  clk250,
  input  logic                  clk125,
  input  logic                  rst,
  input  logic                  start,      // START_DAC pulse (clk125)
  input  logic                  stop,
  input  word_t                 fifo_data,  // FIFO head (first word fall through)
  input  logic                  fifo_empty,
  output logic                  fifo_pop,
  output logic                  running,
  output logic                  underflow,
  output logic [2*SAMPLE_W-1:0] dac_d       // {later, earlier} sample, clk250
);

  word_t word_q, hold;
  logic  t125, t125_s;

  assign fifo_pop = running && !fifo_empty;

  always_ff @(posedge clk125) begin
    if (rst) begin
      t125      <= 1'b0;
      running   <= 1'b0;
      underflow <= 1'b0;
      word_q    <= {LANES{IDLE_CODE}};
    end else begin
      t125 <= ~t125;
      if (start)     running <= 1'b1;
      else if (stop) running <= 1'b0;
      if (start) underflow <= 1'b0;
      if (running) begin
        word_q <= fifo_empty ? {LANES{IDLE_CODE}} : fifo_data;
        if (fifo_empty) underflow <= 1'b1;
      end else begin
        word_q <= {LANES{IDLE_CODE}};
      end
    end
  end

  wire mid_edge = t125 ^ t125_s;

  always_ff @(posedge clk250) begin
    if (rst) begin
      t125_s <= 1'b0;
      hold   <= {LANES{IDLE_CODE}};
      dac_d  <= {2{IDLE_CODE}};
    end else begin
      t125_s <= t125;
      if (mid_edge) begin
        hold  <= word_q;
        dac_d <= word_q[2*SAMPLE_W-1:0];
      end else begin
        dac_d <= hold[WORD_W-1:2*SAMPLE_W];
      end
    end
  end

  a_pop: assert property (@(posedge clk125) disable iff (rst)
    fifo_pop |-> running && !fifo_empty);

endmodule
