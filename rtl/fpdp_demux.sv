// fpdp_demux - 1:N demultiplexer of the ADC's FPDP board.
//
// The 125 MHz word stream (four bunch samples per word) is dealt round-robin
// over the first `ratio` Front Panel Data Ports: word 0 after the start
// trigger goes to port 0, word 1 to port 1, ..., word N to port 0 again, so
// each port carries every N-th word at 125/N MWords/s (about 20 MWords/s for
// the six DSP boards of the transverse feedback).  The programmable ratio of
// up to 12 ports and the round-robin split follow the board description.  The
// port signalling is this design's choice, synchronous to clk125:
//   p_data   word, held until the port's next word
//   p_strobe one-cycle pulse in the cycle p_data changes
//   p_dvalid high on ports 0..ratio-1 while the stream runs (FPDP DVALID)
//   p_sync   high with the first word after the start trigger (FPDP SYNC)
// Latency: one clock from in_data to p_data.  A new ratio takes effect at the
// next start.
module fpdp_demux
  import mbf_pkg::*;
#(
  parameter int unsigned NPORTS = MAX_PORTS,
  parameter int unsigned W      = WORD_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    enable,
  input  logic                    start,     // trigger: restart at port 0
  input  logic [3:0]              ratio,     // active ports 1..NPORTS
  input  logic [W-1:0]            in_data,
  input  logic                    in_valid,
  output logic [NPORTS-1:0][W-1:0] p_data,
  output logic [NPORTS-1:0]       p_strobe,
  output logic [NPORTS-1:0]       p_dvalid,
  output logic [NPORTS-1:0]       p_sync
);

  logic       running, first;
  logic [3:0] idx, n_act;

  // ratio out of range is clipped to 1..NPORTS
  wire [3:0] ratio_ok = (ratio == 4'd0) ? 4'd1 :
                        (32'(ratio) > NPORTS) ? 4'(NPORTS) : ratio;

  always_ff @(posedge clk) begin
    if (rst) begin
      running  <= 1'b0;
      first    <= 1'b0;
      idx      <= '0;
      n_act    <= 4'd1;
      p_data   <= '0;
      p_strobe <= '0;
      p_dvalid <= '0;
      p_sync   <= '0;
    end else begin
      p_strobe <= '0;
      if (!enable) begin
        running  <= 1'b0;
        p_dvalid <= '0;
        p_sync   <= '0;
      end else if (start) begin
        running <= 1'b1;
        first   <= 1'b1;
        idx     <= '0;
        n_act   <= ratio_ok;
        for (int k = 0; k < NPORTS; k++) p_dvalid[k] <= (k < 32'(ratio_ok));
        p_sync  <= '0;
      end else if (running && in_valid) begin
        p_data[idx]   <= in_data;
        p_strobe[idx] <= 1'b1;
        p_sync[idx]   <= first;
        first         <= 1'b0;
        idx           <= (idx == n_act - 1'b1) ? '0 : idx + 1'b1;
      end
    end
  end

  // at most one port receives a word per clock, and only an active one
  a_one_port: assert property (@(posedge clk) disable iff (rst)
    $onehot0(p_strobe) && (p_strobe & ~p_dvalid) == '0);

endmodule
