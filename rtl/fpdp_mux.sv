// fpdp_mux - N:1 multiplexer of the DAC's FPDP board.
//
// The DSP boards return correction kicks on up to 12 Front Panel Data Ports.
// Each word arrives with its port's DVALID line high for one clk125 cycle and
// is parked in a small per-port FIFO.  A round-robin sequencer then takes one
// word from port 0, one from port 1, ..., port ratio-1, and again from port
// 0, forming one 32 bit 125 MS/s stream in the same order in which the ADC's
// FPDP board split it.  If the port whose turn it is has no word yet, the
// sequencer waits for it, so a late board delays the stream but never
// reorders it.  DVALID-triggered multiplexing into a 32 bit 125 MS/s stream
// follows the board description; the per-port FIFOs (PORT_DEPTH words), the
// wait-for-turn rule and the synchronous port interface are this design's
// choices.  `start` resets the sequence to port 0 and empties the FIFOs.
// Latency: two clocks from p_dvalid to out_valid when the port is due.
module fpdp_mux
  import mbf_pkg::*;
#(
  parameter int unsigned NPORTS     = MAX_PORTS,
  parameter int unsigned W          = WORD_W,
  parameter int unsigned PORT_DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [3:0]               ratio,
  input  logic [NPORTS-1:0][W-1:0] p_data,
  input  logic [NPORTS-1:0]        p_dvalid,
  output logic [W-1:0]             out_data,
  output logic                     out_valid,
  output logic                     overflow   // a port FIFO was full
);

  logic [NPORTS-1:0][W-1:0] head;
  logic [NPORTS-1:0]        empty, full, pop;
  logic [3:0]               idx, n_act;

  wire [3:0] ratio_ok = (ratio == 4'd0) ? 4'd1 :
                        (32'(ratio) > NPORTS) ? 4'(NPORTS) : ratio;

  for (genvar k = 0; k < NPORTS; k++) begin : g_port
    logic [$clog2(PORT_DEPTH):0] cnt;
    sync_fifo #(.W(W), .DEPTH(PORT_DEPTH)) u_fifo (
      .clk     (clk),
      .rst     (rst || start),
      .wr_en   (p_dvalid[k]),
      .wr_data (p_data[k]),
      .rd_en   (pop[k]),
      .rd_data (head[k]),
      .empty   (empty[k]),
      .full    (full[k]),
      .count   (cnt)
    );
  end

  always_comb begin
    pop = '0;
    if (!empty[idx]) pop[idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      n_act     <= 4'd1;
      out_data  <= '0;
      out_valid <= 1'b0;
      overflow  <= 1'b0;
    end else if (start) begin
      idx       <= '0;
      n_act     <= ratio_ok;
      out_valid <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      out_valid <= pop[idx];
      if (pop[idx]) begin
        out_data <= head[idx];
        idx      <= (idx == n_act - 1'b1) ? '0 : idx + 1'b1;
      end
      if (|(p_dvalid & full)) overflow <= 1'b1;
    end
  end

endmodule
