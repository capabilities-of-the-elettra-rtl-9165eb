// sync_fifo - synchronous FIFO, first word fall through.
//
// Buffers the 125 MHz word stream on the DAC board between the FPDP board and
// the 4:1 multiplexer, which starts reading only on START_DAC.  The buffering
// itself is from the board description; depth (one Virtex II block RAM of
// 512 words) and the show-ahead output are this design's choices.  rd_data is
// valid whenever empty is low; a write reaches rd_data one clock later.
// Writes when full and reads when empty are ignored.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  input  logic                     rd_en,
  output logic [W-1:0]             rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_count: assert property (@(posedge clk) disable iff (rst)
    count <= (AW+1)'(DEPTH));

endmodule
