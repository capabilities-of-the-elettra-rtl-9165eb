// zbt_sram_model - behavioural model of a pipelined ZBT SRAM (testbench only).
//
// Address, chip enable and write enable are sampled at a rising edge (end of
// cycle n); write data is taken from the bus at the end of cycle n+2 and read
// data is driven during cycle n+2.  Words never written read as zero.  The
// array is DEPTH words; the address is reduced modulo DEPTH.
module zbt_sram_model #(
  parameter int unsigned ADDR_W = 21,
  parameter int unsigned DEPTH  = 1 << 21
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] a,
  input  logic              ce_n,
  input  logic              we_n,
  input  logic [31:0]       dq_from_fpga,
  input  logic              fpga_oe,
  output logic [31:0]       dq_to_fpga
);
  logic [31:0]       mem [int unsigned];
  logic [ADDR_W-1:0] a1, a2;
  logic              rd1, wr1, wr2, drv;
  logic [31:0]       q;

  initial begin
    rd1 = 0; wr1 = 0; wr2 = 0; drv = 0; q = 0; a1 = 0; a2 = 0;
  end

  function automatic logic [31:0] rd(logic [ADDR_W-1:0] ad);
    int unsigned k = int'(ad) % DEPTH;
    return mem.exists(k) ? mem[k] : 32'h0;
  endfunction

  always @(posedge clk) begin
    a1  <= a;
    rd1 <= !ce_n && we_n;
    wr1 <= !ce_n && !we_n;
    a2  <= a1;
    wr2 <= wr1;
    drv <= rd1;
    if (rd1) q <= rd(a1);
    if (wr2) mem[int'(a2) % DEPTH] = dq_from_fpga;
  end

  // bus: what the FPGA sees on its input pins
  assign dq_to_fpga = fpga_oe ? dq_from_fpga : (drv ? q : 32'h0);
endmodule
