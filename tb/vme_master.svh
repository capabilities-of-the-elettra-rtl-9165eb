// vme_master.svh - VME A32/D32 single-cycle master tasks for testbenches.
// Include inside a module that declares vme_as_n, vme_ds_n, vme_write_n,
// vme_lword_n, vme_am, vme_a, vme_d_i (master drives), vme_d_o (slave data)
// and vme_dtack_n.  Times are in ns.  A cycle with no DTACK* within
// `vme_timeout` ns is ended and reported through `acked`.

int vme_timeout = 2000;

task automatic vme_cycle(input bit write, input logic [31:0] addr, input logic [5:0] am,
                         input logic [31:0] wdata, output logic [31:0] rdata, output bit acked);
  int t;
  vme_a       = addr[31:1];
  vme_am      = am;
  vme_lword_n = 1'b0;
  vme_write_n = !write;
  vme_d_i     = write ? wdata : 32'h0;
  #15 vme_as_n = 1'b0;
  #10 vme_ds_n = 2'b00;
  t = 0;
  acked = 0;
  while (t < vme_timeout) begin
    #1 t++;
    if (!vme_dtack_n) begin acked = 1; break; end
  end
  #5 rdata = vme_d_o;
  vme_ds_n = 2'b11;
  vme_as_n = 1'b1;
  t = 0;
  while (!vme_dtack_n && t < vme_timeout) begin #1 t++; end
  #10;
endtask

task automatic vme_wr(input logic [31:0] addr, input logic [31:0] d);
  logic [31:0] r; bit ok;
  vme_cycle(1, addr, 6'h09, d, r, ok);
  if (!ok) $display("VME write %h: no DTACK", addr);
endtask

task automatic vme_rd(input logic [31:0] addr, output logic [31:0] d);
  bit ok;
  vme_cycle(0, addr, 6'h09, 0, d, ok);
  if (!ok) $display("VME read %h: no DTACK", addr);
endtask
