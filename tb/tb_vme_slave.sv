// tb_vme_slave - VME cycles against the slave with a memory responder that
// answers after a random delay.  Checks register write/read-back, read-only
// registers, trigger/arm pulses, memory window reads and writes, base
// address from switch and from the geographic address, and that wrong base
// addresses or address modifiers get no DTACK*.
module tb_vme_slave;
  import mbf_pkg::*;
  localparam int AW = 21;
  logic clk = 0, rst = 1;
  logic vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [5:0] vme_am = 0;
  logic [31:1] vme_a = 0;
  logic [31:0] vme_d_i = 0, vme_d_o;
  logic vme_d_oe, vme_dtack_n;
  logic [4:0] vme_ga_n = ~5'd7;
  logic [7:0] base_sw = 8'h42;
  logic ga_sel = 0;
  ctrl_t ctrl;
  logic [3:0] ratio;
  logic [AW-1:0] post_trig, play_len, trig_addr = 21'h12345;
  logic soft_trig, arm;
  status_t status = '0;
  logic mem_req, mem_ack = 0;
  mem_req_t mem;
  logic [31:0] mem_rdata = 0;
  logic [31:0] mem_model [int unsigned];
  int checks = 0, failures = 0, n_soft = 0, n_arm = 0;

  vme_slave #(.ADDR_W(AW), .BOARD_ID(32'h1234_ABCD)) dut (.*);

  always #4 clk = ~clk;

  `include "vme_master.svh"

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  // memory responder
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack && ($urandom % 3 == 0)) begin
      mem_ack <= 1'b1;
      if (mem.we) mem_model[mem.addr] = mem.wdata;
      else mem_rdata <= mem_model.exists(mem.addr) ? mem_model[mem.addr] : 32'h0;
    end
  end

  always @(posedge clk) begin
    if (soft_trig && !rst) n_soft++;
    if (arm && !rst) n_arm++;
  end

  initial begin
    logic [31:0] r, d; bit ok;
    logic [31:0] base, regs;
    repeat (3) @(posedge clk);
    rst = 0;
    base = 32'h4200_0000; regs = base | 32'h0080_0000;
    vme_wr(regs + 4*REG_CTRL, 32'h0000_000B);
    vme_rd(regs + 4*REG_CTRL, r);   chk(r == 32'hB && ctrl == 32'hB, "ctrl");
    vme_wr(regs + 4*REG_RATIO, 32'd9);
    vme_rd(regs + 4*REG_RATIO, r);  chk(r == 9 && ratio == 9, "ratio");
    vme_wr(regs + 4*REG_POST_TRIG, 32'd777);
    vme_rd(regs + 4*REG_POST_TRIG, r); chk(r == 777 && post_trig == 777, "post_trig");
    vme_wr(regs + 4*REG_PLAY_LEN, 32'd4096);
    vme_rd(regs + 4*REG_PLAY_LEN, r); chk(r == 4096 && play_len == 4096, "play_len");
    vme_rd(regs + 4*REG_TRIG_ADDR, r); chk(r == 32'h12345, "trig_addr");
    status.done = 1;
    vme_rd(regs + 4*REG_STATUS, r); chk(r == 32'h2, "status");
    vme_rd(regs + 4*REG_ID, r);     chk(r == 32'h1234_ABCD, "id");
    vme_wr(regs + 4*REG_TRIG, 32'h1);
    vme_wr(regs + 4*REG_TRIG, 32'h2);
    vme_wr(regs + 4*REG_TRIG, 32'h3);
    chk(n_soft == 2 && n_arm == 2, $sformatf("pulses soft=%0d arm=%0d", n_soft, n_arm));
    // memory window
    for (int n = 0; n < 20; n++) begin
      d = $urandom;
      vme_wr(base + 32'(n * 4 * 997), d);
      vme_rd(base + 32'(n * 4 * 997), r);
      chk(r == d, $sformatf("memory %0d", n));
      chk(mem_model.exists(n * 997) && mem_model[n * 997] == d, "memory address decode");
    end
    // wrong base, wrong AM: no acknowledge
    vme_timeout = 300;
    vme_cycle(0, 32'h4300_0000, 6'h09, 0, r, ok); chk(!ok, "wrong base ignored");
    vme_cycle(0, regs, 6'h39, 0, r, ok);          chk(!ok, "A24 AM ignored");
    vme_cycle(0, regs + 4*REG_ID, 6'h0D, 0, r, ok); chk(ok && r == 32'h1234_ABCD, "supervisory AM");
    // geographic addressing: slot 7 -> A31..A24 = 07h
    ga_sel = 1;
    vme_cycle(0, 32'h0780_0000 + 4*REG_ID, 6'h09, 0, r, ok); chk(ok && r == 32'h1234_ABCD, "geographic base");
    vme_cycle(0, regs + 4*REG_ID, 6'h09, 0, r, ok); chk(!ok, "switch base off in GA mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
