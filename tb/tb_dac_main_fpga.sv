// tb_dac_main_fpga - the DAC board FPGA with a ZBT SRAM model.  Words from
// the FPDP board are buffered until START_DAC, then must reach the DAC pins
// two samples per 250 MHz cycle in order; the stream is also recorded into
// the RAM; underflow and overflow are flagged; and RAM contents written over
// VME are played back to the DAC in a loop.
module tb_dac_main_fpga;
  import mbf_pkg::*;
  logic clk250 = 0, clk125 = 0, rst = 1, ext_trig = 0;
  logic [15:0] dac_d;
  logic vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [5:0] vme_am = 0;
  logic [31:1] vme_a = 0;
  logic [31:0] vme_d_i = 0, vme_d_o;
  logic vme_d_oe, vme_dtack_n;
  logic [20:0] sram_a;
  logic sram_ce_n, sram_we_n, sram_dq_oe;
  logic [31:0] sram_dq_o, sram_dq_i;
  logic [31:0] fpdp_data = 0;
  logic fpdp_valid = 0, fpdp_start;
  logic [3:0] fpdp_ratio;
  logic [7:0] exp_s[$];
  int checks = 0, failures = 0, n_pairs = 0, n_fpdp_start = 0;
  bit watch = 0, seen = 0;

  localparam logic [31:0] REGS = 32'h4380_0000, RAM = 32'h4300_0000;

  dac_main_fpga dut (.clk250, .clk125, .rst, .dac_d, .ext_trig,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_am, .vme_a, .vme_d_i, .vme_d_o,
    .vme_d_oe, .vme_dtack_n, .vme_ga_n(5'h1F), .base_sw(8'h43), .ga_sel(1'b0),
    .sram_a, .sram_ce_n, .sram_we_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .fpdp_data, .fpdp_valid, .fpdp_overflow(1'b0), .fpdp_start, .fpdp_ratio);
  zbt_sram_model ram (.clk(clk125), .a(sram_a), .ce_n(sram_ce_n), .we_n(sram_we_n),
    .dq_from_fpga(sram_dq_o), .fpga_oe(sram_dq_oe), .dq_to_fpga(sram_dq_i));

  `include "vme_master.svh"

  always #2 clk250 = ~clk250;
  initial begin #2; forever begin clk125 = ~clk125; #4; end end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  always @(posedge clk125) begin #0.5; if (fpdp_start && !rst) n_fpdp_start++; end

  // DAC pins: after the first non-idle pair every pair must be the next two
  // expected samples
  always @(posedge clk250) begin
    #0.5;
    if (watch) begin
      if (!seen && dac_d != 16'h8080) seen = 1;
      if (seen && exp_s.size() >= 2) begin
        chk(dac_d == {exp_s[1], exp_s[0]}, $sformatf("DAC pair %h, expected %h%h", dac_d, exp_s[1], exp_s[0]));
        void'(exp_s.pop_front()); void'(exp_s.pop_front());
        n_pairs++;
      end
    end
  end

  task automatic send_words(input int n, input logic [31:0] base);
    for (int i = 0; i < n; i++) begin
      @(negedge clk125);
      fpdp_valid = 1; fpdp_data = base + 32'(i) | 32'h0101_0101;
      for (int l = 0; l < 4; l++) exp_s.push_back(fpdp_data[l*8 +: 8]);
    end
    @(negedge clk125); fpdp_valid = 0;
  endtask

  initial begin
    logic [31:0] r;
    #41 rst = 0;
    #100;
    vme_wr(REGS + 4*REG_CTRL, 32'h7);     // enable | fwd_en (to DAC) | ram_wr_en
    vme_wr(REGS + 4*REG_TRIG, 32'h2);     // arm ring recording
    chk(n_fpdp_start == 1, "FPDP multiplexer restarted on enable");
    // 100 words buffered before START_DAC
    watch = 1;
    send_words(100, 32'h1000_0000);
    #200;
    chk(!seen, "DAC idle before START_DAC");
    vme_rd(REGS + 4*REG_STATUS, r); chk(!r[3] && !r[4], "no overflow/underflow yet");
    ext_trig = 1; #40 ext_trig = 0;       // START_DAC (external)
    send_words(300, 32'h2000_0000);
    #1500;
    chk(exp_s.size() == 0 && n_pairs == 800, $sformatf("all samples at the DAC (%0d pairs)", n_pairs));
    vme_rd(REGS + 4*REG_STATUS, r); chk(r[4], "underflow once the stream stopped");
    // the trigger stopped the ring after POST (=0) words: RAM holds words 0.. of the stream
    vme_rd(REGS + 4*REG_TRIG_ADDR, r);
    begin
      int ta; logic [31:0] m;
      ta = int'(r);
      chk(ta > 90 && ta <= 100, $sformatf("DAC ring trigger address %0d", ta));
      for (int a = 0; a < ta; a += 9) begin
        vme_rd(RAM + 32'(a * 4), m);
        chk(m == (32'h1000_0000 + 32'(a) | 32'h0101_0101), $sformatf("recorded FPDP word %0d: %h", a, m));
      end
    end
    // overflow: disable/enable clears, then 600 words without START_DAC
    vme_wr(REGS + 4*REG_CTRL, 32'h0);
    vme_wr(REGS + 4*REG_CTRL, 32'h3);
    watch = 0; exp_s.delete();
    send_words(600, 32'h3000_0000);
    exp_s.delete();
    vme_rd(REGS + 4*REG_STATUS, r); chk(r[3], "FIFO overflow flagged");
    // playback from the RAM to the DAC
    vme_wr(REGS + 4*REG_CTRL, 32'h0);
    for (int a = 0; a < 10; a++) vme_wr(RAM + 32'(a * 4), 32'h5050_5050 + 32'(a * 32'h0101_0101));
    vme_wr(REGS + 4*REG_PLAY_LEN, 10);
    vme_wr(REGS + 4*REG_CTRL, 32'hB);     // enable | fwd_en | fwd_src_ram
    for (int n = 0; n < 60; n++) begin
      logic [31:0] w;
      w = 32'h5050_5050 + 32'((n % 10) * 32'h0101_0101);
      for (int l = 0; l < 4; l++) exp_s.push_back(w[l*8 +: 8]);
    end
    seen = 0; n_pairs = 0; watch = 1;
    #300;
    vme_wr(REGS + 4*REG_TRIG, 32'h1);     // START_DAC by software
    #2000;
    chk(n_pairs == 120, $sformatf("playback pairs %0d", n_pairs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #80000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
