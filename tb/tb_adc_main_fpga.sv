// tb_adc_main_fpga - the ADC board FPGA with a ZBT SRAM model, Gray-coded
// random samples at 500 MS/s and VME set-up.  Checks: the FPDP stream holds
// the decoded samples in order with a constant latency of 16 ns from the ADC
// pins (oldest sample of a word); a software trigger and an external trigger
// each start the FPDP stream; the ring memory stops POST words after the
// trigger and holds the samples around it; VME-loaded RAM contents are
// played back to the FPDP board in a loop.
module tb_adc_main_fpga;
  import mbf_pkg::*;
  localparam int NS = 32768, POST = 64;
  logic clk250 = 0, clk125 = 0, rst = 1, ext_trig = 0;
  logic [7:0] adc_d = 0;
  logic vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [5:0] vme_am = 0;
  logic [31:1] vme_a = 0;
  logic [31:0] vme_d_i = 0, vme_d_o;
  logic vme_d_oe, vme_dtack_n;
  logic [20:0] sram_a;
  logic sram_ce_n, sram_we_n, sram_dq_oe;
  logic [31:0] sram_dq_o, sram_dq_i;
  logic [31:0] fpdp_data;
  logic fpdp_valid, fpdp_enable, fpdp_start;
  logic [3:0] fpdp_ratio;
  logic [7:0] smp [NS];
  int checks = 0, failures = 0, n_start = 0;
  int k_next = -1, lat0 = -1, n_words = 0;
  bit check_stream = 0;

  localparam logic [31:0] REGS = 32'h4280_0000, RAM = 32'h4200_0000;

  adc_main_fpga dut (.clk250, .clk125, .rst, .adc_d, .ext_trig,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n, .vme_am, .vme_a, .vme_d_i, .vme_d_o,
    .vme_d_oe, .vme_dtack_n, .vme_ga_n(5'h1F), .base_sw(8'h42), .ga_sel(1'b0),
    .sram_a, .sram_ce_n, .sram_we_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .fpdp_data, .fpdp_valid, .fpdp_enable, .fpdp_start, .fpdp_ratio);
  zbt_sram_model ram (.clk(clk125), .a(sram_a), .ce_n(sram_ce_n), .we_n(sram_we_n),
    .dq_from_fpga(sram_dq_o), .fpga_oe(sram_dq_oe), .dq_to_fpga(sram_dq_i));

  `include "vme_master.svh"

  always #2 clk250 = ~clk250;
  initial begin #2; forever begin clk125 = ~clk125; #4; end end

  function automatic logic [7:0] b2g(logic [7:0] b); return b ^ (b >> 1); endfunction
  function automatic logic [31:0] wrd(int k); return {smp[k+3], smp[k+2], smp[k+1], smp[k]}; endfunction

  initial begin
    foreach (smp[i]) smp[i] = 8'($urandom);
    for (int k = 0; k < NS - 4; k++) begin #1 adc_d = b2g(smp[k]); #1; end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  function automatic int find(logic [31:0] w, int from);
    for (int k = from; k < from + 400 && k < NS - 4; k++) if (w == wrd(k)) return k;
    return -1;
  endfunction

  // live stream checker
  always @(posedge clk125) begin
    int t; t = int'($time);
    #0.5;
    if (fpdp_start && !rst) n_start++;
    if (check_stream && fpdp_valid) begin
      if (k_next < 0) begin
        k_next = find(fpdp_data, (t - 200) / 2);
        lat0 = t - (2 * k_next + 2);
      end else begin
        chk(fpdp_data == wrd(k_next), $sformatf("FPDP word %h, expected from sample %0d", fpdp_data, k_next));
      end
      if (k_next >= 0) begin k_next += 4; n_words++; end
    end
  end

  initial begin
    logic [31:0] r, w0;
    int a0, k0, ta;
    #41 rst = 0;
    #100;
    // live to FPDP and ring memory, trigger by software
    vme_wr(REGS + 4*REG_POST_TRIG, POST);
    vme_wr(REGS + 4*REG_CTRL, 32'h7);          // enable | fwd_en | ram_wr_en
    vme_wr(REGS + 4*REG_TRIG, 32'h2);          // arm the ring
    check_stream = 1;
    #3000;
    vme_rd(REGS + 4*REG_STATUS, r); chk(r[0] && !r[1], "recording before trigger");
    vme_wr(REGS + 4*REG_TRIG, 32'h1);          // software trigger
    #2000;
    check_stream = 0;
    chk(n_words > 300, $sformatf("FPDP words checked: %0d", n_words));
    chk(lat0 == 16, $sformatf("ADC pin to FPDP latency %0d ns", lat0));
    chk(n_start == 1, "software trigger starts FPDP");
    vme_rd(REGS + 4*REG_STATUS, r); chk(!r[0] && r[1], "ring stopped after post-trigger words");
    vme_rd(REGS + 4*REG_TRIG_ADDR, r); ta = int'(r);
    chk(ta > 300 && ta < 600, $sformatf("trigger address %0d", ta));
    // memory around the trigger: consecutive sample words, POST after the trigger
    vme_rd(RAM + 32'((ta - 8) * 4), w0);
    k0 = -1;
    for (int k = 0; k < NS - 4 && k0 < 0; k++) if (w0 == wrd(k)) k0 = k;
    chk(k0 >= 0, "recorded word found in sample stream");
    for (int a = ta - 8; a <= ta + POST; a++) begin
      vme_rd(RAM + 32'(a * 4), r);
      chk(r == wrd(k0 + 4 * (a - (ta - 8))), $sformatf("ring word %0d", a));
    end
    vme_rd(RAM + 32'((ta + POST + 1) * 4), r);
    chk(r == 32'h0, "nothing written after the post-trigger words");
    // external trigger also starts the stream
    ext_trig = 1; #40 ext_trig = 0; #40;
    chk(n_start == 2, "external trigger starts FPDP");
    // playback: VME writes 16 words, played in a loop to the FPDP board
    vme_wr(REGS + 4*REG_CTRL, 32'h0);
    for (int a = 0; a < 16; a++) vme_wr(RAM + 32'(a * 4), 32'hC0DE_0000 + 32'(a));
    vme_wr(REGS + 4*REG_PLAY_LEN, 16);
    vme_wr(REGS + 4*REG_CTRL, 32'hB);          // enable | fwd_en | fwd_src_ram
    begin
      int got = 0, first = -1;
      for (int c = 0; c < 200; c++) begin
        @(posedge clk125); #1;
        if (fpdp_valid) begin
          if (first < 0) first = int'(fpdp_data[3:0]);
          chk(fpdp_data == 32'hC0DE_0000 + 32'((first + got) % 16), $sformatf("playback %h", fpdp_data));
          got++;
        end
      end
      chk(got > 150, "playback runs at one word per clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
