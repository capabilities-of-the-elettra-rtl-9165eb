// tb_mbf_top - end-to-end test of both boards at their default sizes (12
// FPDP ports, 8 MByte ZBT memories, 512-word FIFO).  A DSP stand-in copies
// every ADC FPDP port to the matching DAC FPDP port one clock later (an
// identity filter), so the DAC must reproduce the ADC samples.
//  Phase 1, feedback: demultiplex ratio 6 (as in the beam test), START_DAC
//   given before the ADC stream starts; every DAC sample is checked against
//   the ADC samples and the pin-to-pin latency against the 88 ns budget.
//   The ADC ring memory is triggered and read back over VME.
//  Phase 2, playback: words written over VME into the ADC memory travel
//   through the FPDP ports, this time at ratio 12, to the DAC.
// Each mechanism (both triggers, round-robin over all active ports, ring
// stop, playback, FIFO buffering, underflow, overflow, both VME slaves) is
// counted and must occur.
module tb_mbf_top;
  import mbf_pkg::*;
  localparam int NP = 12, NS = 16384;
  logic clk250 = 0, clk125 = 0, rst = 1;
  logic [7:0] adc_d = 0;
  logic [15:0] dac_d;
  logic adc_ext_trig = 0, dac_ext_trig = 0;
  logic vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [5:0] vme_am = 0;
  logic [31:1] vme_a = 0;
  logic [31:0] vme_d_i = 0, vme_d_o;
  logic vme_d_oe, vme_dtack_n;
  logic [20:0] adc_sram_a, dac_sram_a;
  logic adc_sram_ce_n, adc_sram_we_n, adc_sram_dq_oe, dac_sram_ce_n, dac_sram_we_n, dac_sram_dq_oe;
  logic [31:0] adc_sram_dq_o, adc_sram_dq_i, dac_sram_dq_o, dac_sram_dq_i;
  logic [NP-1:0][31:0] adc_p_data, dac_p_data;
  logic [NP-1:0] adc_p_strobe, adc_p_dvalid, adc_p_sync, dac_p_dvalid;
  logic [7:0] smp [NS];
  logic [7:0] exp_s[$];
  int checks = 0, failures = 0;
  int port_words [NP];
  int n_sync = 0, n_pairs = 0, k_next = -1, lat = -1;
  bit watch_live = 0, watch_play = 0, seen = 0;

  localparam logic [31:0] AREG = 32'h4280_0000, ARAM = 32'h4200_0000;
  localparam logic [31:0] DREG = 32'h4380_0000;

  mbf_top dut (.*, .adc_ga_n(5'h1F), .dac_ga_n(5'h1F), .adc_base_sw(8'h42), .dac_base_sw(8'h43), .ga_sel(1'b0));

  zbt_sram_model adc_ram (.clk(clk125), .a(adc_sram_a), .ce_n(adc_sram_ce_n), .we_n(adc_sram_we_n),
    .dq_from_fpga(adc_sram_dq_o), .fpga_oe(adc_sram_dq_oe), .dq_to_fpga(adc_sram_dq_i));
  zbt_sram_model dac_ram (.clk(clk125), .a(dac_sram_a), .ce_n(dac_sram_ce_n), .we_n(dac_sram_we_n),
    .dq_from_fpga(dac_sram_dq_o), .fpga_oe(dac_sram_dq_oe), .dq_to_fpga(dac_sram_dq_i));

  `include "vme_master.svh"

  always #2 clk250 = ~clk250;
  initial begin #2; forever begin clk125 = ~clk125; #4; end end

  // DSP stand-in: one clock of processing, identity
  always @(posedge clk125) begin
    dac_p_data   <= adc_p_data;
    dac_p_dvalid <= adc_p_strobe & adc_p_dvalid;
    if (!rst) begin
      for (int k = 0; k < NP; k++) if (adc_p_strobe[k]) port_words[k]++;
      if (|adc_p_sync && |adc_p_strobe) n_sync++;
    end
  end

  function automatic logic [7:0] b2g(logic [7:0] b); return b ^ (b >> 1); endfunction

  // ADC: sample k on the pins from 2k+1 ns, captured at 2k+2 ns
  initial begin
    foreach (smp[i]) smp[i] = 8'($urandom);
    for (int k = 0; k < NS; k++) begin #1 adc_d = b2g(smp[k]); #1; end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  task automatic count(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  // DAC pins
  always @(posedge clk250) begin
    int t; t = int'($time);
    #0.5;
    if (watch_live && dac_d != 16'h8080) begin
      if (k_next < 0) begin
        for (int k = 0; k < NS - 1; k++)
          if (dac_d == {smp[k+1], smp[k]} && k % 2 == 0) begin k_next = k; lat = t - (2*k + 2); break; end
      end else begin
        chk(dac_d == {smp[k_next+1], smp[k_next]}, $sformatf("DAC %h expected samples %0d", dac_d, k_next));
        n_pairs++;
      end
      if (k_next >= 0) k_next += 2;
    end
    if (watch_play) begin
      if (!seen && dac_d != 16'h8080) begin
        // playback loops, so the stream may start at any of the 24 words
        int n0; logic [31:0] w;
        seen = 1;
        n0 = (int'(dac_d[7:0]) - 1) / 8;
        exp_s.delete();
        for (int n = n0; n < n0 + 40; n++) begin
          w = {4{8'((n % 24) * 8 + 1)}} ^ 32'h0003_0500;
          for (int l = 0; l < 4; l++) exp_s.push_back(w[l*8 +: 8]);
        end
      end
      if (seen && exp_s.size() >= 2) begin
        chk(dac_d == {exp_s[1], exp_s[0]}, $sformatf("playback DAC %h exp %h%h", dac_d, exp_s[1], exp_s[0]));
        void'(exp_s.pop_front()); void'(exp_s.pop_front());
        n_pairs++;
      end
    end
  end

  initial begin
    logic [31:0] r, st;
    int ta, ports_used;
    foreach (port_words[k]) port_words[k] = 0;
    dac_p_data = '0; dac_p_dvalid = '0;
    #41 rst = 0;
    #100;
    // ---- phase 1: live feedback path, ratio 6
    vme_rd(AREG + 4*REG_ID, r); chk(r == 32'h4D42_4641, "ADC board answers");
    vme_rd(DREG + 4*REG_ID, r); chk(r == 32'h4D42_4644, "DAC board answers");
    vme_wr(AREG + 4*REG_RATIO, 6);
    vme_wr(DREG + 4*REG_RATIO, 6);
    vme_wr(AREG + 4*REG_POST_TRIG, 100);
    vme_wr(DREG + 4*REG_CTRL, 32'h3);     // DAC: enable | fwd_en (restarts FPDP mux)
    dac_ext_trig = 1; #40 dac_ext_trig = 0;  // START_DAC before any data: underflow
    vme_wr(AREG + 4*REG_CTRL, 32'h7);     // ADC: enable | fwd_en | ram_wr_en
    vme_wr(AREG + 4*REG_TRIG, 32'h2);     // arm ring
    watch_live = 1;
    adc_ext_trig = 1; #40 adc_ext_trig = 0;  // start ADC: FPDP stream begins, ring trigger
    #6000;
    watch_live = 0;
    chk(n_pairs > 1200, $sformatf("live DAC pairs checked %0d", n_pairs));
    // 68 ns = 17 clk250 cycles, of which 8 ns are the DSP stand-in; the
    // boards' own digital share must stay within the 88 ns two-board budget
    chk(lat == 68, $sformatf("ADC pin to DAC pin latency %0d ns", lat));
    chk(lat - 8 <= 88, "board latency within 88 ns");
    $display("digital latency ADC pins -> FPDP loop (1 clk DSP) -> DAC pins: %0d ns", lat);
    ports_used = 0;
    for (int k = 0; k < NP; k++) if (port_words[k] > 0) ports_used++;
    chk(ports_used == 6, $sformatf("ports used at ratio 6: %0d", ports_used));
    vme_rd(AREG + 4*REG_STATUS, st);
    count(st[1], "ADC ring stopped after the trigger");
    vme_rd(AREG + 4*REG_TRIG_ADDR, r); ta = int'(r);
    vme_rd(ARAM + 32'((ta + 100) * 4), r);
    begin
      int k0; k0 = -1;
      for (int k = 0; k < NS - 4 && k0 < 0; k++) if (r == {smp[k+3], smp[k+2], smp[k+1], smp[k]}) k0 = k;
      chk(k0 >= 0, "last post-trigger ring word is ADC data");
    end
    vme_rd(DREG + 4*REG_STATUS, st);
    count(st[4], "DAC underflow before the stream arrived");
    count(n_sync > 0, "FPDP SYNC");
    // ---- phase 2: playback from ADC memory, ratio 12, buffered before START_DAC
    vme_wr(AREG + 4*REG_CTRL, 32'h0);
    vme_wr(DREG + 4*REG_CTRL, 32'h0);
    for (int a = 0; a < 24; a++) vme_wr(ARAM + 32'(a * 4), {4{8'(a * 8 + 1)}} ^ 32'h0003_0500);
    vme_wr(AREG + 4*REG_PLAY_LEN, 24);
    vme_wr(AREG + 4*REG_RATIO, 12);
    vme_wr(DREG + 4*REG_RATIO, 12);
    foreach (port_words[k]) port_words[k] = 0;
    vme_wr(DREG + 4*REG_CTRL, 32'h3);
    vme_wr(AREG + 4*REG_CTRL, 32'hB);     // ADC: enable | fwd_en | fwd_src_ram
    vme_wr(AREG + 4*REG_TRIG, 32'h1);     // software start of the FPDP stream
    // DAC FIFO buffers the words until START_DAC (by software); the FIFO
    // overflows meanwhile since playback never stops
    #6000;
    vme_rd(DREG + 4*REG_STATUS, st);
    count(st[3], "DAC FIFO overflow while waiting for START_DAC");
    n_pairs = 0; seen = 0; watch_play = 1;
    vme_wr(DREG + 4*REG_TRIG, 32'h1);
    #1000;
    watch_play = 0;
    count(n_pairs == 80, $sformatf("playback through FPDP to DAC (%0d pairs)", n_pairs));
    ports_used = 0;
    for (int k = 0; k < NP; k++) if (port_words[k] > 0) ports_used++;
    count(ports_used == 12, $sformatf("round robin over 12 ports (%0d)", ports_used));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
