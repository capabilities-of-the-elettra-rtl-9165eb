// tb_beam_workload - bunch-by-bunch readout through the ADC board, as in the
// first beam commissioning: demultiplexing 1:6 to six DSP boards, all buckets
// filled, the DAC board unused.  Two rings are run in turn:
//   SLS:     960 ns revolution / 2 ns = 480 buckets, 120 words per turn
//   ELETTRA: 432 buckets (864 ns), 108 words per turn
// The beam signal is a coupled-bunch oscillation: bunch b on turn n sits at
// 128 + 90 sin(2 pi (Q n + m b / H)) with tune Q = 0.17 and mode m = H - 1.
// A stand-in for the diagnostics DSPs rebuilds the turn-by-bunch matrix from
// the six ports (port k, j-th word = stream word k + 6 j) and compares each
// entry with the generated position.  Also checked: every DSP board receives
// H/24 words per turn, and the ring memory, triggered by the start trigger,
// holds a whole turn of correct positions around the trigger.
module tb_beam_workload;
  import mbf_pkg::*;
  localparam int NP = 12, NS = 40000, TURNS = 8;
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
  logic [31:0] adc_sram_dq_o, adc_sram_dq_i, dac_sram_dq_o;
  logic [31:0] dac_sram_dq_i = 0;
  logic [NP-1:0][31:0] adc_p_data;
  logic [NP-1:0][31:0] dac_p_data = '0;
  logic [NP-1:0] adc_p_strobe, adc_p_dvalid, adc_p_sync;
  logic [NP-1:0] dac_p_dvalid = '0;
  logic [7:0] pos [NS];         // position of the beam at sample i
  int H = 480;                  // buckets of the ring under test
  int t_start = 0;              // index of the first sample after reset of the pattern
  int checks = 0, failures = 0;
  int s0 = -1;                  // sample index of stream word 0, lane 0
  int port_cnt [6];
  int ok_entries = 0;
  bit collect = 0;

  localparam logic [31:0] AREG = 32'h4280_0000, ARAM = 32'h4200_0000;

  mbf_top dut (.*, .adc_ga_n(5'h1F), .dac_ga_n(5'h1F), .adc_base_sw(8'h42), .dac_base_sw(8'h43), .ga_sel(1'b0));
  zbt_sram_model adc_ram (.clk(clk125), .a(adc_sram_a), .ce_n(adc_sram_ce_n), .we_n(adc_sram_we_n),
    .dq_from_fpga(adc_sram_dq_o), .fpga_oe(adc_sram_dq_oe), .dq_to_fpga(adc_sram_dq_i));

  `include "vme_master.svh"

  always #2 clk250 = ~clk250;
  initial begin #2; forever begin clk125 = ~clk125; #4; end end

  function automatic logic [7:0] beam(int i, int h);
    real ph;
    int n, b;
    n  = i / h;
    b  = i % h;
    ph = 2.0 * 3.14159265358979 * (0.17 * n + real'(h - 1) * b / h);
    return 8'(128 + $rtoi(90.0 * $sin(ph)));
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  // ADC: sample i (bucket i mod H of turn i / H) from 2i+1 ns
  int i_now = 0;
  initial forever begin
    #1 adc_d = pos[i_now % NS] ^ (pos[i_now % NS] >> 1);   // Gray code
    #1 i_now++;
  end

  // diagnostics DSP stand-in: rebuild bunch positions from the six ports
  int wcount [6];
  always @(posedge clk125) begin
    #0.5;
    if (collect) begin
      for (int k = 0; k < 6; k++) begin
        if (adc_p_strobe[k]) begin
          int w, base;
          w = k + 6 * wcount[k];
          if (k == 0 && wcount[0] == 0) begin
            chk(adc_p_sync[0], "SYNC with word 0");
            // locate word 0 in the sample stream once
            for (int i = t_start; i < NS - 4 && s0 < 0; i++)
              if (adc_p_data[0] == {pos[i+3], pos[i+2], pos[i+1], pos[i]}) s0 = i;
          end
          if (s0 >= 0) begin
            base = s0 + 4 * w;
            for (int l = 0; l < 4; l++) begin
              chk(adc_p_data[k][l*8 +: 8] == pos[base + l],
                  $sformatf("H=%0d turn %0d bunch %0d", H, (base + l) / H, (base + l) % H));
              if (adc_p_data[k][l*8 +: 8] == pos[base + l]) ok_entries++;
            end
          end
          wcount[k]++;
          port_cnt[k]++;
        end
      end
    end
  end

  task automatic run_ring(input int h);
    logic [31:0] r;
    int ta, words_per_turn, k0;
    H = h;
    t_start = (i_now + 200);
    // pattern referenced to the current sample index so that bucket 0 of turn 0 is sample t_start
    for (int i = 0; i < NS; i++) pos[i] = (i < t_start) ? 8'h80 : beam(i - t_start, h);
    s0 = -1; ok_entries = 0;
    foreach (wcount[k]) begin wcount[k] = 0; port_cnt[k] = 0; end
    vme_wr(AREG + 4*REG_CTRL, 32'h0);
    vme_wr(AREG + 4*REG_RATIO, 6);
    vme_wr(AREG + 4*REG_POST_TRIG, 32'(h / 4));   // half a turn before and after
    vme_wr(AREG + 4*REG_CTRL, 32'h7);
    vme_wr(AREG + 4*REG_TRIG, 32'h2);
    collect = 1;
    wait (i_now >= t_start + h / 2);              // trigger half a turn in
    adc_ext_trig = 1; #40 adc_ext_trig = 0;
    wait (i_now >= t_start + h / 2 + TURNS * h);
    collect = 0;
    // every DSP board: H/24 words per turn
    words_per_turn = h / 4;
    for (int k = 0; k < 6; k++)
      chk(port_cnt[k] >= TURNS * words_per_turn / 6 - 1 && port_cnt[k] <= TURNS * words_per_turn / 6 + 1,
          $sformatf("H=%0d port %0d got %0d words in %0d turns", h, k, port_cnt[k], TURNS));
    chk(ok_entries >= TURNS * h - 32, $sformatf("H=%0d bunch entries correct: %0d", h, ok_entries));
    // ring memory: one turn around the trigger
    vme_rd(AREG + 4*REG_TRIG_ADDR, r); ta = int'(r);
    vme_rd(ARAM + 32'(ta * 4), r);
    k0 = -1;
    for (int i = t_start; i < NS - 4 && k0 < 0; i++) if (r == {pos[i+3], pos[i+2], pos[i+1], pos[i]}) k0 = i;
    chk(k0 >= 0, "trigger word found");
    for (int a = ta - h / 8; a < ta + h / 8; a++) begin
      vme_rd(ARAM + 32'(a * 4), r);
      chk(r == {pos[k0 + 4*(a-ta) + 3], pos[k0 + 4*(a-ta) + 2], pos[k0 + 4*(a-ta) + 1], pos[k0 + 4*(a-ta)]},
          $sformatf("H=%0d ring word %0d", h, a));
    end
    $display("H=%0d: %0d turns, %0d bunch positions rebuilt, %0d words per DSP per turn",
             h, TURNS, ok_entries, h / 24);
  endtask

  initial begin
    foreach (pos[i]) pos[i] = 8'h80;
    #41 rst = 0;
    #100;
    run_ring(480);   // SLS
    run_ring(432);   // ELETTRA
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
