// mbf_top - the digital boards of the multi-bunch feedback: ADC board and DAC
// board, each a main board with its FPGA plus an FPDP connector board.
//
//   adc_d --> adc_main_fpga --(32 bit, 125 MHz)--> fpdp_demux --> adc_p_* (to DSPs)
//   dac_p_* (from DSPs) --> fpdp_mux --(32 bit, 125 MHz)--> dac_main_fpga --> dac_d
//
// The DSP boards that compute the correction kicks sit between adc_p_* and
// dac_p_* and are outside this design.  Both boards share the 250/125 MHz
// clocks (clk125 derived from clk250, rising edges aligned) and one VME bus:
// each board answers its own 16 MByte A32 window (geographic address or
// switch), DTACK* is wired-AND as on the open-collector bus, and the data bus
// is driven by whichever board has its enable high.  Each board has its own
// ZBT SRAM and its own trigger input (start ADC / START_DAC).
//
// Digital latency with the DAC started: 60 ns (15 clk250 cycles) from the
// capture of an ADC sample to the same sample on dac_d, with the FPDP ports
// looped back without delay; each clock the DSPs take adds 8 ns.  The 88 ns
// quoted for the two boards also covers the converters and LVDS links.
module mbf_top
  import mbf_pkg::*;
#(
  parameter int unsigned NPORTS     = MAX_PORTS,
  parameter int unsigned ADDR_W     = RAM_AW,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic                     clk250,
  input  logic                     clk125,
  input  logic                     rst,
  // converters
  input  sample_t                  adc_d,
  output logic [2*SAMPLE_W-1:0]    dac_d,
  input  logic                     adc_ext_trig,
  input  logic                     dac_ext_trig,
  // VME bus
  input  logic                     vme_as_n,
  input  logic [1:0]               vme_ds_n,
  input  logic                     vme_write_n,
  input  logic                     vme_lword_n,
  input  logic [5:0]               vme_am,
  input  logic [31:1]              vme_a,
  input  logic [31:0]              vme_d_i,
  output logic [31:0]              vme_d_o,
  output logic                     vme_d_oe,
  output logic                     vme_dtack_n,
  input  logic [4:0]               adc_ga_n,
  input  logic [4:0]               dac_ga_n,
  input  logic [7:0]               adc_base_sw,
  input  logic [7:0]               dac_base_sw,
  input  logic                     ga_sel,
  // ADC board ZBT SRAM
  output logic [ADDR_W-1:0]        adc_sram_a,
  output logic                     adc_sram_ce_n,
  output logic                     adc_sram_we_n,
  output logic [31:0]              adc_sram_dq_o,
  output logic                     adc_sram_dq_oe,
  input  logic [31:0]              adc_sram_dq_i,
  // DAC board ZBT SRAM
  output logic [ADDR_W-1:0]        dac_sram_a,
  output logic                     dac_sram_ce_n,
  output logic                     dac_sram_we_n,
  output logic [31:0]              dac_sram_dq_o,
  output logic                     dac_sram_dq_oe,
  input  logic [31:0]              dac_sram_dq_i,
  // FPDP ports of the ADC board (to the DSP boards)
  output logic [NPORTS-1:0][31:0]  adc_p_data,
  output logic [NPORTS-1:0]        adc_p_strobe,
  output logic [NPORTS-1:0]        adc_p_dvalid,
  output logic [NPORTS-1:0]        adc_p_sync,
  // FPDP ports of the DAC board (from the DSP boards)
  input  logic [NPORTS-1:0][31:0]  dac_p_data,
  input  logic [NPORTS-1:0]        dac_p_dvalid
);

  word_t       a_fpdp_data, d_fpdp_data;
  logic        a_fpdp_valid, a_fpdp_enable, a_fpdp_start, d_fpdp_valid, d_fpdp_start, d_fpdp_ovf;
  logic [3:0]  a_ratio, d_ratio;
  logic [31:0] a_vme_d, d_vme_d;
  logic        a_vme_oe, d_vme_oe, a_dtack_n, d_dtack_n;

  adc_main_fpga #(.ADDR_W(ADDR_W)) u_adc (
    .clk250 (clk250), .clk125 (clk125), .rst (rst),
    .adc_d (adc_d), .ext_trig (adc_ext_trig),
    .vme_as_n (vme_as_n), .vme_ds_n (vme_ds_n), .vme_write_n (vme_write_n),
    .vme_lword_n (vme_lword_n), .vme_am (vme_am), .vme_a (vme_a), .vme_d_i (vme_d_i),
    .vme_d_o (a_vme_d), .vme_d_oe (a_vme_oe), .vme_dtack_n (a_dtack_n),
    .vme_ga_n (adc_ga_n), .base_sw (adc_base_sw), .ga_sel (ga_sel),
    .sram_a (adc_sram_a), .sram_ce_n (adc_sram_ce_n), .sram_we_n (adc_sram_we_n),
    .sram_dq_o (adc_sram_dq_o), .sram_dq_oe (adc_sram_dq_oe), .sram_dq_i (adc_sram_dq_i),
    .fpdp_data (a_fpdp_data), .fpdp_valid (a_fpdp_valid), .fpdp_enable (a_fpdp_enable),
    .fpdp_start (a_fpdp_start), .fpdp_ratio (a_ratio)
  );

  fpdp_demux #(.NPORTS(NPORTS)) u_adc_fpdp (
    .clk (clk125), .rst (rst), .enable (a_fpdp_enable), .start (a_fpdp_start),
    .ratio (a_ratio), .in_data (a_fpdp_data), .in_valid (a_fpdp_valid),
    .p_data (adc_p_data), .p_strobe (adc_p_strobe), .p_dvalid (adc_p_dvalid), .p_sync (adc_p_sync)
  );

  fpdp_mux #(.NPORTS(NPORTS)) u_dac_fpdp (
    .clk (clk125), .rst (rst), .start (d_fpdp_start), .ratio (d_ratio),
    .p_data (dac_p_data), .p_dvalid (dac_p_dvalid),
    .out_data (d_fpdp_data), .out_valid (d_fpdp_valid), .overflow (d_fpdp_ovf)
  );

  dac_main_fpga #(.ADDR_W(ADDR_W), .FIFO_DEPTH(FIFO_DEPTH)) u_dac (
    .clk250 (clk250), .clk125 (clk125), .rst (rst),
    .dac_d (dac_d), .ext_trig (dac_ext_trig),
    .vme_as_n (vme_as_n), .vme_ds_n (vme_ds_n), .vme_write_n (vme_write_n),
    .vme_lword_n (vme_lword_n), .vme_am (vme_am), .vme_a (vme_a), .vme_d_i (vme_d_i),
    .vme_d_o (d_vme_d), .vme_d_oe (d_vme_oe), .vme_dtack_n (d_dtack_n),
    .vme_ga_n (dac_ga_n), .base_sw (dac_base_sw), .ga_sel (ga_sel),
    .sram_a (dac_sram_a), .sram_ce_n (dac_sram_ce_n), .sram_we_n (dac_sram_we_n),
    .sram_dq_o (dac_sram_dq_o), .sram_dq_oe (dac_sram_dq_oe), .sram_dq_i (dac_sram_dq_i),
    .fpdp_data (d_fpdp_data), .fpdp_valid (d_fpdp_valid), .fpdp_overflow (d_fpdp_ovf),
    .fpdp_start (d_fpdp_start), .fpdp_ratio (d_ratio)
  );

  // shared VME bus
  assign vme_dtack_n = a_dtack_n & d_dtack_n;
  assign vme_d_oe    = a_vme_oe | d_vme_oe;
  assign vme_d_o     = a_vme_oe ? a_vme_d : d_vme_d;

endmodule
