// adc_main_fpga - main-board FPGA of the ADC board.
//
// Data path: the 500 MS/s Gray-coded ADC samples are captured with 250 MHz
// DDR clocking and demultiplexed 1:4 into 32 bit words at 125 MHz
// (adc_demux_1to4), decoded to binary (gray2bin) and handed to the two-way
// redirector, which sends them to the FPDP board, to the ZBT ring memory, or
// both; the FPDP board can instead be fed by playback of the memory, loaded
// over VME.  A software or external trigger starts the FPDP stream and stops
// the ring memory after the programmed number of post-trigger words.  This
// structure is the one of the board description; the register map
// (mbf_pkg) and the control details are this design's choices.
//
// Latency: the oldest sample of a word is on fpdp_data 16 ns (two clk125
// cycles: DDR capture and demultiplexing, then the Gray decoder register)
// after the clk250 edge that captured it; the redirector adds none.
module adc_main_fpga
  import mbf_pkg::*;
#(
  parameter int unsigned ADDR_W = RAM_AW
) (
  input  logic              clk250,
  input  logic              clk125,
  input  logic              rst,
  input  sample_t           adc_d,
  input  logic              ext_trig,
  // VME
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_write_n,
  input  logic              vme_lword_n,
  input  logic [5:0]        vme_am,
  input  logic [31:1]       vme_a,
  input  logic [31:0]       vme_d_i,
  output logic [31:0]       vme_d_o,
  output logic              vme_d_oe,
  output logic              vme_dtack_n,
  input  logic [4:0]        vme_ga_n,
  input  logic [7:0]        base_sw,
  input  logic              ga_sel,
  // ZBT SRAM
  output logic [ADDR_W-1:0] sram_a,
  output logic              sram_ce_n,
  output logic              sram_we_n,
  output logic [31:0]       sram_dq_o,
  output logic              sram_dq_oe,
  input  logic [31:0]       sram_dq_i,
  // to the FPDP board
  output word_t             fpdp_data,
  output logic              fpdp_valid,
  output logic              fpdp_enable,
  output logic              fpdp_start,
  output logic [3:0]        fpdp_ratio
);

  word_t             raw_word, bin_word, play_data, ram_data;
  logic              play_valid, ram_valid, playing, recording, done;
  ctrl_t             ctrl;
  logic [ADDR_W-1:0] post_trig, play_len, trig_addr;
  logic              soft_trig, arm, trig;
  logic              mem_req, mem_ack;
  mem_req_t          mem;
  logic [31:0]       mem_rdata;
  status_t           status;

  adc_demux_1to4 u_demux (
    .clk250 (clk250), .clk125 (clk125), .rst (rst),
    .adc_d  (adc_d),  .word   (raw_word)
  );

  gray2bin u_gray (
    .clk (clk125), .rst (rst), .in_word (raw_word), .out_word (bin_word)
  );

  data_redirector #(.W(WORD_W)) u_redir (
    .fwd_en      (ctrl.enable && ctrl.fwd_en),
    .ram_wr_en   (ctrl.enable && ctrl.ram_wr_en),
    .fwd_src_ram (ctrl.fwd_src_ram),
    .live_data   (bin_word),
    .live_valid  (1'b1),
    .play_data   (play_data),
    .play_valid  (play_valid),
    .fwd_data    (fpdp_data),
    .fwd_valid   (fpdp_valid),
    .ram_data    (ram_data),
    .ram_valid   (ram_valid)
  );

  trigger_in u_trig (
    .clk (clk125), .rst (rst), .ext_trig (ext_trig), .soft_trig (soft_trig), .trig (trig)
  );

  zbt_ctrl #(.ADDR_W(ADDR_W)) u_zbt (
    .clk        (clk125),
    .rst        (rst),
    .arm        (arm),
    .trig       (trig),
    .post_trig  (post_trig),
    .wr_data    (ram_data),
    .wr_valid   (ram_valid),
    .recording  (recording),
    .done       (done),
    .trig_addr  (trig_addr),
    .play_en    (ctrl.enable && ctrl.fwd_src_ram),
    .play_ready (1'b1),
    .play_len   (play_len),
    .play_data  (play_data),
    .play_valid (play_valid),
    .playing    (playing),
    .vme_req    (mem_req),
    .vme_we     (mem.we),
    .vme_addr   (mem.addr),
    .vme_wdata  (mem.wdata),
    .vme_ack    (mem_ack),
    .vme_rdata  (mem_rdata),
    .sram_a     (sram_a),
    .sram_ce_n  (sram_ce_n),
    .sram_we_n  (sram_we_n),
    .sram_dq_o  (sram_dq_o),
    .sram_dq_oe (sram_dq_oe),
    .sram_dq_i  (sram_dq_i)
  );

  always_comb begin
    status           = '0;
    status.recording = recording;
    status.done      = done;
    status.playing   = playing;
  end

  vme_slave #(.ADDR_W(ADDR_W), .BOARD_ID(32'h4D42_4641)) u_vme (
    .clk (clk125), .rst (rst),
    .vme_as_n (vme_as_n), .vme_ds_n (vme_ds_n), .vme_write_n (vme_write_n),
    .vme_lword_n (vme_lword_n), .vme_am (vme_am), .vme_a (vme_a),
    .vme_d_i (vme_d_i), .vme_d_o (vme_d_o), .vme_d_oe (vme_d_oe),
    .vme_dtack_n (vme_dtack_n), .vme_ga_n (vme_ga_n), .base_sw (base_sw), .ga_sel (ga_sel),
    .ctrl (ctrl), .ratio (fpdp_ratio), .post_trig (post_trig), .play_len (play_len),
    .soft_trig (soft_trig), .arm (arm), .trig_addr (trig_addr), .status (status),
    .mem_req (mem_req), .mem (mem), .mem_ack (mem_ack), .mem_rdata (mem_rdata)
  );

  assign fpdp_enable = ctrl.enable && ctrl.fwd_en;
  assign fpdp_start  = trig;

endmodule
