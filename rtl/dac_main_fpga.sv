// dac_main_fpga - main-board FPGA of the DAC board.
//
// The DAC board works like the ADC board in reverse.  The 32 bit 125 MS/s
// stream from the FPDP board passes the two-way redirector into an internal
// FIFO, into the ZBT memory, or both.  A START_DAC trigger (external or by
// software) launches the 4:1 multiplexer, which from then on takes one word per
// 125 MHz cycle from the FIFO and sends two samples per 250 MHz cycle to the
// DAC mezzanine.  For playback the redirector feeds the FIFO from the memory
// instead, paced by the FIFO's fill level.  That structure follows the board
// description.  This design's choices: the register map (mbf_pkg), a FIFO
// of FIFO_DEPTH words, sticky overflow/underflow flags, and the FPDP
// multiplexer being restarted when the board is enabled.
//
// Latency from fpdp_data to the first DAC sample, with START_DAC already
// given: FIFO 1 and mux register 1 clk125 cycle, then one clk250 cycle to the
// pins (the redirector is combinational).
module dac_main_fpga
  import mbf_pkg::*;
#(
  parameter int unsigned ADDR_W     = RAM_AW,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic                  clk250,
  input  logic                  clk125,
  input  logic                  rst,
  output logic [2*SAMPLE_W-1:0] dac_d,
  input  logic                  ext_trig,    // START_DAC
  // VME
  input  logic                  vme_as_n,
  input  logic [1:0]            vme_ds_n,
  input  logic                  vme_write_n,
  input  logic                  vme_lword_n,
  input  logic [5:0]            vme_am,
  input  logic [31:1]           vme_a,
  input  logic [31:0]           vme_d_i,
  output logic [31:0]           vme_d_o,
  output logic                  vme_d_oe,
  output logic                  vme_dtack_n,
  input  logic [4:0]            vme_ga_n,
  input  logic [7:0]            base_sw,
  input  logic                  ga_sel,
  // ZBT SRAM
  output logic [ADDR_W-1:0]     sram_a,
  output logic                  sram_ce_n,
  output logic                  sram_we_n,
  output logic [31:0]           sram_dq_o,
  output logic                  sram_dq_oe,
  input  logic [31:0]           sram_dq_i,
  // from the FPDP board
  input  word_t                 fpdp_data,
  input  logic                  fpdp_valid,
  input  logic                  fpdp_overflow,
  output logic                  fpdp_start,
  output logic [3:0]            fpdp_ratio
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  word_t             play_data, ram_data, fwd_data, fifo_head;
  logic              play_valid, ram_valid, fwd_valid, playing, recording, done;
  ctrl_t             ctrl;
  logic [ADDR_W-1:0] post_trig, play_len, trig_addr;
  logic              soft_trig, arm, trig;
  logic              mem_req, mem_ack;
  mem_req_t          mem;
  logic [31:0]       mem_rdata;
  status_t           status;
  logic              fifo_empty, fifo_full, fifo_pop, running, underflow;
  logic              overflow, enable_q;
  logic [CW-1:0]     fifo_count;

  data_redirector #(.W(WORD_W)) u_redir (
    .fwd_en      (ctrl.enable && ctrl.fwd_en),
    .ram_wr_en   (ctrl.enable && ctrl.ram_wr_en),
    .fwd_src_ram (ctrl.fwd_src_ram),
    .live_data   (fpdp_data),
    .live_valid  (fpdp_valid),
    .play_data   (play_data),
    .play_valid  (play_valid),
    .fwd_data    (fwd_data),
    .fwd_valid   (fwd_valid),
    .ram_data    (ram_data),
    .ram_valid   (ram_valid)
  );

  sync_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk125),
    .rst     (rst || !ctrl.enable),
    .wr_en   (fwd_valid),
    .wr_data (fwd_data),
    .rd_en   (fifo_pop),
    .rd_data (fifo_head),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .count   (fifo_count)
  );

  dac_mux_4to1 u_mux (
    .clk250     (clk250),
    .clk125     (clk125),
    .rst        (rst),
    .start      (trig && ctrl.enable),
    .stop       (!ctrl.enable),
    .fifo_data  (fifo_head),
    .fifo_empty (fifo_empty),
    .fifo_pop   (fifo_pop),
    .running    (running),
    .underflow  (underflow),
    .dac_d      (dac_d)
  );

  trigger_in u_trig (
    .clk (clk125), .rst (rst), .ext_trig (ext_trig), .soft_trig (soft_trig), .trig (trig)
  );

  // playback pauses while the FIFO is nearly full (reads in flight: 5)
  wire play_ready = fifo_count < CW'(FIFO_DEPTH - 8);

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
    .play_ready (play_ready),
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

  always_ff @(posedge clk125) begin
    if (rst) begin
      overflow <= 1'b0;
      enable_q <= 1'b0;
    end else begin
      enable_q <= ctrl.enable;
      if (trig)                                       overflow <= 1'b0;
      else if ((fwd_valid && fifo_full) || fpdp_overflow) overflow <= 1'b1;
    end
  end

  always_comb begin
    status           = '0;
    status.recording = recording;
    status.done      = done;
    status.playing   = playing;
    status.overflow  = overflow;
    status.underflow = underflow;
  end

  vme_slave #(.ADDR_W(ADDR_W), .BOARD_ID(32'h4D42_4644)) u_vme (
    .clk (clk125), .rst (rst),
    .vme_as_n (vme_as_n), .vme_ds_n (vme_ds_n), .vme_write_n (vme_write_n),
    .vme_lword_n (vme_lword_n), .vme_am (vme_am), .vme_a (vme_a),
    .vme_d_i (vme_d_i), .vme_d_o (vme_d_o), .vme_d_oe (vme_d_oe),
    .vme_dtack_n (vme_dtack_n), .vme_ga_n (vme_ga_n), .base_sw (base_sw), .ga_sel (ga_sel),
    .ctrl (ctrl), .ratio (fpdp_ratio), .post_trig (post_trig), .play_len (play_len),
    .soft_trig (soft_trig), .arm (arm), .trig_addr (trig_addr), .status (status),
    .mem_req (mem_req), .mem (mem), .mem_ack (mem_ack), .mem_rdata (mem_rdata)
  );

  // the FPDP multiplexer restarts at port 0 when the board is enabled
  assign fpdp_start = ctrl.enable && !enable_q;

endmodule
