// zbt_ctrl - controller of the on-board ZBT SRAM (8 MByte, 32 bit, 125 MHz).
//
// The memory serves three users:
//  * ring recording: after `arm` every valid word of the write stream is
//    stored at the next address, wrapping at the end of the memory.  A trigger
//    freezes the trigger address; POST_TRIG further words are stored, then
//    recording stops and `done` is set, so the memory holds the history
//    around the trigger.
//  * playback: while `play_en` is high and no recording runs, words
//    0 .. play_len-1 are read in an endless loop (play_len = 0: whole memory)
//    and returned on play_data/play_valid.  `play_ready` low pauses it.
//  * single-word VME access, served only while neither of the above runs.
// That the memory is 8 MByte of ZBT RAM used as a ring memory, for recording
// and for playback, and that VME can write it, follows the board description;
// the trigger handling and the arbitration are this design's choices.
//
// Pin timing is that of a pipelined ZBT SRAM: address and write enable in
// cycle n, write data driven (or read data returned) in cycle n+2.  The pins
// are registered.  Read data appears on play_data / vme_rdata four clocks
// after the read was issued.
module zbt_ctrl
  import mbf_pkg::*;
#(
  parameter int unsigned ADDR_W = RAM_AW,
  parameter int unsigned DATA_W = WORD_W
) (
  input  logic              clk,
  input  logic              rst,
  // ring recording
  input  logic              arm,          // start recording from address 0
  input  logic              trig,         // trigger pulse
  input  logic [ADDR_W-1:0] post_trig,    // words stored after the trigger
  input  logic [DATA_W-1:0] wr_data,
  input  logic              wr_valid,
  output logic              recording,
  output logic              done,
  output logic [ADDR_W-1:0] trig_addr,
  // playback
  input  logic              play_en,
  input  logic              play_ready,
  input  logic [ADDR_W-1:0] play_len,
  output logic [DATA_W-1:0] play_data,
  output logic              play_valid,
  output logic              playing,
  // VME access (request held until ack)
  input  logic              vme_req,
  input  logic              vme_we,
  input  logic [ADDR_W-1:0] vme_addr,
  input  logic [DATA_W-1:0] vme_wdata,
  output logic              vme_ack,
  output logic [DATA_W-1:0] vme_rdata,
  // ZBT SRAM pins
  output logic [ADDR_W-1:0] sram_a,
  output logic              sram_ce_n,
  output logic              sram_we_n,
  output logic [DATA_W-1:0] sram_dq_o,
  output logic              sram_dq_oe,
  input  logic [DATA_W-1:0] sram_dq_i
);

  typedef enum logic [1:0] {R_IDLE, R_RING, R_POST} rec_state_e;

  // what an issued cycle is, carried along the two-stage ZBT pipeline
  typedef struct packed {
    logic              rd_play;
    logic              rd_vme;
    logic              we;
    logic [DATA_W-1:0] wdata;
  } tag_t;

  rec_state_e        rstate;
  logic [ADDR_W-1:0] wr_addr, rd_addr, remain;
  logic              vme_issued;
  tag_t              t0, t1, t2;

  // command chosen for this cycle
  logic              c_valid, c_we;
  logic [ADDR_W-1:0] c_addr;
  tag_t              c_tag;

  wire rec_write  = (rstate == R_RING) || (rstate == R_POST && remain != '0);
  wire play_issue = play_en && rstate == R_IDLE && play_ready;
  wire vme_issue  = vme_req && !vme_issued && rstate == R_IDLE && !play_en;

  assign recording = (rstate != R_IDLE);
  assign playing   = play_en && rstate == R_IDLE;

  always_comb begin
    c_valid = 1'b0;
    c_we    = 1'b0;
    c_addr  = '0;
    c_tag   = '0;
    if (rec_write && wr_valid) begin
      c_valid     = 1'b1;
      c_we        = 1'b1;
      c_addr      = wr_addr;
      c_tag.we    = 1'b1;
      c_tag.wdata = wr_data;
    end else if (play_issue) begin
      c_valid       = 1'b1;
      c_addr        = rd_addr;
      c_tag.rd_play = 1'b1;
    end else if (vme_issue) begin
      c_valid      = 1'b1;
      c_we         = vme_we;
      c_addr       = vme_addr;
      c_tag.we     = vme_we;
      c_tag.wdata  = vme_wdata;
      c_tag.rd_vme = !vme_we;
    end
  end

  // recording and playback address sequencing
  always_ff @(posedge clk) begin
    if (rst) begin
      rstate    <= R_IDLE;
      wr_addr   <= '0;
      remain    <= '0;
      trig_addr <= '0;
      done      <= 1'b0;
      rd_addr   <= '0;
    end else begin
      if (arm) begin
        rstate  <= R_RING;
        wr_addr <= '0;
        done    <= 1'b0;
      end else begin
        if (rec_write && wr_valid) wr_addr <= wr_addr + 1'b1;
        unique case (rstate)
          R_RING: if (trig) begin
            trig_addr <= wr_addr;
            remain    <= post_trig;
            rstate    <= R_POST;
          end
          R_POST: begin
            if (remain == '0) begin
              rstate <= R_IDLE;
              done   <= 1'b1;
            end else if (wr_valid) begin
              remain <= remain - 1'b1;
            end
          end
          default: ;
        endcase
      end
      if (!play_en)        rd_addr <= '0;
      else if (play_issue) rd_addr <= (rd_addr + 1'b1 == play_len) ? '0 : rd_addr + 1'b1;
    end
  end

  // VME handshake: one memory cycle per request
  always_ff @(posedge clk) begin
    if (rst)            vme_issued <= 1'b0;
    else if (vme_issue) vme_issued <= 1'b1;
    else if (!vme_req)  vme_issued <= 1'b0;
  end

  // pins and pipeline
  always_ff @(posedge clk) begin
    if (rst) begin
      sram_a     <= '0;
      sram_ce_n  <= 1'b1;
      sram_we_n  <= 1'b1;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
      t0         <= '0;
      t1         <= '0;
      t2         <= '0;
      play_data  <= '0;
      play_valid <= 1'b0;
      vme_rdata  <= '0;
      vme_ack    <= 1'b0;
    end else begin
      sram_a     <= c_addr;
      sram_ce_n  <= !c_valid;
      sram_we_n  <= !c_we;
      t0         <= c_tag;      // cycle n (address on the pins)
      t1         <= t0;         // cycle n+1
      t2         <= t1;         // cycle n+2 (data on the bus)
      sram_dq_o  <= t1.wdata;   // drive write data during cycle n+2
      sram_dq_oe <= t1.we;
      play_valid <= t2.rd_play;
      if (t2.rd_play) play_data <= sram_dq_i;
      if (t2.rd_vme)  vme_rdata <= sram_dq_i;
      vme_ack    <= (vme_issue && vme_we) || t2.rd_vme;
    end
  end

  // the FPGA never drives the data bus in a cycle in which it expects read data
  a_bus_turnaround: assert property (@(posedge clk) disable iff (rst)
    sram_dq_oe |-> !(t2.rd_play || t2.rd_vme));
  // a VME request is served by exactly one memory cycle
  a_one_vme_cycle: assert property (@(posedge clk) disable iff (rst)
    vme_issue |=> !vme_issue);

endmodule
