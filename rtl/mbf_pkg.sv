// mbf_pkg - shared constants and types of the multi-bunch feedback ADC/DAC
// board firmware.
//
// The boards sample bunch positions with 8 bit resolution at 500 MS/s and move
// them through the FPGA as 32 bit words (four samples) at 125 MHz.  The sample
// width, lane count and the 8 MByte ZBT memory follow the board specification;
// the VME register map below is this design's own choice.
package mbf_pkg;

  localparam int unsigned SAMPLE_W = 8;   // ADC/DAC resolution
  localparam int unsigned LANES    = 4;   // samples per 125 MHz word
  localparam int unsigned WORD_W   = SAMPLE_W * LANES;
  localparam int unsigned RAM_AW   = 21;  // 8 MByte / 4 byte = 2^21 words
  localparam int unsigned MAX_PORTS = 12; // FPDP ports, ratio 1..12

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [WORD_W-1:0]   word_t;

  // VME: the board answers A32 single cycles in a 16 MByte window selected by
  // A31..A24.  A23 = 0 addresses the ZBT memory (A22..A2 = word address),
  // A23 = 1 the registers below (A7..A2 = register index).
  localparam logic [5:0] AM_A32_USER = 6'h09;
  localparam logic [5:0] AM_A32_SUPV = 6'h0D;

  typedef enum logic [5:0] {
    REG_CTRL      = 6'h00,  // control bits, see ctrl_t
    REG_TRIG      = 6'h01,  // write: bit0 software trigger, bit1 start ring
    REG_RATIO     = 6'h02,  // FPDP demultiplex / multiplex ratio 1..12
    REG_POST_TRIG = 6'h03,  // words recorded after a trigger
    REG_PLAY_LEN  = 6'h04,  // playback loop length in words (0 = full RAM)
    REG_TRIG_ADDR = 6'h05,  // read: ring address of the trigger
    REG_STATUS    = 6'h06,  // read: status_t
    REG_ID        = 6'h07   // read: board identification
  } reg_idx_e;

  // Control register.  fwd_en: live or playback data to the forward path (FPDP
  // board on the ADC, DAC mezzanine on the DAC); ram_wr_en: live data into the
  // ring memory; fwd_src_ram: forward path fed by RAM playback.
  typedef struct packed {
    logic [27:0] rsvd;
    logic        fwd_src_ram;
    logic        ram_wr_en;
    logic        fwd_en;
    logic        enable;
  } ctrl_t;

  typedef struct packed {
    logic [26:0] rsvd;
    logic        underflow;  // DAC: FIFO ran empty after START_DAC
    logic        overflow;   // DAC: FIFO full when a word arrived
    logic        playing;
    logic        done;       // post-trigger recording finished
    logic        recording;
  } status_t;

  // One request of the VME slave to the memory controller.
  typedef struct packed {
    logic              we;
    logic [RAM_AW-1:0] addr;
    word_t             wdata;
  } mem_req_t;

  // Reflected binary (Gray) code of one sample.
  function automatic sample_t gray_to_bin(sample_t g);
    sample_t b;
    b[SAMPLE_W-1] = g[SAMPLE_W-1];
    for (int i = SAMPLE_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
