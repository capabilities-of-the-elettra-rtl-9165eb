// vme_slave - VME A32/D32 slave of the ADC/DAC main board.
//
// The board sits on a VME64x bus and answers A32/D32 single cycles (address
// modifiers 09h and 0Dh).  Its 16 MByte window is selected by A31..A24, which
// are compared either with the slot's geographic address (0, 0, 0, GA4..GA0)
// or with an 8 bit switch, chosen by `ga_sel`; the specification allows both.
// Inside the window A23 = 0 reaches the ZBT memory, one 32 bit word per cycle
// (A22..A2 = word address), and A23 = 1 the registers of mbf_pkg::reg_idx_e.
// The register map, the window layout and the absence of block transfers and
// of the VME64x CR/CSR space are this design's choices.
//
// The asynchronous strobes AS*, DS0*, DS1* and WRITE* pass two-flop
// synchronisers; address, AM and data are taken when both data strobes are
// seen low, since the bus keeps them stable by then.  DTACK* is asserted once
// the register or memory access is done and released when the master lifts
// the data strobes.  A register cycle takes about four clocks from DS* to
// DTACK*, a memory read about eight.
module vme_slave
  import mbf_pkg::*;
#(
  parameter int unsigned ADDR_W   = RAM_AW,
  parameter logic [31:0] BOARD_ID = 32'h4D42_4600
) (
  input  logic              clk,
  input  logic              rst,
  // VME bus (data bus split into in/out/enable at the pads)
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
  input  logic [4:0]        vme_ga_n,     // geographic address, active low
  input  logic [7:0]        base_sw,
  input  logic              ga_sel,
  // registers
  output ctrl_t             ctrl,
  output logic [3:0]        ratio,
  output logic [ADDR_W-1:0] post_trig,
  output logic [ADDR_W-1:0] play_len,
  output logic              soft_trig,    // one-cycle pulses
  output logic              arm,
  input  logic [ADDR_W-1:0] trig_addr,
  input  status_t           status,
  // memory port to zbt_ctrl
  output logic              mem_req,
  output mem_req_t          mem,
  input  logic              mem_ack,
  input  logic [31:0]       mem_rdata
);

  typedef enum logic [1:0] {V_IDLE, V_MEM, V_ACK, V_WAIT} vstate_e;

  vstate_e    vstate;
  logic [1:0] as_s, wr_s;
  logic [1:0] ds0_s, ds1_s;

  wire as_low  = !as_s[1];
  wire ds_low  = !ds0_s[1] && !ds1_s[1];
  wire ds_high = ds0_s[1] && ds1_s[1];
  wire is_read = wr_s[1];                   // WRITE* high = read

  wire [7:0] base     = ga_sel ? {3'b000, ~vme_ga_n} : base_sw;
  wire       am_ok    = (vme_am == AM_A32_USER) || (vme_am == AM_A32_SUPV);
  wire       selected = am_ok && vme_a[31:24] == base && !vme_lword_n && !vme_a[1];
  wire [5:0] reg_idx  = vme_a[7:2];

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s  <= '1;
      ds0_s <= '1;
      ds1_s <= '1;
      wr_s  <= '1;
    end else begin
      as_s  <= {as_s[0],  vme_as_n};
      ds0_s <= {ds0_s[0], vme_ds_n[0]};
      ds1_s <= {ds1_s[0], vme_ds_n[1]};
      wr_s  <= {wr_s[0],  vme_write_n};
    end
  end

  function automatic logic [31:0] reg_read(logic [5:0] idx);
    unique case (idx)
      REG_CTRL:      return ctrl;
      REG_RATIO:     return 32'(ratio);
      REG_POST_TRIG: return 32'(post_trig);
      REG_PLAY_LEN:  return 32'(play_len);
      REG_TRIG_ADDR: return 32'(trig_addr);
      REG_STATUS:    return status;
      REG_ID:        return BOARD_ID;
      default:       return '0;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      vstate      <= V_IDLE;
      vme_d_o     <= '0;
      vme_d_oe    <= 1'b0;
      vme_dtack_n <= 1'b1;
      ctrl        <= '0;
      ratio       <= 4'd6;
      post_trig   <= '0;
      play_len    <= '0;
      soft_trig   <= 1'b0;
      arm         <= 1'b0;
      mem_req     <= 1'b0;
      mem         <= '0;
    end else begin
      soft_trig <= 1'b0;
      arm       <= 1'b0;
      unique case (vstate)
        V_IDLE: if (as_low && ds_low) begin
          if (!selected) begin
            vstate <= V_WAIT;                 // not ours: wait for DS* high
          end else if (!vme_a[23]) begin
            mem_req    <= 1'b1;
            mem.we     <= !is_read;
            mem.addr   <= vme_a[ADDR_W+1:2];
            mem.wdata  <= vme_d_i;
            vstate     <= V_MEM;
          end else begin
            if (is_read) begin
              vme_d_o  <= reg_read(reg_idx);
              vme_d_oe <= 1'b1;
            end else begin
              unique case (reg_idx)
                REG_CTRL:      ctrl      <= vme_d_i;
                REG_TRIG: begin
                  soft_trig <= vme_d_i[0];
                  arm       <= vme_d_i[1];
                end
                REG_RATIO:     ratio     <= vme_d_i[3:0];
                REG_POST_TRIG: post_trig <= vme_d_i[ADDR_W-1:0];
                REG_PLAY_LEN:  play_len  <= vme_d_i[ADDR_W-1:0];
                default: ;
              endcase
            end
            vme_dtack_n <= 1'b0;
            vstate      <= V_ACK;
          end
        end
        V_MEM: if (mem_ack) begin
          mem_req     <= 1'b0;
          vme_d_o     <= mem_rdata;
          vme_d_oe    <= !mem.we;
          vme_dtack_n <= 1'b0;
          vstate      <= V_ACK;
        end
        V_ACK: if (ds_high) begin
          vme_dtack_n <= 1'b1;
          vme_d_oe    <= 1'b0;
          vstate      <= V_IDLE;
        end
        V_WAIT: if (ds_high) vstate <= V_IDLE;
        default: vstate <= V_IDLE;
      endcase
    end
  end

  // the memory request is held until acknowledged
  a_req_held: assert property (@(posedge clk) disable iff (rst)
    mem_req && !mem_ack |=> mem_req);
  // DTACK* is only asserted while the slave is in its acknowledge state
  a_dtack: assert property (@(posedge clk) disable iff (rst)
    !vme_dtack_n |-> vstate == V_ACK);

endmodule
