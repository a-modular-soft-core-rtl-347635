// rhd_pkg: constants, types and command encoders shared by the RHD2000
// headstage peripheral.
//
// The peripheral talks to an Intan RHD2000-family chip (RHD2132 headstage)
// with 16-bit SPI command words. The five command types (CONVERT, CALIBRATE,
// CLEAR, WRITE, READ) are the ones the command protocol exposes; their bit
// encodings are those of the RHD2000 data sheet:
//   CONVERT(c)   = 00cccccc_0000000h
//   CALIBRATE    = 01010101_00000000
//   CLEAR        = 01101010_00000000
//   WRITE(r, d)  = 10rrrrrr_dddddddd
//   READ(r)      = 11rrrrrr_00000000
// The chip returns the result of a command two SPI words later.
//
// The 64-entry register map mirrors the chip's own map: entries 0..17 hold the
// chip configuration registers, 40..44 and 60..63 read-only copies of the chip
// ROM registers. The peripheral's own registers fill the gaps, in the order
// Configuration, DirectCMD, DCResp, Status, ChSel, ChR_regs, Blanking, Time,
// Tx_ctl, Tx_status, ROM. Indices of the peripheral's own registers and all
// bit positions inside them are this design's choice.
package rhd_pkg;

  // ---- chip facts ------------------------------------------------------
  localparam int unsigned N_CH        = 32;  // RHD2132 amplifier channels
  localparam int unsigned N_CFG       = 18;  // chip configuration registers 0..17
  localparam int unsigned PIPE_DEPTH  = 2;   // result returns two words later
  localparam int unsigned N_ROM       = 9;   // ROM registers 40..44, 60..63

  // ---- register indices (word address = byte address / 4) ----------------
  localparam int unsigned R_CFG0      = 0;   // .. 17, mirror of chip regs 0..17
  localparam int unsigned R_DIRECTCMD = 18;
  localparam int unsigned R_DCRESP    = 19;
  localparam int unsigned R_STATUS    = 20;
  localparam int unsigned R_CHSEL     = 21;
  localparam int unsigned R_CHR0      = 22;  // .. 37, two channels per word
  localparam int unsigned R_BLANKING  = 38;
  localparam int unsigned R_TIME      = 39;
  localparam int unsigned R_ROM0      = 40;  // .. 44, chip ROM 'INTAN'
  localparam int unsigned R_TX_CTL    = 45;
  localparam int unsigned R_TX_STATUS = 46;
  localparam int unsigned R_NEST      = 47;
  localparam int unsigned R_ROM1      = 60;  // .. 63, chip ROM id registers

  // ---- Status register bits ----------------------------------------------
  // control bits, written 1 to start, read back 0
  localparam int unsigned ST_INI_GO   = 0;
  localparam int unsigned ST_DC_GO    = 1;
  localparam int unsigned ST_LOOP_GO  = 2;
  localparam int unsigned ST_LOOP_STOP= 3;
  // state bits, read only
  localparam int unsigned ST_BUSY     = 8;
  localparam int unsigned ST_STATE0   = 9;   // 2-bit control state at 10:9
  localparam int unsigned ST_BLNK     = 11;
  // interrupt flags, write 1 to clear
  localparam int unsigned ST_IRQ_PERI = 16;
  localparam int unsigned ST_IRQ_OVR  = 17;
  // cause of the last I_PERI event, read only
  localparam int unsigned ST_DONE_INI = 24;
  localparam int unsigned ST_DONE_DC  = 25;
  localparam int unsigned ST_DONE_LOOP= 26;

  // ---- Tx data stream ----------------------------------------------------
  localparam logic [7:0] HDR_TAG      = 8'hA5; // upper byte of each packet header

  // ---- control FSM states --------------------------------------------------
  typedef enum logic [1:0] {
    CTL_IDLE = 2'd0,
    CTL_INI  = 2'd1,
    CTL_DC   = 2'd2,
    CTL_LOOP = 2'd3
  } ctl_state_e;

  // SPI mux selection, one per process
  typedef enum logic [1:0] {
    SEL_NONE = 2'd0,
    SEL_INI  = 2'd1,
    SEL_DC   = 2'd2,
    SEL_CHR  = 2'd3
  } spi_sel_e;

  // one SPI request from a process
  typedef struct packed {
    logic        start;  // one-cycle request, honoured when the master is idle
    logic [15:0] cmd;    // command word, sent MSB first
  } spi_req_t;

  // one SPI completion to a process
  typedef struct packed {
    logic        busy;   // a word is being shifted
    logic        done;   // one-cycle pulse at the end of a word
    logic [15:0] rx;     // word received while the command was sent
  } spi_rsp_t;

  // ---- command encoders ----------------------------------------------------
  function automatic logic [15:0] cmd_convert(input logic [5:0] ch);
    return {2'b00, ch, 8'h00};
  endfunction

  function automatic logic [15:0] cmd_calibrate();
    return 16'b0101_0101_0000_0000;
  endfunction

  function automatic logic [15:0] cmd_clear();
    return 16'b0110_1010_0000_0000;
  endfunction

  function automatic logic [15:0] cmd_write(input logic [5:0] r, input logic [7:0] d);
    return {2'b10, r, d};
  endfunction

  function automatic logic [15:0] cmd_read(input logic [5:0] r);
    return {2'b11, r, 8'h00};
  endfunction

endpackage
