// rhd_axi_regs: AXI4-Lite slave and 64-register bank of the peripheral.
//
// The bank is 64 words of 32 bits, byte address = 4 x index. Its layout
// mirrors the RHD2000 register map: entries 0..17 are the chip's
// configuration registers (8 bits each, written to the chip by INI), 40..44
// and 60..63 read-only copies of the chip's ROM registers (filled by INI).
// The peripheral's own registers sit in the gaps (indices in rhd_pkg):
//   DirectCMD  [15:0] command word for Direct Com                     RW
//   DCResp     [15:0] answer to the last direct command               RO
//   Status     bits 0..3 write 1 to start INI, Direct Com, the loop, or
//              to stop the loop (read 0); 8 busy, 10:9 control state,
//              11 OUT_BLNK; 16 I_PERI and 17 I_TX_OVERRUN flags (write 1
//              to clear); 26:24 which process raised I_PERI last
//   ChSel      [31:0] channel mask for the loop                       RW
//   ChR_regs   22..37: latest sample of channel 2k in [15:0], of 2k+1 in
//              [31:16]                                                 RO
//   Blanking   [31:0] OUT_BLNK pulse length, clock cycles              RW
//   Time       [15:0] sample period, clock cycles; [31:16] frames per
//              capture window (Tsave x Fs)                             RW
//   Tx_ctl     [15:0] UART clock cycles per bit (reset 96 = 1 Mbit/s);
//              [16] stream loop data to the UART                       RW
//   Tx_status  [16:0] words in the Tx FIFO; 17 overrun flag; 18 busy  RO
//   Nest       [15:0] stimuli per loop, 0 = free running               RW
// Unused indices read 0 and ignore writes.
// The 64-register bank, its RHD-mirroring layout, the named registers and
// start-by-Status-bit come from the published description; indices, field
// positions and reset values are this design's choices.
//
// AXI4-Lite: address and data channels are taken independently (one of
// each held at a time); the write happens when both are held, with an OKAY
// response on B in the next cycle. A read answers on R in the cycle after
// the AR handshake. WSTRB selects bytes of RW registers; start and clear
// bits act when their byte is strobed.
module rhd_axi_regs
  import rhd_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // configuration to the processes
  output logic [7:0]        cfg [N_CFG],
  output logic [15:0]       direct_cmd,
  output logic [N_CH-1:0]   chsel,
  output logic [31:0]       tblnk,
  output logic [15:0]       period,
  output logic [15:0]       nsave,
  output logic [15:0]       tx_div,
  output logic              tx_en,
  output logic [15:0]       nest,
  // Status register control bits (one-cycle pulses)
  output logic              ini_req,
  output logic              dc_req,
  output logic              loop_req,
  output logic              stop_req,
  output logic              clr_irq_peri,
  output logic              clr_irq_ovr,
  // read-only contents
  input  logic [15:0]       dc_resp,
  input  logic [15:0]       ch_data [N_CH],
  input  logic [7:0]        rom [N_ROM],
  input  logic              busy,
  input  ctl_state_e        ctl_state,
  input  logic              blnk,
  input  logic              irq_peri,
  input  logic              irq_tx_overrun,
  input  logic [2:0]        done_cause,
  input  logic [16:0]       tx_count,
  input  logic              tx_busy
);
  localparam logic [15:0] PERIOD_RST = 16'd9600;  // 10 kHz at 96 MHz
  localparam logic [15:0] NSAVE_RST  = 16'd1;
  localparam logic [15:0] DIV_RST    = 16'd96;    // 1 Mbit/s at 96 MHz

  // ---- write channel --------------------------------------------------------
  logic              aw_held, w_held;
  logic [ADDR_W-1:0] aw_addr;
  logic [31:0]       w_data;
  logic [3:0]        w_strb;
  logic              do_write;
  logic [5:0]        widx;

  assign s_axi_awready = !aw_held;
  assign s_axi_wready  = !w_held;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign do_write      = aw_held && w_held && !s_axi_bvalid;
  assign widx          = aw_addr[7:2];

  // merge strobed bytes into an old value
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? d[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  logic [31:0] w_blank, w_time, w_txctl, w_chsel, w_dcmd, w_nest;
  assign w_blank = merge(tblnk, w_data, w_strb);
  assign w_time  = merge({nsave, period}, w_data, w_strb);
  assign w_txctl = merge({15'd0, tx_en, tx_div}, w_data, w_strb);
  assign w_chsel = merge(chsel, w_data, w_strb);
  assign w_dcmd  = merge({16'd0, direct_cmd}, w_data, w_strb);
  assign w_nest  = merge({16'd0, nest}, w_data, w_strb);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held      <= 1'b0;
      w_held       <= 1'b0;
      aw_addr      <= '0;
      w_data       <= '0;
      w_strb       <= '0;
      s_axi_bvalid <= 1'b0;
      for (int i = 0; i < N_CFG; i++) cfg[i] <= '0;
      direct_cmd   <= '0;
      chsel        <= '0;
      tblnk        <= '0;
      period       <= PERIOD_RST;
      nsave        <= NSAVE_RST;
      tx_div       <= DIV_RST;
      tx_en        <= 1'b0;
      nest         <= '0;
      ini_req      <= 1'b0;
      dc_req       <= 1'b0;
      loop_req     <= 1'b0;
      stop_req     <= 1'b0;
      clr_irq_peri <= 1'b0;
      clr_irq_ovr  <= 1'b0;
    end else begin
      ini_req      <= 1'b0;
      dc_req       <= 1'b0;
      loop_req     <= 1'b0;
      stop_req     <= 1'b0;
      clr_irq_peri <= 1'b0;
      clr_irq_ovr  <= 1'b0;

      if (s_axi_awvalid && s_axi_awready) begin aw_held <= 1'b1; aw_addr <= s_axi_awaddr; end
      if (s_axi_wvalid && s_axi_wready) begin w_held <= 1'b1; w_data <= s_axi_wdata; w_strb <= s_axi_wstrb; end
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;

      if (do_write) begin
        aw_held      <= 1'b0;
        w_held       <= 1'b0;
        s_axi_bvalid <= 1'b1;
        if (int'(widx) < N_CFG) begin
          if (w_strb[0]) cfg[widx[4:0]] <= w_data[7:0];
        end else begin
          unique case (int'(widx))
            R_DIRECTCMD: direct_cmd <= w_dcmd[15:0];
            R_STATUS: begin
              if (w_strb[0]) begin
                ini_req  <= w_data[ST_INI_GO];
                dc_req   <= w_data[ST_DC_GO];
                loop_req <= w_data[ST_LOOP_GO];
                stop_req <= w_data[ST_LOOP_STOP];
              end
              if (w_strb[2]) begin
                clr_irq_peri <= w_data[ST_IRQ_PERI];
                clr_irq_ovr  <= w_data[ST_IRQ_OVR];
              end
            end
            R_CHSEL:    chsel <= w_chsel;
            R_BLANKING: tblnk <= w_blank;
            R_TIME:     {nsave, period} <= w_time;
            R_TX_CTL:   {tx_en, tx_div} <= w_txctl[16:0];
            R_NEST:     nest <= w_nest[15:0];
            default: ;
          endcase
        end
      end
    end
  end

  // ---- read channel ---------------------------------------------------------
  function automatic logic [31:0] read_reg(input logic [5:0] idx);
    int unsigned i;
    i = int'(idx);
    if (i < N_CFG)                           return {24'd0, cfg[i]};
    if (i >= R_CHR0 && i < R_CHR0 + N_CH/2)  return {ch_data[2*(i-R_CHR0)+1], ch_data[2*(i-R_CHR0)]};
    if (i >= R_ROM0 && i < R_ROM0 + 5)       return {24'd0, rom[i - R_ROM0]};
    if (i >= R_ROM1 && i < R_ROM1 + 4)       return {24'd0, rom[i - R_ROM1 + 5]};
    unique case (i)
      R_DIRECTCMD: return {16'd0, direct_cmd};
      R_DCRESP:    return {16'd0, dc_resp};
      R_STATUS:    return {5'd0, done_cause, 6'd0, irq_tx_overrun, irq_peri,
                           4'd0, blnk, ctl_state, busy, 8'd0};
      R_CHSEL:     return chsel;
      R_BLANKING:  return tblnk;
      R_TIME:      return {nsave, period};
      R_TX_CTL:    return {15'd0, tx_en, tx_div};
      R_TX_STATUS: return {13'd0, tx_busy, irq_tx_overrun, tx_count};
      R_NEST:      return {16'd0, nest};
      default:     return 32'd0;
    endcase
  endfunction

  assign s_axi_arready = !s_axi_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= read_reg(s_axi_araddr[7:2]);
      end else if (s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  // AXI rule: a response stays valid until it is taken
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                   s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                   s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule
