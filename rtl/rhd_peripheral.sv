// rhd_peripheral: FPGA peripheral that drives an Intan RHD2000-family
// headstage (RHD2132, 32 channels) on behalf of a soft-core processor.
//
// The processor sees 64 registers over AXI4-Lite (rhd_axi_regs). Writing a
// start bit in Status makes the control FSM (rhd_control) grant the single
// SPI master (rhd_spi_master, through rhd_spi_mux) to one of three
// processes:
//   INI         (rhd_ini)        writes the 18 configuration registers to the
//                                chip, calibrates it and copies its ROM
//   Direct Com  (rhd_direct_com) sends one DirectCMD word, answer in DCResp
//   CH Reader   (rhd_ch_reader)  the acquisition loop: per stimulus trigger,
//                                an OUT_BLNK pulse and a window of periodic
//                                conversions of the ChSel channels
// Loop samples go to the ChR registers and, when enabled, through Tx Data
// (rhd_tx_data: 65,536-word FIFO and UART, big-endian bytes) to the host.
// I_PERI signals the end of any process, I_TX_OVERRUN a word lost to a full
// FIFO. All of it runs on one clock, 96 MHz in the reference platform,
// which gives a 24 MHz SPI clock and a longest sample period of 682.7 us.
// The block split, the named registers, ports and interrupts follow the
// published peripheral; the register indices, bit fields, trigger input and
// SPI frame margins are this design's choices (see the submodules).
module rhd_peripheral
  import rhd_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 65536,
  parameter int unsigned SCLK_DIV   = 4,
  parameter int unsigned CS_LEAD    = 2,
  parameter int unsigned CS_TRAIL   = 2,
  parameter int unsigned CS_OFF     = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave (from the processor)
  input  logic [7:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [7:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // headstage SPI
  output logic        spi_cs_n,
  output logic        spi_sclk,
  output logic        spi_mosi,
  input  logic        spi_miso,
  // stimulus trigger (general-purpose input, asynchronous)
  input  logic        stim_trig,
  // outputs
  output logic        uart_txd,
  output logic        out_blnk,
  output logic        i_peri,
  output logic        i_tx_overrun
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  // register bank <-> blocks
  logic [7:0]      cfg [N_CFG];
  logic [15:0]     direct_cmd, dc_resp, period, nsave, tx_div, nest;
  logic [N_CH-1:0] chsel;
  logic [31:0]     tblnk;
  logic            tx_en;
  logic            ini_req, dc_req, loop_req, stop_req, clr_irq_peri, clr_irq_ovr;
  logic [15:0]     ch_data [N_CH];
  logic [7:0]      rom [N_ROM];
  ctl_state_e      ctl_state;
  spi_sel_e        sel;
  logic [2:0]      done_cause;

  // processes
  logic ini_go, dc_go, loop_go, loop_stop;
  logic ini_busy, dc_busy, chr_busy;
  logic ini_done, dc_done, loop_done;
  spi_req_t req_ini, req_dc, req_chr, m_req;
  spi_rsp_t rsp_ini, rsp_dc, rsp_chr, m_rsp;
  logic [15:0] stim_cnt;

  // Tx data
  logic          tx_wr;
  logic [15:0]   tx_word;
  logic          tx_overrun, tx_busy;
  logic [CW-1:0] tx_count;
  logic [16:0]   tx_count17;

  assign tx_count17 = 17'(tx_count);

  rhd_axi_regs u_regs (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .cfg, .direct_cmd, .chsel, .tblnk, .period, .nsave, .tx_div, .tx_en, .nest,
    .ini_req, .dc_req, .loop_req, .stop_req, .clr_irq_peri, .clr_irq_ovr,
    .dc_resp, .ch_data, .rom,
    .busy(ctl_state != CTL_IDLE), .ctl_state, .blnk(out_blnk),
    .irq_peri(i_peri), .irq_tx_overrun(i_tx_overrun), .done_cause,
    .tx_count(tx_count17), .tx_busy
  );

  rhd_control u_ctl (
    .clk, .rst_n,
    .ini_req, .dc_req, .loop_req, .stop_req, .clr_irq_peri, .clr_irq_ovr,
    .ini_go, .dc_go, .loop_go, .loop_stop,
    .ini_done, .dc_done, .loop_done, .tx_overrun,
    .state(ctl_state), .sel, .done_cause,
    .irq_peri(i_peri), .irq_tx_overrun(i_tx_overrun)
  );

  rhd_ini u_ini (
    .clk, .rst_n, .go(ini_go), .cfg, .busy(ini_busy), .done(ini_done), .rom,
    .spi_req(req_ini), .spi_rsp(rsp_ini)
  );

  rhd_direct_com u_dc (
    .clk, .rst_n, .go(dc_go), .cmd(direct_cmd), .busy(dc_busy), .done(dc_done),
    .dc_resp, .spi_req(req_dc), .spi_rsp(rsp_dc)
  );

  rhd_ch_reader #(.PERIOD_W(16)) u_chr (
    .clk, .rst_n, .go(loop_go), .stop(loop_stop), .chsel, .period, .nsave,
    .tblnk, .nest, .tx_en, .stim_trig, .busy(chr_busy), .done(loop_done),
    .blnk(out_blnk), .ch_data, .stim_cnt, .tx_valid(tx_wr), .tx_data(tx_word),
    .spi_req(req_chr), .spi_rsp(rsp_chr)
  );

  rhd_spi_mux u_mux (
    .sel, .req_ini, .req_dc, .req_chr, .rsp_ini, .rsp_dc, .rsp_chr,
    .m_req, .m_rsp
  );

  rhd_spi_master #(.SCLK_DIV(SCLK_DIV), .CS_LEAD(CS_LEAD), .CS_TRAIL(CS_TRAIL), .CS_OFF(CS_OFF)) u_spi (
    .clk, .rst_n, .start(m_req.start), .cmd(m_req.cmd),
    .busy(m_rsp.busy), .done(m_rsp.done), .rx(m_rsp.rx),
    .cs_n(spi_cs_n), .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso)
  );

  rhd_tx_data #(.DEPTH(FIFO_DEPTH)) u_tx (
    .clk, .rst_n, .wr_en(tx_wr), .wr_data(tx_word), .div(tx_div),
    .txd(uart_txd), .overrun(tx_overrun), .count(tx_count), .busy(tx_busy)
  );
endmodule
