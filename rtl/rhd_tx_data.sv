// rhd_tx_data: "Tx Data" block, the one-way data path from the acquisition
// loop to the host.
//
// Words written by the acquisition loop are queued in a FIFO (65,536 x 16
// bits by default) and sent over the data UART as two bytes each,
// most significant byte first (big-endian). A word that finds the FIFO full
// is lost and raises `overrun`, which the control block turns into the
// I_TX_OVERRUN interrupt. The UART rate is the `div` field of Tx_ctl
// (clock cycles per bit).
//
// Timing: a word leaves the FIFO when the UART is idle; the first byte
// starts three cycles after the FIFO is seen non-empty, the second two
// cycles after the first ends. While the FIFO holds data a word leaves every
// 20 x div + 6 cycles (1926 cycles, 20.06 us, at 1 Mbit/s), so the
// sustained rate is about R/20 words per second for a bit rate R. FIFO, UART, big-endian byte
// order and the overrun interrupt follow the published description; the
// sequencing is this design's.
module rhd_tx_data #(
  parameter int unsigned DEPTH = 65536
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [15:0]            wr_data,
  input  logic [15:0]            div,
  output logic                   txd,
  output logic                   overrun,
  output logic [$clog2(DEPTH):0] count,
  output logic                   busy
);
  typedef enum logic [2:0] {T_IDLE, T_READ, T_HI, T_WAIT_HI, T_LO, T_WAIT_LO} tstate_e;
  tstate_e state;

  logic        rd_en, empty, full;
  logic [15:0] rd_data, word;
  logic        u_start, u_busy, u_done;
  logic [7:0]  u_data;

  rhd_tx_fifo #(.DEPTH(DEPTH), .WIDTH(16)) u_fifo (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data,
    .empty, .full, .count, .overrun
  );

  rhd_uart_tx u_uart (
    .clk, .rst_n, .div, .start(u_start), .data(u_data),
    .busy(u_busy), .done(u_done), .txd
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      word  <= '0;
    end else begin
      unique case (state)
        T_IDLE:    if (!empty) state <= T_READ;
        T_READ:    state <= T_HI;            // rd_data valid in T_HI
        T_HI:      begin word <= rd_data; state <= T_WAIT_HI; end
        T_WAIT_HI: if (u_done) state <= T_LO;
        T_LO:      state <= T_WAIT_LO;
        T_WAIT_LO: if (u_done) state <= T_IDLE;
        default:   state <= T_IDLE;
      endcase
    end
  end

  assign rd_en   = (state == T_READ);
  assign u_start = (state == T_HI) || (state == T_LO);
  assign u_data  = (state == T_HI) ? rd_data[15:8] : word[7:0];
  assign busy    = (state != T_IDLE) || !empty;
endmodule
