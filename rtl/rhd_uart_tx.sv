// rhd_uart_tx: UART transmitter of the data interface.
//
// Sends one byte per `start` as 8N1: a low start bit, eight data bits LSB
// first, one high stop bit, each bit `div` clock cycles long. The line idles
// high. With the 96 MHz clock, div = 96 gives the default 1 Mbit/s and
// div = 8 the 12 Mbit/s ceiling of the USB bridge. A byte therefore costs
// 10 bit times, which is where the factor 20 per 16-bit sample in the data
// rate budget comes from. Configurable rate and its range follow the
// published description; the 8N1 frame is this design's reading of that
// budget.
//
// Interface: pulse `start` with `data` while `busy` is low; `busy` stays high
// for 10 x div cycles, and `done` pulses in the cycle after the stop bit.
module rhd_uart_tx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] div,     // clock cycles per bit, >= 2
  input  logic        start,
  input  logic [7:0]  data,
  output logic        busy,
  output logic        done,
  output logic        txd
);
  logic [15:0] bcnt;
  logic [3:0]  nbit;
  logic [9:0]  sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      txd  <= 1'b1;
      bcnt <= '0;
      nbit <= '0;
      sh   <= '1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          sh   <= {1'b1, data, 1'b0};
          txd  <= 1'b0;
          bcnt <= div - 1'b1;
          nbit <= 4'd0;
        end
      end else if (bcnt != '0) begin
        bcnt <= bcnt - 1'b1;
      end else if (nbit == 4'd9) begin
        busy <= 1'b0;
        done <= 1'b1;
        txd  <= 1'b1;
      end else begin
        nbit <= nbit + 1'b1;
        txd  <= sh[nbit + 1'b1];
        bcnt <= div - 1'b1;
      end
    end
  end
endmodule
