// uart_rx_model: simulation-only 8N1 serial receiver used by testbenches to
// decode the data UART line. It waits for a falling edge, samples each bit
// in its middle (DIV clock cycles per bit), checks the stop bit and pushes
// each byte with the cycle count at which its start bit began.
module uart_rx_model (
  input logic        clk,
  input logic        rxd,
  input logic [15:0] div
);
  logic [7:0] bytes [$];
  int         t_start [$];
  int         n_frame_err = 0;
  int         cyc = 0;

  always @(posedge clk) cyc++;

  initial begin
    forever begin
      logic [7:0] b;
      int t0;
      @(posedge clk);
      if (rxd === 1'b0) begin
        t0 = cyc;
        repeat (int'(div) / 2) @(posedge clk);
        if (rxd !== 1'b0) n_frame_err++;
        for (int i = 0; i < 8; i++) begin
          repeat (int'(div)) @(posedge clk);
          b[i] = rxd;
        end
        repeat (int'(div)) @(posedge clk);
        if (rxd !== 1'b1) n_frame_err++;
        bytes.push_back(b);
        t_start.push_back(t0);
        // wait out the rest of the stop bit
        repeat (int'(div) / 2 - 1) @(posedge clk);
      end
    end
  end
endmodule
