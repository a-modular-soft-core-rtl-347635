// tb_rhd_uart_tx: UART transmitter at 12 Mbit/s (div 8) and 1 Mbit/s
// (div 96) with a 96 MHz clock. Random bytes are decoded by an independent
// 8N1 receiver; checks the data, the stop bit, the idle-high line and that
// busy lasts 10 bit times.
module tb_rhd_uart_tx;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] div;
  logic start, busy, done, txd;
  logic [7:0] data;
  int checks = 0, failures = 0;

  rhd_uart_tx dut (.clk, .rst_n, .div, .start, .data, .busy, .done, .txd);
  uart_rx_model rx (.clk, .rxd(txd), .div);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int busy_len = 0, cur = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy) cur++;
    if (done) begin busy_len = cur; cur = 0; end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent [$];
    start = 0; data = 0; div = 16'd8;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(txd == 1'b1, "line idles high");
    for (int pass = 0; pass < 2; pass++) begin
      div = (pass == 0) ? 16'd8 : 16'd96;
      repeat (4) @(posedge clk);
      for (int i = 0; i < 20; i++) begin
        @(negedge clk);
        while (busy) @(negedge clk);
        data = 8'($urandom); start = 1'b1;
        sent.push_back(data);
        @(negedge clk);
        start = 1'b0;
        while (busy) @(negedge clk);
        @(negedge clk);
        check(busy_len == 10 * int'(div), $sformatf("busy %0d cycles for div %0d", busy_len, div));
      end
      repeat (2 * int'(div)) @(posedge clk);
    end
    check(rx.bytes.size() == sent.size(), $sformatf("%0d bytes received", rx.bytes.size()));
    foreach (sent[i]) if (i < rx.bytes.size())
      check(rx.bytes[i] == sent[i], $sformatf("byte %0d: %h expected %h", i, rx.bytes[i], sent[i]));
    check(rx.n_frame_err == 0, "start and stop bits");
    check(txd == 1'b1, "line idle high at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
