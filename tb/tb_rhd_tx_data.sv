// tb_rhd_tx_data: Tx Data block (full 65,536-word FIFO, UART at div 8).
// Words written in a burst are decoded from the serial line by an
// independent 8N1 receiver and must arrive complete, in order and
// most-significant byte first, one word every 20 x div + 6 cycles while the
// FIFO holds data. A burst larger than the FIFO must fill it and flag one
// overrun per word written while it is full.
module tb_rhd_tx_data;
  localparam int unsigned DEPTH = 65536;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en, txd, overrun, busy;
  logic [15:0] wr_data, div;
  logic [16:0] count;
  int checks = 0, failures = 0;

  rhd_tx_data dut (.clk, .rst_n, .wr_en, .wr_data, .div, .txd, .overrun, .count, .busy);
  uart_rx_model rx (.clk, .rxd(txd), .div);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int n_ovr = 0, n_wr_full = 0;
  always @(posedge clk) if (rst_n) begin
    if (overrun) n_ovr++;
    if (wr_en && count == 17'(DEPTH)) n_wr_full++;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] sent [$];
    wr_en = 0; wr_data = 0; div = 16'd8;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // burst of 40 words
    for (int i = 0; i < 40; i++) begin
      wr_en = 1; wr_data = 16'($urandom); sent.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0;
    while (busy) @(negedge clk);
    repeat (4 * int'(div)) @(negedge clk);
    check(rx.bytes.size() == 80, $sformatf("80 bytes (%0d)", rx.bytes.size()));
    foreach (sent[i]) if (2 * i + 1 < rx.bytes.size())
      check({rx.bytes[2*i], rx.bytes[2*i+1]} == sent[i],
            $sformatf("word %0d: %h%h expected %h", i, rx.bytes[2*i], rx.bytes[2*i+1], sent[i]));
    for (int i = 1; i < 40 && 2 * i < rx.t_start.size(); i++)
      check(rx.t_start[2*i] - rx.t_start[2*i-2] == 20 * int'(div) + 6,
            $sformatf("word spacing %0d", rx.t_start[2*i] - rx.t_start[2*i-2]));
    check(rx.n_frame_err == 0, "framing");
    check(n_ovr == 0, "no overrun for a small burst");

    // overflow: 66,536 words back to back, faster than the UART drains them
    for (int i = 0; i < DEPTH + 1000; i++) begin
      wr_en = 1; wr_data = 16'(i);
      @(negedge clk);
    end
    wr_en = 0;
    @(negedge clk); @(negedge clk);
    check(n_wr_full > 0, "the FIFO filled");
    check(n_ovr == n_wr_full, $sformatf("one overrun per word written while full (%0d, %0d)", n_ovr, n_wr_full));
    check(count >= 17'(DEPTH - 1), $sformatf("FIFO (nearly) full after the burst (%0d)", count));
    // the first words of the burst come out intact
    repeat (5 * (20 * int'(div) + 6)) @(negedge clk);
    check(rx.bytes.size() >= 88, "words of the big burst are being sent");
    for (int i = 0; i < 4; i++)
      check({rx.bytes[80 + 2*i], rx.bytes[81 + 2*i]} == 16'(i), $sformatf("burst word %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
