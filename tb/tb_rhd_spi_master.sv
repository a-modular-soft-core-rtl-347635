// tb_rhd_spi_master: self-checking test of the RHD SPI master against the
// RHD2132 model. It sends WRITE, READ, CONVERT and CALIBRATE words and checks
// that the chip saw well-formed 16-bit frames, that each reply arrives two
// words after its command, the 83-cycle start-to-done time, the SCLK period of four
// clocks, and the CS-to-SCLK spacing. Six words sent back to back check the
// 84-cycle word spacing, 66 cycles of CS low and 18 of CS high between words.
module tb_rhd_spi_master;
  import rhd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, cs_n, sclk, mosi, miso;
  logic [15:0] cmd, rx;
  int checks = 0, failures = 0;

  rhd_spi_master dut (.clk, .rst_n, .start, .cmd, .busy, .done, .rx,
                      .cs_n, .sclk, .mosi, .miso);
  rhd2132_model chip (.cs_n, .sclk, .mosi, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // SCLK shape monitor: rising edges must be SCLK_DIV=4 clocks apart inside
  // a frame, first rise 2 clocks after CS falls, CS rise 2 after last fall
  int cyc = 0, t_csfall = 0, t_lastrise = -1, t_lastfall = 0, bad_period = 0, bad_lead = 0, bad_trail = 0;
  int n_rises = 0;
  logic sclk_d = 1'b0, cs_d = 1'b1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    sclk_d <= sclk; cs_d <= cs_n;
    if (cs_d && !cs_n) begin t_csfall = cyc; t_lastrise = -1; end
    if (!sclk_d && sclk) begin
      n_rises++;
      if (t_lastrise < 0) begin if (cyc - t_csfall != 2) bad_lead++; end
      else if (cyc - t_lastrise != 4) bad_period++;
      t_lastrise = cyc;
    end
    if (sclk_d && !sclk) t_lastfall = cyc;
    if (!cs_d && cs_n) if (cyc - t_lastfall != 2) bad_trail++;
  end

  // CS widths and word spacing, recorded while words are sent back to back
  bit b2b = 1'b0;
  int t_csrise = 0, t_prevfall = -1;
  int b2b_low [$], b2b_high [$], b2b_space [$];
  always @(posedge clk) if (rst_n && b2b) begin
    if (cs_d && !cs_n) begin
      if (t_prevfall >= 0) begin
        b2b_space.push_back(cyc - t_prevfall);
        b2b_high.push_back(cyc - t_csrise);
      end
      t_prevfall = cyc;
    end
    if (!cs_d && cs_n) begin
      t_csrise = cyc;
      b2b_low.push_back(cyc - t_prevfall);
    end
  end

  logic [15:0] sent [$];
  logic [15:0] got  [$];

  int t_start = 0, t_word = 0;
  always @(posedge clk) begin
    if (start && !busy) t_start = cyc;
    if (done) t_word = cyc - t_start;
  end

  task automatic xfer(input logic [15:0] c, output int cycles);
    @(posedge clk);
    while (busy) @(posedge clk);
    cmd <= c; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    @(posedge clk);
    cycles = t_word;
    got.push_back(rx);
    sent.push_back(c);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc_w;
    logic [15:0] seq [$];
    start = 1'b0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    seq = {cmd_write(6'd5, 8'h3C), cmd_read(6'd5), cmd_read(6'd40), cmd_convert(6'd7),
           cmd_calibrate(), cmd_read(6'd62), cmd_write(6'd1, 8'hA7), cmd_read(6'd1),
           cmd_convert(6'd7), cmd_read(6'd63), cmd_read(6'd63)};
    foreach (seq[i]) begin
      xfer(seq[i], cyc_w);
      check(cyc_w == 83, $sformatf("word %0d took %0d cycles, expected 83", i, cyc_w));
    end
    repeat (4) @(posedge clk);
    check(chip.n_words == seq.size(), "chip saw every word");
    check(chip.n_err == 0, "no malformed frame");
    check(chip.n_cal == 1, "one calibrate");
    check(n_rises == 16 * seq.size(), $sformatf("16 SCLK rises per word (%0d)", n_rises));
    check(bad_period == 0, "SCLK period is 4 clocks");
    check(bad_lead == 0, $sformatf("%0d: CS fall to first SCLK rise is 2 clocks", bad_lead));
    check(bad_trail == 0, "last SCLK fall to CS rise is 2 clocks");
    // reply of word i is the result of word i-2
    check(got[2]  == 16'hFF3C, "WRITE echo two words later");
    check(got[3]  == 16'h003C, "READ of written register");
    check(got[4]  == 16'h0049, "READ of ROM 'I'");
    check(got[5]  == chip.sample(7, 0), "first CONVERT of channel 7");
    check(got[6]  == 16'h0000, "CALIBRATE result");
    check(got[7]  == 16'h0020, "READ of amplifier count");
    check(got[8]  == 16'hFFA7, "second WRITE echo");
    check(got[9]  == 16'h00A7, "READ back second write");
    check(got[10] == chip.sample(7, 1), "second CONVERT of channel 7");
    check(chip.regs[1] == 8'hA7 && chip.regs[5] == 8'h3C, "chip registers written");

    // back to back: each new start in the cycle after done
    repeat (10) @(posedge clk);
    b2b = 1'b1;
    cmd <= cmd_read(6'd63); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int k = 0; k < 5; k++) begin
      @(posedge clk);
      while (!done) @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
    end
    @(posedge clk);
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    b2b = 1'b0;
    check(b2b_space.size() == 5 && b2b_low.size() == 6, "six back-to-back words");
    foreach (b2b_space[i]) check(b2b_space[i] == 84, $sformatf("word spacing %0d, expected 84", b2b_space[i]));
    foreach (b2b_high[i])  check(b2b_high[i] == 18, $sformatf("CS high %0d between words, expected 18", b2b_high[i]));
    foreach (b2b_low[i])   check(b2b_low[i] == 66, $sformatf("CS low %0d, expected 66", b2b_low[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
