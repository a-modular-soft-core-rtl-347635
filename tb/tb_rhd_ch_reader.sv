// tb_rhd_ch_reader: acquisition loop against the SPI master and the RHD2132
// model. Four runs:
//   1. stimulus mode, channels {2, 5, 31}, 3 frames per window, 2 stimuli,
//      600-cycle period, 1000-cycle blanking, a stray trigger inside a window;
//   2. free-running mode with a period (200) shorter than a sweep (252), so
//      late period ticks are carried over, ended by stop;
//   3. stimulus mode with transmission disabled;
//   4. a period field of 0, the longest period (65,536 cycles).
// The streamed words are compared with headers {A5, frame number} and samples
// predicted from the model's sample formula in ascending channel order; the
// OUT_BLNK pulse length, the frame spacing, done, the stimulus count and the
// ChR values are checked too.
module tb_rhd_ch_reader;
  import rhd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic go, stop, tx_en, stim_trig, busy, done, blnk, tx_valid;
  logic [N_CH-1:0] chsel;
  logic [15:0] period, nsave, nest, stim_cnt, tx_data;
  logic [31:0] tblnk;
  logic [15:0] ch_data [N_CH];
  spi_req_t req;
  spi_rsp_t rsp;
  logic cs_n, sclk, mosi, miso;
  int checks = 0, failures = 0;

  rhd_ch_reader dut (.clk, .rst_n, .go, .stop, .chsel, .period, .nsave, .tblnk, .nest,
                     .tx_en, .stim_trig, .busy, .done, .blnk, .ch_data, .stim_cnt,
                     .tx_valid, .tx_data, .spi_req(req), .spi_rsp(rsp));
  rhd_spi_master spi (.clk, .rst_n, .start(req.start), .cmd(req.cmd), .busy(rsp.busy),
                      .done(rsp.done), .rx(rsp.rx), .cs_n, .sclk, .mosi, .miso);
  rhd2132_model chip (.cs_n, .sclk, .mosi, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // monitors
  logic [15:0] words [$];
  int          hdr_t [$];
  int cyc = 0, blnk_len = 0, blnk_cur = 0, n_blnk = 0, n_done = 0;
  logic blnk_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tx_valid) begin
      words.push_back(tx_data);
      if (tx_data[15:8] == 8'hA5) hdr_t.push_back(cyc);
    end
    blnk_d <= blnk;
    if (blnk) blnk_cur++;
    if (blnk_d && !blnk) begin blnk_len = blnk_cur; blnk_cur = 0; n_blnk++; end
    if (done) n_done++;
  end

  int conv [64];
  int seq_tb = 0;

  // expected stream of `frames` frames of the channels in `mask`
  task automatic expect_frames(input logic [N_CH-1:0] mask, input int frames, input bit sent,
                               inout int pos, input string what);
    for (int f = 0; f < frames; f++) begin
      if (sent) begin
        check(pos < words.size() && words[pos] == {8'hA5, 8'(seq_tb)},
              $sformatf("%s frame %0d header", what, f));
        pos++;
      end
      for (int c = 0; c < N_CH; c++) if (mask[c]) begin
        if (sent) begin
          check(pos < words.size() && words[pos] == chip.sample(c, conv[c]),
                $sformatf("%s frame %0d channel %0d", what, f, c));
          pos++;
        end
        conv[c]++;
      end
      seq_tb++;
    end
  endtask

  task automatic pulse_trig();
    stim_trig <= 1'b1; repeat (4) @(posedge clk); stim_trig <= 1'b0;
  endtask

  task automatic start_loop();
    @(posedge clk); go <= 1'b1; @(posedge clk); go <= 1'b0;
  endtask

  initial begin
    #6000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos;
    go = 0; stop = 0; stim_trig = 0; tx_en = 1;
    foreach (conv[i]) conv[i] = 0;
    chsel = '0; chsel[2] = 1; chsel[5] = 1; chsel[31] = 1;
    period = 600; nsave = 3; nest = 2; tblnk = 1000;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- run 1: stimulus mode ----
    start_loop();
    repeat (50) @(posedge clk);
    check(words.size() == 0, "nothing sent before the first trigger");
    pulse_trig();
    repeat (700) @(posedge clk);
    pulse_trig();                    // inside the window: ignored
    repeat (2500) @(posedge clk);
    check(n_blnk == 1 && blnk_len == 1000, $sformatf("OUT_BLNK lasted %0d cycles", blnk_len));
    check(stim_cnt == 1 && busy, "one stimulus done, loop still running");
    pulse_trig();
    while (!done) @(posedge clk);
    @(posedge clk);
    check(stim_cnt == 2 && !busy, "two stimuli, loop ended");
    check(n_blnk == 2, "two blanking pulses");
    check(words.size() == 6 * 4, $sformatf("24 words streamed (%0d)", words.size()));
    pos = 0;
    seq_tb = 0;
    expect_frames(chsel, 6, 1'b1, pos, "run1");
    check(hdr_t.size() == 6, "six headers");
    if (hdr_t.size() == 6) begin
      check(hdr_t[1] - hdr_t[0] == 600 && hdr_t[2] - hdr_t[1] == 600, "frames 600 cycles apart");
      check(hdr_t[4] - hdr_t[3] == 600 && hdr_t[5] - hdr_t[4] == 600, "frames 600 cycles apart (2nd window)");
    end
    check(ch_data[5] == chip.sample(5, conv[5] - 1) && ch_data[31] == chip.sample(31, conv[31] - 1),
          "ChR registers hold the latest samples");

    // ---- run 2: free running, period shorter than a sweep, stop ----
    words.delete(); hdr_t.delete();
    chsel = 32'h0000_0400; period = 200; nest = 0;
    start_loop();
    repeat (2000) @(posedge clk);
    stop <= 1'b1; @(posedge clk); stop <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    check(!busy, "stop ended the free-running loop");
    check(n_blnk == 2, "no blanking in free-running mode");
    check(hdr_t.size() >= 7, $sformatf("free running frames (%0d)", hdr_t.size()));
    if (hdr_t.size() >= 3)
      check(hdr_t[2] - hdr_t[1] == 253, $sformatf("late ticks: frames back to back (%0d)", hdr_t[2] - hdr_t[1]));
    pos = 0; seq_tb = 0;
    check(words.size() == 2 * hdr_t.size(), "header plus one sample per frame");
    expect_frames(chsel, hdr_t.size(), 1'b1, pos, "run2");

    // ---- run 3: transmission disabled ----
    words.delete(); hdr_t.delete();
    tx_en = 0; chsel = 32'h0000_0003; period = 500; nsave = 2; nest = 1; tblnk = 10;
    start_loop();
    repeat (20) @(posedge clk);
    pulse_trig();
    while (!done) @(posedge clk);
    @(posedge clk);
    check(words.size() == 0, "nothing streamed with transmission off");
    pos = 0;
    expect_frames(chsel, 2, 1'b0, pos, "run3");
    check(ch_data[0] == chip.sample(0, conv[0] - 1) && ch_data[1] == chip.sample(1, conv[1] - 1),
          "ChR updated with transmission off");
    check(blnk_len == 10, "short blanking pulse");

    // ---- run 4: period field 0 is the longest period, 65,536 cycles ----
    words.delete(); hdr_t.delete();
    tx_en = 1; chsel = 32'h0000_0010; period = 0; nsave = 2; nest = 1; tblnk = 10;
    start_loop();
    repeat (20) @(posedge clk);
    pulse_trig();
    while (!done) @(posedge clk);
    @(posedge clk);
    check(hdr_t.size() == 2 && hdr_t[1] - hdr_t[0] == 65536,
          $sformatf("period 0 gives 65,536 cycles (%0d)", hdr_t.size() == 2 ? hdr_t[1] - hdr_t[0] : -1));
    pos = 0; seq_tb = 0;
    expect_frames(chsel, 2, 1'b1, pos, "run4");
    check(n_done == 4, "one done per run");
    check(chip.n_err == 0, "no malformed frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
