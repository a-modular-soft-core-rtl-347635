// tb_rhd_peripheral: end-to-end test of the whole peripheral at its default
// parameters (65,536-word Tx FIFO, 24 MHz SPI at a 96 MHz clock), driven
// through AXI4-Lite like the processor would, against the RHD2132 model and
// a serial decoder on the data UART. It runs:
//   1. INI: configuration written to the chip, calibration, ROM copy read
//      back over AXI, I_PERI with the INI cause;
//   2. Direct Com: READ and CONVERT commands, answers in DCResp;
//   3. the stimulus loop: 4 channels, 2 triggers (plus one during a
//      window), OUT_BLNK pulses, the UART stream decoded and compared with
//      headers and predicted samples, ChR registers read back;
//   4. free-running loop with a period shorter than a sweep, ended by the
//      Status stop bit;
//   5. a 32-channel free-running loop at the 1 Mbit/s default rate until the
//      FIFO overflows and raises I_TX_OVERRUN, which is then cleared.
// Each mechanism is counted and a mechanism that never happened fails.
module tb_rhd_peripheral;
  import rhd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;   // 10 ns here; the design is timed in cycles

  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        cs_n, sclk, mosi, miso, stim_trig, txd, out_blnk, i_peri, i_tx_overrun;
  logic [15:0] uart_div;
  int checks = 0, failures = 0;

  rhd_peripheral dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .spi_cs_n(cs_n), .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso),
    .stim_trig, .uart_txd(txd), .out_blnk, .i_peri, .i_tx_overrun
  );
  rhd2132_model chip (.cs_n, .sclk, .mosi, .miso);
  uart_rx_model urx (.clk, .rxd(txd), .div(uart_div));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ----
  int n_ini = 0, n_dc = 0, n_loop_end = 0, n_blank = 0, n_trig = 0, n_late = 0,
      n_stop = 0, n_overrun = 0, n_ignored_trig = 0;
  int blnk_len = 0, blnk_cur = 0;
  logic blnk_d = 0, peri_d = 0, ovr_d = 0, cs_d = 1;
  bit   in_stage4 = 0;
  int   cyc = 0, t_csfall = 0;
  always @(posedge clk) if (rst_n) begin
    blnk_d <= out_blnk; peri_d <= i_peri; ovr_d <= i_tx_overrun;
    cs_d <= cs_n;
    cyc++;
    if (out_blnk) blnk_cur++;
    if (blnk_d && !out_blnk) begin n_blank++; blnk_len = blnk_cur; blnk_cur = 0; end
    if (!ovr_d && i_tx_overrun) n_overrun++;
    // a sweep that starts late begins right after the previous one: the CS
    // falls of its first word come 85 cycles after the previous word's
    // (84 inside a sweep), where a sweep on time would leave a gap
    if (cs_d && !cs_n) begin
      if (in_stage4 && cyc - t_csfall == 85) n_late++;
      t_csfall = cyc;
    end
  end

  // ---- AXI master ----
  task automatic axi_write(input int idx, input logic [31:0] d);
    @(negedge clk);
    awaddr = 8'(idx * 4); awvalid = 1'b1; wdata = d; wstrb = 4'hF; wvalid = 1'b1;
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) @(negedge clk);
    bready = 1'b1;
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic axi_read(input int idx, output logic [31:0] d);
    @(negedge clk);
    araddr = 8'(idx * 4); arvalid = 1'b1;
    @(negedge clk);
    arvalid = 1'b0;
    while (!rvalid) @(negedge clk);
    d = rdata; rready = 1'b1;
    @(negedge clk);
    rready = 1'b0;
  endtask

  // wait for I_PERI, check its cause, clear it
  task automatic wait_peri(input logic [2:0] cause, input string what, input int limit);
    logic [31:0] st;
    int n;
    n = 0;
    while (!i_peri && n < limit) begin @(negedge clk); n++; end
    check(i_peri, $sformatf("%s raises I_PERI", what));
    axi_read(R_STATUS, st);
    check(st[26:24] == cause, $sformatf("%s: cause %b", what, st[26:24]));
    check(st[10:9] == 2'(CTL_IDLE), $sformatf("%s: control back to idle", what));
    axi_write(R_STATUS, 32'h0001_0000);
    check(!i_peri, $sformatf("%s: I_PERI cleared", what));
  endtask

  task automatic pulse_trig();
    @(negedge clk); stim_trig = 1'b1;
    repeat (5) @(negedge clk);
    stim_trig = 1'b0;
    n_trig++;
  endtask

  // stop at the end of a stage that failed: later stages depend on it
  task automatic stage_end(input string what);
    if (failures != 0) begin
      $display("stopping after failed stage: %s", what);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  int conv [64];
  function automatic logic [15:0] next_sample(input int c);
    next_sample = chip.sample(c, conv[c]);
    conv[c]++;
  endfunction

  initial begin
    #400ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [7:0]  cfgv [N_CFG];
    logic [31:0] mask;
    int pos, nbytes0, nerr0;
    {awvalid, wvalid, bready, arvalid, rready} = '0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0; stim_trig = 0;
    uart_div = 16'd8;
    foreach (conv[i]) conv[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // ---- 1. INI ----
    foreach (cfgv[i]) begin cfgv[i] = 8'($urandom); axi_write(i, {24'd0, cfgv[i]}); end
    axi_write(R_STATUS, 32'h1);
    wait_peri(3'b001, "INI", 10000);
    n_ini++;
    foreach (cfgv[i]) check(chip.regs[i] == cfgv[i], $sformatf("chip register %0d configured", i));
    check(chip.n_cal == 1, "chip calibrated");
    for (int k = 0; k < 5; k++) begin
      axi_read(40 + k, d);
      check(d[7:0] == 8'(40'("INTAN") >> (8 * (4 - k))), $sformatf("ROM copy %0d", 40 + k));
    end
    axi_read(62, d); check(d == 32, "ROM copy: 32 amplifiers");
    axi_read(63, d); check(d == 1, "ROM copy: chip id");
    stage_end("INI");

    // ---- 2. Direct Com ----
    axi_write(R_DIRECTCMD, {16'd0, cmd_read(6'd62)});
    axi_write(R_STATUS, 32'h2);
    wait_peri(3'b010, "Direct Com READ", 2000);
    axi_read(R_DCRESP, d); check(d == 32'h0000_0020, $sformatf("DCResp READ(62) %h", d));
    axi_write(R_DIRECTCMD, {16'd0, cmd_convert(6'd3)});
    axi_write(R_STATUS, 32'h2);
    wait_peri(3'b010, "Direct Com CONVERT", 2000);
    axi_read(R_DCRESP, d); check(d[15:0] == next_sample(3), "DCResp CONVERT(3)");
    n_dc += 2;
    stage_end("Direct Com");

    // ---- 3. stimulus loop ----
    mask = 32'h8000_0109;              // channels 0, 3, 8, 31
    axi_write(R_CHSEL, mask);
    axi_write(R_TIME, {16'd4, 16'd2000});
    axi_write(R_BLANKING, 32'd3000);
    axi_write(R_NEST, 32'd2);
    axi_write(R_TX_CTL, 32'h0001_0000 | 32'(uart_div));
    nbytes0 = urx.bytes.size();
    nerr0 = urx.n_frame_err;
    axi_write(R_STATUS, 32'h4);
    repeat (100) @(negedge clk);
    pulse_trig();
    repeat (3000) @(negedge clk);
    pulse_trig(); n_ignored_trig++;    // inside the window
    repeat (8000) @(negedge clk);
    check(n_blank == 1 && blnk_len == 3000, $sformatf("OUT_BLNK %0d cycles", blnk_len));
    pulse_trig();
    wait_peri(3'b100, "stimulus loop", 20000);
    n_loop_end++;
    check(n_blank == 2, "one blanking pulse per stimulus");
    // drain the UART and compare the stream
    do axi_read(R_TX_STATUS, d); while (d[18]);
    repeat (40) @(negedge clk);
    check(urx.bytes.size() - nbytes0 == 2 * 8 * 5, $sformatf("stream length %0d bytes", urx.bytes.size() - nbytes0));
    pos = nbytes0;
    for (int f = 0; f < 8; f++) begin
      check({urx.bytes[pos], urx.bytes[pos+1]} == {8'hA5, 8'(f)}, $sformatf("frame %0d header", f));
      pos += 2;
      for (int c = 0; c < 32; c++) if (mask[c]) begin
        logic [15:0] e;
        e = next_sample(c);
        check({urx.bytes[pos], urx.bytes[pos+1]} == e, $sformatf("frame %0d channel %0d", f, c));
        pos += 2;
      end
    end
    axi_read(R_CHR0 + 4, d);           // channels 8, 9
    check(d[15:0] == chip.sample(8, conv[8] - 1), "ChR register of channel 8");
    axi_read(R_CHR0 + 15, d);          // channels 30, 31
    check(d[31:16] == chip.sample(31, conv[31] - 1), "ChR register of channel 31");
    check(urx.n_frame_err == nerr0, "UART framing");
    stage_end("stimulus loop");

    // ---- 4. free running, late ticks, stop ----
    axi_write(R_CHSEL, 32'h0000_0001);
    axi_write(R_TIME, {16'd1, 16'd100});
    axi_write(R_NEST, 32'd0);
    axi_write(R_STATUS, 32'h4);
    in_stage4 = 1;
    repeat (3000) @(negedge clk);
    in_stage4 = 0;
    axi_read(R_STATUS, d);
    check(d[10:9] == 2'(CTL_LOOP) && d[8], "free-running loop active");
    axi_write(R_STATUS, 32'h8);
    n_stop++;
    wait_peri(3'b100, "stopped loop", 2000);
    do axi_read(R_TX_STATUS, d); while (d[18]);
    stage_end("free-running loop");

    // ---- 5. overflow at the default 1 Mbit/s ----
    uart_div = 16'd96;
    axi_write(R_TX_CTL, 32'h0001_0060);
    axi_write(R_CHSEL, 32'hFFFF_FFFF);
    axi_write(R_TIME, {16'd1, 16'd2857});
    axi_write(R_STATUS, 32'h4);
    while (!i_tx_overrun) @(negedge clk);
    axi_read(R_TX_STATUS, d);
    check(d[16:0] >= 17'd65535 && d[17], $sformatf("FIFO full at overrun (%0d)", d[16:0]));
    axi_write(R_STATUS, 32'h8);
    wait_peri(3'b100, "loop stopped after overrun", 10000);
    axi_write(R_STATUS, 32'h0002_0000);
    check(!i_tx_overrun, "I_TX_OVERRUN cleared");
    check(chip.n_err == 0, "no malformed SPI frame");

    // ---- mechanisms ----
    check(n_ini > 0, "INI ran");
    check(n_dc > 0, "Direct Com ran");
    check(n_trig > 0 && n_loop_end > 0, "stimulus loop ran");
    check(n_ignored_trig > 0, "trigger during a window");
    check(n_blank > 0, "blanking pulse");
    check(n_late > 0, $sformatf("late period ticks (%0d)", n_late));
    check(n_stop > 0, "loop stop");
    check(n_overrun > 0, "Tx overrun");
    $display("mechanisms: ini=%0d dc=%0d triggers=%0d blank=%0d late=%0d stop=%0d overrun=%0d",
             n_ini, n_dc, n_trig, n_blank, n_late, n_stop, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
