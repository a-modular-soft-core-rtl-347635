// tb_rhd_workloads: runs the recording configurations the peripheral was
// evaluated with through the whole design at its default parameters:
// 16 active channels sampled at 10 kHz and at 5 kHz, stimulus-triggered
// windows, samples streamed over the data UART.
//
// For each configuration the test programs the loop over AXI4-Lite, fires
// the stimulus triggers, and checks:
//   - the sample clock: within a window, sweeps start exactly one period
//     (9600 or 19,200 cycles of 96 MHz) apart, and the first sweep follows
//     the trigger after a fixed, short delay;
//   - the stream: every packet arrives, header first, with the predicted
//     samples in ascending channel order, and no UART framing error;
//   - the rate budget: the Tx FIFO level is read just before the next
//     stimulus. It must be empty when R/(20*F_stim) >= Fs*(N+1)*Tsave holds
//     and must hold leftover words when it does not. That is checked with
//     the 12 Mbit/s and the 1 Mbit/s default line rate.
// The 1 kHz rate that was also evaluated needs a period of 96,000 cycles,
// more than the 16-bit period field holds, so it is not run here.
module tb_rhd_workloads;
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

  // ---- sweep and trigger timing ----
  // a sweep's first word is the CS fall that follows a gap longer than the
  // 84-cycle word spacing of a sweep
  int   cyc = 0, t_csfall = 0;
  int   sweep_start [$];
  int   trig_time [$];
  logic cs_d = 1'b1, trig_d = 1'b0;
  int   n_overrun = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    cs_d <= cs_n;
    trig_d <= stim_trig;
    if (cs_d && !cs_n) begin
      if (cyc - t_csfall > 85) sweep_start.push_back(cyc);
      t_csfall = cyc;
    end
    if (stim_trig && !trig_d) trig_time.push_back(cyc);
    if (i_tx_overrun) n_overrun++;
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

  int conv [64];
  function automatic logic [15:0] next_sample(input int c);
    next_sample = chip.sample(c, conv[c]);
    conv[c]++;
  endfunction

  int trig_delay = -1;   // trigger-to-first-sweep delay, the same in every window

  // One configuration: `nest` stimuli `spacing` cycles apart, each opening a
  // window of `nsave` frames at `period` cycles, streamed at `div` cycles
  // per bit.
  task automatic run_config(input string name, input logic [31:0] mask,
                            input int period, input int nsave, input int nest,
                            input int div, input int spacing);
    logic [31:0] d;
    int nch, pos, nbytes0, nerr0, frames, t0, residual;
    real r_tx, f_stim, lhs, rhs;
    nch = $countones(mask);
    frames = nsave * nest;
    sweep_start.delete();
    trig_time.delete();
    foreach (conv[c]) conv[c] = int'(chip.conv_cnt[c]);
    uart_div = 16'(div);
    axi_write(R_CHSEL, mask);
    axi_write(R_TIME, {16'(nsave), 16'(period)});
    axi_write(R_BLANKING, 32'd960);
    axi_write(R_NEST, 32'(nest));
    axi_write(R_TX_CTL, 32'h0001_0000 | 32'(div));
    nbytes0 = urx.bytes.size();
    nerr0 = urx.n_frame_err;
    axi_write(R_STATUS, 32'h4);
    repeat (50) @(negedge clk);

    // rate budget of this configuration, in the clock's own units
    r_tx   = 96.0e6 / real'(div);
    f_stim = 96.0e6 / real'(spacing);
    lhs    = r_tx / (20.0 * f_stim);
    rhs    = (96.0e6 / real'(period)) * real'(nch + 1) * (real'(nsave) * real'(period) / 96.0e6);

    for (int w = 0; w < nest; w++) begin
      t0 = cyc;
      @(negedge clk); stim_trig = 1'b1;
      repeat (5) @(negedge clk);
      stim_trig = 1'b0;
      while (cyc < t0 + spacing - 20) @(negedge clk);
      axi_read(R_TX_STATUS, d);
      residual = int'(d[16:0]);
      if (lhs >= rhs)
        check(residual == 0, $sformatf("%s stimulus %0d: FIFO empty before the next stimulus (%0d left)",
                                        name, w, residual));
      else
        check(residual > 0, $sformatf("%s stimulus %0d: budget exceeded, words left over (%0d)",
                                       name, w, residual));
      $display("%s stimulus %0d: R/(20 F) = %0.1f words, Fs(N+1)Tsave = %0.1f words, left in FIFO %0d",
               name, w, lhs, rhs, residual);
    end
    while (!i_peri) @(negedge clk);
    axi_read(R_STATUS, d);
    check(d[26:24] == 3'b100 && d[10:9] == 2'(CTL_IDLE), $sformatf("%s: loop ended", name));
    axi_write(R_STATUS, 32'h0001_0000);
    do axi_read(R_TX_STATUS, d); while (d[18] || d[16:0] != 0);
    repeat (30 * div) @(negedge clk);

    // sample clock
    if (sweep_start.size() != frames)
      foreach (sweep_start[i]) $display("sweep %0d at %0d", i, sweep_start[i]);
    check(sweep_start.size() == frames, $sformatf("%s: %0d sweeps, expected %0d",
                                                   name, sweep_start.size(), frames));
    check(trig_time.size() == nest, $sformatf("%s: triggers seen", name));
    if (sweep_start.size() == frames && trig_time.size() == nest)
      for (int w = 0; w < nest; w++) begin
        int dl;
        dl = sweep_start[w * nsave] - trig_time[w];
        if (trig_delay < 0) trig_delay = dl;
        check(dl == trig_delay && dl <= 8, $sformatf("%s window %0d: trigger to first sweep %0d cycles",
                                                      name, w, dl));
        for (int j = 1; j < nsave; j++)
          check(sweep_start[w * nsave + j] - sweep_start[w * nsave + j - 1] == period,
                $sformatf("%s window %0d frame %0d: sweep spacing %0d", name, w, j,
                          sweep_start[w * nsave + j] - sweep_start[w * nsave + j - 1]));
      end

    // stream
    check(urx.bytes.size() - nbytes0 == 2 * frames * (nch + 1),
          $sformatf("%s: stream length %0d bytes", name, urx.bytes.size() - nbytes0));
    if (urx.bytes.size() - nbytes0 == 2 * frames * (nch + 1)) begin
      int bad;
      bad = 0;
      pos = nbytes0;
      for (int f = 0; f < frames; f++) begin
        if ({urx.bytes[pos], urx.bytes[pos+1]} != {HDR_TAG, 8'(f)}) bad++;
        pos += 2;
        for (int c = 0; c < 32; c++) if (mask[c]) begin
          if ({urx.bytes[pos], urx.bytes[pos+1]} != next_sample(c)) bad++;
          pos += 2;
        end
      end
      check(bad == 0, $sformatf("%s: %0d wrong words in the stream", name, bad));
    end
    check(urx.n_frame_err == nerr0, $sformatf("%s: UART framing", name));
    check(n_overrun == 0, $sformatf("%s: no overrun", name));
  endtask

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {awvalid, wvalid, bready, arvalid, rready} = '0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0; stim_trig = 0;
    uart_div = 16'd8;
    foreach (conv[i]) conv[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2000) @(negedge clk);   // let the serial decoder settle

    // 16 channels at 10 kHz and at 5 kHz, 2.5 ms and 5 ms windows, 12 Mbit/s
    run_config("16ch 10kHz 12Mbit/s", 32'h0000_FFFF, 9600, 25, 2, 8, 300_000);
    run_config("16ch 5kHz 12Mbit/s", 32'h5555_5555, 19200, 25, 2, 8, 560_000);
    // 16 channels at 10 kHz at the 1 Mbit/s default: the stimulus rate
    // decides whether the FIFO is empty again before the next stimulus
    run_config("16ch 10kHz 1Mbit/s slow stimuli", 32'h0000_FFFF, 9600, 25, 2, 96, 900_000);
    run_config("16ch 10kHz 1Mbit/s fast stimuli", 32'h0000_FFFF, 9600, 25, 2, 96, 600_000);

    check(chip.n_err == 0, "no malformed SPI frame");
    $display("trigger to first sweep: %0d cycles", trig_delay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
