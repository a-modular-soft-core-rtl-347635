// tb_rhd_ini: INI process against the SPI master and the RHD2132 model.
// Fills the 18 configuration registers with random bytes, runs INI and
// checks the command sequence word by word (2 dummies, 18 writes in register
// order, calibrate, 9 dummies, 9 ROM reads, 2 dummies), that the chip's
// registers now hold the configuration, that it calibrated once, that the
// ROM copy reads "INTAN", 1, 0, 32, 1, and the run time of 1 + 41 x 84 cycles.
module tb_rhd_ini;
  import rhd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic go, busy, done;
  logic [7:0] cfg [N_CFG];
  logic [7:0] rom [N_ROM];
  spi_req_t req;
  spi_rsp_t rsp;
  logic cs_n, sclk, mosi, miso;
  int checks = 0, failures = 0;

  rhd_ini dut (.clk, .rst_n, .go, .cfg, .busy, .done, .rom, .spi_req(req), .spi_rsp(rsp));
  rhd_spi_master spi (.clk, .rst_n, .start(req.start), .cmd(req.cmd), .busy(rsp.busy),
                      .done(rsp.done), .rx(rsp.rx), .cs_n, .sclk, .mosi, .miso);
  rhd2132_model chip (.cs_n, .sclk, .mosi, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] sent [$];
  int cyc = 0, t_go = 0, t_done = 0;
  always @(posedge clk) begin
    cyc++;
    if (go) t_go = cyc;
    if (done) t_done = cyc;
    if (req.start && !rsp.busy) sent.push_back(req.cmd);
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_seq [$];
    logic [7:0]  exp_rom [N_ROM];
    go = 1'b0;
    foreach (cfg[i]) cfg[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); go <= 1'b1;
    @(posedge clk); go <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);

    // expected sequence, built from the RHD2000 command encodings
    exp_seq = {16'hFF00, 16'hFF00};
    for (int r = 0; r < 18; r++) exp_seq.push_back({2'b10, 6'(r), cfg[r]});
    exp_seq.push_back(16'h5500);
    repeat (9) exp_seq.push_back(16'hFF00);
    for (int r = 40; r <= 44; r++) exp_seq.push_back({2'b11, 6'(r), 8'h00});
    for (int r = 60; r <= 63; r++) exp_seq.push_back({2'b11, 6'(r), 8'h00});
    exp_seq.push_back(16'hFF00); exp_seq.push_back(16'hFF00);

    check(sent.size() == 41, $sformatf("41 words sent (%0d)", sent.size()));
    foreach (exp_seq[i])
      if (i < sent.size())
        check(sent[i] == exp_seq[i], $sformatf("word %0d = %h, expected %h", i, sent[i], exp_seq[i]));
    for (int r = 0; r < 18; r++)
      check(chip.regs[r] == cfg[r], $sformatf("chip register %0d configured", r));
    check(chip.n_cal == 1, "one calibration");
    check(chip.n_err == 0, "no malformed frame");
    exp_rom = '{8'h49, 8'h4E, 8'h54, 8'h41, 8'h4E, 8'd1, 8'd0, 8'd32, 8'd1};
    foreach (exp_rom[i]) check(rom[i] == exp_rom[i], $sformatf("ROM copy %0d = %h", i, rom[i]));
    check(t_done - t_go == 1 + 41 * 84, $sformatf("INI took %0d cycles", t_done - t_go));
    check(!busy, "idle after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
