// tb_rhd_direct_com: Direct Com against the SPI master and the RHD2132
// model. Sends WRITE, READ, CONVERT, CALIBRATE and CLEAR as direct commands
// and checks that DCResp holds each command's own answer (not the answer of
// the word before it), that the chip saw the command plus two dummy reads,
// and that done comes 1 + 3 x 84 cycles after go.
module tb_rhd_direct_com;
  import rhd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic go, busy, done;
  logic [15:0] cmd, dc_resp;
  spi_req_t req;
  spi_rsp_t rsp;
  logic cs_n, sclk, mosi, miso;
  int checks = 0, failures = 0;

  rhd_direct_com dut (.clk, .rst_n, .go, .cmd, .busy, .done, .dc_resp, .spi_req(req), .spi_rsp(rsp));
  rhd_spi_master spi (.clk, .rst_n, .start(req.start), .cmd(req.cmd), .busy(rsp.busy),
                      .done(rsp.done), .rx(rsp.rx), .cs_n, .sclk, .mosi, .miso);
  rhd2132_model chip (.cs_n, .sclk, .mosi, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, t_go = 0, t_done = 0;
  always @(posedge clk) begin
    cyc++;
    if (go) t_go = cyc;
    if (done) t_done = cyc;
  end

  task automatic run(input logic [15:0] c, input logic [15:0] expect_resp, input string what);
    int w0;
    w0 = chip.n_words;
    @(posedge clk); cmd <= c; go <= 1'b1;
    @(posedge clk); go <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    check(dc_resp == expect_resp, $sformatf("%s: DCResp %h expected %h", what, dc_resp, expect_resp));
    check(chip.n_words - w0 == 3, $sformatf("%s: 3 SPI words", what));
    check(t_done - t_go == 1 + 3 * 84, $sformatf("%s: %0d cycles, expected 253", what, t_done - t_go));
    check(!busy, "idle after done");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    go = 1'b0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(cmd_write(6'd3, 8'h5A), 16'hFF5A, "WRITE");
    run(cmd_read(6'd3),         16'h005A, "READ back");
    run(cmd_read(6'd41),        16'h004E, "READ ROM 'N'");
    run(cmd_convert(6'd12),     chip.sample(12, 0), "CONVERT 12");
    run(cmd_convert(6'd12),     chip.sample(12, 1), "CONVERT 12 again");
    run(cmd_calibrate(),        16'h0000, "CALIBRATE");
    run(cmd_clear(),            16'h0000, "CLEAR");
    check(chip.n_cal == 1 && chip.n_clear == 1, "chip saw one calibrate and one clear");
    check(chip.n_err == 0, "no malformed frame");
    check(chip.regs[3] == 8'h5A, "chip register written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
