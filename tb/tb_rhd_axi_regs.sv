// tb_rhd_axi_regs: AXI4-Lite register bank. A small bus-master task set
// writes (address and data together, data before address, address before
// data) and reads. Checks reset values, read-back of every RW register,
// byte strobes, the read-only registers fed from inputs (DCResp, ChR pairs,
// ROM copies, Status and Tx_status fields), the one-cycle start and clear
// pulses from Status, that unused addresses read 0, and response timing.
module tb_rhd_axi_regs;
  import rhd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic [7:0]  cfg [N_CFG];
  logic [15:0] direct_cmd, period, nsave, tx_div, nest, dc_resp;
  logic [N_CH-1:0] chsel;
  logic [31:0] tblnk;
  logic        tx_en, ini_req, dc_req, loop_req, stop_req, clr_irq_peri, clr_irq_ovr;
  logic [15:0] ch_data [N_CH];
  logic [7:0]  rom [N_ROM];
  logic        busy, blnk, irq_peri, irq_tx_overrun, tx_busy;
  ctl_state_e  ctl_state;
  logic [2:0]  done_cause;
  logic [16:0] tx_count;
  int checks = 0, failures = 0;

  rhd_axi_regs dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .cfg, .direct_cmd, .chsel, .tblnk, .period, .nsave, .tx_div, .tx_en, .nest,
    .ini_req, .dc_req, .loop_req, .stop_req, .clr_irq_peri, .clr_irq_ovr,
    .dc_resp, .ch_data, .rom, .busy, .ctl_state, .blnk, .irq_peri, .irq_tx_overrun,
    .done_cause, .tx_count, .tx_busy
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_ini = 0, n_dc = 0, n_loop = 0, n_stop = 0, n_clrp = 0, n_clro = 0;
  always @(posedge clk) if (rst_n) begin
    n_ini  += int'(ini_req);  n_dc   += int'(dc_req);   n_loop += int'(loop_req);
    n_stop += int'(stop_req); n_clrp += int'(clr_irq_peri); n_clro += int'(clr_irq_ovr);
  end

  // mode 0: address and data together, 1: data first, 2: address first
  task automatic axi_write(input int idx, input logic [31:0] d, input logic [3:0] s = 4'hF,
                           input int mode = 0);
    int wait_b;
    @(negedge clk);
    if (mode != 1) begin awaddr = 8'(idx * 4); awvalid = 1'b1; end
    if (mode != 2) begin wdata = d; wstrb = s; wvalid = 1'b1; end
    @(negedge clk);
    awvalid = (mode == 1) ? 1'b1 : 1'b0; awaddr = 8'(idx * 4);
    wvalid  = (mode == 2) ? 1'b1 : 1'b0; wdata = d; wstrb = s;
    if (mode != 0) begin @(negedge clk); awvalid = 1'b0; wvalid = 1'b0; end
    wait_b = 0;
    while (!bvalid) begin @(negedge clk); wait_b++; end
    check(bresp == 2'b00 && wait_b <= 1, "write response OKAY, in time");
    bready = 1'b1;
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic axi_read(input int idx, output logic [31:0] d);
    @(negedge clk);
    araddr = 8'(idx * 4); arvalid = 1'b1;
    check(arready, "AR ready when idle");
    @(negedge clk);
    arvalid = 1'b0;
    check(rvalid && rresp == 2'b00, "read data one cycle after AR");
    d = rdata;
    rready = 1'b1;
    @(negedge clk);
    rready = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [7:0]  cfgv [N_CFG];
    {awvalid, wvalid, bready, arvalid, rready} = '0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    dc_resp = 16'h1234;
    foreach (ch_data[i]) ch_data[i] = 16'($urandom);
    foreach (rom[i]) rom[i] = 8'($urandom);
    busy = 1; blnk = 1; irq_peri = 1; irq_tx_overrun = 0; tx_busy = 1;
    ctl_state = CTL_LOOP; done_cause = 3'b100; tx_count = 17'h10005;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // reset values
    axi_read(R_TX_CTL, d);  check(d == 32'h0000_0060, $sformatf("Tx_ctl reset %h", d));
    axi_read(R_TIME, d);    check(d == {16'd1, 16'd9600}, $sformatf("Time reset %h", d));
    axi_read(R_CHSEL, d);   check(d == 0, "ChSel reset");

    // configuration registers 0..17
    foreach (cfgv[i]) begin
      cfgv[i] = 8'($urandom);
      axi_write(i, {24'hABCDEF, cfgv[i]}, 4'hF, i % 3);
    end
    foreach (cfgv[i]) begin
      axi_read(i, d);
      check(d == {24'd0, cfgv[i]} && cfg[i] == cfgv[i], $sformatf("config register %0d", i));
    end

    // peripheral RW registers
    axi_write(R_DIRECTCMD, 32'hFFFF_C2A0);
    axi_write(R_CHSEL,     32'h8000_0424);
    axi_write(R_BLANKING,  32'd123456);
    axi_write(R_TIME,      {16'd30, 16'd4800});
    axi_write(R_TX_CTL,    32'h0001_0008);
    axi_write(R_NEST,      32'd7);
    check(direct_cmd == 16'hC2A0 && chsel == 32'h8000_0424 && tblnk == 123456, "outputs follow writes");
    check(period == 4800 && nsave == 30 && tx_div == 8 && tx_en && nest == 7, "timing and Tx outputs");
    axi_read(R_DIRECTCMD, d); check(d == 32'h0000_C2A0, "DirectCMD read back");
    axi_read(R_BLANKING, d);  check(d == 32'd123456, "Blanking read back");
    axi_read(R_TIME, d);      check(d == {16'd30, 16'd4800}, "Time read back");
    axi_read(R_TX_CTL, d);    check(d == 32'h0001_0008, "Tx_ctl read back");
    axi_read(R_NEST, d);      check(d == 32'd7, "Nest read back");
    // byte strobe: change only byte 2 of ChSel
    axi_write(R_CHSEL, 32'h0077_0000, 4'b0100);
    axi_read(R_CHSEL, d);     check(d == 32'h8077_0424, $sformatf("strobed byte only (%h)", d));

    // read-only registers
    axi_read(R_DCRESP, d);    check(d == 32'h0000_1234, "DCResp");
    axi_write(R_DCRESP, 32'hFFFF_FFFF);
    axi_read(R_DCRESP, d);    check(d == 32'h0000_1234, "DCResp not writable");
    for (int k = 0; k < 16; k++) begin
      axi_read(R_CHR0 + k, d);
      check(d == {ch_data[2*k+1], ch_data[2*k]}, $sformatf("ChR pair %0d", k));
    end
    for (int k = 0; k < 5; k++) begin axi_read(40 + k, d); check(d == {24'd0, rom[k]}, "ROM 40..44"); end
    for (int k = 0; k < 4; k++) begin axi_read(60 + k, d); check(d == {24'd0, rom[5 + k]}, "ROM 60..63"); end
    axi_read(R_STATUS, d);
    check(d == ((32'd4 << 24) | (32'd1 << 16) | (32'd1 << 11) | (32'd3 << 9) | (32'd1 << 8)),
          $sformatf("Status fields %h", d));
    axi_read(R_TX_STATUS, d);
    check(d == ((32'd1 << 18) | 32'h10005), $sformatf("Tx_status fields %h", d));
    axi_read(50, d);          check(d == 0, "unused index reads 0");

    // Status control bits
    axi_write(R_STATUS, 32'h1);
    axi_write(R_STATUS, 32'h2);
    axi_write(R_STATUS, 32'h4);
    axi_write(R_STATUS, 32'h8);
    axi_write(R_STATUS, 32'h0001_0000);
    axi_write(R_STATUS, 32'h0002_0000);
    axi_write(R_STATUS, 32'h0003_000F, 4'b1011);   // byte 2 not strobed
    @(negedge clk);
    check(n_ini == 2 && n_dc == 2 && n_loop == 2 && n_stop == 2, "one start pulse per written bit");
    check(n_clrp == 1 && n_clro == 1, "clear pulses only with their byte strobed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
