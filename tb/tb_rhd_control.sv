// tb_rhd_control: control FSM with scripted process responses. Checks the
// grant (state and SPI mux selection) for each process, the one-cycle go
// pulses, that requests during a running process are ignored, the request
// priority, stop forwarding only during the loop, and the I_PERI and
// I_TX_OVERRUN flags with their cause bits, write-1-to-clear, and an event
// winning over a clear in the same cycle.
module tb_rhd_control;
  import rhd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ini_req, dc_req, loop_req, stop_req, clr_irq_peri, clr_irq_ovr;
  logic ini_go, dc_go, loop_go, loop_stop, ini_done, dc_done, loop_done, tx_overrun;
  ctl_state_e state;
  spi_sel_e sel;
  logic [2:0] done_cause;
  logic irq_peri, irq_tx_overrun;
  int checks = 0, failures = 0;
  int n_ini_go = 0, n_dc_go = 0, n_loop_go = 0;

  rhd_control dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (ini_go) n_ini_go++;
    if (dc_go) n_dc_go++;
    if (loop_go) n_loop_go++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef enum {P_INI, P_DC, P_LOOP, P_STOP, P_CLRP, P_CLRO, P_INID, P_DCD, P_LOOPD, P_OVR} pin_e;
  // one-cycle pulse on a request input, driven between clock edges
  task automatic pulse(input pin_e p);
    @(negedge clk);
    case (p)
      P_INI: ini_req = 1'b1;   P_DC: dc_req = 1'b1;     P_LOOP: loop_req = 1'b1;
      P_STOP: stop_req = 1'b1; P_CLRP: clr_irq_peri = 1'b1; P_CLRO: clr_irq_ovr = 1'b1;
      P_INID: ini_done = 1'b1; P_DCD: dc_done = 1'b1;   P_LOOPD: loop_done = 1'b1;
      default: tx_overrun = 1'b1;
    endcase
    @(negedge clk);
    {ini_req, dc_req, loop_req, stop_req, clr_irq_peri, clr_irq_ovr} = '0;
    {ini_done, dc_done, loop_done, tx_overrun} = '0;
    @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {ini_req, dc_req, loop_req, stop_req, clr_irq_peri, clr_irq_ovr} = '0;
    {ini_done, dc_done, loop_done, tx_overrun} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(state == CTL_IDLE && sel == SEL_NONE && !irq_peri && !irq_tx_overrun, "reset state");

    // INI
    pulse(P_INI);
    check(state == CTL_INI && sel == SEL_INI, "INI granted");
    check(n_ini_go == 1, "one INI go pulse");
    pulse(P_DC);                       // ignored while INI runs
    pulse(P_LOOP);
    check(state == CTL_INI && n_dc_go == 0 && n_loop_go == 0, $sformatf("requests ignored while busy %s %0d %0d", state.name(), n_dc_go, n_loop_go));
    pulse(P_STOP);
    check(!loop_stop, "stop not forwarded outside the loop");
    pulse(P_INID);
    check(state == CTL_IDLE && irq_peri && done_cause == 3'b001, "INI done raises I_PERI");
    pulse(P_CLRP);
    check(!irq_peri, "I_PERI cleared");

    // Direct Com
    pulse(P_DC);
    check(state == CTL_DC && sel == SEL_DC && n_dc_go == 1, $sformatf("Direct Com granted %s %0d", state.name(), n_dc_go));
    pulse(P_DCD);
    check(state == CTL_IDLE && irq_peri && done_cause == 3'b010, "Direct Com done raises I_PERI");

    // loop, stop forwarding
    pulse(P_LOOP);
    check(state == CTL_LOOP && sel == SEL_CHR && n_loop_go == 1, "loop granted");
    @(negedge clk); stop_req = 1'b1; #1;
    check(loop_stop, "stop forwarded during the loop");
    @(negedge clk); stop_req = 1'b0;
    pulse(P_LOOPD);
    check(state == CTL_IDLE && done_cause == 3'b100, "loop done cause");

    // priority: all three requested together
    @(negedge clk); ini_req = 1'b1; dc_req = 1'b1; loop_req = 1'b1;
    @(negedge clk); ini_req = 1'b0; dc_req = 1'b0; loop_req = 1'b0;
    @(negedge clk);
    check(state == CTL_INI && n_ini_go == 2 && n_dc_go == 1, "INI has priority");
    pulse(P_INID);

    // overrun flag
    pulse(P_OVR);
    check(irq_tx_overrun, "overrun raises I_TX_OVERRUN");
    pulse(P_CLRP);
    check(irq_tx_overrun && !irq_peri, "clearing I_PERI leaves I_TX_OVERRUN");
    pulse(P_CLRO);
    check(!irq_tx_overrun, "I_TX_OVERRUN cleared");

    // priority: Direct Com over the loop
    pulse(P_CLRP);
    @(negedge clk); dc_req = 1'b1; loop_req = 1'b1;
    @(negedge clk); dc_req = 1'b0; loop_req = 1'b0;
    @(negedge clk);
    check(state == CTL_DC && sel == SEL_DC && n_dc_go == 2 && n_loop_go == 1, "Direct Com over the loop");
    // a new event wins over a clear in the same cycle
    @(negedge clk); dc_done = 1'b1; clr_irq_peri = 1'b1; tx_overrun = 1'b1; clr_irq_ovr = 1'b1;
    @(negedge clk); dc_done = 1'b0; clr_irq_peri = 1'b0; tx_overrun = 1'b0; clr_irq_ovr = 1'b0;
    check(state == CTL_IDLE && irq_peri && done_cause == 3'b010, "done wins over a simultaneous clear");
    check(irq_tx_overrun, "overrun wins over a simultaneous clear");
    // flags stay up until cleared
    repeat (20) @(negedge clk);
    check(irq_peri && irq_tx_overrun, "flags are held levels");
    check(n_ini_go == 2 && n_dc_go == 2 && n_loop_go == 1, "no spurious go pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
