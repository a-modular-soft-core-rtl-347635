// tb_rhd_tx_fifo: the Tx FIFO at its full 65,536-word depth against a
// queue model. Random pushes and pops with data checks, a fill to exactly
// full, a dropped write into the full FIFO with its overrun pulse, a
// simultaneous read and write at full, and a drain that checks order.
module tb_rhd_tx_fifo;
  localparam int unsigned DEPTH = 65536;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en, rd_en, empty, full, overrun;
  logic [15:0] wr_data, rd_data;
  logic [16:0] count;
  int checks = 0, failures = 0, n_ovr = 0;

  rhd_tx_fifo dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full, .count, .overrun);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [15:0] model [$];
  logic        rd_pend = 1'b0;
  logic [15:0] rd_exp;
  // reference model, updated at each clock edge from the sampled inputs
  always @(posedge clk) if (rst_n) begin
    if (rd_pend) check(rd_data == rd_exp, $sformatf("read data %h expected %h", rd_data, rd_exp));
    rd_pend = 1'b0;
    if (overrun) n_ovr++;
    begin
      bit was_full;
      was_full = (model.size() == DEPTH);
      if (rd_en && model.size() > 0) begin rd_exp = model.pop_front(); rd_pend = 1'b1; end
      if (wr_en && !was_full) model.push_back(wr_data);
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      wr_en = ($urandom % 3) != 0; rd_en = ($urandom % 2) != 0; wr_data = 16'($urandom);
      @(negedge clk);
      check(int'(count) == model.size(), "count tracks the model");
    end
    wr_en = 0; rd_en = 0;
    @(negedge clk);
    // fill to full
    while (!full) begin
      wr_en = 1; wr_data = 16'($urandom);
      @(negedge clk);
    end
    wr_en = 0;
    @(negedge clk);
    check(count == 17'(DEPTH) && model.size() == DEPTH, "full at 65,536 words");
    check(n_ovr == 0, "no overrun before full");
    wr_en = 1; wr_data = 16'hDEAD;
    @(negedge clk);
    wr_en = 0;
    @(negedge clk);
    check(n_ovr == 1, "write into a full FIFO flags overrun");
    check(count == 17'(DEPTH), "dropped word not stored");
    // simultaneous read and write while full: the write is refused
    wr_en = 1; rd_en = 1; wr_data = 16'hBEEF;
    @(negedge clk);
    wr_en = 0; rd_en = 0;
    @(negedge clk);
    check(count == 17'(DEPTH - 1), "read at full frees one word");
    // drain
    while (!empty) begin rd_en = 1; @(negedge clk); end
    rd_en = 0;
    repeat (2) @(negedge clk);
    check(model.size() == 0 && count == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
