// tb_rhd_spi_mux: drives random requests from the three processes and a
// random master response for every selection and checks that only the
// selected process reaches the master, that only it sees `done`, and that
// the others see the master as busy.
module tb_rhd_spi_mux;
  import rhd_pkg::*;
  spi_sel_e sel;
  spi_req_t req_ini, req_dc, req_chr, m_req;
  spi_rsp_t rsp_ini, rsp_dc, rsp_chr, m_rsp;
  int checks = 0, failures = 0;

  rhd_spi_mux dut (.sel, .req_ini, .req_dc, .req_chr, .rsp_ini, .rsp_dc, .rsp_chr, .m_req, .m_rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spi_req_t exp_req;
    for (int n = 0; n < 200; n++) begin
      sel     = spi_sel_e'(n % 4);
      req_ini = spi_req_t'($urandom);
      req_dc  = spi_req_t'($urandom);
      req_chr = spi_req_t'($urandom);
      m_rsp   = spi_rsp_t'($urandom);
      #1;
      case (n % 4)
        1:       exp_req = req_ini;
        2:       exp_req = req_dc;
        3:       exp_req = req_chr;
        default: exp_req = '0;
      endcase
      check(m_req == exp_req, $sformatf("request routing, sel %0d", n % 4));
      check(rsp_ini.done == (m_rsp.done && n % 4 == 1), "done only to INI when selected");
      check(rsp_dc.done  == (m_rsp.done && n % 4 == 2), "done only to Direct Com when selected");
      check(rsp_chr.done == (m_rsp.done && n % 4 == 3), "done only to CH Reader when selected");
      check(rsp_ini.busy == (m_rsp.busy || n % 4 != 1), "INI busy");
      check(rsp_dc.busy  == (m_rsp.busy || n % 4 != 2), "Direct Com busy");
      check(rsp_chr.busy == (m_rsp.busy || n % 4 != 3), "CH Reader busy");
      check(rsp_ini.rx == m_rsp.rx && rsp_dc.rx == m_rsp.rx && rsp_chr.rx == m_rsp.rx, "rx shared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
