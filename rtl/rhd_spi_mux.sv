// rhd_spi_mux: connects one of the three processes (INI, Direct Com,
// CH Reader) to the single SPI master.
//
// The control FSM drives `sel`; only the selected process's start request
// and command reach the master, and only it sees the `done` pulse. `busy` and
// `rx` are shared, so an unselected process sees the master as busy and never
// takes a reply meant for another. With SEL_NONE no request passes. Purely
// combinational; the choice of a one-hot grant by the control FSM rather
// than arbitration among the processes is this design's.
module rhd_spi_mux
  import rhd_pkg::*;
(
  input  spi_sel_e sel,
  input  spi_req_t req_ini,
  input  spi_req_t req_dc,
  input  spi_req_t req_chr,
  output spi_rsp_t rsp_ini,
  output spi_rsp_t rsp_dc,
  output spi_rsp_t rsp_chr,
  // to / from the SPI master
  output spi_req_t m_req,
  input  spi_rsp_t m_rsp
);
  always_comb begin
    unique case (sel)
      SEL_INI: m_req = req_ini;
      SEL_DC:  m_req = req_dc;
      SEL_CHR: m_req = req_chr;
      default: m_req = '{start: 1'b0, cmd: 16'h0000};
    endcase
  end

  always_comb begin
    rsp_ini = '{busy: (sel != SEL_INI) || m_rsp.busy, done: (sel == SEL_INI) && m_rsp.done, rx: m_rsp.rx};
    rsp_dc  = '{busy: (sel != SEL_DC)  || m_rsp.busy, done: (sel == SEL_DC)  && m_rsp.done, rx: m_rsp.rx};
    rsp_chr = '{busy: (sel != SEL_CHR) || m_rsp.busy, done: (sel == SEL_CHR) && m_rsp.done, rx: m_rsp.rx};
  end
endmodule
