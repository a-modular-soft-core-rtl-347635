// rhd_direct_com: "Direct Com" process. Sends one command word taken from
// the DirectCMD register to the headstage and stores the chip's answer in
// DCResp.
//
// The RHD2000 returns the result of a command two words after it, so the
// process sends the command followed by PIPE_DEPTH dummy READ(63) words and
// keeps the word received during the last of them. It then pulses `done`,
// which the control block turns into the I_PERI interrupt. Sending, storing
// the answer and interrupting follow the published description; the dummy
// words are this design's way of collecting a pipelined answer.
//
// Interface: pulse `go` (while the control block grants this process the
// SPI master); `busy` is high until the one-cycle `done`; `dc_resp` holds the
// answer from `done` on. `done` comes 1 + 3 x 84 = 253 cycles after `go` at
// the default SPI timing (three words).
module rhd_direct_com
  import rhd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  input  logic [15:0] cmd,
  output logic        busy,
  output logic        done,
  output logic [15:0] dc_resp,
  output spi_req_t    spi_req,
  input  spi_rsp_t    spi_rsp
);
  logic [1:0]  words_left;   // words still to be sent after the current one
  logic        active, waiting;
  logic [15:0] cur_cmd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      waiting    <= 1'b0;
      words_left <= '0;
      cur_cmd    <= '0;
      dc_resp    <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (go) begin
          active     <= 1'b1;
          waiting    <= 1'b0;
          cur_cmd    <= cmd;
          words_left <= 2'(PIPE_DEPTH);
        end
      end else if (!waiting) begin
        if (!spi_rsp.busy) waiting <= 1'b1;   // request is issued this cycle
      end else if (spi_rsp.done) begin
        waiting <= 1'b0;
        cur_cmd <= cmd_read(6'd63);
        if (words_left == 2'd0) begin
          dc_resp <= spi_rsp.rx;
          done    <= 1'b1;
          active  <= 1'b0;
        end else begin
          words_left <= words_left - 1'b1;
        end
      end
    end
  end

  assign spi_req.start = active && !waiting && !spi_rsp.busy;
  assign spi_req.cmd   = cur_cmd;
  assign busy          = active;
endmodule
