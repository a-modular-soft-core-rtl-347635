// rhd_ini: "INI" process. Initialises the RHD2000 headstage from the
// configuration registers, runs the chip's ADC calibration and copies the
// chip's read-only ROM registers into the peripheral.
//
// The process walks a fixed list of 41 SPI words:
//   words  0..1   two dummy READ(63) words after power-up
//   words  2..19  WRITE(r, cfg[r]) for the 18 configuration registers 0..17
//   word  20      CALIBRATE
//   words 21..29  nine dummy READ(63) words while the chip calibrates
//   words 30..38  READ of ROM registers 40..44 ("INTAN") and 60..63
//   words 39..40  two dummy READ(63) words that bring back the last answers
// Answers arrive two words after their command, so the answer to word w is
// taken during word w + 2; the nine ROM bytes land in `rom`.
// That initialisation writes the configuration, calibrates and copies the
// registers is stated for this peripheral; the order, the dummy counts and
// the command encodings follow the RHD2000 data sheet's power-up procedure.
//
// Interface: pulse `go` while the SPI master is granted to this process;
// `busy` is high until the one-cycle `done`. Takes 41 words (41 x 84 cycles,
// about 36 us at 96 MHz).
module rhd_ini
  import rhd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,
  input  logic [7:0] cfg [N_CFG],
  output logic       busy,
  output logic       done,
  output logic [7:0] rom [N_ROM],
  output spi_req_t   spi_req,
  input  spi_rsp_t   spi_rsp
);
  localparam int unsigned W_CFG   = 2;
  localparam int unsigned W_CAL   = W_CFG + N_CFG;       // 20
  localparam int unsigned W_COPY  = W_CAL + 10;          // 30
  localparam int unsigned N_WORDS = W_COPY + N_ROM + PIPE_DEPTH;  // 41

  logic [5:0] step;
  logic       active, waiting;

  // ROM register address of copy slot i
  function automatic logic [5:0] rom_addr(input int unsigned i);
    return (i < 5) ? 6'(40 + i) : 6'(55 + i);
  endfunction

  // command word of a step
  function automatic logic [15:0] step_cmd(input logic [5:0] s, input logic [7:0] c [N_CFG]);
    int unsigned si;
    si = int'(s);
    if (si >= W_CFG && si < W_CAL)                    return cmd_write(6'(si - W_CFG), c[si - W_CFG]);
    else if (si == W_CAL)                             return cmd_calibrate();
    else if (si >= W_COPY && si < W_COPY + N_ROM)     return cmd_read(rom_addr(si - W_COPY));
    else                                              return cmd_read(6'd63);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      waiting <= 1'b0;
      step    <= '0;
      done    <= 1'b0;
      for (int i = 0; i < N_ROM; i++) rom[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (go) begin
          active  <= 1'b1;
          waiting <= 1'b0;
          step    <= '0;
        end
      end else if (!waiting) begin
        if (!spi_rsp.busy) waiting <= 1'b1;
      end else if (spi_rsp.done) begin
        waiting <= 1'b0;
        if (int'(step) >= W_COPY + PIPE_DEPTH)
          rom[int'(step) - W_COPY - PIPE_DEPTH] <= spi_rsp.rx[7:0];
        if (int'(step) == N_WORDS - 1) begin
          active <= 1'b0;
          done   <= 1'b1;
        end else begin
          step <= step + 1'b1;
        end
      end
    end
  end

  assign spi_req.start = active && !waiting && !spi_rsp.busy;
  assign spi_req.cmd   = step_cmd(step, cfg);
  assign busy          = active;
endmodule
