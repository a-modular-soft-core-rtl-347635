// rhd_spi_master: SPI master for the RHD2000 "modified SPI" word transfer.
//
// Each transfer moves one 16-bit command out on MOSI and one 16-bit word in
// on MISO, both MSB first, framed by an active-low chip select. SCLK idles
// low. MOSI changes on the falling edge of SCLK and is sampled by the chip
// on the rising edge; MISO is captured on the rising edge of SCLK. CS stays
// low CS_LEAD cycles before the first SCLK rise (tCS1), CS_TRAIL cycles after
// the last SCLK fall (tCS2), and high for CS_OFF cycles after the word
// (tCSOFF); the rising edge of CS triggers the chip's next ADC sample.
//
// With the 96 MHz system clock and SCLK_DIV = 4 the serial clock is 24 MHz,
// as in the platform this peripheral was written for. The frame shape
// follows the chip's timing diagram; the CS_* cycle counts are this design's
// choice (2 cycles = 20.8 ns, 16 cycles = 167 ns at 96 MHz).
//
// Interface: pulse `start` with `cmd` while `busy` is low. `busy` is high
// from the next cycle until `done`, a one-cycle pulse at the end of the CS
// high time, when `rx` holds the word received during the transfer.
// `done` is high CS_LEAD + 15*SCLK_DIV + SCLK_DIV/2 + CS_TRAIL + CS_OFF + 1
// cycles after the cycle in which `start` is taken (83 cycles by default), and
// a new `start` may come in the cycle after `done`, so back-to-back words
// repeat every 84 cycles (875 ns). Inside a word:
// CS fall to first SCLK rise CS_LEAD, first rise to last fall
// 15.5 SCLK periods, last fall to CS rise CS_TRAIL, then CS_OFF high.
module rhd_spi_master #(
  parameter int unsigned SCLK_DIV = 4,   // system clocks per SCLK period (even, >= 2)
  parameter int unsigned CS_LEAD  = 2,   // CS low to first SCLK rise
  parameter int unsigned CS_TRAIL = 2,   // last SCLK fall to CS high
  parameter int unsigned CS_OFF   = 16   // CS high time between words
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] cmd,
  output logic        busy,
  output logic        done,
  output logic [15:0] rx,
  // SPI pins
  output logic        cs_n,
  output logic        sclk,
  output logic        mosi,
  input  logic        miso
);
  localparam int unsigned HALF = SCLK_DIV / 2;
  localparam int unsigned CW   = $clog2(SCLK_DIV + CS_LEAD + CS_TRAIL + CS_OFF + 1);

  typedef enum logic [2:0] {S_IDLE, S_LEAD, S_SHIFT, S_TRAIL, S_OFF} state_e;
  state_e state;

  logic [CW-1:0] cnt;
  logic [3:0]    bitn;
  logic [15:0]   sh_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      bitn   <= '0;
      sh_out <= '0;
      rx     <= '0;
      cs_n   <= 1'b1;
      sclk   <= 1'b0;
      mosi   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state  <= S_LEAD;
            cs_n   <= 1'b0;
            sh_out <= cmd;
            mosi   <= cmd[15];
            bitn   <= 4'd15;
            cnt    <= CW'(CS_LEAD - 1);
          end
        end
        // CS low, MOSI holds the MSB; the first SCLK rising edge comes
        // CS_LEAD cycles after CS falls.
        S_LEAD: begin
          if (cnt <= CW'(1)) begin
            state <= S_SHIFT;
            cnt   <= CW'(HALF - 1);
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_SHIFT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(HALF - 1)) begin
            sclk <= 1'b1;                 // rising edge: capture MISO
            rx   <= {rx[14:0], miso};
          end
          if (cnt == CW'(SCLK_DIV - 1)) begin
            sclk <= 1'b0;                 // falling edge: next MOSI bit
            cnt  <= '0;
            if (bitn == 4'd0) begin
              state <= S_TRAIL;
              cnt   <= CW'(CS_TRAIL);
            end else begin
              bitn <= bitn - 1'b1;
              mosi <= sh_out[bitn - 1'b1];
            end
          end
        end
        S_TRAIL: begin
          if (cnt <= CW'(1)) begin
            state <= S_OFF;
            cs_n  <= 1'b1;
            mosi  <= 1'b0;
            cnt   <= CW'(CS_OFF);
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_OFF: begin
          if (cnt <= CW'(1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
