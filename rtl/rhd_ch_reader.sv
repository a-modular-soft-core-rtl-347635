// rhd_ch_reader: "CH Reader" process, the acquisition loop.
//
// The loop converts the channels selected in ChSel once every sample period
// and stores each result in that channel's ChR register; while transmission
// is enabled it also streams every frame (one header word, then one 16-bit
// sample per selected channel in ascending channel order) to Tx Data.
//
// Stimulus mode (nest > 0): the loop waits for a rising edge on the stimulus
// trigger input. The edge starts a capture window of `nsave` frames (the
// Tsave period expressed in frames) and raises OUT_BLNK for `tblnk` clock
// cycles. After `nest` windows the loop ends and pulses `done`.
// Free-running mode (nest = 0): frames are taken from `go` on, without
// trigger or blanking, until `stop`.
// `stop` ends the loop at the next frame boundary (or at once while waiting
// for a trigger), also with `done`.
//
// One frame is a sweep of SPI words: CONVERT(c) for each selected channel c,
// then PIPE_DEPTH dummy READ(63) words, because the chip answers each command
// two words later. A sweep of n channels takes (n + 2) x 84 cycles; sweeps
// start every `period` cycles (16-bit count of 96 MHz cycles; 0 stands for
// 65,536, the longest period, 682.7 us). A period tick that falls inside a running sweep starts
// the next sweep as soon as that one ends.
// Periodic capture of the ChSel channels, the ChR registers, the Tsave
// window, the stimulus count, OUT_BLNK and the per-frame header come from
// the published description; the trigger input, the header layout
// {8'hA5, 8-bit frame number}, the free-running mode and all register units
// are this design's choices.
module rhd_ch_reader
  import rhd_pkg::*;
#(
  parameter int unsigned PERIOD_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                go,
  input  logic                stop,
  input  logic [N_CH-1:0]     chsel,
  input  logic [PERIOD_W-1:0] period,     // sample period, clock cycles
  input  logic [15:0]         nsave,      // frames per capture window
  input  logic [31:0]         tblnk,      // blanking pulse, clock cycles
  input  logic [15:0]         nest,       // stimuli per loop, 0 = free running
  input  logic                tx_en,
  input  logic                stim_trig,  // asynchronous stimulus trigger
  output logic                busy,
  output logic                done,
  output logic                blnk,       // OUT_BLNK
  output logic [15:0]         ch_data [N_CH],
  output logic [15:0]         stim_cnt,
  output logic                tx_valid,
  output logic [15:0]         tx_data,
  output spi_req_t            spi_req,
  input  spi_rsp_t            spi_rsp
);
  typedef enum logic [1:0] {L_IDLE, L_WAIT_TRIG, L_CAPTURE, L_SWEEP} lstate_e;
  lstate_e state;

  // trigger synchroniser and edge detector
  logic [2:0] trig_sr;
  logic       trig_rise;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trig_sr <= '0;
    else        trig_sr <= {trig_sr[1:0], stim_trig};
  assign trig_rise = trig_sr[1] && !trig_sr[2];

  // in-flight commands: entry 0 is the word being sent, entry PIPE_DEPTH the
  // word whose answer arrives with the current one
  typedef struct packed {
    logic       conv;
    logic [4:0] ch;
  } inflight_t;
  inflight_t pipe [PIPE_DEPTH+1];

  logic [N_CH-1:0]     pending;
  logic [1:0]          dummies;
  logic                waiting;
  logic [PERIOD_W-1:0] pcnt;
  logic                tick_pend;
  logic [15:0]         frames;
  logic [7:0]          seq;
  logic [31:0]         bcnt;
  logic                stop_req;
  logic                free_run;

  // lowest pending channel
  logic [4:0] next_ch;
  always_comb begin
    next_ch = '0;
    for (int i = N_CH - 1; i >= 0; i--)
      if (pending[i]) next_ch = 5'(i);
  end

  logic sweep_words_left;
  assign sweep_words_left = (pending != '0) || (dummies != 2'd0);

  // period timer, runs while a capture window is open
  logic tick;
  assign tick = (state == L_CAPTURE || state == L_SWEEP) && (pcnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= L_IDLE;
      pending   <= '0;
      dummies   <= '0;
      waiting   <= 1'b0;
      pcnt      <= '0;
      tick_pend <= 1'b0;
      frames    <= '0;
      seq       <= '0;
      bcnt      <= '0;
      stop_req  <= 1'b0;
      free_run  <= 1'b0;
      stim_cnt  <= '0;
      done      <= 1'b0;
      tx_valid  <= 1'b0;
      tx_data   <= '0;
      for (int i = 0; i <= PIPE_DEPTH; i++) pipe[i] <= '0;
      for (int i = 0; i < N_CH; i++) ch_data[i] <= '0;
    end else begin
      done     <= 1'b0;
      tx_valid <= 1'b0;

      // blanking pulse
      if (bcnt != '0) bcnt <= bcnt - 1'b1;

      if (stop) stop_req <= 1'b1;

      // period timer
      if (state == L_CAPTURE || state == L_SWEEP) begin
        if (pcnt == '0) pcnt <= period - 1'b1;
        else            pcnt <= pcnt - 1'b1;
      end
      if (tick && state == L_SWEEP) tick_pend <= 1'b1;

      unique case (state)
        L_IDLE: begin
          if (go) begin
            stim_cnt <= '0;
            seq      <= '0;
            stop_req <= 1'b0;
            free_run <= (nest == '0);
            if (nest == '0) begin
              state  <= L_CAPTURE;
              frames <= '0;
              pcnt   <= '0;
            end else begin
              state <= L_WAIT_TRIG;
            end
          end
        end

        L_WAIT_TRIG: begin
          if (stop_req || stop) begin
            state <= L_IDLE;
            done  <= 1'b1;
          end else if (trig_rise) begin
            bcnt   <= tblnk;
            frames <= '0;
            pcnt   <= '0;
            state  <= L_CAPTURE;
          end
        end

        L_CAPTURE: begin
          if (tick || tick_pend) begin
            tick_pend <= 1'b0;
            pending   <= chsel;
            dummies   <= 2'(PIPE_DEPTH);
            waiting   <= 1'b0;
            for (int i = 0; i <= PIPE_DEPTH; i++) pipe[i] <= '0;
            state     <= L_SWEEP;
            if (tx_en) begin
              tx_valid <= 1'b1;
              tx_data  <= {HDR_TAG, seq};
            end
          end
        end

        L_SWEEP: begin
          if (!waiting) begin
            if (!spi_rsp.busy) begin
              // the word is requested this cycle (spi_req.start)
              waiting <= 1'b1;
              pipe[0] <= '{conv: (pending != '0), ch: next_ch};
              for (int i = 1; i <= PIPE_DEPTH; i++) pipe[i] <= pipe[i-1];
              if (pending != '0) pending[next_ch] <= 1'b0;
              else               dummies <= dummies - 1'b1;
            end
          end else if (spi_rsp.done) begin
            waiting <= 1'b0;
            if (pipe[PIPE_DEPTH].conv) begin
              ch_data[pipe[PIPE_DEPTH].ch] <= spi_rsp.rx;
              if (tx_en) begin
                tx_valid <= 1'b1;
                tx_data  <= spi_rsp.rx;
              end
            end
            if (!sweep_words_left) begin
              // frame complete
              seq <= seq + 1'b1;
              if (stop_req) begin
                state <= L_IDLE;
                done  <= 1'b1;
              end else if (!free_run && (frames + 1'b1 == nsave)) begin
                stim_cnt <= stim_cnt + 1'b1;
                if (stim_cnt + 1'b1 == nest) begin
                  state <= L_IDLE;
                  done  <= 1'b1;
                end else begin
                  state <= L_WAIT_TRIG;
                end
                tick_pend <= 1'b0;
              end else begin
                frames <= frames + 1'b1;
                state  <= L_CAPTURE;
              end
            end
          end
        end
        default: state <= L_IDLE;
      endcase
    end
  end

  assign spi_req.start = (state == L_SWEEP) && !waiting && !spi_rsp.busy;
  assign spi_req.cmd   = (pending != '0) ? cmd_convert({1'b0, next_ch}) : cmd_read(6'd63);
  assign busy          = (state != L_IDLE);
  assign blnk          = (bcnt != '0);
endmodule
