// rhd_control: "Control" block of the peripheral, the finite state machine
// that runs one process at a time and raises the interrupts.
//
// Software starts a process by writing its control bit in the Status
// register (INI, Direct Com, capture loop) and can ask a running loop to
// stop. From IDLE the FSM grants the SPI master to the requested process
// (state INI, DC or LOOP), pulses that process's `go` in the first cycle of
// the new state, and returns to IDLE on the process's `done`. Requests that
// arrive while a process runs are ignored. If several arrive in the same
// cycle INI wins over Direct Com, and Direct Com over the loop.
//
// Each `done` sets the I_PERI flag and records which process finished;
// a Tx FIFO overrun sets the I_TX_OVERRUN flag. Both flags are levels held
// until software clears them by writing 1 to them in the Status register.
// Start bits, the one-process-at-a-time flow and the two interrupt lines
// follow the published description; priorities, the flag-and-clear
// interrupt style and the cause bits are this design's choices.
module rhd_control
  import rhd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // requests from the Status register (one-cycle pulses)
  input  logic       ini_req,
  input  logic       dc_req,
  input  logic       loop_req,
  input  logic       stop_req,
  input  logic       clr_irq_peri,
  input  logic       clr_irq_ovr,
  // processes
  output logic       ini_go,
  output logic       dc_go,
  output logic       loop_go,
  output logic       loop_stop,
  input  logic       ini_done,
  input  logic       dc_done,
  input  logic       loop_done,
  input  logic       tx_overrun,   // one-cycle event from Tx Data
  // state
  output ctl_state_e state,
  output spi_sel_e   sel,
  output logic [2:0] done_cause,   // {loop, dc, ini} of the last I_PERI event
  output logic       irq_peri,
  output logic       irq_tx_overrun
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= CTL_IDLE;
      ini_go         <= 1'b0;
      dc_go          <= 1'b0;
      loop_go        <= 1'b0;
      irq_peri       <= 1'b0;
      irq_tx_overrun <= 1'b0;
      done_cause     <= '0;
    end else begin
      ini_go  <= 1'b0;
      dc_go   <= 1'b0;
      loop_go <= 1'b0;
      unique case (state)
        CTL_IDLE: begin
          if (ini_req)       begin state <= CTL_INI;  ini_go  <= 1'b1; end
          else if (dc_req)   begin state <= CTL_DC;   dc_go   <= 1'b1; end
          else if (loop_req) begin state <= CTL_LOOP; loop_go <= 1'b1; end
        end
        CTL_INI:  if (ini_done)  state <= CTL_IDLE;
        CTL_DC:   if (dc_done)   state <= CTL_IDLE;
        CTL_LOOP: if (loop_done) state <= CTL_IDLE;
        default:  state <= CTL_IDLE;
      endcase

      // interrupt flags; a new event wins over a clear in the same cycle
      if (clr_irq_peri) irq_peri <= 1'b0;
      if (ini_done || dc_done || loop_done) begin
        irq_peri   <= 1'b1;
        done_cause <= {loop_done, dc_done, ini_done};
      end
      if (clr_irq_ovr) irq_tx_overrun <= 1'b0;
      if (tx_overrun)  irq_tx_overrun <= 1'b1;
    end
  end

  assign loop_stop = stop_req && (state == CTL_LOOP);

  always_comb begin
    unique case (state)
      CTL_INI:  sel = SEL_INI;
      CTL_DC:   sel = SEL_DC;
      CTL_LOOP: sel = SEL_CHR;
      default:  sel = SEL_NONE;
    endcase
  end
endmodule
