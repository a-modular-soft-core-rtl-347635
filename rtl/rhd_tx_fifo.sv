// rhd_tx_fifo: synchronous first-in first-out buffer that queues the 16-bit
// words waiting for the data UART (65,536 words by default).
//
// A write with `wr_en` stores `wr_data` unless the buffer is full; a write
// into a full buffer is dropped and pulses `overrun` in the next cycle.
// A read with `rd_en` on a non-empty buffer presents the oldest word on
// `rd_data` in the next cycle (registered read, so the storage maps to block
// RAM). `count` is the number of words held. Simultaneous read and write are
// allowed. Depth and word width follow the published Tx Data description;
// the drop-on-full policy is this design's choice.
module rhd_tx_fifo #(
  parameter int unsigned DEPTH = 65536,   // power of two
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overrun
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
    if (do_rd) rd_data <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      rptr    <= '0;
      count   <= '0;
      overrun <= 1'b0;
    end else begin
      overrun <= wr_en && full;
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      unique case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end
endmodule
