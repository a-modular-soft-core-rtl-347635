// rhd2132_model: behavioural model of the SPI side of an Intan RHD2132
// headstage, for simulation only (not synthesizable).
//
// It shifts in a 16-bit command on rising SCLK edges while CS is low and
// shifts out a 16-bit reply, MSB first, changing MISO after each falling
// SCLK edge. The reply sent in a frame is the result of the command received
// two frames earlier, as on the real chip. Results:
//   CONVERT(c)  -> sample(c, k), k = number of earlier CONVERTs of channel c
//   CALIBRATE   -> 0, counted in n_cal
//   CLEAR       -> 0, counted in n_clear
//   WRITE(r,d)  -> {8'hFF, d}, register r takes d
//   READ(r)     -> {8'h00, reg[r]}
// Registers 40..44 read "INTAN", 60..63 read die revision 1, unipolar 0,
// 32 amplifiers and chip id 1. A frame that does not carry exactly 16 SCLK
// rising edges is counted in n_err.
module rhd2132_model (
  input  logic cs_n,
  input  logic sclk,
  input  logic mosi,
  output logic miso
);
  logic [7:0]  regs [64];
  int unsigned conv_cnt [64];
  int unsigned n_words, n_err, n_cal, n_clear, n_convert;
  logic [15:0] sh_in, sh_out, p1, tx_next;
  int unsigned nbits;
  bit          in_frame;

  // sample value of channel c on its k-th conversion; testbenches use the
  // same formula to predict what the peripheral must deliver
  function automatic logic [15:0] sample(input int unsigned c, input int unsigned k);
    return 16'((c * 16'h0400) ^ (k * 16'h0013) ^ 16'h8000);
  endfunction

  initial begin
    foreach (regs[i]) regs[i] = 8'h00;
    foreach (conv_cnt[i]) conv_cnt[i] = 0;
    regs[40] = "I"; regs[41] = "N"; regs[42] = "T"; regs[43] = "A"; regs[44] = "N";
    regs[60] = 8'd1; regs[61] = 8'd0; regs[62] = 8'd32; regs[63] = 8'd1;
    n_words = 0; n_err = 0; n_cal = 0; n_clear = 0; n_convert = 0;
    p1 = 16'h0000; tx_next = 16'h0000; sh_out = 16'h0000; sh_in = 16'h0000;
    nbits = 0;
    in_frame = 1'b0;
    miso = 1'b0;
  end

  always @(negedge cs_n) begin
    in_frame = 1'b1;
    nbits  = 0;
    sh_out = tx_next;
    miso   = sh_out[15];
  end

  always @(posedge sclk) begin
    if (!cs_n) begin
      sh_in = {sh_in[14:0], mosi};
      nbits = nbits + 1;
    end
  end

  always @(negedge sclk) begin
    if (!cs_n) begin
      #1;
      sh_out = {sh_out[14:0], 1'b0};
      miso   = sh_out[15];
    end
  end

  always @(posedge cs_n) if (in_frame) begin
    logic [15:0] res;
    in_frame = 1'b0;
    if (nbits != 16) n_err = n_err + 1;
    n_words = n_words + 1;
    res = 16'h0000;
    unique casez (sh_in[15:14])
      2'b00: begin
        res = sample(sh_in[13:8], conv_cnt[sh_in[13:8]]);
        conv_cnt[sh_in[13:8]] = conv_cnt[sh_in[13:8]] + 1;
        n_convert = n_convert + 1;
      end
      2'b01: begin
        if (sh_in == 16'h5500) n_cal = n_cal + 1;
        else if (sh_in == 16'h6A00) n_clear = n_clear + 1;
        else n_err = n_err + 1;
      end
      2'b10: begin
        regs[sh_in[13:8]] = sh_in[7:0];
        res = {8'hFF, sh_in[7:0]};
      end
      default: res = {8'h00, regs[sh_in[13:8]]};
    endcase
    tx_next = p1;
    p1      = res;
    miso    = 1'b0;
  end

endmodule
