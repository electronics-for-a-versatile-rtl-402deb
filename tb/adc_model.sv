// adc_model: behavioural model of the four-channel 16-bit serial ADC, for
// simulation only.
//
// On each rising SCK while cs_n is low it shifts in DIN; the first eight
// bits form the command byte, whose bits 6:4 select the channel
// (001 -> 0, 101 -> 1, 010 -> 2, 110 -> 3). After the falling edge of the
// 9th clock and of each following clock it drives the next result bit,
// MSB first, so D15..D0 are valid during the high halves of clocks 10..25.
// The result for channel c is vals[c]; for channel 0, when jitter is set,
// the conversion number modulo 4 is added, so averages can be checked.
// It counts conversions per channel, records the last command and flags a
// protocol error if a frame does not have exactly 25 clocks.
module adc_model (
  input  logic        cs_n,
  input  logic        sck,
  input  logic        din,
  output logic        dout,
  input  logic [15:0] vals [4],
  input  logic        jitter,
  output int          conv_count [4],
  output logic [1:0]  last_chan,
  output int          frame_errors
);
  int          nclk;
  logic [7:0]  cmd;
  logic [15:0] result;
  logic [1:0]  ch;

  initial begin
    dout = 1'b0;
    frame_errors = 0;
    last_chan = '0;
    for (int i = 0; i < 4; i++) conv_count[i] = 0;
    nclk = 0;
    cmd = '0;
    result = '0;
  end

  function automatic logic [1:0] decode(logic [2:0] a);
    case (a)
      3'b001: return 2'd0;
      3'b101: return 2'd1;
      3'b010: return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  always @(negedge cs_n) begin
    nclk = 0;
    dout = 1'b0;
  end

  always @(posedge sck) if (!cs_n) begin
    nclk = nclk + 1;
    if (nclk <= 8) cmd = {cmd[6:0], din};
    if (nclk == 8) begin
      ch = decode(cmd[6:4]);
      result = vals[ch] + ((ch == 2'd0 && jitter) ? 16'(conv_count[0] % 4) : 16'd0);
    end
  end

  always @(negedge sck) if (!cs_n) begin
    if (nclk >= 9 && nclk <= 24) dout = result[15 - (nclk - 9)];
    else dout = 1'b0;
  end

  always @(posedge cs_n) if (nclk != 0) begin
    if (nclk != 25) frame_errors = frame_errors + 1;
    else begin
      conv_count[ch] = conv_count[ch] + 1;
      last_chan = ch;
    end
  end
endmodule
