// dac_model: behavioural model of the four-channel 16-bit serial DAC, for
// simulation only.
//
// Shifts SDI in on every rising SCK while cs_n is low. When cs_n rises
// after exactly 24 bits it decodes {command[3:0], address[3:0], data[15:0]},
// stores data in out[address] and counts the update; any other bit count
// or a command other than 4'b0011 is counted as a frame error. 'updates'
// and the per-channel history let a testbench follow the grid voltages.
module dac_model (
  input  logic        cs_n,
  input  logic        sck,
  input  logic        sdi,
  output logic [15:0] out [4],
  output int          updates,
  output int          frame_errors,
  output logic [3:0]  last_addr
);
  int          nbits;
  logic [23:0] sh;

  initial begin
    for (int i = 0; i < 4; i++) out[i] = '0;
    updates = 0;
    frame_errors = 0;
    nbits = 0;
    sh = '0;
    last_addr = '0;
  end

  always @(negedge cs_n) nbits = 0;

  always @(posedge sck) if (!cs_n) begin
    sh = {sh[22:0], sdi};
    nbits = nbits + 1;
  end

  always @(posedge cs_n) if (nbits != 0) begin
    if (nbits != 24 || sh[23:20] != 4'b0011 || sh[19:16] > 4'd3)
      frame_errors = frame_errors + 1;
    else begin
      out[sh[17:16]] = sh[15:0];
      last_addr = sh[19:16];
      updates = updates + 1;
    end
  end
endmodule
