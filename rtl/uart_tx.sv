// uart_tx: asynchronous serial transmitter, 8N1, LSB first.
//
// Bytes loaded into the transmit FIFO are sent immediately; this module
// pulls them one at a time. When idle and 'avail' is high it takes the byte
// on 'data' and pulses 'take' for one clock (the FIFO pops it), then sends
// start bit, eight data bits and stop bit, each round(CLK_HZ/BAUD) clocks
// long (87 at the 10 MHz / 115200 defaults). A byte therefore occupies
// 10*DIV clocks, about 87 us. 'busy' is high while a frame is on the line.
module uart_tx #(
  parameter int unsigned CLK_HZ = 10_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       avail,
  input  logic [7:0] data,
  output logic       take,
  output logic       txd,
  output logic       busy
);

  localparam int unsigned DIV = (CLK_HZ + BAUD/2) / BAUD;
  localparam int unsigned CW  = $clog2(DIV + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    nbits;    // bits left in the frame, 0 = idle
  logic [9:0]    frame;

  assign busy = (nbits != '0);
  assign take = !busy && avail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      nbits <= '0;
      frame <= '1;
      txd   <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (avail) begin
        frame <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= CW'(DIV - 1);
        txd   <= 1'b0;          // start bit goes out now
      end
    end else if (cnt == '0) begin
      nbits <= nbits - 1'b1;
      cnt   <= CW'(DIV - 1);
      frame <= {1'b1, frame[9:1]};
      txd   <= (nbits == 4'd1) ? 1'b1 : frame[1];
    end else begin
      cnt <= cnt - 1'b1;
    end
  end

endmodule
