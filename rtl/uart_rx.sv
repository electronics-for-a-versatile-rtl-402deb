// uart_rx: asynchronous serial receiver, 8 data bits, no parity, 1 stop bit.
//
// The instrument talks to the spacecraft over a UART at 115200 baud derived
// from its 10 MHz clock; the baud rate is selectable when the design is
// built, here through the CLK_HZ and BAUD parameters. Frame format (8N1,
// LSB first) and the sampling scheme are this design's choices.
//
// How it works: the line is passed through a two-flop synchroniser. A
// falling edge in idle starts a frame; the start bit is re-checked half a
// bit later, then each data bit and the stop bit are sampled one bit period
// apart (bit period = round(CLK_HZ/BAUD) clocks, 87 at the defaults). A
// byte is delivered with a one-cycle 'valid' pulse in the clock after the
// middle of the stop bit; a low stop bit drops the byte and pulses
// 'frame_err' instead, and the receiver then waits for the line to go
// high before it looks for another start bit.
module uart_rx #(
  parameter int unsigned CLK_HZ = 10_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned DIV  = (CLK_HZ + BAUD/2) / BAUD;
  localparam int unsigned CW   = $clog2(DIV + 1);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_STOP, S_WAIT_HIGH} state_e;

  state_e      state;
  logic [CW-1:0] cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;
  logic [1:0]  sync;
  logic        rx_s;

  assign rx_s = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= S_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        S_IDLE: if (!rx_s) begin
          state <= S_START;
          cnt   <= CW'(DIV/2 - 1);
        end
        S_START: if (cnt == '0) begin
          if (!rx_s) begin
            state   <= S_DATA;
            cnt     <= CW'(DIV - 1);
            bit_idx <= '0;
          end else begin
            state <= S_IDLE;       // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        S_DATA: if (cnt == '0) begin
          shreg <= {rx_s, shreg[7:1]};
          cnt   <= CW'(DIV - 1);
          if (bit_idx == 3'd7) state <= S_STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        S_STOP: if (cnt == '0) begin
          if (rx_s) begin
            state <= S_IDLE;
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            state     <= S_WAIT_HIGH;
            frame_err <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
        S_WAIT_HIGH: if (rx_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
