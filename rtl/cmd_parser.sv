// cmd_parser: reads the receive FIFO and turns the uplinked command bytes
// into a sweep configuration.
//
// Behaviour taken from the instrument description: when idle, every byte is
// read; the start byte 0xAA begins a command and any other byte is dropped.
// After a start byte the parser waits until the FIFO count shows four
// bytes, then reads them in order: step[15:8], step[7:0], points per sweep,
// mode. While a sweep runs every incoming byte is read and ignored, even a
// start byte, except the synchronous-reset byte.
// This design's choices: the reset byte is RESET_BYTE (0x55) from rpa_pkg
// and is also honoured while idle, but not among the four data bytes; a
// points byte other than 32, 64 or 128 selects 32 points.
//
// Interface: show-ahead FIFO read port (rx_data is the head byte, rx_rd pops
// it). 'go' pulses for one clock with 'cfg' valid after the fourth byte;
// the parser then ignores bytes until 'sweep_done' pulses. 'sync_reset'
// pulses for one clock when the reset byte is popped.
module cmd_parser
  import rpa_pkg::*;
#(
  parameter int unsigned CW = 8      // width of the FIFO count
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [7:0]    rx_data,
  input  logic          rx_empty,
  input  logic [CW-1:0] rx_count,
  output logic          rx_rd,
  input  logic          sweep_done,
  output logic          go,
  output sweep_cfg_t    cfg,
  output logic          sync_reset
);

  typedef enum logic [2:0] {
    P_IDLE, P_WAIT4, P_STEP_HI, P_STEP_LO, P_POINTS, P_MODE, P_BUSY
  } pstate_e;

  pstate_e state;

  // Pop whenever a byte is present, except while waiting for four bytes.
  assign rx_rd = !rx_empty && (state != P_WAIT4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= P_IDLE;
      cfg        <= '0;
      go         <= 1'b0;
      sync_reset <= 1'b0;
    end else begin
      go         <= 1'b0;
      sync_reset <= 1'b0;
      case (state)
        P_IDLE: if (rx_rd) begin
          if (rx_data == START_BYTE)      state <= P_WAIT4;
          else if (rx_data == RESET_BYTE) sync_reset <= 1'b1;
        end
        P_WAIT4: if (rx_count >= CW'(4)) state <= P_STEP_HI;
        P_STEP_HI: if (rx_rd) begin
          cfg.step[15:8] <= rx_data;
          state <= P_STEP_LO;
        end
        P_STEP_LO: if (rx_rd) begin
          cfg.step[7:0] <= rx_data;
          state <= P_POINTS;
        end
        P_POINTS: if (rx_rd) begin
          case (rx_data)
            8'd64:   cfg.pts <= PTS_64;
            8'd128:  cfg.pts <= PTS_128;
            default: cfg.pts <= PTS_32;
          endcase
          state <= P_MODE;
        end
        P_MODE: if (rx_rd) begin
          cfg.mode       <= sweep_mode_e'(rx_data[1:0]);
          cfg.rg2_ground <= rx_data[2];
          go    <= 1'b1;
          state <= P_BUSY;
        end
        P_BUSY: begin
          if (rx_rd && rx_data == RESET_BYTE) sync_reset <= 1'b1;
          if (sweep_done) state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
