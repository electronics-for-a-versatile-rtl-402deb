// hk_sampler: housekeeping acquisition done once before every sweep.
//
// Following the instrument description: the FPGA drives the four select
// lines of the 16-input analog multiplexer through addresses 0..7 (inputs
// S1..S8: temperature 1, 2, 3, daughter-board temperature, 15 V, 5 V and
// 3.3 V monitors, second retarding grid), waits SETTLE clocks (34 us) after
// each change so the buffer behind the multiplexer settles, and converts
// ADC channel 3. After the eight, it converts ADC channel 2, the
// suppressor grid. Each result is handed on as a 16-bit word, nine in all,
// in that order; the whole sequence takes about 373 us at 10 MHz.
// This design's choice: the next settle period starts only once the word
// has been accepted ('word_ready'), so a full transmit path stalls the
// sequence instead of losing a sample.
//
// Interface: 'start' pulse; ADC request port (adc_start/adc_chan, result on
// adc_done/adc_data); word output with valid/ready; 'done' pulses after the
// ninth word is accepted. mux_addr keeps its last value between runs.
module hk_sampler
  import rpa_pkg::*;
#(
  parameter int unsigned SETTLE = 340,    // 34 us at 10 MHz
  parameter int unsigned N_MUX  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [3:0]  mux_addr,
  output logic        adc_start,
  output logic [1:0]  adc_chan,
  input  logic        adc_done,
  input  logic [15:0] adc_data,
  output logic        word_valid,
  output logic [15:0] word,
  input  logic        word_ready
);

  typedef enum logic [2:0] {H_IDLE, H_SETTLE, H_CONV, H_WAITADC, H_SEND} hstate_e;

  hstate_e     state;
  logic [$clog2(SETTLE+1)-1:0] cnt;
  logic [3:0]  idx;         // 0..N_MUX-1 mux inputs, N_MUX = suppressor
  logic        last;

  assign busy       = (state != H_IDLE);
  assign word_valid = (state == H_SEND);
  assign adc_start  = (state == H_CONV);
  assign adc_chan   = (idx == 4'(N_MUX)) ? ADC_CH_SUPP : ADC_CH_HK;
  assign last       = (idx == 4'(N_MUX));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= H_IDLE;
      cnt      <= '0;
      idx      <= '0;
      mux_addr <= '0;
      word     <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        H_IDLE: if (start) begin
          idx      <= '0;
          mux_addr <= '0;
          cnt      <= '0;
          state    <= H_SETTLE;
        end
        H_SETTLE: begin
          if (cnt == ($bits(cnt))'(SETTLE - 1)) state <= H_CONV;
          else cnt <= cnt + 1'b1;
        end
        H_CONV: state <= H_WAITADC;
        H_WAITADC: if (adc_done) begin
          word  <= adc_data;
          state <= H_SEND;
        end
        H_SEND: if (word_ready) begin
          if (last) begin
            state <= H_IDLE;
            done  <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
            cnt <= '0;
            if (idx + 1'b1 == 4'(N_MUX)) begin
              state <= H_CONV;           // suppressor: no mux settle
            end else begin
              mux_addr <= idx + 1'b1;
              state    <= H_SETTLE;
            end
          end
        end
        default: state <= H_IDLE;
      endcase
    end
  end

endmodule
