// sweep_engine: steps the retarding grid through one sweep and measures the
// collector current at every point.
//
// Per point, as the instrument description lays out:
//   1. write the new voltage to DAC channel 0 (RG1), then write DAC
//      channel 1 (RG2) with the same code, or with 0 when the mode byte
//      asks for RG2 to stay at ground;
//   2. wait for the log amplifier to settle: WAIT_LONG clocks (12 ms) for
//      32- and 64-point sweeps, WAIT_128 clocks (6.35 ms) for 128 points;
//   3. convert ADC channel 0 (current) OVS times back to back, summing the
//      16-bit codes, and divide the sum by OVS with a shift (OVS is 1024,
//      512 or 128 for 32, 64 or 128 points, always a power of two);
//   4. convert the grid-voltage channel once;
//   5. emit two words, the averaged current then the grid voltage.
// The voltage code for point k is k*step in linear mode (16-bit sum, wraps
// modulo 2^16), the step value itself in constant ("ion trap") mode, and
// smart-table entry k*(128/points) in smart mode.
// This design's choices: the grid-voltage channel is ADC channel 1 (see
// rpa_pkg), mode 3 behaves as linear, the grids are left at the last
// point's voltage after the sweep, and the engine waits for both words to
// be accepted before starting the next point.
//
// Interface: 'start' pulse with 'cfg'; DAC request port (dac_start, chan,
// value; dac_done); ADC request port; smart-table read port (rom_addr ->
// rom_data one clock later); word output with valid/ready; 'done' pulse at
// the end; 'point' is the index of the current point.
module sweep_engine
  import rpa_pkg::*;
#(
  parameter int unsigned OVS_32    = 1024,
  parameter int unsigned OVS_64    = 512,
  parameter int unsigned OVS_128   = 128,
  parameter int unsigned WAIT_LONG = 120_000,   // 12 ms at 10 MHz
  parameter int unsigned WAIT_128  = 63_500     // 6.35 ms at 10 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  sweep_cfg_t  cfg,
  output logic        busy,
  output logic        done,
  output logic [7:0]  point,
  // DAC
  output logic        dac_start,
  output logic [3:0]  dac_chan,
  output logic [15:0] dac_value,
  input  logic        dac_done,
  // ADC
  output logic        adc_start,
  output logic [1:0]  adc_chan,
  input  logic        adc_done,
  input  logic [15:0] adc_data,
  // smart table
  output logic [6:0]  rom_addr,
  input  logic [15:0] rom_data,
  // result words
  output logic        word_valid,
  output logic [15:0] word,
  input  logic        word_ready
);

  localparam int unsigned OVS_MAX = (OVS_32 > OVS_64) ? ((OVS_32 > OVS_128) ? OVS_32 : OVS_128)
                                                      : ((OVS_64 > OVS_128) ? OVS_64 : OVS_128);
  localparam int unsigned AW      = 16 + $clog2(OVS_MAX);
  localparam int unsigned WAIT_MAX = (WAIT_LONG > WAIT_128) ? WAIT_LONG : WAIT_128;
  localparam int unsigned TW      = $clog2(WAIT_MAX + 1);
  localparam int unsigned OW      = $clog2(OVS_MAX + 1);

  typedef enum logic [3:0] {
    W_IDLE, W_ROM, W_SET, W_DAC1, W_DAC2_GO, W_DAC2, W_WAIT,
    W_CUR_GO, W_CUR, W_RG_GO, W_RG, W_SEND_I, W_SEND_V
  } wstate_e;

  wstate_e     state;
  sweep_cfg_t  c;
  logic [15:0] lin_val;        // running sum for linear mode
  logic [15:0] val;            // code of the current point
  logic [7:0]  npts;
  logic [TW-1:0] tcnt;
  logic [OW-1:0] scnt;
  logic [AW-1:0] acc;
  logic [15:0] cur_avg, rg_v;
  logic [OW-1:0] ovs;
  logic [3:0]  shift;
  logic [TW-1:0] wait_len;

  always_comb begin
    case (c.pts)
      PTS_64:  begin ovs = OW'(OVS_64);  shift = 4'($clog2(OVS_64));  wait_len = TW'(WAIT_LONG); end
      PTS_128: begin ovs = OW'(OVS_128); shift = 4'($clog2(OVS_128)); wait_len = TW'(WAIT_128);  end
      default: begin ovs = OW'(OVS_32);  shift = 4'($clog2(OVS_32));  wait_len = TW'(WAIT_LONG); end
    endcase
  end

  // Smart-table index: point * (128 / points)
  always_comb begin
    case (c.pts)
      PTS_64:  rom_addr = {point[5:0], 1'b0};
      PTS_128: rom_addr = point[6:0];
      default: rom_addr = {point[4:0], 2'b00};
    endcase
  end

  assign busy       = (state != W_IDLE);
  assign dac_start  = (state == W_SET) || (state == W_DAC2_GO);
  assign dac_chan   = (state == W_SET) ? DAC_CH_RG1 : DAC_CH_RG2;
  assign dac_value  = (state == W_SET) ? val : (c.rg2_ground ? 16'h0000 : val);
  assign adc_start  = (state == W_CUR_GO) || (state == W_RG_GO);
  assign adc_chan   = (state == W_RG_GO) ? ADC_CH_RG : ADC_CH_CURRENT;
  assign word_valid = (state == W_SEND_I) || (state == W_SEND_V);
  assign word       = (state == W_SEND_V) ? rg_v : cur_avg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= W_IDLE;
      c       <= '0;
      lin_val <= '0;
      npts    <= '0;
      point   <= '0;
      tcnt    <= '0;
      scnt    <= '0;
      acc     <= '0;
      cur_avg <= '0;
      rg_v    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        W_IDLE: if (start) begin
          c       <= cfg;
          npts    <= 8'(pts_count(cfg.pts));
          point   <= '0;
          lin_val <= '0;
          state   <= W_ROM;
        end
        W_ROM: begin                    // rom_data valid next clock
          state <= W_SET;
        end
        W_SET: begin                    // dac_start for RG1 issued here
          state <= W_DAC1;
        end
        W_DAC1: if (dac_done) state <= W_DAC2_GO;
        W_DAC2_GO: state <= W_DAC2;
        W_DAC2: if (dac_done) begin
          tcnt  <= '0;
          state <= W_WAIT;
        end
        W_WAIT: begin
          if (tcnt == wait_len - 1'b1) begin
            acc   <= '0;
            scnt  <= '0;
            state <= W_CUR_GO;
          end else tcnt <= tcnt + 1'b1;
        end
        W_CUR_GO: state <= W_CUR;
        W_CUR: if (adc_done) begin
          acc  <= acc + AW'(adc_data);
          scnt <= scnt + 1'b1;
          if (scnt == ovs - 1'b1) state <= W_RG_GO;
          else                    state <= W_CUR_GO;
        end
        W_RG_GO: begin
          cur_avg <= 16'(acc >> shift);
          state   <= W_RG;
        end
        W_RG: if (adc_done) begin
          rg_v  <= adc_data;
          state <= W_SEND_I;
        end
        W_SEND_I: if (word_ready) state <= W_SEND_V;
        W_SEND_V: if (word_ready) begin
          lin_val <= lin_val + c.step;
          if (point == npts - 1'b1) begin
            state <= W_IDLE;
            done  <= 1'b1;
          end else begin
            point <= point + 1'b1;
            state <= W_ROM;
          end
        end
        default: state <= W_IDLE;
      endcase
    end
  end

  // Voltage code of the current point, settled by the W_SET cycle
  always_comb begin
    case (c.mode)
      MODE_CONSTANT: val = c.step;
      MODE_SMART:    val = rom_data;
      default:       val = lin_val;
    endcase
  end

endmodule
