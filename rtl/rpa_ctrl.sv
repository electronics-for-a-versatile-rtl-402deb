// rpa_ctrl: the instrument's sequencer.
//
// One sweep per command: the command parser waits for the start byte and
// the four command bytes; the housekeeping sampler then reads the nine
// housekeeping values; the sweep engine then runs the configured number of
// points; finally the parser is released to look for the next start byte.
// Because a sweep is only made when a command arrives, the host sets the
// duty cycle by how often it sends commands (once per second in flight).
//
// Shared resources handled here:
//  * the ADC request port goes to the housekeeping sampler while it runs
//    and to the sweep engine otherwise (they never run together);
//  * every 16-bit result word is written to the transmit FIFO as two bytes,
//    most significant byte first (byte order is this design's choice),
//    holding off the producer while the FIFO is full.
// Downlink stream per command: 9 housekeeping words (18 bytes), then for
// each point the averaged current word and the grid-voltage word (4 bytes).
//
// 'sync_reset' is a one-clock request for a full system reset; the caller
// feeds it back into the reset logic. 'sweeping' is high from the end of
// the command bytes until the last point has been sent.
module rpa_ctrl
  import rpa_pkg::*;
#(
  parameter int unsigned FIFO_CW   = 8,
  parameter int unsigned OVS_32    = 1024,
  parameter int unsigned OVS_64    = 512,
  parameter int unsigned OVS_128   = 128,
  parameter int unsigned WAIT_LONG = 120_000,
  parameter int unsigned WAIT_128  = 63_500,
  parameter int unsigned HK_SETTLE = 340
) (
  input  logic               clk,
  input  logic               rst_n,
  // receive FIFO read side
  input  logic [7:0]         rx_data,
  input  logic               rx_empty,
  input  logic [FIFO_CW-1:0] rx_count,
  output logic               rx_rd,
  // transmit FIFO write side
  output logic               tx_wr,
  output logic [7:0]         tx_data,
  input  logic               tx_full,
  // DAC master
  output logic               dac_start,
  output logic [3:0]         dac_chan,
  output logic [15:0]        dac_value,
  input  logic               dac_done,
  // ADC master
  output logic               adc_start,
  output logic [1:0]         adc_chan,
  input  logic               adc_done,
  input  logic [15:0]        adc_data,
  // housekeeping multiplexer select
  output logic [3:0]         mux_addr,
  // status
  output logic               sweeping,
  output sweep_cfg_t         cfg,
  output logic [7:0]         point,
  output logic               sync_reset
);

  logic       go, hk_busy, hk_done, sw_busy, sw_done, sweep_done;
  logic       hk_adc_start, sw_adc_start;
  logic [1:0] hk_adc_chan, sw_adc_chan;
  logic       hk_wv, sw_wv, hk_wr, sw_wr;
  logic [15:0] hk_w, sw_w;
  logic [6:0] rom_addr;
  logic [15:0] rom_data;

  // packer
  logic        pk_full;        // a word is held
  logic        pk_lo;          // next byte is the low byte
  logic [15:0] pk_word;
  logic        word_ready;

  cmd_parser #(.CW(FIFO_CW)) u_parser (
    .clk, .rst_n, .rx_data, .rx_empty, .rx_count, .rx_rd,
    .sweep_done, .go, .cfg, .sync_reset
  );

  hk_sampler #(.SETTLE(HK_SETTLE)) u_hk (
    .clk, .rst_n, .start(go), .busy(hk_busy), .done(hk_done), .mux_addr,
    .adc_start(hk_adc_start), .adc_chan(hk_adc_chan), .adc_done, .adc_data,
    .word_valid(hk_wv), .word(hk_w), .word_ready(hk_wr)
  );

  sweep_engine #(
    .OVS_32(OVS_32), .OVS_64(OVS_64), .OVS_128(OVS_128),
    .WAIT_LONG(WAIT_LONG), .WAIT_128(WAIT_128)
  ) u_sweep (
    .clk, .rst_n, .start(hk_done), .cfg, .busy(sw_busy), .done(sw_done), .point,
    .dac_start, .dac_chan, .dac_value, .dac_done,
    .adc_start(sw_adc_start), .adc_chan(sw_adc_chan), .adc_done, .adc_data,
    .rom_addr, .rom_data,
    .word_valid(sw_wv), .word(sw_w), .word_ready(sw_wr)
  );

  smart_rom u_rom (.clk, .addr(rom_addr), .data(rom_data));

  assign adc_start  = hk_busy ? hk_adc_start : sw_adc_start;
  assign adc_chan   = hk_busy ? hk_adc_chan  : sw_adc_chan;
  assign sweep_done = sw_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sweeping <= 1'b0;
    else if (go) sweeping <= 1'b1;
    else if (sw_done) sweeping <= 1'b0;
  end

  // Word-to-byte packer
  assign word_ready = !pk_full;
  assign hk_wr      = word_ready;
  assign sw_wr      = word_ready && !hk_wv;
  assign tx_wr      = pk_full && !tx_full;
  assign tx_data    = pk_lo ? pk_word[7:0] : pk_word[15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pk_full <= 1'b0;
      pk_lo   <= 1'b0;
      pk_word <= '0;
    end else if (!pk_full) begin
      if (hk_wv) begin
        pk_word <= hk_w;
        pk_full <= 1'b1;
        pk_lo   <= 1'b0;
      end else if (sw_wv) begin
        pk_word <= sw_w;
        pk_full <= 1'b1;
        pk_lo   <= 1'b0;
      end
    end else if (!tx_full) begin
      if (pk_lo) pk_full <= 1'b0;
      pk_lo <= !pk_lo;
    end
  end

  // The two producers are sequential; they must never overlap.
  a_one_producer: assert property (@(posedge clk) disable iff (!rst_n) !(hk_busy && sw_busy));

endmodule
