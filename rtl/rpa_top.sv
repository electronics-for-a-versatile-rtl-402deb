// rpa_top: FPGA design of a CubeSat retarding potential analyzer (RPA).
//
// The RPA sweeps the voltage of a retarding grid in front of a collector
// plate and measures the ion current that gets through at each voltage;
// the resulting current-voltage curve gives ion density, temperature and
// drift speed. This FPGA receives a five-byte command over a 115200-baud
// UART, reads nine housekeeping values, and then steps the grid DAC
// through 32, 64 or 128 points (linear, constant or "smart" spacing),
// averaging 1024, 512 or 128 log-amplifier current samples per point, and
// sends every result back over the UART.
//
// Blocks: uart_rx -> 128-byte receive FIFO -> rpa_ctrl (cmd_parser,
// hk_sampler, sweep_engine, smart_rom, byte packer) -> 128-byte transmit
// FIFO -> uart_tx; dac_serial drives the grid DAC, adc_serial the ADC;
// reset_sync merges the power-on reset and the reset command.
// Pins: uart_rxd/uart_txd to the isolated RS-422 transceiver, whose driver
// is enabled (rs422_de) while a byte is queued or being sent and whose
// receiver is always enabled (rs422_re_n low) - that enable policy is this
// design's choice. The 10 MHz clock, the baud rate, the FIFO depths, the
// converter timings and the sweep settings follow the instrument
// description; see the sub-blocks for their own choices.
// Clock: single clk (10 MHz). Reset: arst_n, active low, asynchronous.
module rpa_top
  import rpa_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 10_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned FIFO_DEPTH = 128,
  parameter int unsigned OVS_32     = 1024,
  parameter int unsigned OVS_64     = 512,
  parameter int unsigned OVS_128    = 128,
  parameter int unsigned WAIT_LONG  = 120_000,   // 12 ms
  parameter int unsigned WAIT_128   = 63_500,    // 6.35 ms
  parameter int unsigned HK_SETTLE  = 340        // 34 us
) (
  input  logic       clk,
  input  logic       arst_n,
  // UART via RS-422 transceiver
  input  logic       uart_rxd,
  output logic       uart_txd,
  output logic       rs422_de,
  output logic       rs422_re_n,
  // grid DAC
  output logic       dac_cs_n,
  output logic       dac_sck,
  output logic       dac_sdi,
  // ADC
  output logic       adc_cs_n,
  output logic       adc_sck,
  output logic       adc_din,
  input  logic       adc_dout,
  // housekeeping multiplexer
  output logic [3:0] mux_addr,
  // status
  output logic       rx_fifo_full,
  output logic       tx_fifo_full,
  output logic       sweeping,
  output logic       uart_frame_err
);

  localparam int unsigned FCW = $clog2(FIFO_DEPTH) + 1;

  logic        rst_n, sync_reset;
  logic [7:0]  rx_byte;
  logic        rx_valid;
  logic [7:0]  rxf_data, txf_in, txf_out;
  logic        rxf_empty, rxf_rd, txf_empty, txf_wr, txf_rd, tx_busy;
  logic [FCW-1:0] rxf_count, txf_count;
  logic        dac_start, dac_done, dac_busy;
  logic [3:0]  dac_chan;
  logic [15:0] dac_value;
  logic        adc_start, adc_done, adc_busy;
  logic [1:0]  adc_chan;
  logic [15:0] adc_data;
  sweep_cfg_t  cfg;
  logic [7:0]  point;

  reset_sync u_rst (.clk, .arst_n, .soft_req(sync_reset), .rst_n);

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_urx (
    .clk, .rst_n, .rxd(uart_rxd), .data(rx_byte), .valid(rx_valid),
    .frame_err(uart_frame_err)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n, .wr_en(rx_valid), .wr_data(rx_byte), .rd_en(rxf_rd),
    .rd_data(rxf_data), .full(rx_fifo_full), .empty(rxf_empty), .count(rxf_count)
  );

  rpa_ctrl #(
    .FIFO_CW(FCW), .OVS_32(OVS_32), .OVS_64(OVS_64), .OVS_128(OVS_128),
    .WAIT_LONG(WAIT_LONG), .WAIT_128(WAIT_128), .HK_SETTLE(HK_SETTLE)
  ) u_ctrl (
    .clk, .rst_n,
    .rx_data(rxf_data), .rx_empty(rxf_empty), .rx_count(rxf_count), .rx_rd(rxf_rd),
    .tx_wr(txf_wr), .tx_data(txf_in), .tx_full(tx_fifo_full),
    .dac_start, .dac_chan, .dac_value, .dac_done,
    .adc_start, .adc_chan, .adc_done, .adc_data,
    .mux_addr, .sweeping, .cfg, .point, .sync_reset
  );

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n, .wr_en(txf_wr), .wr_data(txf_in), .rd_en(txf_rd),
    .rd_data(txf_out), .full(tx_fifo_full), .empty(txf_empty), .count(txf_count)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_utx (
    .clk, .rst_n, .avail(!txf_empty), .data(txf_out), .take(txf_rd),
    .txd(uart_txd), .busy(tx_busy)
  );

  dac_serial u_dac (
    .clk, .rst_n, .start(dac_start), .chan(dac_chan), .value(dac_value),
    .busy(dac_busy), .done(dac_done), .dac_cs_n, .dac_sck, .dac_sdi
  );

  adc_serial u_adc (
    .clk, .rst_n, .start(adc_start), .chan(adc_chan), .busy(adc_busy),
    .done(adc_done), .data(adc_data), .adc_cs_n, .adc_sck, .adc_din, .adc_dout
  );

  assign rs422_de   = tx_busy || !txf_empty;
  assign rs422_re_n = 1'b0;

  // Requests are only issued to an idle converter.
  a_dac_idle: assert property (@(posedge clk) disable iff (!rst_n) dac_start |-> !dac_busy);
  a_adc_idle: assert property (@(posedge clk) disable iff (!rst_n) adc_start |-> !adc_busy);

endmodule
