// dac_serial: serial-interface master for the four-channel 16-bit grid DAC.
//
// The grid voltages are set by a 16-bit, four-channel DAC whose serial port
// is clocked straight from the 10 MHz system clock; data change on the
// falling edge of the clock, chip select is low only while a command is
// sent, and one command takes about 2.8 us. Those facts follow the
// instrument description. The 24-bit frame {command, address, value} with
// command code 4'b0011 ("write to and update channel n") is the usual frame
// of such quad 16-bit DACs and is this design's choice, as is the exact
// 28-cycle budget that produces the 2.8 us.
//
// Interface: pulse 'start' for one clock with 'chan' and 'value' valid.
// 'busy' is high until 'done' pulses, CYCLES (28) clocks after 'start'.
// Starts while busy are ignored.
// Timing: cs_n, sdi and the clock enable change on the falling edge of clk.
// dac_sck is clk gated by that enable, so it shows exactly 24 rising edges
// and the DAC samples each bit on a rising edge, half a period after it
// changed. Bits go MSB first.
module dac_serial #(
  parameter int unsigned CYCLES = 28,   // start-to-done, >= 26
  parameter logic [3:0]  CMD    = 4'b0011
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  chan,
  input  logic [15:0] value,
  output logic        busy,
  output logic        done,
  output logic        dac_cs_n,
  output logic        dac_sck,
  output logic        dac_sdi
);

  localparam int unsigned NBITS = 24;

  logic [4:0]  cyc;         // 0 = idle, 1..CYCLES while a command runs
  logic [23:0] word;
  logic        sck_en;

  assign busy = (cyc != '0);
  assign done = (cyc == 5'(CYCLES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc  <= '0;
      word <= '0;
    end else if (!busy) begin
      if (start) begin
        cyc  <= 5'd1;
        word <= {CMD, chan, value};
      end
    end else if (done) begin
      cyc <= '0;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end

  // Serial lines launched on the falling edge.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_cs_n <= 1'b1;
      dac_sdi  <= 1'b0;
      sck_en   <= 1'b0;
    end else begin
      if (cyc >= 5'd1 && cyc <= 5'(NBITS)) begin
        dac_cs_n <= 1'b0;
        sck_en   <= 1'b1;
        dac_sdi  <= word[5'(NBITS) - cyc];
      end else begin
        dac_cs_n <= 1'b1;
        sck_en   <= 1'b0;
        dac_sdi  <= 1'b0;
      end
    end
  end

  assign dac_sck = clk & sck_en;

endmodule
