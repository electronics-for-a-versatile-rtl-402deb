// adc_serial: serial-interface master for the four-channel 16-bit ADC.
//
// The ADC is clocked at 2.5 MHz, the 10 MHz system clock divided by 4. The
// controller shifts out an 8-bit command that names the channel, then gives
// 17 more ADC clocks in which the converter samples and shifts out its
// 16-bit result; chip select is low for the whole conversion, which lasts
// about 10.8 us. Those facts follow the instrument description.
// This design's choices: the command byte layout {S=1, A2..A0, 0, SGL=1,
// PD1..PD0} with the channel code table below (that of a common 4-channel
// 16-bit serial ADC), one ADC clock period of chip-select setup before the
// first clock and one after the last, giving 27 periods = 108 system clocks.
//
// Frame, in ADC clock periods p (4 system clocks each, SCK high in the
// second half): p=0 setup; p=1..8 command bits MSB first, changed while
// SCK is low and sampled by the ADC on SCK rising; p=9 converter busy;
// p=10..25 result bits D15..D0, which the ADC changes after SCK falls and
// this module samples while SCK is high; p=26 hold, then cs_n rises.
// Interface: pulse 'start' with 'chan'; 'done' pulses with 'data' valid
// exactly 108 clocks later ('done' is sampled on the 108th rising edge
// after the one that took 'start'); 'busy' clears one clock after 'done'.
// Starts while busy are ignored.
module adc_serial #(
  parameter int unsigned CLK_DIV = 4,          // system clocks per ADC clock
  parameter logic [1:0]  PD      = 2'b00
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  chan,
  output logic        busy,
  output logic        done,
  output logic [15:0] data,
  output logic        adc_cs_n,
  output logic        adc_sck,
  output logic        adc_din,
  input  logic        adc_dout
);

  localparam int unsigned PERIODS = 27;
  localparam int unsigned TOTAL   = PERIODS * CLK_DIV;
  localparam int unsigned CW      = $clog2(TOTAL + 1);
  localparam int unsigned HALF    = CLK_DIV / 2;

  logic [CW-1:0] cyc, cyc_nx;
  logic          busy_nx;
  logic [7:0]    cmd;
  logic [15:0]   shreg;

  function automatic logic [2:0] chan_code(logic [1:0] c);
    case (c)
      2'd0: return 3'b001;
      2'd1: return 3'b101;
      2'd2: return 3'b010;
      default: return 3'b110;
    endcase
  endfunction

  always_comb begin
    busy_nx = busy;
    cyc_nx  = cyc;
    if (!busy) begin
      if (start) begin
        busy_nx = 1'b1;
        cyc_nx  = '0;
      end
    end else if (cyc == CW'(TOTAL - 1)) begin
      busy_nx = 1'b0;
      cyc_nx  = '0;
    end else begin
      cyc_nx = cyc + 1'b1;
    end
  end

  // ADC clock period index and phase of the current and next count
  int unsigned p_nx, ph_nx, p, ph;
  always_comb begin
    p_nx  = int'(cyc_nx) / CLK_DIV;
    ph_nx = int'(cyc_nx) % CLK_DIV;
    p     = int'(cyc) / CLK_DIV;
    ph    = int'(cyc) % CLK_DIV;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cyc      <= '0;
      cmd      <= '0;
      shreg    <= '0;
      data     <= '0;
      done     <= 1'b0;
      adc_cs_n <= 1'b1;
      adc_sck  <= 1'b0;
      adc_din  <= 1'b0;
    end else begin
      busy <= busy_nx;
      cyc  <= cyc_nx;
      done <= 1'b0;
      if (!busy && start)
        cmd <= {1'b1, chan_code(chan), 1'b0, 1'b1, PD};

      // Serial outputs, registered from the next count
      adc_cs_n <= !busy_nx;
      adc_sck  <= busy_nx && p_nx >= 1 && p_nx <= 25 && ph_nx >= HALF;
      if (busy_nx && p_nx >= 1 && p_nx <= 8)
        adc_din <= cmd[8 - p_nx];
      else
        adc_din <= 1'b0;

      // Result bits sampled in the last phase of each high SCK half
      if (busy && p >= 10 && p <= 25 && ph == CLK_DIV - 1)
        shreg <= {shreg[14:0], adc_dout};

      // Result handed over one clock before the frame ends, so that
      // start-to-done is exactly TOTAL clocks; busy clears on the next one.
      if (busy && cyc == CW'(TOTAL - 2)) begin
        data <= shreg;
        done <= 1'b1;
      end
    end
  end

endmodule
