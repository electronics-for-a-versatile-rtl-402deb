// rpa_pkg: types and constants shared by the RPA controller blocks.
//
// The start byte (0xAA), the mode field layout, the three point counts
// (32/64/128) and the ADC/DAC channel roles follow the command table and
// the housekeeping description of the instrument. The synchronous-reset
// byte value and the encoding used for an unsupported mode or point count
// are this design's own choices.
package rpa_pkg;

  // Uplinked command bytes
  localparam logic [7:0] START_BYTE = 8'hAA;  // 10101010
  localparam logic [7:0] RESET_BYTE = 8'h55;  // value chosen here

  // Mode byte bits 1:0
  typedef enum logic [1:0] {
    MODE_LINEAR   = 2'd0,  // step added at every point
    MODE_CONSTANT = 2'd1,  // "ion trap": grid held at the step value
    MODE_SMART    = 2'd2,  // pre-stored non-uniform voltages
    MODE_RESERVED = 2'd3   // treated as linear
  } sweep_mode_e;

  // Supported number of points per sweep
  typedef enum logic [1:0] {
    PTS_32  = 2'd0,
    PTS_64  = 2'd1,
    PTS_128 = 2'd2
  } pts_sel_e;

  // Configuration latched from the four bytes after the start byte
  typedef struct packed {
    logic [15:0] step;       // step size or constant voltage
    pts_sel_e    pts;        // 32, 64 or 128 points
    sweep_mode_e mode;       // mode byte bits 1:0
    logic        rg2_ground; // mode byte bit 2: 1 = RG2 held at 0 V
  } sweep_cfg_t;

  // ADC channels (4-channel converter)
  localparam logic [1:0] ADC_CH_CURRENT = 2'd0;  // log-amp output
  localparam logic [1:0] ADC_CH_RG      = 2'd1;  // retarding grid voltage
  localparam logic [1:0] ADC_CH_SUPP    = 2'd2;  // suppressor grid voltage
  localparam logic [1:0] ADC_CH_HK      = 2'd3;  // housekeeping mux output

  // DAC channels
  localparam logic [3:0] DAC_CH_RG1 = 4'd0;
  localparam logic [3:0] DAC_CH_RG2 = 4'd1;

  // Number of points for a point-count selection
  function automatic int unsigned pts_count(pts_sel_e p);
    case (p)
      PTS_64:  return 64;
      PTS_128: return 128;
      default: return 32;
    endcase
  endfunction

endpackage
