// tb_sweep_engine: self-checking test of the per-point sweep sequence, run
// with short settle times and small oversampling ratios (OVS 8/4/2 for
// 32/64/128 points, waits 60/40 clocks) so that every mode and point count
// can be covered.
// Testbench converters: the DAC answers 28 clocks after a start, the ADC
// 108 clocks after a start with a random current code on channel 0 and a
// code tied to the point number on channel 1. For each point the test
// checks: RG1 written first with the expected code (k*step, step, or the
// smart-table entry k*128/points computed here from the table's formula),
// then RG2 with the same code or 0; at least WAIT clocks from the end of
// the second DAC write to the first current conversion; exactly OVS
// current conversions; the averaged current word equal to the floor of the
// mean of the codes the ADC returned; the grid-voltage word equal to the
// channel-1 code; and the number of points.
module tb_sweep_engine;
  import rpa_pkg::*;
  localparam int OVS32 = 8, OVS64 = 4, OVS128 = 2, WL = 60, W128 = 40;
  logic clk = 0, rst_n = 1, start = 0;
  sweep_cfg_t cfg;
  logic busy, done;
  logic [7:0] point;
  logic dac_start; logic [3:0] dac_chan; logic [15:0] dac_value; logic dac_done = 0;
  logic adc_start; logic [1:0] adc_chan; logic adc_done = 0; logic [15:0] adc_data = 0;
  logic [6:0] rom_addr; logic [15:0] rom_data;
  logic word_valid; logic [15:0] word; logic word_ready = 1;
  int checks = 0, failures = 0;
  int cyc = 0;

  sweep_engine #(.OVS_32(OVS32), .OVS_64(OVS64), .OVS_128(OVS128),
                 .WAIT_LONG(WL), .WAIT_128(W128)) dut (.*);
  smart_rom rom (.clk, .addr(rom_addr), .data(rom_data));
  always #50 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // converter responders and event logs
  int dac_cnt = -1, adc_cnt = -1;
  logic [1:0] adc_ch_q;
  typedef struct { int ch; int val; int t; } dac_ev_t;
  dac_ev_t dac_log [$];
  int dac_done_t [$];
  int cur_sum, cur_n, first_cur_t;
  logic [15:0] words [$];
  always @(posedge clk) begin
    cyc++;
    dac_done <= 0;
    adc_done <= 0;
    if (dac_start) begin
      check(dac_cnt < 0, "DAC start while busy");
      dac_log.push_back('{int'(dac_chan), int'(dac_value), cyc});
      dac_cnt = 26;
    end else if (dac_cnt > 0) dac_cnt--;
    else if (dac_cnt == 0) begin dac_done <= 1; dac_cnt = -1; dac_done_t.push_back(cyc); end
    if (adc_start) begin
      check(adc_cnt < 0, "ADC start while busy");
      adc_ch_q = adc_chan;
      adc_cnt = 106;
      if (adc_chan == 2'd0 && cur_n == 0) first_cur_t = cyc;
    end else if (adc_cnt > 0) adc_cnt--;
    else if (adc_cnt == 0) begin
      logic [15:0] v;
      v = (adc_ch_q == 2'd0) ? 16'($urandom) : 16'(16'hC000 + point);
      if (adc_ch_q == 2'd0) begin cur_sum += int'(v); cur_n++; end
      adc_done <= 1; adc_data <= v; adc_cnt = -1;
    end
    if (rst_n && word_valid && word_ready) words.push_back(word);
  end

  function automatic int smart_ref(int i);
    real u;
    u = (2.0 * i - 127.0) / 127.0;
    return int'($floor(32768.0 + 32767.0 * (0.2 * u + 0.8 * u * u * u) + 0.5));
  endfunction

  function automatic bit near(int a, int b);
    return (a - b <= 1) && (b - a <= 1);
  endfunction

  task automatic sweep(logic [15:0] step, pts_sel_e pts, sweep_mode_e mode, bit rg2g, bit stall);
    int np, ovs, wt, stride, lin;
    np  = (pts == PTS_64) ? 64 : (pts == PTS_128) ? 128 : 32;
    ovs = (pts == PTS_64) ? OVS64 : (pts == PTS_128) ? OVS128 : OVS32;
    wt  = (pts == PTS_128) ? W128 : WL;
    stride = 128 / np;
    lin = 0;
    @(negedge clk);
    cfg = '{step: step, pts: pts, mode: mode, rg2_ground: rg2g};
    start = 1;
    @(negedge clk) start = 0;
    for (int k = 0; k < np; k++) begin
      int exp_v, avg;
      dac_log.delete(); dac_done_t.delete(); words.delete();
      cur_sum = 0; cur_n = 0;
      while (words.size() < 2) begin
        @(negedge clk);
        if (stall) word_ready = ($urandom_range(0, 2) == 0);
      end
      word_ready = 1;
      case (mode)
        MODE_CONSTANT: exp_v = int'(step);
        MODE_SMART:    exp_v = smart_ref(k * stride);
        default:       exp_v = lin;
      endcase
      lin = (lin + int'(step)) % 65536;
      avg = cur_sum / ovs;
      check(dac_log.size() == 2, "two DAC writes per point");
      if (dac_log.size() == 2) begin
        check(dac_log[0].ch == 0 && dac_log[1].ch == 1, "RG1 then RG2");
        if (mode == MODE_SMART) check(near(dac_log[0].val, exp_v),
            $sformatf("smart point %0d code %0d expected %0d", k, dac_log[0].val, exp_v));
        else check(dac_log[0].val == exp_v, $sformatf("point %0d code %0d expected %0d", k, dac_log[0].val, exp_v));
        check(dac_log[1].val == (rg2g ? 0 : dac_log[0].val), "RG2 code");
      end
      if (dac_done_t.size() == 2) check(first_cur_t - dac_done_t[1] >= wt, "settle wait");
      check(cur_n == ovs, $sformatf("oversampling %0d", cur_n));
      check(words.size() == 2 && int'(words[0]) == avg, "averaged current word");
      check(words.size() == 2 && words[1] == 16'(16'hC000 + k), "grid voltage word");
    end
    repeat (3) @(negedge clk);
    check(!busy, "idle after the last point");
  endtask

  int n_done = 0;
  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    sweep(16'd2048, PTS_32,  MODE_LINEAR,   0, 0);
    sweep(16'd512,  PTS_128, MODE_LINEAR,   1, 0);
    sweep(16'd4000, PTS_64,  MODE_LINEAR,   0, 1);   // wraps past 0xFFFF
    sweep(16'h3B05, PTS_64,  MODE_CONSTANT, 1, 0);
    sweep(16'h1000, PTS_32,  MODE_CONSTANT, 0, 0);
    sweep(16'h0000, PTS_128, MODE_SMART,    0, 1);
    sweep(16'h0000, PTS_64,  MODE_SMART,    1, 0);
    sweep(16'h0000, PTS_32,  MODE_SMART,    0, 0);
    sweep(16'd1000, PTS_32,  MODE_RESERVED, 0, 0);
    check(n_done == 9, "one done per sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
