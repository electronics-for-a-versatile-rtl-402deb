// tb_adc_serial: self-checking test of the ADC serial master.
// A behavioural ADC (adc_model) answers each frame with a per-channel value.
// For every channel and random values the master must return the model's
// value, the model must see the right channel code and exactly 25 SCK
// clocks, 'done' must come exactly 108 clocks (10.8 us) after 'start', and
// SCK must run at clk/4 (2.5 MHz).
module tb_adc_serial;
  logic clk = 0, rst_n = 1;
  logic start = 0;
  logic [1:0] chan = 0;
  logic busy, done;
  logic [15:0] data;
  logic adc_cs_n, adc_sck, adc_din, adc_dout;
  logic [15:0] vals [4];
  int conv_count [4];
  logic [1:0] last_chan;
  int frame_errors;
  int checks = 0, failures = 0;

  adc_serial dut (.*);
  adc_model adc (.cs_n(adc_cs_n), .sck(adc_sck), .din(adc_din), .dout(adc_dout),
                 .vals, .jitter(1'b0), .conv_count, .last_chan, .frame_errors);
  always #50 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  realtime t_rise [$];
  always @(posedge adc_sck) t_rise.push_back($realtime);

  initial begin
    vals[0] = 16'h1111; vals[1] = 16'h2222; vals[2] = 16'h0; vals[3] = 16'hFFFF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 24; k++) begin
      int n;
      logic [1:0] ch;
      ch = 2'(k % 4);
      if (k >= 4) vals[ch] = 16'($urandom);
      t_rise.delete();
      @(negedge clk);
      start = 1; chan = ch;
      @(negedge clk);
      start = 0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      check(n == 108, $sformatf("start-to-done %0d clocks", n));
      check(data == vals[ch], $sformatf("data %h expected %h", data, vals[ch]));
      @(negedge clk);
      check(adc_cs_n && !busy, "idle after done");
      check(last_chan == ch, "channel code");
      check(t_rise.size() == 25, "25 SCK clocks");
      if (t_rise.size() > 1) check(t_rise[1] - t_rise[0] == 400.0, "SCK period 400 ns");
    end
    check(frame_errors == 0, "no bad frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
