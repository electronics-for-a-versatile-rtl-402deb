// tb_hk_sampler: self-checking test of the housekeeping sequence.
// A testbench ADC answers 'adc_start' after 108 clocks with a value that
// encodes the channel and the multiplexer address at the moment of the
// start, so the order of the nine words can be checked: mux inputs 0..7 on
// ADC channel 3, then channel 2 (suppressor). Also checked: at least SETTLE
// (340) clocks between each mux change and the conversion start, a word
// held back while word_ready is low, and the total run time close to the
// 373 us the instrument takes (3600..3800 clocks without back-pressure).
module tb_hk_sampler;
  logic clk = 0, rst_n = 1, start = 0;
  logic busy, done;
  logic [3:0] mux_addr;
  logic adc_start;
  logic [1:0] adc_chan;
  logic adc_done = 0;
  logic [15:0] adc_data = 0;
  logic word_valid;
  logic [15:0] word;
  logic word_ready = 1;
  int checks = 0, failures = 0;
  logic [15:0] words [$];
  int last_mux_change = 0, cyc = 0;
  logic [3:0] prev_mux = 0;
  int adc_cnt = -1;
  logic [15:0] adc_pending;

  hk_sampler dut (.*);
  always #50 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (mux_addr != prev_mux) last_mux_change = cyc;
    prev_mux = mux_addr;
    adc_done <= 0;
    if (adc_start) begin
      check(adc_cnt < 0, "start only when ADC idle");
      if (adc_chan == 2'd3)
        check(cyc - last_mux_change >= 340, $sformatf("settle %0d", cyc - last_mux_change));
      adc_pending = {4'hA, 2'b00, adc_chan, 4'h0, mux_addr};
      adc_cnt = 107;
    end else if (adc_cnt > 0) adc_cnt--;
    else if (adc_cnt == 0) begin
      adc_done <= 1; adc_data <= adc_pending; adc_cnt = -1;
    end
    if (rst_n && word_valid && word_ready) words.push_back(word);
  end

  task automatic run(bit stall);
    int t0, t1;
    words.delete();
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) begin
      @(negedge clk);
      if (stall) word_ready = ($urandom_range(0, 3) == 0);
    end
    word_ready = 1;
    t1 = cyc;
    check(words.size() == 9, "nine words");
    for (int i = 0; i < 8 && i < words.size(); i++)
      check(words[i] == {4'hA, 2'b00, 2'd3, 4'h0, 4'(i)}, $sformatf("word %0d = %h", i, words[i]));
    if (words.size() == 9) check(words[8][9:8] == 2'd2, "suppressor on channel 2 last");
    if (!stall) check(t1 - t0 >= 3600 && t1 - t0 <= 3800, $sformatf("run time %0d clocks", t1 - t0));
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0);
    run(1);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
