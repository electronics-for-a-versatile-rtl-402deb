// tb_dac_serial: self-checking test of the DAC serial master.
// A behavioural DAC (dac_model) decodes the serial frames. For random
// channels and values the DAC must receive exactly that update with the
// write-and-update command, 'done' must come exactly 28 clocks (2.8 us)
// after 'start', chip select must be low for 24 SCK edges only, and SDI must
// be stable at every rising SCK (it changes only on falling clk edges).
module tb_dac_serial;
  logic clk = 0, rst_n = 1;
  logic start = 0;
  logic [3:0] chan = 0;
  logic [15:0] value = 0;
  logic busy, done, dac_cs_n, dac_sck, dac_sdi;
  logic [15:0] out [4];
  int updates, frame_errors;
  logic [3:0] last_addr;
  int checks = 0, failures = 0;

  dac_serial dut (.*);
  dac_model dac (.cs_n(dac_cs_n), .sck(dac_sck), .sdi(dac_sdi), .out, .updates,
                 .frame_errors, .last_addr);
  always #50 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // SDI must not change while SCK is high
  always @(dac_sdi) if (dac_sck) begin
    failures++;
    $display("FAIL sdi changed while sck high at %0t", $time);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      int n, u0;
      logic [3:0] ch;
      logic [15:0] v;
      ch = (k < 2) ? 4'(k) : 4'($urandom_range(0, 3));
      v  = (k == 2) ? 16'hFFFF : (k == 3) ? 16'd15109 : 16'($urandom);
      u0 = updates;
      @(negedge clk);
      start = 1; chan = ch; value = v;
      @(negedge clk);
      start = 0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      check(n == 28, $sformatf("start-to-done %0d clocks", n));
      @(negedge clk);
      check(!busy, "idle after done");
      check(updates == u0 + 1, "one DAC update");
      check(out[ch[1:0]] == v, "DAC value");
      check(last_addr == ch, "DAC channel");
      repeat ($urandom_range(0, 5)) @(negedge clk);
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
