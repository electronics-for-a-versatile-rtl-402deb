// tb_smart_rom: self-checking test of the smart-sweep voltage table.
// Every entry is compared with the cubic law evaluated in floating point
// (u = (2i-127)/127, code = 32768 + 32767*(0.2*u + 0.8*u^3), allowed error 1 code for the
// integer truncation); the table must rise monotonically from 1 to 65535,
// and the step between neighbouring entries in the middle must be smaller
// than at the ends (points concentrated mid-range). Read latency: 1 clock.
module tb_smart_rom;
  logic clk = 0;
  logic [6:0] addr = 0;
  logic [15:0] data;
  logic [15:0] tbl [128];
  int checks = 0, failures = 0;

  smart_rom dut (.*);
  always #50 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) begin
      real x, e;
      @(negedge clk);
      addr = 7'(i);
      @(posedge clk); #1;
      tbl[i] = data;
      x = (2.0 * i - 127.0) / 127.0;
      e = 32768.0 + 32767.0 * (0.2 * x + 0.8 * x * x * x);
      check((real'(data) - e) <= 1.0 && (e - real'(data)) <= 1.0,
            $sformatf("entry %0d = %0d expected %f", i, data, e));
    end
    check(tbl[0] == 16'd1, "first entry");
    check(tbl[127] == 16'd65535, "last entry");
    for (int i = 1; i < 128; i++) check(tbl[i] > tbl[i-1], "monotonic");
    check((tbl[64] - tbl[63]) * 10 < (tbl[127] - tbl[126]), "dense in the middle");
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
