// tb_reset_sync: self-checking test of the reset merger.
// Checks: asynchronous assertion of rst_n as soon as arst_n falls (between
// clock edges); release exactly STAGES (2) rising edges after arst_n rises;
// a one-clock soft_req asserts rst_n at the next edge and releases it two
// edges later; rst_n stays high otherwise.
module tb_reset_sync;
  logic clk = 0, arst_n = 1, soft_req = 0, rst_n;
  int checks = 0, failures = 0;

  reset_sync dut (.*);
  always #50 clk = ~clk;
  initial #1 arst_n = 0;  // a real falling edge applies the asynchronous reset

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(!rst_n, "in reset");
    for (int k = 0; k < 5; k++) begin
      @(negedge clk) arst_n = 1;
      @(posedge clk); #1 check(!rst_n, "held one edge");
      @(posedge clk); #1 check(rst_n, "released after two edges");
      repeat (3) @(posedge clk);
      #1 check(rst_n, "stays released");
      #7 arst_n = 0;
      #1 check(!rst_n, "asynchronous assertion");
      @(posedge clk);
    end
    @(negedge clk) arst_n = 1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 5; k++) begin
      @(negedge clk) soft_req = 1;
      #1 check(rst_n, "no effect before the edge");
      @(posedge clk); #1 check(!rst_n, "soft reset asserted");
      @(negedge clk) soft_req = 0;
      @(posedge clk); #1 check(!rst_n, "soft reset held");
      @(posedge clk); #1 check(rst_n, "soft reset released");
      repeat (2) @(posedge clk);
    end
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
