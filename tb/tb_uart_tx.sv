// tb_uart_tx: self-checking test of the UART transmitter at 10 MHz / 115200.
// A queue stands in for the transmit FIFO; the line is decoded by uart_mon
// and every byte must arrive in order. Each frame must last exactly
// 10 * 87 clocks (start bit to end of stop bit); queued frames follow
// each other with a single idle clock between them.
module tb_uart_tx;
  logic clk = 0, rst_n = 1;
  logic avail;
  logic [7:0] data;
  logic take, txd, busy;
  logic [7:0] src [$];
  logic [7:0] sent [$];
  int checks = 0, failures = 0;

  uart_tx dut (.*);
  uart_mon #(.BIT_NS(8700.0)) mon (.line(txd));
  always #50 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset

  assign avail = src.size() != 0;
  assign data  = avail ? src[0] : 8'h00;
  always @(posedge clk) if (rst_n && take) sent.push_back(src.pop_front());

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // busy high-time per frame, in clocks
  int busy_len = 0;
  int frame_lens [$];
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_len++;
    else if (busy_len != 0) begin frame_lens.push_back(busy_len); busy_len = 0; end
  end

  initial begin
    #300 rst_n = 1;
    #1000;
    src.push_back(8'h55);
    wait (sent.size() == 1);
    wait (!busy);
    #20000;
    for (int i = 0; i < 20; i++) src.push_back(8'($urandom));
    wait (src.size() == 0);
    wait (!busy);
    #20000;
    check(mon.q.size() == sent.size(), "byte count on line");
    for (int i = 0; i < sent.size() && i < mon.q.size(); i++)
      check(mon.q[i] == sent[i], "byte value");
    check(mon.errors == 0, "stop bits");
    // every frame keeps busy high for exactly 870 clocks
    check(frame_lens.size() == 21, "21 frames");
    foreach (frame_lens[i]) check(frame_lens[i] == 870, "frame length 870 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
