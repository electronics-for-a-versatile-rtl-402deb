// tb_uart_rx: self-checking test of the UART receiver at 10 MHz / 115200.
// Bytes are bit-banged with an ideal bit period of 1e9/115200 ns (slightly
// different from the receiver's 87-clock period, as on a real link); every
// byte must come out once, unchanged. A frame with a low stop bit must give
// frame_err and no byte, and the next good frame must be received.
module tb_uart_rx;
  logic clk = 0, rst_n = 1, rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  logic [7:0] last;
  localparam real BIT = 1.0e9 / 115200.0;

  uart_rx dut (.*);
  always #50 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset

  always @(posedge clk) if (rst_n) begin
    if (valid) begin nvalid++; last = data; end
    if (frame_err) nerr++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(logic [7:0] b, bit stop);
    rxd = 0; #(BIT);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(BIT); end
    rxd = stop;
    #(BIT);
    rxd = 1; #(BIT);
  endtask

  initial begin
    #300 rst_n = 1;
    #1000;
    for (int k = 0; k < 40; k++) begin
      logic [7:0] b;
      int n_before;
      b = (k < 4) ? 8'(k * 85) : 8'($urandom);
      n_before = nvalid;
      send(b, 1);
      check(nvalid == n_before + 1, "one byte per frame");
      check(last == b, "byte value");
    end
    begin
      int before_v, before_e;
      before_v = nvalid;
      before_e = nerr;
      send(8'h3C, 0);
      #(BIT * 2);
      check(nvalid == before_v, $sformatf("no byte on framing error %0d %0d %h", nvalid, before_v, last));
      check(nerr == before_e + 1, "frame_err pulse");
    end
    send(8'hA5, 1);
    check(last == 8'hA5, "recovers after framing error");
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
