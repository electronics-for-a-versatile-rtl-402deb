// uart_mon: testbench UART receiver (8N1, LSB first).
//
// Watches 'line' in simulation time: on a falling edge it waits half a bit,
// confirms the start bit, then samples eight data bits and the stop bit one
// bit period (BIT_NS) apart. Each good byte is pushed on 'q' and counted;
// a bad stop bit is counted in 'errors'.
module uart_mon #(
  parameter real BIT_NS = 8700.0
) (
  input  logic line
);
  logic [7:0] q [$];
  int         errors = 0;
  logic [7:0] b;

  initial begin
    forever begin
      @(negedge line);
      #(BIT_NS / 2.0);
      if (line == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          #(BIT_NS);
          b[i] = line;
        end
        #(BIT_NS);
        if (line) q.push_back(b);
        else errors++;
      end
    end
  end
endmodule
