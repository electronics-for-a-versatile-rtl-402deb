// tb_sync_fifo: self-checking test of the byte FIFO.
// Random pushes and pops (including attempts to push when full and pop
// when empty) are mirrored in a queue; head data, count, full and empty are
// compared every cycle. A fill-to-full phase checks that the full flag rises
// at exactly DEPTH entries and that a further write is dropped.
module tb_sync_fifo;
  localparam int DEPTH = 128;
  logic clk = 0, rst_n = 1;
  logic wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic full, empty;
  logic [7:0] count;
  int checks = 0, failures = 0;
  logic [7:0] model [$];

  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  always #50 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic step(bit w, bit r, logic [7:0] d);
    wr_en = w; rd_en = r; wr_data = d;
    #1;
    check(count == 8'(model.size()), "count");
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == DEPTH), "full");
    if (model.size() != 0) check(rd_data == model[0], "head data");
    @(posedge clk);
    // model update mirrors the same-edge semantics
    begin
      bit did_rd = r && model.size() != 0;
      bit did_wr = w && model.size() != DEPTH;
      if (did_rd) void'(model.pop_front());
      if (did_wr) model.push_back(d);
    end
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 45, 8'($urandom));
    // drain, fill to full, overfill
    while (model.size() != 0) step(0, 1, 0);
    for (int i = 0; i < DEPTH + 3; i++) step(1, 0, 8'(i));
    check(full, "full after fill");
    for (int i = 0; i < DEPTH; i++) begin
      check(rd_data == 8'(i), "fill order");
      step(0, 1, 0);
    end
    check(empty, "empty after drain");
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
