// tb_cmd_parser: self-checking test of the command-byte parser.
// A real sync_fifo holds the bytes the testbench pushes. Checked:
//  * idle junk bytes are consumed and ignored (no 'go');
//  * after 0xAA the parser leaves bytes in the FIFO until four are there,
//    then reads step hi/lo, points and mode into cfg and pulses 'go' once;
//  * points 32/64/128 map to the three selections, others to 32;
//  * mode bits 1:0 and bit 2 are decoded;
//  * while a sweep runs, bytes (start bytes too) are drained and ignored;
//  * the reset byte 0x55 pulses 'sync_reset' while idle or sweeping, but
//    is taken as data among the four command bytes.
module tb_cmd_parser;
  import rpa_pkg::*;
  logic clk = 0, rst_n = 1;
  logic wr_en = 0;
  logic [7:0] wr_data = 0;
  logic [7:0] rx_data;
  logic rx_empty, rx_rd, full;
  logic [7:0] rx_count;
  logic sweep_done = 0, go, sync_reset;
  sweep_cfg_t cfg;
  int checks = 0, failures = 0;
  int n_go = 0, n_rst = 0;

  sync_fifo #(.WIDTH(8), .DEPTH(128)) fifo (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en(rx_rd), .rd_data(rx_data),
    .full, .empty(rx_empty), .count(rx_count));
  cmd_parser #(.CW(8)) dut (.*);

  always #50 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  always @(posedge clk) if (rst_n) begin
    if (go) n_go++;
    if (sync_reset) n_rst++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic push(logic [7:0] b);
    @(negedge clk); wr_en = 1; wr_data = b;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic command(logic [15:0] step, logic [7:0] pts, logic [7:0] mode,
                         pts_sel_e exp_pts);
    int g0;
    g0 = n_go;
    push(START_BYTE);
    push(step[15:8]);
    push(step[7:0]);
    push(pts);
    idle(5);
    check(n_go == g0, "no go before the fourth byte");
    check(rx_count == 8'd3, "bytes left in FIFO while waiting");
    push(mode);
    idle(10);
    check(n_go == g0 + 1, "one go after the fourth byte");
    check(cfg.step == step, "step");
    check(cfg.pts == exp_pts, "points");
    check(cfg.mode == sweep_mode_e'(mode[1:0]), "mode");
    check(cfg.rg2_ground == mode[2], "rg2 bit");
    check(rx_empty, "all bytes consumed");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // junk while idle
    push(8'h00); push(8'h12); push(8'hFF);
    idle(5);
    check(n_go == 0 && rx_empty, "idle junk ignored");
    command(16'h0200, 8'd128, 8'h00, PTS_128);
    // bytes while sweeping: ignored, even start bytes
    push(START_BYTE); push(8'h01); push(8'h02); push(8'd32); push(8'h02);
    idle(5);
    check(n_go == 1, "bytes ignored while sweeping");
    check(rx_empty, "bytes drained while sweeping");
    // reset byte while sweeping
    push(RESET_BYTE);
    idle(3);
    check(n_rst == 1, "reset byte during sweep");
    @(negedge clk) sweep_done = 1;
    @(negedge clk) sweep_done = 0;
    command(16'h1234, 8'd64, 8'h06, PTS_64);
    @(negedge clk) sweep_done = 1;
    @(negedge clk) sweep_done = 0;
    command(16'h0800, 8'd32, 8'h01, PTS_32);
    @(negedge clk) sweep_done = 1;
    @(negedge clk) sweep_done = 0;
    // unsupported points value, reset byte taken as data
    command(16'h5555, 8'd17, 8'h05, PTS_32);
    check(n_rst == 1, "reset value inside command bytes is data");
    @(negedge clk) sweep_done = 1;
    @(negedge clk) sweep_done = 0;
    push(RESET_BYTE);
    idle(3);
    check(n_rst == 2, "reset byte while idle");
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
