// tb_rpa_ctrl: self-checking test of the sequencer with its sub-blocks,
// at short settle times and oversampling 4 for every point count.
// The testbench writes command bytes into a real receive FIFO, answers the
// DAC (28 clocks) and ADC (108 clocks) requests itself and collects the
// bytes written to the transmit side, holding tx_full high at random.
// Checked for each command: 18 housekeeping bytes (mux inputs 0..7 on
// channel 3, then channel 2) followed by 4 bytes per point, high byte
// first: the current average and the grid-voltage code; the number of
// points; 'sweeping' high for the duration; no transmit write while
// tx_full is high; and the sync_reset request when 0x55 arrives mid-sweep.
module tb_rpa_ctrl;
  import rpa_pkg::*;
  logic clk = 0, rst_n = 1;
  logic wr_en = 0; logic [7:0] wr_data = 0;
  logic [7:0] rx_data; logic rx_empty, rx_rd, rx_full; logic [7:0] rx_count;
  logic tx_wr; logic [7:0] tx_data; logic tx_full = 0;
  logic dac_start; logic [3:0] dac_chan; logic [15:0] dac_value; logic dac_done = 0;
  logic adc_start; logic [1:0] adc_chan; logic adc_done = 0; logic [15:0] adc_data = 0;
  logic [3:0] mux_addr;
  logic sweeping; sweep_cfg_t cfg; logic [7:0] point; logic sync_reset;
  int checks = 0, failures = 0, cyc = 0, n_sync = 0;
  logic [7:0] txq [$];
  logic [15:0] rg1 = 0;
  bit random_full = 0;

  sync_fifo #(.WIDTH(8), .DEPTH(128)) rxf (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en(rx_rd), .rd_data(rx_data),
    .full(rx_full), .empty(rx_empty), .count(rx_count));
  rpa_ctrl #(.FIFO_CW(8), .OVS_32(4), .OVS_64(4), .OVS_128(4),
             .WAIT_LONG(50), .WAIT_128(30), .HK_SETTLE(340)) dut (.*);
  always #50 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int dac_cnt = -1, adc_cnt = -1;
  logic [15:0] adc_q;
  always @(posedge clk) begin
    cyc++;
    dac_done <= 0; adc_done <= 0;
    if (dac_start) begin
      if (dac_chan == 4'd0) rg1 = dac_value;
      dac_cnt = 26;
    end else if (dac_cnt > 0) dac_cnt--;
    else if (dac_cnt == 0) begin dac_done <= 1; dac_cnt = -1; end
    if (adc_start) begin
      case (adc_chan)
        2'd0: adc_q = 16'h1000 + (rg1 >> 1);   // current: same every sample
        2'd1: adc_q = rg1 >> 2;
        2'd2: adc_q = 16'h0123;
        default: adc_q = 16'h3000 + 16'(mux_addr);
      endcase
      adc_cnt = 106;
    end else if (adc_cnt > 0) adc_cnt--;
    else if (adc_cnt == 0) begin adc_done <= 1; adc_data <= adc_q; adc_cnt = -1; end
    if (rst_n && tx_wr) begin
      check(!tx_full, "no write while full");
      txq.push_back(tx_data);
    end
    if (rst_n && sync_reset) n_sync++;
    if (random_full) tx_full <= ($urandom_range(0, 3) != 0);
    else tx_full <= 0;
  end

  task automatic push(logic [7:0] b);
    @(negedge clk); wr_en = 1; wr_data = b;
    @(negedge clk); wr_en = 0;
  endtask

  function automatic logic [15:0] w16(int i);
    return {txq[i], txq[i+1]};
  endfunction

  task automatic command(logic [15:0] step, int np, logic [7:0] mode);
    int nbytes, lin;
    txq.delete();
    push(START_BYTE); push(step[15:8]); push(step[7:0]); push(8'(np)); push(mode);
    repeat (10) @(negedge clk);
    check(sweeping, "sweeping after command");
    nbytes = 18 + 4 * np;
    while (sweeping || txq.size() < nbytes) begin
      @(negedge clk);
      if (txq.size() > nbytes) break;
    end
    repeat (20) @(negedge clk);
    check(txq.size() == nbytes, $sformatf("byte count %0d expected %0d", txq.size(), nbytes));
    if (txq.size() == nbytes) begin
      for (int i = 0; i < 8; i++) check(w16(2*i) == 16'h3000 + 16'(i), "housekeeping word");
      check(w16(16) == 16'h0123, "suppressor word");
      lin = 0;
      for (int k = 0; k < np; k++) begin
        logic [15:0] code;
        code = (mode[1:0] == 2'd1) ? step : 16'(lin);
        lin += int'(step);
        if (mode[1:0] != 2'd2) begin
          check(w16(18 + 4*k) == 16'h1000 + (code >> 1), "current word");
          check(w16(20 + 4*k) == code >> 2, "voltage word");
        end else begin
          check(w16(20 + 4*k) * 2 + 1 >= w16(18 + 4*k) - 16'h1000, "smart words consistent");
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    push(8'h01); push(8'h02);
    command(16'd2048, 32, 8'h00);
    random_full = 1;
    command(16'h2000, 64, 8'h05);
    command(16'h0000, 128, 8'h02);
    random_full = 0;
    // reset request during a sweep
    txq.delete();
    push(START_BYTE); push(8'h01); push(8'h00); push(8'd32); push(8'h00);
    repeat (2000) @(negedge clk);
    push(RESET_BYTE);
    repeat (5) @(negedge clk);
    check(n_sync == 1, "sync_reset requested");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
