// tb_rpa_top: end-to-end test of the whole FPGA design through its pins.
// Commands are sent as real 115200-baud UART frames; the downlink is
// decoded by uart_mon; behavioural DAC and ADC models sit on the serial
// buses. The ADC answers channel 0 (current) with a function of the RG1
// code plus a 0..3 ripple, channel 1 with the RG1 code / 2, channel 2 with a
// fixed suppressor code and channel 3 with 0x3000 + the mux address.
// Settle times and oversampling are shortened (OVS 8/4/4, 30 us / 20 us)
// so several sweeps fit; UART, housekeeping and converter timing are the
// real ones.
// For every command the downlink must be 9 housekeeping words then, per
// point, the averaged current (= f(code) + 1, the ripple averaging to 1)
// and the grid voltage, MSB first; RG1 codes must follow the mode (linear
// k*step, constant step, smart table stride 128/points, checked against the
// table formula to within one code); RG2 must track RG1 or stay at 0.
// Mechanisms counted, each must occur: the three modes, the three point
// counts, RG2 swept and grounded, idle bytes ignored, bytes ignored during
// a sweep, transmit FIFO full (back-pressure), reset command mid-sweep.
module tb_rpa_top;
  import rpa_pkg::*;
  localparam real BIT = 1.0e9 / 115200.0;
  logic clk = 0, arst_n = 1, uart_rxd = 1;
  logic uart_txd, rs422_de, rs422_re_n;
  logic dac_cs_n, dac_sck, dac_sdi, adc_cs_n, adc_sck, adc_din, adc_dout;
  logic [3:0] mux_addr;
  logic rx_fifo_full, tx_fifo_full, sweeping, uart_frame_err;
  logic [15:0] dac_out [4];
  int dac_updates, dac_ferr, adc_ferr;
  logic [3:0] dac_last_addr;
  logic [15:0] vals [4];
  int conv_count [4];
  logic [1:0] adc_last;
  int checks = 0, failures = 0;

  rpa_top #(.OVS_32(8), .OVS_64(4), .OVS_128(4), .WAIT_LONG(300), .WAIT_128(200)) dut (.*);
  dac_model dac (.cs_n(dac_cs_n), .sck(dac_sck), .sdi(dac_sdi), .out(dac_out),
                 .updates(dac_updates), .frame_errors(dac_ferr), .last_addr(dac_last_addr));
  adc_model adc (.cs_n(adc_cs_n), .sck(adc_sck), .din(adc_din), .dout(adc_dout), .vals,
                 .jitter(1'b1), .conv_count, .last_chan(adc_last), .frame_errors(adc_ferr));
  uart_mon #(.BIT_NS(BIT)) mon (.line(uart_txd));
  always #50 clk = ~clk;
  initial #1 arst_n = 0;  // a real falling edge applies the asynchronous reset

  function automatic logic [15:0] cur_of(logic [15:0] code);
    return 16'h1000 + (code >> 1);
  endfunction

  always_comb begin
    vals[0] = cur_of(dac_out[0]);
    vals[1] = dac_out[0] >> 1;
    vals[2] = 16'h0123;
    vals[3] = 16'h3000 + 16'(mux_addr);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // RG1 code history and RG2 tracking
  logic [15:0] rg1_hist [$];
  bit rg2_ground_exp;
  int n_rg2_swept = 0, n_rg2_ground = 0, n_full = 0;
  int prev_updates = 0;
  always @(dac_updates) begin
    if (dac_last_addr == 4'd0) rg1_hist.push_back(dac_out[0]);
    else if (dac_last_addr == 4'd1) begin
      check(dac_out[1] == (rg2_ground_exp ? 16'h0 : dac_out[0]), "RG2 code");
      if (rg2_ground_exp) n_rg2_ground++; else n_rg2_swept++;
    end
  end
  always @(posedge tx_fifo_full) n_full++;

  task automatic send(logic [7:0] b);
    uart_rxd = 0; #(BIT);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; #(BIT); end
    uart_rxd = 1; #(BIT);
  endtask

  function automatic int smart_ref(int i);
    real u;
    u = (2.0 * i - 127.0) / 127.0;
    return int'($floor(32768.0 + 32767.0 * (0.2 * u + 0.8 * u * u * u) + 0.5));
  endfunction

  function automatic logic [15:0] w16(int i);
    return {mon.q[i], mon.q[i+1]};
  endfunction

  int n_mode [3] = '{0, 0, 0};
  int n_pts [3] = '{0, 0, 0};
  int n_idle_ignored = 0, n_busy_ignored = 0, n_reset = 0;

  task automatic run(logic [15:0] step, int np, logic [7:0] mode, bit junk_during);
    int nbytes, lin, stride, sweeps_before;
    mon.q.delete();
    rg1_hist.delete();
    rg2_ground_exp = mode[2];
    send(START_BYTE); send(step[15:8]); send(step[7:0]); send(8'(np)); send(mode);
    if (junk_during) begin
      #(200us);
      send(START_BYTE); send(8'h00); send(8'h10); send(8'd32); send(8'h01);
      n_busy_ignored++;
    end
    nbytes = 18 + 4 * np;
    wait (!sweeping);
    wait (mon.q.size() >= nbytes);
    #(20 * BIT);
    check(mon.q.size() == nbytes, $sformatf("downlink %0d bytes, expected %0d", mon.q.size(), nbytes));
    check(rg1_hist.size() == np, $sformatf("%0d RG1 updates", rg1_hist.size()));
    if (mon.q.size() == nbytes && rg1_hist.size() == np) begin
      for (int i = 0; i < 8; i++) check(w16(2*i) == 16'h3000 + 16'(i), "housekeeping word");
      check(w16(16) == 16'h0123, "suppressor word");
      lin = 0;
      stride = 128 / np;
      for (int k = 0; k < np; k++) begin
        int code;
        code = int'(rg1_hist[k]);
        case (mode[1:0])
          2'd1: check(code == int'(step), "constant code");
          2'd2: check(code - smart_ref(k * stride) <= 1 && smart_ref(k * stride) - code <= 1, "smart code");
          default: check(code == lin, "linear code");
        endcase
        lin = (lin + int'(step)) % 65536;
        check(w16(18 + 4*k) == cur_of(16'(code)) + 16'd1, "averaged current");
        check(w16(20 + 4*k) == 16'(code) >> 1, "grid voltage");
      end
    end
    n_mode[mode[1:0] == 2'd3 ? 0 : mode[1:0]]++;
    n_pts[np == 32 ? 0 : np == 64 ? 1 : 2]++;
  endtask

  initial begin
    #1us arst_n = 1;
    #10us;
    send(8'h00); send(8'h42);
    #(3 * BIT);
    check(!sweeping && mon.q.size() == 0, "idle bytes ignored");
    n_idle_ignored++;
    run(16'd2048, 32, 8'h00, 0);
    run(16'h3B05, 64, 8'h05, 1);
    run(16'h0000, 128, 8'h02, 0);
    run(16'h0000, 32, 8'h06, 0);
    run(16'd512, 128, 8'h00, 0);
    // reset command in the middle of a sweep
    mon.q.delete();
    send(START_BYTE); send(8'h02); send(8'h00); send(8'd128); send(8'h00);
    #(2ms);
    check(sweeping, "sweep running before reset");
    send(RESET_BYTE);
    #(5us);
    check(!sweeping, "reset command stops the sweep");
    if (!sweeping) n_reset++;
    #(5 * BIT);
    run(16'h1000, 32, 8'h01, 0);     // works again after the reset
    check(dac_ferr == 0 && adc_ferr == 0, "converter frames");
    check(mon.errors == 0 && !uart_frame_err, "UART frames");
    foreach (n_mode[i]) check(n_mode[i] > 0, $sformatf("mode %0d exercised", i));
    foreach (n_pts[i]) check(n_pts[i] > 0, $sformatf("point count %0d exercised", i));
    check(n_rg2_swept > 0 && n_rg2_ground > 0, "RG2 swept and grounded");
    check(n_idle_ignored > 0 && n_busy_ignored > 0, "ignored bytes");
    check(n_full > 0, "transmit FIFO back-pressure");
    check(n_reset > 0, "reset command");
    $display("modes %0d/%0d/%0d points %0d/%0d/%0d rg2 %0d/%0d fifo-full %0d reset %0d",
             n_mode[0], n_mode[1], n_mode[2], n_pts[0], n_pts[1], n_pts[2],
             n_rg2_swept, n_rg2_ground, n_full, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
