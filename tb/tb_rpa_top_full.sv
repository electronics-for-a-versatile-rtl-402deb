// tb_rpa_top_full: the whole design at its real settings (10 MHz clock,
// 115200 baud, oversampling 1024/512/128, settle 12 ms / 6.35 ms, 34 us
// housekeeping settle) running two complete flight-style sweeps: a
// 128-point smart sweep with RG2 swept, a 32-point linear sweep with RG2
// grounded and a 64-point linear sweep.
// Checked: the full downlink of each (9 housekeeping words, then current
// and voltage per point, values as in tb_rpa_top), the housekeeping phase
// lasting about 373 us (360..380 us), and the sweep durations against the
// instrument's figures: 993 ms for 128 points and 738 ms for 32 points,
// within 1 %, both inside the one-second command cadence. The 64-point
// sweep's duration is printed, not checked (see the README).
module tb_rpa_top_full;
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

  rpa_top dut (.*);
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

  logic [15:0] rg1_hist [$];
  bit rg2_ground_exp;
  realtime t_first_dac;
  always @(dac_updates) begin
    if (dac_last_addr == 4'd0) begin
      if (rg1_hist.size() == 0) t_first_dac = $realtime;
      rg1_hist.push_back(dac_out[0]);
    end else if (dac_last_addr == 4'd1)
      check(dac_out[1] == (rg2_ground_exp ? 16'h0 : dac_out[0]), "RG2 code");
  end

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

  task automatic run(logic [15:0] step, int np, logic [7:0] mode, real exp_ms);
    int nbytes, lin, stride;
    realtime t0, t1;
    mon.q.delete();
    rg1_hist.delete();
    rg2_ground_exp = mode[2];
    send(START_BYTE); send(step[15:8]); send(step[7:0]); send(8'(np)); send(mode);
    wait (sweeping);
    t0 = $realtime;
    wait (!sweeping);
    t1 = $realtime;
    nbytes = 18 + 4 * np;
    wait (mon.q.size() >= nbytes);
    #(20 * BIT);
    $display("%0d-point sweep: %0.2f ms (housekeeping %0.1f us)", np, (t1 - t0) / 1.0e6,
             (t_first_dac - t0) / 1.0e3);
    if (exp_ms > 0.0) begin
      check((t1 - t0) / 1.0e6 > exp_ms * 0.99 && (t1 - t0) / 1.0e6 < exp_ms * 1.01,
            $sformatf("%0d-point sweep time", np));
      check((t1 - t0) < 1.0e9, "inside the one-second cadence");
    end
    check((t_first_dac - t0) > 360.0e3 && (t_first_dac - t0) < 380.0e3, "housekeeping time");
    check(mon.q.size() == nbytes, $sformatf("downlink %0d bytes", mon.q.size()));
    check(rg1_hist.size() == np, "RG1 updates");
    if (mon.q.size() == nbytes && rg1_hist.size() == np) begin
      for (int i = 0; i < 8; i++) check(w16(2*i) == 16'h3000 + 16'(i), "housekeeping word");
      check(w16(16) == 16'h0123, "suppressor word");
      lin = 0;
      stride = 128 / np;
      for (int k = 0; k < np; k++) begin
        int code;
        code = int'(rg1_hist[k]);
        if (mode[1:0] == 2'd2)
          check(code - smart_ref(k * stride) <= 1 && smart_ref(k * stride) - code <= 1, "smart code");
        else check(code == lin, "linear code");
        lin = (lin + int'(step)) % 65536;
        check(w16(18 + 4*k) == cur_of(16'(code)) + 16'd1, "averaged current");
        check(w16(20 + 4*k) == 16'(code) >> 1, "grid voltage");
      end
    end
  endtask

  initial begin
    #1us arst_n = 1;
    #10us;
    run(16'h0000, 128, 8'h02, 993.0);
    run(16'd2048, 32, 8'h04, 738.0);
    // 64 points at 512x oversampling and a 12 ms settle: about 1.12 s,
    // longer than the one-second cadence, so its time is only reported.
    run(16'd1024, 64, 8'h00, 0.0);
    check(dac_ferr == 0 && adc_ferr == 0, "converter frames");
    check(mon.errors == 0 && !uart_frame_err, "UART frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
