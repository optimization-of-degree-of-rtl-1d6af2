// tb_dlia_system: end-to-end test of the whole platform at its default sizes (two lock-in
// sub-systems, 65-tap filters, 1024-word sample stores, register reset values for a
// 50 MHz clock: 100 kHz ADC rate, 32 samples per period, 1024-sample means).
//
// Around the design: a UART stand-in that carries 5-byte packets both ways, two
// behavioural serial ADCs, a pipelined SRAM model and a DAC receiver. All host
// traffic goes through packets, as the host computer would send it.
//
// Inputs: ADC 0 sees A0*cos(2*pi*1kHz*t + p0) + A1*cos(2*pi*500Hz*t + p1), with PSD0
// synced at 1 kHz (chopper) and PSD1 at 500 Hz (polarizer); ADC 1 sees
// A2*cos(2*pi*1kHz*t + p2) with PSD2 and PSD3 synced at 1 kHz. Each expected result
// magnitude is A*|H(f)|/2 in the 16-bit result word, with |H(f)| the gain of the
// ideal Hamming-windowed sinc lowpass worked out in real numbers here.
//
// Mechanisms made to happen, each counted, with a failure for any that never does:
// register and table writes and reads, reset values, a read nobody answers (timeout),
// every interrupt (INT0 scan step, INT1..INT3 PSD results, INT4 beam toggle), a PSD
// flush by a scan step, a phase offset change taking effect at the PSD's phase reset,
// auto sync mode, a fine phase shift by the sync delay line, the DAC output, an SRAM
// capture, host access to both SRAM halves, the ADC busy error, and test mode.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_dlia_system;
  import dlia_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  localparam real PI = 3.14159265358979;
  localparam real A0 = 12000.0, A1 = 8000.0, A2 = 10000.0;
  localparam real P0 = 0.4, P1 = 1.1, P2 = -0.8;
  localparam int  T0 = 200000;   // ns, start of the sync signals

  // ---------------- design under test ----------------
  logic       rx_rdy = 0, rx_strobe, tx_rdy = 1, tx_strobe, busyb;
  logic [7:0] rx_byte = '0, tx_byte;
  logic [1:0] adc_sc, adc_busyb, adc_sclk, adc_sdata;
  logic [3:0] sync_in = '0;
  logic       scan_step = 0, beam_toggle = 0;
  logic       dac_sclk, dac_enb, dac_data;
  logic       ce_n, s_we_n, oe_n, advb, dq_oe;
  logic [15:0] s_addr;
  logic [3:0]  bw_n;
  logic [35:0] dq_o, dq_i, dq_bus;
  int          swrites, sreads;

  dlia_system dut (
    .clk, .rst,
    .uart_rx_rdy(rx_rdy), .uart_rx_byte(rx_byte), .uart_rx_strobe(rx_strobe),
    .uart_tx_rdy(tx_rdy), .uart_tx_byte(tx_byte), .uart_tx_strobe(tx_strobe),
    .host_busyb(busyb),
    .adc_start_convert(adc_sc), .adc_busyb, .adc_sclk, .adc_sdata,
    .sync_in, .scan_step, .beam_toggle,
    .dac_sclk, .dac_enb, .dac_data,
    .sram_ce_n(ce_n), .sram_we_n(s_we_n), .sram_oe_n(oe_n), .sram_adv_loadb(advb),
    .sram_addr(s_addr), .sram_bw_n(bw_n), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe),
    .sram_dq_i(dq_i)
  );

  always #10 clk = ~clk;   // 50 MHz
  initial begin #300000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  // ---------------- analog side: ADCs and sync signals ----------------
  function automatic real sig(int d, real t_ns);
    real t;
    t = (t_ns - real'(T0)) * 1.0e-9;
    if (d == 0) return A0 * $cos(2.0 * PI * 1000.0 * t + P0) + A1 * $cos(2.0 * PI * 500.0 * t + P1);
    return A2 * $cos(2.0 * PI * 1000.0 * t + P2);
  endfunction

  logic [15:0] adc_value [2] = '{16'h0, 16'h0};
  int convs [2];
  logic [15:0] adc0_log [$];
  for (genvar d = 0; d < 2; d++) begin : g_adc
    ad977a_model adc (.start_convert(adc_sc[d]), .value(adc_value[d]), .busyb(adc_busyb[d]),
      .sclk(adc_sclk[d]), .sdata(adc_sdata[d]), .convs(convs[d]));
    always @(posedge adc_sc[d]) begin
      adc_value[d] = 16'($rtoi(sig(d, $realtime)));
      if (d == 0) adc0_log.push_back(adc_value[d]);
    end
  end

  initial begin
    #(T0);
    fork
      forever begin sync_in[0] = 1; #500000; sync_in[0] = 0; #500000; end
      forever begin sync_in[1] = 1; #1000000; sync_in[1] = 0; #1000000; end
      forever begin sync_in[2] = 1; #500000; sync_in[2] = 0; #500000; end
      forever begin sync_in[3] = 1; #500000; sync_in[3] = 0; #500000; end
    join
  end

  // ---------------- SRAM ----------------
  assign dq_bus = dq_oe ? dq_o : '0;
  zbt_sram_model #(.AW(16)) sram (.clk, .ce_n, .we_n(s_we_n), .oe_n, .adv_loadb(advb),
    .addr(s_addr), .bw_n, .dq_in(dq_bus), .dq_out(dq_i), .writes(swrites), .reads(sreads));

  // ---------------- DAC receiver: words must be recent ADC 0 samples ----------------
  logic [15:0] dac_shift = '0;
  int  dac_ok = 0, dac_bad = 0;
  bit  dac_check = 1;
  always @(posedge dac_sclk) if (!dac_enb) dac_shift <= {dac_shift[14:0], dac_data};
  always @(posedge dac_enb) if (dac_check && adc0_log.size() > 4) begin
    bit hit;
    hit = 0;
    for (int k = 1; k <= 3; k++) if (adc0_log[adc0_log.size() - k] == (dac_shift ^ 16'h8000)) hit = 1;
    if (hit) dac_ok++;
    else begin
      dac_bad++;
      if (dac_bad < 4) $display("DAC word %h matches no recent ADC sample", dac_shift);
    end
  end

  // ---------------- UART stand-in ----------------
  logic [7:0] rxq [$];
  logic [7:0] txb [$];
  logic took = 1'b0;
  int tx_hold = 0;
  always @(posedge clk) took <= rx_strobe;
  always @(negedge clk) begin
    if (took && rxq.size() != 0) void'(rxq.pop_front());
    rx_rdy  <= rxq.size() != 0;
    rx_byte <= rxq.size() != 0 ? rxq[0] : 8'h00;
    if (tx_strobe) begin
      txb.push_back(tx_byte);
      tx_rdy <= 1'b0;
      tx_hold = 2 + $urandom_range(3);
    end else if (tx_hold > 0) begin
      tx_hold--;
      if (tx_hold == 0) tx_rdy <= 1'b1;
    end
  end

  // packet sorter: read responses and interrupts
  logic [39:0] resp_q [$];
  int          n_int [NUM_INTS];
  logic [31:0] int_last [NUM_INTS];
  realtime     int_time [NUM_INTS];
  logic [31:0] int_hist [NUM_INTS][$];
  always @(negedge clk) if (txb.size() >= 5) begin
    logic [39:0] p;
    for (int i = 0; i < 5; i++) p[8*i +: 8] = txb.pop_front();
    if (p[39:32] >= 8'h20 && p[39:32] <= 8'h24) begin
      int k;
      k = int'(p[39:32]) - 32;
      n_int[k]++;
      int_last[k] = p[31:0];
      int_time[k] = $realtime;
      int_hist[k].push_back(p[31:0]);
    end else begin
      resp_q.push_back(p);
    end
  end

  // ---------------- host tasks ----------------
  int n_wr = 0, n_rd = 0, n_timeout = 0;

  task automatic send_bytes(logic [7:0] cmd, logic [15:0] a, logic [15:0] d);
    logic [39:0] p;
    p = {cmd, a, d};
    while (!busyb || rxq.size() != 0) @(posedge clk);
    for (int i = 0; i < 5; i++) rxq.push_back(p[8*i +: 8]);
    while (rxq.size() != 0) @(posedge clk);
    repeat (6) @(posedge clk);
  endtask

  task automatic host_wr(int bank, logic [15:0] a, logic [15:0] d);
    send_bytes(8'(3 * bank + 1), a, d);
    n_wr++;
  endtask

  // returns ok = 0 when no response came
  task automatic host_rd(int bank, logic [15:0] a, output logic [15:0] d, output bit ok);
    int t;
    resp_q.delete();
    send_bytes(8'(3 * bank + 2), a, 16'h0000);
    t = 0;
    while (resp_q.size() == 0 && t < 200) begin @(posedge clk); t++; end
    ok = 0;
    d  = '0;
    if (resp_q.size() != 0) begin
      logic [39:0] p;
      p  = resp_q.pop_front();
      ok = (p[39:32] == 8'(3 * bank + 3)) && (p[31:16] == a);
      d  = p[15:0];
      n_rd++;
    end
  endtask

  // ---------------- reference model ----------------
  function automatic real filter_gain(real f);
    real h [65];
    real tot, re, im, x;
    tot = 0.0;
    for (int j = 0; j <= 64; j++) begin
      x = real'(j - 32);
      h[j] = (j == 32) ? 2.0 * 1500.0 / 100000.0
                       : $sin(2.0 * PI * 1500.0 / 100000.0 * x) / (PI * x);
      h[j] = h[j] * (0.54 - 0.46 * $cos(2.0 * PI * real'(j) / 64.0));
      tot += h[j];
    end
    re = 0.0; im = 0.0;
    for (int j = 0; j <= 64; j++) begin
      re += h[j] / tot * $cos(2.0 * PI * f / 100000.0 * real'(j));
      im -= h[j] / tot * $sin(2.0 * PI * f / 100000.0 * real'(j));
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real wi(logic [31:0] w); return real'($signed(w[15:0])); endfunction
  function automatic real wq(logic [31:0] w); return real'($signed(w[31:16])); endfunction
  function automatic real mag(real i, real q); return $sqrt(i * i + q * q); endfunction
  function automatic bit near(real v, real e, real tol); return v > e - tol && v < e + tol; endfunction

  // ---------------- test sequence ----------------
  localparam int CH0 = CSR_CH_BASE, CH1 = CSR_CH_BASE + 8, CH2 = CSR_CH_BASE + 16,
                 CH3 = CSR_CH_BASE + 24;

  int n_reset_ok = 0, n_lut_ok = 0, n_flush = 0, n_phase = 0, n_auto = 0, n_delay = 0;
  int n_cap = 0, n_sram = 0, n_adc_err = 0, n_test_mode = 0, n_psd_mag = 0;
  logic [15:0] tbl [8][32];
  logic [15:0] d;
  bit ok;
  real e0, e1, e2, ia, qa, ib, qb, ang;
  int n0;
  realtime t_step;

  initial begin
    for (int k = 0; k < NUM_INTS; k++) begin n_int[k] = 0; int_last[k] = '0; int_time[k] = 0; end
    e0 = A0 * filter_gain(1000.0) / 2.0 * 32767.0 / 32768.0;
    e1 = A1 * filter_gain(500.0) / 2.0 * 32767.0 / 32768.0;
    e2 = A2 * filter_gain(1000.0) / 2.0 * 32767.0 / 32768.0;
    $display("expected result magnitudes: PSD0 %f PSD1 %f PSD2/3 %f", e0, e1, e2);
    repeat (5) @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);

    // register reset values
    host_rd(0, 16'(CSR_ADC_DIV), d, ok);
    `TB_CHECK(ok && d == 16'd500, $sformatf("ADC_DIV reset value %0d", d))
    if (ok && d == 16'd500) n_reset_ok++;
    host_rd(0, 16'(CH1 + CH_AVG_LOG2), d, ok);
    `TB_CHECK(ok && d == 16'd10, "AVG_LOG2 reset value")
    host_rd(0, 16'(CH3 + CH_SPP_LOG2), d, ok);
    `TB_CHECK(ok && d == 16'd5, "SPP_LOG2 reset value")

    // reference tables: cosine (REF0) and sine (REF1), 32 entries, for all four PSDs
    for (int t = 0; t < 8; t++)
      for (int k = 0; k < 32; k++) begin
        tbl[t][k] = (t % 2 == 0) ? 16'($rtoi($floor(32767.0 * $cos(2.0 * PI * k / 32.0) + 0.5)))
                                 : 16'($rtoi($floor(32767.0 * $sin(2.0 * PI * k / 32.0) + 0.5)));
        host_wr(1 + t / 4, 16'(16'h0100 * (t % 4) + k), tbl[t][k]);
      end
    for (int n = 0; n < 12; n++) begin
      int t, k;
      t = $urandom_range(7);
      k = $urandom_range(31);
      host_rd(1 + t / 4, 16'(16'h0100 * (t % 4) + k), d, ok);
      `TB_CHECK(ok && d == tbl[t][k], $sformatf("table %0d word %0d read back %h", t, k, d))
      if (ok && d == tbl[t][k]) n_lut_ok++;
    end

    // a read of an address nobody decodes: no response, and the bus is usable again
    host_rd(0, 16'h0100, d, ok);
    `TB_CHECK(!ok, "read of an unmapped address gets no response")
    if (!ok) n_timeout++;
    host_wr(0, 16'(CSR_DAC_SEL), 16'd0);
    host_rd(0, 16'(CSR_DAC_SEL), d, ok);
    `TB_CHECK(ok && d == 16'd0, "register access after a timed-out read")

    // beam toggle: INT4 with the new level
    n0 = n_int[4];
    @(negedge clk) beam_toggle = 1;
    repeat (200) @(posedge clk);
    `TB_CHECK(n_int[4] == n0 + 1 && int_last[4][15:0] == 16'd1, "INT4 on beam toggle high")
    beam_toggle = 0;
    repeat (200) @(posedge clk);
    `TB_CHECK(n_int[4] == n0 + 2 && int_last[4][15:0] == 16'd0, "INT4 on beam toggle low")

    // PSD2: auto sync mode, one result per period; PSD3: one result per period
    host_wr(0, 16'(CH2 + CH_AVG_LOG2), 16'd5);
    host_wr(0, 16'(CH2 + CH_MODE), 16'd1);
    host_wr(0, 16'(CH3 + CH_AVG_LOG2), 16'd5);

    // SRAM: host access to both halves of a word
    host_wr(3, 16'h1000, 16'h1234);
    host_wr(4, 16'h1000, 16'hBEEF);
    host_rd(3, 16'h1000, d, ok);
    `TB_CHECK(ok && d == 16'h1234, "SRAM lower half")
    if (ok && d == 16'h1234) n_sram++;
    host_rd(4, 16'h1000, d, ok);
    `TB_CHECK(ok && d == 16'hBEEF, "SRAM upper half")
    `TB_CHECK(sram.mem[16'h1000][31:0] == 32'hBEEF_1234, "SRAM word holds both halves")

    // capture 64 ADC 0 samples (capture source 0) into the SRAM
    host_wr(0, 16'(CSR_CAP_SEL), 16'd0);
    host_wr(0, 16'(CSR_CAP_LEN), 16'd63);
    host_wr(0, 16'(CSR_CAP_START), 16'd1);
    host_rd(0, 16'(CSR_STATUS), d, ok);
    `TB_CHECK(ok && d[0], "capture busy")
    repeat (70 * 500) @(posedge clk);
    host_rd(0, 16'(CSR_STATUS), d, ok);
    `TB_CHECK(ok && !d[0], "capture done")
    begin
      logic [15:0] cap [64];
      int start, good;
      for (int k = 0; k < 64; k++) begin
        host_rd(3, 16'(k), cap[k], ok);
        `TB_CHECK(ok, "captured word read")
      end
      start = -1;
      for (int j = 0; j + 64 <= adc0_log.size(); j++)
        if (start < 0 && adc0_log[j] == cap[0] && adc0_log[j+1] == cap[1]) start = j;
      good = 0;
      if (start >= 0) for (int k = 0; k < 64; k++) if (adc0_log[start + k] == cap[k]) good++;
      `TB_CHECK(good == 64, $sformatf("%0d of 64 captured samples are consecutive ADC samples", good))
      if (good == 64) n_cap++;
    end

    // fine phase shift of PSD3 by its sync delay line: 25 steps of 250 clocks = 1/8
    // of the 1 kHz period, so its result turns by 45 degrees
    wait ($realtime > 12.0e6);
    host_rd(0, 16'(CH3 + CH_I_MEAN), d, ok); ia = real'($signed(d));
    host_rd(0, 16'(CH3 + CH_Q_MEAN), d, ok); qa = real'($signed(d));
    host_wr(0, 16'(CH3 + CH_DLY_DIV), 16'd250);
    host_wr(0, 16'(CH3 + CH_DLY_SEL), 16'd24);
    wait ($realtime > 18.0e6);
    host_rd(0, 16'(CH3 + CH_I_MEAN), d, ok); ib = real'($signed(d));
    host_rd(0, 16'(CH3 + CH_Q_MEAN), d, ok); qb = real'($signed(d));
    ang = ($atan2(qb, ib) - $atan2(qa, ia)) * 180.0 / PI;
    if (ang > 180.0) ang -= 360.0;
    if (ang < -180.0) ang += 360.0;
    $display("PSD3 (%0.0f, %0.0f) -> (%0.0f, %0.0f): %f degrees", ia, qa, ib, qb, ang);
    `TB_CHECK(near(mag(ia, qa), e2, 0.02 * e2 + 2) && near(mag(ib, qb), e2, 0.02 * e2 + 2),
              "PSD3 magnitude")
    `TB_CHECK(near(ang < 0 ? -ang : ang, 45.0, 6.0), $sformatf("delay line turns PSD3 by %f", ang))
    if (near(ang < 0 ? -ang : ang, 45.0, 6.0)) n_delay++;

    // auto sync on PSD2: the last results lie near the +I axis
    wait (n_int[3] >= 20);
    begin
      real qmin, q;
      qmin = 1.0e9;
      for (int k = int_hist[3].size() - 4; k < int_hist[3].size(); k++) begin
        `TB_CHECK(wi(int_hist[3][k]) > 0.95 * e2, $sformatf("PSD2 auto sync I %f", wi(int_hist[3][k])))
        `TB_CHECK(near(mag(wi(int_hist[3][k]), wq(int_hist[3][k])), e2, 0.02 * e2 + 2), "PSD2 magnitude")
        q = wq(int_hist[3][k]);
        if ((q < 0 ? -q : q) < qmin) qmin = q < 0 ? -q : q;
      end
      `TB_CHECK(qmin < 0.12 * e2, $sformatf("PSD2 auto sync best |Q| %f", qmin))
      if (qmin < 0.12 * e2) n_auto++;
    end

    // full 1024-sample means of PSD0 (1 kHz) and PSD1 (500 Hz)
    wait (n_int[1] >= 2 && n_int[2] >= 1);
    ia = wi(int_hist[1][1]); qa = wq(int_hist[1][1]);
    $display("PSD0 result I=%0.0f Q=%0.0f, PSD1 result I=%0.0f Q=%0.0f", ia, qa,
             wi(int_hist[2][0]), wq(int_hist[2][0]));
    `TB_CHECK(near(mag(ia, qa), e0, 0.02 * e0 + 2), $sformatf("PSD0 magnitude %f", mag(ia, qa)))
    `TB_CHECK(near(mag(wi(int_hist[2][0]), wq(int_hist[2][0])), e1, 0.02 * e1 + 2),
              $sformatf("PSD1 magnitude %f", mag(wi(int_hist[2][0]), wq(int_hist[2][0]))))
    if (near(mag(ia, qa), e0, 0.02 * e0 + 2)) n_psd_mag++;

    // scan step 2 ms after a PSD0 result: INT0 reports it and the flush restarts the
    // 1024-sample mean, so the next PSD0 result comes a full 32 ms after the step
    n0 = n_int[1];
    wait (n_int[1] == n0 + 1);
    #2000000;
    @(negedge clk) scan_step = 1;
    t_step = $realtime;
    #10000 scan_step = 0;
    repeat (200) @(posedge clk);
    `TB_CHECK(n_int[0] == 1 && int_last[0][15:0] == 16'd1, "INT0 with the step count")
    wait (n_int[1] == n0 + 2);
    $display("PSD0 result %f ms after the scan step", ($realtime - t_step) / 1.0e6);
    `TB_CHECK($realtime - t_step > 31.5e6, "scan step flushed PSD0")
    if ($realtime - t_step > 31.5e6) n_flush++;

    // phase offset of 8 samples (90 degrees): taken at the phase reset after the
    // result in progress, so the result after that becomes (-Q, I)
    host_wr(0, 16'(CH0 + CH_PHASE), 16'd8);
    wait (n_int[1] == n0 + 3);
    ia = wi(int_last[1]); qa = wq(int_last[1]);
    wait (n_int[1] == n0 + 4);
    ib = wi(int_last[1]); qb = wq(int_last[1]);
    $display("PSD0 phase 0: (%0.0f, %0.0f), phase 8: (%0.0f, %0.0f)", ia, qa, ib, qb);
    `TB_CHECK(near(ib, -qa, 0.03 * e0) && near(qb, ia, 0.03 * e0), "phase offset turns PSD0 by 90 degrees")
    if (near(ib, -qa, 0.03 * e0) && near(qb, ia, 0.03 * e0)) n_phase++;

    // ADC busy error: a conversion period shorter than the conversion
    dac_check = 0;
    host_wr(0, 16'(CSR_ADC_DIV), 16'd20);
    repeat (500) @(posedge clk);
    host_rd(0, 16'(CSR_STATUS), d, ok);
    `TB_CHECK(ok && d[1], "ADC busy error reported")
    if (ok && d[1]) n_adc_err++;
    host_wr(0, 16'(CSR_ADC_DIV), 16'd500);
    repeat (2000) @(posedge clk);
    host_rd(0, 16'(CSR_STATUS), d, ok);
    `TB_CHECK(ok && !d[1], "ADC busy error cleared")

    // test mode: received packets are dropped, interrupts still go out
    host_wr(0, 16'(CSR_CTRL), 16'h0007);
    host_rd(0, 16'(CSR_CTRL), d, ok);
    `TB_CHECK(!ok, "test mode: a read gets no response")
    n0 = n_int[4];
    @(negedge clk) beam_toggle = 1;
    repeat (200) @(posedge clk);
    `TB_CHECK(n_int[4] == n0 + 1, "test mode: interrupts still sent")
    if (!ok && n_int[4] == n0 + 1) n_test_mode++;
    // only a reset leaves test mode
    @(negedge clk) rst = 1;
    repeat (5) @(negedge clk) rst = 0;
    repeat (5) @(negedge clk);
    host_rd(0, 16'(CSR_CTRL), d, ok);
    `TB_CHECK(ok && d == 16'h0006, "CTRL back to its reset value")

    // every mechanism happened
    $display("mechanisms: writes=%0d reads=%0d reset=%0d tables=%0d timeout=%0d int=%0d/%0d/%0d/%0d/%0d",
             n_wr, n_rd, n_reset_ok, n_lut_ok, n_timeout, n_int[0], n_int[1], n_int[2], n_int[3], n_int[4]);
    $display("mechanisms: flush=%0d phase=%0d auto=%0d delay=%0d dac=%0d/%0d capture=%0d sram=%0d adc_err=%0d test=%0d",
             n_flush, n_phase, n_auto, n_delay, dac_ok, dac_bad, n_cap, n_sram, n_adc_err, n_test_mode);
    `TB_CHECK(n_wr > 0 && n_rd > 0, "host writes and reads")
    `TB_CHECK(n_reset_ok > 0, "register reset values")
    `TB_CHECK(n_lut_ok > 0, "reference table access")
    `TB_CHECK(n_timeout > 0, "read timeout")
    for (int k = 0; k < NUM_INTS; k++) `TB_CHECK(n_int[k] > 0, $sformatf("INT%0d sent", k))
    `TB_CHECK(n_psd_mag > 0, "PSD result magnitude")
    `TB_CHECK(n_flush > 0, "flush")
    `TB_CHECK(n_phase > 0, "phase reset with a new offset")
    `TB_CHECK(n_auto > 0, "auto sync")
    `TB_CHECK(n_delay > 0, "delay line phase shift")
    `TB_CHECK(dac_ok > 100 && dac_bad == 0, "DAC output")
    `TB_CHECK(n_cap > 0, "SRAM capture")
    `TB_CHECK(n_sram > 0, "SRAM host access")
    `TB_CHECK(n_adc_err > 0, "ADC busy error")
    `TB_CHECK(n_test_mode > 0, "test mode")
    `TB_FINISH
  end
endmodule
