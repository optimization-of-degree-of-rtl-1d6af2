// tb_dlia: self-checking test of one lock-in amplifier sub-system at its default sizes
// (65-tap filter, 1024-word sample stores) with a behavioural serial ADC.
//
// The ADC input is A0*cos(2*pi*200Hz*t + p0) + A1*cos(2*pi*1000Hz*t + p1), sampled at
// 100 kHz (50 MHz clock, divide 500). Channel 0 is synced to a 200 Hz square wave
// and channel 1 to a 1000 Hz one, both starting at t0; each takes 32 samples per
// period and averages 32 products per result. Checked:
//   - host writes and reads of the four reference tables;
//   - every ADC word reaches the datapath intact and in order;
//   - the measured sync periods and exactly 32 downsampled samples per period;
//   - the magnitude of each channel's (I, Q) result against A*|H(f)|*32767/2, where
//     |H(f)| is the gain of the ideal (real-valued) Hamming-windowed sinc filter
//     worked out here; for channel 1 five successive results are averaged so that
//     the 200 Hz component cancels;
//   - auto sync mode on channel 0 turns the result onto the +I axis, to within the
//     phase step of 360/32 degrees;
//   - frequency tracking: signal and syncs then move to 230 Hz and 1070 Hz (the
//     polarizer and chopper frequencies of a DOP scan); the periods, the 32 samples
//     per period and the 230 Hz magnitude must follow.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_dlia;
  import dlia_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  localparam real PI = 3.14159265358979;
  localparam real A0 = 6000.0, A1 = 12000.0, P0 = 0.7, P1 = -1.9;
  localparam int  T0 = 100000;      // ns, start of both sync signals
  // the two frequencies; both change together to test frequency tracking
  real         f0 = 200.0, f1 = 1000.0;
  realtime     t0 = real'(T0);
  localparam int  N  = 64;          // filter order

  logic        adc_sc, adc_busyb, adc_sclk, adc_sdata, adc_error;
  logic [15:0] adc_value = '0;
  int          convs;
  logic [1:0]  sync_in = '0;
  ch_cfg_t     ch_cfg [2];
  logic        lut_we_n = 1, lut_re_n = 1, lut_rv;
  logic [1:0]  lut_sel = '0;
  logic [LUT_AW-1:0] lut_addr = '0;
  logic [15:0] lut_wdata = '0, lut_rdata;
  psd_result_t result [2];
  logic [1:0]  result_valid;
  logic [LUT_AW-1:0] phase [2];
  logic [23:0] sync_period [2];
  tap_t        taps [TAP_PER_DLIA];

  dlia dut (.clk, .rst, .adc_start_convert(adc_sc), .adc_busyb, .adc_sclk, .adc_sdata,
    .sync_in, .adc_div(16'd500), .adc_pw(16'd5), .adc_sync_align(1'b0), .ch_cfg,
    .flush(2'b00), .lut_we_n, .lut_re_n, .lut_sel, .lut_addr, .lut_wdata, .lut_rdata,
    .lut_rd_valid(lut_rv), .result, .result_valid, .phase, .sync_period, .taps, .adc_error);

  ad977a_model adc (.start_convert(adc_sc), .value(adc_value), .busyb(adc_busyb),
    .sclk(adc_sclk), .sdata(adc_sdata), .convs);

  always #10 clk = ~clk;   // 50 MHz
  initial begin #250000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  // ---------------- stimulus ----------------
  function automatic real sig(real t_ns);
    real t;
    t = (t_ns - t0) * 1.0e-9;
    return A0 * $cos(2.0 * PI * f0 * t + P0) + A1 * $cos(2.0 * PI * f1 * t + P1);
  endfunction

  // square-wave syncs, high for the first half of each period from t0 on
  function automatic logic sq_wave(real f, realtime t_ns);
    real c;
    c = (t_ns - t0) * 1.0e-9 * f;
    return t_ns >= t0 && (c - $floor(c)) < 0.5;
  endfunction
  always @(negedge clk) begin
    sync_in[0] <= sq_wave(f0, $realtime);
    sync_in[1] <= sq_wave(f1, $realtime);
  end

  logic [15:0] sent [$];
  int nconv = 0;
  always @(posedge adc_sc) begin
    adc_value = 16'($rtoi(sig($realtime)));
    if (!rst && nconv++ > 0) sent.push_back(adc_value);
  end

  int adc_ok = 0, adc_bad = 0;
  always @(posedge clk) if (taps[0].valid && sent.size() != 0) begin
    logic [15:0] e;
    e = sent.pop_front();
    if (16'(taps[0].data) == e) adc_ok++;
    else begin
      adc_bad++;
      if (adc_bad < 5) $display("ADC word %h expected %h", taps[0].data, e);
    end
  end

  // downsampled samples per sync period
  int ds_cnt [2] = '{0, 0}, per_ok [2] = '{0, 0}, per_bad [2] = '{0, 0}, edges [2] = '{0, 0};
  int skip_to [2] = '{3, 3};   // periods not counted: start-up, and the one after a switch
  for (genvar c = 0; c < 2; c++) begin : g_cnt
    logic sq = 1'b0;
    always @(posedge clk) begin
      sq <= sync_in[c];
      if (taps[2 + c].valid) ds_cnt[c]++;
      if (sync_in[c] && !sq) begin
        edges[c]++;
        if (edges[c] > skip_to[c]) begin
          if (ds_cnt[c] == 32) per_ok[c]++;
          else begin
            per_bad[c]++;
            $display("channel %0d: %0d samples in a period", c, ds_cnt[c]);
          end
        end
        ds_cnt[c] = 0;
      end
    end
  end

  // results
  real ri [2][$], rq [2][$];
  always @(posedge clk) for (int c = 0; c < 2; c++) if (result_valid[c]) begin
    ri[c].push_back(real'(result[c].i));
    rq[c].push_back(real'(result[c].q));
  end

  // ---------------- reference model: filter gain ----------------
  function automatic real filter_gain(real f);
    real h [N+1];
    real tot, re, im, x;
    tot = 0.0;
    for (int j = 0; j <= N; j++) begin
      x = real'(j - N/2);
      h[j] = (j == N/2) ? 2.0 * 1500.0 / 100000.0
                        : $sin(2.0 * PI * 1500.0 / 100000.0 * x) / (PI * x);
      h[j] = h[j] * (0.54 - 0.46 * $cos(2.0 * PI * real'(j) / real'(N)));
      tot += h[j];
    end
    re = 0.0; im = 0.0;
    for (int j = 0; j <= N; j++) begin
      re += h[j] / tot * $cos(2.0 * PI * f / 100000.0 * real'(j));
      im -= h[j] / tot * $sin(2.0 * PI * f / 100000.0 * real'(j));
    end
    return $sqrt(re * re + im * im);
  endfunction

  // ---------------- host access to the tables ----------------
  logic [15:0] tbl [4][32];

  task automatic lut_write(int s, int a, logic [15:0] d);
    @(negedge clk);
    lut_sel = 2'(s); lut_addr = LUT_AW'(a); lut_wdata = d; lut_we_n = 0;
    @(negedge clk);
    lut_we_n = 1;
  endtask

  task automatic lut_read(int s, int a, output logic [15:0] d, output bit v);
    @(negedge clk);
    lut_sel = 2'(s); lut_addr = LUT_AW'(a); lut_re_n = 0;
    @(negedge clk);
    lut_re_n = 1;
    v = lut_rv;
    d = lut_rdata;
  endtask

  function automatic real mag(real i, real q);
    return $sqrt(i * i + q * q);
  endfunction

  real g0, g1, e0, e1, m, si, sq;
  logic [15:0] d;
  bit v;
  int n0;

  initial begin
    for (int c = 0; c < 2; c++)
      ch_cfg[c] = '{spp_log2: 4'd5, phase: '0, dly_div: 16'd1, dly_sel: '0,
                    auto_sync: 1'b0, avg_log2: 4'd5};
    repeat (5) @(negedge clk); rst = 0;

    for (int k = 0; k < 32; k++) begin
      for (int c = 0; c < 2; c++) begin
        tbl[2*c][k]   = 16'($rtoi($floor(32767.0 * $cos(2.0 * PI * k / 32.0) + 0.5)));
        tbl[2*c+1][k] = 16'($rtoi($floor(32767.0 * $sin(2.0 * PI * k / 32.0) + 0.5)));
      end
      for (int s = 0; s < 4; s++) lut_write(s, k, tbl[s][k]);
    end
    for (int n = 0; n < 40; n++) begin
      int s, a;
      s = $urandom_range(3);
      a = $urandom_range(31);
      lut_read(s, a, d, v);
      `TB_CHECK(v && d == tbl[s][a], $sformatf("table %0d word %0d read %h exp %h", s, a, d, tbl[s][a]))
    end

    g0 = filter_gain(f0);
    g1 = filter_gain(f1);
    e0 = A0 * g0 * 32767.0 / 2.0;
    e1 = A1 * g1 * 32767.0 / 2.0;
    $display("filter gain %f at 200 Hz, %f at 1000 Hz", g0, g1);

    // external sync: channel 0 results from the fourth on
    wait (ri[0].size() >= 6);
    `TB_CHECK(sync_period[0] >= 24'd249999 && sync_period[0] <= 24'd250001,
              $sformatf("channel 0 period %0d", sync_period[0]))
    `TB_CHECK(sync_period[1] >= 24'd49999 && sync_period[1] <= 24'd50001,
              $sformatf("channel 1 period %0d", sync_period[1]))
    for (int k = 3; k < 6; k++) begin
      m = mag(ri[0][k], rq[0][k]);
      `TB_CHECK(m > 0.98 * e0 && m < 1.02 * e0,
                $sformatf("channel 0 magnitude %f expected %f", m, e0))
    end
    // channel 1: mean of five successive results (one 200 Hz period)
    n0 = ri[1].size();
    wait (ri[1].size() >= n0 + 5);
    si = 0.0; sq = 0.0;
    for (int k = n0; k < n0 + 5; k++) begin si += ri[1][k] / 5.0; sq += rq[1][k] / 5.0; end
    m = mag(si, sq);
    `TB_CHECK(m > 0.98 * e1 && m < 1.02 * e1,
              $sformatf("channel 1 magnitude %f expected %f", m, e1))

    // auto sync on channel 0
    @(negedge clk);
    ch_cfg[0].auto_sync = 1'b1;
    n0 = ri[0].size();
    wait (ri[0].size() >= n0 + 12);
    // the search climbs along I in steps of 360/32 degrees and keeps stepping around
    // the best phase, so the last results lie within two steps of the I axis and the
    // best of them within half a step
    begin
      real qmin;
      qmin = 1.0e30;
      for (int k = n0 + 8; k < n0 + 12; k++) begin
        $display("auto sync: I=%f Q=%f", ri[0][k], rq[0][k]);
        `TB_CHECK(ri[0][k] > 0.95 * e0, "auto sync: result near the +I axis")
        m = mag(ri[0][k], rq[0][k]);
        `TB_CHECK(m > 0.98 * e0 && m < 1.02 * e0, "auto sync: magnitude kept")
        if ((rq[0][k] < 0 ? -rq[0][k] : rq[0][k]) < qmin) qmin = rq[0][k] < 0 ? -rq[0][k] : rq[0][k];
      end
      `TB_CHECK(qmin < 0.12 * e0, $sformatf("auto sync: best |Q| %f", qmin))
    end

    // frequency tracking: both syncs and signals move to the document's DOP
    // frequencies (polarizer 230 Hz, chopper 1070 Hz); external sync again
    @(negedge clk);
    ch_cfg[0].auto_sync = 1'b0;
    skip_to[0] = edges[0] + 2;
    skip_to[1] = edges[1] + 2;
    f0 = 230.0; f1 = 1070.0; t0 = $realtime;
    g0 = filter_gain(f0);
    e0 = A0 * g0 * 32767.0 / 2.0;
    n0 = ri[0].size();
    wait (ri[0].size() >= n0 + 11);
    `TB_CHECK(sync_period[0] >= 24'd217390 && sync_period[0] <= 24'd217393,
              $sformatf("channel 0 period at 230 Hz: %0d", sync_period[0]))
    `TB_CHECK(sync_period[1] >= 24'd46727 && sync_period[1] <= 24'd46730,
              $sformatf("channel 1 period at 1070 Hz: %0d", sync_period[1]))
    // the 1070 Hz component does not cancel over one 230 Hz period; it is averaged
    // down over eight results
    si = 0.0; sq = 0.0;
    for (int k = n0 + 3; k < n0 + 11; k++) begin si += ri[0][k] / 8.0; sq += rq[0][k] / 8.0; end
    m = mag(si, sq);
    `TB_CHECK(m > 0.95 * e0 && m < 1.05 * e0,
              $sformatf("channel 0 magnitude at 230 Hz %f expected %f", m, e0))
    `TB_CHECK(per_ok[0] > 12 && per_bad[0] == 0, "32 samples per channel 0 period after the switch")

    `TB_CHECK(adc_ok > 1000 && adc_bad == 0, $sformatf("ADC words: %0d ok, %0d bad", adc_ok, adc_bad))
    `TB_CHECK(!adc_error, "no ADC timing error")
    `TB_CHECK(per_ok[1] > 40 && per_bad[1] == 0, "32 samples per channel 1 period after the switch")
    `TB_FINISH
  end
endmodule
