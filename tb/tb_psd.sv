// tb_psd: self-checking test of the phase sensitive detector.
//
// External sync mode: a sampled cosine of known amplitude and phase is fed with a
// sync pulse at the start of every period. The inphase and quadrature means must
// equal, bit for bit, a model that multiplies each sample by cos/sin table entries
// at index (k + phase) mod P (k = samples since the sync edge), sums 2^n products
// and shifts right by n. A new user phase must take effect after the next mean
// (RESET_PHASE), a flush must restart the 2^n count, and the mean must appear
// 2*2^n + 4 cycles after the last sample is stored.
// Auto sync mode: without sync edges, the phase must walk to the signal's phase;
// the SHIFT_90/SHIFT_270, ADJUST_PHASE and CHANGE_SIGN steps must each happen.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_psd;
  import dlia_pkg::*;
  int checks = 0, failures = 0;
  localparam int P = 32;

  logic clk = 0, rst = 1, sv = 0, rise = 0, auto_m = 0, flush = 0, mv;
  sample_t x = '0, ri, rq;
  logic [3:0] spp = 4'd5, avg = 4'd6;
  logic [7:0] ph_off = 8'd0, idx, phase;
  prod_t mi, mq;
  sample_t cos_t [256], sin_t [256];

  psd dut (.clk, .rst, .sample_in(x), .sample_valid(sv), .sync_rise(rise), .spp_log2(spp),
    .phase_offset(ph_off), .auto_sync(auto_m), .avg_log2(avg), .flush, .lut_idx(idx),
    .ref_i(ri), .ref_q(rq), .inphase_mean(mi), .quad_mean(mq), .mean_valid(mv), .phase);

  // reference tables with one cycle of read latency
  always_ff @(posedge clk) begin ri <= cos_t[idx]; rq <= sin_t[idx]; end

  always #5 clk = ~clk;
  initial begin #200000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  // model of one mean
  longint sum_i, sum_q;
  int     nacc;
  int     k_since;
  real    amp, phi;

  function automatic sample_t sig(int k);
    return sample_t'($rtoi(amp * $cos(2.0 * 3.14159265358979 * real'(k) / P + phi)));
  endfunction

  // counts of auto-sync steps, read from the FSM
  int n_shift_q = 0, n_adjust = 0, n_change = 0, n_shift180 = 0, n_reset = 0;
  always @(posedge clk) begin
    if (dut.state == dut.S_SHIFT_90 || dut.state == dut.S_SHIFT_270) n_shift_q++;
    if (dut.state == dut.S_ADJUST_PHASE) n_adjust++;
    if (dut.state == dut.S_CHANGE_SIGN) n_change++;
    if (dut.state == dut.S_SHIFT_180) n_shift180++;
    if (dut.state == dut.S_RESET_PHASE) n_reset++;
  end

  // every SHIFT_180 step must turn the reference by exactly half a period
  logic       in180 = 1'b0;
  logic [7:0] ph180 = '0;
  int         n180_ok = 0, n180_bad = 0;
  always @(posedge clk) begin
    in180 <= dut.state == dut.S_SHIFT_180;
    ph180 <= phase;
    if (in180) begin
      if (phase == 8'((int'(ph180) + P / 2) % P)) n180_ok++;
      else begin
        n180_bad++;
        $display("SHIFT_180: phase %0d -> %0d", ph180, phase);
      end
    end
  end

  // send one sample, optionally with a sync edge two cycles ahead (as the pulse
  // generator produces it), and spacing cycles in total
  task automatic send(sample_t v, bit do_edge, int spacing);
    if (do_edge) begin @(negedge clk) rise = 1; @(negedge clk) rise = 0; end
    @(negedge clk) x = v; sv = 1;
    @(negedge clk) sv = 0;
    repeat (spacing - (do_edge ? 4 : 2)) @(negedge clk);
  endtask

  // run external-mode periods and check every mean
  int means_seen = 0;
  task automatic run_ext(int periods, int cur_phase, int spacing);
    int   k;
    longint ei, eq;
    for (int p = 0; p < periods; p++) begin
      for (k = 0; k < P; k++) begin
        sample_t v = sig(k);
        int i = (k + cur_phase) % P;
        fork
          send(v, k == 0, spacing);
          begin
            // the product is taken from the sample, mean checked when it appears
            sum_i += longint'(v) * longint'(cos_t[i]);
            sum_q += longint'(v) * longint'(sin_t[i]);
            nacc++;
            if (nacc == (1 << avg)) begin
              ei = sum_i >>> avg; eq = sum_q >>> avg;
              sum_i = 0; sum_q = 0; nacc = 0;
              fork
                begin
                  int wait_c = 0;
                  while (!mv && wait_c < 4000) begin @(posedge clk); #1; wait_c++; end
                  `TB_CHECK(mv, "mean produced")
                  `TB_CHECK(longint'(mi) == ei && longint'(mq) == eq,
                            $sformatf("mean I=%0d Q=%0d exp %0d %0d", mi, mq, ei, eq))
                  `TB_CHECK(wait_c >= 2 * (1 << avg) && wait_c <= 2 * (1 << avg) + 8,
                            $sformatf("mean latency %0d cycles", wait_c))
                  means_seen++;
                end
              join_none
            end
          end
        join
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      cos_t[i] = sample_t'($rtoi(32767.0 * $cos(2.0 * 3.14159265358979 * i / P)));
      sin_t[i] = sample_t'($rtoi(32767.0 * $sin(2.0 * 3.14159265358979 * i / P)));
    end
    amp = 20000.0; phi = 0.0;
    sum_i = 0; sum_q = 0; nacc = 0;
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);

    // external sync, phase 0, 64-sample means
    run_ext(6, 0, 300);
    `TB_CHECK(means_seen == 3, $sformatf("three means, got %0d", means_seen))
    `TB_CHECK(mi > 0 && mi > 10 * (mq < 0 ? -mq : mq), "phase-matched: inphase dominates")

    // a new user phase is picked up in RESET_PHASE after the next mean
    ph_off = 8'd8; phi = 3.14159265358979 / 2.0;
    run_ext(2, 0, 300);             // this mean still uses phase 0
    run_ext(4, 8, 300);
    `TB_CHECK(mi > 10 * (mq < 0 ? -mq : mq) && mi > 0, "user phase of a quarter period matches a 90 degree signal")
    `TB_CHECK(n_reset >= 3, "RESET_PHASE used")

    // flush: 20 samples, flush, then a full count is needed again
    begin
      int n_before;
      n_before = means_seen;
      for (int k = 0; k < 20; k++) send(sig(k), k == 0, 300);
      @(negedge clk) flush = 1; @(negedge clk) flush = 0;
      sum_i = 0; sum_q = 0; nacc = 0;
      for (int k = 20; k < P; k++) begin
        int i;
        i = (k + 8) % P;
        send(sig(k), 1'b0, 300);
        sum_i += longint'(sig(k)) * longint'(cos_t[i]);
        sum_q += longint'(sig(k)) * longint'(sin_t[i]);
        nacc++;
      end
      run_ext(2, 8, 300);
      repeat (400) @(negedge clk);
      `TB_CHECK(means_seen == n_before + 1, "flush restarts the sample count")
    end

    // auto sync: signal at 100 degrees, no sync edges, short means
    auto_m = 1; avg = 4'd5; phi = 100.0 * 3.14159265358979 / 180.0;
    @(negedge clk) rst = 1; @(negedge clk) rst = 0; ph_off = 8'd0;
    for (int n = 0; n < 60 * P; n++) send(sig(n), 1'b0, 12);
    // expected phase index: 100/360*32 = 8.9
    `TB_CHECK(phase >= 8 && phase <= 10, $sformatf("auto sync locked at phase %0d, expected 8..10", phase))
    `TB_CHECK(n_shift_q > 0, "quarter-period shift used")
    `TB_CHECK(n_adjust > 0, "ADJUST_PHASE used")
    `TB_CHECK(n_change > 0, "CHANGE_SIGN used")
    // a signal at 280 degrees: the reference must turn through half a period
    phi = 280.0 * 3.14159265358979 / 180.0;
    for (int n = 0; n < 60 * P; n++) send(sig(n), 1'b0, 12);
    `TB_CHECK(phase >= 24 && phase <= 26, $sformatf("auto sync relocked at phase %0d, expected 24..26", phase))
    `TB_CHECK(n180_ok > 0 && n180_bad == 0, $sformatf("half-period shifts: %0d right, %0d wrong", n180_ok, n180_bad))
    $display("auto steps: quarter=%0d adjust=%0d change=%0d half=%0d", n_shift_q, n_adjust, n_change, n_shift180);
    `TB_FINISH
  end
endmodule
