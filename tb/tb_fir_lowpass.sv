// tb_fir_lowpass: self-checking test of the symmetric FIR filter at its default size
// (65 taps). The coefficients are recomputed here from the documented formula
// (Hamming-windowed sinc, 1.5 kHz cutoff at 100 kHz, weight 2^16). Checks: output
// latency of two cycles, exact agreement with a direct-form convolution model
// (sum c_j x[n-j], arithmetic right shift by 16, saturation) for random input,
// the impulse response, unity gain at DC, and strong attenuation at 25 kHz.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_fir_lowpass;
  int checks = 0, failures = 0;
  localparam int N = 64;
  logic clk = 0, rst = 1, iv = 0, ov;
  logic signed [15:0] x = '0, y;
  longint c [N+1];
  logic signed [15:0] hist [$];

  fir_lowpass #(.N(N)) dut (.clk, .rst, .in_valid(iv), .filter_in(x), .out_valid(ov), .filter_out(y));

  always #5 clk = ~clk;
  initial begin #50000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  function automatic void coefs();
    real h [N+1]; real tot = 0.0; real pi = 3.14159265358979; longint s = 0;
    for (int j = 0; j <= N; j++) begin
      real t = real'(j - N/2);
      h[j] = (j == N/2) ? 2.0 * 1500.0 / 100000.0 : $sin(2.0 * pi * 0.015 * t) / (pi * t);
      h[j] *= 0.54 - 0.46 * $cos(2.0 * pi * real'(j < N/2 ? j : N - j) / real'(N));
      tot += h[j];
    end
    for (int j = 0; j < N/2; j++) begin
      c[j] = longint'($floor(h[j] / tot * 65536.0 + 0.5));
      c[N-j] = c[j];
      s += 2 * c[j];
    end
    c[N/2] = 65536 - s;
  endfunction

  function automatic logic signed [15:0] model();
    longint acc = 0;
    for (int j = 0; j <= N; j++) acc += c[j] * ((j < hist.size()) ? longint'(hist[j]) : 0);
    acc = acc >>> 16;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return 16'(acc);
  endfunction

  task automatic push(logic signed [15:0] v, output logic signed [15:0] got);
    @(negedge clk) x = v; iv = 1;
    @(negedge clk) iv = 0;
    `TB_CHECK(!ov, "no output one cycle after input")
    @(negedge clk);
    `TB_CHECK(ov, "output two cycles after input")
    got = y;
    hist.push_front(v);
    if (hist.size() > N + 1) void'(hist.pop_back());
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic signed [15:0] g, e;
    real pk;
    coefs();
    repeat (3) @(negedge clk); rst = 0;
    // impulse response
    for (int n = 0; n <= N + 2; n++) begin
      push(n == 0 ? 16'sd16384 : 16'sd0, g);
      e = model();
      `TB_CHECK(g == e, $sformatf("impulse n=%0d got %0d exp %0d", n, g, e))
    end
    // random input
    for (int n = 0; n < 300; n++) begin
      push(16'($urandom), g);
      e = model();
      `TB_CHECK(g == e, $sformatf("random n=%0d got %0d exp %0d", n, g, e))
    end
    // DC gain
    for (int n = 0; n < N + 2; n++) push(16'sd10000, g);
    `TB_CHECK(g >= 9998 && g <= 10000, $sformatf("DC gain: 10000 -> %0d", g))
    // 25 kHz at 100 kHz sampling: x = 20000*cos(pi n / 2)
    pk = 0;
    for (int n = 0; n < 2 * N; n++) begin
      push(n % 4 == 0 ? 16'sd20000 : (n % 4 == 2 ? -16'sd20000 : 16'sd0), g);
      if (n > N + 2 && (g < 0 ? -real'(g) : real'(g)) > pk) pk = (g < 0 ? -real'(g) : real'(g));
    end
    `TB_CHECK(pk < 20.0, $sformatf("25 kHz attenuated, peak %0.1f", pk))
    `TB_FINISH
  end
endmodule
