// fir_lowpass: symmetric N+1 tap FIR filter used for anti-aliasing ahead of the
// downsampler.
//
// Each valid input sample enters a chain of N+1 sample registers (tap0 newest,
// tapN oldest). Taps that mirror each other about the centre are added
// (tap_j + tap_{N-j}), each pair sum is multiplied by its coefficient c_j, the centre
// tap by c_{N/2}, and the products are summed. Because the coefficients add up to a
// power of two, 2^COEF_FRAC, dividing by the filter weight is an arithmetic right
// shift by COEF_FRAC bits, followed by saturation to the sample range. The output is
// registered and `out_valid` pulses two cycles after `in_valid` (one to shift the
// taps, one to register the sum); the taps start at zero after reset (zero-padded input).
//
// N must be even. The architecture (shared pair adders, N/2+1 multipliers, one
// summation and a shift) and the 65-tap default follow the document. The default
// coefficients are a Hamming-windowed sinc with the document's preferred 1.5 kHz cutoff
// at a 100 kHz input rate, computed at elaboration:
//   h_j = sin(2*pi*fc/fs*(j - N/2)) / (pi*(j - N/2)) * (0.54 - 0.46*cos(2*pi*j/N)),
//   c_j = round(h_j * 2^COEF_FRAC / sum(h)), with the centre tap absorbing rounding so
//   that sum(c_j) = 2^COEF_FRAC exactly.
// The window, the 18-bit coefficients and COEF_FRAC = 16 are this design's choices.
module fir_lowpass #(
  parameter int  W         = 16,
  parameter int  N         = 64,        // filter order; N+1 taps
  parameter int  COEF_W    = 18,
  parameter int  COEF_FRAC = 16,        // log2(filter weight)
  parameter real CUTOFF_HZ = 1500.0,
  parameter real FS_HZ     = 100000.0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] filter_in,
  output logic                out_valid,
  output logic signed [W-1:0] filter_out
);

  localparam int HALF  = N / 2;
  localparam int ACC_W = W + 1 + COEF_W + $clog2(HALF + 1) + 1;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_arr_t [HALF+1];

  function automatic coef_arr_t calc_coefs();
    coef_arr_t c;
    real       h [HALF+1];
    real       total, x, pi;
    longint    isum;
    pi    = 3.14159265358979;
    total = 0.0;
    for (int j = 0; j <= HALF; j++) begin
      x = real'(j - HALF);
      if (j == HALF) h[j] = 2.0 * CUTOFF_HZ / FS_HZ;
      else           h[j] = $sin(2.0 * pi * CUTOFF_HZ / FS_HZ * x) / (pi * x);
      h[j] = h[j] * (0.54 - 0.46 * $cos(2.0 * pi * real'(j) / real'(N)));
      total += (j == HALF) ? h[j] : 2.0 * h[j];
    end
    isum = 0;
    for (int j = 0; j < HALF; j++) begin
      c[j] = coef_t'($rtoi($floor(h[j] / total * real'(longint'(1) << COEF_FRAC) + 0.5)));
      isum += 2 * longint'(c[j]);
    end
    c[HALF] = coef_t'((longint'(1) << COEF_FRAC) - isum);
    return c;
  endfunction

  localparam coef_arr_t COEF = calc_coefs();

  logic signed [W-1:0]     taps [N+1];
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] scaled;
  logic                    shifted;    // taps were updated last cycle

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i <= N; i++) taps[i] <= '0;
    end else if (in_valid) begin
      taps[0] <= filter_in;
      for (int i = 1; i <= N; i++) taps[i] <= taps[i-1];
    end
  end

  always_comb begin
    acc = ACC_W'(COEF[HALF]) * ACC_W'(taps[HALF]);
    for (int j = 0; j < HALF; j++)
      acc += ACC_W'(COEF[j]) * (ACC_W'(taps[j]) + ACC_W'(taps[N-j]));
  end

  // Divide by the filter weight, then saturate to the sample range (the windowed
  // response overshoots unity slightly on full-scale steps).
  assign scaled = acc >>> COEF_FRAC;

  always_ff @(posedge clk) begin
    if (rst) begin
      filter_out <= '0;
      out_valid  <= 1'b0;
      shifted    <= 1'b0;
    end else begin
      shifted   <= in_valid;
      out_valid <= shifted;
      if (shifted) begin
        if (scaled > ACC_W'(2**(W-1) - 1))    filter_out <= {1'b0, {(W-1){1'b1}}};
        else if (scaled < -ACC_W'(2**(W-1)))  filter_out <= {1'b1, {(W-1){1'b0}}};
        else                                  filter_out <= W'(scaled);
      end
    end
  end

endmodule
