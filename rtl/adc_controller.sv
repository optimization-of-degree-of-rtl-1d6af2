// adc_controller: drives a serial successive-approximation ADC (an AD977A-style part)
// and delivers its 16-bit samples to the system clock domain.
//
// Conversion timing: a rollover counter strobes every `adc_clk_divide` system clocks,
// setting the sampling rate. Each strobe loads a down counter with `pulse_width`;
// `start_convert` is high while that counter is above zero, which stretches the
// convert request to the minimum width the ADC needs. When `sync_align` is set, a
// rising edge of `sync` restarts the rate counter, so conversions keep a fixed
// position relative to the reference sync.
//
// Data capture: the ADC shifts its result out MSB first on its own discontinuous
// `sclk`; `sdata` is sampled on the rising edge into a 16-bit shift register in the
// `sclk` domain. A 4-bit bit counter in that domain counts the bits of a word and is
// held at zero while the ADC is idle (`busyb` high), so each word starts at bit 0; a
// word flag flip-flop toggles at the 16th bit, once per completed word.
// Words are only delivered once a conversion has ended after reset, when the
// counter is known to be aligned. The word flag crosses into the system domain
// through two flip-flops; each change of the synchronised flag loads the shift
// register into the 16-bit parallel register `sample_out` (stable by then, a false
// path) and pulses `sample_rdy` for one cycle with it.
//
// `error` is set at a conversion request that finds the ADC still busy (`busyb` low)
// and cleared at one that finds it idle.
//
// Timing: `sample_rdy` follows the 16th `sclk` edge by 3 to 4 system clocks.
// The sclk-domain counter cannot be cleared by a synchronous reset while `sclk` is
// stopped, so it is framed by the ADC's busy flag instead; `busyb` is therefore used
// both as that asynchronous clear and, through a synchroniser, in the system clock
// domain, which lint tools report as a signal used both ways. That is intended.
//
// The architecture (rate counter, pulse-width down counter, shift register, word
// counter, two-flop crossing, parallel register) follows the document; the toggling
// word flag, the framing by `busyb`, the sync-alignment enable and the error rule
// are this design's.
module adc_controller #(
  parameter int DIV_W = 16,
  parameter int W     = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [DIV_W-1:0]    adc_clk_divide,
  input  logic [DIV_W-1:0]    pulse_width,
  input  logic                sync,          // synchronous to clk
  input  logic                sync_align,
  // ADC pins
  output logic                start_convert,
  input  logic                busyb,
  input  logic                sclk,
  input  logic                sdata,
  // sample datapath
  output logic signed [W-1:0] sample_out,
  output logic                sample_rdy,
  output logic                error
);

  // ---------------- convert pulse (system clock domain) ----------------
  logic             sync_q, conv_stb;
  logic [DIV_W-1:0] pw_count;
  logic [1:0]       busyb_s;

  always_ff @(posedge clk) begin
    if (rst) sync_q <= 1'b0;
    else     sync_q <= sync;
  end

  rollover_counter #(.WIDTH(DIV_W)) u_rate (
    .clk, .rst, .period(adc_clk_divide), .restart(sync_align & sync & ~sync_q), .stb(conv_stb)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pw_count <= '0;
      busyb_s  <= 2'b11;
      error    <= 1'b0;
    end else begin
      busyb_s <= {busyb_s[0], busyb};
      if (conv_stb) begin
        pw_count <= pulse_width;
        error    <= ~busyb_s[1];
      end else if (pw_count != '0) begin
        pw_count <= pw_count - DIV_W'(1);
      end
    end
  end

  assign start_convert = (pw_count != '0);

  // ---------------- serial capture (ADC sclk domain) ----------------
  // The bit counter is held at zero while the ADC is idle (busyb high), which frames
  // every word even though sclk does not run during a system reset.
  logic [W-1:0] shift_q;
  logic [3:0]   bit_count;
  logic         word_t;     // toggles once per completed word

  always_ff @(posedge sclk) begin
    shift_q <= {shift_q[W-2:0], sdata};
    if (bit_count == 4'd15) word_t <= ~word_t;
  end

  always_ff @(posedge sclk or posedge busyb) begin
    if (busyb) bit_count <= '0;
    else       bit_count <= bit_count + 4'd1;
  end

  // ---------------- crossing into the system clock domain ----------------
  logic [2:0] word_s;
  logic       busyb_q;
  logic       framed;   // a conversion has ended since reset: the bit counter is aligned

  always_ff @(posedge clk) begin
    if (rst) begin
      word_s     <= '0;
      busyb_q    <= 1'b1;
      framed     <= 1'b0;
      sample_out <= '0;
      sample_rdy <= 1'b0;
    end else begin
      word_s     <= {word_s[1:0], word_t};
      busyb_q    <= busyb_s[1];
      if (busyb_s[1] && !busyb_q) framed <= 1'b1;
      sample_rdy <= (word_s[2] ^ word_s[1]) && framed;
      if (word_s[2] ^ word_s[1]) sample_out <= shift_q;
    end
  end

endmodule
