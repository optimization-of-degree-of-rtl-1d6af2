// downsampler: one parallel register that keeps the lowpass filter output at the
// instants chosen by the pulse generator.
//
// On `sample_strobe` the current filter output is registered and `sample_valid`
// pulses for one cycle with it. No further averaging is done: the lowpass filter in
// front already band-limits the signal for the reduced rate. Behaviour follows the
// document; the valid flag is this design's handshake.
module downsampler #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sample_strobe,
  input  logic signed [W-1:0] filter_out,
  output logic signed [W-1:0] sample_out,
  output logic                sample_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      sample_out   <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= sample_strobe;
      if (sample_strobe) sample_out <= filter_out;
    end
  end

endmodule
