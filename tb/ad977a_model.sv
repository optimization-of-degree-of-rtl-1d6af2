// ad977a_model: behavioural model of a serial 16-bit sampling ADC of the AD977A kind,
// for simulation only. A rising edge of `start_convert` starts a conversion of
// `value`: after T_BUSY_NS `busyb` goes low, then the 16 result bits are sent MSB
// first on `sdata`, each valid around a rising edge of the discontinuous `sclk`
// (half period SCLK_HALF_NS); `busyb` returns high after the last bit. `convs`
// counts conversions.
`timescale 1ns/1ps
module ad977a_model #(
  parameter int SCLK_HALF_NS = 23,
  parameter int T_BUSY_NS    = 15
) (
  input  logic        start_convert,
  input  logic [15:0] value,
  output logic        busyb,
  output logic        sclk,
  output logic        sdata,
  output int          convs
);
  initial begin
    busyb = 1'b1; sclk = 1'b0; sdata = 1'b0; convs = 0;
  end

  always @(posedge start_convert) begin
    logic [15:0] v;
    #1 v = value;
    #(T_BUSY_NS - 1) busyb = 1'b0;
    for (int b = 15; b >= 0; b--) begin
      sdata = v[b];
      #(SCLK_HALF_NS) sclk = 1'b1;
      #(SCLK_HALF_NS) sclk = 1'b0;
    end
    #(SCLK_HALF_NS) busyb = 1'b1;
    convs++;
  end
endmodule
