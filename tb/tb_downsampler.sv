// tb_downsampler: self-checking test of the downsampling register. A changing filter
// output is presented every clock; at random strobe instants the register must
// hold exactly the value present at the strobe, with a one-cycle valid pulse.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_downsampler;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, stb = 0, v;
  logic signed [15:0] fin = '0, dout;

  downsampler dut (.clk, .rst, .sample_strobe(stb), .filter_out(fin), .sample_out(dout), .sample_valid(v));

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  initial begin
    logic signed [15:0] exp_v;
    repeat (3) @(negedge clk); rst = 0;
    for (int k = 0; k < 200; k++) begin
      fin = 16'($urandom);
      stb = ($urandom_range(3) == 0);
      exp_v = stb ? fin : dout;
      @(negedge clk);
      `TB_CHECK(v == stb, "valid follows strobe by one cycle")
      `TB_CHECK(dout == exp_v, $sformatf("held value %h exp %h", dout, exp_v))
      stb = 0;
    end
    `TB_FINISH
  end
endmodule
