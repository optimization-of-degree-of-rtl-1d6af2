// tb_ref_lut: self-checking test of a reference table. The host port writes a
// cosine table; the table is read back on the host port (one-cycle latency, with
// rd_valid) and on the PSD port (one-cycle latency) at random indices.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_ref_lut;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we_n = 1, re_n = 1, rv;
  logic [7:0] addr = '0, idx = '0;
  logic [15:0] din = '0, dout;
  logic signed [15:0] rout;
  logic [15:0] model [256];

  ref_lut #(.DEPTH(256)) dut (.clk, .rst, .we_n, .re_n, .addr, .data_in(din), .data_out(dout),
    .rd_valid(rv), .idx, .ref_out(rout));

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 256; i++) begin
      model[i] = 16'($rtoi(32767.0 * $cos(2.0 * 3.14159265358979 * i / 256.0)));
      addr = 8'(i); din = model[i]; we_n = 0;
      @(negedge clk);
    end
    we_n = 1;
    for (int k = 0; k < 100; k++) begin
      int a, b;
      a = $urandom_range(255);
      b = $urandom_range(255);
      addr = 8'(a); re_n = 0; idx = 8'(b);
      @(negedge clk); re_n = 1;
      `TB_CHECK(rv, "host rd_valid")
      `TB_CHECK(dout == model[a], $sformatf("host read %0d", a))
      `TB_CHECK(rout == model[b], $sformatf("PSD read %0d", b))
      @(negedge clk);
      `TB_CHECK(!rv, "rd_valid pulse")
    end
    `TB_FINISH
  end
endmodule
