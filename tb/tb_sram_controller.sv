// tb_sram_controller: self-checking test of the SRAM controller against a model of
// a pipelined (latency two) synchronous SRAM.
//
// Host writes to both 16-bit halves of random words are read back through the
// controller (checking `rd_valid` five cycles after `re_n`) and compared with the
// SRAM model's contents. A capture of 300 samples, arriving at irregular spacing
// including back-to-back, must land in the lower halves of words 0..299 without
// touching the upper halves, while host reads issued during the capture are still
// answered correctly. `cap_busy` must drop after the last sample.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_sram_controller;
  import dlia_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic we_n = 1, re_n = 1, half = 0, rd_valid;
  logic [15:0] addr = '0, din = '0, dout;
  logic cap_start = 0, cap_valid = 0, cap_busy;
  logic [15:0] cap_len = '0;
  sample_t cap_data = '0;
  logic ce_n, s_we_n, oe_n, advb, dq_oe;
  logic [15:0] s_addr;
  logic [3:0] bw_n;
  logic [35:0] dq_o, dq_i, dq_bus;
  int swrites, sreads;

  sram_controller dut (.clk, .rst, .we_n, .re_n, .half, .addr, .data_in(din), .data_out(dout),
    .rd_valid, .cap_start, .cap_len, .cap_data, .cap_valid, .cap_busy, .sram_ce_n(ce_n),
    .sram_we_n(s_we_n), .sram_oe_n(oe_n), .sram_adv_loadb(advb), .sram_addr(s_addr),
    .sram_bw_n(bw_n), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i));

  // the shared data pins: the controller drives them only when dq_oe is high
  assign dq_bus = dq_oe ? dq_o : '0;

  zbt_sram_model #(.AW(16)) sram (.clk, .ce_n, .we_n(s_we_n), .oe_n, .adv_loadb(advb),
    .addr(s_addr), .bw_n, .dq_in(dq_bus), .dq_out(dq_i), .writes(swrites), .reads(sreads));

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  a_no_contention: assert property (@(posedge clk) !(dq_oe && !oe_n))
    else $error("controller and SRAM drive dq together");

  logic [15:0] lo [16], hi [16];
  logic [15:0] addrs [16];

  task automatic host_wr(bit h, logic [15:0] a, logic [15:0] d);
    @(negedge clk);
    we_n = 0; half = h; addr = a; din = d;
    @(negedge clk);
    we_n = 1;
  endtask

  // read; returns the data and the cycles from re_n to rd_valid
  task automatic host_rd(bit h, logic [15:0] a, output logic [15:0] d, output int lat);
    @(negedge clk);
    re_n = 0; half = h; addr = a;
    lat = 0;
    @(negedge clk);
    re_n = 1;
    lat = 1;
    while (!rd_valid && lat < 50) begin @(negedge clk); lat++; end
    d = dout;
  endtask

  logic [15:0] d;
  int lat;
  sample_t samples [300];
  int ncap;

  initial begin
    repeat (4) @(negedge clk); rst = 0;

    for (int i = 0; i < 16; i++) begin
      addrs[i] = 16'($urandom);
      if (i > 0 && addrs[i] == addrs[i-1]) addrs[i] ^= 16'h8000;
      addrs[i][15] = 1'b1;   // keep clear of the capture region
      addrs[i][3:0] = 4'(i);
      lo[i] = 16'($urandom);
      hi[i] = 16'($urandom);
      host_wr(0, addrs[i], lo[i]);
      host_wr(1, addrs[i], hi[i]);
    end
    repeat (5) @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      `TB_CHECK(sram.mem[addrs[i]][31:0] == {hi[i], lo[i]},
                $sformatf("SRAM word %h holds %h", addrs[i], sram.mem[addrs[i]]))
      host_rd(0, addrs[i], d, lat);
      `TB_CHECK(d == lo[i], $sformatf("lower half read %h exp %h", d, lo[i]))
      `TB_CHECK(lat == 5, $sformatf("read latency %0d cycles", lat))
      host_rd(1, addrs[i], d, lat);
      `TB_CHECK(d == hi[i], $sformatf("upper half read %h exp %h", d, hi[i]))
    end

    // mark the upper halves of the capture region, then capture
    for (int i = 0; i < 300; i++) sram.mem[i] = {4'h0, 16'hA5A5, 16'h0000};
    @(negedge clk);
    cap_len = 16'd299; cap_start = 1;
    @(negedge clk);
    cap_start = 0;
    `TB_CHECK(cap_busy, "capture armed")
    fork
      begin
        for (int i = 0; i < 300; i++) begin
          samples[i] = sample_t'($urandom);
          cap_data = samples[i]; cap_valid = 1;
          @(negedge clk);
          cap_valid = 0;
          repeat ($urandom_range(2)) @(negedge clk);
        end
      end
      begin
        // host reads during the capture
        repeat (5) begin
          int k;
          k = $urandom_range(15);
          host_rd(1, addrs[k], d, lat);
          `TB_CHECK(d == hi[k], "host read during capture")
        end
      end
    join
    repeat (3) @(negedge clk);
    `TB_CHECK(!cap_busy, "capture finished")
    repeat (5) @(negedge clk);
    ncap = 0;
    for (int i = 0; i < 300; i++)
      if (sram.mem[i][31:0] == {16'hA5A5, samples[i]}) ncap++;
    `TB_CHECK(ncap == 300, $sformatf("%0d of 300 captured samples in place", ncap))
    `TB_CHECK(sram.mem[300][15:0] == 16'h0000, "nothing written past the capture")
    host_rd(0, 16'd7, d, lat);
    `TB_CHECK(d == samples[7], "captured sample read by the host")
    `TB_FINISH
  end
endmodule
