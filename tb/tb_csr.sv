// tb_csr: self-checking test of the register file. Checks reset values, writes and
// read-back of configuration registers, that status registers ignore writes and
// return their inputs, the one-cycle read latency and the write strobes.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_csr;
  int checks = 0, failures = 0;
  localparam int AW = 4, N = 16;
  localparam logic [N-1:0] RO = 16'h8080;   // registers 7 and 15 are status
  localparam logic [15:0] RV [N] = '{16'h1111, 16'h2222, 16'h0005, 16'h0006, 16'h0007, 16'h0008, 16'h0009, 16'h000A,
                                     16'h000B, 16'h000C, 16'h000D, 16'h000E, 16'h000F, 16'h0010, 16'h0011, 16'h0012};

  logic clk = 0, rst = 1, we_n = 1, re_n = 1, rd_valid;
  logic [AW-1:0] addr = '0;
  logic [15:0] din = '0, dout;
  logic [15:0] param [N], status [N];
  logic [N-1:0] wr_stb;

  csr #(.ADDR_W(AW), .NUM_REGS(N), .RO_MASK(RO), .RESET_VAL(RV)) dut (
    .clk, .rst, .we_n, .re_n, .addr, .data_in(din), .data_out(dout), .rd_valid,
    .param, .status_in(status), .wr_stb);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  logic [15:0] model [N];

  task automatic wr(int a, logic [15:0] d);
    @(negedge clk); addr = AW'(a); din = d; we_n = 0;
    #1 `TB_CHECK(wr_stb == N'(1 << a), "write strobe one-hot")
    @(negedge clk); we_n = 1;
  endtask

  task automatic rd(int a, output logic [15:0] d);
    @(negedge clk); addr = AW'(a); re_n = 0;
    @(negedge clk); re_n = 1;
    `TB_CHECK(rd_valid === 1'b1, "rd_valid one cycle after re_n")
    d = dout;
    @(negedge clk);
    `TB_CHECK(rd_valid === 1'b0, "rd_valid is a single pulse")
  endtask

  initial begin
    logic [15:0] d;
    for (int i = 0; i < N; i++) status[i] = 16'(16'hA000 + i);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < N; i++) model[i] = RO[i] ? status[i] : RV[i];
    for (int i = 0; i < N; i++) begin
      rd(i, d);
      `TB_CHECK(d == model[i], $sformatf("reset/status value reg %0d got %h exp %h", i, d, model[i]))
    end
    for (int n = 0; n < 40; n++) begin
      int a;
      logic [15:0] v;
      a = $urandom_range(N - 1);
      v = 16'($urandom);
      wr(a, v);
      if (!RO[a]) model[a] = v;
      `TB_CHECK(param[a] == model[a], $sformatf("param out reg %0d", a))
    end
    for (int i = 0; i < N; i++) begin
      rd(i, d);
      `TB_CHECK(d == model[i], $sformatf("read back reg %0d got %h exp %h", i, d, model[i]))
    end
    status[7] = 16'h1234;
    rd(7, d);
    `TB_CHECK(d == 16'h1234, "status follows its input")
    `TB_FINISH
  end
endmodule
