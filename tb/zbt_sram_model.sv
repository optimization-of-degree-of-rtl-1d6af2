// zbt_sram_model: behavioural model of a 64K x 36 pipelined synchronous SRAM with
// no bus turnaround cycles (ZBT style), for simulation only.
//
// A command is taken at a rising clock edge while `ce_n` and `adv_loadb` are low:
// `we_n` chooses write or read, `addr` the word, `bw_n` the four active-low byte
// enables (byte b = bits 8b+7..8b together with parity bit 32+b). Data follows the command by two clocks:
// write data is taken from `dq` at the second rising edge after the command, read
// data is driven on `dq` between the first and the second edge after the command,
// while `oe_n` is low. The shared `dq` pins are modelled as the controller's output
// (`dq_in`) and this model's output (`dq_out`, zero when not driving).
`timescale 1ns/1ps
module zbt_sram_model #(
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic          ce_n,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic          adv_loadb,
  input  logic [AW-1:0] addr,
  input  logic [3:0]    bw_n,
  input  logic [35:0]   dq_in,
  output logic [35:0]   dq_out,
  output int            writes,
  output int            reads
);

  typedef struct packed {
    logic          valid;
    logic          write;
    logic [AW-1:0] addr;
    logic [3:0]    bw_n;
  } cmd_t;

  logic [35:0] mem [1 << AW];
  cmd_t s1 = '0, s2 = '0;

  initial begin
    writes = 0;
    reads  = 0;
    for (int i = 0; i < (1 << AW); i++) mem[i] = '0;
  end

  always @(posedge clk) begin
    if (s2.valid && s2.write) begin
      for (int b = 0; b < 4; b++)
        if (!s2.bw_n[b]) begin
          mem[s2.addr][8*b +: 8] <= dq_in[8*b +: 8];
          mem[s2.addr][32 + b]   <= dq_in[32 + b];
        end
      writes <= writes + 1;
    end
    if (s2.valid && !s2.write) reads <= reads + 1;
    s2 <= s1;
    s1 <= '{valid: !ce_n && !adv_loadb, write: !we_n, addr: addr, bw_n: bw_n};
  end

  assign dq_out = (s2.valid && !s2.write && !oe_n) ? mem[s2.addr] : '0;

endmodule
