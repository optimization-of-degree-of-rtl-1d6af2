// tb_host_decoder: self-checking test of the packet decoder.
//
// A UART stand-in offers received bytes (rx_rdy high while its queue holds one, the
// byte taken on rx_strobe) and accepts transmitted bytes (tx_rdy drops for a few
// cycles after each tx_strobe). A memory stand-in holds five small banks; banks 0..3
// answer reads after a bank-dependent delay, bank 4 never answers. The test writes
// and reads every bank, checks response packets (command+1, same address, stored
// data), a read timeout, an unknown command, test mode (bytes dropped), and
// interrupt packets including their order and the newest-data rule.
`timescale 1ns/1ps
`include "tb_macros.svh"
module tb_host_decoder;
  import dlia_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, test_mode = 0;
  logic rx_rdy = 0, rx_strobe, tx_rdy = 1, tx_strobe, busyb;
  logic [7:0] rx_byte = '0, tx_byte;
  logic we_n, re_n, rd_valid = 0;
  logic [15:0] addr, dto, dfrom = '0;
  logic [2:0] bank;
  logic [NUM_INTS-1:0] int_req = '0;
  logic [31:0] int_data [NUM_INTS];

  localparam int TIMEOUT = 16;

  host_decoder #(.READ_TIMEOUT(TIMEOUT)) dut (.clk, .rst, .test_mode, .rx_rdy, .rx_byte,
    .rx_strobe, .tx_rdy, .tx_byte, .tx_strobe, .host_busyb(busyb), .we_n, .re_n, .addr,
    .bank_sel(bank), .data_to_psd(dto), .data_from_psd(dfrom), .rd_valid, .int_req, .int_data);

  always #5 clk = ~clk;
  initial begin #3000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  // ---------------- UART stand-in ----------------
  logic [7:0] rxq [$];
  logic [7:0] txq [$];
  int tx_hold = 0;
  // the byte is taken at the clock edge that ends the rx_strobe cycle; the queue
  // moves on half a cycle later, so the decoder never races the stand-in
  logic took = 1'b0;
  always @(posedge clk) took <= rx_strobe;
  always @(negedge clk) begin
    if (took && rxq.size() != 0) void'(rxq.pop_front());
    rx_rdy  <= rxq.size() != 0;
    rx_byte <= rxq.size() != 0 ? rxq[0] : 8'h00;
  end
  always @(negedge clk) begin
    if (tx_strobe) begin
      txq.push_back(tx_byte);
      tx_rdy  <= 1'b0;
      tx_hold = 3 + $urandom_range(4);
    end else if (tx_hold > 0) begin
      tx_hold--;
      if (tx_hold == 0) tx_rdy <= 1'b1;
    end
  end

  // ---------------- memory stand-in ----------------
  logic [15:0] mem [NUM_BANKS][16];
  int writes = 0, reads = 0;
  int rd_delay = 0;
  logic [15:0] rd_data_q;
  always @(posedge clk) begin
    rd_valid <= 1'b0;
    if (!we_n) begin
      mem[bank][addr[3:0]] <= dto;
      writes++;
    end
    if (!re_n) begin
      reads++;
      if (bank != 3'd4) begin
        rd_delay  = 1 + int'(bank);
        rd_data_q <= mem[bank][addr[3:0]];
      end
    end else if (rd_delay > 0) begin
      rd_delay--;
      if (rd_delay == 0) begin
        rd_valid <= 1'b1;
        dfrom    <= rd_data_q;
      end
    end
  end

  task automatic send_pkt(logic [7:0] cmd, logic [15:0] a, logic [15:0] d);
    logic [39:0] p;
    p = {cmd, a, d};
    for (int i = 0; i < 5; i++) rxq.push_back(p[8*i +: 8]);
    while (rxq.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  task automatic get_pkt(output logic [39:0] p, output bit ok);
    int t;
    t = 0;
    while (txq.size() < 5 && t < 500) begin @(posedge clk); t++; end
    ok = txq.size() >= 5;
    p = '0;
    if (ok) for (int i = 0; i < 5; i++) p[8*i +: 8] = txq.pop_front();
  endtask

  logic [39:0] p;
  bit ok;
  int w0, r0;

  initial begin
    for (int k = 0; k < NUM_INTS; k++) int_data[k] = '0;
    for (int b = 0; b < NUM_BANKS; b++) for (int i = 0; i < 16; i++) mem[b][i] = '0;
    repeat (4) @(negedge clk); rst = 0;
    @(negedge clk);
    `TB_CHECK(busyb, "idle decoder not busy")

    // write every bank, read it back
    for (int b = 0; b < 4; b++) begin
      logic [15:0] v;
      logic [15:0] a;
      v = 16'($urandom);
      a = 16'(16'h0100 * b + 16'(b + 3));
      send_pkt(8'(3*b + 1), a, v);
      `TB_CHECK(mem[b][a[3:0]] == v, $sformatf("write bank %0d", b))
      send_pkt(8'(3*b + 2), a, 16'h0);
      get_pkt(p, ok);
      `TB_CHECK(ok, $sformatf("read response bank %0d", b))
      `TB_CHECK(p[39:32] == 8'(3*b + 3), $sformatf("response command bank %0d: %h", b, p[39:32]))
      `TB_CHECK(p[31:16] == a, "response address")
      `TB_CHECK(p[15:0] == v, $sformatf("response data %h exp %h", p[15:0], v))
    end

    // read of a bank that never answers: no response, decoder free again
    w0 = writes;
    send_pkt(CMD_READ4, 16'h0005, 16'h0);
    `TB_CHECK(!busyb, "busy while a read is outstanding")
    repeat (TIMEOUT + 10) @(posedge clk);
    `TB_CHECK(txq.size() == 0, "no response after a timed-out read")
    `TB_CHECK(busyb, "free after read timeout")
    send_pkt(CMD_WRITE4, 16'h0005, 16'hBEEF);
    `TB_CHECK(writes == w0 + 1 && mem[4][5] == 16'hBEEF, "write after timeout")

    // unknown command: no access, no response
    w0 = writes; r0 = reads;
    send_pkt(8'h77, 16'h0001, 16'h1234);
    repeat (20) @(posedge clk);
    `TB_CHECK(writes == w0 && reads == r0 && txq.size() == 0, "unknown command ignored")

    // test mode: bytes are taken but dropped
    test_mode = 1;
    send_pkt(CMD_WRITE0, 16'h0002, 16'h5555);
    test_mode = 0;
    `TB_CHECK(writes == w0 && mem[0][2] != 16'h5555, "test mode drops packets")
    send_pkt(CMD_WRITE0, 16'h0002, 16'h5555);
    `TB_CHECK(mem[0][2] == 16'h5555, "normal mode after test mode")

    // interrupts: 3 and 1 together, 1 goes first; a second request on 3 before it is
    // sent replaces its data
    @(negedge clk);
    int_data[1] = 32'h1111_2222; int_data[3] = 32'h3333_4444;
    int_req = 5'b01010;
    @(negedge clk);
    int_req = '0;
    int_data[3] = 32'h5555_6666;
    int_req[3] = 1'b1;
    @(negedge clk);
    int_req = '0;
    get_pkt(p, ok);
    `TB_CHECK(ok && p == {CMD_INT1, 32'h1111_2222}, $sformatf("INT1 packet %h", p))
    get_pkt(p, ok);
    `TB_CHECK(ok && p == {CMD_INT3, 32'h5555_6666}, $sformatf("INT3 packet %h", p))
    repeat (50) @(posedge clk);
    `TB_CHECK(txq.size() == 0, "each interrupt sent once")

    // every interrupt line
    for (int k = 0; k < NUM_INTS; k++) begin
      @(negedge clk);
      int_data[k] = {16'(k), 16'hA000 + 16'(k)};
      int_req[k] = 1'b1;
      @(negedge clk);
      int_req[k] = 1'b0;
      get_pkt(p, ok);
      `TB_CHECK(ok && p == {8'(CMD_INT0) + 8'(k), 16'(k), 16'hA000 + 16'(k)},
                $sformatf("INT%0d packet %h", k, p))
    end

    // a read and an interrupt at about the same time: both packets go out
    int_data[2] = 32'hCAFE_F00D;
    rxq.push_back(8'h00); rxq.push_back(8'h00); rxq.push_back(8'h03);
    rxq.push_back(8'h00); rxq.push_back(CMD_READ0);
    while (rxq.size() != 0) @(posedge clk);
    @(negedge clk);
    int_req[2] = 1'b1;
    @(negedge clk);
    int_req[2] = 1'b0;
    begin
      logic [39:0] p2;
      bit ok2;
      get_pkt(p, ok);
      get_pkt(p2, ok2);
      `TB_CHECK(ok && ok2, "both packets sent")
      `TB_CHECK((p == {CMD_READ0_RESP, 16'h0003, mem[0][3]} && p2 == {CMD_INT2, 32'hCAFE_F00D}) ||
                (p2 == {CMD_READ0_RESP, 16'h0003, mem[0][3]} && p == {CMD_INT2, 32'hCAFE_F00D}),
                $sformatf("response and interrupt %h %h", p, p2))
    end
    `TB_FINISH
  end
endmodule
