// sram_controller: interface to an external pipelined (ZBT-style) synchronous SRAM of
// 64K x 36-bit words, used as general-purpose storage and for real-time capture of
// sample data.
//
// Host access: the SRAM occupies memory banks 3 and 4 with the same 64K addresses;
// bank 3 reaches bits [15:0] of each word and bank 4 bits [31:16], each written with
// its two byte-write enables so the other half is untouched. `half` selects the
// bank. A host read returns its 16 bits with `rd_valid` five cycles after `re_n`.
// Capture: `cap_start` arms a capture of cap_len + 1 consecutive samples from the
// selected sample stream (`cap_data`/`cap_valid`) into the lower half of words 0,
// 1, 2, ... while `cap_busy` is high. A sample of a capture goes out on the cycle it
// arrives; a host access waits while a capture sample is pending.
//
// SRAM timing: an access is issued in one cycle with `ce_n` low, `adv_loadb` low,
// the address, `we_n` and the byte enables `bw_n`. Write data is driven on `dq` two
// cycles later (`dq_oe` high); read data is sampled from `dq` two cycles later while
// `oe_n` is low. The bidirectional `dq` pins are split into `dq_o`, `dq_oe` and `dq_i`
// for the pad buffer. Bits 35:32 (the byte parity bits) are written as zero and
// ignored on reads.
//
// The document gives the block's purpose and its pins (ce_n, we_n, oe_n, 16-bit
// addr, 36-bit dq, 4-bit bw_n, adv_loadb); the pipelined protocol with a latency of
// two, the split of a word over banks 3 and 4 and the capture format are this
// design's choices.
module sram_controller
  import dlia_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // host bus (banks 3 and 4)
  input  logic        we_n,
  input  logic        re_n,
  input  logic        half,
  input  logic [15:0] addr,
  input  logic [15:0] data_in,
  output logic [15:0] data_out,
  output logic        rd_valid,
  // capture
  input  logic        cap_start,
  input  logic [15:0] cap_len,
  input  sample_t     cap_data,
  input  logic        cap_valid,
  output logic        cap_busy,
  // SRAM pins
  output logic        sram_ce_n,
  output logic        sram_we_n,
  output logic        sram_oe_n,
  output logic        sram_adv_loadb,
  output logic [15:0] sram_addr,
  output logic [3:0]  sram_bw_n,
  output logic [35:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [35:0] sram_dq_i
);

  typedef struct packed {
    logic        valid;
    logic        write;
    logic        half;
    logic        host;     // a host read, answered on rd_valid
    logic [15:0] data;
  } op_t;

  op_t         p1, p2, p3;   // issue cycle, +1, +2
  logic        h_pend, h_write, h_half;
  logic [15:0] h_addr, h_data;
  logic [15:0] cap_ptr, cap_left;
  logic        issue_cap, issue_host;

  assign issue_cap  = cap_busy && cap_valid;
  assign issue_host = !issue_cap && h_pend;

  always_ff @(posedge clk) begin
    if (rst) begin
      h_pend    <= 1'b0;
      h_write   <= 1'b0;
      h_half    <= 1'b0;
      h_addr    <= '0;
      h_data    <= '0;
      cap_busy  <= 1'b0;
      cap_ptr   <= '0;
      cap_left  <= '0;
      p1        <= '0;
      p2        <= '0;
      p3        <= '0;
      sram_ce_n <= 1'b1;
      sram_we_n <= 1'b1;
      sram_adv_loadb <= 1'b1;
      sram_addr <= '0;
      sram_bw_n <= 4'hF;
      data_out  <= '0;
      rd_valid  <= 1'b0;
    end else begin
      // accept a host request (held until it can be issued)
      if (!we_n || !re_n) begin
        h_pend  <= 1'b1;
        h_write <= !we_n;
        h_half  <= half;
        h_addr  <= addr;
        h_data  <= data_in;
      end else if (issue_host) begin
        h_pend <= 1'b0;
      end

      if (cap_start && !cap_busy) begin
        cap_busy <= 1'b1;
        cap_ptr  <= '0;
        cap_left <= cap_len;
      end else if (issue_cap) begin
        cap_ptr  <= cap_ptr + 16'd1;
        cap_left <= cap_left - 16'd1;
        if (cap_left == '0) cap_busy <= 1'b0;
      end

      // issue
      sram_ce_n      <= !(issue_cap || issue_host);
      sram_adv_loadb <= !(issue_cap || issue_host);
      sram_we_n      <= !(issue_cap || (issue_host && h_write));
      sram_addr      <= issue_cap ? cap_ptr : h_addr;
      sram_bw_n      <= (issue_cap || !h_half) ? 4'b1100 : 4'b0011;
      p1 <= '{valid: issue_cap || issue_host,
              write: issue_cap || h_write,
              half:  !issue_cap && h_half,
              host:  issue_host && !h_write,
              data:  issue_cap ? cap_data : h_data};
      p2 <= p1;
      p3 <= p2;

      // read data return
      rd_valid <= p3.valid && !p3.write && p3.host;
      if (p3.valid && !p3.write) data_out <= p3.half ? sram_dq_i[31:16] : sram_dq_i[15:0];
    end
  end

  assign sram_dq_oe = p3.valid && p3.write;
  assign sram_dq_o  = {4'h0, p3.data, p3.data};
  assign sram_oe_n  = !(p3.valid && !p3.write);

endmodule
