// csr: the control/status register file (memory bank 0).
//
// A small addressed memory of NUM_REGS 16-bit words. A one-hot decode of `addr`,
// gated by the active-low write enable `we_n`, enables exactly one register, which
// loads `data_in`. Reads select a register with a multiplexer on `addr`; the selected
// word is registered into `data_out` on the cycle `re_n` is low and `rd_valid` pulses
// on the next cycle, together with the data. Registers whose bit is set in RO_MASK are
// status words: they are never written and read back `status_in`. The others are
// configuration parameters, readable and writable, driven out on `param` and reset
// to RESET_VAL.
//
// The decoder, write gating, read multiplexer and registered read-data path follow
// the document's register file; the `rd_valid` flag and the reset values are this
// design's own.
module csr #(
  parameter int                 ADDR_W    = 6,
  parameter int                 NUM_REGS  = 1 << ADDR_W,
  parameter logic [NUM_REGS-1:0] RO_MASK  = '0,
  parameter logic [15:0]        RESET_VAL [NUM_REGS] = '{default: 16'h0000}
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we_n,
  input  logic              re_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       data_in,
  output logic [15:0]       data_out,
  output logic              rd_valid,
  output logic [15:0]       param     [NUM_REGS],
  input  logic [15:0]       status_in [NUM_REGS],
  output logic [NUM_REGS-1:0] wr_stb              // one-hot write strobe, for self-clearing actions
);

  logic [NUM_REGS-1:0] sel;

  always_comb begin
    sel = '0;
    if (int'(addr) < NUM_REGS) sel[addr] = 1'b1;
  end

  assign wr_stb = sel & {NUM_REGS{~we_n}};

  for (genvar r = 0; r < NUM_REGS; r++) begin : g_reg
    if (RO_MASK[r]) begin : g_status
      assign param[r] = status_in[r];
    end else begin : g_param
      always_ff @(posedge clk) begin
        if (rst)            param[r] <= RESET_VAL[r];
        else if (wr_stb[r]) param[r] <= data_in;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= ~re_n;
      if (!re_n) data_out <= (int'(addr) < NUM_REGS) ? param[addr] : 16'h0000;
    end
  end

endmodule
