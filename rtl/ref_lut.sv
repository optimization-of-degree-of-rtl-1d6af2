// ref_lut: one reference demodulation table, kept in RAM so the host can reprogram
// the demodulation wave in system.
//
// The table is DEPTH words of the sample width. Port A belongs to the host bus
// (active-low `we_n`/`re_n`, read data registered, `rd_valid` one cycle after the
// read). Port B is the PSD's read port: `idx` is registered and `ref_out` holds the
// word one cycle later. The table's contents are whatever the host wrote; a typical
// setup holds one period of a cosine (inphase table) or sine (quadrature table) with
// samples-per-period entries.
//
// A table per demodulation wave, as wide as a sample, as deep as the samples per
// period and written by the host follows the document; the 256-word depth is the
// 0x100-word slot each table has in the memory map.
module ref_lut #(
  parameter int W     = 16,
  parameter int DEPTH = 256,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst,
  // host port
  input  logic                we_n,
  input  logic                re_n,
  input  logic [AW-1:0]       addr,
  input  logic [W-1:0]        data_in,
  output logic [W-1:0]        data_out,
  output logic                rd_valid,
  // PSD port
  input  logic [AW-1:0]       idx,
  output logic signed [W-1:0] ref_out
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!we_n) mem[addr] <= data_in;
    if (!re_n) data_out <= mem[addr];
    ref_out <= mem[idx];
  end

  always_ff @(posedge clk) begin
    if (rst) rd_valid <= 1'b0;
    else     rd_valid <= ~re_n;
  end

endmodule
