// delay_line: programmable delay of the single-bit sync signal.
//
// Instead of delaying 16-bit samples, the platform delays the one-bit reference sync,
// which moves the phase at which the reference wave is applied. A rollover counter
// produces a shift strobe every `clk_divide` system clocks; on each strobe the sync
// bit moves one stage along a chain of TAPS flip-flops. `sync_delay` picks which
// stage drives `sync_out`, so the delay is (sync_delay + 1) steps of `clk_divide`
// clocks each (plus up to one step of strobe alignment). The step sets the phase
// resolution and TAPS x step the largest delay; a phase advance is obtained by
// lowering the reference index by one sample and delaying the sync instead.
//
// The chain, strobe and tap multiplexer follow the document; the chain length
// (TAPS = 64) and the 16-bit divide are this design's choices, the document gives no
// sizes.
module delay_line #(
  parameter int TAPS  = 64,
  parameter int DIV_W = 16,
  localparam int SEL_W = $clog2(TAPS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [DIV_W-1:0] clk_divide,
  input  logic [SEL_W-1:0] sync_delay,
  input  logic             sync_in,
  output logic             sync_out
);

  logic            stb;
  logic [TAPS-1:0] pipe;

  rollover_counter #(.WIDTH(DIV_W)) u_div (
    .clk, .rst, .period(clk_divide), .restart(1'b0), .stb
  );

  always_ff @(posedge clk) begin
    if (rst)      pipe <= '0;
    else if (stb) pipe <= {pipe[TAPS-2:0], sync_in};
  end

  assign sync_out = pipe[sync_delay];

endmodule
