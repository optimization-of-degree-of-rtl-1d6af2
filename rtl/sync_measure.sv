// sync_measure: measures the period of a sync signal and derives the downsampling
// clock divide.
//
// An up-counter counts system clocks. On every low-to-high transition of `sync`
// (found by comparing it with its value one clock earlier) the count is captured as
// the sync period and the counter restarts. The captured period is shifted right by
// `spp_log2` bits, giving `clk_divide` = period / samples-per-period, which the pulse
// generator uses for the following sync period: a measurement of period N applies to
// period N+1. `sync_rise` is the one-cycle edge pulse, also used to re-align the
// pulse generator and the PSD. The counter saturates for a sync that is too slow.
// `sync` must already be synchronous to `clk`.
//
// Counter, capture register, edge detector and shift follow the document; the 24-bit
// counter width is this design's choice (at a 50 MHz clock it reaches below 3 Hz).
module sync_measure #(
  parameter int CNT_W = 24
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sync,
  input  logic [3:0]       spp_log2,
  output logic             sync_rise,
  output logic [CNT_W-1:0] sync_period,
  output logic [CNT_W-1:0] clk_divide,
  output logic             period_valid     // a full period has been measured
);

  logic             sync_q;
  logic [CNT_W-1:0] count;
  logic             seen_edge;

  assign sync_rise = sync & ~sync_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_q       <= 1'b0;
      count        <= '0;
      sync_period  <= '0;
      seen_edge    <= 1'b0;
      period_valid <= 1'b0;
    end else begin
      sync_q <= sync;
      if (sync_rise) begin
        count       <= CNT_W'(1);
        seen_edge   <= 1'b1;
        if (seen_edge) begin
          sync_period  <= count;
          period_valid <= 1'b1;
        end
      end else if (count != '1) begin
        count <= count + CNT_W'(1);
      end
    end
  end

  assign clk_divide = sync_period >> spp_log2;

endmodule
