// pulse_gen: produces the downsampling strobe for one PSD channel.
//
// A rollover counter, loaded with the divide value from sync_measure, strobes
// `sample_strobe` every `clk_divide` system clocks. Every rising sync edge restarts
// it, and the restart itself strobes, so the first sample of each sync period is
// taken on the edge and samples sit at fixed offsets from it. Because the divide
// value is the period shifted right (rounded down), the counter could fit one extra
// strobe just before the next edge; a strobe count stops the strobes once
// 2^spp_log2 have been given since the last edge, so every sync period gets exactly
// the requested number of samples. Until a first period has been measured (`enable`
// low) no strobes are produced.
//
// The load/restart structure and "precisely the desired number of samples per sync
// period" follow the document; strobing on the restart cycle and the strobe count
// that enforces the sample number are this design's choices.
module pulse_gen #(
  parameter int CNT_W = 24
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic             sync_rise,
  input  logic [3:0]       spp_log2,
  input  logic [CNT_W-1:0] clk_divide,
  output logic             sample_strobe
);

  logic stb;

  rollover_counter #(.WIDTH(CNT_W), .STB_ON_RESTART(1'b1)) u_cnt (
    .clk, .rst(rst | ~enable), .period(clk_divide), .restart(sync_rise), .stb
  );

  // strobes given since the last sync edge
  logic [16:0] taken;
  logic        full;

  assign full          = (taken >> spp_log2) != '0;
  assign sample_strobe = stb & enable & ~full;

  always_ff @(posedge clk) begin
    if (rst || !enable)    taken <= '0;
    else if (sync_rise)    taken <= '0;
    else if (sample_strobe) taken <= taken + 17'd1;
  end

endmodule
