// psd: dual-channel digital phase sensitive detector.
//
// Each downsampled input sample is multiplied by two reference samples, one from
// the inphase table and one from the quadrature table, read at the same reference
// index. The two products are written to two sample memories. When 2^avg_log2
// products have been stored, the mean calculation FSM (psd_mean_calc) sums each
// memory and shifts the sums right by avg_log2, giving the inphase and quadrature
// DC components (`inphase_mean`, `quad_mean`, announced by `mean_valid`). Samples
// that arrive while a mean is being calculated are not stored, but still advance the
// reference index so the phase is kept.
//
// Reference index: a sample counter runs modulo the samples per period
// (2^spp_log2). The index used for a sample is (count + phase) mod 2^spp_log2.
//   External sync mode: the first sample after a rising edge of the (delayed) sync
//   gets count 0, so the reference is realigned every sync period; `phase` is the
//   user's `phase_offset`, reloaded in RESET_PHASE after each mean once a sync edge
//   has been seen.
//   Auto sync mode: the counter runs freely and, after every mean, the phase and
//   sample FSM corrects `phase` from the result: a larger quadrature than inphase
//   component means the reference is about 90 degrees off (SHIFT_90 when the
//   quadrature is positive, SHIFT_270 when negative, a quarter period either way);
//   otherwise the phase is walked one step in the current direction (ADJUST_PHASE),
//   the direction is reversed first when |inphase| fell since the last mean
//   (CHANGE_SIGN), and a negative inphase mean flips the reference by half a period
//   (SHIFT_180). With an inphase table holding cos and a quadrature table holding sin
//   of the index, a shift of X degrees lowers `phase` by X/360 of a period.
//
// Phase and sample FSM states: INIT, NEXT_SAMPLE, MULTIPLY, STORE, CALC_MEAN,
// RESET_PHASE, CHANGE_SIGN, SHIFT_90, SHIFT_270, SHIFT_180, ADJUST_PHASE. A sample
// takes 3 cycles from NEXT_SAMPLE to the end of STORE; samples must be at least 4
// cycles apart. Reference tables are outside (ref_lut): `lut_idx` is presented and
// `ref_i`/`ref_q` must hold the addressed words one cycle later. `flush` discards
// the products stored so far, e.g. when the scan moves to a new location.
//
// The datapath (two multipliers, two sample memories, accumulators and right shift)
// and both state machines with their states and decisions follow the document. The
// reference index arithmetic, the meaning given to the SHIFT states' directions, the
// re-alignment on every sync edge, and the memory depth (1024, a power of two) are
// this design's choices.
module psd
  import dlia_pkg::*;
#(
  parameter int STORE_DEPTH = 1024,
  parameter int TABLE_DEPTH = 256,
  localparam int SAW        = $clog2(STORE_DEPTH),
  localparam int LAW        = $clog2(TABLE_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  // downsampled input
  input  sample_t        sample_in,
  input  logic           sample_valid,
  input  logic           sync_rise,
  // configuration
  input  logic [3:0]     spp_log2,
  input  logic [LAW-1:0] phase_offset,
  input  logic           auto_sync,
  input  logic [3:0]     avg_log2,
  input  logic           flush,
  // reference tables
  output logic [LAW-1:0] lut_idx,
  input  sample_t        ref_i,
  input  sample_t        ref_q,
  // results
  output prod_t          inphase_mean,
  output prod_t          quad_mean,
  output logic           mean_valid,
  output logic [LAW-1:0] phase
);

  typedef enum logic [3:0] {
    S_INIT, S_NEXT_SAMPLE, S_MULTIPLY, S_STORE, S_CALC_MEAN, S_RESET_PHASE,
    S_CHANGE_SIGN, S_SHIFT_90, S_SHIFT_270, S_SHIFT_180, S_ADJUST_PHASE
  } pstate_e;

  pstate_e        state;
  logic [LAW-1:0] spp_mask, quarter;
  logic [LAW-1:0] ref_cnt, cnt_now;
  logic           edge_pend, sync_seen;
  sample_t        samp_q, x_q;
  logic [LAW-1:0] samp_idx_q;
  logic           samp_pend;
  prod_t          prod_i, prod_q;
  logic [SAW-1:0] wr_ptr, last;
  logic           dir_up;
  prod_t          prev_abs, abs_i, abs_q;

  assign spp_mask = LAW'((32'd1 << spp_log2) - 32'd1);
  assign quarter  = LAW'((32'd1 << spp_log2) >> 2);
  assign last     = SAW'((32'd1 << avg_log2) - 32'd1);
  assign cnt_now  = (edge_pend && !auto_sync) ? '0 : ref_cnt;

  // ---------------- sample arrival and reference index ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      ref_cnt    <= '0;
      edge_pend  <= 1'b0;
      samp_q     <= '0;
      samp_idx_q <= '0;
      samp_pend  <= 1'b0;
    end else begin
      if (sync_rise) edge_pend <= 1'b1;
      if (sample_valid) begin
        samp_q     <= sample_in;
        samp_idx_q <= (cnt_now + phase) & spp_mask;
        samp_pend  <= 1'b1;
        ref_cnt    <= (cnt_now + LAW'(1)) & spp_mask;
        if (!sync_rise) edge_pend <= 1'b0;
      end
      if (state == S_NEXT_SAMPLE && samp_pend && !sample_valid) samp_pend <= 1'b0;
    end
  end

  assign lut_idx = samp_idx_q;

  // ---------------- sample memories ----------------
  prod_t           mem_i [STORE_DEPTH];
  prod_t           mem_q [STORE_DEPTH];
  logic [SAW-1:0]  rd_addr;
  prod_t           rd_i, rd_q;
  logic            mean_start, calc_done;

  always_ff @(posedge clk) begin
    if (state == S_STORE) begin
      mem_i[wr_ptr] <= prod_i;
      mem_q[wr_ptr] <= prod_q;
    end
    rd_i <= mem_i[rd_addr];
    rd_q <= mem_q[rd_addr];
  end

  psd_mean_calc #(.D_W(PROD_W), .DEPTH(STORE_DEPTH)) u_mean (
    .clk, .rst, .start(mean_start), .n_log2(avg_log2), .rd_addr, .rd_i, .rd_q,
    .mean_i(inphase_mean), .mean_q(quad_mean), .mean_valid(calc_done)
  );

  assign mean_valid = calc_done;
  assign abs_i = inphase_mean[PROD_W-1] ? -inphase_mean : inphase_mean;
  assign abs_q = quad_mean[PROD_W-1]    ? -quad_mean    : quad_mean;

  // ---------------- phase and sample FSM ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_INIT;
      phase      <= '0;
      wr_ptr     <= '0;
      prod_i     <= '0;
      prod_q     <= '0;
      x_q        <= '0;
      dir_up     <= 1'b1;
      prev_abs   <= '0;
      sync_seen  <= 1'b0;
      mean_start <= 1'b0;
    end else begin
      mean_start <= 1'b0;
      if (sync_rise) sync_seen <= 1'b1;
      unique case (state)
        S_INIT: begin
          phase    <= phase_offset;
          wr_ptr   <= '0;
          dir_up   <= 1'b1;
          prev_abs <= '0;
          state    <= S_NEXT_SAMPLE;
        end
        S_NEXT_SAMPLE: begin
          if (flush) wr_ptr <= '0;
          if (samp_pend) begin
            x_q   <= samp_q;
            state <= S_MULTIPLY;
          end
        end
        S_MULTIPLY: begin
          prod_i <= PROD_W'(x_q) * PROD_W'(ref_i);
          prod_q <= PROD_W'(x_q) * PROD_W'(ref_q);
          state  <= S_STORE;
        end
        S_STORE: begin
          if (flush) begin
            wr_ptr <= '0;
            state  <= S_NEXT_SAMPLE;
          end else if (wr_ptr == last) begin
            wr_ptr     <= '0;
            mean_start <= 1'b1;
            state      <= S_CALC_MEAN;
          end else begin
            wr_ptr <= wr_ptr + SAW'(1);
            state  <= S_NEXT_SAMPLE;
          end
        end
        S_CALC_MEAN: begin
          if (calc_done) begin
            if (!auto_sync) begin
              if (sync_seen || sync_rise) begin
                sync_seen <= 1'b0;
                state     <= S_RESET_PHASE;
              end else begin
                state <= S_NEXT_SAMPLE;
              end
            end else if (abs_i > abs_q) begin
              prev_abs <= abs_i;
              if (abs_i < prev_abs)                state <= S_CHANGE_SIGN;
              else if (inphase_mean[PROD_W-1])     state <= S_SHIFT_180;
              else                                 state <= S_ADJUST_PHASE;
            end else begin
              prev_abs <= abs_i;
              state    <= quad_mean[PROD_W-1] ? S_SHIFT_270 : S_SHIFT_90;
            end
          end
        end
        S_RESET_PHASE: begin
          phase <= phase_offset & spp_mask;
          state <= S_NEXT_SAMPLE;
        end
        S_CHANGE_SIGN: begin
          dir_up <= ~dir_up;
          state  <= inphase_mean[PROD_W-1] ? S_SHIFT_180 : S_ADJUST_PHASE;
        end
        S_SHIFT_90: begin
          phase <= (phase - quarter) & spp_mask;
          state <= S_NEXT_SAMPLE;
        end
        S_SHIFT_270: begin
          phase <= (phase + quarter) & spp_mask;
          state <= S_NEXT_SAMPLE;
        end
        S_SHIFT_180: begin
          phase <= (phase + (quarter << 1)) & spp_mask;
          state <= S_NEXT_SAMPLE;
        end
        S_ADJUST_PHASE: begin
          phase <= (dir_up ? phase + LAW'(1) : phase - LAW'(1)) & spp_mask;
          state <= S_NEXT_SAMPLE;
        end
        default: state <= S_INIT;
      endcase
    end
  end

  // Samples must leave the FSM time to consume the previous one.
  property p_sample_spacing;
    @(posedge clk) disable iff (rst) sample_valid |=> !sample_valid [*3];
  endproperty
  a_sample_spacing: assert property (p_sample_spacing)
    else $error("psd: input samples closer than 4 cycles");

endmodule
