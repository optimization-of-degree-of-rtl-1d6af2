// psd_mean_calc: the mean calculation state machine of the phase sensitive detector.
//
// When `start` pulses, the machine reads 2^n_log2 stored products from both sample
// memories (inphase and quadrature), adds them into two accumulators and, after the
// last one, shifts each sum right by n_log2 bits (a divide by the number of samples)
// to give the DC component of the multiplier outputs. States: WAITING (idle), INIT
// (clear the sums, point at word 0), ADD (add the word just read), NEXT_SAMPLE (step
// to the next word), DIVIDE (shift and publish). `mean_valid` pulses in the cycle the
// results appear.
//
// Memory interface: the memories are read synchronously; `rd_addr` is the address
// being presented this cycle, and `rd_i`/`rd_q` hold that word on the following
// cycle, which is always an ADD cycle. A mean over N samples takes 2N + 2 cycles.
// The states and their order follow the document; widths are this design's.
module psd_mean_calc #(
  parameter int D_W    = 32,
  parameter int DEPTH  = 1024,
  localparam int AW    = $clog2(DEPTH),
  localparam int ACC_W = D_W + AW
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [3:0]            n_log2,
  output logic [AW-1:0]         rd_addr,
  input  logic signed [D_W-1:0] rd_i,
  input  logic signed [D_W-1:0] rd_q,
  output logic signed [D_W-1:0] mean_i,
  output logic signed [D_W-1:0] mean_q,
  output logic                  mean_valid
);

  typedef enum logic [2:0] {M_WAITING, M_INIT, M_ADD, M_NEXT_SAMPLE, M_DIVIDE} mstate_e;

  mstate_e                 state;
  logic [AW-1:0]           addr_q;
  logic signed [ACC_W-1:0] acc_i, acc_q;
  logic [AW-1:0]           last;

  assign last = AW'((32'd1 << n_log2) - 32'd1);

  // Address presented to the memories this cycle.
  always_comb begin
    unique case (state)
      M_INIT:        rd_addr = '0;
      M_NEXT_SAMPLE: rd_addr = addr_q + AW'(1);
      default:       rd_addr = addr_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= M_WAITING;
      addr_q     <= '0;
      acc_i      <= '0;
      acc_q      <= '0;
      mean_i     <= '0;
      mean_q     <= '0;
      mean_valid <= 1'b0;
    end else begin
      mean_valid <= 1'b0;
      unique case (state)
        M_WAITING: if (start) state <= M_INIT;
        M_INIT: begin
          acc_i  <= '0;
          acc_q  <= '0;
          addr_q <= '0;
          state  <= M_ADD;
        end
        M_ADD: begin
          acc_i <= acc_i + ACC_W'(rd_i);
          acc_q <= acc_q + ACC_W'(rd_q);
          state <= (addr_q == last) ? M_DIVIDE : M_NEXT_SAMPLE;
        end
        M_NEXT_SAMPLE: begin
          addr_q <= addr_q + AW'(1);
          state  <= M_ADD;
        end
        M_DIVIDE: begin
          mean_i     <= D_W'(acc_i >>> n_log2);
          mean_q     <= D_W'(acc_q >>> n_log2);
          mean_valid <= 1'b1;
          state      <= M_WAITING;
        end
        default: state <= M_WAITING;
      endcase
    end
  end

endmodule
