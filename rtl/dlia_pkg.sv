// dlia_pkg: types and constants shared by the digital lock-in amplifier (DLIA) platform.
//
// The host talks to the platform with 5-byte packets {COMMAND, ADDR[15:0], DATA[15:0]}.
// The command codes below are the documented host command set: per bank a WRITE, a
// READ and a READ response, plus five unsolicited interrupt packets. Five banks of
// 64K x 16-bit words make up the memory map: bank 0 holds the control/status
// registers, banks 1 and 2 the reference look-up tables, and banks 3 and 4 the two
// 16-bit halves of the external SRAM. The split of the SRAM word into two halves,
// the CSR addresses and all widths not named in the comments are this design's own
// choices.
package dlia_pkg;

  localparam int SAMPLE_W = 16;            // bits per sample (ADC word)
  localparam int PROD_W   = 2 * SAMPLE_W;  // sample x reference product width

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0]   prod_t;

  // Host command byte (bits 39:32 of a packet).
  typedef enum logic [7:0] {
    CMD_NOP        = 8'h00,
    CMD_WRITE0     = 8'h01, CMD_READ0 = 8'h02, CMD_READ0_RESP = 8'h03,
    CMD_WRITE1     = 8'h04, CMD_READ1 = 8'h05, CMD_READ1_RESP = 8'h06,
    CMD_WRITE2     = 8'h07, CMD_READ2 = 8'h08, CMD_READ2_RESP = 8'h09,
    CMD_WRITE3     = 8'h0A, CMD_READ3 = 8'h0B, CMD_READ3_RESP = 8'h0C,
    CMD_WRITE4     = 8'h0D, CMD_READ4 = 8'h0E, CMD_READ4_RESP = 8'h0F,
    CMD_INT0       = 8'h20, CMD_INT1  = 8'h21, CMD_INT2       = 8'h22,
    CMD_INT3       = 8'h23, CMD_INT4  = 8'h24
  } cmd_e;

  localparam int NUM_BANKS = 5;
  localparam int NUM_INTS  = 5;

  // A complete host packet, in the order it sits in the 40-bit packet register.
  typedef struct packed {
    logic [7:0]  cmd;
    logic [15:0] addr;
    logic [15:0] data;
  } packet_t;

  // Bank 0 register map (word addresses). Per DLIA d and channel c, the channel
  // block starts at CSR_CH_BASE + 8*(2*d + c).
  localparam int CSR_ADDR_W        = 6;
  localparam int CSR_NUM_REGS      = 1 << CSR_ADDR_W;
  localparam int CSR_CTRL          = 0;  // [0] host test mode, [1] flush PSDs on scan step,
                                         // [2] ADC conversion timing re-aligned to sync
  localparam int CSR_ADC_DIV       = 1;  // ADC sampling period in system clocks
  localparam int CSR_ADC_PW        = 2;  // ADC convert pulse width in system clocks
  localparam int CSR_DAC_SEL       = 3;  // sample path point driven to the DAC
  localparam int CSR_CAP_SEL       = 4;  // sample path point captured to SRAM
  localparam int CSR_CAP_LEN       = 5;  // samples to capture, minus one
  localparam int CSR_CAP_START     = 6;  // write any value: start a capture
  localparam int CSR_STATUS        = 7;  // RO: [0] capture busy, [2:1] ADC busy errors
  localparam int CSR_CH_BASE       = 8;
  // offsets inside a channel block
  localparam int CH_SPP_LOG2       = 0;  // log2(samples per period)
  localparam int CH_PHASE          = 1;  // user reference phase offset (LUT index)
  localparam int CH_DLY_DIV        = 2;  // delay line shift period in system clocks
  localparam int CH_DLY_SEL        = 3;  // delay line tap
  localparam int CH_MODE           = 4;  // [0] auto sync mode, [1] flush (self-clearing)
  localparam int CH_AVG_LOG2       = 5;  // log2(samples averaged per PSD output)
  localparam int CH_I_MEAN         = 6;  // RO: inphase mean, bits [30:15]
  localparam int CH_Q_MEAN         = 7;  // RO: quadrature mean, bits [30:15]

  // Sample path points that can be routed to the DAC or captured to SRAM:
  // point 4*d + k of DLIA d, k = 0 ADC, 1 lowpass filter, 2 downsampler ch1,
  // 3 downsampler ch2.
  localparam int TAP_PER_DLIA = 4;

  localparam int LUT_DEPTH   = 256;   // one 0x100-word slot per table in banks 1 and 2
  localparam int LUT_AW      = 8;
  localparam int DLY_TAPS    = 64;    // delay line length
  localparam int DLY_SEL_W   = 6;

  // Run-time configuration of one PSD channel (from the channel's CSR block).
  typedef struct packed {
    logic [3:0]           spp_log2;   // samples per period = 2^spp_log2
    logic [LUT_AW-1:0]    phase;      // user reference phase offset
    logic [15:0]          dly_div;    // delay line step, system clocks
    logic [DLY_SEL_W-1:0] dly_sel;    // delay line tap
    logic                 auto_sync;  // 1: auto sync mode, 0: external sync mode
    logic [3:0]           avg_log2;   // products averaged per result = 2^avg_log2
  } ch_cfg_t;

  // One PSD result.
  typedef struct packed {
    prod_t i;
    prod_t q;
  } psd_result_t;

  // One point of the sample datapath.
  typedef struct packed {
    sample_t data;
    logic    valid;
  } tap_t;

  // Upper bits of a 32-bit mean that go to the host in 16-bit words.
  function automatic logic [15:0] mean_to_word(prod_t m);
    return m[PROD_W-2 -: 16];
  endfunction

endpackage
