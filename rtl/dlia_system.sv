// dlia_system: FPGA digital lock-in amplifier platform for degree-of-polarization
// (DOP) photoluminescence scans.
//
// The host computer sees the platform as a memory of five 64K x 16-bit banks, reached
// through a byte-wide UART with 5-byte packets (host_decoder). Bank 0 is the register
// file (csr), banks 1 and 2 hold the reference tables of the two lock-in sub-systems
// (dlia 0 and dlia 1, 4 tables each, 0x100 words per table: bank 1 = PSD0_REF0,
// PSD0_REF1, PSD1_REF0, PSD1_REF1 from address 0x000; bank 2 the same for PSD2 and
// PSD3), and banks 3 and 4 are the lower and upper 16 bits of the external SRAM
// (sram_controller). Each dlia has its own ADC and two sync inputs; in a DOP setup
// dlia 0 demodulates the photoluminescence at the chopper (PSD0, PL) and polarizer
// (PSD1, DOP/ROP) frequencies and dlia 1 the reflected HeNe light (PSD2). Results go
// to the host as interrupt packets: INT1, INT2 and INT3 carry PSD0, PSD1 and PSD2
// (quadrature word in ADDR, inphase word in DATA, bits [30:15] of each mean); INT0
// reports a `scan_step` (beam moved, DATA = step count, and each step flushes the
// PSD sample memories when CTRL[1] is set) and INT4 a change of `beam_toggle` (DATA
// = its new level). A dac_driver and the SRAM capture path can each take any of the
// eight sample-path points. The UART itself and the RS-232 transceiver are outside
// this block: its byte-side handshake is brought out as ports.
//
// Register map of bank 0 (see dlia_pkg): 0 CTRL, 1 ADC_DIV, 2 ADC_PW, 3 DAC_SEL,
// 4 CAP_SEL, 5 CAP_LEN, 6 CAP_START, 7 STATUS (read only), then one 8-word block per
// PSD channel at 8 + 8*k (k = 2*dlia + channel): SPP_LOG2, PHASE, DLY_DIV, DLY_SEL,
// MODE, AVG_LOG2, I_MEAN (RO), Q_MEAN (RO). Reset values assume a 50 MHz clock:
// 100 kHz ADC rate, 32 samples per period, 1024-sample means.
//
// The sub-system structure, the memory map banks, the command set and the interrupt
// assignments follow the document; the register map, the reset values, the
// interrupt data layout and the scan-step flush rule are this design's.
//
// Lint notes: PSD3 has no interrupt of its own (the document assigns INT1..INT3 to
// PSD0..PSD2), so its result_valid is unused and its results are read from the
// registers; the per-channel phase index and measured sync period that each dlia
// brings out for observation are not used at this level.
module dlia_system
  import dlia_pkg::*;
#(
  parameter int FIR_ORDER   = 64,
  parameter int STORE_DEPTH = 1024,
  localparam int NUM_DLIA   = 2,
  localparam int NUM_CH     = 2 * NUM_DLIA,
  localparam int NUM_TAPS   = TAP_PER_DLIA * NUM_DLIA
) (
  input  logic        clk,
  input  logic        rst,
  // UART byte interface
  input  logic        uart_rx_rdy,
  input  logic [7:0]  uart_rx_byte,
  output logic        uart_rx_strobe,
  input  logic        uart_tx_rdy,
  output logic [7:0]  uart_tx_byte,
  output logic        uart_tx_strobe,
  output logic        host_busyb,
  // ADCs, one per DLIA
  output logic [NUM_DLIA-1:0] adc_start_convert,
  input  logic [NUM_DLIA-1:0] adc_busyb,
  input  logic [NUM_DLIA-1:0] adc_sclk,
  input  logic [NUM_DLIA-1:0] adc_sdata,
  // external syncs, two per DLIA (bit 2*d + c)
  input  logic [NUM_CH-1:0]   sync_in,
  // scan computer events
  input  logic        scan_step,
  input  logic        beam_toggle,
  // DAC
  output logic        dac_sclk,
  output logic        dac_enb,
  output logic        dac_data,
  // external SRAM
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

  // ---------------- host decoder and bus ----------------
  logic        we_n, re_n, rd_valid;
  logic [15:0] addr, wdata, rdata;
  logic [2:0]  bank_sel;
  logic [NUM_INTS-1:0] int_req;
  logic [31:0]         int_data [NUM_INTS];
  logic [15:0]         param [CSR_NUM_REGS];
  logic [15:0]         status [CSR_NUM_REGS];
  logic [CSR_NUM_REGS-1:0] wr_stb;

  host_decoder u_host (
    .clk, .rst, .test_mode(param[CSR_CTRL][0]),
    .rx_rdy(uart_rx_rdy), .rx_byte(uart_rx_byte), .rx_strobe(uart_rx_strobe),
    .tx_rdy(uart_tx_rdy), .tx_byte(uart_tx_byte), .tx_strobe(uart_tx_strobe), .host_busyb,
    .we_n, .re_n, .addr, .bank_sel, .data_to_psd(wdata), .data_from_psd(rdata), .rd_valid,
    .int_req, .int_data
  );

  // bank decode
  logic        csr_hit, lut_hit [NUM_DLIA], sram_hit;
  logic [15:0] csr_rdata, lut_rdata [NUM_DLIA], sram_rdata;
  logic        csr_rv, lut_rv [NUM_DLIA], sram_rv;

  assign csr_hit  = (bank_sel == 3'd0) && (addr < 16'(CSR_NUM_REGS));
  assign sram_hit = (bank_sel == 3'd3) || (bank_sel == 3'd4);
  for (genvar d = 0; d < NUM_DLIA; d++) begin : g_hit
    assign lut_hit[d] = (bank_sel == 3'(d + 1)) && (addr < 16'(4 * LUT_DEPTH));
  end

  always_comb begin
    rd_valid = csr_rv | sram_rv;
    rdata    = csr_rv ? csr_rdata : sram_rdata;
    for (int d = 0; d < NUM_DLIA; d++) begin
      rd_valid |= lut_rv[d];
      if (lut_rv[d]) rdata = lut_rdata[d];
    end
  end

  // ---------------- control / status registers ----------------
  function automatic logic [CSR_NUM_REGS-1:0] ro_mask();
    logic [CSR_NUM_REGS-1:0] m = '0;
    m[CSR_STATUS] = 1'b1;
    for (int k = 0; k < NUM_CH; k++) begin
      m[CSR_CH_BASE + 8*k + CH_I_MEAN] = 1'b1;
      m[CSR_CH_BASE + 8*k + CH_Q_MEAN] = 1'b1;
    end
    return m;
  endfunction

  typedef logic [15:0] reg_arr_t [CSR_NUM_REGS];
  function automatic reg_arr_t reset_values();
    reg_arr_t v = '{default: 16'h0000};
    v[CSR_CTRL]    = 16'h0006;   // flush on scan step, ADC re-aligned to sync
    v[CSR_ADC_DIV] = 16'd500;    // 100 kHz at 50 MHz
    v[CSR_ADC_PW]  = 16'd5;
    v[CSR_CAP_LEN] = 16'hFFFF;   // 65536 samples
    for (int k = 0; k < NUM_CH; k++) begin
      v[CSR_CH_BASE + 8*k + CH_SPP_LOG2] = 16'd5;    // 32 samples per period
      v[CSR_CH_BASE + 8*k + CH_DLY_DIV]  = 16'd1;
      v[CSR_CH_BASE + 8*k + CH_AVG_LOG2] = 16'd10;   // 1024 products per mean
    end
    return v;
  endfunction

  csr #(.ADDR_W(CSR_ADDR_W), .RO_MASK(ro_mask()), .RESET_VAL(reset_values())) u_csr (
    .clk, .rst, .we_n(we_n | ~csr_hit), .re_n(re_n | ~csr_hit), .addr(addr[CSR_ADDR_W-1:0]),
    .data_in(wdata), .data_out(csr_rdata), .rd_valid(csr_rv),
    .param, .status_in(status), .wr_stb
  );

  // ---------------- scan computer events ----------------
  logic [2:0]  step_s, beam_s;
  logic        step_rise, beam_edge;
  logic [15:0] step_count;

  always_ff @(posedge clk) begin
    if (rst) begin
      step_s     <= '0;
      beam_s     <= '0;
      step_count <= '0;
    end else begin
      step_s <= {step_s[1:0], scan_step};
      beam_s <= {beam_s[1:0], beam_toggle};
      if (step_rise) step_count <= step_count + 16'd1;
    end
  end

  assign step_rise = step_s[1] & ~step_s[2];
  assign beam_edge = beam_s[1] ^ beam_s[2];

  // ---------------- lock-in sub-systems ----------------
  ch_cfg_t           cfg [NUM_CH];
  logic [NUM_CH-1:0] flush;
  psd_result_t       result [NUM_CH];
  logic [NUM_CH-1:0] result_valid;
  tap_t              taps [NUM_TAPS];
  logic [NUM_DLIA-1:0] adc_error;

  for (genvar k = 0; k < NUM_CH; k++) begin : g_cfg
    localparam int B = CSR_CH_BASE + 8 * k;
    assign cfg[k] = '{spp_log2:  param[B + CH_SPP_LOG2][3:0],
                      phase:     param[B + CH_PHASE][LUT_AW-1:0],
                      dly_div:   param[B + CH_DLY_DIV],
                      dly_sel:   param[B + CH_DLY_SEL][DLY_SEL_W-1:0],
                      auto_sync: param[B + CH_MODE][0],
                      avg_log2:  param[B + CH_AVG_LOG2][3:0]};
    assign flush[k] = (wr_stb[B + CH_MODE] && wdata[1]) || (step_rise && param[CSR_CTRL][1]);
  end

  for (genvar d = 0; d < NUM_DLIA; d++) begin : g_dlia
    ch_cfg_t             dcfg [2];
    psd_result_t         dres [2];
    logic [LUT_AW-1:0]   dphase [2];
    logic [23:0]         dperiod [2];
    tap_t                dtaps [TAP_PER_DLIA];

    assign dcfg[0] = cfg[2*d];
    assign dcfg[1] = cfg[2*d+1];

    dlia #(.FIR_ORDER(FIR_ORDER), .STORE_DEPTH(STORE_DEPTH)) u_dlia (
      .clk, .rst,
      .adc_start_convert(adc_start_convert[d]), .adc_busyb(adc_busyb[d]),
      .adc_sclk(adc_sclk[d]), .adc_sdata(adc_sdata[d]),
      .sync_in(sync_in[2*d +: 2]),
      .adc_div(param[CSR_ADC_DIV]), .adc_pw(param[CSR_ADC_PW]),
      .adc_sync_align(param[CSR_CTRL][2]), .ch_cfg(dcfg), .flush(flush[2*d +: 2]),
      .lut_we_n(we_n | ~lut_hit[d]), .lut_re_n(re_n | ~lut_hit[d]),
      .lut_sel(addr[9:8]), .lut_addr(addr[LUT_AW-1:0]), .lut_wdata(wdata),
      .lut_rdata(lut_rdata[d]), .lut_rd_valid(lut_rv[d]),
      .result(dres), .result_valid(result_valid[2*d +: 2]), .phase(dphase),
      .sync_period(dperiod), .taps(dtaps), .adc_error(adc_error[d])
    );

    assign result[2*d]   = dres[0];
    assign result[2*d+1] = dres[1];
    for (genvar t = 0; t < TAP_PER_DLIA; t++) begin : g_tap
      assign taps[TAP_PER_DLIA*d + t] = dtaps[t];
    end
  end

  // ---------------- interrupts ----------------
  assign int_req  = {beam_edge, result_valid[2], result_valid[1], result_valid[0], step_rise};
  assign int_data[0] = {16'h0000, step_count + 16'(step_rise)};
  for (genvar k = 0; k < 3; k++) begin : g_int
    assign int_data[k+1] = {mean_to_word(result[k].q), mean_to_word(result[k].i)};
  end
  assign int_data[4] = {16'h0000, 15'h0000, beam_s[1]};

  // ---------------- sample path observation ----------------
  sample_t     tap_data  [NUM_TAPS];
  logic        tap_valid [NUM_TAPS];
  for (genvar t = 0; t < NUM_TAPS; t++) begin : g_taps
    assign tap_data[t]  = taps[t].data;
    assign tap_valid[t] = taps[t].valid;
  end

  dac_driver #(.NSRC(NUM_TAPS)) u_dac (
    .clk, .rst, .sel(param[CSR_DAC_SEL][$clog2(NUM_TAPS)-1:0]),
    .src_data(tap_data), .src_valid(tap_valid), .dac_sclk, .dac_enb, .dac_data
  );

  logic cap_busy;
  logic [$clog2(NUM_TAPS)-1:0] cap_sel;
  assign cap_sel = param[CSR_CAP_SEL][$clog2(NUM_TAPS)-1:0];

  sram_controller u_sram (
    .clk, .rst,
    .we_n(we_n | ~sram_hit), .re_n(re_n | ~sram_hit), .half(bank_sel == 3'd4), .addr,
    .data_in(wdata), .data_out(sram_rdata), .rd_valid(sram_rv),
    .cap_start(wr_stb[CSR_CAP_START]), .cap_len(param[CSR_CAP_LEN]),
    .cap_data(tap_data[cap_sel]), .cap_valid(tap_valid[cap_sel]), .cap_busy,
    .sram_ce_n, .sram_we_n, .sram_oe_n, .sram_adv_loadb, .sram_addr, .sram_bw_n,
    .sram_dq_o, .sram_dq_oe, .sram_dq_i
  );

  always_comb begin
    for (int r = 0; r < CSR_NUM_REGS; r++) status[r] = 16'h0000;
    status[CSR_STATUS] = {13'h0000, adc_error, cap_busy};
    for (int k = 0; k < NUM_CH; k++) begin
      status[CSR_CH_BASE + 8*k + CH_I_MEAN] = mean_to_word(result[k].i);
      status[CSR_CH_BASE + 8*k + CH_Q_MEAN] = mean_to_word(result[k].q);
    end
  end

endmodule
