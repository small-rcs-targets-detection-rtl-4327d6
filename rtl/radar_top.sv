// radar_top: binary phase-coded pulse-compression radar signal generator and
// processor for small radar-cross-section targets.
//
// Transmit side: the synchronizer's 9-bit sample counter addresses the waveform
// ROM, which plays the 105-chip optimal-peak-sidelobe code once per PRT of
// NFAST = 512 samples (duty cycle 105/512) to the DAC at the 15 MHz system rate.
// Receive side: the I and Q ADC streams at 120 MHz are smoothed by moving-
// average filters and downsampled 8:1 (ma_decimator), converted to single-
// precision floating point (fixed_to_fp), pulse-compressed by the frequency-
// domain matched filter with sidelobe cancellation (matched_filter), reordered
// to slow time, MTI-filtered and Doppler-transformed over a CPI of NSLOW = 256
// pulses, reordered back to fast time and taken to magnitude
// (doppler_processor), and tested by a 12+12-cell CA-CFAR (ca_cfar). Each
// detection {range cell, Doppler bin, amplitude} is pushed into a FIFO
// (target_fifo) that the data processing reads. Block structure and sizes
// follow the specification; the port set, I/Q receive channels and the
// front-end alignment below are this design's choices.
//
// Clocks: clk_adc = 8 x clk_sys, both from the same clock generator with
// coincident rising edges (external to this design). rst is synchronous and
// held for at least one clk_sys period.
// Range alignment: the receive stream starts FE_LAT system clocks into the
// first PRT, which makes range cell r of the matched filter output the echo
// delayed r samples from the DAC sample of ROM address 0 (FE_LAT matches the
// pipeline: ROM register, ADC capture, moving average, conversion register).
// Zero-Doppler blanking (BLANK_DC): the MTI removes everything that does not
// move, so Doppler bin 0 of the magnitude map holds only arithmetic rounding
// residue, which a purely relative CFAR threshold can flag. With BLANK_DC set,
// CFAR decisions in bin 0 are not pushed into the detection FIFO (they still
// appear on cfar_*). This is this design's choice.
// Outputs for the data processing: mf_* (compressed range profiles), dop_*
// (Doppler spectra per range cell), cfar_* (every CFAR decision with its
// threshold) and the detection FIFO read port det_*.
// Latency: a target's detection appears two CPIs after the CPI that saw it.
module radar_top
  import radar_pkg::*;
#(
  parameter int                  NFAST      = 512,
  parameter int                  NSLOW      = 256,
  parameter int                  CODE_LEN   = 105,
  parameter logic [CODE_LEN-1:0] CODE       = CODE_LEN'(OPSL_CODE),
  parameter int                  DAC_W      = 16,
  parameter int                  AMP        = 8192,
  parameter int                  ADC_W      = 16,
  parameter int                  DEC        = 8,
  parameter int                  NREF       = 12,
  parameter int                  NGUARD     = 1,
  parameter fp32_t               KN         = 32'h3F47_3D52,
  parameter int                  FIFO_DEPTH = 64,
  parameter int                  FE_LAT     = 2,
  parameter bit                  BLANK_DC   = 1'b1,
  parameter string               COEF_FILE  = "rtl/mf_coef.hex"
) (
  input  logic                     clk_sys,
  input  logic                     clk_adc,
  input  logic                     rst,
  // transmitter
  output logic signed [DAC_W-1:0]  dac_code,
  output logic                     tx_gate,
  output logic                     prt_start,
  output logic                     cpi_start,
  // receiver ADC (clk_adc domain)
  input  logic signed [ADC_W-1:0]  adc_i,
  input  logic signed [ADC_W-1:0]  adc_q,
  // matched filter output
  output logic                     mf_valid,
  output cplx_t                    mf_data,
  output logic [$clog2(NFAST)-1:0] mf_range,
  // Doppler FFT output
  output logic                     dop_valid,
  output cplx_t                    dop_data,
  output logic [$clog2(NSLOW)-1:0] dop_bin,
  // CFAR decisions
  output logic                     cfar_valid,
  output logic                     cfar_detect,
  output fp32_t                    cfar_cut,
  output fp32_t                    cfar_threshold,
  // detection FIFO read port
  output logic                     det_valid,
  input  logic                     det_ready,
  output detection_t               det,
  output logic                     det_overflow
);
  localparam int FB = $clog2(NFAST);
  localparam int SB = $clog2(NSLOW);

  // ------------------------------------------------------------ transmit side
  logic [FB-1:0] sample_idx;
  logic [SB-1:0] pulse_idx;
  logic          tx_gate_c;

  synchronizer #(.NFAST(NFAST), .NSLOW(NSLOW), .CODE_LEN(CODE_LEN)) u_sync (
    .clk(clk_sys), .rst, .sample_idx, .pulse_idx, .prt_start, .cpi_start, .tx_gate(tx_gate_c)
  );

  waveform_rom #(.NFAST(NFAST), .CODE_LEN(CODE_LEN), .CODE(CODE), .DAC_W(DAC_W), .AMP(AMP)) u_wave (
    .clk(clk_sys), .rst, .addr(sample_idx), .dac_code
  );

  // tx_gate aligned with dac_code (ROM latency)
  always_ff @(posedge clk_sys) tx_gate <= rst ? 1'b0 : tx_gate_c;

  // ------------------------------------------------------------ acquisition
  logic signed [ADC_W-1:0] ma_i, ma_q;
  logic                    ma_stb_i, ma_stb_q;

  ma_decimator #(.W(ADC_W), .DEC(DEC)) u_ma_i (.clk_adc, .rst, .din(adc_i), .dout(ma_i), .dout_stb(ma_stb_i));
  ma_decimator #(.W(ADC_W), .DEC(DEC)) u_ma_q (.clk_adc, .rst, .din(adc_q), .dout(ma_q), .dout_stb(ma_stb_q));

  // ------------------------------------------------------------ pre-processing
  logic  fe_run;
  logic  pp_valid;
  cplx_t pp_data;

  always_ff @(posedge clk_sys) begin
    if (rst)                                      fe_run <= 1'b0;
    else if (pulse_idx == '0 && int'(sample_idx) == FE_LAT - 1) fe_run <= 1'b1;
  end

  fixed_to_fp #(.W(ADC_W)) u_pp (
    .clk(clk_sys), .rst, .in_valid(fe_run), .in_i(ma_i), .in_q(ma_q),
    .out_valid(pp_valid), .out_data(pp_data)
  );

  // ------------------------------------------------------------ matched filter
  matched_filter #(.N(NFAST), .COEF_FILE(COEF_FILE)) u_mf (
    .clk(clk_sys), .rst, .in_valid(pp_valid), .in_data(pp_data),
    .out_valid(mf_valid), .out_data(mf_data), .out_idx(mf_range)
  );

  // ------------------------------------------------------------ Doppler processing
  logic          mag_valid;
  fp32_t         mag_data;
  logic [FB-1:0] mag_range;
  logic [SB-1:0] mag_doppler;

  doppler_processor #(.NFAST(NFAST), .NSLOW(NSLOW)) u_dop (
    .clk(clk_sys), .rst, .in_valid(mf_valid), .in_data(mf_data),
    .dop_valid, .dop_data, .dop_bin,
    .mag_valid, .mag_data, .mag_range, .mag_doppler
  );

  // ------------------------------------------------------------ CFAR
  logic [FB+SB-1:0] cfar_tag;

  ca_cfar #(.NREF(NREF), .NGUARD(NGUARD), .KN(KN), .TAG_W(FB + SB)) u_cfar (
    .clk(clk_sys), .rst, .in_valid(mag_valid), .in_mag(mag_data), .in_tag({mag_doppler, mag_range}),
    .out_valid(cfar_valid), .detect(cfar_detect), .out_cut(cfar_cut),
    .out_threshold(cfar_threshold), .out_tag(cfar_tag)
  );

  // ------------------------------------------------------------ target FIFO
  detection_t new_det;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;
  logic                        fifo_full;

  always_comb begin
    new_det             = '0;
    new_det.range_idx   = 9'(cfar_tag[FB-1:0]);
    new_det.doppler_idx = 8'(cfar_tag[FB+SB-1:FB]);
    new_det.amplitude   = cfar_cut;
  end

  target_fifo #(.DEPTH(FIFO_DEPTH), .W($bits(detection_t))) u_fifo (
    .clk(clk_sys), .rst, .push(cfar_valid && cfar_detect && !(BLANK_DC && cfar_tag[FB+SB-1:FB] == '0)), .din(new_det),
    .out_valid(det_valid), .out_ready(det_ready), .dout(det),
    .full(fifo_full), .overflow(det_overflow), .level(fifo_level)
  );

  initial assert (NFAST <= 512 && NSLOW <= 256) else $error("detection record holds 9-bit range and 8-bit Doppler indices");
endmodule
