// radar_env: end-to-end test environment of radar_top.
//
// Generates the two related clocks (clk_adc = 8 x clk_sys, coincident rising
// edges) and reset, and models the radar scene: the receive signal is the DAC
// output delayed by each target's range (in samples), scaled by its amplitude
// and rotated from pulse to pulse by its Doppler phase 2*pi*KD*p/NSLOW, plus
// uniform ADC noise of +/-4 LSB per 120 MHz sample, quantised to the 16-bit ADC.
// Scene: three moving targets (ranges 120, 260, 400; Doppler bins NSLOW/4,
// 3*NSLOW/4, NSLOW/2) and one stationary clutter echo at range 330.
//
// Checks, all against values computed here from the scene:
//  * matched filter: in each range profile every target/clutter cell holds
//    amplitude * exp(j*phase) within 3 %, and no other cell exceeds 3 % of the
//    weakest echo (range sidelobes cancelled);
//  * Doppler FFT: at a target's range the largest bin is its Doppler bin with
//    magnitude NSLOW * A * 2|sin(pi*KD/NSLOW)| within 5 %; at the clutter range
//    every bin is below 1 % of that (MTI cancellation);
//  * CFAR: every target is detected in every complete CPI, and nothing else
//    outside the zero-Doppler row (which holds only MTI rounding residue and is
//    blanked before the FIFO);
//  * FIFO: records read out match the targets; with HOLD_FIFO the reader waits,
//    the FIFO must overflow and then return exactly FIFO_DEPTH records.
// Each of these mechanisms is counted; one that never happens is a failure.
//
// Sizes, code and CFAR settings come from the specification; the scene (target
// ranges, Doppler bins, amplitudes, noise) and the check tolerances are this
// testbench's own choices.
module radar_env
  import radar_pkg::*;
#(
  parameter int NFAST      = 512,
  parameter int NSLOW      = 16,
  parameter int CPIS       = 4,
  parameter bit HOLD_FIFO  = 1'b0,
  parameter int FIFO_DEPTH = 64,
  parameter int AMP        = 8192
) (
  output logic                     clk_sys,
  output logic                     clk_adc,
  output logic                     rst,
  input  logic signed [15:0]       dac_code,
  input  logic                     prt_start,
  output logic signed [15:0]       adc_i,
  output logic signed [15:0]       adc_q,
  input  logic                     mf_valid,
  input  cplx_t                    mf_data,
  input  logic [$clog2(NFAST)-1:0] mf_range,
  input  logic                     dop_valid,
  input  cplx_t                    dop_data,
  input  logic [$clog2(NSLOW)-1:0] dop_bin,
  input  logic                     cfar_valid,
  input  logic                     cfar_detect,
  input  fp32_t                    cfar_cut,
  input  logic                     det_valid,
  output logic                     det_ready,
  input  detection_t               det,
  input  logic                     det_overflow
);
  import tb_util_pkg::*;

  localparam int    NT = 4;
  localparam int    TR [NT] = '{120, 260, 400, 330};
  localparam int    TK [NT] = '{NSLOW / 4, 3 * NSLOW / 4, NSLOW / 2, 0};
  localparam real   TA [NT] = '{1500.0, 1000.0, 700.0, 3000.0};
  localparam real   PI = 3.14159265358979323846;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_mf_frames = 0, n_mti_cancel = 0, n_dop_peak = 0, n_detect = 0;
  int n_fifo_read = 0, n_overflow = 0, n_cpi_swaps = 0, n_dc_residue = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ------------------------------------------------------------ clocks, reset
  int ph = 0;
  initial begin
    clk_adc = 1'b0;
    clk_sys = 1'b0;
    forever begin
      #4;
      clk_adc = 1'b1;
      if (ph == 0) clk_sys = 1'b1;
      if (ph == 4) clk_sys = 1'b0;
      ph = (ph + 1) % 8;
      #4;
      clk_adc = 1'b0;
    end
  end

  // ------------------------------------------------------------ scene model
  // History of the DAC output and the pulse number, one entry per system clock.
  localparam int HL = 2048;
  int  hist_s [HL];   // chip sign -1/0/+1
  int  hist_p [HL];   // pulse number of that sample
  int  nsys = 0;
  int  pulse = -1;

  always @(posedge clk_sys) begin
    if (!rst) begin
      if (prt_start) pulse = pulse + 1;
    end
  end

  // The DAC output changes just after each system clock edge.
  always @(posedge clk_sys) begin
    #1;
    hist_s[nsys % HL] = (dac_code > 0) ? 1 : (dac_code < 0) ? -1 : 0;
    hist_p[nsys % HL] = pulse;
    nsys = nsys + 1;
  end

  always @(posedge clk_adc) begin
    real vi, vq;
    vi = 0.0;
    vq = 0.0;
    for (int t = 0; t < NT; t++) begin
      int k;
      k = nsys - 1 - TR[t];
      if (k >= 0 && hist_s[k % HL] != 0) begin
        real phs;
        phs = 2.0 * PI * real'(TK[t]) * real'(hist_p[k % HL]) / real'(NSLOW);
        vi += TA[t] * real'(hist_s[k % HL]) * $cos(phs);
        vq += TA[t] * real'(hist_s[k % HL]) * $sin(phs);
      end
    end
    adc_i <= 16'($rtoi(vi + (vi >= 0.0 ? 0.5 : -0.5)) + int'($urandom % 9) - 4);
    adc_q <= 16'($rtoi(vq + (vq >= 0.0 ? 0.5 : -0.5)) + int'($urandom % 9) - 4);
  end

  // ------------------------------------------------------------ matched filter check
  cplx_t prof [NFAST];
  int    mf_cnt = 0;

  always @(posedge clk_sys) begin
    if (mf_valid && !rst) begin
      if (int'(mf_range) != mf_cnt % NFAST) fail("matched filter range index out of step");
      prof[mf_range] = mf_data;
      mf_cnt++;
      if (mf_cnt % NFAST == 0) check_profile(mf_cnt / NFAST - 1);
    end
  end

  task automatic check_profile(input int p);
    real side, amin;
    int  worst;
    side = 0.0; worst = 0; amin = 1e9;
    for (int t = 0; t < NT; t++) begin
      real phs, er, ei;
      phs = 2.0 * PI * real'(TK[t]) * real'(p) / real'(NSLOW);
      ei = TA[t] * $sin(phs);
      er = TA[t] * $cos(phs);
      if (TA[t] < amin) amin = TA[t];
      checks++;
      if ($sqrt((fp_to_real(prof[TR[t]].re) - er) ** 2 + (fp_to_real(prof[TR[t]].im) - ei) ** 2) > 0.03 * TA[t])
        fail($sformatf("pulse %0d range %0d: MF %f,%f expected %f,%f", p, TR[t],
             fp_to_real(prof[TR[t]].re), fp_to_real(prof[TR[t]].im), er, ei));
    end
    for (int r = 0; r < NFAST; r++) begin
      bit is_t;
      is_t = 1'b0;
      for (int t = 0; t < NT; t++) if (TR[t] == r) is_t = 1'b1;
      if (!is_t && c_abs_real(prof[r]) > side) begin
        side = c_abs_real(prof[r]);
        worst = r;
      end
    end
    checks++;
    if (side > 0.03 * amin) fail($sformatf("pulse %0d: residual %f at range %0d", p, side, worst));
    else n_mf_frames++;
  endtask

  // ------------------------------------------------------------ Doppler check
  cplx_t spec [NSLOW];
  int    dop_cnt = 0;

  always @(posedge clk_sys) begin
    if (dop_valid && !rst) begin
      if (int'(dop_bin) != dop_cnt % NSLOW) fail("Doppler bin index out of step");
      spec[dop_bin] = dop_data;
      dop_cnt++;
      if (dop_cnt % NSLOW == 0) check_spectrum((dop_cnt / NSLOW - 1) % NFAST);
      if (dop_cnt % (NSLOW * NFAST) == 0) n_cpi_swaps++;
    end
  end

  task automatic check_spectrum(input int r);
    for (int t = 0; t < NT; t++) begin
      if (TR[t] == r) begin
        real expect_pk;
        expect_pk = real'(NSLOW) * TA[t] * 2.0 * $sin(PI * real'(TK[t]) / real'(NSLOW));
        if (TK[t] == 0) begin
          real mx;
          mx = 0.0;
          for (int k = 0; k < NSLOW; k++) if (c_abs_real(spec[k]) > mx) mx = c_abs_real(spec[k]);
          checks++;
          if (mx > 0.01 * real'(NSLOW) * TA[t]) fail($sformatf("clutter at range %0d not cancelled: %f", r, mx));
          else n_mti_cancel++;
        end else begin
          int kb;
          real mx;
          mx = 0.0; kb = 0;
          for (int k = 0; k < NSLOW; k++)
            if (c_abs_real(spec[k]) > mx) begin mx = c_abs_real(spec[k]); kb = k; end
          checks++;
          if (kb != TK[t] || mx < 0.95 * expect_pk || mx > 1.05 * expect_pk)
            fail($sformatf("range %0d: Doppler peak %f at bin %0d, expected %f at bin %0d", r, mx, kb, expect_pk, TK[t]));
          else n_dop_peak++;
        end
      end
    end
  endtask

  // ------------------------------------------------------------ CFAR and FIFO check
  int hits [NT];
  initial for (int t = 0; t < NT; t++) hits[t] = 0;

  function automatic int target_of(input int r, input int k);
    for (int t = 0; t < NT - 1; t++) if (TR[t] == r && TK[t] == k) return t;
    return -1;
  endfunction

  int cfar_cnt = 0;
  logic [$clog2(NFAST)-1:0]  cr;
  logic [$clog2(NSLOW)-1:0]  ck;
  always @(posedge clk_sys) begin
    if (cfar_valid && !rst) begin
      // the CFAR's decisions follow the fast-time stream: Doppler bin major, range minor
      cr = $clog2(NFAST)'(cfar_cnt % NFAST);
      ck = $clog2(NSLOW)'((cfar_cnt / NFAST) % NSLOW);
      if (cfar_detect && ck == '0) n_dc_residue++;
      else if (cfar_detect) begin
        int t;
        t = target_of(int'(cr), int'(ck));
        checks++;
        if (t < 0) fail($sformatf("false detection at range %0d Doppler %0d", cr, ck));
        else begin
          hits[t]++;
          n_detect++;
        end
      end
      cfar_cnt++;
    end
  end

  int  fifo_seen = 0;
  bit  hold = HOLD_FIFO;
  always @(posedge clk_sys) begin
    if (det_valid && det_ready && !rst) begin
      int t;
      t = target_of(int'(det.range_idx), int'(det.doppler_idx));
      checks++;
      if (t < 0) fail($sformatf("FIFO record range %0d Doppler %0d is no target", det.range_idx, det.doppler_idx));
      else if (fp_to_real(det.amplitude) < 0.9 * real'(NSLOW) * TA[t] * 2.0 * $sin(PI * real'(TK[t]) / real'(NSLOW)))
        fail("FIFO record amplitude too small");
      n_fifo_read++;
    end
    if (det_overflow && !rst) n_overflow = 1;
  end

  always @(posedge clk_sys) det_ready <= hold ? 1'b0 : 1'($urandom % 2);

  // ------------------------------------------------------------ run
  initial begin
    rst = 1'b1;
    adc_i = '0;
    adc_q = '0;
    repeat (4) @(posedge clk_sys);
    rst <= 1'b0;
    // CPI c's detections are complete two CPIs later
    repeat (CPIS * NSLOW * NFAST + 3000) @(posedge clk_sys);
    hold = 1'b0;
    repeat (4 * FIFO_DEPTH + 20) @(posedge clk_sys);

    // every target detected in each complete CPI (CPIS - 2 of them)
    for (int t = 0; t < NT - 1; t++) begin
      checks++;
      if (hits[t] != CPIS - 2) fail($sformatf("target %0d detected %0d times, expected %0d", t, hits[t], CPIS - 2));
    end
    checks++;
    if (HOLD_FIFO) begin
      if (n_overflow == 0 || n_fifo_read != FIFO_DEPTH)
        fail($sformatf("held FIFO: overflow %0d, %0d records read, expected %0d", n_overflow, n_fifo_read, FIFO_DEPTH));
    end else if (n_overflow != 0 || n_fifo_read != (NT - 1) * (CPIS - 2)) begin
      fail($sformatf("FIFO: overflow %0d, %0d records read, expected %0d", n_overflow, n_fifo_read, (NT - 1) * (CPIS - 2)));
    end

    $display("mechanisms: sidelobe-free profiles %0d, MTI cancellations %0d, Doppler peaks %0d, CPI swaps %0d, detections %0d, zero-Doppler decisions blanked %0d, FIFO reads %0d, FIFO overflow %0d",
             n_mf_frames, n_mti_cancel, n_dop_peak, n_cpi_swaps, n_detect, n_dc_residue, n_fifo_read, n_overflow);
    checks++;
    if (n_mf_frames == 0 || n_mti_cancel == 0 || n_dop_peak == 0 || n_cpi_swaps == 0 ||
        n_detect == 0 || n_fifo_read == 0 || (HOLD_FIFO && n_overflow == 0))
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CPIS * NSLOW * NFAST + 20000) @(posedge clk_sys);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
