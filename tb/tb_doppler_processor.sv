// tb_doppler_processor: Doppler processing at a reduced size (NFAST = 16 range
// cells, NSLOW = 8 pulses) over four CPIs. The input, as from the matched
// filter, holds random complex values, with one range cell of every CPI made
// stationary (same value every pulse). For every range cell of every CPI the
// testbench forms the circular pulse-to-pulse difference y[n] = x[n] - x[n-1],
// rotated so the frame starts at y[1], takes its DFT in double precision and
// compares it with the Doppler FFT output (dop_*); the stationary cell must
// give all-zero bins. The magnitude map (mag_*) must come out Doppler bin by
// Doppler bin, range cells in order, with |DFT| values and matching indices.
//
// The chain follows the specification; the circular MTI, the output order and
// the reduced size are this design's choices.
module tb_doppler_processor;
  import radar_pkg::*;
  import tb_util_pkg::*;

  localparam int NF = 16, NS = 8, CPIS = 4, STAT = 5;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid, dop_valid, mag_valid;
  cplx_t in_data, dop_data;
  logic [$clog2(NS)-1:0] dop_bin, mag_doppler;
  logic [$clog2(NF)-1:0] mag_range;
  fp32_t mag_data;

  doppler_processor #(.NFAST(NF), .NSLOW(NS)) dut (.*);

  int checks = 0, failures = 0;
  real xr [CPIS][NS][NF], xi [CPIS][NS][NF];   // [cpi][pulse][range]
  real zr [CPIS][NF][NS], zi [CPIS][NF][NS];   // expected spectra [cpi][range][bin]

  int dcnt = 0, mcnt = 0, n_zero = 0;
  always @(posedge clk) begin
    if (dop_valid && !rst) begin
      int c, r, k;
      c = dcnt / (NF * NS); r = (dcnt / NS) % NF; k = dcnt % NS;
      if (c < CPIS) begin
        checks++;
        if (int'(dop_bin) != k ||
            rabs(fp_to_real(dop_data.re) - zr[c][r][k]) > 1e-3 ||
            rabs(fp_to_real(dop_data.im) - zi[c][r][k]) > 1e-3) begin
          failures++;
          if (failures < 10) $display("FAIL CPI %0d range %0d bin %0d: %f,%f expected %f,%f", c, r, k,
                   fp_to_real(dop_data.re), fp_to_real(dop_data.im), zr[c][r][k], zi[c][r][k]);
        end
        if (r == STAT && dop_data.re[30:0] == 0 && dop_data.im[30:0] == 0) n_zero++;
      end
      dcnt++;
    end
    if (mag_valid && !rst) begin
      int c, r, k;
      real e;
      c = mcnt / (NF * NS); k = (mcnt / NF) % NS; r = mcnt % NF;
      if (c < CPIS) begin
        e = $sqrt(zr[c][r][k] ** 2 + zi[c][r][k] ** 2);
        checks++;
        if (int'(mag_range) != r || int'(mag_doppler) != k || rabs(fp_to_real(mag_data) - e) > 1e-3) begin
          failures++;
          if (failures < 10) $display("FAIL map CPI %0d bin %0d range %0d: %f (%0d,%0d) expected %f", c, k, r,
                   fp_to_real(mag_data), mag_doppler, mag_range, e);
        end
      end
      mcnt++;
    end
  end

  initial begin
    in_valid = 1'b0; in_data = '0;
    for (int c = 0; c < CPIS; c++)
      for (int p = 0; p < NS; p++)
        for (int r = 0; r < NF; r++) begin
          xr[c][p][r] = (r == STAT) ? 12.5 + c : real'(int'($urandom % 2001) - 1000) / 8.0;
          xi[c][p][r] = (r == STAT) ? -3.0 : real'(int'($urandom % 2001) - 1000) / 8.0;
        end
    for (int c = 0; c < CPIS; c++)
      for (int r = 0; r < NF; r++)
        for (int k = 0; k < NS; k++) begin
          zr[c][r][k] = 0.0; zi[c][r][k] = 0.0;
          for (int m = 0; m < NS; m++) begin
            int n, pn;
            real yr, yi, a;
            n = (m + 1) % NS; pn = (n + NS - 1) % NS;
            yr = xr[c][n][r] - xr[c][pn][r];
            yi = xi[c][n][r] - xi[c][pn][r];
            a = -2.0 * PI * real'(k * m) / real'(NS);
            zr[c][r][k] += yr * $cos(a) - yi * $sin(a);
            zi[c][r][k] += yr * $sin(a) + yi * $cos(a);
          end
        end
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // CPIS CPIs of data, then three of zeros to flush the pipeline
    for (int c = 0; c < CPIS + 3; c++)
      for (int p = 0; p < NS; p++)
        for (int r = 0; r < NF; r++) begin
          in_valid <= 1'b1;
          in_data  <= (c < CPIS) ? '{re: fp_from_real(xr[c][p][r]), im: fp_from_real(xi[c][p][r])} : '0;
          @(posedge clk);
        end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (dcnt < CPIS * NF * NS || mcnt < CPIS * NF * NS || n_zero != CPIS * NS) begin
      failures++;
      $display("FAIL %0d spectra bins, %0d map cells, %0d zero bins at the stationary cell", dcnt, mcnt, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
