// tb_matched_filter: pulse compression of the 105-chip code at the full
// 512-sample frame size. Frames carry echoes of the code (+1/-1 chips) at
// chosen delays and complex amplitudes, plus small random noise; the filter
// output of each frame must hold each echo's amplitude at its delay within 1 %
// and nothing above 1 % of the weakest echo elsewhere (range sidelobes removed,
// where a plain correlator would leave sidelobes up to 5/105 of the peak).
// Also checks the latency: range cell 0 of frame 0 appears 4N + 2*log2(N) + 1
// clocks after the first input sample is taken.
//
// The FFT / ROM / IFFT structure and 512-point size follow the specification;
// the sidelobe-free 1/S coefficients and the latency are this design's.
module tb_matched_filter;
  import radar_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 512, L = 105, FR = 4;
  localparam logic [104:0] CODE = 105'h1C6387FF5DA4FA325C895958DC5;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  cplx_t in_data, out_data;
  logic [8:0] out_idx;

  matched_filter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int  dly [FR][2];
  real ar [FR][2], ai [FR][2];
  real xr [FR][N], xi [FR][N];
  cplx_t prof [N];
  int ocnt = 0, cyc = 0, t0 = 0, t_first = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid && !rst) begin
      if (t_first < 0) t_first = cyc;
      prof[out_idx] = out_data;
      ocnt++;
      if (ocnt % N == 0 && ocnt / N <= FR) check_frame(ocnt / N - 1);
    end
  end

  task automatic check_frame(input int f);
    real worst, amin;
    worst = 0.0; amin = 1e9;
    for (int e = 0; e < 2; e++) begin
      real m;
      m = $sqrt(ar[f][e] ** 2 + ai[f][e] ** 2);
      if (m < amin) amin = m;
      checks++;
      if ($sqrt((fp_to_real(prof[dly[f][e]].re) - ar[f][e]) ** 2 +
                (fp_to_real(prof[dly[f][e]].im) - ai[f][e]) ** 2) > 0.01 * m) begin
        failures++;
        $display("FAIL frame %0d delay %0d: %f,%f expected %f,%f", f, dly[f][e],
                 fp_to_real(prof[dly[f][e]].re), fp_to_real(prof[dly[f][e]].im), ar[f][e], ai[f][e]);
      end
    end
    for (int r = 0; r < N; r++)
      if (r != dly[f][0] && r != dly[f][1] && c_abs_real(prof[r]) > worst) worst = c_abs_real(prof[r]);
    checks++;
    if (worst > 0.01 * amin) begin
      failures++;
      $display("FAIL frame %0d: residual %f", f, worst);
    end
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0;
    for (int f = 0; f < FR; f++) begin
      dly[f][0] = 10 + 37 * f;
      dly[f][1] = 250 + 50 * f;
      for (int e = 0; e < 2; e++) begin
        ar[f][e] = real'(int'($urandom % 2000) - 1000);
        ai[f][e] = real'(int'($urandom % 2000) - 1000);
      end
      for (int t = 0; t < N; t++) begin
        xr[f][t] = real'(int'($urandom % 5) - 2);
        xi[f][t] = real'(int'($urandom % 5) - 2);
        for (int e = 0; e < 2; e++) begin
          int n;
          n = t - dly[f][e];
          if (n >= 0 && n < L) begin
            xr[f][t] += (CODE[L - 1 - n] ? 1.0 : -1.0) * ar[f][e];
            xi[f][t] += (CODE[L - 1 - n] ? 1.0 : -1.0) * ai[f][e];
          end
        end
      end
    end
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    t0 = cyc + 1;
    for (int t = 0; t < (FR + 5) * N; t++) begin
      in_valid <= 1'b1;
      in_data  <= (t < FR * N) ? '{re: fp_from_real(xr[t / N][t % N]), im: fp_from_real(xi[t / N][t % N])} : '0;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    @(posedge clk);
    checks++;
    if (ocnt < FR * N) begin failures++; $display("FAIL only %0d outputs", ocnt); end
    checks++;
    if (t_first - t0 != 4 * N + 2 * $clog2(N) + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", t_first - t0, 4 * N + 2 * $clog2(N) + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
