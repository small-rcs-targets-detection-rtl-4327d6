// tb_fft: self-checking testbench of the streaming floating-point FFT.
//
// Streams random complex frames through a forward and an inverse instance of
// size N (overridable; default 64 to keep the run short, plus a 512-point
// forward instance for one frame). Every output bin is compared with a
// direct DFT computed in double precision (relative error below 1e-4 of the
// frame's largest bin); the inverse instance must return x (DFT with +j and
// 1/N). The latency from the first input to the first output is checked
// against 2N - 1 samples plus log2(N) + 1 register stages, counted from the clock that samples the first input.
//
// Transform sizes follow the specification; the latency checked is this
// design's (the specification gives none).
module tb_fft;
  import radar_pkg::*;

  localparam int N      = 64;
  localparam int NBIG   = 512;
  localparam int FRAMES = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic real tor(input fp32_t f);
    return tb_util_pkg::fp_to_real(f);
  endfunction

  // stimulus memories (double precision copy of the exact fp32 inputs)
  real xr [FRAMES][NBIG];
  real xi [FRAMES][NBIG];

  logic  in_valid;
  cplx_t in_data;
  logic  fo_valid, io_valid, bo_valid;
  cplx_t fo_data, io_data, bo_data;
  logic [$clog2(N)-1:0]    fo_idx, io_idx;
  logic [$clog2(NBIG)-1:0] bo_idx;
  logic  big_valid;
  cplx_t big_data;

  fft #(.N(N), .INVERSE(1'b0)) dut_f (.clk, .rst, .in_valid, .in_data,
                                      .out_valid(fo_valid), .out_data(fo_data), .out_idx(fo_idx));
  fft #(.N(N), .INVERSE(1'b1)) dut_i (.clk, .rst, .in_valid, .in_data,
                                      .out_valid(io_valid), .out_data(io_data), .out_idx(io_idx));
  fft #(.N(NBIG), .INVERSE(1'b0)) dut_b (.clk, .rst, .in_valid(big_valid), .in_data(big_data),
                                      .out_valid(bo_valid), .out_data(bo_data), .out_idx(bo_idx));

  task automatic check_bin(input string tag, input int n, input int f, input int k,
                           input bit inv, input cplx_t got);
    real er, ei, ang, peak, mag;
    er = 0.0; ei = 0.0; peak = 1.0;
    for (int t = 0; t < n; t++) begin
      ang = (inv ? 2.0 : -2.0) * 3.14159265358979323846 * real'(k) * real'(t) / real'(n);
      er += xr[f][t] * $cos(ang) - xi[f][t] * $sin(ang);
      ei += xr[f][t] * $sin(ang) + xi[f][t] * $cos(ang);
    end
    if (inv) begin er = er / n; ei = ei / n; end
    peak = inv ? 1.0 : real'(n);
    mag = (tor(got.re) - er) ** 2 + (tor(got.im) - ei) ** 2;
    checks++;
    if (mag > (1e-4 * peak) ** 2) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s frame %0d bin %0d: got %f,%f expected %f,%f", tag, f, k,
                 tor(got.re), tor(got.im), er, ei);
    end
  endtask

  int fcnt = 0, icnt = 0, bcnt = 0;
  int cyc = 0, first_out = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fo_valid && !rst) begin
      if (first_out < 0) first_out = cyc;
      if (int'(fo_idx) != fcnt % N) begin failures++; $display("FAIL fwd index"); end
      if (fcnt < FRAMES * N) check_bin("fwd", N, fcnt / N, fcnt % N, 1'b0, fo_data);
      fcnt++;
    end
    if (io_valid && !rst) begin
      if (icnt < FRAMES * N) check_bin("inv", N, icnt / N, icnt % N, 1'b1, io_data);
      icnt++;
    end
    if (bo_valid && !rst) begin
      if (bcnt < NBIG && (bcnt % 7 == 0 || bcnt < 4)) check_bin("big", NBIG, 0, bcnt, 1'b0, bo_data);
      bcnt++;
    end
  end

  int in_start;
  initial begin
    in_valid = 1'b0; in_data = '0; big_valid = 1'b0; big_data = '0;
    for (int f = 0; f < FRAMES; f++)
      for (int t = 0; t < NBIG; t++) begin
        logic signed [15:0] a, b;
        a = 16'($urandom); b = 16'($urandom);
        xr[f][t] = tor(fp_from_int24(24'(a))) / 1024.0;
        xi[f][t] = tor(fp_from_int24(24'(b))) / 1024.0;
      end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    in_start = cyc;
    // small instances: FRAMES frames then zero frames to flush; the 512-point
    // instance gets frame 0 then zeros.
    for (int t = 0; t < (FRAMES + 2) * N || t < 3 * NBIG + 16; t++) begin
      in_valid  <= (t < (FRAMES + 2) * N);
      if (t < FRAMES * N)
        in_data <= '{re: fp_from_real(xr[t / N][t % N]), im: fp_from_real(xi[t / N][t % N])};
      else
        in_data <= '0;
      big_valid <= 1'b1;
      big_data  <= (t < NBIG) ? '{re: fp_from_real(xr[0][t]), im: fp_from_real(xi[0][t])} : '0;
      @(posedge clk);
    end
    in_valid <= 1'b0; big_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (first_out - in_start != 2 * N + $clog2(N) + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", first_out - in_start, 2 * N + $clog2(N) + 1);
    end
    checks++;
    if (fcnt < FRAMES * N || icnt < FRAMES * N || bcnt < NBIG) begin
      failures++;
      $display("FAIL missing outputs %0d %0d %0d", fcnt, icnt, bcnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
