// tb_mf_coef_rom: checks the matched-filter coefficient ROM against its
// definition. The testbench computes S[k], the 512-point DFT of the 105-chip
// code (+1/-1, MSB first), in double precision and requires each ROM word,
// read by stepping the 9-bit counter, to satisfy H[k] * S[k] = 1 within 1e-5.
// It also checks that the counter holds when en is low and wraps after 512.
//
// The 9-bit counter and ROM follow the specification; the coefficient
// definition H = 1/S is this design's realisation of the optimum filter.
module tb_mf_coef_rom;
  import radar_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 512, L = 105;
  localparam logic [104:0] CODE = 105'h1C6387FF5DA4FA325C895958DC5;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic en;
  cplx_t coef;
  logic [8:0] addr;

  mf_coef_rom #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    en = 1'b0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int k = 0; k < N + 3; k++) begin
      real sr, si, hr, hi, pr, pi_;
      #1;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < L; n++) begin
        real c;
        c = CODE[L - 1 - n] ? 1.0 : -1.0;
        sr += c * $cos(2.0 * PI * real'((k % N) * n) / N);
        si -= c * $sin(2.0 * PI * real'((k % N) * n) / N);
      end
      hr = fp_to_real(coef.re); hi = fp_to_real(coef.im);
      pr = hr * sr - hi * si; pi_ = hr * si + hi * sr;
      checks++;
      if (int'(addr) != k % N || rabs(pr - 1.0) > 1e-5 || rabs(pi_) > 1e-5) begin
        failures++;
        if (failures < 10) $display("FAIL bin %0d (addr %0d): H*S = %f,%f", k, addr, pr, pi_);
      end
      // hold the counter for one clock every 5 bins
      en <= 1'b0;
      if (k % 5 == 0) @(posedge clk);
      en <= 1'b1;
      @(posedge clk);
      en <= 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
