// tb_cplx_abs: random complex values over a wide dynamic range; the magnitude
// must match sqrt(re^2 + im^2) computed in double precision within 2e-7
// relative, the tag must follow its sample, and the latency must be one clock.
//
// The magnitude follows the specification's absolute value; the one-clock
// latency and the tolerance are this design's choices.
module tb_cplx_abs;
  import radar_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  cplx_t in_data;
  logic [16:0] in_tag, out_tag;
  fp32_t out_mag;

  cplx_abs #(.TAG_W(17)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    in_valid = 1'b0; in_data = '0; in_tag = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 3000; n++) begin
      real a, b, e;
      int sc;
      sc = int'($urandom % 30) - 10;
      a = real'(int'($urandom % 20001) - 10000) * (2.0 ** sc);
      b = real'(int'($urandom % 20001) - 10000) * (2.0 ** sc);
      if (n == 0) begin a = 0.0; b = 0.0; end
      if (n == 1) begin a = 3.0; b = -4.0; end
      in_valid <= 1'b1;
      in_data  <= '{re: fp_from_real(a), im: fp_from_real(b)};
      in_tag   <= 17'(n);
      @(posedge clk); #1;
      a = fp_to_real(in_data.re); b = fp_to_real(in_data.im);
      e = $sqrt(a * a + b * b);
      checks++;
      if (!out_valid || out_tag != 17'(n) || rabs(fp_to_real(out_mag) - e) > 2e-7 * e) begin
        failures++;
        $display("FAIL n=%0d |%f,%f| = %f expected %f", n, a, b, fp_to_real(out_mag), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
