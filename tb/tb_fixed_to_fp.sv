// tb_fixed_to_fp: converts random and edge-case 16-bit I/Q pairs and checks the
// single-precision result, read back as a real, equals the integer exactly, and
// that out_valid follows in_valid one clock later.
//
// The conversion to single precision follows the specification; the 16-bit
// input width and one-clock latency are this design's choices.
module tb_fixed_to_fp;
  import radar_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic signed [15:0] in_i, in_q;
  cplx_t out_data;

  fixed_to_fp #(.W(16)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    in_valid = 1'b0; in_i = '0; in_q = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 3000; n++) begin
      logic signed [15:0] a, b;
      logic v;
      a = 16'($urandom); b = 16'($urandom);
      if (n == 0) begin a = 16'sh7FFF; b = -16'sh8000; end
      if (n == 1) begin a = 0; b = 1; end
      if (n == 2) begin a = -1; b = 0; end
      v = (n % 5 != 4);
      in_valid <= v; in_i <= a; in_q <= b;
      @(posedge clk); #1;
      checks++;
      if (out_valid != v) begin failures++; $display("FAIL valid"); end
      if (v) begin
        checks++;
        if (fp_to_real(out_data.re) != real'(a) || fp_to_real(out_data.im) != real'(b)) begin
          failures++;
          $display("FAIL %0d,%0d -> %h %h", a, b, out_data.re, out_data.im);
        end
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
