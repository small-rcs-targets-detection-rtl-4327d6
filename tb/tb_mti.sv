// tb_mti: streams slow-time frames of NS = 8 pulses for several range cells
// through the MTI and checks, frame by frame, that the output is the circular
// difference y[n] = x[n] - x[n-1] (y[0] = x[0] - x[NS-1]) in the order
// y[1] ... y[NS-1], y[0], computed here in double precision. A constant
// (stationary) cell must give exactly zero.
//
// H(z) = 1 - z^-1 follows the specification; the circular wrap and the output
// order are this design's choices.
module tb_mti;
  import radar_pkg::*;
  import tb_util_pkg::*;

  localparam int NS = 8, CELLS = 6;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid, in_first, out_valid;
  cplx_t in_data, out_data;

  mti dut (.*);

  int checks = 0, failures = 0;
  real xr [CELLS + 1][NS], xi [CELLS + 1][NS];
  int ocnt = 0;

  always @(posedge clk) begin
    if (out_valid && !rst) begin
      int c, k, n, pn;
      c = ocnt / NS; k = ocnt % NS;
      n = (k + 1) % NS;               // output order y[1..NS-1], y[0]
      pn = (n + NS - 1) % NS;
      if (c < CELLS) begin
        real er, ei;
        er = xr[c][n] - xr[c][pn];
        ei = xi[c][n] - xi[c][pn];
        checks++;
        if (rabs(fp_to_real(out_data.re) - er) > 1e-3 || rabs(fp_to_real(out_data.im) - ei) > 1e-3) begin
          failures++;
          $display("FAIL cell %0d y[%0d]: %f,%f expected %f,%f", c, n, fp_to_real(out_data.re),
                   fp_to_real(out_data.im), er, ei);
        end
        if (c == 2) begin
          checks++;
          if (out_data.re[30:0] != 0 || out_data.im[30:0] != 0) begin failures++; $display("FAIL stationary cell not zero"); end
        end
      end
      ocnt++;
    end
  end

  initial begin
    in_valid = 1'b0; in_first = 1'b0; in_data = '0;
    for (int c = 0; c <= CELLS; c++)
      for (int n = 0; n < NS; n++) begin
        xr[c][n] = (c == 2) ? 250.5 : real'(int'($urandom % 2000) - 1000) / 4.0;
        xi[c][n] = (c == 2) ? -17.25 : real'(int'($urandom % 2000) - 1000) / 4.0;
      end
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c <= CELLS; c++)
      for (int n = 0; n < NS; n++) begin
        in_valid <= 1'b1;
        in_first <= (n == 0);
        in_data  <= '{re: fp_from_real(xr[c][n]), im: fp_from_real(xi[c][n])};
        @(posedge clk);
        if ($urandom % 4 == 0) begin in_valid <= 1'b0; @(posedge clk); end
      end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (ocnt != (CELLS + 1) * NS - 1) begin failures++; $display("FAIL output count %0d", ocnt); end
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
