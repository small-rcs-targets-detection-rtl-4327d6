// tb_ma_decimator: drives random 16-bit samples into the moving-average
// decimator and checks every output against the mean of the last DEC = 8
// inputs (floor division, i.e. arithmetic shift), computed from a copy of the
// input history. Checks that an output comes exactly every 8 clocks.
//
// The 8:1 rate (120 MHz to 15 MHz) follows the specification; the averaging
// length of 8 is this design's choice.
module tb_ma_decimator;
  localparam int W = 16, DEC = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic signed [W-1:0] din, dout;
  logic dout_stb;

  ma_decimator #(.W(W), .DEC(DEC)) dut (.clk_adc(clk), .rst, .din, .dout, .dout_stb);

  int checks = 0, failures = 0;
  int hist [$];
  int n = 0, last_stb = -1;

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 4000; i++) begin
      logic signed [W-1:0] v;
      v = W'($urandom);
      if (i % 500 < 20) v = 16'sh7FFF;        // full-scale stretches
      else if (i % 500 < 40) v = -16'sh8000;
      din <= v;
      @(posedge clk);
      hist.push_back(int'(v));
      n++;
      #1;
      if (dout_stb) begin
        int s;
        s = 0;
        for (int k = 0; k < DEC; k++) s += (hist.size() > k) ? hist[hist.size() - 1 - k] : 0;
        checks++;
        if (int'(dout) != (s >>> 3)) begin
          failures++;
          $display("FAIL sample %0d: %0d expected %0d", n, dout, s >>> 3);
        end
        if (last_stb >= 0) begin
          checks++;
          if (n - last_stb != DEC) begin failures++; $display("FAIL output spacing %0d", n - last_stb); end
        end
        last_stb = n;
      end
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
