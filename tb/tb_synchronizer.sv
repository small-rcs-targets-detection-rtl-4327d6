// tb_synchronizer: checks the PRT/CPI counters and markers of the synchronizer
// at a reduced size (NFAST = 16, NSLOW = 4, CODE_LEN = 5) against a reference
// count kept by the testbench, over three CPIs: sample index, pulse index,
// prt_start/cpi_start exactly at sample 0 (and pulse 0), tx_gate for the first
// CODE_LEN samples, and a PRT of exactly NFAST clocks.
//
// The 9-bit PRT counter follows the specification; the reduced size is this
// testbench's choice.
module tb_synchronizer;
  localparam int NFAST = 16, NSLOW = 4, CODE_LEN = 5;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [$clog2(NFAST)-1:0] sample_idx;
  logic [$clog2(NSLOW)-1:0] pulse_idx;
  logic prt_start, cpi_start, tx_gate;

  synchronizer #(.NFAST(NFAST), .NSLOW(NSLOW), .CODE_LEN(CODE_LEN)) dut (.*);

  int checks = 0, failures = 0;
  int n = 0, last_prt = -1;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    for (n = 0; n < 3 * NFAST * NSLOW; n++) begin
      checks++;
      if (int'(sample_idx) != n % NFAST || int'(pulse_idx) != (n / NFAST) % NSLOW ||
          prt_start != (n % NFAST == 0) || cpi_start != (n % (NFAST * NSLOW) == 0) ||
          tx_gate != (n % NFAST < CODE_LEN)) begin
        failures++;
        $display("FAIL n=%0d sample %0d pulse %0d prt %b cpi %b gate %b", n, sample_idx, pulse_idx,
                 prt_start, cpi_start, tx_gate);
      end
      if (prt_start) begin
        if (last_prt >= 0) begin
          checks++;
          if (n - last_prt != NFAST) begin failures++; $display("FAIL PRT length %0d", n - last_prt); end
        end
        last_prt = n;
      end
      @(negedge clk);
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
