// tb_waveform_rom: reads every address of the transmit waveform ROM at its
// default size (512 words, 105-chip code) and compares it with the chips of the
// code hex string 1C6387FF5DA4FA325C895958DC5 taken bit by bit here (MSB first,
// '1' -> +AMP, '0' -> -AMP, zero after chip 105). Also checks the code's
// autocorrelation: peak 105 and largest sidelobe 5, computed from the ROM
// output, and the zero output during reset.
//
// Code, length and ROM size follow the specification; the amplitude and the
// chip-to-level mapping are this design's choices.
module tb_waveform_rom;
  localparam int NFAST = 512, CODE_LEN = 105, AMP = 8192;
  localparam string HEX = "1C6387FF5DA4FA325C895958DC5";

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [8:0] addr;
  logic signed [15:0] dac_code;

  waveform_rom dut (.clk, .rst, .addr, .dac_code);

  int checks = 0, failures = 0;
  int chip [CODE_LEN];
  int bits [108];

  initial begin
    // code bits from the hex string (108 bits, the code is the lowest 105)
    for (int d = 0; d < 27; d++) begin
      int v;
      byte c;
      c = HEX[d];
      v = (c >= "A") ? (c - "A" + 10) : (c - "0");
      for (int b = 0; b < 4; b++) bits[4 * d + b] = (v >> (3 - b)) & 1;
    end
    addr = '0;
    @(posedge clk); #1;
    checks++;
    if (dac_code != 0) begin failures++; $display("FAIL output during reset %0d", dac_code); end
    rst = 1'b0;
    for (int a = 0; a < NFAST; a++) begin
      int expect_v;
      addr = 9'(a);
      @(posedge clk); #1;
      expect_v = (a < CODE_LEN) ? (bits[a + 3] ? AMP : -AMP) : 0;
      if (a < CODE_LEN) chip[a] = (dac_code > 0) ? 1 : -1;
      checks++;
      if (int'(dac_code) != expect_v) begin
        failures++;
        $display("FAIL addr %0d: %0d expected %0d", a, dac_code, expect_v);
      end
    end
    begin
      int peak, side;
      peak = 0; side = 0;
      for (int lag = 0; lag < CODE_LEN; lag++) begin
        int acc;
        acc = 0;
        for (int i = 0; i + lag < CODE_LEN; i++) acc += chip[i] * chip[i + lag];
        if (lag == 0) peak = acc;
        else if ((acc < 0 ? -acc : acc) > side) side = (acc < 0 ? -acc : acc);
      end
      checks++;
      if (peak != 105 || side != 5) begin failures++; $display("FAIL ACF peak %0d sidelobe %0d", peak, side); end
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
