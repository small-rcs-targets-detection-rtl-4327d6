// ma_decimator: moving-average smoothing and 8:1 downsampling of one ADC channel.
//
// Runs in the 120 MHz acquisition clock domain. Every input sample enters a
// DEC-deep shift register and a running sum (add the new sample, subtract the
// one leaving). Once every DEC input samples the average (sum / DEC, an
// arithmetic shift, DEC a power of two) is latched into dout, which therefore
// changes at the 15 MHz system rate and is read by the system clock domain.
// The two clocks come from one clock generator with a 1:8 ratio and aligned
// edges, so dout is stable for DEC fast cycles around each system clock edge.
// The filter, the 120 MHz -> 15 MHz rate change and its place in the receive
// chain follow the specification; the filter length (equal to DEC), the word
// width and the running-sum structure are this design's choices.
//
// Timing: dout_stb pulses for one fast clock when dout is updated; the average
// covers the current input and the DEC-1 before it.
module ma_decimator #(
  parameter int W   = 16,
  parameter int DEC = 8,
  parameter int LATCH = 0
) (
  input  logic                clk_adc,
  input  logic                rst,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout,
  output logic                dout_stb
);
  localparam int SW = W + $clog2(DEC);
  localparam logic [$clog2(DEC)-1:0] LATCH_PHASE = $clog2(DEC)'(LATCH);

  logic signed [W-1:0]  taps [DEC];
  logic signed [SW-1:0] sum, sum_next;
  logic [$clog2(DEC)-1:0] phase;

  assign sum_next = sum + SW'(din) - SW'(taps[DEC-1]);

  always_ff @(posedge clk_adc) begin
    if (rst) begin
      for (int i = 0; i < DEC; i++) taps[i] <= '0;
      sum      <= '0;
      phase    <= '0;
      dout     <= '0;
      dout_stb <= 1'b0;
    end else begin
      taps[0] <= din;
      for (int i = 1; i < DEC; i++) taps[i] <= taps[i-1];
      sum      <= sum_next;
      phase    <= phase + 1'b1;
      dout_stb <= (phase == LATCH_PHASE);
      if (phase == LATCH_PHASE)
        dout <= W'(sum_next >>> $clog2(DEC));
    end
  end

  initial assert (DEC == (1 << $clog2(DEC)) && DEC > 1) else $error("DEC must be a power of two");
endmodule
