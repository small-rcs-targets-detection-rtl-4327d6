// synchronizer: radar timing generator in the 15 MHz system clock domain.
//
// A 9-bit sample counter runs over the NFAST samples of one pulse repetition
// time (PRT) and a pulse counter over the NSLOW pulses of one coherent pulse
// interval (CPI). The sample counter is the address of the transmit waveform
// ROM; the markers tell the rest of the processor where a PRT and a CPI begin.
// tx_gate is high during the CODE_LEN samples of the transmitted pulse.
// The 512-sample PRT, 256-pulse CPI, 105-sample code and the 9-bit counter are
// the system's numbers; the marker outputs are this design's choice.
//
// Timing: all outputs are registered; after reset sample_idx = 0,
// pulse_idx = 0, prt_start = cpi_start = 1, and the counters advance once per
// clock.
module synchronizer #(
  parameter int NFAST    = 512,
  parameter int NSLOW    = 256,
  parameter int CODE_LEN = 105
) (
  input  logic                     clk,
  input  logic                     rst,
  output logic [$clog2(NFAST)-1:0] sample_idx,
  output logic [$clog2(NSLOW)-1:0] pulse_idx,
  output logic                     prt_start,
  output logic                     cpi_start,
  output logic                     tx_gate
);
  always_ff @(posedge clk) begin
    if (rst) begin
      sample_idx <= '0;
      pulse_idx  <= '0;
    end else begin
      sample_idx <= sample_idx + 1'b1;  // wraps at NFAST (power of two)
      if (sample_idx == $clog2(NFAST)'(NFAST - 1))
        pulse_idx <= pulse_idx + 1'b1;
    end
  end

  always_comb begin
    prt_start = (sample_idx == '0);
    cpi_start = prt_start && (pulse_idx == '0);
    tx_gate   = (int'(sample_idx) < CODE_LEN);
  end

  initial begin
    assert (NFAST == (1 << $clog2(NFAST)) && NSLOW == (1 << $clog2(NSLOW)))
      else $error("NFAST and NSLOW must be powers of two");
  end
endmodule
