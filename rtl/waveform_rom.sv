// waveform_rom: transmit baseband waveform of the signal generator.
//
// The ROM holds one PRT of samples (NFAST words). The first CODE_LEN words are
// the binary phase code, one sample per sub-pulse: a '1' chip is +AMP and a '0'
// chip is -AMP, chips taken from the most significant bit of CODE first. The
// remaining words are zero (receive time). The default code is the 105-chip
// optimal-peak-sidelobe sequence 1C6387FF5DA4FA325C895958DC5 (hex), whose
// autocorrelation peak is 105 and peak sidelobe 5 (-26.44 dB).
// The code, its length and the 512-word ROM addressed by the 9-bit sample
// counter follow the specification; the chip-to-sign mapping, the DAC word width
// and AMP are this design's choices.
//
// Timing: one clock of read latency (registered output, as in a block ROM);
// the output is zero (no transmission) while rst is high.
module waveform_rom #(
  parameter int                 NFAST    = 512,
  parameter int                 CODE_LEN = 105,
  parameter logic [CODE_LEN-1:0] CODE    = CODE_LEN'(105'h1C6387FF5DA4FA325C895958DC5),
  parameter int                 DAC_W    = 16,
  parameter int                 AMP      = 8192
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NFAST)-1:0] addr,
  output logic signed [DAC_W-1:0]  dac_code
);
  typedef logic signed [DAC_W-1:0] word_t;

  function automatic word_t [NFAST-1:0] build_rom();
    word_t [NFAST-1:0] r;
    for (int i = 0; i < NFAST; i++) begin
      if (i < CODE_LEN)
        r[i] = CODE[CODE_LEN-1-i] ? word_t'(AMP) : word_t'(-AMP);
      else
        r[i] = '0;
    end
    return r;
  endfunction

  localparam word_t [NFAST-1:0] ROM = build_rom();

  always_ff @(posedge clk)
    dac_code <= rst ? '0 : ROM[addr];
endmodule
