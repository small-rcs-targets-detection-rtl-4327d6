// mf_coef_rom: coefficient ROM of the frequency-domain matched filter.
//
// Holds N complex single-precision words H[k] = conj(S[k]) * OPF[k], the product
// of the conjugate spectrum of the transmitted replica and the spectrum of the
// range-sidelobe cancellation (optimum) filter. A log2(N)-bit counter (9 bits
// for N = 512) steps through the ROM once per valid FFT output bin, so the
// coefficient for bin k is presented together with that bin.
//
// Default contents (rtl/mf_coef.hex, one 64-bit {re, im} word per line, bin 0
// first): S[k] is the 512-point DFT of the 105-chip code as +1/-1 (first chip =
// code MSB) padded with zeros, and OPF[k] = 1/|S[k]|^2, so H[k] = 1/S[k]
// (|S[k]| >= 3.8 for this code, so the division is well conditioned).
// Filtering with 1/S turns an echo of the code into a single spike at the
// echo delay, which cancels the range sidelobes completely. The counter-addressed
// ROM and the product of replica and cancellation filter follow the
// specification; the cancellation filter 1/|S|^2 is this design's choice. Another
// filter is loaded by pointing INIT_FILE at a file of the same format.
//
// Timing: coef = ROM[counter] combinationally; the counter advances after each
// clock with en high and wraps after N.
module mf_coef_rom
  import radar_pkg::*;
#(
  parameter int    N         = 512,
  parameter string INIT_FILE = "rtl/mf_coef.hex"
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  output cplx_t                coef,
  output logic [$clog2(N)-1:0] addr
);
  cplx_t rom [N];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) begin
    if (rst)     addr <= '0;
    else if (en) addr <= addr + 1'b1;
  end

  assign coef = rom[addr];
endmodule
