// cplx_abs: magnitude of a complex single-precision sample,
// |x| = sqrt(re^2 + im^2), feeding the CFAR.
//
// Two multipliers, an adder and a square root (radar_pkg functions) turn the
// 64-bit real/imaginary word into one 32-bit magnitude. A tag (the sample's
// range/Doppler index) travels alongside. The block and its 64-bit in / 32-bit
// out widths follow the specification; computing the exact magnitude with a
// square root is this design's choice.
//
// Timing: registered output, one clock latency.
module cplx_abs
  import radar_pkg::*;
#(
  parameter int TAG_W = 17
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  cplx_t            in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp32_t            out_mag,
  output logic [TAG_W-1:0] out_tag
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_mag   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_mag <= fp_sqrt(fp_add(fp_mul(in_data.re, in_data.re), fp_mul(in_data.im, in_data.im)));
        out_tag <= in_tag;
      end
    end
  end
endmodule
