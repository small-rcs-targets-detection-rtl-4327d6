// fixed_to_fp: pre-processing stage that turns the smoothed fixed-point I/Q
// samples into single-precision floating point for the rest of the processor.
//
// Each system clock the two W-bit signed samples are converted exactly (W <= 24)
// and registered as one 64-bit complex word (real = I in the upper half).
// Conversion to the 32-bit floating-point format follows the specification; the
// I/Q pairing and input width are this design's choices.
//
// Timing: one clock latency; out_valid follows in_valid.
module fixed_to_fp
  import radar_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output logic                out_valid,
  output cplx_t               out_data
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data.re <= fp_from_int24(24'(in_i));
        out_data.im <= fp_from_int24(24'(in_q));
      end
    end
  end

  initial assert (W <= 24) else $error("W must be at most 24 for exact conversion");
endmodule
