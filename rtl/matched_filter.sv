// matched_filter: frequency-domain pulse compression with range-sidelobe
// cancellation.
//
// The received complex stream (one PRT = N samples per frame) goes through an
// N-point FFT. Each bin is multiplied (complex, single precision) by the
// coefficient ROM word for that bin, the product of the replica's conjugate
// spectrum and the sidelobe-cancellation filter, and the products go through an
// N-point inverse FFT, giving the compressed range profile of the frame.
// Structure (FFT, 9-bit counter + ROM, multiplier, IFFT) follows the
// specification; the inverse FFT's 1/N scaling comes from the fft module.
// With the default ROM (1/S, see mf_coef_rom) an echo a * code delayed by d
// samples becomes a spike of height a at range cell d (circular in the frame).
//
// Interface: continuous frames of N valid samples; the first valid after reset
// starts frame 0. out_idx is the range cell of out_data.
// Timing: range cell r of frame f appears about 4N valid samples after input
// sample r of frame f (two FFTs of 2N each, plus a few clocks).
module matched_filter
  import radar_pkg::*;
#(
  parameter int    N         = 512,
  parameter string COEF_FILE = "rtl/mf_coef.hex"
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                out_data,
  output logic [$clog2(N)-1:0] out_idx
);
  logic                 spec_valid;
  cplx_t                spec_data;
  logic [$clog2(N)-1:0] spec_idx;
  cplx_t                coef;
  logic [$clog2(N)-1:0] coef_addr;
  logic                 prod_valid;
  cplx_t                prod_data;

  fft #(.N(N), .INVERSE(1'b0)) u_fft (
    .clk, .rst, .in_valid, .in_data,
    .out_valid(spec_valid), .out_data(spec_data), .out_idx(spec_idx)
  );

  mf_coef_rom #(.N(N), .INIT_FILE(COEF_FILE)) u_rom (
    .clk, .rst, .en(spec_valid), .coef, .addr(coef_addr)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      prod_valid <= 1'b0;
      prod_data  <= '0;
    end else begin
      prod_valid <= spec_valid;
      if (spec_valid) prod_data <= c_mul(spec_data, coef);
    end
  end

  fft #(.N(N), .INVERSE(1'b1)) u_ifft (
    .clk, .rst, .in_valid(prod_valid), .in_data(prod_data),
    .out_valid, .out_data, .out_idx
  );

  // The ROM counter runs in step with the FFT bin index.
  assert property (@(posedge clk) disable iff (rst) spec_valid |-> spec_idx == coef_addr);
endmodule
