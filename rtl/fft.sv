// fft: streaming N-point complex FFT / inverse FFT in single-precision floating
// point, one sample per clock, natural order in and out.
//
// log2(N) radix-2 SDF stages (fft_stage, delay lines N/2 ... 1) compute the
// transform and leave the bins in bit-reversed order. A ping-pong reorder buffer
// of 2N words then writes each frame at bit-reversed addresses and reads the
// previous frame out in natural order, like a vendor FFT core set to natural
// output order. With INVERSE = 1 the twiddles are conjugated and the outputs
// are scaled by 1/N (an exponent shift), so fft followed by an inverse fft
// returns the input.
// The transform sizes (512-point forward and inverse in the matched filter,
// 256-point in the Doppler processor) and the floating-point format follow the
// specification; the SDF architecture, the reorder buffer and the 1/N scaling
// are this design's choices.
//
// Interface: frames of N consecutive valid samples; the first valid after reset
// starts a frame. The pipeline advances only on in_valid, so the last frame is
// only flushed out by the samples of the frames after it (a radar stream is
// continuous). out_idx is the frequency bin of out_data.
// Timing: a frame's bin k appears N + (N - 1) valid samples plus a few clocks
// after its input sample k.
module fft
  import radar_pkg::*;
#(
  parameter int N       = 512,
  parameter bit INVERSE = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                out_data,
  output logic [$clog2(N)-1:0] out_idx
);
  localparam int S  = $clog2(N);

  logic  sv [S+1];
  cplx_t sd [S+1];

  assign sv[0] = in_valid;
  assign sd[0] = in_data;

  for (genvar s = 0; s < S; s++) begin : g_stage
    fft_stage #(.L(N >> (s + 1)), .INVERSE(INVERSE)) u_stage (
      .clk, .rst,
      .in_valid (sv[s]),   .in_data (sd[s]),
      .out_valid(sv[s+1]), .out_data(sd[s+1])
    );
  end

  // ---------------------------------------------------------- reorder buffer
  function automatic logic [S-1:0] bitrev(input logic [S-1:0] x);
    logic [S-1:0] r;
    for (int i = 0; i < S; i++) r[i] = x[S-1-i];
    return r;
  endfunction

  cplx_t          rbuf [2*N];
  logic [S:0]     wcnt;     // {bank, index in frame}
  logic           full;     // one whole frame is in the buffer

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt      <= '0;
      full      <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_idx   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (sv[S]) begin
        rbuf[{wcnt[S], bitrev(wcnt[S-1:0])}] <= sd[S];
        wcnt <= wcnt + 1'b1;
        if (wcnt[S-1:0] == '1) full <= 1'b1;
        if (full) begin
          out_valid <= 1'b1;
          out_idx   <= wcnt[S-1:0];
          out_data  <= INVERSE ? '{re: fp_scale2(rbuf[{~wcnt[S], wcnt[S-1:0]}].re, -S),
                                   im: fp_scale2(rbuf[{~wcnt[S], wcnt[S-1:0]}].im, -S)}
                               : rbuf[{~wcnt[S], wcnt[S-1:0]}];
        end
      end
    end
  end

  initial assert (N == (1 << S) && N >= 2) else $error("N must be a power of two");
endmodule
