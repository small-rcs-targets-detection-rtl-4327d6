// fft_stage: one radix-2 single-path delay-feedback (SDF) stage of the
// streaming decimation-in-frequency FFT.
//
// The stage splits each block of 2L input samples into halves. During the first
// half the samples are parked in an L-word delay line and the delay line's
// previous contents (twiddled differences of the last block) are sent on.
// During the second half each input b meets its partner a = x[n] from the delay
// line: a + b is sent on at once and (a - b) * W(n) is written back into the
// delay line, W(n) = exp(-/+ j*2*pi*n/(2L)). All arithmetic is single-precision
// floating point (radar_pkg). The delay line is a circular buffer.
//
// Interface: one complex sample per in_valid; the stage only advances on
// in_valid, so gaps in the stream are allowed. The first valid after reset is
// the first sample of a block. Timing: registered output, latency L valid
// samples plus one clock; out_valid is suppressed until the delay line holds
// real data. The delay line is not reset: its contents only reach the output
// after they have been written.
//
// The SDF stage structure is this design's choice; the specification only
// calls for single-precision FFT modules of the given sizes.
module fft_stage
  import radar_pkg::*;
#(
  parameter int L       = 256,
  parameter bit INVERSE = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);
  localparam int LW = (L > 1) ? $clog2(L) : 1;

  typedef cplx_t [L-1:0] tw_table_t;

  // Twiddle table W(n) = cos(2*pi*n/(2L)) -/+ j*sin(2*pi*n/(2L)), elaboration time.
  function automatic tw_table_t build_tw();
    tw_table_t t;
    for (int n = 0; n < L; n++) begin
      real ang;
      ang = 3.14159265358979323846 * real'(n) / real'(L);
      t[n].re = fp_from_real($cos(ang));
      t[n].im = fp_from_real(INVERSE ? $sin(ang) : -$sin(ang));
    end
    return t;
  endfunction

  localparam tw_table_t TW = build_tw();

  cplx_t          dline [L];
  logic [LW-1:0]  ptr;
  logic           second_half;
  logic           primed;
  cplx_t          head;

  assign head = dline[ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr         <= '0;
      second_half <= 1'b0;
      primed      <= 1'b0;
      out_valid   <= 1'b0;
      out_data    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!second_half) begin
          dline[ptr] <= in_data;
          out_data   <= head;
          out_valid  <= primed;
        end else begin
          dline[ptr] <= c_mul(c_sub(head, in_data), TW[ptr]);
          out_data   <= c_add(head, in_data);
          out_valid  <= 1'b1;
          primed     <= 1'b1;
        end
        if (int'(ptr) == L - 1) begin
          ptr         <= '0;
          second_half <= ~second_half;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end
endmodule
