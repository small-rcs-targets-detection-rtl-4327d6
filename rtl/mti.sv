// mti: moving target indicator, a two-pulse canceller H(z) = 1 - z^-1.
//
// Works on the slow-time stream: for each range cell, its NSLOW samples from
// successive pulses (in_first marks the first pulse of a cell). A delay register
// holds the previous complex sample and two single-precision subtractors (real
// and imaginary) form y[n] = x[n] - x[n-1], so echoes that do not change from
// pulse to pulse (zero Doppler) cancel.
// The delay register and the FP subtractors follow the specification. How a
// cell's first pulse is handled is this design's choice: the canceller is made
// circular, y[0] = x[0] - x[NSLOW-1], so the Doppler FFT sees
// (1 - exp(-j w)) X(w) exactly, with no leakage of the cell's first sample into
// all Doppler bins. To do that a second register keeps x[0], and each cell's
// output frame is y[1] ... y[NSLOW-1], y[0]: y[0] leaves when the next cell's
// first sample arrives. The rotation by one sample changes only the phase of
// the Doppler bins, not their magnitude.
//
// Interface: the first valid after reset must have in_first set. Output frames
// are NSLOW consecutive valid samples, one output per input after the first.
// Timing: registered output, one clock latency.
module mti
  import radar_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  logic  in_first,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);
  cplx_t prev;
  cplx_t first;
  logic  started;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev      <= '0;
      first     <= '0;
      started   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        prev <= in_data;
        if (in_first) begin
          out_data  <= c_sub(first, prev);  // y[0] of the cell just finished
          out_valid <= started;
          first     <= in_data;
          started   <= 1'b1;
        end else begin
          out_data  <= c_sub(in_data, prev);
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
