// doppler_processor: slow-time reordering, MTI, Doppler FFT and return to
// fast time.
//
// Chain: corner_turn RAM 1 (NSLOW pulses x NFAST range cells -> for each range
// cell its NSLOW pulses), mti (circular 1 - z^-1 per range cell), an NSLOW-point FFT per range cell,
// corner_turn RAM 2 (NFAST range cells x NSLOW Doppler bins -> for each Doppler
// bin its NFAST range cells), and cplx_abs. The range and Doppler index of each
// output come from the buffer addressing counters.
// The chain, RAM sizes and hop distances follow the specification.
//
// Interface: input = matched-filter output, NSLOW frames of NFAST range cells per
// CPI, continuous; the first valid after reset starts a CPI. dop_* is the
// complex Doppler FFT output (range-cell order, bins in natural order); mag_*
// is the magnitude stream for the CFAR, Doppler bin by Doppler bin, each bin
// carrying NFAST range cells. Doppler bin k is k * PRF / NSLOW (bins at and
// above NSLOW/2 are negative frequencies).
// Timing: a CPI's Doppler spectra appear during the next CPI and its magnitude
// map during the one after that.
module doppler_processor
  import radar_pkg::*;
#(
  parameter int NFAST = 512,
  parameter int NSLOW = 256
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  cplx_t                    in_data,
  // Doppler FFT output (slow time)
  output logic                     dop_valid,
  output cplx_t                    dop_data,
  output logic [$clog2(NSLOW)-1:0] dop_bin,
  // fast-time magnitude map
  output logic                     mag_valid,
  output fp32_t                    mag_data,
  output logic [$clog2(NFAST)-1:0] mag_range,
  output logic [$clog2(NSLOW)-1:0] mag_doppler
);
  localparam int FB = $clog2(NFAST);
  localparam int SB = $clog2(NSLOW);

  logic               st_valid;
  cplx_t              st_data;
  logic [FB+SB-1:0]   st_idx;
  logic               mti_valid;
  cplx_t              mti_data;
  logic               ft_valid;
  cplx_t              ft_data;
  logic [FB+SB-1:0]   ft_idx;
  logic [FB+SB-1:0]   mag_tag;

  corner_turn #(.ROWS(NSLOW), .COLS(NFAST)) u_ram1 (
    .clk, .rst, .in_valid, .in_data,
    .out_valid(st_valid), .out_data(st_data), .out_idx(st_idx)
  );

  mti u_mti (
    .clk, .rst, .in_valid(st_valid), .in_first(st_idx[SB-1:0] == '0), .in_data(st_data),
    .out_valid(mti_valid), .out_data(mti_data)
  );

  fft #(.N(NSLOW), .INVERSE(1'b0)) u_fft (
    .clk, .rst, .in_valid(mti_valid), .in_data(mti_data),
    .out_valid(dop_valid), .out_data(dop_data), .out_idx(dop_bin)
  );

  corner_turn #(.ROWS(NFAST), .COLS(NSLOW)) u_ram2 (
    .clk, .rst, .in_valid(dop_valid), .in_data(dop_data),
    .out_valid(ft_valid), .out_data(ft_data), .out_idx(ft_idx)
  );

  cplx_abs #(.TAG_W(FB + SB)) u_abs (
    .clk, .rst, .in_valid(ft_valid), .in_data(ft_data), .in_tag(ft_idx),
    .out_valid(mag_valid), .out_mag(mag_data), .out_tag(mag_tag)
  );

  // out_idx of RAM 2 = doppler_bin * NFAST + range_cell
  assign mag_range   = mag_tag[FB-1:0];
  assign mag_doppler = mag_tag[FB+SB-1:FB];
endmodule
