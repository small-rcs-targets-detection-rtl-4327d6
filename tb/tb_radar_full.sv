// tb_radar_full: end-to-end test of the radar processor at its full size (512 range cells, 256-pulse CPI, all parameters at their defaults) over four CPIs.
//
// Wires radar_top to radar_env, which generates clocks, reset and the radar
// scene (three moving targets and one stationary clutter echo) and checks the
// matched filter, Doppler, CFAR and FIFO outputs against values computed from
// the scene; see radar_env for the checks.
//
// All sizes are the specification's (radar_top defaults); the scene is this
// testbench's own.
module tb_radar_full;
  import radar_pkg::*;

  localparam int NFAST = 512;
  localparam int NSLOW = 256;

  logic                     clk_sys, clk_adc, rst;
  logic signed [15:0]       dac_code, adc_i, adc_q;
  logic                     tx_gate, prt_start, cpi_start;
  logic                     mf_valid, dop_valid, cfar_valid, cfar_detect;
  cplx_t                    mf_data, dop_data;
  logic [$clog2(NFAST)-1:0] mf_range;
  logic [$clog2(NSLOW)-1:0] dop_bin;
  fp32_t                    cfar_cut, cfar_threshold;
  logic                     det_valid, det_ready, det_overflow;
  detection_t               det;

  radar_top u_dut (
    .clk_sys, .clk_adc, .rst, .dac_code, .tx_gate, .prt_start, .cpi_start,
    .adc_i, .adc_q, .mf_valid, .mf_data, .mf_range, .dop_valid, .dop_data, .dop_bin,
    .cfar_valid, .cfar_detect, .cfar_cut, .cfar_threshold,
    .det_valid, .det_ready, .det, .det_overflow
  );

  radar_env #(.NFAST(NFAST), .NSLOW(NSLOW), .CPIS(4), .HOLD_FIFO(1'b0), .FIFO_DEPTH(64)) u_env (
    .clk_sys, .clk_adc, .rst, .dac_code, .prt_start, .adc_i, .adc_q,
    .mf_valid, .mf_data, .mf_range, .dop_valid, .dop_data, .dop_bin,
    .cfar_valid, .cfar_detect, .cfar_cut, .det_valid, .det_ready, .det, .det_overflow
  );
endmodule
