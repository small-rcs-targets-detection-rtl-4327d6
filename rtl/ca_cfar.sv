// ca_cfar: cell-averaging constant false alarm rate detector.
//
// The magnitude stream shifts through a line of 2*NREF + 2*NGUARD + 1 cells of
// 32 bits: NREF leading reference cells, a guard cell, the cell under test
// (CUT), a guard cell and NREF lagging reference cells. An adder tree sums each
// reference window, the two sums are added and multiplied by KN = k/N, and the
// CUT is compared with that threshold: decision = CUT > threshold. All
// arithmetic is single precision.
// KN: k = N (Pfa^(-1/N) - 1) with Pfa = 1e-6 and N = 24 reference cells gives
// k = 18.6787 and k/N = 0.778279 (0x3F473D52); the product with the sum of all
// 24 cells is then k times their mean, the usual CA-CFAR threshold.
// Window sizes, guard cells, Pfa, the adder trees, multiplier and comparator
// follow the specification; taking N = 24 (both windows) in k, the cells'
// zero reset and the tag line carrying the CUT's index are this design's
// choices. At the start of the stream the empty cells count as zero.
//
// Interface: one cell per in_valid; in_tag (range/Doppler index) travels with
// its cell. Timing: the decision for input i is registered one clock after the
// shift that takes input i + NREF + NGUARD (which moves input i into the CUT),
// so it is visible two clocks after that input is taken; one decision per
// valid input once the CUT holds data.
module ca_cfar
  import radar_pkg::*;
#(
  parameter int    NREF   = 12,
  parameter int    NGUARD = 1,
  parameter fp32_t KN     = 32'h3F47_3D52,
  parameter int    TAG_W  = 17
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  fp32_t            in_mag,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic             detect,
  output fp32_t            out_cut,
  output fp32_t            out_threshold,
  output logic [TAG_W-1:0] out_tag
);
  localparam int NCELL = 2 * NREF + 2 * NGUARD + 1;
  localparam int CUT   = NREF + NGUARD;          // cells index of the CUT
  localparam int LAG0  = NREF + 2 * NGUARD + 1;  // first lagging reference cells

  fp32_t            cells [NCELL];
  logic [TAG_W-1:0] tag  [CUT+1];
  logic [$clog2(CUT+2)-1:0] fill;
  logic             upd;
  fp32_t            sum_lead, sum_lag, thr;

  // Pairwise adder tree over NREF cells starting at cells index base.
  function automatic fp32_t window_sum(input int base);
    localparam int P = 1 << $clog2(NREF);
    fp32_t v [P];
    for (int i = 0; i < P; i++) v[i] = (i < NREF) ? cells[base + i] : FP_ZERO;
    for (int w = P / 2; w >= 1; w = w / 2)
      for (int i = 0; i < w; i++) v[i] = fp_add(v[2*i], v[2*i+1]);
    return v[0];
  endfunction

  always_comb begin
    sum_lead = window_sum(0);
    sum_lag  = window_sum(LAG0);
    thr      = fp_mul(fp_add(sum_lead, sum_lag), KN);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NCELL; i++) cells[i] <= FP_ZERO;
      for (int i = 0; i <= CUT; i++)  tag[i]  <= '0;
      fill          <= '0;
      upd           <= 1'b0;
      out_valid     <= 1'b0;
      detect        <= 1'b0;
      out_cut       <= '0;
      out_threshold <= '0;
      out_tag       <= '0;
    end else begin
      upd       <= 1'b0;
      out_valid <= 1'b0;
      if (in_valid) begin
        cells[0] <= in_mag;
        for (int i = 1; i < NCELL; i++) cells[i] <= cells[i-1];
        tag[0] <= in_tag;
        for (int i = 1; i <= CUT; i++) tag[i] <= tag[i-1];
        if (int'(fill) <= CUT) fill <= fill + 1'b1;
        upd <= (int'(fill) >= CUT);
      end
      if (upd) begin
        out_valid     <= 1'b1;
        detect        <= fp_gt_pos(cells[CUT], thr);
        out_cut       <= cells[CUT];
        out_threshold <= thr;
        out_tag       <= tag[CUT];
      end
    end
  end
endmodule
