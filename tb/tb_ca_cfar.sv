// tb_ca_cfar: streams random cell magnitudes with occasional strong cells
// through the CA-CFAR (12 + 12 reference cells, one guard cell each side,
// k/N = 0.778279 from Pfa = 1e-6, N = 24) and checks every decision, threshold
// and tag against a reference computed here in double precision: threshold =
// k/N * (sum of the 12 cells after the CUT's guard cell + the 12 before the
// other guard), cells before the start of the stream counting as zero,
// decision = CUT > threshold. Also checks the timing: the decision for input i
// comes two clocks after the clock that takes input i + 13.
//
// Window geometry and Pfa follow the specification; the stimulus and the
// reading N = 24 in k/N are this design's choices.
module tb_ca_cfar;
  import radar_pkg::*;
  import tb_util_pkg::*;

  localparam int NREF = 12, NGUARD = 1, NIN = 3000;
  localparam real KN = 24.0 * ((10.0 ** (6.0 / 24.0)) - 1.0) / 24.0;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid, out_valid, detect;
  fp32_t in_mag, out_cut, out_threshold;
  logic [16:0] in_tag, out_tag;

  ca_cfar #(.NREF(NREF), .NGUARD(NGUARD), .TAG_W(17)) dut (.*);

  int checks = 0, failures = 0, ndet = 0;
  real x [NIN];
  int ocnt = 0, icnt = 0;
  logic v_q = 1'b0, v_q2 = 1'b0;

  function automatic real cell_val(input int i);
    return (i >= 0 && i < NIN) ? x[i] : 0.0;
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      v_q  <= in_valid;
      v_q2 <= v_q && icnt > NREF + NGUARD;
      checks++;
      if (out_valid != v_q2) begin
        failures++;
        $display("FAIL out_valid %b at input count %0d", out_valid, icnt);
      end
      if (in_valid) icnt <= icnt + 1;
      if (out_valid) begin
        real s, thr, cut;
        int k;
        k = ocnt;
        s = 0.0;
        for (int d = NGUARD + 1; d <= NGUARD + NREF; d++) s += cell_val(k + d) + cell_val(k - d);
        thr = KN * s;
        cut = x[k];
        checks++;
        if (int'(out_tag) != k || fp_to_real(out_cut) != cut || rabs(fp_to_real(out_threshold) - thr) > 1e-5 * thr + 1e-30) begin
          failures++;
          $display("FAIL cell %0d: tag %0d cut %f thr %f expected thr %f", k, out_tag, fp_to_real(out_cut),
                   fp_to_real(out_threshold), thr);
        end
        if (rabs(cut - thr) > 1e-4 * thr) begin
          checks++;
          if (detect != (cut > thr)) begin
            failures++;
            $display("FAIL cell %0d: decision %b cut %f thr %f", k, detect, cut, thr);
          end
        end
        if (detect) ndet++;
        ocnt++;
      end
    end
  end

  initial begin
    in_valid = 1'b0; in_mag = '0; in_tag = '0;
    for (int i = 0; i < NIN; i++) begin
      x[i] = fp_to_real(fp_from_real(-$ln((real'($urandom % 100000) + 1.0) / 100001.0) * 100.0));
      if ($urandom % 40 == 0) x[i] = fp_to_real(fp_from_real(x[i] * 30.0));   // strong cells
      if (i % 700 == 350) x[i] = 0.0;
    end
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < NIN; i++) begin
      in_valid <= 1'b1;
      in_mag   <= fp_from_real(x[i]);
      in_tag   <= 17'(i);
      @(posedge clk);
      if ($urandom % 5 == 0) begin in_valid <= 1'b0; @(posedge clk); end
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (ocnt != NIN - NREF - NGUARD || ndet == 0) begin
      failures++;
      $display("FAIL %0d decisions, %0d detections", ocnt, ndet);
    end
    $display("detections: %0d of %0d cells", ndet, ocnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
