// tb_target_fifo: random pushes and pops against a reference queue in an
// 8-deep FIFO: output order and data, out_valid, full and level every clock,
// and the overflow flag, which must rise on the first push into a full FIFO
// (that word is dropped, even if a word leaves in the same clock) and stay set.
//
// The FIFO follows the specification's detection FIFO; depth, handshake and
// overflow policy are this design's choices.
module tb_target_fifo;
  localparam int DEPTH = 8, W = 49;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic push, out_valid, out_ready, full, overflow;
  logic [W-1:0] din, dout;
  logic [3:0] level;

  target_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  bit ovf_exp = 1'b0;
  int n_ovf_events = 0, n_full = 0;

  initial begin
    push = 1'b0; din = '0; out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      // phases: fill hard, drain hard, mixed
      int mode;
      mode = (n / 200) % 3;
      @(negedge clk);
      push      = (mode == 0) ? ($urandom % 4 != 0) : (mode == 1) ? ($urandom % 4 == 0) : $urandom % 2;
      out_ready = (mode == 0) ? ($urandom % 4 == 0) : (mode == 1) ? ($urandom % 4 != 0) : $urandom % 2;
      din       = {$urandom, $urandom};
      checks++;
      if (out_valid != (q.size() != 0) || full != (q.size() == DEPTH) || int'(level) != q.size() ||
          overflow != ovf_exp || (q.size() != 0 && dout != q[0])) begin
        failures++;
        $display("FAIL n=%0d valid %b full %b level %0d ovf %b (model size %0d)", n, out_valid, full, level, overflow, q.size());
      end
      if (full) n_full++;
      @(posedge clk);
      // a push is dropped when the FIFO is full at that clock, even if a word
      // leaves in the same clock
      if (push && q.size() == DEPTH) begin ovf_exp = 1'b1; n_ovf_events++; end
      if (out_valid && out_ready) void'(q.pop_front());
      if (push && !full) q.push_back(din);
    end
    checks++;
    if (n_ovf_events == 0 || n_full == 0) begin failures++; $display("FAIL overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
