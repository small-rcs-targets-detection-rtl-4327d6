// target_fifo: first-in first-out store of detection records between the CFAR
// and the data processing.
//
// A DEPTH-word circular buffer with read and write pointers one bit wider than
// the address. Detections are pushed as they come from the CFAR and read out one
// at a time with a valid/ready handshake. The FIFO between CFAR and data
// processing follows the specification; its depth, the handshake and the
// overflow policy (a push into a full FIFO is dropped and sets the sticky
// overflow flag until reset) are this design's choices.
//
// Timing: a pushed word is visible at the output on the next clock; the output
// word is removed on a clock with out_valid and out_ready both high.
module target_fifo #(
  parameter int DEPTH = 64,
  parameter int W     = 49
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         overflow,
  output logic [$clog2(DEPTH):0] level
);
  localparam int AB = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AB:0]  wp, rp;
  logic         pop, wr;

  assign level     = wp - rp;
  assign full      = (level == (AB+1)'(DEPTH));
  assign out_valid = (wp != rp);
  assign dout      = mem[rp[AB-1:0]];
  assign pop       = out_valid && out_ready;
  assign wr        = push && !full;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp       <= '0;
      rp       <= '0;
      overflow <= 1'b0;
    end else begin
      if (wr) begin
        mem[wp[AB-1:0]] <= din;
        wp <= wp + 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
      if (push && full) overflow <= 1'b1;
    end
  end

  initial assert (DEPTH == (1 << AB)) else $error("DEPTH must be a power of two");

  assert property (@(posedge clk) disable iff (rst) level <= (AB+1)'(DEPTH));
endmodule
