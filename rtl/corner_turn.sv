// corner_turn: dual-port RAM with its buffer addressing circuit; reorders one
// coherent pulse interval (CPI) of data from row order to column order.
//
// The input is a stream of ROWS frames of COLS samples each (row-major). The
// write port stores it in natural order; the read port walks the previous CPI
// column by column, the read address hopping by COLS words per sample, so the
// output is COLS frames of ROWS samples (column-major). In the Doppler processor
// this turns fast-time range profiles into slow-time pulse trains (ROWS = 256
// pulses, COLS = 512 range cells, hop 512) and, after the Doppler FFT, back to
// fast time (ROWS = 512, COLS = 256, hop 256).
// Addressing: an (1 + log2(ROWS*COLS))-bit counter, 18 bits at the default size
// (512 x 256 x 2), counts valid input samples. Its top bit selects which half of
// the RAM is written; the other half, holding the previous CPI, is read with the
// transposed address, and the roles swap at the end of every CPI. The counter
// width, natural-order writes and hopping reads follow the specification; using
// two CPI-sized halves selected by the counter's top bit (so writing a new CPI
// never overwrites data still to be read) is this design's choice.
//
// Interface: one read per valid input (the read side is paced by the writes);
// the first valid after reset is the first sample of a CPI. out_valid starts once
// one whole CPI has been written. out_idx = column * ROWS + row of out_data.
// Timing: output sample j of CPI c appears one clock after input sample j of CPI
// c + 1 is written.
module corner_turn
  import radar_pkg::*;
#(
  parameter int ROWS = 256,
  parameter int COLS = 512
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          in_valid,
  input  cplx_t                         in_data,
  output logic                          out_valid,
  output cplx_t                         out_data,
  output logic [$clog2(ROWS*COLS)-1:0]  out_idx
);
  localparam int RB = $clog2(ROWS);
  localparam int CB = $clog2(COLS);
  localparam int AW = RB + CB + 1;

  logic [AW-1:0]    cnt;      // {bank, row, col} of the sample being written
  logic [AW-2:0]    j;        // position in the CPI
  logic [AW-1:0]    raddr;
  logic             primed;
  logic             rd;

  assign j     = cnt[AW-2:0];
  assign raddr = {~cnt[AW-1], j[RB-1:0], j[RB+CB-1:RB]};
  assign rd    = in_valid && primed;

  dp_ram #(.AW(AW), .DW(64)) u_ram (
    .clk,
    .we(in_valid), .waddr(cnt), .wdata(in_data),
    .re(rd), .raddr, .rdata(out_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= rd;
      if (in_valid) begin
        cnt     <= cnt + 1'b1;
        out_idx <= j;
        if (j == '1) primed <= 1'b1;
      end
    end
  end

  initial assert (ROWS == (1 << RB) && COLS == (1 << CB)) else $error("ROWS and COLS must be powers of two");
endmodule
