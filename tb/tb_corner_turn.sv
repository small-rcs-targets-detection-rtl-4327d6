// tb_corner_turn: streams four CPIs of random words through a reduced corner
// turn (ROWS = 4 frames of COLS = 8 samples) with random gaps in the input and
// checks that each CPI comes out column by column during the next CPI
// (output j = column * ROWS + row, word = input[row][column]) with the right
// out_idx, that nothing comes out during the first CPI, and that every
// output arrives one clock after the write that paces it.
//
// The transposed read order follows the specification's address hopping; the
// reduced size and the one-CPI delay are this design's choices.
module tb_corner_turn;
  import radar_pkg::*;

  localparam int ROWS = 4, COLS = 8, CPIS = 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  cplx_t in_data, out_data;
  logic [$clog2(ROWS*COLS)-1:0] out_idx;

  corner_turn #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  cplx_t data [CPIS][ROWS][COLS];
  int ocnt = 0, icnt = 0;
  logic in_valid_q = 1'b0;

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (out_valid != (in_valid_q && icnt > ROWS * COLS)) begin
        failures++;
        $display("FAIL out_valid %b at input count %0d", out_valid, icnt);
      end
      if (out_valid) begin
        int c, j, row, col;
        c = ocnt / (ROWS * COLS); j = ocnt % (ROWS * COLS);
        col = j / ROWS; row = j % ROWS;
        checks++;
        if (int'(out_idx) != j || out_data != data[c][row][col]) begin
          failures++;
          $display("FAIL CPI %0d j %0d: idx %0d data %h expected %h", c, j, out_idx, out_data, data[c][row][col]);
        end
        ocnt++;
      end
      in_valid_q <= in_valid;
      if (in_valid) icnt <= icnt + 1;
    end
  end

  initial begin
    in_valid = 1'b0; in_data = '0;
    for (int c = 0; c < CPIS; c++)
      for (int r = 0; r < ROWS; r++)
        for (int k = 0; k < COLS; k++) data[c][r][k] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < CPIS; c++)
      for (int r = 0; r < ROWS; r++)
        for (int k = 0; k < COLS; k++) begin
          in_valid <= 1'b1;
          in_data  <= data[c][r][k];
          @(posedge clk);
          if ($urandom % 3 == 0) begin in_valid <= 1'b0; @(posedge clk); end
        end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (ocnt != (CPIS - 1) * ROWS * COLS) begin failures++; $display("FAIL %0d outputs", ocnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
