// dp_ram: simple dual-port RAM, one write port and one read port, one clock.
//
// Used as the corner-turn memories of the Doppler processor. The read port is
// registered (one clock latency, like a block RAM); reading and writing the
// same address in one clock returns the old word. Contents are not reset.
// The dual-port RAMs follow the specification (RAM 1 and RAM 2 of the Doppler
// processing); the single clock and the registered read are this design's choice.
module dp_ram #(
  parameter int AW = 18,
  parameter int DW = 64
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
