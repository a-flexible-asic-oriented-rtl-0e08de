// poly_ram: simple dual-port memory holding one polynomial, one coefficient
// per word.
//
// The accelerator keeps every operand and result in memories of this kind
// (the small-polynomial banks S1, S2 and the large-polynomial banks L1, L2).
// One write port and one read port, both synchronous to clk; a read returns
// the word one cycle after rd_en. A read and a write to the same address in the
// same cycle return the old word. Contents are not reset.
module poly_ram #(
  parameter int unsigned DEPTH = 677,
  parameter int unsigned WIDTH = 11,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
