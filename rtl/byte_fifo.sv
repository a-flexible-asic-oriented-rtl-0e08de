// byte_fifo: small synchronous FIFO of bytes with a "last" flag, used to
// decouple the packers from the SHA3-256 core while the core is permuting.
// Push and pop may happen in the same cycle; `count` tells the producer how
// much room is left. Pushing when full or popping when empty is a protocol
// error and is caught by assertions. Depth is a power of two.
module byte_fifo #(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        push,
  input  logic [7:0]  push_byte,
  input  logic        push_last,
  input  logic        pop,
  output logic        empty,
  output logic [7:0]  head_byte,
  output logic        head_last,
  output logic [AW:0] count
);

  logic [8:0]    mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      count <= '0;
    end else if (clear) begin
      rd_q  <= '0;
      wr_q  <= '0;
      count <= '0;
    end else begin
      a_no_overflow:  assert (!push || pop || count < (AW+1)'(DEPTH));
      a_no_underflow: assert (!pop || !empty);
      if (push) wr_q <= wr_q + 1'b1;
      if (pop)  rd_q <= rd_q + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk)
    if (push && !clear) mem[wr_q] <= {push_last, push_byte};

  assign empty     = (count == '0);
  assign head_byte = mem[rd_q][7:0];
  assign head_last = mem[rd_q][8];

endmodule
