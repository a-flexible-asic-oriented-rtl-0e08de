// mod3_reduce: pipelined reduction of an unsigned integer modulo the Mersenne
// prime 3 = 2^2 - 1.
//
// Since 4 = 1 (mod 3), x mod 3 equals the sum of the 2-bit digits of x mod 3.
// The unit sums the digits in one cycle (first register stage), then folds that
// sum again down to two bits and maps the single leftover code 3 to 0 (second
// register stage). Latency is 2 cycles; one operand is accepted per cycle.
// The output is 0, 1 or 2. Reduction mod 3 by digit folding follows the
// document; the two-stage split is this design's choice.
module mod3_reduce #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [1:0]   out_data
);

  localparam int unsigned ND = (W + 1) / 2;      // number of 2-bit digits
  localparam int unsigned SW = $clog2(3 * ND + 1); // width of the digit sum

  logic [SW-1:0] dsum_q;
  logic          v1_q;

  logic [SW-1:0] dsum_q_d;

  // First fold: sum of 2-bit digits.
  always_comb begin : fold1
    logic [SW-1:0] s;
    s = '0;
    for (int unsigned i = 0; i < ND; i++) begin
      logic [1:0] dig;
      dig = '0;
      for (int unsigned b = 0; b < 2; b++)
        if (2 * i + b < W) dig[b] = in_data[2 * i + b];
      s = s + SW'(dig);
    end
    dsum_q_d = s;
  end

  // Second fold: the digit sum is small, fold until two bits remain.
  function automatic logic [1:0] fold_small(input logic [SW-1:0] v);
    logic [SW+1:0] t;
    t = {2'b00, v};
    for (int k = 0; k < 4; k++) begin
      logic [SW+1:0] acc;
      acc = '0;
      for (int unsigned i = 0; i < (SW + 1) / 2; i++)
        acc = acc + ((t >> (2 * i)) & 'd3);
      t = acc;
    end
    return (t[1:0] == 2'd3) ? 2'd0 : t[1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
      dsum_q    <= '0;
      out_data  <= '0;
    end else begin
      v1_q      <= in_valid;
      dsum_q    <= dsum_q_d;
      out_valid <= v1_q;
      out_data  <= fold_small(dsum_q);
    end
  end

endmodule
