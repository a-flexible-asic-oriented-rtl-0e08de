// pack_p: packs ternary coefficients five to a byte,
//     byte = t_0 + 3 t_1 + 9 t_2 + 27 t_3 + 81 t_4,
// with t the trit codes 0, 1, 2 (= -1) of five consecutive coefficients. The
// first n-1 coefficients of a polynomial are packed (its coefficient n-1 is 0);
// the last group may be shorter. Coefficients enter with in_valid, in_last with
// coefficient n-2; a byte leaves with out_valid after every fifth coefficient
// and after the last one, `done` with the last byte. The base-3 format is this
// design's (the usual NTRU one); the document only names the operation.
module pack_p
  import ntru_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_last,
  input  trit_t      in_trit,
  output logic       out_valid,
  output logic [7:0] out_byte,
  output logic       done
);

  logic [7:0] acc_q;
  logic [6:0] weight_q;   // 1, 3, 9, 27, 81
  logic [2:0] k_q;

  logic [7:0] a;           // byte value including the current trit
  assign a = acc_q + 8'(in_trit * weight_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      weight_q  <= 7'd1;
      k_q       <= '0;
      out_valid <= 1'b0;
      out_byte  <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (in_valid) begin
        if (k_q == 3'd4 || in_last) begin
          out_valid <= 1'b1;
          out_byte  <= a;
          done      <= in_last;
          acc_q     <= '0;
          weight_q  <= 7'd1;
          k_q       <= '0;
        end else begin
          acc_q    <= a;
          weight_q <= 7'(weight_q * 3);
          k_q      <= k_q + 1'b1;
        end
      end
    end
  end

endmodule
