// embed: maps a polynomial of R_q = Z_q[x]/(x^n - 1) into S_q = Z_q[x]/(Phi_n)
// or S_3 = Z_3[x]/(Phi_n), and optionally only reduces coefficients mod 3.
//
// Reduction mod Phi_n = 1 + x + ... + x^(n-1) subtracts the top coefficient
// a_{n-1} from every coefficient. The unit therefore expects the polynomial in
// descending order, a_{n-1} first (the order in which the x-net multiplier
// delivers its result): the first coefficient after `start` is captured in the
// a_{n-1} register and then subtracted from every coefficient, itself
// included. ring_sel chooses the target:
//   RING_SQ  out = (a_i - a_{n-1}) mod q
//   RING_SP  out = (a~_i - a~_{n-1}) mod 3, where a~ is the centred
//            representative of a in [-q/2, q/2); the pipelined Mersenne
//            reducer does the mod 3. The result is a trit code 0, 1, 2 (= -1).
// With phi = 0 nothing is subtracted, which gives the coefficient-wise reduction
// mod (3, x^n - 1) or mod (q, x^n - 1).
// Latency is 3 cycles for both targets, one coefficient per cycle. The
// subtract-the-top-coefficient structure, the a_{n-1} register and the
// Mersenne reducer follow the document; the centring of Z_q values before the
// mod 3, the phi control and the equal latencies are this design's choices.
module embed
  import ntru_pkg::*;
#(
  parameter int unsigned LOGQ = 11
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  ring_sel_e       ring_sel,
  input  logic            phi,
  input  logic            in_valid,
  input  logic [LOGQ-1:0] in_data,
  output logic            out_valid,
  output logic [LOGQ-1:0] out_data
);

  localparam int unsigned DW = LOGQ + 3;   // width of the offset difference

  logic [LOGQ-1:0] top_q;
  logic            have_top_q;
  logic [LOGQ-1:0] top_d;

  // The first coefficient of a polynomial is a_{n-1}.
  assign top_d = (!phi)       ? '0 :
                 (have_top_q) ? top_q : in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_q      <= '0;
      have_top_q <= 1'b0;
    end else if (start) begin
      have_top_q <= 1'b0;
    end else if (in_valid && !have_top_q) begin
      top_q      <= in_data;
      have_top_q <= 1'b1;
    end
  end

  // Centred representatives as signed values, difference plus 3 * 2^LOGQ so
  // that the operand of the mod 3 reducer is non-negative.
  function automatic logic signed [DW-1:0] centred(input logic [LOGQ-1:0] v);
    return v[LOGQ-1] ? DW'($signed({1'b1, v})) : DW'({1'b0, v});
  endfunction

  logic [DW-1:0]   sp_operand;
  logic [LOGQ-1:0] sq_diff;
  assign sp_operand = DW'(centred(in_data) - centred(top_d) + DW'(3 << LOGQ));
  assign sq_diff    = in_data - top_d;

  // S_q path: the subtraction, registered and delayed to match the S_p path.
  logic [LOGQ-1:0] sq_pipe [3];
  logic            sel_pipe [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        sq_pipe[i]  <= '0;
        sel_pipe[i] <= 1'b0;
      end
    end else begin
      sq_pipe[0]  <= sq_diff;
      sel_pipe[0] <= (ring_sel == RING_SP);
      for (int i = 1; i < 3; i++) begin
        sq_pipe[i]  <= sq_pipe[i-1];
        sel_pipe[i] <= sel_pipe[i-1];
      end
    end
  end

  // S_p path: subtraction register, then the two-stage Mersenne reducer.
  logic [DW-1:0] sp_q;
  logic          v0_q;
  logic          sp_valid;
  logic [1:0]    sp_trit;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q <= '0;
      v0_q <= 1'b0;
    end else begin
      sp_q <= sp_operand;
      v0_q <= in_valid;
    end
  end

  mod3_reduce #(.W(DW)) u_mod3 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v0_q),
    .in_data  (sp_q),
    .out_valid(sp_valid),
    .out_data (sp_trit)
  );

  assign out_valid = sp_valid;
  assign out_data  = sel_pipe[2] ? LOGQ'(sp_trit) : sq_pipe[2];

endmodule
