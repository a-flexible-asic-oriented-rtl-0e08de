// validator: checks a polynomial of R_q, streamed one coefficient per cycle,
// for the decapsulation's implicit-rejection test. Four checks run in
// parallel while the coefficients pass:
//   alpha  every coefficient is in {-1, 0, 1}, i.e. 0, 1 or q-1
//   beta   number of coefficients equal to 1
//   gamma  number of coefficients equal to -1
//   delta  sum of the first n-1 coefficients mod q
// At the end (`done`, the cycle after the coefficient flagged in_last):
//   ternary_ok  = alpha
//   weight_ok   = alpha and beta == D and gamma == D  (fixed weight 2D)
//   sum_zero_ok = delta + a_{n-1} == 0 mod q, i.e. a = 0 mod (q, Phi_1)
// The four checks follow the document; the sign convention of the sum-zero
// comparison, the flags and the single-coefficient rate are this design's.
module validator #(
  parameter int unsigned N    = 677,
  parameter int unsigned LOGQ = 11,
  parameter int unsigned D    = 127,
  localparam int unsigned CW  = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            in_valid,
  input  logic            in_last,
  input  logic [LOGQ-1:0] in_data,
  output logic            done,
  output logic            ternary_ok,
  output logic            weight_ok,
  output logic            sum_zero_ok,
  output logic [CW-1:0]   ones,
  output logic [CW-1:0]   minus_ones
);

  logic            alpha_q;
  logic [CW-1:0]   beta_q, gamma_q;
  logic [LOGQ-1:0] delta_q;

  logic is_one, is_mone, is_zero;
  assign is_one  = (in_data == LOGQ'(1));
  assign is_mone = (in_data == '1);
  assign is_zero = (in_data == '0);

  // next values of the three counters for the coefficient on in_data
  logic          a_n;
  logic [CW-1:0] b_n, g_n;
  assign a_n = alpha_q && (is_one || is_mone || is_zero);
  assign b_n = beta_q  + CW'(is_one);
  assign g_n = gamma_q + CW'(is_mone);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha_q     <= 1'b1;
      beta_q      <= '0;
      gamma_q     <= '0;
      delta_q     <= '0;
      done        <= 1'b0;
      ternary_ok  <= 1'b0;
      weight_ok   <= 1'b0;
      sum_zero_ok <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        alpha_q <= 1'b1;
        beta_q  <= '0;
        gamma_q <= '0;
        delta_q <= '0;
      end else if (in_valid) begin
        alpha_q <= a_n;
        beta_q  <= b_n;
        gamma_q <= g_n;
        if (!in_last) delta_q <= delta_q + in_data;
        if (in_last) begin
          done        <= 1'b1;
          ternary_ok  <= a_n;
          weight_ok   <= a_n && (b_n == CW'(D)) && (g_n == CW'(D));
          sum_zero_ok <= (LOGQ'(delta_q + in_data) == '0);
        end
      end
    end
  end

  assign ones       = beta_q;
  assign minus_ones = gamma_q;

endmodule
