// tb_xnet_mul: checks both x-net multipliers (ternary-by-large and
// large-by-large) against a schoolbook cyclic convolution mod (q, x^n - 1) for
// random operands, and checks that the product takes exactly n steps: the
// result is read out from the n-th cycle after the first b coefficient is
// registered, highest coefficient first.
module tb_xnet_mul;
  localparam int N = 37, LOGQ = 11;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a_load, acc_clear, b_valid, out_shift;
  logic [1:0]      a_t;
  logic [LOGQ-1:0] a_l, b_in, c_t, c_l;
  logic busy_t, busy_l;

  xnet_mul #(.N(N), .LOGQ(LOGQ), .TERNARY_A(1'b1)) dut_t (
    .clk, .rst_n, .a_load, .a_in(a_t), .acc_clear, .b_valid, .b_in, .out_shift,
    .c_out(c_t), .busy(busy_t));
  xnet_mul #(.N(N), .LOGQ(LOGQ), .TERNARY_A(1'b0)) dut_l (
    .clk, .rst_n, .a_load, .a_in(a_l), .acc_clear, .b_valid, .b_in, .out_shift,
    .c_out(c_l), .busy(busy_l));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int at[N], al[N], b[N], rt[N], rl[N];

  initial begin
    a_load = 0; acc_clear = 0; b_valid = 0; out_shift = 0; a_t = 0; a_l = 0; b_in = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      int cyc;
      for (int i = 0; i < N; i++) begin
        at[i] = $urandom_range(0, 2);
        al[i] = (trial == 0) ? 1 << (i % LOGQ) : $urandom_range(0, (1 << LOGQ) - 1);
        b[i]  = (trial == 1) ? (1 << LOGQ) - 1 : $urandom_range(0, (1 << LOGQ) - 1);
      end
      // reference: c_k = sum_{i+j = k mod n} a_i b_j mod q
      for (int k = 0; k < N; k++) begin rt[k] = 0; rl[k] = 0; end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          int s;
          s = (at[i] == 2) ? -b[j] : at[i] * b[j];
          rt[(i + j) % N] = (rt[(i + j) % N] + s) & ((1 << LOGQ) - 1);
          rl[(i + j) % N] = (rl[(i + j) % N] + al[i] * b[j]) & ((1 << LOGQ) - 1);
        end
      @(negedge clk);
      acc_clear = 1;
      for (int i = 0; i < N; i++) begin
        a_load = 1; a_t = 2'(at[i]); a_l = LOGQ'(al[i]);
        @(negedge clk); acc_clear = 0;
      end
      a_load = 0;
      cyc = 0;
      for (int j = N - 1; j >= 0; j--) begin
        b_valid = 1; b_in = LOGQ'(b[j]);
        @(negedge clk); cyc++;
      end
      b_valid = 0;
      @(negedge clk); cyc++;   // last step leaves the input register
      checks++;
      if (cyc != N + 1 || busy_t) begin failures++; $display("latency %0d", cyc); end
      for (int k = N - 1; k >= 0; k--) begin
        checks++;
        if (c_t !== LOGQ'(rt[k]) || c_l !== LOGQ'(rl[k])) begin
          failures++;
          $display("trial %0d c[%0d]: got %0d/%0d exp %0d/%0d", trial, k, c_t, c_l, rt[k], rl[k]);
        end
        out_shift = 1; @(negedge clk); out_shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
