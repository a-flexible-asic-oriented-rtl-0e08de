// tb_validator: streams polynomials with known properties (ternary of fixed
// weight, ternary of wrong weight, non-ternary, sum zero or not) through the
// validator and compares the four flags and counts with a model.
module tb_validator;
  localparam int N = 41, LOGQ = 11, D = 6, Q = 1 << LOGQ;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, in_valid, in_last, done, ternary_ok, weight_ok, sum_zero_ok;
  logic [LOGQ-1:0] in_data;
  logic [$clog2(N+1)-1:0] ones, minus_ones;
  validator #(.N(N), .LOGQ(LOGQ), .D(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a[N];
    start = 0; in_valid = 0; in_last = 0; in_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int np, nm, s;
      bit tern, wok, sz;
      // fixed-weight ternary, then perturb
      for (int i = 0; i < N; i++) a[i] = 0;
      for (int i = 0; i < D; i++) a[i] = 1;
      for (int i = D; i < 2 * D; i++) a[i] = Q - 1;
      for (int i = N - 2; i > 0; i--) begin int j, x; j = $urandom_range(0, i); x = a[i]; a[i] = a[j]; a[j] = x; end
      a[N - 1] = 0;
      case (t % 4)
        1: a[$urandom_range(0, N - 2)] = $urandom_range(2, Q - 2);
        2: a[$urandom_range(0, N - 2)] = 1;
        3: begin s = 0; for (int i = 0; i < N - 1; i++) begin a[i] = $urandom_range(0, Q - 1); s += a[i]; end
                  a[N - 1] = (Q - (s % Q)) % Q; end
        default: ;
      endcase
      np = 0; nm = 0; s = 0; tern = 1;
      for (int i = 0; i < N; i++) begin
        if (a[i] == 1) np++;
        if (a[i] == Q - 1) nm++;
        if (!(a[i] == 0 || a[i] == 1 || a[i] == Q - 1)) tern = 0;
        s += a[i];
      end
      wok = tern && np == D && nm == D;
      sz = (s % Q) == 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < N; i++) begin
        in_valid = 1; in_last = (i == N - 1); in_data = LOGQ'(a[i]);
        @(negedge clk);
      end
      in_valid = 0; in_last = 0;
      checks++;
      if (!done || ternary_ok != tern || weight_ok != wok || sum_zero_ok != sz ||
          ones != np || minus_ones != nm) begin
        failures++;
        $display("t%0d flags %b%b%b%b exp 1%b%b%b counts %0d %0d", t, done, ternary_ok, weight_ok, sum_zero_ok, tern, wok, sz, ones, minus_ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
