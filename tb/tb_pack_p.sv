// tb_pack_p: packs random ternary polynomials (n-1 coefficients) and compares
// each byte with the base-3 value of its group of five trits; the last,
// shorter group included.
module tb_pack_p;
  import ntru_pkg::*;
  localparam int N = 33, M = N - 1, NB = (M + 4) / 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_last, out_valid, done;
  trit_t in_trit;
  logic [7:0] out_byte;
  pack_p dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_[M], nb; bit sd;
  always @(posedge clk) if (rst_n && out_valid) begin
    int e, w;
    e = 0; w = 1;
    for (int k = 0; k < 5; k++) if (nb * 5 + k < M) begin e += t_[nb * 5 + k] * w; w *= 3; end
    checks++;
    if (out_byte != 8'(e)) begin failures++; $display("byte %0d got %0d exp %0d", nb, out_byte, e); end
    if (done) sd = 1;
    nb++;
  end

  initial begin
    in_valid = 0; in_last = 0; in_trit = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < M; i++) t_[i] = (t == 0) ? 2 : $urandom_range(0, 2);
      nb = 0; sd = 0;
      for (int i = 0; i < M; i++) begin
        @(negedge clk);
        if (t > 3) while ($urandom_range(0, 1)) @(negedge clk);
        in_valid = 1; in_trit = trit_t'(t_[i]); in_last = (i == M - 1);
        @(negedge clk); in_valid = 0; in_last = 0;
      end
      repeat (2) @(negedge clk);
      checks++;
      if (nb != NB || !sd) begin failures++; $display("bytes %0d", nb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
