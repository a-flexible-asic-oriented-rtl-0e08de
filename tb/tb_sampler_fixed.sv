// tb_sampler_fixed: runs the Fisher-Yates sampler from a known random stream
// and replays the shuffle in a model (same draws, same rejections) to predict
// every coefficient. Checks the weight (D ones, D minus ones), the zero last
// coefficient, the number of rejected draws and the latency.
module tb_sampler_fixed;
  import ntru_pkg::*;
  localparam int N = 61, D = 9, IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, rnd_valid, rnd_ready, out_valid, done, busy;
  logic [IW-1:0] rnd_data, out_idx;
  trit_t out_trit;
  logic [31:0] reject_count;
  sampler_fixed #(.N(N), .D(D)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int v[N - 1], i_m, rej, got, np, nm;
  always @(posedge clk) if (rst_n) begin
    if (rnd_valid && rnd_ready) begin
      int mask, j, x;
      mask = 1; while (mask < i_m) mask = (mask << 1) | 1;
      j = int'(rnd_data) & mask;
      if (j <= i_m) begin x = v[i_m]; v[i_m] = v[j]; v[j] = x; i_m--; end
      else rej++;
    end
    if (out_valid) begin
      int e;
      e = (got == N - 1) ? 0 : v[got];
      checks++;
      if (out_trit != trit_t'(e) || out_idx != IW'(got)) begin failures++; $display("[%0d] got %0d exp %0d", got, out_trit, e); end
      if (out_trit == TRIT_POS) np++;
      if (out_trit == TRIT_NEG) nm++;
      got++;
    end
  end

  initial begin
    int cyc, prev;
    start = 0; rnd_valid = 0; rnd_data = 0; prev = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      for (int k = 0; k < N - 1; k++) v[k] = (k < D) ? 1 : (k < 2 * D) ? 2 : 0;
      i_m = N - 2; rej = 0; got = 0; np = 0; nm = 0; cyc = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) begin
        rnd_valid = (t < 2) ? 1'b1 : 1'($urandom);
        rnd_data = IW'($urandom);
        @(negedge clk); cyc++;
      end
      rnd_valid = 0;
      @(negedge clk);   // let the model see the last coefficient
      checks++;
      if (got != N || np != D || nm != D) begin failures++; $display("count %0d w %0d %0d", got, np, nm); end
      checks++;
      if (reject_count - prev != rej) begin failures++; $display("rejects %0d exp %0d", reject_count - prev, rej); end
      prev = reject_count;
      // fill (1) + one cycle per draw + N outputs
      if (t < 2) begin
        checks++;
        if (cyc != 1 + (N - 2) + rej + N) begin failures++; $display("cycles %0d", cyc); end
      end
    end
    checks++; if (reject_count == 0) begin failures++; $display("no rejection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
