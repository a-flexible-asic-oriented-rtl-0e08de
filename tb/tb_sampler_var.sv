// tb_sampler_var: runs both variable-weight samplers from a known random
// stream and compares every coefficient with the value the algorithm must give
// for that stream (8-bit word mod 3, or the next 2-bit word that is not 3).
// Checks the count of n coefficients, the zero last coefficient, the count of
// rejected words, and that the modulo sampler takes exactly one word per
// coefficient.
module tb_sampler_var;
  import ntru_pkg::*;
  localparam int N = 53;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start;
  logic rv_m, rr_m, ov_m, dn_m, by_m, rv_r, rr_r, ov_r, dn_r, by_r;
  logic [7:0] rd_m; logic [1:0] rd_r;
  trit_t ot_m, ot_r;
  logic [$clog2(N)-1:0] oi_m, oi_r;
  logic [31:0] rc_m, rc_r;

  sampler_var #(.N(N), .ALG(SAMPLE_MODULO)) dut_m (
    .clk, .rst_n, .start, .rnd_valid(rv_m), .rnd_data(rd_m), .rnd_ready(rr_m),
    .out_valid(ov_m), .out_trit(ot_m), .out_idx(oi_m), .done(dn_m), .busy(by_m), .reject_count(rc_m));
  sampler_var #(.N(N), .ALG(SAMPLE_REJECTION)) dut_r (
    .clk, .rst_n, .start, .rnd_valid(rv_r), .rnd_data(rd_r), .rnd_ready(rr_r),
    .out_valid(ov_r), .out_trit(ot_r), .out_idx(oi_r), .done(dn_r), .busy(by_r), .reject_count(rc_r));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_m[$], exp_r[$], got_m, got_r, words_m, rej;
  always @(posedge clk) if (rst_n) begin
    if (rv_m && rr_m) begin exp_m.push_back(int'(rd_m) % 3); words_m++; end
    if (rv_r && rr_r) begin if (rd_r == 2'd3) rej++; else exp_r.push_back(int'(rd_r)); end
    if (ov_m) begin
      int e; checks++;
      e = (got_m == N - 1) ? 0 : exp_m.pop_front();
      if (ot_m != trit_t'(e) || oi_m != got_m) begin failures++; $display("mod[%0d] got %0d exp %0d", got_m, ot_m, e); end
      got_m++;
    end
    if (ov_r) begin
      int e; checks++;
      e = (got_r == N - 1) ? 0 : exp_r.pop_front();
      if (ot_r != trit_t'(e) || oi_r != got_r) begin failures++; $display("rej[%0d] got %0d exp %0d", got_r, ot_r, e); end
      got_r++;
    end
  end

  initial begin
    start = 0; rv_m = 0; rv_r = 0; rd_m = 0; rd_r = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      got_m = 0; got_r = 0; words_m = 0; rej = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (by_m || by_r) begin
        rv_m = ($urandom_range(0, 3) != 0); rd_m = 8'($urandom);
        rv_r = ($urandom_range(0, 3) != 0); rd_r = 2'($urandom);
        @(negedge clk);
      end
      rv_m = 0; rv_r = 0;
      @(negedge clk);
      checks++;
      if (got_m != N || got_r != N || words_m != N - 1) begin
        failures++; $display("counts %0d %0d %0d", got_m, got_r, words_m);
      end
      checks++;
      if (rc_r != 32'(rej) + (t == 0 ? 0 : prev_rej) || rc_m != 0) begin failures++; $display("reject count %0d exp %0d", rc_r, rej); end
      prev_rej = rc_r;
    end
    checks++; if (rc_r == 0) begin failures++; $display("no rejection seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int prev_rej = 0;
endmodule
