// tb_poly_addsub: random coefficient pairs through the adder/subtracter with
// two lanes, results and tags compared one cycle later with (a +/- b) mod q.
module tb_poly_addsub;
  localparam int LOGQ = 11, TW = 2, TAG_W = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, sub, out_valid;
  logic [TW-1:0][LOGQ-1:0] a, b, c;
  logic [TAG_W-1:0] in_tag, out_tag;
  poly_addsub #(.LOGQ(LOGQ), .TW(TW), .TAG_W(TAG_W)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; sub = 0; a = '0; b = '0; in_tag = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int ea[TW], eb[TW];
      logic es;
      @(negedge clk);
      es = 1'($urandom);
      for (int l = 0; l < TW; l++) begin
        ea[l] = $urandom_range(0, 2047); eb[l] = $urandom_range(0, 2047);
        a[l] = LOGQ'(ea[l]); b[l] = LOGQ'(eb[l]);
      end
      in_valid = 1; sub = es; in_tag = TAG_W'(t);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_tag != TAG_W'(t)) begin failures++; $display("valid/tag"); end
      for (int l = 0; l < TW; l++) begin
        int e;
        e = es ? (ea[l] - eb[l]) & 2047 : (ea[l] + eb[l]) & 2047;
        checks++;
        if (c[l] != LOGQ'(e)) begin failures++; $display("got %0d exp %0d", c[l], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
