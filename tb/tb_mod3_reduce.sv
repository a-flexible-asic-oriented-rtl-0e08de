// tb_mod3_reduce: feeds every 12-bit value (and then random ones back to back)
// through the reducer and compares each result, two cycles later, with x % 3.
module tb_mod3_reduce;
  localparam int W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, out_valid;
  logic [W-1:0] in_data;
  logic [1:0] out_data;
  mod3_reduce #(.W(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$];
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      int e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("spurious output"); end
      else begin
        e = exp_q.pop_front();
        if (out_data != 2'(e)) begin failures++; $display("got %0d exp %0d", out_data, e); end
      end
    end
    if (in_valid) exp_q.push_back(int'(in_data) % 3);
  end

  initial begin
    int sent;
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int v = 0; v < (1 << W); v++) begin
      in_valid = 1; in_data = W'(v);
      @(negedge clk);
    end
    in_valid = 0; in_data = 0;
    // latency: one value, output exactly two edges later
    @(negedge clk); in_valid = 1; in_data = 12'd4095; @(negedge clk); in_valid = 0;
    checks++; if (out_valid) begin failures++; $display("too early"); end
    @(negedge clk);
    checks++; if (!out_valid || out_data != 2'd0) begin failures++; $display("latency wrong"); end
    repeat (5) @(negedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
