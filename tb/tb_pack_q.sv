// tb_pack_q: packs random polynomials (n-1 coefficients of 11 bits, offered
// with random gaps) and compares the byte stream with a bit-serial model:
// bit b of the stream is bit (b mod 11) of coefficient b / 11, zero padded.
module tb_pack_q;
  localparam int N = 30, LOGQ = 11, NB = ((N - 1) * LOGQ + 7) / 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, in_last, in_ready, out_valid, done;
  logic [LOGQ-1:0] in_data;
  logic [7:0] out_byte;
  pack_q #(.LOGQ(LOGQ)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [LOGQ-1:0] a[N];
  int nbytes; bit seen_done;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      logic [7:0] e;
      for (int k = 0; k < 8; k++) begin
        int bit_i;
        bit_i = nbytes * 8 + k;
        e[k] = (bit_i < (N - 1) * LOGQ) ? a[bit_i / LOGQ][bit_i % LOGQ] : 1'b0;
      end
      checks++;
      if (out_byte != e) begin failures++; $display("byte %0d got %h exp %h", nbytes, out_byte, e); end
      nbytes++;
      if (done) seen_done = 1;
    end
  end

  initial begin
    in_valid = 0; in_last = 0; in_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      for (int i = 0; i < N; i++) a[i] = LOGQ'($urandom);
      nbytes = 0; seen_done = 0;
      for (int i = 0; i < N - 1; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 2) == 0 && t > 0) @(negedge clk);
        in_valid = 1; in_data = a[i]; in_last = (i == N - 2);
        @(posedge clk); while (!in_ready) @(posedge clk);
        #1 in_valid = 0; in_last = 0;
      end
      repeat (6) @(negedge clk);
      checks++;
      if (nbytes != NB || !seen_done) begin failures++; $display("bytes %0d exp %0d done %0d", nbytes, NB, seen_done); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
