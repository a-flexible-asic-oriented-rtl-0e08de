// tb_unpack_p: unpacks random bytes and compares every trit with the base-3
// digits of its byte (the fifth digit taken mod 3), checks the zero top
// coefficient and that exactly ceil((n-1)/5) bytes are taken.
module tb_unpack_p;
  import ntru_pkg::*;
  localparam int N = 34, M = N - 1, NB = (M + 4) / 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, in_valid, in_ready, out_valid, done, busy;
  logic [7:0] in_byte;
  trit_t out_trit;
  logic [$clog2(N)-1:0] out_idx;
  unpack_p #(.N(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bytes_[NB], got, taken;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) taken++;
    if (out_valid) begin
      int e, b;
      if (got == M) e = 0;
      else begin
        b = bytes_[got / 5];
        for (int k = 0; k < got % 5; k++) b = b / 3;
        e = b % 3;
      end
      checks++;
      if (out_trit != trit_t'(e) || out_idx != got) begin failures++; $display("[%0d] got %0d exp %0d", got, out_trit, e); end
      got++;
    end
  end

  initial begin
    in_valid = 0; in_byte = 0; start = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < NB; i++) bytes_[i] = (t == 0) ? 255 - i : $urandom_range(0, 242);
      got = 0; taken = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < NB; i++) begin
        in_valid = 1; in_byte = 8'(bytes_[i]);
        @(posedge clk); while (!in_ready) @(posedge clk);
        #1 in_valid = 0;
        if (t > 2) while ($urandom_range(0, 1)) @(negedge clk);
      end
      in_valid = 1; in_byte = 8'h00;
      repeat (10) @(negedge clk);
      in_valid = 0;
      checks++;
      if (got != N || taken != NB) begin failures++; $display("got %0d taken %0d", got, taken); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
