// tb_unpack_q: unpacks random byte strings and compares the coefficients with
// a bit-serial model, including the rebuilt top coefficient in both modes
// (minus the sum of the others, or zero), and checks that exactly
// ceil((n-1)*11/8) bytes are consumed.
module tb_unpack_q;
  localparam int N = 30, LOGQ = 11, NB = ((N - 1) * LOGQ + 7) / 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, sum_zero, in_valid, in_ready, out_valid, done, busy;
  logic [7:0] in_byte;
  logic [LOGQ-1:0] out_data;
  logic [$clog2(N)-1:0] out_idx;
  unpack_q #(.N(N), .LOGQ(LOGQ)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] bytes_[NB];
  int e[N], got, taken;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) taken++;
    if (out_valid) begin
      checks++;
      if (out_data != LOGQ'(e[got]) || out_idx != got) begin failures++; $display("[%0d] got %0d exp %0d", got, out_data, e[got]); end
      got++;
    end
  end

  initial begin
    in_valid = 0; in_byte = 0; start = 0; sum_zero = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int s;
      for (int i = 0; i < NB; i++) bytes_[i] = 8'($urandom);
      s = 0;
      for (int i = 0; i < N - 1; i++) begin
        e[i] = 0;
        for (int k = 0; k < LOGQ; k++) e[i] |= int'(bytes_[(i * LOGQ + k) / 8][(i * LOGQ + k) % 8]) << k;
        s += e[i];
      end
      e[N - 1] = t[0] ? ((1 << LOGQ) - (s % (1 << LOGQ))) % (1 << LOGQ) : 0;
      got = 0; taken = 0;
      @(negedge clk); start = 1; sum_zero = t[0]; @(negedge clk); start = 0;
      for (int i = 0; i < NB; i++) begin
        while ($urandom_range(0, 2) == 0 && t > 1) @(negedge clk);
        in_valid = 1; in_byte = bytes_[i];
        @(posedge clk); while (!in_ready) @(posedge clk);
        #1 in_valid = 0;
      end
      in_valid = 1; in_byte = 8'hFF;   // an extra byte must not be taken
      repeat (10) @(negedge clk);
      in_valid = 0;
      checks++;
      if (got != N || taken != NB || busy) begin failures++; $display("got %0d taken %0d", got, taken); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
