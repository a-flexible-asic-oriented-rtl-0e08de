// tb_embed: streams random polynomials of R_q (top coefficient first) through
// the embed unit in all four modes (S_q or S_3, with or without the Phi_n
// reduction) and compares every output, three cycles after its input, with a
// model: (a_i - a_{n-1}) mod q, or (centred(a_i) - centred(a_{n-1})) mod 3.
module tb_embed;
  import ntru_pkg::*;
  localparam int N = 29, LOGQ = 11, Q = 1 << LOGQ;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, phi, in_valid, out_valid;
  ring_sel_e ring_sel;
  logic [LOGQ-1:0] in_data, out_data;
  embed #(.LOGQ(LOGQ)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int centred(int v);
    return (v >= Q / 2) ? v - Q : v;
  endfunction
  function automatic int mod(int v, int m);
    return ((v % m) + m) % m;
  endfunction

  int exp_q[$];
  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    checks++;
    e = exp_q.pop_front();
    if (out_data != LOGQ'(e)) begin failures++; $display("got %0d exp %0d", out_data, e); end
  end

  initial begin
    int a[N];
    start = 0; phi = 0; in_valid = 0; in_data = 0; ring_sel = RING_SQ;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      logic sp, ph;
      sp = t[0]; ph = t[1];
      for (int i = 0; i < N; i++) a[i] = (t == 4) ? ((i % 2) ? Q - 1 : Q / 2) : $urandom_range(0, Q - 1);
      @(negedge clk);
      start = 1; ring_sel = sp ? RING_SP : RING_SQ; phi = ph;
      @(negedge clk); start = 0;
      for (int i = N - 1; i >= 0; i--) begin
        int top;
        top = ph ? a[N - 1] : 0;
        if (sp) exp_q.push_back(mod(centred(a[i]) - (ph ? centred(a[N - 1]) : 0), 3));
        else    exp_q.push_back(mod(a[i] - top, Q));
        in_valid = 1; in_data = LOGQ'(a[i]);
        @(negedge clk);
      end
      in_valid = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("missing outputs"); exp_q.delete(); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
