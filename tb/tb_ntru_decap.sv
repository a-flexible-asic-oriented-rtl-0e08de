// tb_ntru_decap: end-to-end check of the decapsulation core at a reduced size
// (n = 37, q = 2048, d = 5) against a software model of the decapsulation.
// Three kinds of input:
//   valid     f = 1, f_p = 1, h_q = 3^-1 mod q and c = 3r + Lift(m) with r
//             ternary summing to zero and m of weight 2d: a consistent key
//             and ciphertext, so the core must accept (fail = 0, key = k1);
//   tampered  the same ciphertext with one coefficient changed: r is no
//             longer ternary, the core must reject (fail = 1, key = k2);
//   random    random f, f_p, h_q and c: the model decides.
// The key and the fail flag are compared with the model; the latency is
// reported. Nine runs use a core with the x-net multiplier, three more a
// second core built with the single-MAC Comba multiplier.
module tb_ntru_decap;
  import ntru_pkg::*;
  import ntru_ref_pkg::*;
  localparam int N = 37, LOGQ = 11, D = 5, Q = 1 << LOGQ;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, busy, done, in_valid, in_ready, fail;
  logic [7:0] in_byte;
  logic [255:0] key;
  logic sel;   // 0: x-net core, 1: Comba core
  logic busy_x, done_x, in_ready_x, fail_x, busy_c, done_c, in_ready_c, fail_c;
  logic [255:0] key_x, key_c;
  ntru_decap #(.N(N), .LOGQ(LOGQ), .D(D), .MUL_ARCH(MUL_XNET)) dut (
    .clk, .rst_n, .start(start && !sel), .busy(busy_x), .done(done_x),
    .in_valid(in_valid && !sel), .in_byte, .in_ready(in_ready_x), .key(key_x), .fail(fail_x));
  ntru_decap #(.N(N), .LOGQ(LOGQ), .D(D), .MUL_ARCH(MUL_COMBA)) dut_c (
    .clk, .rst_n, .start(start && sel), .busy(busy_c), .done(done_c),
    .in_valid(in_valid && sel), .in_byte, .in_ready(in_ready_c), .key(key_c), .fail(fail_c));
  assign busy     = sel ? busy_c : busy_x;
  assign done     = sel ? done_c : done_x;
  assign in_ready = sel ? in_ready_c : in_ready_x;
  assign fail     = sel ? fail_c : fail_x;
  assign key      = sel ? key_c : key_x;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int centred(int v);
    v = modp(v, Q);
    return (v >= Q / 2) ? v - Q : v;
  endfunction

  // model of the decapsulation
  function automatic void model(poly_t f, poly_t fp, poly_t hq, poly_t c, logic [255:0] s,
                                output logic [255:0] k, output bit fl);
    poly_t a, a3, t, m, cm, rr, r;
    bytes_t msg, tmp;
    int np, nm, sum;
    bit rt;
    a = cyc_mul(f, c, Q);
    a3 = new[N];
    for (int i = 0; i < N; i++) a3[i] = modp(centred(a[i]), 3);
    t = cyc_mul(fp, a3, 3);
    m = new[N]; cm = new[N]; r = new[N];
    np = 0; nm = 0;
    for (int i = 0; i < N; i++) begin
      m[i] = modp(t[i] - t[N - 1], 3);
      if (m[i] == 2) m[i] = -1;
      if (m[i] == 1) np++;
      if (m[i] == -1) nm++;
      cm[i] = modp(c[i] - m[i], Q);
    end
    rr = cyc_mul(cm, hq, Q);
    rt = 1;
    for (int i = 0; i < N; i++) begin
      int v;
      v = modp(rr[i] - rr[N - 1], Q);
      if (v == 1) r[i] = 1; else if (v == Q - 1) r[i] = -1; else r[i] = 0;
      if (!(v == 0 || v == 1 || v == Q - 1)) rt = 0;
    end
    sum = 0;
    for (int i = 0; i < N; i++) sum += c[i];
    fl = !(rt && np == D && nm == D && modp(sum, Q) == 0);
    if (!fl) begin
      msg = pack_3(r); tmp = pack_3(m);
      foreach (tmp[i]) msg.push_back(tmp[i]);
    end else begin
      msg.delete();
      for (int i = 0; i < 32; i++) msg.push_back(s[8 * i +: 8]);
      tmp = pack_q(c, LOGQ);
      foreach (tmp[i]) msg.push_back(tmp[i]);
    end
    k = sha3_256(msg);
  endfunction

  function automatic poly_t rand_tern(bit sum_zero);
    poly_t p;
    int s;
    p = new[N];
    s = 0;
    for (int i = 0; i < N - 1; i++) begin p[i] = $urandom_range(0, 2) - 1; s += p[i]; end
    p[N - 1] = 0;
    // balance the sum by zeroing coefficients of the excess sign
    for (int i = 0; i < N - 1 && sum_zero && s != 0; i++)
      if ((s > 0 && p[i] == 1) || (s < 0 && p[i] == -1)) begin s -= p[i]; p[i] = 0; end
    return p;
  endfunction

  task automatic run_one(int kind, output bit fl_exp, output int cyc);
    poly_t f, fp, hq, c, r, m;
    bytes_t stream, tmp;
    logic [255:0] s, k_exp;
    int sum;
    f = new[N]; fp = new[N]; hq = new[N]; c = new[N]; m = new[N];
    for (int i = 0; i < 8; i++) s[32 * i +: 32] = $urandom;
    if (kind < 2) begin
      for (int i = 0; i < N; i++) begin f[i] = 0; fp[i] = 0; hq[i] = 0; end
      f[0] = 1; fp[0] = 1; hq[0] = 683;   // 3 * 683 = 1 mod 2048
      r = rand_tern(1);
      for (int i = 0; i < N - 1; i++) m[i] = (i < D) ? 1 : (i < 2 * D) ? -1 : 0;
      for (int i = N - 2; i > 0; i--) begin int j, x; j = $urandom_range(0, i); x = m[i]; m[i] = m[j]; m[j] = x; end
      m[N - 1] = 0;
      for (int i = 0; i < N; i++) c[i] = modp(3 * r[i] + m[i], Q);
      if (kind == 1) c[3] = modp(c[3] + 5, Q);
    end else begin
      f = rand_tern(0); fp = rand_tern(0);
      for (int i = 0; i < N - 1; i++) begin hq[i] = $urandom_range(0, Q - 1); c[i] = $urandom_range(0, Q - 1); end
      hq[N - 1] = 0;
    end
    // the core rebuilds c_{n-1} from the sum of the others
    sum = 0;
    for (int i = 0; i < N - 1; i++) sum += c[i];
    c[N - 1] = modp(-sum, Q);
    model(f, fp, hq, c, s, k_exp, fl_exp);
    stream = pack_3(f);
    tmp = pack_3(fp);        foreach (tmp[i]) stream.push_back(tmp[i]);
    tmp = pack_q(hq, LOGQ);  foreach (tmp[i]) stream.push_back(tmp[i]);
    for (int i = 0; i < 32; i++) stream.push_back(s[8 * i +: 8]);
    tmp = pack_q(c, LOGQ);   foreach (tmp[i]) stream.push_back(tmp[i]);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    fork
      for (int i = 0; i < stream.size(); i++) begin
        in_valid = 1; in_byte = stream[i];
        @(posedge clk); while (!in_ready) @(posedge clk);
        #1 in_valid = 0;
        if (kind == 2 && $urandom_range(0, 3) == 0) @(negedge clk);
      end
      while (!done) begin @(posedge clk); cyc++; #1; end
    join
    checks++;
    if (fail !== fl_exp) begin failures++; $display("kind %0d: fail %0d exp %0d", kind, fail, fl_exp); end
    checks++;
    if (key !== k_exp) begin failures++; $display("kind %0d: key mismatch", kind); end
  endtask

  initial begin
    bit fl;
    int cyc, n_ok, n_rej;
    start = 0; in_valid = 0; in_byte = 0; n_ok = 0; n_rej = 0; sel = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      sel = (t >= 9);
      run_one(t % 3, fl, cyc);
      if (fl) n_rej++; else n_ok++;
      $display("decap (%s) kind %0d: fail=%0d, %0d cycles", sel ? "comba" : "x-net", t % 3, fl, cyc);
    end
    checks++;
    if (n_ok < 4 || n_rej < 4) begin failures++; $display("accept/reject paths %0d %0d", n_ok, n_rej); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
