// tb_ntru_kem: full-size end-to-end test of the accelerator with its default
// parameters (ntruhps2048677: n = 677, q = 2048, d = 127).
//
// Encapsulation: two runs with random public keys and a random bit source
// that sometimes idles. The testbench records the random words the core
// takes, replays the samplers in software and checks the ciphertext bytes and
// the key against c = r*h + Lift(m), PACK_q(c), SHA3-256(PACK_3(r)||PACK_3(m)).
// Decapsulation: a consistent key/ciphertext pair (f = 1, f_p = 1,
// h_q = 3^-1 mod q, c = 3r + Lift(m)) that must be accepted, and the same
// ciphertext with one coefficient changed, which must be rejected with the
// implicit-rejection key SHA3-256(s || c_pkd).
// It counts how often each mechanism of the design happened and fails if one
// never did: sampler rejections (both samplers), sampling of m overlapping the
// multiplication, public-key and packer back-pressure, the hash core stalling
// its input during a permutation, multi-block hashing, the three embed modes,
// and both the accept and the reject outcome of decapsulation.
module tb_ntru_kem;
  import ntru_pkg::*;
  import ntru_ref_pkg::*;
  localparam int N = DEF_N, LOGQ = DEF_LOGQ, D = DEF_D, Q = 1 << LOGQ, IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic enc_start, enc_busy, enc_done, enc_rnd_valid, enc_rnd_ready, enc_pk_valid, enc_pk_ready;
  logic enc_ct_valid, enc_ct_last;
  logic [15:0] enc_rnd_data;
  logic [7:0] enc_pk_byte, enc_ct_byte;
  logic [255:0] enc_key, dec_key;
  logic dec_start, dec_busy, dec_done, dec_in_valid, dec_in_ready, dec_fail;
  logic [7:0] dec_in_byte;

  ntru_kem dut (.*);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanisms
  int n_overlap, n_pk_stall, n_pack_stall, n_hash_stall, n_perm_blocks;
  int n_emb_sp0, n_emb_sp1, n_emb_sq1, n_accept, n_reject;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_encap.u_sample_m.busy && dut.u_encap.g_xnet.u_mul.busy) n_overlap++;
    if (enc_pk_valid && !enc_pk_ready && int'(dut.u_encap.st_q) == 1 /* LOAD */) n_pk_stall++;
    if (dut.u_encap.u_pack_c.in_valid && !dut.u_encap.u_pack_c.in_ready) n_pack_stall++;
    if ((dut.u_encap.u_sha3.in_valid && !dut.u_encap.u_sha3.in_ready) ||
        (dut.u_decap.u_sha3.in_valid && !dut.u_decap.u_sha3.in_ready)) n_hash_stall++;
    if (int'(dut.u_decap.u_sha3.st_q) == 1 /* PERMUTE */ && dut.u_decap.u_sha3.round_q == 0) n_perm_blocks++;
    if (dut.u_decap.u_embed.start) begin
      // the mode is set by the unload phase that follows: 7 = after the
      // first product, 11 = after the second, 17 = after the third
      if (int'(dut.u_decap.st_q) == 7) n_emb_sp0++;
      else if (int'(dut.u_decap.st_q) == 11) n_emb_sp1++;
      else if (int'(dut.u_decap.st_q) == 17) n_emb_sq1++;
    end
  end

  int words[$];
  bytes_t ct;
  always @(posedge clk) if (rst_n) begin
    if (enc_rnd_valid && enc_rnd_ready) words.push_back(int'(enc_rnd_data));
    if (enc_ct_valid) ct.push_back(enc_ct_byte);
  end
  always @(negedge clk) begin
    enc_rnd_valid <= ($urandom_range(0, 7) != 0);
    enc_rnd_data  <= 16'($urandom);
  end

  // ------------------------------------------------------------ encapsulation
  task automatic run_encap();
    poly_t h, r, m, c, rh;
    bytes_t pk, msg, tmp;
    int s, wi, cyc, mask;
    logic [255:0] key_exp;
    h = new[N]; r = new[N]; m = new[N];
    s = 0;
    for (int i = 0; i < N - 1; i++) begin h[i] = $urandom_range(0, Q - 1); s += h[i]; end
    h[N - 1] = modp(-s, Q);
    pk = pack_q(h, LOGQ);
    words.delete(); ct.delete();
    @(negedge clk); enc_start = 1; @(negedge clk); enc_start = 0;
    cyc = 1;
    fork
      for (int i = 0; i < pk.size(); i++) begin
        enc_pk_valid = 1; enc_pk_byte = pk[i];
        @(posedge clk); while (!enc_pk_ready) @(posedge clk);
        #1 enc_pk_valid = 0;
      end
      while (!enc_done) begin @(posedge clk); cyc++; #1; end
    join
    @(negedge clk);
    wi = 0;
    for (int i = 0; i < N - 1; i++) begin
      while ((words[wi] & 3) == 3) wi++;
      r[i] = words[wi++] & 3;
      if (r[i] == 2) r[i] = -1;
    end
    r[N - 1] = 0;
    for (int i = 0; i < N - 1; i++) m[i] = (i < D) ? 1 : (i < 2 * D) ? -1 : 0;
    for (int i = N - 2; i >= 1; ) begin
      int j, t;
      mask = 1; while (mask < i) mask = (mask << 1) | 1;
      j = words[wi++] & ((1 << IW) - 1) & mask;
      if (j <= i) begin t = m[i]; m[i] = m[j]; m[j] = t; i--; end
    end
    m[N - 1] = 0;
    checks++;
    if (wi != words.size()) begin failures++; $display("encap: random words used %0d of %0d", wi, words.size()); end
    rh = cyc_mul(r, h, Q);
    c = new[N];
    for (int i = 0; i < N; i++) c[i] = modp(rh[i] + m[i], Q);
    msg = pack_3(r); tmp = pack_3(m);
    foreach (tmp[i]) msg.push_back(tmp[i]);
    key_exp = sha3_256(msg);
    checks++;
    if (ct != pack_q(c, LOGQ)) begin failures++; $display("encap: ciphertext mismatch"); end
    checks++;
    if (enc_key !== key_exp) begin failures++; $display("encap: key mismatch"); end
    checks++;
    if (ct.size() != packed_q_bytes(N, LOGQ)) begin failures++; $display("encap: %0d ciphertext bytes", ct.size()); end
    $display("encapsulation: %0d cycles, %0d ciphertext bytes", cyc, ct.size());
  endtask

  // ------------------------------------------------------------ decapsulation
  task automatic run_decap(bit tamper);
    poly_t r, m, c;
    bytes_t stream, tmp, msg;
    logic [255:0] s, k_exp;
    int sum, cyc;
    r = new[N]; m = new[N]; c = new[N];
    for (int i = 0; i < 8; i++) s[32 * i +: 32] = $urandom;
    // r ternary with zero sum and r_{n-1} = 0; m of weight 2d
    for (int i = 0; i < N; i++) r[i] = 0;
    for (int i = 0; i < 150; i++) begin r[2 * i] = 1; r[2 * i + 1] = -1; end
    for (int i = N - 2; i > 0; i--) begin int j, x; j = $urandom_range(0, i); x = r[i]; r[i] = r[j]; r[j] = x; end
    for (int i = 0; i < N - 1; i++) m[i] = (i < D) ? 1 : (i < 2 * D) ? -1 : 0;
    for (int i = N - 2; i > 0; i--) begin int j, x; j = $urandom_range(0, i); x = m[i]; m[i] = m[j]; m[j] = x; end
    m[N - 1] = 0;
    for (int i = 0; i < N; i++) c[i] = modp(3 * r[i] + m[i], Q);
    if (tamper) c[10] = modp(c[10] + 7, Q);
    sum = 0;
    for (int i = 0; i < N - 1; i++) sum += c[i];
    c[N - 1] = modp(-sum, Q);
    if (!tamper) begin
      msg = pack_3(r); tmp = pack_3(m);
      foreach (tmp[i]) msg.push_back(tmp[i]);
    end else begin
      for (int i = 0; i < 32; i++) msg.push_back(s[8 * i +: 8]);
      tmp = pack_q(c, LOGQ);
      foreach (tmp[i]) msg.push_back(tmp[i]);
    end
    k_exp = sha3_256(msg);
    // private key: f = 1, f_p = 1, h_q = 683 (3 * 683 = 1 mod 2048), then s, then c
    for (int i = 0; i < packed_s3_bytes(N); i++) stream.push_back(i == 0 ? 8'd1 : 8'd0);
    for (int i = 0; i < packed_s3_bytes(N); i++) stream.push_back(i == 0 ? 8'd1 : 8'd0);
    begin
      poly_t hq;
      hq = new[N];
      for (int i = 0; i < N; i++) hq[i] = 0;
      hq[0] = 683;
      tmp = pack_q(hq, LOGQ); foreach (tmp[i]) stream.push_back(tmp[i]);
    end
    for (int i = 0; i < 32; i++) stream.push_back(s[8 * i +: 8]);
    tmp = pack_q(c, LOGQ); foreach (tmp[i]) stream.push_back(tmp[i]);
    @(negedge clk); dec_start = 1; @(negedge clk); dec_start = 0;
    cyc = 1;
    fork
      for (int i = 0; i < stream.size(); i++) begin
        dec_in_valid = 1; dec_in_byte = stream[i];
        @(posedge clk); while (!dec_in_ready) @(posedge clk);
        #1 dec_in_valid = 0;
      end
      while (!dec_done) begin @(posedge clk); cyc++; #1; end
    join
    checks++;
    if (dec_fail !== tamper) begin failures++; $display("decap: fail=%0d, expected %0d", dec_fail, tamper); end
    checks++;
    if (dec_key !== k_exp) begin failures++; $display("decap: key mismatch (tamper=%0d)", tamper); end
    if (dec_fail) n_reject++; else n_accept++;
    $display("decapsulation (%s): %0d cycles", tamper ? "rejected" : "accepted", cyc);
  endtask

  task automatic mech(string name, int count);
    checks++;
    $display("mechanism %-34s %0d", name, count);
    if (count == 0) begin failures++; $display("  never happened"); end
  endtask

  initial begin
    enc_start = 0; enc_pk_valid = 0; enc_pk_byte = 0;
    dec_start = 0; dec_in_valid = 0; dec_in_byte = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) run_encap();
    run_decap(1'b0);
    run_decap(1'b1);
    mech("r sampler rejections", dut.u_encap.u_sample_r.reject_count);
    mech("Fisher-Yates draw rejections", dut.u_encap.u_sample_m.reject_count);
    mech("m sampling during multiplication", n_overlap);
    mech("public-key input stalls", n_pk_stall);
    mech("ciphertext packer stalls", n_pack_stall);
    mech("hash input stalls (permutation)", n_hash_stall);
    mech("decap hash blocks", n_perm_blocks);
    mech("embed mod (3, x^n - 1)", n_emb_sp0);
    mech("embed mod (3, Phi_n)", n_emb_sp1);
    mech("embed mod (q, Phi_n)", n_emb_sq1);
    mech("decapsulation accepted", n_accept);
    mech("decapsulation rejected", n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
