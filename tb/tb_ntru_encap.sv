// tb_ntru_encap: end-to-end check of the encapsulation core at a reduced size
// (n = 37, q = 2048, d = 5) with both variable-weight samplers. The testbench
// records the random words the core consumes, replays the two sampling
// algorithms on them to obtain r and m, and computes c = r*h + Lift(m),
// PACK_q(c) and SHA3-256(PACK_3(r) || PACK_3(m)) in software; the ciphertext
// bytes and the key must match. It also checks the number of ciphertext bytes
// and reports the latency.
module tb_ntru_encap;
  import ntru_pkg::*;
  import ntru_ref_pkg::*;
  localparam int N = 37, LOGQ = 11, D = 5, Q = 1 << LOGQ, IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, rnd_valid, pk_valid;
  logic [15:0] rnd_data;
  logic [7:0] pk_byte;
  logic busy_r, done_r, rnd_ready_r, pk_ready_r, ct_valid_r, ct_last_r;
  logic busy_m, done_m, rnd_ready_m, pk_ready_m, ct_valid_m, ct_last_m;
  logic [7:0] ct_byte_r, ct_byte_m;
  logic [255:0] key_r, key_m;
  logic sel;   // which core is under test

  ntru_encap #(.N(N), .LOGQ(LOGQ), .D(D), .VAR_ALG(SAMPLE_REJECTION)) dut_r (
    .clk, .rst_n, .start(start && !sel), .busy(busy_r), .done(done_r),
    .rnd_valid, .rnd_data, .rnd_ready(rnd_ready_r),
    .pk_valid(pk_valid && !sel), .pk_byte, .pk_ready(pk_ready_r),
    .ct_valid(ct_valid_r), .ct_byte(ct_byte_r), .ct_last(ct_last_r), .key(key_r));
  ntru_encap #(.N(N), .LOGQ(LOGQ), .D(D), .VAR_ALG(SAMPLE_MODULO),
               .MUL_ARCH(MUL_COMBA)) dut_m (
    .clk, .rst_n, .start(start && sel), .busy(busy_m), .done(done_m),
    .rnd_valid, .rnd_data, .rnd_ready(rnd_ready_m),
    .pk_valid(pk_valid && sel), .pk_byte, .pk_ready(pk_ready_m),
    .ct_valid(ct_valid_m), .ct_byte(ct_byte_m), .ct_last(ct_last_m), .key(key_m));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rnd_ready, pk_ready, ct_valid, ct_last, done;
  logic [7:0] ct_byte;
  assign rnd_ready = sel ? rnd_ready_m : rnd_ready_r;
  assign pk_ready  = sel ? pk_ready_m : pk_ready_r;
  assign ct_valid  = sel ? ct_valid_m : ct_valid_r;
  assign ct_byte   = sel ? ct_byte_m : ct_byte_r;
  assign ct_last   = sel ? ct_last_m : ct_last_r;
  assign done      = sel ? done_m : done_r;

  int words[$];
  bytes_t ct;
  int n_last;
  always @(posedge clk) if (rst_n) begin
    if (rnd_valid && rnd_ready) words.push_back(int'(rnd_data));
    if (ct_valid) ct.push_back(ct_byte);
    if (ct_last) n_last++;
  end

  // random source, sometimes idle
  always @(negedge clk) begin
    rnd_valid <= ($urandom_range(0, 7) != 0);
    rnd_data  <= 16'($urandom);
  end

  task automatic run_one(bit modulo);
    poly_t h, r, m, c, rh;
    bytes_t pk, msg;
    int s, wi, cyc, mask;
    logic [255:0] key_exp;
    sel = modulo;
    h = new[N]; r = new[N]; m = new[N];
    s = 0;
    for (int i = 0; i < N - 1; i++) begin h[i] = $urandom_range(0, Q - 1); s += h[i]; end
    h[N - 1] = modp(-s, Q);
    pk = pack_q(h, LOGQ);
    words.delete(); ct.delete(); n_last = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    fork
      begin
        for (int i = 0; i < pk.size(); i++) begin
          pk_valid = 1; pk_byte = pk[i];
          @(posedge clk); while (!pk_ready) @(posedge clk);
          #1 pk_valid = 0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
        end
      end
      begin
        while (!done) begin @(posedge clk); cyc++; #1; end
      end
    join
    @(negedge clk);
    // replay the samplers
    wi = 0;
    for (int i = 0; i < N - 1; i++) begin
      if (modulo) r[i] = words[wi++] % 256 % 3;
      else begin
        while ((words[wi] & 3) == 3) wi++;
        r[i] = words[wi++] & 3;
      end
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
    if (wi != words.size()) begin failures++; $display("random words used %0d, consumed %0d", wi, words.size()); end
    rh = cyc_mul(r, h, Q);
    c = new[N];
    for (int i = 0; i < N; i++) c[i] = modp(rh[i] + m[i], Q);
    msg = pack_3(r);
    pk = pack_3(m);
    foreach (pk[i]) msg.push_back(pk[i]);
    key_exp = sha3_256(msg);
    checks++;
    if (ct != pack_q(c, LOGQ)) begin failures++; $display("ciphertext mismatch (%0d bytes)", ct.size()); end
    checks++;
    if ((modulo ? key_m : key_r) !== key_exp) begin failures++; $display("key mismatch"); end
    checks++;
    if (n_last != 1 || ct.size() != ((N - 1) * LOGQ + 7) / 8) begin failures++; $display("ct framing"); end
    $display("encap (%s sampler): %0d cycles", modulo ? "modulo" : "rejection", cyc);
  endtask

  initial begin
    start = 0; pk_valid = 0; pk_byte = 0; sel = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) run_one(1'b0);
    repeat (2) run_one(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
