// tb_sha3_256: checks the SHA3-256 core against the FIPS 202 example digests
// ("abc" and 200 bytes of 0xA3) and against a straightforward software model
// of Keccak for random messages of several lengths, including lengths at and
// around the 136-byte block boundary. Also checks the cycle count of a
// one-block message: 3 input bytes, padding, 24 rounds.
module tb_sha3_256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, in_valid, in_last, in_ready, done;
  logic [7:0] in_byte;
  logic [255:0] digest;

  sha3_256 dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model: Keccak-f[1600] with round constants from the LFSR
  typedef logic [63:0] lane_t;
  function automatic bit rc_bit(int t);
    logic [7:0] r;
    if (t % 255 == 0) return 1'b1;
    r = 8'h01;
    for (int i = 1; i <= t % 255; i++) begin
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h71 : 8'h00);
    end
    return r[0];
  endfunction
  function automatic lane_t rol(lane_t v, int r);
    r = r % 64;
    return (r == 0) ? v : ((v << r) | (v >> (64 - r)));
  endfunction
  function automatic void keccak_f(ref lane_t a[5][5]);
    lane_t c[5], d, b[5][5];
    int rot[5][5];
    int x, y, t, nx;
    x = 1; y = 0; rot[0][0] = 0;
    for (t = 0; t < 24; t++) begin
      rot[x][y] = ((t + 1) * (t + 2) / 2) % 64;
      nx = y; y = (2 * x + 3 * y) % 5; x = nx;
    end
    for (int rnd = 0; rnd < 24; rnd++) begin
      for (int i = 0; i < 5; i++) c[i] = a[i][0] ^ a[i][1] ^ a[i][2] ^ a[i][3] ^ a[i][4];
      for (int i = 0; i < 5; i++) begin
        d = c[(i + 4) % 5] ^ rol(c[(i + 1) % 5], 1);
        for (int j = 0; j < 5; j++) a[i][j] ^= d;
      end
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++)
        b[j][(2 * i + 3 * j) % 5] = rol(a[i][j], rot[i][j]);
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++)
        a[i][j] = b[i][j] ^ (~b[(i + 1) % 5][j] & b[(i + 2) % 5][j]);
      for (int j = 0; j < 7; j++)
        if (rc_bit(j + 7 * rnd)) a[0][0][(1 << j) - 1] ^= 1'b1;
    end
  endfunction
  function automatic logic [255:0] ref_sha3(byte unsigned msg[$]);
    lane_t a[5][5];
    byte unsigned m[$];
    logic [255:0] h;
    m = msg;
    m.push_back(8'h06);
    while (m.size() % 136 != 0) m.push_back(8'h00);
    m[m.size() - 1] |= 8'h80;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) a[i][j] = '0;
    for (int blk = 0; blk < m.size() / 136; blk++) begin
      for (int p = 0; p < 136; p++)
        a[(p / 8) % 5][(p / 8) / 5][8 * (p % 8) +: 8] ^= m[blk * 136 + p];
      keccak_f(a);
    end
    for (int p = 0; p < 32; p++) h[8 * p +: 8] = a[(p / 8) % 5][(p / 8) / 5][8 * (p % 8) +: 8];
    return h;
  endfunction

  // ---- drive a message, return digest and cycles from first byte to done
  task automatic hash(byte unsigned msg[$], output logic [255:0] h, output int cyc);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    for (int i = 0; i < msg.size(); i++) begin
      in_valid = 1; in_byte = msg[i]; in_last = (i == msg.size() - 1);
      @(posedge clk); cyc++;
      while (!in_ready) begin @(posedge clk); cyc++; end
      #1;
    end
    in_valid = 0; in_last = 0;
    while (!done) begin @(posedge clk); cyc++; #1; end
    h = digest;
  endtask

  function automatic logic [255:0] hexd(logic [255:0] big_endian);
    logic [255:0] r;
    for (int i = 0; i < 32; i++) r[8 * i +: 8] = big_endian[255 - 8 * i -: 8];
    return r;
  endfunction

  initial begin
    byte unsigned msg[$];
    logic [255:0] h, e;
    int cyc;
    start = 0; in_valid = 0; in_last = 0; in_byte = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    msg = '{8'h61, 8'h62, 8'h63};
    hash(msg, h, cyc);
    e = hexd(256'h3a985da74fe225b2045c172d6bd390bd855f086e3e9d525b46bfe24511431532);
    checks++; if (h !== e) begin failures++; $display("abc: got %h", h); end
    checks++; if (ref_sha3(msg) !== e) begin failures++; $display("abc model wrong"); end
    // 3 input cycles + 1 padding cycle + 24 rounds
    checks++; if (cyc != 3 + 1 + 24) begin failures++; $display("abc cycles %0d", cyc); end

    msg.delete(); for (int i = 0; i < 200; i++) msg.push_back(8'hA3);
    hash(msg, h, cyc);
    e = hexd(256'h79f38adec5c20307a98ef76e8324afbfd46cfd81b22e3973c65fa1bd9de31787);
    checks++; if (h !== e) begin failures++; $display("a3x200: got %h", h); end

    foreach (lens[k]) begin
      msg.delete();
      for (int i = 0; i < lens[k]; i++) msg.push_back(8'($urandom));
      hash(msg, h, cyc);
      checks++;
      if (h !== ref_sha3(msg)) begin failures++; $display("len %0d mismatch", lens[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int lens[] = '{1, 135, 136, 137, 271, 272, 273};
endmodule
