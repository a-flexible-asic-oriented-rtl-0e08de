// sha3_256: SHA3-256 hash (FIPS 202) of a byte stream.
//
// The Keccak-f[1600] state is 25 lanes of 64 bits; lane (x, y) is lane index
// x + 5y, and byte p of the rate is byte p mod 8 of lane p / 8. Input bytes are
// XORed into the state one per cycle (valid/ready, in_last with the final
// byte). When the 136-byte rate is full, or after the final byte, the
// permutation runs one round per cycle for 24 cycles. After the final byte the
// padding (0x06 after the message, 0x80 in the last rate byte) is XORed in and
// the last block is permuted; `done` then pulses and `digest` holds the 32-byte
// hash, byte 0 in bits [7:0]. `start` clears the state for a new message.
// Messages must have at least one byte. The document uses a Keccak module
// without describing it; this one-round-per-cycle core is this design's.
module sha3_256 (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         in_valid,
  input  logic         in_last,
  input  logic [7:0]   in_byte,
  output logic         in_ready,
  output logic         done,
  output logic [255:0] digest
);

  localparam int unsigned RATE = 136;

  typedef logic [63:0] lane_t;
  typedef lane_t state_t [25];

  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A,
    64'h8000000080008000, 64'h000000000000808B, 64'h0000000080000001,
    64'h8000000080008081, 64'h8000000000008009, 64'h000000000000008A,
    64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089,
    64'h8000000000008003, 64'h8000000000008002, 64'h8000000000000080,
    64'h000000000000800A, 64'h800000008000000A, 64'h8000000080008081,
    64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  // Rotation offsets of the rho step, lane index x + 5y.
  localparam int RHO [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14};

  function automatic lane_t rotl(input lane_t v, input int r);
    return (r == 0) ? v : ((v << r) | (v >> (64 - r)));
  endfunction

  function automatic state_t keccak_round(input state_t a, input lane_t rc);
    lane_t  c [5];
    lane_t  d [5];
    state_t b, o;
    for (int x = 0; x < 5; x++)
      c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    // theta, rho and pi: B[y, 2x+3y] = rot(A[x, y] ^ D[x], r[x, y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y] ^ d[x], RHO[x + 5*y]);
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    o[0] = o[0] ^ rc;
    return o;
  endfunction

  typedef enum logic [1:0] {S_ABSORB, S_PERMUTE, S_PAD, S_DONE} state_e;
  state_e     st_q;
  state_t     s_q;
  logic [7:0] pos_q;
  logic [4:0] round_q;
  logic       pad_pending_q;   // the message ended exactly at a block boundary
  logic       final_q;         // the block being permuted is the last one

  assign in_ready = (st_q == S_ABSORB);

  always_comb
    for (int i = 0; i < 4; i++) digest[64*i +: 64] = s_q[i];

  // state with the SHA3 padding (0x06 ... 0x80) applied at byte pos_q
  state_t padded;
  always_comb begin
    padded = s_q;
    padded[pos_q / 8][8*(pos_q % 8) +: 8] = padded[pos_q / 8][8*(pos_q % 8) +: 8] ^ 8'h06;
    padded[(RATE-1) / 8][56 +: 8]         = padded[(RATE-1) / 8][56 +: 8] ^ 8'h80;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= S_ABSORB;
      pos_q         <= '0;
      round_q       <= '0;
      pad_pending_q <= 1'b0;
      final_q       <= 1'b0;
      done          <= 1'b0;
      for (int i = 0; i < 25; i++) s_q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        st_q          <= S_ABSORB;
        pos_q         <= '0;
        pad_pending_q <= 1'b0;
        final_q       <= 1'b0;
        for (int i = 0; i < 25; i++) s_q[i] <= '0;
      end else begin
        unique case (st_q)
          S_ABSORB: if (in_valid) begin
            s_q[pos_q / 8][8*(pos_q % 8) +: 8] <= s_q[pos_q / 8][8*(pos_q % 8) +: 8] ^ in_byte;
            if (pos_q == 8'(RATE - 1)) begin
              pos_q         <= '0;
              round_q       <= '0;
              pad_pending_q <= in_last;
              st_q          <= S_PERMUTE;
            end else begin
              pos_q <= pos_q + 1'b1;
              if (in_last) st_q <= S_PAD;
            end
          end
          S_PERMUTE: begin
            s_q     <= keccak_round(s_q, RC[round_q]);
            round_q <= round_q + 1'b1;
            if (round_q == 5'd23) begin
              if (final_q) begin
                st_q <= S_DONE;
                done <= 1'b1;
              end else if (pad_pending_q) begin
                st_q <= S_PAD;
              end else begin
                st_q <= S_ABSORB;
              end
            end
          end
          S_PAD: begin
            s_q           <= padded;
            pad_pending_q <= 1'b0;
            final_q       <= 1'b1;
            round_q       <= '0;
            st_q          <= S_PERMUTE;
          end
          S_DONE: ;
          default: st_q <= S_ABSORB;
        endcase
      end
    end
  end

endmodule
