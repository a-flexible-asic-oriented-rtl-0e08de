// sampler_fixed: fixed-weight ternary polynomial sampler (Fisher-Yates).
//
// Builds the vector of n-1 coefficients whose first D entries are +1, the next
// D entries are -1 and the rest 0, then scrambles it with the Fisher-Yates
// shuffle: for i = n-2 down to 1 a uniform index j in [0, i] is drawn and
// entries i and j are swapped. j comes from a random word of IW bits masked to
// the bit length of i; a masked value above i is rejected and a new word is
// taken (rejection sampling), so j is exactly uniform. The vector is held in
// flip-flops, one swap per cycle, so every access takes the same time.
// Afterwards the coefficients leave in ascending order, one per cycle, as trit
// codes 0, 1, 2 (= -1), followed by coefficient n-1 = 0; `done` pulses with the
// last one. Latency: 1 cycle to fill, n-2 accepted random words, n cycles out.
// The initial vector and the Fisher-Yates shuffle follow the document; the
// rejection draw of j, the register array and the zero last coefficient are
// this design's choices.
module sampler_fixed
  import ntru_pkg::*;
#(
  parameter int unsigned N  = 677,
  parameter int unsigned D  = 127,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          rnd_valid,
  input  logic [IW-1:0] rnd_data,
  output logic          rnd_ready,
  output logic          out_valid,
  output trit_t         out_trit,
  output logic [IW-1:0] out_idx,
  output logic          done,
  output logic          busy,
  output logic [31:0]   reject_count
);

  localparam int unsigned M = N - 1;   // sampled coefficients

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_SHUFFLE, S_OUT} state_e;
  state_e        state_q;
  trit_t         v_q [M];
  logic [IW-1:0] i_q;

  // Mask with as many ones as the bit length of i.
  function automatic logic [IW-1:0] len_mask(input logic [IW-1:0] i);
    logic [IW-1:0] m;
    m = '0;
    for (int b = 0; b < int'(IW); b++)
      if (i >= (IW'(1) << b)) m[b] = 1'b1;
    m[0] = 1'b1;
    return m;
  endfunction

  logic [IW-1:0] j;
  logic          draw_ok;
  assign rnd_ready = (state_q == S_SHUFFLE);
  assign j         = rnd_data & len_mask(i_q);
  assign draw_ok   = rnd_valid && rnd_ready && (j <= i_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      i_q          <= '0;
      out_valid    <= 1'b0;
      out_trit     <= TRIT_ZERO;
      out_idx      <= '0;
      done         <= 1'b0;
      reject_count <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) state_q <= S_FILL;
        S_FILL: begin
          for (int unsigned k = 0; k < M; k++)
            v_q[k] <= (k < D) ? TRIT_POS : (k < 2 * D) ? TRIT_NEG : TRIT_ZERO;
          i_q     <= IW'(M - 1);
          state_q <= S_SHUFFLE;
        end
        S_SHUFFLE: begin
          if (rnd_valid) begin
            if (draw_ok) begin
              v_q[i_q] <= v_q[j];
              v_q[j]   <= v_q[i_q];
              if (i_q == IW'(1)) begin
                i_q     <= '0;
                state_q <= S_OUT;
              end else begin
                i_q <= i_q - 1'b1;
              end
            end else begin
              reject_count <= reject_count + 1;
            end
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_idx   <= i_q;
          out_trit  <= (i_q == IW'(M)) ? TRIT_ZERO : v_q[i_q];
          if (i_q == IW'(M)) begin
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

endmodule
