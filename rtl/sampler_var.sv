// sampler_var: variable-weight ternary polynomial sampler.
//
// Draws n-1 independent uniform coefficients in {0, 1, -1} from a stream of
// random bits, followed by a final zero coefficient (coefficient n-1), so the
// polynomial has n coefficients. Two algorithms, chosen by ALG:
//   SAMPLE_MODULO     each coefficient is an 8-bit random number reduced mod 3
//                     by the pipelined Mersenne reducer: one coefficient per
//                     random word, constant time, close to uniform.
//   SAMPLE_REJECTION  each coefficient is a 2-bit random number; the single
//                     invalid code 3 is rejected and a new word is taken:
//                     exactly uniform, variable time, fewer random bits.
// Coefficients leave as trit codes 0, 1, 2 (= -1) with out_valid, in
// ascending order, out_idx giving the index; `done` pulses with the last one.
// The consumer must take a coefficient every cycle it is offered. The random
// port is valid/ready with RND_W bits per word (8 or 2). Both algorithms are
// the document's; the zero last coefficient, one coefficient per cycle and the
// port handshake are this design's choices.
module sampler_var
  import ntru_pkg::*;
#(
  parameter int unsigned N        = 677,
  parameter sample_alg_e ALG      = SAMPLE_REJECTION,
  localparam int unsigned RND_W   = (ALG == SAMPLE_MODULO) ? 8 : 2,
  localparam int unsigned IW      = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             rnd_valid,
  input  logic [RND_W-1:0] rnd_data,
  output logic             rnd_ready,
  output logic             out_valid,
  output trit_t            out_trit,
  output logic [IW-1:0]    out_idx,
  output logic             done,
  output logic             busy,
  output logic [31:0]      reject_count
);

  logic [IW-1:0] issued_q;     // random words turned into coefficients
  logic [IW-1:0] emitted_q;    // coefficients handed out
  logic          active_q;

  logic take;
  assign rnd_ready = active_q && (issued_q < IW'(N - 1));
  assign take      = rnd_ready && rnd_valid;

  // Candidate coefficient from the random word.
  logic       cand_valid;
  logic [1:0] cand;
  logic       rejected;

  if (ALG == SAMPLE_MODULO) begin : g_modulo
    mod3_reduce #(.W(8)) u_mod3 (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (take),
      .in_data  (rnd_data),
      .out_valid(cand_valid),
      .out_data (cand)
    );
    assign rejected = 1'b0;
  end else begin : g_rejection
    assign rejected   = take && (rnd_data == 2'd3);
    assign cand_valid = take && !rejected;
    assign cand       = rnd_data;
  end

  logic accepted;
  assign accepted = (ALG == SAMPLE_MODULO) ? take : cand_valid;

  // The final zero coefficient goes out once all n-1 sampled ones have.
  logic emit_sample, emit_last;
  assign emit_sample = cand_valid;
  assign emit_last   = active_q && !cand_valid && (emitted_q == IW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issued_q     <= '0;
      emitted_q    <= '0;
      active_q     <= 1'b0;
      out_valid    <= 1'b0;
      out_trit     <= TRIT_ZERO;
      out_idx      <= '0;
      done         <= 1'b0;
      reject_count <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (start) begin
        issued_q  <= '0;
        emitted_q <= '0;
        active_q  <= 1'b1;
      end else if (active_q) begin
        if (accepted) issued_q <= issued_q + 1'b1;
        if (rejected) reject_count <= reject_count + 1;
        if (emit_sample) begin
          out_valid <= 1'b1;
          out_trit  <= trit_t'(cand);
          out_idx   <= emitted_q;
          emitted_q <= emitted_q + 1'b1;
        end else if (emit_last) begin
          out_valid <= 1'b1;
          out_trit  <= TRIT_ZERO;
          out_idx   <= emitted_q;
          done      <= 1'b1;
          active_q  <= 1'b0;
        end
      end
    end
  end

  assign busy = active_q;

endmodule
