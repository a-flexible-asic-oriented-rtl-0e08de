// xnet_mul: x-net polynomial multiplier, c = a * b mod (q, x^n - 1), in n
// cycles.
//
// Operand a is copied into n registers a_0..a_{n-1}. The result lives in a
// ring of n accumulator registers c_0..c_{n-1} wired as an LFSR whose feedback
// is a plain wire from c_{n-1} back to c_0; that wire performs the reduction
// mod x^n - 1 at every clock. Each cycle one coefficient b_j of the other
// operand is broadcast to all n lanes and every lane k updates
//     c_{(k+1) mod n} <= c_k + a_k * b_j        (mod q)
// The coefficients of b are fed from b_{n-1} down to b_0. After the n-th step
// register c_0 holds result coefficient n-1; each further rotation (out_shift)
// brings the next lower coefficient to c_0, so the result leaves in descending
// order c_{n-1}, c_{n-2}, ..., c_0.
//
// TERNARY_A = 1 gives the small-by-large multiplier: a_k is a ternary code
// (0, 1, 2 = -1) and each lane's multiplier is a 3-input multiplexer choosing
// among 0, b_j and -b_j; -b_j is computed once and broadcast. TERNARY_A = 0
// gives the large-by-large multiplier with one LOGQ x LOGQ multiplier per lane.
// b_j and -b_j are registered once before the broadcast, so a step takes
// effect one cycle after b_valid.
//
// Interface (all synchronous to clk):
//   a_load      shift a_in into the a registers; feed a_0 first, n loads fill them
//   acc_clear   zero the accumulator ring
//   b_valid     b_in is the next coefficient of b (n-1 first)
//   out_shift   rotate the ring by one, without accumulation
//   c_out       current content of c_0
//   busy        a b step is still in the input register
// The lane structure, the LFSR reduction and the ternary multiplexer follow the
// document; the command interface and the single input register are this
// design's own. One a coefficient is loaded and one c coefficient leaves per
// cycle.
module xnet_mul #(
  parameter int unsigned N         = 677,
  parameter int unsigned LOGQ      = 11,
  parameter bit          TERNARY_A = 1'b1,
  localparam int unsigned AW       = TERNARY_A ? 2 : LOGQ
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            a_load,
  input  logic [AW-1:0]   a_in,
  input  logic            acc_clear,
  input  logic            b_valid,
  input  logic [LOGQ-1:0] b_in,
  input  logic            out_shift,
  output logic [LOGQ-1:0] c_out,
  output logic            busy
);

  logic [AW-1:0]   a_q [N];
  logic [LOGQ-1:0] c_q [N];
  logic [LOGQ-1:0] b_q, nb_q;
  logic            step_q;

  // Operand a: shift register, a_0 loaded first ends in a_q[0].
  always_ff @(posedge clk) begin
    if (a_load) begin
      for (int unsigned k = 0; k + 1 < N; k++) a_q[k] <= a_q[k+1];
      a_q[N-1] <= a_in;
    end
  end

  // Broadcast register for b_j and -b_j.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q <= 1'b0;
      b_q    <= '0;
      nb_q   <= '0;
    end else begin
      step_q <= b_valid;
      if (b_valid) begin
        b_q  <= b_in;
        nb_q <= LOGQ'(0) - b_in;
      end
    end
  end

  // Per-lane product a_k * b_j mod q.
  logic [LOGQ-1:0] prod [N];
  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      if (TERNARY_A) begin
        unique case (a_q[k][1:0])
          2'd1:    prod[k] = b_q;
          2'd2:    prod[k] = nb_q;
          default: prod[k] = '0;
        endcase
      end else begin
        prod[k] = LOGQ'(a_q[k] * b_q);
      end
    end
  end

  // Accumulator ring (LFSR with wire feedback c_{n-1} -> c_0).
  always_ff @(posedge clk) begin
    if (acc_clear) begin
      for (int unsigned k = 0; k < N; k++) c_q[k] <= '0;
    end else if (step_q) begin
      for (int unsigned k = 0; k < N; k++) c_q[(k + 1) % N] <= c_q[k] + prod[k];
    end else if (out_shift) begin
      for (int unsigned k = 0; k < N; k++) c_q[(k + 1) % N] <= c_q[k];
    end
  end

  assign c_out = c_q[0];
  assign busy  = step_q;

endmodule
