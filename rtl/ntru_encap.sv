// ntru_encap: NTRU-HPS key encapsulation core.
//
// From a packed public key h and a stream of random bits it computes
//   (r, m)  <- sample: r variable weight, m fixed weight (D ones, D minus ones)
//   h       <- UNPACK_q(h_pkd)
//   c       <- r * h + Lift(m)  mod (q, x^n - 1)
//   c_pkd   <- PACK_q(c)                     (streamed out)
//   k       <- SHA3-256(PACK_3(r) || PACK_3(m))
// Lift is the HPS one, sign extension of the ternary coefficients.
//
// Memories: S1 holds r, S2 holds m (2-bit trit codes), L1 holds h, then r*h,
// then c (LOGQ bits). The schedule:
//   LOAD    r is sampled into S1 and, at the same time, shifted into the
//           operand registers of the ternary x-net multiplier; h is unpacked
//           from the input byte stream into L1.
//   MUL     h is read from L1 (h_{n-1} first) into the multiplier, n cycles;
//           in parallel the fixed-weight sampler produces m into S2.
//   UNLOAD  r*h leaves the multiplier top coefficient first and overwrites h
//           in L1, n cycles.
//   ADD     c = r*h + Lift(m) coefficient by coefficient, written back to L1.
//   PACK    c is packed into bytes and streamed out on ct_*.
//   KEY     kgen reads r and m, packs them, and SHA3-256 hashes them.
// `done` pulses when the key is ready; ct_last marks the final ciphertext byte.
// The random port gives 16 bits per word; the variable-weight sampler uses the
// low 2 (rejection) or 8 (modulo) bits, the fixed-weight one the low
// ceil(log2 n) bits, so the top bits (15:10 at n = 677) are unused; the
// port is kept at a fixed 16 bits for every n. The ciphertext output has no
// back-pressure. Status outputs of the sub-units that the control does not
// need (busy, done, reject counters) are left open on purpose.
// The algorithm, the units and the memory names follow the document; the
// exact phase boundaries (the document overlaps more of them), one
// coefficient per cycle on every transfer and the port protocols are this
// design's choices.
// MUL_ARCH picks the polynomial multiplier: the x-net (default, n steps per
// product) or the single-MAC Comba unit (n*n cycles per product); both have
// the same ports, so the control is identical.
module ntru_encap
  import ntru_pkg::*;
#(
  parameter int unsigned N        = DEF_N,
  parameter int unsigned LOGQ     = DEF_LOGQ,
  parameter int unsigned D        = DEF_D,
  parameter sample_alg_e VAR_ALG  = SAMPLE_REJECTION,
  parameter mul_arch_e   MUL_ARCH = MUL_XNET,
  localparam int unsigned IW      = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         busy,
  output logic         done,
  // random bits
  input  logic         rnd_valid,
  input  logic [15:0]  rnd_data,
  output logic         rnd_ready,
  // packed public key in
  input  logic         pk_valid,
  input  logic [7:0]   pk_byte,
  output logic         pk_ready,
  // packed ciphertext out
  output logic         ct_valid,
  output logic [7:0]   ct_byte,
  output logic         ct_last,
  // shared key
  output logic [255:0] key
);

  typedef enum logic [3:0] {
    E_IDLE, E_LOAD, E_MUL, E_MUL_WAIT, E_UNLOAD, E_WAIT_M, E_ADD, E_ADD_WAIT,
    E_PACK, E_PACK_WAIT, E_KEY
  } estate_e;

  localparam int unsigned VRW = (VAR_ALG == SAMPLE_MODULO) ? 8 : 2;

  estate_e       st_q;
  logic [IW-1:0] cnt_q;       // address counter of the current phase
  logic          r_done_q, h_done_q, m_done_q;

  logic enter_load, enter_mul, enter_key;

  // ---------------------------------------------------------------- samplers
  logic          sv_rnd_ready, sv_valid, sv_done;
  trit_t         sv_trit;
  logic [IW-1:0] sv_idx;
  logic          sf_rnd_ready, sf_valid, sf_done, sf_busy;
  trit_t         sf_trit;
  logic [IW-1:0] sf_idx;

  sampler_var #(.N(N), .ALG(VAR_ALG)) u_sample_r (
    .clk, .rst_n,
    .start       (enter_load),
    .rnd_valid   (rnd_valid && !sf_busy),
    .rnd_data    (rnd_data[VRW-1:0]),
    .rnd_ready   (sv_rnd_ready),
    .out_valid   (sv_valid),
    .out_trit    (sv_trit),
    .out_idx     (sv_idx),
    .done        (sv_done),
    .busy        (),
    .reject_count()
  );

  sampler_fixed #(.N(N), .D(D)) u_sample_m (
    .clk, .rst_n,
    .start       (enter_mul),
    .rnd_valid   (rnd_valid),
    .rnd_data    (rnd_data[IW-1:0]),
    .rnd_ready   (sf_rnd_ready),
    .out_valid   (sf_valid),
    .out_trit    (sf_trit),
    .out_idx     (sf_idx),
    .done        (sf_done),
    .busy        (sf_busy),
    .reject_count()
  );

  assign rnd_ready = sv_rnd_ready || sf_rnd_ready;

  // ---------------------------------------------------------------- unpack h
  logic            uq_valid, uq_done;
  logic [LOGQ-1:0] uq_data;
  logic [IW-1:0]   uq_idx;

  unpack_q #(.N(N), .LOGQ(LOGQ)) u_unpack_h (
    .clk, .rst_n,
    .start    (enter_load),
    .sum_zero (1'b1),
    .in_valid (pk_valid),
    .in_byte  (pk_byte),
    .in_ready (pk_ready),
    .out_valid(uq_valid),
    .out_data (uq_data),
    .out_idx  (uq_idx),
    .done     (uq_done),
    .busy     ()
  );

  // ---------------------------------------------------------------- memories
  logic            s1_we, s1_re, s2_we, s2_re, l1_we, l1_re;
  logic [IW-1:0]   s1_wa, s1_ra, s2_wa, s2_ra, l1_wa, l1_ra;
  trit_t           s1_wd, s1_rd, s2_wd, s2_rd;
  logic [LOGQ-1:0] l1_wd, l1_rd;

  poly_ram #(.DEPTH(N), .WIDTH(2)) u_s1 (
    .clk, .wr_en(s1_we), .wr_addr(s1_wa), .wr_data(s1_wd),
    .rd_en(s1_re), .rd_addr(s1_ra), .rd_data(s1_rd));
  poly_ram #(.DEPTH(N), .WIDTH(2)) u_s2 (
    .clk, .wr_en(s2_we), .wr_addr(s2_wa), .wr_data(s2_wd),
    .rd_en(s2_re), .rd_addr(s2_ra), .rd_data(s2_rd));
  poly_ram #(.DEPTH(N), .WIDTH(LOGQ)) u_l1 (
    .clk, .wr_en(l1_we), .wr_addr(l1_wa), .wr_data(l1_wd),
    .rd_en(l1_re), .rd_addr(l1_ra), .rd_data(l1_rd));

  // ---------------------------------------------------------------- multiplier
  logic            mul_busy, acc_clear, out_shift, b_valid;
  logic [LOGQ-1:0] c_out;

  if (MUL_ARCH == MUL_XNET) begin : g_xnet
    xnet_mul #(.N(N), .LOGQ(LOGQ), .TERNARY_A(1'b1)) u_mul (
      .clk, .rst_n,
      .a_load   (sv_valid),
      .a_in     (sv_trit),
      .acc_clear(acc_clear),
      .b_valid  (b_valid),
      .b_in     (l1_rd),
      .out_shift(out_shift),
      .c_out    (c_out),
      .busy     (mul_busy)
    );
  end else begin : g_comba
    comba_mul #(.N(N), .LOGQ(LOGQ), .TERNARY_A(1'b1)) u_mul (
      .clk, .rst_n,
      .a_load   (sv_valid),
      .a_in     (sv_trit),
      .acc_clear(acc_clear),
      .b_valid  (b_valid),
      .b_in     (l1_rd),
      .out_shift(out_shift),
      .c_out    (c_out),
      .busy     (mul_busy)
    );
  end

  // ---------------------------------------------------------------- adder
  logic          rd_v_q;       // an L1 read issued last cycle (MUL / ADD)
  logic [IW-1:0] rd_tag_q;     // its address
  logic            add_in_valid, add_out_valid;
  logic [LOGQ-1:0] add_c;
  logic [IW-1:0]   add_tag;

  poly_addsub #(.LOGQ(LOGQ), .TW(1), .TAG_W(IW)) u_add (
    .clk, .rst_n,
    .in_valid (add_in_valid),
    .sub      (1'b0),
    .a        (l1_rd),
    .b        (LOGQ'(trit_to_zq(s2_rd))),
    .in_tag   (rd_tag_q),
    .out_valid(add_out_valid),
    .c        (add_c),
    .out_tag  (add_tag)
  );

  // ---------------------------------------------------------------- pack c
  logic pq_in_valid, pq_in_last, pq_in_ready, pq_done;
  logic have_q;              // l1_rd holds a coefficient not yet packed
  logic [IW-1:0] have_idx_q;

  pack_q #(.LOGQ(LOGQ)) u_pack_c (
    .clk, .rst_n,
    .in_valid (pq_in_valid),
    .in_last  (pq_in_last),
    .in_data  (l1_rd),
    .in_ready (pq_in_ready),
    .out_valid(ct_valid),
    .out_byte (ct_byte),
    .done     (pq_done)
  );
  assign ct_last = pq_done;

  // ---------------------------------------------------------------- key
  logic          kg_rd_en, kg_rd_sel, kg_valid, kg_last, kg_ready;
  logic [IW-1:0] kg_rd_addr;
  logic [7:0]    kg_byte;
  logic          kg_sel_q;
  logic          h_done;

  kgen #(.N(N)) u_kgen (
    .clk, .rst_n,
    .start    (enter_key),
    .rd_en    (kg_rd_en),
    .rd_sel   (kg_rd_sel),
    .rd_addr  (kg_rd_addr),
    .rd_data  (kg_sel_q ? s2_rd : s1_rd),
    .out_valid(kg_valid),
    .out_byte (kg_byte),
    .out_last (kg_last),
    .out_ready(kg_ready),
    .done     ()
  );

  sha3_256 u_sha3 (
    .clk, .rst_n,
    .start   (enter_key),
    .in_valid(kg_valid),
    .in_last (kg_last),
    .in_byte (kg_byte),
    .in_ready(kg_ready),
    .done    (h_done),
    .digest  (key)
  );

  // ---------------------------------------------------------------- control
  logic          pack_fire, pack_issue;

  assign enter_load = (st_q == E_IDLE) && start;
  assign enter_mul  = (st_q == E_LOAD) && r_done_q && h_done_q;
  assign enter_key  = (st_q == E_PACK_WAIT) && pq_done;

  assign b_valid      = (st_q inside {E_MUL, E_MUL_WAIT}) && rd_v_q;
  assign add_in_valid = (st_q inside {E_ADD, E_ADD_WAIT}) && rd_v_q;
  assign acc_clear    = enter_load;
  assign out_shift    = (st_q == E_UNLOAD);

  assign pq_in_valid = (st_q == E_PACK) && have_q;
  assign pq_in_last  = (have_idx_q == IW'(N - 2));
  assign pack_fire   = pq_in_valid && pq_in_ready;
  assign pack_issue  = (st_q == E_PACK) && (!have_q || pack_fire) && (cnt_q < IW'(N - 1));

  always_comb begin
    // S1: r from the sampler, read by kgen
    s1_we = sv_valid;  s1_wa = sv_idx;  s1_wd = sv_trit;
    s1_re = kg_rd_en && !kg_rd_sel;  s1_ra = kg_rd_addr;
    // S2: m from the sampler, read by the adder and by kgen
    s2_we = sf_valid;  s2_wa = sf_idx;  s2_wd = sf_trit;
    s2_re = (st_q == E_ADD) || (kg_rd_en && kg_rd_sel);
    s2_ra = (st_q == E_ADD) ? cnt_q : kg_rd_addr;
    // L1: h, r*h, c
    l1_we = 1'b0;  l1_wa = cnt_q;  l1_wd = c_out;
    l1_re = 1'b0;  l1_ra = cnt_q;
    unique case (st_q)
      E_LOAD:   begin l1_we = uq_valid; l1_wa = uq_idx; l1_wd = uq_data; end
      E_MUL:    l1_re = 1'b1;
      E_UNLOAD: begin l1_we = 1'b1; l1_wa = cnt_q; l1_wd = c_out; end
      E_ADD:    l1_re = 1'b1;
      E_PACK:   l1_re = pack_issue;
      default: ;
    endcase
    if (st_q inside {E_ADD, E_ADD_WAIT} && add_out_valid) begin
      l1_we = 1'b1; l1_wa = add_tag; l1_wd = add_c;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= E_IDLE;
      cnt_q      <= '0;
      r_done_q   <= 1'b0;
      h_done_q   <= 1'b0;
      m_done_q   <= 1'b0;
      rd_v_q     <= 1'b0;
      rd_tag_q   <= '0;
      have_q     <= 1'b0;
      have_idx_q <= '0;
      kg_sel_q   <= 1'b0;
      done       <= 1'b0;
    end else begin
      a_one_rnd_consumer: assert (!(sv_rnd_ready && sf_rnd_ready));
      done     <= 1'b0;
      rd_v_q   <= l1_re && (st_q inside {E_MUL, E_ADD});
      rd_tag_q <= cnt_q;
      kg_sel_q <= kg_rd_sel;
      if (sv_done) r_done_q <= 1'b1;
      if (uq_done) h_done_q <= 1'b1;
      if (sf_done) m_done_q <= 1'b1;
      unique case (st_q)
        E_IDLE: if (start) begin
          st_q     <= E_LOAD;
          r_done_q <= 1'b0;
          h_done_q <= 1'b0;
          m_done_q <= 1'b0;
        end
        E_LOAD: if (enter_mul) begin
          st_q  <= E_MUL;
          cnt_q <= IW'(N - 1);
        end
        E_MUL: begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == '0) st_q <= E_MUL_WAIT;
        end
        E_MUL_WAIT: if (!rd_v_q && !mul_busy) begin
          st_q  <= E_UNLOAD;
          cnt_q <= IW'(N - 1);
        end
        E_UNLOAD: begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == '0) st_q <= E_WAIT_M;
        end
        E_WAIT_M: if (m_done_q) begin
          st_q  <= E_ADD;
          cnt_q <= '0;
        end
        E_ADD: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == IW'(N - 1)) st_q <= E_ADD_WAIT;
        end
        E_ADD_WAIT: if (!rd_v_q && !add_out_valid) begin
          st_q   <= E_PACK;
          cnt_q  <= '0;
          have_q <= 1'b0;
        end
        E_PACK: begin
          if (pack_issue) begin
            cnt_q      <= cnt_q + 1'b1;
            have_idx_q <= cnt_q;
          end
          have_q <= pack_issue || (have_q && !pack_fire);
          if (pack_fire && pq_in_last) st_q <= E_PACK_WAIT;
        end
        E_PACK_WAIT: if (pq_done) st_q <= E_KEY;
        E_KEY: if (h_done) begin
          st_q <= E_IDLE;
          done <= 1'b1;
        end
        default: st_q <= E_IDLE;
      endcase
    end
  end

  assign busy = (st_q != E_IDLE);

endmodule
