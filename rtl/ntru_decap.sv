// ntru_decap: NTRU-HPS key decapsulation core with implicit rejection.
//
// From the packed private key (f, f_p, h_q and the 32-byte secret s) and a
// packed ciphertext c it computes
//   a  <- c * f  mod (q, x^n - 1), then reduced mod (3, x^n - 1)
//   m  <- a * f_p mod (3, Phi_n)
//   r  <- (c - Lift(m)) * h_q mod (q, Phi_n)
//   k1 <- SHA3-256(PACK_3(r) || PACK_3(m)),  k2 <- SHA3-256(s || PACK_q(c))
//   key = k1 if c = 0 mod (q, Phi_1), r is ternary and m has weight 2D,
//         key = k2 otherwise (fail = 1).
// All three products run on one large-by-large x-net multiplier (n lanes with
// a LOGQ x LOGQ multiplier each); ternary operands are lifted into Z_q first.
// Each product takes n cycles and leaves the multiplier top coefficient first,
// straight into the embed unit, which reduces mod 3 or mod q and mod Phi_n on
// the fly. The validator checks c while it is unpacked, m and r while they
// leave the embed unit.
//
// Memories: S_FP (f_p), S_M (m), S_R (r) hold 2-bit trit codes; L_C (c),
// L_HQ (h_q) and L_T (a mod 3, lifted) hold LOGQ-bit coefficients; f and then
// f_p and c - m' live only in the multiplier's operand registers.
// Input: one byte stream carrying f_pkd, f_p_pkd (ceil((n-1)/5) bytes each),
// h_q_pkd (ceil((n-1) LOGQ / 8) bytes), s (32 bytes) and then c_pkd
// (ceil((n-1) LOGQ / 8) bytes), valid/ready. `done` pulses with key and fail
// valid. The operations, their order and the checks follow the document; the
// memory allocation, the single byte input, computing k2 after k1 and one
// coefficient per cycle everywhere are this design's choices. Status outputs
// of the sub-units that the control does not need (busy, done, the weight
// counters, the adder tag) are left open on purpose.
// MUL_ARCH picks the polynomial multiplier: the x-net (default, n steps per
// product) or the single-MAC Comba unit (n*n cycles per product); both have
// the same ports, so the control is identical.
module ntru_decap
  import ntru_pkg::*;
#(
  parameter int unsigned N    = DEF_N,
  parameter int unsigned LOGQ = DEF_LOGQ,
  parameter int unsigned D    = DEF_D,
  parameter mul_arch_e MUL_ARCH = MUL_XNET,
  localparam int unsigned IW  = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         busy,
  output logic         done,
  input  logic         in_valid,
  input  logic [7:0]   in_byte,
  output logic         in_ready,
  output logic [255:0] key,
  output logic         fail
);

  typedef enum logic [4:0] {
    D_IDLE, D_F, D_FP, D_HQ, D_S, D_C,
    D_MUL1, D_MW1, D_UNL1, D_UW1,
    D_MUL2, D_MW2, D_UNL2, D_UW2,
    D_SUB, D_SW,
    D_MUL3, D_MW3, D_UNL3, D_UW3,
    D_K1, D_K2
  } dstate_e;

  localparam int unsigned FD = 16;   // depth of the k2 byte FIFO

  dstate_e       st_q;
  logic [IW-1:0] cnt_q;      // read / unload counter
  logic [IW-1:0] wcnt_q;     // write counter behind the embed unit
  logic [IW-1:0] fcnt_q;     // f_p load counter
  logic          wdone_q, fdone_q;
  logic [5:0]    scnt_q;
  logic [255:0]  s_q, k1_q;
  logic          c_ok_q, m_ok_q, r_ok_q;

  // ---------------------------------------------------------------- unpackers
  logic          up_start, up_in_ready, up_valid, up_done;
  trit_t         up_trit;
  logic [IW-1:0] up_idx;
  logic            uq_start, uq_in_ready, uq_valid, uq_done;
  logic [LOGQ-1:0] uq_data;
  logic [IW-1:0]   uq_idx;

  unpack_p #(.N(N)) u_unpack_p (
    .clk, .rst_n, .start(up_start),
    .in_valid (in_valid && (st_q inside {D_F, D_FP})),
    .in_byte, .in_ready(up_in_ready),
    .out_valid(up_valid), .out_trit(up_trit), .out_idx(up_idx),
    .done(up_done), .busy());

  unpack_q #(.N(N), .LOGQ(LOGQ)) u_unpack_q (
    .clk, .rst_n, .start(uq_start), .sum_zero(st_q == D_S),
    .in_valid (in_valid && (st_q inside {D_HQ, D_C})),
    .in_byte, .in_ready(uq_in_ready),
    .out_valid(uq_valid), .out_data(uq_data), .out_idx(uq_idx),
    .done(uq_done), .busy());

  always_comb begin
    unique case (st_q)
      D_F, D_FP: in_ready = up_in_ready;
      D_HQ, D_C: in_ready = uq_in_ready;
      D_S:       in_ready = 1'b1;
      default:   in_ready = 1'b0;
    endcase
  end

  // ---------------------------------------------------------------- memories
  logic            fp_we, fp_re, m_we, m_re, r_we, r_re;
  logic [IW-1:0]   fp_wa, fp_ra, m_wa, m_ra, r_wa, r_ra;
  trit_t           fp_wd, fp_rd, m_wd, m_rd, r_wd, r_rd;
  logic            c_we, c_re, hq_we, hq_re, t_we, t_re;
  logic [IW-1:0]   c_wa, c_ra, hq_wa, hq_ra, t_wa, t_ra;
  logic [LOGQ-1:0] c_wd, c_rd, hq_wd, hq_rd, t_wd, t_rd;

  poly_ram #(.DEPTH(N), .WIDTH(2)) u_s_fp (
    .clk, .wr_en(fp_we), .wr_addr(fp_wa), .wr_data(fp_wd), .rd_en(fp_re), .rd_addr(fp_ra), .rd_data(fp_rd));
  poly_ram #(.DEPTH(N), .WIDTH(2)) u_s_m (
    .clk, .wr_en(m_we), .wr_addr(m_wa), .wr_data(m_wd), .rd_en(m_re), .rd_addr(m_ra), .rd_data(m_rd));
  poly_ram #(.DEPTH(N), .WIDTH(2)) u_s_r (
    .clk, .wr_en(r_we), .wr_addr(r_wa), .wr_data(r_wd), .rd_en(r_re), .rd_addr(r_ra), .rd_data(r_rd));
  poly_ram #(.DEPTH(N), .WIDTH(LOGQ)) u_l_c (
    .clk, .wr_en(c_we), .wr_addr(c_wa), .wr_data(c_wd), .rd_en(c_re), .rd_addr(c_ra), .rd_data(c_rd));
  poly_ram #(.DEPTH(N), .WIDTH(LOGQ)) u_l_hq (
    .clk, .wr_en(hq_we), .wr_addr(hq_wa), .wr_data(hq_wd), .rd_en(hq_re), .rd_addr(hq_ra), .rd_data(hq_rd));
  poly_ram #(.DEPTH(N), .WIDTH(LOGQ)) u_l_t (
    .clk, .wr_en(t_we), .wr_addr(t_wa), .wr_data(t_wd), .rd_en(t_re), .rd_addr(t_ra), .rd_data(t_rd));

  // ---------------------------------------------------------------- datapath
  logic            a_load, acc_clear, b_valid, out_shift, mul_busy;
  logic [LOGQ-1:0] a_in, b_in, c_out;

  if (MUL_ARCH == MUL_XNET) begin : g_xnet
    xnet_mul #(.N(N), .LOGQ(LOGQ), .TERNARY_A(1'b0)) u_mul (
      .clk, .rst_n, .a_load, .a_in, .acc_clear, .b_valid, .b_in, .out_shift,
      .c_out, .busy(mul_busy));
  end else begin : g_comba
    comba_mul #(.N(N), .LOGQ(LOGQ), .TERNARY_A(1'b0)) u_mul (
      .clk, .rst_n, .a_load, .a_in, .acc_clear, .b_valid, .b_in, .out_shift,
      .c_out, .busy(mul_busy));
  end

  logic            em_start, em_phi, em_valid;
  ring_sel_e       em_ring;
  logic [LOGQ-1:0] em_out;

  embed #(.LOGQ(LOGQ)) u_embed (
    .clk, .rst_n, .start(em_start), .ring_sel(em_ring), .phi(em_phi),
    .in_valid(out_shift), .in_data(c_out), .out_valid(em_valid), .out_data(em_out));

  logic            sub_in_valid, sub_out_valid;
  logic [LOGQ-1:0] sub_c;
  logic            rd_v_q;

  poly_addsub #(.LOGQ(LOGQ), .TW(1), .TAG_W(IW)) u_sub (
    .clk, .rst_n, .in_valid(sub_in_valid), .sub(1'b1),
    .a(c_rd), .b(LOGQ'(trit_to_zq(m_rd))), .in_tag(cnt_q),
    .out_valid(sub_out_valid), .c(sub_c), .out_tag());

  logic            va_start, va_valid, va_last, va_done, va_tern, va_weight, va_sum;
  logic [LOGQ-1:0] va_data;

  validator #(.N(N), .LOGQ(LOGQ), .D(D)) u_val (
    .clk, .rst_n, .start(va_start), .in_valid(va_valid), .in_last(va_last), .in_data(va_data),
    .done(va_done), .ternary_ok(va_tern), .weight_ok(va_weight), .sum_zero_ok(va_sum),
    .ones(), .minus_ones());

  // ---------------------------------------------------------------- hashing
  logic         h_start, h_valid, h_last, h_ready, h_done;
  logic [7:0]   h_byte;
  logic [255:0] digest;

  logic          kg_start, kg_rd_en, kg_rd_sel, kg_valid, kg_last;
  logic [IW-1:0] kg_rd_addr;
  logic [7:0]    kg_byte;
  logic          kg_sel_q;

  kgen #(.N(N)) u_kgen (
    .clk, .rst_n, .start(kg_start),
    .rd_en(kg_rd_en), .rd_sel(kg_rd_sel), .rd_addr(kg_rd_addr),
    .rd_data(kg_sel_q ? m_rd : r_rd),
    .out_valid(kg_valid), .out_byte(kg_byte), .out_last(kg_last), .out_ready(h_ready && st_q == D_K1),
    .done());

  // k2 message: s, then PACK_q(c) through a FIFO
  logic       pq_in_valid, pq_in_last, pq_in_ready, pq_out_valid, pq_done, pack_fire, pack_issue;
  logic [7:0] pq_byte;
  logic       have_q;
  logic [IW-1:0] have_idx_q, pcnt_q;
  logic       f_push, f_push_last, f_pop, f_empty, f_last;
  logic [7:0] f_push_byte, f_byte;
  logic [$clog2(FD):0] f_count;
  logic       room;

  pack_q #(.LOGQ(LOGQ)) u_pack_c (
    .clk, .rst_n, .in_valid(pq_in_valid), .in_last(pq_in_last), .in_data(c_rd),
    .in_ready(pq_in_ready), .out_valid(pq_out_valid), .out_byte(pq_byte), .done(pq_done));

  byte_fifo #(.DEPTH(FD)) u_fifo (
    .clk, .rst_n, .clear(st_q != D_K2), .push(f_push), .push_byte(f_push_byte), .push_last(f_push_last),
    .pop(f_pop), .empty(f_empty), .head_byte(f_byte), .head_last(f_last), .count(f_count));

  sha3_256 u_sha3 (
    .clk, .rst_n, .start(h_start), .in_valid(h_valid), .in_last(h_last), .in_byte(h_byte),
    .in_ready(h_ready), .done(h_done), .digest(digest));

  assign room        = (f_count <= ($clog2(FD)+1)'(FD - 4));
  assign pq_in_valid = (st_q == D_K2) && (scnt_q == 6'd32) && have_q && room;
  assign pq_in_last  = (have_idx_q == IW'(N - 2));
  assign pack_fire   = pq_in_valid && pq_in_ready;
  assign pack_issue  = (st_q == D_K2) && (scnt_q == 6'd32) && (!have_q || pack_fire) &&
                       (pcnt_q < IW'(N - 1));
  // s bytes first, then the packed ciphertext
  assign f_push      = (st_q == D_K2) && ((scnt_q < 6'd32 && room) || pq_out_valid);
  assign f_push_byte = pq_out_valid ? pq_byte : s_q[8*scnt_q[4:0] +: 8];
  assign f_push_last = pq_out_valid && pq_done;
  assign f_pop       = (st_q == D_K2) && !f_empty && h_ready;

  always_comb begin
    if (st_q == D_K1) begin
      h_valid = kg_valid; h_byte = kg_byte; h_last = kg_last;
    end else begin
      h_valid = (st_q == D_K2) && !f_empty; h_byte = f_byte; h_last = f_last;
    end
  end

  // ---------------------------------------------------------------- control
  logic enter_k1, enter_k2;
  assign enter_k1 = (st_q == D_UW3) && wdone_q && !em_valid;
  assign enter_k2 = (st_q == D_K1) && h_done;
  assign kg_start = enter_k1;
  assign h_start  = enter_k1 || enter_k2;

  assign up_start = (st_q == D_IDLE && start) || (st_q == D_F && up_done);
  assign uq_start = (st_q == D_FP && up_done) || (st_q == D_S && scnt_q == 6'd31 && in_valid);
  assign va_start = uq_start || (em_start && st_q != D_MW1);

  logic in_mul, in_unl;
  assign in_mul    = st_q inside {D_MUL1, D_MW1, D_MUL2, D_MW2, D_MUL3, D_MW3};
  assign in_unl    = st_q inside {D_UNL1, D_UNL2, D_UNL3};
  assign b_valid   = in_mul && rd_v_q;
  assign out_shift = in_unl;
  assign em_start  = (st_q inside {D_MW1, D_MW2, D_MW3}) && !rd_v_q && !mul_busy;
  assign em_phi    = (st_q != D_UNL1);
  assign em_ring   = (st_q == D_UNL3) ? RING_SQ : RING_SP;
  assign sub_in_valid = (st_q inside {D_SUB, D_SW}) && rd_v_q;
  assign acc_clear = (st_q == D_IDLE && start) || (st_q == D_UW1 && wdone_q && fdone_q) ||
                     (st_q == D_UW2 && wdone_q && !em_valid);

  logic fp_v_q;   // f_p read issued last cycle
  always_comb begin
    a_load = 1'b0;  a_in = '0;
    unique case (st_q)
      D_F:          begin a_load = up_valid; a_in = LOGQ'(trit_to_zq(up_trit)); end
      D_UNL1, D_UW1: begin a_load = fp_v_q;  a_in = LOGQ'(trit_to_zq(fp_rd)); end
      D_SUB, D_SW:  begin a_load = sub_out_valid; a_in = sub_c; end
      default: ;
    endcase
  end

  always_comb begin
    // defaults
    fp_we = (st_q == D_FP) && up_valid; fp_wa = up_idx; fp_wd = up_trit;
    fp_re = (st_q inside {D_UNL1, D_UW1}) && !fdone_q; fp_ra = fcnt_q;
    hq_we = (st_q == D_HQ) && uq_valid; hq_wa = uq_idx; hq_wd = uq_data;
    hq_re = (st_q == D_MUL3); hq_ra = cnt_q;
    c_we  = (st_q == D_C) && uq_valid; c_wa = uq_idx; c_wd = uq_data;
    c_re  = (st_q inside {D_MUL1, D_SUB}) || pack_issue;
    c_ra  = (st_q == D_K2) ? pcnt_q : cnt_q;
    t_we  = (st_q inside {D_UNL1, D_UW1}) && em_valid; t_wa = wcnt_q;
    t_wd  = LOGQ'(trit_to_zq(trit_t'(em_out[1:0])));
    t_re  = (st_q == D_MUL2); t_ra = cnt_q;
    m_we  = (st_q inside {D_UNL2, D_UW2}) && em_valid; m_wa = wcnt_q; m_wd = trit_t'(em_out[1:0]);
    m_re  = (st_q == D_SUB) || (kg_rd_en && kg_rd_sel);
    m_ra  = (st_q == D_SUB) ? cnt_q : kg_rd_addr;
    r_we  = (st_q inside {D_UNL3, D_UW3}) && em_valid; r_wa = wcnt_q;
    r_wd  = zq_to_trit(16'(em_out), LOGQ);
    r_re  = kg_rd_en && !kg_rd_sel; r_ra = kg_rd_addr;
    // multiplier b operand
    unique case (st_q)
      D_MUL2, D_MW2: b_in = t_rd;
      D_MUL3, D_MW3: b_in = hq_rd;
      default:       b_in = c_rd;
    endcase
    // validator input
    va_valid = 1'b0; va_last = 1'b0; va_data = em_out;
    unique case (st_q)
      D_C: begin va_valid = uq_valid; va_last = (uq_idx == IW'(N - 1)); va_data = uq_data; end
      D_UNL2, D_UW2: begin va_valid = em_valid; va_last = (wcnt_q == '0);
                           va_data = LOGQ'(trit_to_zq(trit_t'(em_out[1:0]))); end
      D_UNL3, D_UW3: begin va_valid = em_valid; va_last = (wcnt_q == '0); va_data = em_out; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= D_IDLE;
      cnt_q <= '0; wcnt_q <= '0; fcnt_q <= '0; pcnt_q <= '0;
      wdone_q <= 1'b0; fdone_q <= 1'b0; rd_v_q <= 1'b0; fp_v_q <= 1'b0;
      scnt_q <= '0; s_q <= '0; k1_q <= '0; key <= '0; fail <= 1'b0;
      c_ok_q <= 1'b0; m_ok_q <= 1'b0; r_ok_q <= 1'b0;
      have_q <= 1'b0; have_idx_q <= '0; kg_sel_q <= 1'b0; done <= 1'b0;
    end else begin
      done     <= 1'b0;
      rd_v_q   <= (c_re && st_q != D_K2) || t_re || hq_re;
      fp_v_q   <= fp_re;
      kg_sel_q <= kg_rd_sel;
      // writes behind the embed unit count down from n-1
      if (em_start) begin
        wcnt_q  <= IW'(N - 1);
        wdone_q <= 1'b0;
      end else if (em_valid) begin
        if (wcnt_q == '0) wdone_q <= 1'b1;
        else wcnt_q <= wcnt_q - 1'b1;
      end
      if (fp_re) begin
        fcnt_q <= fcnt_q + 1'b1;
        if (fcnt_q == IW'(N - 1)) fdone_q <= 1'b1;
      end
      if (va_done) begin
        unique case (st_q)
          D_MUL1:        c_ok_q <= va_sum;
          D_UNL2, D_UW2: m_ok_q <= va_weight;
          D_UW3, D_K1:   r_ok_q <= va_tern;
          default: ;
        endcase
      end
      unique case (st_q)
        D_IDLE: if (start) st_q <= D_F;
        D_F:    if (up_done) st_q <= D_FP;
        D_FP:   if (up_done) st_q <= D_HQ;
        D_HQ:   if (uq_done) begin st_q <= D_S; scnt_q <= '0; end
        D_S: if (in_valid) begin
          s_q[8*scnt_q[4:0] +: 8] <= in_byte;
          scnt_q <= scnt_q + 1'b1;
          if (scnt_q == 6'd31) st_q <= D_C;
        end
        D_C: if (uq_done) begin st_q <= D_MUL1; cnt_q <= IW'(N - 1); end
        D_MUL1, D_MUL2, D_MUL3: begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == '0) st_q <= dstate_e'(st_q + 5'd1);
        end
        D_MW1, D_MW2, D_MW3: if (em_start) begin
          st_q  <= dstate_e'(st_q + 5'd1);
          cnt_q <= IW'(N - 1);
          if (st_q == D_MW1) begin fcnt_q <= '0; fdone_q <= 1'b0; end
        end
        D_UNL1, D_UNL2, D_UNL3: begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == '0) st_q <= dstate_e'(st_q + 5'd1);
        end
        D_UW1: if (wdone_q && fdone_q && !fp_v_q) begin st_q <= D_MUL2; cnt_q <= IW'(N - 1); end
        D_UW2: if (wdone_q && !em_valid) begin st_q <= D_SUB; cnt_q <= '0; end
        D_SUB: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == IW'(N - 1)) st_q <= D_SW;
        end
        D_SW: if (!rd_v_q && !sub_out_valid) begin st_q <= D_MUL3; cnt_q <= IW'(N - 1); end
        D_UW3: if (enter_k1) st_q <= D_K1;
        D_K1: if (h_done) begin
          k1_q   <= digest;
          st_q   <= D_K2;
          scnt_q <= '0;
          pcnt_q <= '0;
          have_q <= 1'b0;
        end
        D_K2: begin
          if (f_push && scnt_q < 6'd32) scnt_q <= scnt_q + 1'b1;
          if (pack_issue) begin pcnt_q <= pcnt_q + 1'b1; have_idx_q <= pcnt_q; end
          have_q <= pack_issue || (have_q && !pack_fire);
          if (h_done) begin
            fail <= !(c_ok_q && m_ok_q && r_ok_q);
            key  <= (c_ok_q && m_ok_q && r_ok_q) ? k1_q : digest;
            done <= 1'b1;
            st_q <= D_IDLE;
          end
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end

  assign busy = (st_q != D_IDLE);

endmodule
