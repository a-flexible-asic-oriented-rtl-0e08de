// comba_mul: area-oriented polynomial multiplier, c = a * b mod (q, x^n - 1),
// with a single multiply-accumulate unit (product scanning, Comba).
//
// Operands and result are kept in three simple dual-port memories (a, b, c).
// Output coefficients are produced one after the other: for k = 0 .. n-1 the
// MAC unit accumulates
//     c_k = sum_{j=0}^{n-1} a_j * b_{(k - j) mod n}      (mod q)
// reading one a and one b coefficient per cycle, and writes c_k once. This is
// the two-loop product-scanning schedule with the wrap-around column k + n
// folded into column k, so every result coefficient is written exactly once.
// After the last b coefficient the product takes n * n + 2 cycles.
//
// The port list is the one of xnet_mul, so either can sit in a core:
// a_load writes a (a_0 first) into the a memory, b_valid writes b (b_{n-1}
// first) into the b memory and the n-th b coefficient starts the product;
// `busy` stays high until c_{n-1} is on c_out. out_shift then steps c_out
// down to c_{n-2}, ..., c_0 (one per cycle). acc_clear restarts the b write
// counter. TERNARY_A = 1 takes a as trit codes (0, 1, 2 = -1) and replaces the
// multiplier by a choice among 0, b and -b. The single MAC and the operand
// memories follow the document; the folded column order, the register
// pipeline and the port list are this design's choices.
module comba_mul #(
  parameter int unsigned N         = 677,
  parameter int unsigned LOGQ      = 11,
  parameter bit          TERNARY_A = 1'b1,
  localparam int unsigned AW       = TERNARY_A ? 2 : LOGQ,
  localparam int unsigned IW       = $clog2(N)
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

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_LAST, C_OUT} cstate_e;

  cstate_e       st_q;
  logic [IW-1:0] a_wa_q, b_wa_q;       // write counters
  logic [IW-1:0] k_q, j_q;             // output column, term index
  logic [IW-1:0] o_q;                  // index of the coefficient on c_out
  logic          step_q;               // a b coefficient was written last cycle
  logic          mac_v_q, mac_first_q, mac_last_q;
  logic [IW-1:0] mac_k_q;
  logic [LOGQ-1:0] acc_q;

  // ---------------------------------------------------------------- memories
  logic [AW-1:0]   a_rd;
  logic [LOGQ-1:0] b_rd, c_rd;
  logic            c_we, c_re, ab_re;
  logic [IW-1:0]   c_ra, b_ra;
  logic [LOGQ-1:0] acc_d;

  // b index (k - j) mod n
  assign b_ra = (k_q >= j_q) ? k_q - j_q : IW'(N) - j_q + k_q;

  poly_ram #(.DEPTH(N), .WIDTH(AW)) u_a (
    .clk, .wr_en(a_load), .wr_addr(a_wa_q), .wr_data(a_in),
    .rd_en(ab_re), .rd_addr(j_q), .rd_data(a_rd));
  poly_ram #(.DEPTH(N), .WIDTH(LOGQ)) u_b (
    .clk, .wr_en(b_valid), .wr_addr(b_wa_q), .wr_data(b_in),
    .rd_en(ab_re), .rd_addr(b_ra), .rd_data(b_rd));
  poly_ram #(.DEPTH(N), .WIDTH(LOGQ)) u_c (
    .clk, .wr_en(c_we), .wr_addr(mac_k_q), .wr_data(acc_d),
    .rd_en(c_re), .rd_addr(c_ra), .rd_data(c_rd));

  // ---------------------------------------------------------------- MAC unit
  logic [LOGQ-1:0] prod;
  always_comb begin
    if (TERNARY_A) begin
      unique case (a_rd[1:0])
        2'd1:    prod = b_rd;
        2'd2:    prod = LOGQ'(0) - b_rd;
        default: prod = '0;
      endcase
    end else begin
      prod = LOGQ'(a_rd * b_rd);
    end
    acc_d = (mac_first_q ? '0 : acc_q) + prod;
  end

  logic start_mul;
  assign start_mul = b_valid && (b_wa_q == '0) && (st_q inside {C_IDLE, C_OUT});
  assign ab_re     = (st_q == C_RUN);
  assign c_we      = mac_v_q && mac_last_q;
  // result read-out: c_{n-1} after the last write, then one lower per shift
  assign c_re      = (st_q == C_LAST && !mac_v_q) || (st_q == C_OUT && out_shift && o_q != '0);
  assign c_ra      = (st_q == C_LAST) ? IW'(N - 1) : o_q - 1'b1;
  assign c_out     = c_rd;
  assign busy      = step_q || (st_q inside {C_RUN, C_LAST});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= C_IDLE;
      a_wa_q      <= '0;
      b_wa_q      <= IW'(N - 1);
      k_q         <= '0;
      j_q         <= '0;
      o_q         <= '0;
      step_q      <= 1'b0;
      mac_v_q     <= 1'b0;
      mac_first_q <= 1'b0;
      mac_last_q  <= 1'b0;
      mac_k_q     <= '0;
      acc_q       <= '0;
    end else begin
      step_q <= b_valid;
      if (a_load) a_wa_q <= (a_wa_q == IW'(N - 1)) ? '0 : a_wa_q + 1'b1;
      if (acc_clear) b_wa_q <= IW'(N - 1);
      else if (b_valid) b_wa_q <= (b_wa_q == '0) ? IW'(N - 1) : b_wa_q - 1'b1;
      // MAC pipeline: operands read in C_RUN arrive one cycle later
      mac_v_q     <= ab_re;
      mac_first_q <= ab_re && (j_q == '0);
      mac_last_q  <= ab_re && (j_q == IW'(N - 1));
      mac_k_q     <= k_q;
      if (mac_v_q) acc_q <= acc_d;
      if (start_mul) begin
        st_q <= C_RUN;
        k_q  <= '0;
        j_q  <= '0;
      end else begin
        unique case (st_q)
          C_RUN: begin
            if (j_q == IW'(N - 1)) begin
              j_q <= '0;
              if (k_q == IW'(N - 1)) st_q <= C_LAST;
              else k_q <= k_q + 1'b1;
            end else begin
              j_q <= j_q + 1'b1;
            end
          end
          C_LAST: if (!mac_v_q) begin
            st_q <= C_OUT;
            o_q  <= IW'(N - 1);
          end
          C_OUT: if (out_shift) begin
            if (o_q == '0) st_q <= C_IDLE;
            else o_q <= o_q - 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
