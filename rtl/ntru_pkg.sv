// ntru_pkg: constants and small helper functions shared by the NTRU cores.
//
// Ternary (S_3) coefficients are carried as 2-bit codes 0, 1, 2 where 2 stands
// for -1. In Z_q a ternary value is carried as 0, 1 or q-1 (sign extension,
// which is the HPS Lift). q is a power of two (2048, 4096 or 8192), so
// reduction mod q is truncation to LOGQ bits.
//
// The default parameter set is ntruhps2048677 (n = 677, q = 2048, d = 127),
// the Security Level 3 HPS set that the design space exploration centres on.
package ntru_pkg;

  localparam int unsigned DEF_N    = 677;
  localparam int unsigned DEF_LOGQ = 11;
  localparam int unsigned DEF_D    = 127;   // number of +1 and of -1 in m (q/16 - 1)

  typedef logic [1:0] trit_t;
  localparam trit_t TRIT_ZERO = 2'd0;
  localparam trit_t TRIT_POS  = 2'd1;
  localparam trit_t TRIT_NEG  = 2'd2;

  // Variable-weight sampling algorithm.
  typedef enum logic {SAMPLE_MODULO = 1'b0, SAMPLE_REJECTION = 1'b1} sample_alg_e;

  // Target ring of the embed unit.
  typedef enum logic {RING_SQ = 1'b0, RING_SP = 1'b1} ring_sel_e;

  // Polynomial multiplier architecture: x-net (n lanes, n steps per product)
  // or Comba (one multiply-accumulate unit, about n*n cycles per product).
  typedef enum logic {MUL_XNET = 1'b0, MUL_COMBA = 1'b1} mul_arch_e;

  // Bytes of a packed ternary polynomial: n-1 coefficients, 5 per byte.
  function automatic int unsigned packed_s3_bytes(input int unsigned n);
    return (n - 1 + 4) / 5;
  endfunction

  // Bytes of a packed Z_q polynomial: n-1 coefficients of logq bits each.
  function automatic int unsigned packed_q_bytes(input int unsigned n, input int unsigned logq);
    return ((n - 1) * logq + 7) / 8;
  endfunction

  // HPS Lift of one ternary code into Z_q (sign extension): 2 -> q-1.
  // Returned on 16 bits; callers keep the low LOGQ bits.
  function automatic logic [15:0] trit_to_zq(input trit_t t);
    unique case (t)
      TRIT_POS: return 16'd1;
      TRIT_NEG: return 16'hFFFF;
      default:  return 16'd0;
    endcase
  endfunction

  // Z_q value 0, 1 or q-1 back to its ternary code; other values give 0.
  function automatic trit_t zq_to_trit(input logic [15:0] v, input int unsigned logq);
    logic [15:0] qm1;
    qm1 = 16'((32'd1 << logq) - 1);
    if (v == 16'd1) return TRIT_POS;
    if (v == qm1)   return TRIT_NEG;
    return TRIT_ZERO;
  endfunction

endpackage
