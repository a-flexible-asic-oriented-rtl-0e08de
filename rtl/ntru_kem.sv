// ntru_kem: NTRU-HPS key encapsulation mechanism accelerator, top level.
//
// The encapsulation core and the decapsulation core are independent top-level
// units, each with its own memories, multiplier and SHA3-256 core, placed side
// by side with their ports brought out under enc_ and dec_ prefixes:
//   encapsulation  public key bytes + random bits -> ciphertext bytes + key
//   decapsulation  private key bytes, ciphertext bytes -> key (+ fail flag)
// The defaults are the ntruhps2048677 parameter set (n = 677, q = 2048,
// d = 127) with the rejection-based variable-weight sampler and x-net
// multipliers; MUL_ARCH = MUL_COMBA selects the single-MAC Comba multiplier
// in both cores instead (far smaller, about n times slower). See ntru_encap
// and ntru_decap for the byte formats, schedules and timing. Keeping the two
// operations in separate units follows the document; sharing one clock and
// reset is this design's choice.
module ntru_kem
  import ntru_pkg::*;
#(
  parameter int unsigned N       = DEF_N,
  parameter int unsigned LOGQ    = DEF_LOGQ,
  parameter int unsigned D       = DEF_D,
  parameter sample_alg_e VAR_ALG = SAMPLE_REJECTION,
  parameter mul_arch_e   MUL_ARCH = MUL_XNET
) (
  input  logic         clk,
  input  logic         rst_n,
  // encapsulation
  input  logic         enc_start,
  output logic         enc_busy,
  output logic         enc_done,
  input  logic         enc_rnd_valid,
  input  logic [15:0]  enc_rnd_data,
  output logic         enc_rnd_ready,
  input  logic         enc_pk_valid,
  input  logic [7:0]   enc_pk_byte,
  output logic         enc_pk_ready,
  output logic         enc_ct_valid,
  output logic [7:0]   enc_ct_byte,
  output logic         enc_ct_last,
  output logic [255:0] enc_key,
  // decapsulation
  input  logic         dec_start,
  output logic         dec_busy,
  output logic         dec_done,
  input  logic         dec_in_valid,
  input  logic [7:0]   dec_in_byte,
  output logic         dec_in_ready,
  output logic [255:0] dec_key,
  output logic         dec_fail
);

  ntru_encap #(.N(N), .LOGQ(LOGQ), .D(D), .VAR_ALG(VAR_ALG), .MUL_ARCH(MUL_ARCH)) u_encap (
    .clk, .rst_n,
    .start    (enc_start),
    .busy     (enc_busy),
    .done     (enc_done),
    .rnd_valid(enc_rnd_valid),
    .rnd_data (enc_rnd_data),
    .rnd_ready(enc_rnd_ready),
    .pk_valid (enc_pk_valid),
    .pk_byte  (enc_pk_byte),
    .pk_ready (enc_pk_ready),
    .ct_valid (enc_ct_valid),
    .ct_byte  (enc_ct_byte),
    .ct_last  (enc_ct_last),
    .key      (enc_key)
  );

  ntru_decap #(.N(N), .LOGQ(LOGQ), .D(D), .MUL_ARCH(MUL_ARCH)) u_decap (
    .clk, .rst_n,
    .start   (dec_start),
    .busy    (dec_busy),
    .done    (dec_done),
    .in_valid(dec_in_valid),
    .in_byte (dec_in_byte),
    .in_ready(dec_in_ready),
    .key     (dec_key),
    .fail    (dec_fail)
  );

endmodule
