// unpack_q: turns a byte stream into the n coefficients of a polynomial of
// R_q, the inverse of pack_q. Bytes are read least significant bit first;
// n-1 coefficients of LOGQ bits are cut from the stream and the unused bits of
// the last byte are dropped. Coefficient n-1 is then rebuilt according to
// sum_zero: 1 gives -(a_0 + ... + a_{n-2}) mod q, so the polynomial sums to 0
// mod q (public key h and ciphertext c); 0 gives 0 (h_q of the private key).
//
// Input bytes are valid/ready, exactly ceil((n-1)*LOGQ/8) of them are taken.
// Coefficients leave in ascending order with out_idx, at most one per cycle,
// and must be taken when offered. `done` pulses with coefficient n-1. The byte
// format is this design's (the usual NTRU one); the document only names it.
module unpack_q #(
  parameter int unsigned N    = 677,
  parameter int unsigned LOGQ = 11,
  localparam int unsigned IW  = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            sum_zero,
  input  logic            in_valid,
  input  logic [7:0]      in_byte,
  output logic            in_ready,
  output logic            out_valid,
  output logic [LOGQ-1:0] out_data,
  output logic [IW-1:0]   out_idx,
  output logic            done,
  output logic            busy
);

  localparam int unsigned NBYTES = ((N - 1) * LOGQ + 7) / 8;
  localparam int unsigned BW     = LOGQ + 8;
  localparam int unsigned CW     = $clog2(BW + 1);
  localparam int unsigned BCW    = $clog2(NBYTES + 1);

  logic [BW-1:0]   buf_q;
  logic [CW-1:0]   cnt_q;
  logic [BCW-1:0]  nbytes_q;
  logic [IW-1:0]   idx_q;
  logic [LOGQ-1:0] sum_q;
  logic            active_q, sz_q;

  assign in_ready = active_q && (nbytes_q < BCW'(NBYTES)) && (cnt_q < CW'(LOGQ));
  assign busy     = active_q;

  // next buffer contents: drop an emitted coefficient, then append a byte
  logic          emit, take;
  logic [BW-1:0] b_e, b_n;
  logic [CW-1:0] c_e, c_n;
  always_comb begin
    emit = (idx_q != IW'(N - 1)) && (cnt_q >= CW'(LOGQ));
    take = in_valid && in_ready;
    b_e  = emit ? buf_q >> LOGQ : buf_q;
    c_e  = emit ? cnt_q - CW'(LOGQ) : cnt_q;
    b_n  = take ? b_e | (BW'(in_byte) << c_e) : b_e;
    c_n  = take ? c_e + CW'(8) : c_e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      cnt_q     <= '0;
      nbytes_q  <= '0;
      idx_q     <= '0;
      sum_q     <= '0;
      active_q  <= 1'b0;
      sz_q      <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_idx   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (start) begin
        buf_q    <= '0;
        cnt_q    <= '0;
        nbytes_q <= '0;
        idx_q    <= '0;
        sum_q    <= '0;
        active_q <= 1'b1;
        sz_q     <= sum_zero;
      end else if (active_q) begin
        if (idx_q == IW'(N - 1)) begin
          // rebuild the top coefficient
          out_valid <= 1'b1;
          out_data  <= sz_q ? LOGQ'(0) - sum_q : '0;
          out_idx   <= idx_q;
          done      <= 1'b1;
          active_q  <= 1'b0;
        end else if (emit) begin
          out_valid <= 1'b1;
          out_data  <= buf_q[LOGQ-1:0];
          out_idx   <= idx_q;
          sum_q     <= sum_q + buf_q[LOGQ-1:0];
          idx_q     <= idx_q + 1'b1;
        end
        if (take) nbytes_q <= nbytes_q + 1'b1;
        buf_q <= b_n;
        cnt_q <= c_n;
      end
    end
  end

endmodule
