// pack_q: packs the first n-1 coefficients of a polynomial of R_q (LOGQ bits
// each) into a byte stream. Bits are taken least significant first: coefficient
// 0 fills byte 0 from bit 0 upwards, the next coefficient continues where it
// ends, and the last byte is padded with zeros. Coefficient n-1 is not packed:
// the packed polynomials have coefficient sum 0 mod q (or a zero top
// coefficient) and the unpacker rebuilds it.
//
// Input is valid/ready (one coefficient per cycle at most, in_last with the
// last one); output is one byte per cycle with out_valid and is not stalled.
// A byte leaves whenever 8 bits are buffered, so the input is throttled to 8
// bits per cycle. `done` pulses with the last byte. The packed format is this
// design's (the usual NTRU one); the document only names the unit.
module pack_q #(
  parameter int unsigned LOGQ = 11
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            in_last,
  input  logic [LOGQ-1:0] in_data,
  output logic            in_ready,
  output logic            out_valid,
  output logic [7:0]      out_byte,
  output logic            done
);

  localparam int unsigned BW = LOGQ + 8;
  localparam int unsigned CW = $clog2(BW + 1);

  logic [BW-1:0] buf_q;
  logic [CW-1:0] cnt_q;
  logic          flush_q;

  assign in_ready = !flush_q && (cnt_q < CW'(8));

  // next buffer contents: drop an emitted byte, then append a coefficient
  logic          emit, take;
  logic [BW-1:0] b_e, b_n;
  logic [CW-1:0] c_e, c_n;
  always_comb begin
    emit = (cnt_q >= CW'(8)) || (flush_q && cnt_q != '0);
    take = in_valid && in_ready;
    b_e  = emit ? buf_q >> 8 : buf_q;
    c_e  = !emit ? cnt_q : (cnt_q >= CW'(8)) ? cnt_q - CW'(8) : '0;
    b_n  = take ? b_e | (BW'(in_data) << c_e) : b_e;
    c_n  = take ? c_e + CW'(LOGQ) : c_e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      cnt_q     <= '0;
      flush_q   <= 1'b0;
      out_valid <= 1'b0;
      out_byte  <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      // emit one byte
      if (emit) begin
        out_valid <= 1'b1;
        out_byte  <= buf_q[7:0];
        if (flush_q && c_e == '0) begin
          done    <= 1'b1;
          flush_q <= 1'b0;
        end
      end
      // take one coefficient
      if (take && in_last) flush_q <= 1'b1;
      buf_q <= b_n;
      cnt_q <= c_n;
    end
  end

endmodule
