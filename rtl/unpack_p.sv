// unpack_p: the inverse of pack_p. Each input byte yields five trit codes
// (0, 1, 2 = -1), least significant base-3 digit first, one per cycle, until
// n-1 coefficients have been produced; coefficient n-1 is then produced as 0.
// Bytes are valid/ready; exactly ceil((n-1)/5) are taken. Digits are split off
// by repeated division by 3, done as a multiplication by 171 and a shift by 9,
// exact for every byte value. A digit above 2 (byte value over 242) is reduced
// mod 3. Coefficients leave in ascending order with out_idx and must be taken
// when offered; `done` pulses with coefficient n-1. The byte format is this
// design's (the usual NTRU one); the document only names the operation.
module unpack_p
  import ntru_pkg::*;
#(
  parameter int unsigned N   = 677,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  input  logic [7:0]    in_byte,
  output logic          in_ready,
  output logic          out_valid,
  output trit_t         out_trit,
  output logic [IW-1:0] out_idx,
  output logic          done,
  output logic          busy
);

  logic [7:0]    b_q;
  logic [2:0]    left_q;   // digits still to emit from b_q
  logic [IW-1:0] idx_q;
  logic          active_q;

  function automatic logic [7:0] div3(input logic [7:0] v);
    logic [16:0] p;
    p = 17'(v) * 17'd171;
    return 8'(p >> 9);
  endfunction

  logic [7:0] quo;
  logic [1:0] digit;
  assign quo   = div3(b_q);
  assign digit = 2'(b_q - 8'(quo * 3)) ;

  assign in_ready = active_q && (left_q == '0) && (idx_q < IW'(N - 1));
  assign busy     = active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q       <= '0;
      left_q    <= '0;
      idx_q     <= '0;
      active_q  <= 1'b0;
      out_valid <= 1'b0;
      out_trit  <= TRIT_ZERO;
      out_idx   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (start) begin
        left_q   <= '0;
        idx_q    <= '0;
        active_q <= 1'b1;
      end else if (active_q) begin
        if (idx_q == IW'(N - 1)) begin
          out_valid <= 1'b1;
          out_trit  <= TRIT_ZERO;
          out_idx   <= idx_q;
          done      <= 1'b1;
          active_q  <= 1'b0;
        end else if (left_q != '0) begin
          out_valid <= 1'b1;
          out_trit  <= trit_t'(digit);
          out_idx   <= idx_q;
          idx_q     <= idx_q + 1'b1;
          b_q       <= quo;
          left_q    <= left_q - 1'b1;
        end else if (in_valid) begin
          b_q    <= in_byte;
          left_q <= 3'd5;
        end
      end
    end
  end

endmodule
