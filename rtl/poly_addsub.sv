// poly_addsub: coefficient-wise addition or subtraction of two polynomials in
// R_q, c_k = a_k + b_k mod q or c_k = a_k - b_k mod q.
//
// The unit is a stream datapath: TW coefficient pairs enter per cycle with
// in_valid, and the TW results leave one cycle later with out_valid, together
// with the tag (for instance a memory address) that came in with them. q is a
// power of two, so mod q is truncation to LOGQ bits. The encapsulation core
// uses it for c = r*h + m' and the decapsulation core for c - m'. TW is the
// transfer width; the arithmetic is the document's, the streaming interface and
// the tag are this design's.
module poly_addsub #(
  parameter int unsigned LOGQ  = 11,
  parameter int unsigned TW    = 1,
  parameter int unsigned TAG_W = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      sub,
  input  logic [TW-1:0][LOGQ-1:0]   a,
  input  logic [TW-1:0][LOGQ-1:0]   b,
  input  logic [TAG_W-1:0]          in_tag,
  output logic                      out_valid,
  output logic [TW-1:0][LOGQ-1:0]   c,
  output logic [TAG_W-1:0]          out_tag
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      c         <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        for (int unsigned l = 0; l < TW; l++)
          c[l] <= sub ? a[l] - b[l] : a[l] + b[l];
      end
    end
  end

endmodule
