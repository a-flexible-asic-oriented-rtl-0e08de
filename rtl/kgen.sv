// kgen: session-key message generator. Produces the byte stream
// PACK_3(A) || PACK_3(B) of two ternary polynomials held in memories of the
// core (A = r and B = m for the session key), for the SHA3-256 core.
//
// It walks the first n-1 coefficients of A and then of B through a read port
// of the core (rd_en, rd_sel = 0 for A / 1 for B, rd_addr; the trit comes back
// on rd_data one cycle later), packs them five to a byte with pack_p, and
// queues the bytes in a byte_fifo towards the hash core, which may stall for
// its permutation. Reads are issued only while the FIFO has room for the bytes
// in flight. The output is valid/ready with out_last on the final byte; `done`
// pulses when the final byte has been taken. The document names the session
// key generator; its internal organisation is this design's.
module kgen
  import ntru_pkg::*;
#(
  parameter int unsigned N   = 677,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          rd_en,
  output logic          rd_sel,
  output logic [IW-1:0] rd_addr,
  input  trit_t         rd_data,
  output logic          out_valid,
  output logic [7:0]    out_byte,
  output logic          out_last,
  input  logic          out_ready,
  output logic          done
);

  localparam int unsigned M     = N - 1;
  localparam int unsigned DEPTH = 8;

  logic          active_q, sel_q;
  logic [IW-1:0] addr_q;
  logic          v1_q, last1_q, sel1_q;

  logic       pk_valid, pk_done;
  logic [7:0] pk_byte;
  logic       f_empty, f_last, pop;
  logic [7:0] f_byte;
  logic [$clog2(DEPTH):0] f_count;

  assign rd_en   = active_q && (f_count <= ($clog2(DEPTH)+1)'(DEPTH - 3));
  assign rd_sel  = sel_q;
  assign rd_addr = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      sel_q    <= 1'b0;
      addr_q   <= '0;
      v1_q     <= 1'b0;
      last1_q  <= 1'b0;
      sel1_q   <= 1'b0;
    end else begin
      v1_q    <= rd_en;
      last1_q <= rd_en && (addr_q == IW'(M - 1));
      sel1_q  <= sel_q;
      if (start) begin
        active_q <= 1'b1;
        sel_q    <= 1'b0;
        addr_q   <= '0;
      end else if (rd_en) begin
        if (addr_q == IW'(M - 1)) begin
          addr_q <= '0;
          sel_q  <= 1'b1;
          if (sel_q) active_q <= 1'b0;
        end else begin
          addr_q <= addr_q + 1'b1;
        end
      end
    end
  end

  pack_p u_pack (
    .clk, .rst_n,
    .in_valid (v1_q),
    .in_last  (last1_q),
    .in_trit  (rd_data),
    .out_valid(pk_valid),
    .out_byte (pk_byte),
    .done     (pk_done)
  );

  // The second polynomial's final byte ends the message.
  logic sel2_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sel2_q <= 1'b0;
    else        sel2_q <= sel1_q;

  byte_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .clear    (start),
    .push     (pk_valid),
    .push_byte(pk_byte),
    .push_last(pk_done && sel2_q),
    .pop      (pop),
    .empty    (f_empty),
    .head_byte(f_byte),
    .head_last(f_last),
    .count    (f_count)
  );

  assign out_valid = !f_empty;
  assign out_byte  = f_byte;
  assign out_last  = f_last;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) done <= 1'b0;
    else        done <= pop && f_last;

endmodule
