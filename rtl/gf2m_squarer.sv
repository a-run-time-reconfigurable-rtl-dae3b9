// gf2m_squarer: combinational squaring in GF(2^m), polynomial basis.
//
// Squaring a binary polynomial only spreads its coefficients: bit i of a
// moves to bit 2i of a 2M-1 bit square, with zeros in between. That square is
// then reduced modulo the field polynomial F by clearing its top bits one by
// one from bit 2M-2 down to bit M, each time adding F shifted into place.
// There is no clock and no state; the result settles in the same cycle.
//
// The document specifies a combinational squarer parameterisable in m; the
// generic reduction loop (valid for any F with bit M set) is this design's
// choice. A synthesis tool folds it into an XOR network for the constant F.
module gf2m_squarer #(
  parameter int unsigned M = 163,
  parameter logic [M:0]  F = {1'b1, {(M-8){1'b0}}, 8'hC9}   // x^163+x^7+x^6+x^3+1
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);

  logic [2*M-2:0] sq;

  always_comb begin
    sq = '0;
    for (int unsigned i = 0; i < M; i++) sq[2*i] = a[i];
    for (int unsigned i = 2*M-2; i >= M; i--) begin
      if (sq[i]) sq[i-M +: M+1] = sq[i-M +: M+1] ^ F;
    end
    y = sq[M-1:0];
  end

endmodule
