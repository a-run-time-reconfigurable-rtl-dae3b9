// gf2m_divider: division q = y / x in GF(2^m), polynomial basis.
//
// Binary extended Euclidean algorithm, one step per clock. Registers A, B
// (M+1 bits) and U, V (M bits) start as A = x, B = F, U = y, V = 0 and keep
// the invariants  U*x = A*y  and  V*x = B*y  (mod F). Each clock does one of:
//   A even           : A <- A/x,       U <- U/x mod F
//   B even           : B <- B/x,       V <- V/x mod F
//   A == 1           : finished, q = U
//   B == 1           : finished, q = V
//   A > B (integers) : A <- (A+B)/x,   U <- (U+V)/x mod F
//   otherwise        : B <- (A+B)/x,   V <- (U+V)/x mod F
// ("/x mod F" adds F first when the value is odd, then shifts right.)
// Every step lowers deg(A) + deg(B), which starts at most at 2M-1, so a
// division takes at most 2M clocks from start to done.
//
// Interface: pulse start for one clock with x and y valid (both latched).
// done pulses for one clock when q is valid; q holds until the next start.
// x = 0 has no quotient: the divider then finishes in one clock with q = 0.
//
// The document names a divider module parameterisable in m but does not give
// its algorithm; the algorithm and handshake here are this design's choice.
module gf2m_divider #(
  parameter int unsigned M = 163,
  parameter logic [M:0]  F = {1'b1, {(M-8){1'b0}}, 8'hC9}   // x^163+x^7+x^6+x^3+1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] x,     // divisor
  input  logic [M-1:0] y,     // dividend
  output logic         busy,
  output logic         done,
  output logic [M-1:0] q
);

  logic [M:0]   a_q, b_q;
  logic [M-1:0] u_q, v_q;
  logic [M:0]   sum_ab;
  logic [M-1:0] sum_uv;

  // v / x mod F
  // (v + v_0 F) / x: the constant term cancels, so only bits M..1 are kept
  function automatic logic [M-1:0] half(input logic [M-1:0] v);
    return {1'b0, v[M-1:1]} ^ (v[0] ? F[M:1] : '0);
  endfunction

  assign sum_ab = a_q ^ b_q;
  assign sum_uv = u_q ^ v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      u_q  <= '0;
      v_q  <= '0;
      q    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q <= {1'b0, x};
        b_q <= F;
        u_q <= y;
        v_q <= '0;
        if (x == '0) begin
          q    <= '0;
          done <= 1'b1;
          busy <= 1'b0;
        end else begin
          busy <= 1'b1;
        end
      end else if (busy) begin
        if (!a_q[0]) begin
          a_q <= a_q >> 1;
          u_q <= half(u_q);
        end else if (!b_q[0]) begin
          b_q <= b_q >> 1;
          v_q <= half(v_q);
        end else if (a_q == (M+1)'(1)) begin
          q    <= u_q;
          busy <= 1'b0;
          done <= 1'b1;
        end else if (b_q == (M+1)'(1)) begin
          q    <= v_q;
          busy <= 1'b0;
          done <= 1'b1;
        end else if (a_q > b_q) begin
          a_q <= sum_ab >> 1;
          u_q <= half(sum_uv);
        end else begin
          b_q <= sum_ab >> 1;
          v_q <= half(sum_uv);
        end
      end
    end
  end

endmodule
