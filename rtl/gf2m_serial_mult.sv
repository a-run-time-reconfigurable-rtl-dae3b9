// gf2m_serial_mult: bit-serial multiplier in GF(2^m), polynomial basis.
//
// Computes p = a * b mod F(x). The multiplier b is scanned most significant
// bit first, one bit per clock (Horner's rule):
//     acc <- acc * x mod F  +  b_i * a
// so a product takes M steps. The field polynomial F is a parameter
// (bit M must be 1), so the same code serves any field size.
//
// Interface: pulse start for one clock with a and b valid; both are latched.
// busy is high during the M steps; done pulses for one clock when p is valid,
// M+1 clocks after the clock that samples start (one to load, M steps).
// p holds its value until the next start.
// A start while busy restarts the product.
//
// The document specifies a serial multiplier parameterisable in m; the
// MSB-first organisation and the handshake are this design's choice.
module gf2m_serial_mult #(
  parameter int unsigned M = 163,
  parameter logic [M:0]  F = {1'b1, {(M-8){1'b0}}, 8'hC9}   // x^163+x^7+x^6+x^3+1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] p
);

  localparam int unsigned CW = $clog2(M + 1);

  logic [M-1:0]  a_q, b_q;
  logic [CW-1:0] cnt_q;
  logic [M-1:0]  acc_next;

  // acc * x mod F, then add a if the current multiplier bit is set
  always_comb begin
    acc_next = {p[M-2:0], 1'b0} ^ (p[M-1] ? F[M-1:0] : '0);
    if (b_q[M-1]) acc_next = acc_next ^ a_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      cnt_q <= '0;
      p     <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q   <= a;
        b_q   <= b;
        p     <= '0;
        cnt_q <= CW'(M);
        busy  <= 1'b1;
      end else if (busy) begin
        p     <= acc_next;
        b_q   <= {b_q[M-2:0], 1'b0};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
