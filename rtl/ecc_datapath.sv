// ecc_datapath: registers, multiplexers and arithmetic units of the
// elliptic-curve point operations over GF(2^m) (curve y^2 + xy = x^3 + ax^2 + b,
// affine coordinates).
//
// Registers: R = (X1, Y1) with flag r_inf (R is the point at infinity O),
// S = (X2, Y2), new x coordinate T, and the scalar shift register
// whose bit 0 is the current bit k_i. One divider, one serial multiplier and
// one combinational squarer are shared by ECC-ADD and ECC-Double; the
// controller runs each point operation as three steps, selected by
// ctrl.kind (PT_ADD: R <- R+S, PT_DBL_S: S <- 2S, PT_DBL_R: R <- 2R):
//
//   CMD_DIV  start divider  ADD: (Y1+Y2)/(X1+X2)    DBL: Y/X
//   CMD_MUL  lambda:       ADD: lambda = quotient  DBL: lambda = X + quotient
//            T <- L^2 + L + a (+ X1 + X2 for ADD)
//            start multiplier  ADD: L*(X1+T)        DBL: L*T
//   CMD_WB   ADD: Y1 <- product + T + Y1, X1 <- T
//            DBL: Y  <- X^2 + product + T, X <- T
//
// which are the document's ECC-ADD and ECC-Double formulas. The squarer input
// is L during CMD_MUL (lambda^2) and X during CMD_WB (x1^2). CMD_DIV and
// CMD_MUL must wait for div_done / mul_done of the previous step; the
// controller does that. Status outputs are combinational from registers.
//
// The register set and the step split are this design's reading of the
// document's block diagram (arithmetic units plus multiplexers under a
// state machine).
module ecc_datapath
  import ecc_pkg::*;
#(
  parameter int unsigned M = 163,
  parameter logic [M:0]  F = {1'b1, {(M-8){1'b0}}, 8'hC9}   // x^163+x^7+x^6+x^3+1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  dp_ctrl_t     ctrl,
  output dp_status_t   status,
  // operands, held stable by the host interface during an operation
  input  logic [M-1:0] k,
  input  logic [M-1:0] px,
  input  logic [M-1:0] py,
  input  logic [M-1:0] qx,
  input  logic [M-1:0] qy,
  input  logic [M-1:0] a,
  // result R
  output logic [M-1:0] rx,
  output logic [M-1:0] ry,
  output logic         r_inf
);

  logic [M-1:0] x1_q, y1_q, x2_q, y2_q, t_q, k_q;
  logic         r_inf_q;

  logic         on_r;                  // doubling works on R instead of S
  logic [M-1:0] dbl_x, dbl_y;          // point being doubled
  logic [M-1:0] div_x, div_y, quo;
  logic         div_start, div_busy, div_done;
  logic [M-1:0] mul_a, mul_b, prod;
  logic         mul_start, mul_busy, mul_done;
  logic [M-1:0] sq_in, sq_out;
  logic [M-1:0] lambda, x_new;

  assign on_r  = (ctrl.kind == PT_DBL_R);
  assign dbl_x = on_r ? x1_q : x2_q;
  assign dbl_y = on_r ? y1_q : y2_q;

  // ---- divider operands
  always_comb begin
    if (ctrl.kind == PT_ADD) begin
      div_x = x1_q ^ x2_q;
      div_y = y1_q ^ y2_q;
    end else begin
      div_x = dbl_x;
      div_y = dbl_y;
    end
  end
  assign div_start = (ctrl.cmd == CMD_DIV);

  gf2m_divider #(.M(M), .F(F)) u_div (
    .clk, .rst_n, .start(div_start), .x(div_x), .y(div_y),
    .busy(div_busy), .done(div_done), .q(quo)
  );

  // ---- slope, squarer and new x (used in CMD_MUL)
  assign lambda = (ctrl.kind == PT_ADD) ? quo : (quo ^ dbl_x);
  assign sq_in  = (ctrl.cmd == CMD_WB) ? dbl_x : lambda;

  gf2m_squarer #(.M(M), .F(F)) u_sq (.a(sq_in), .y(sq_out));

  always_comb begin
    x_new = sq_out ^ lambda ^ a;
    if (ctrl.kind == PT_ADD) x_new = x_new ^ x1_q ^ x2_q;
  end

  // ---- multiplier operands
  assign mul_a     = lambda;
  assign mul_b     = (ctrl.kind == PT_ADD) ? (x1_q ^ x_new) : x_new;
  assign mul_start = (ctrl.cmd == CMD_MUL);

  gf2m_serial_mult #(.M(M), .F(F)) u_mul (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b),
    .busy(mul_busy), .done(mul_done), .p(prod)
  );

  // ---- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1_q <= '0; y1_q <= '0; x2_q <= '0; y2_q <= '0;
      t_q  <= '0; k_q  <= '0;
      r_inf_q <= 1'b1;
    end else begin
      unique case (ctrl.cmd)
        CMD_INIT_KP: begin
          r_inf_q <= 1'b1;
          x1_q <= '0;  y1_q <= '0;
          x2_q <= px;  y2_q <= py;
          k_q  <= k;
        end
        CMD_INIT_ADD: begin
          r_inf_q <= 1'b0;
          x1_q <= px;  y1_q <= py;
          x2_q <= qx;  y2_q <= qy;
        end
        CMD_COPY_SR: begin
          r_inf_q <= 1'b0;
          x1_q <= x2_q;  y1_q <= y2_q;
        end
        CMD_SET_RINF: begin
          r_inf_q <= 1'b1;
          x1_q <= '0;  y1_q <= '0;
        end
        CMD_SHIFT_K: k_q <= k_q >> 1;
        CMD_MUL: begin
          t_q <= x_new;
        end
        CMD_WB: begin
          unique case (ctrl.kind)
            PT_ADD: begin
              x1_q <= t_q;
              y1_q <= prod ^ t_q ^ y1_q;
            end
            PT_DBL_R: begin
              x1_q <= t_q;
              y1_q <= sq_out ^ prod ^ t_q;
            end
            default: begin
              x2_q <= t_q;
              y2_q <= sq_out ^ prod ^ t_q;
            end
          endcase
        end
        default: ;
      endcase
    end
  end

  assign status.k_lsb    = k_q[0];
  assign status.r_inf    = r_inf_q;
  assign status.x_eq     = (x1_q == x2_q);
  assign status.y_eq     = (y1_q == y2_q);
  assign status.x1_zero  = (x1_q == '0);
  assign status.div_done = div_done;
  assign status.mul_done = mul_done;

  assign rx    = x1_q;
  assign ry    = y1_q;
  assign r_inf = r_inf_q;

  // A step may only start a unit that is idle.
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy)
    else $error("divider started while busy");
  assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> !mul_busy)
    else $error("multiplier started while busy");

endmodule
