// ecc_ctrl: control unit of the co-processor, a finite state machine.
//
// For OP_KP it runs the binary method on R = kP, scanning k from bit 0 to
// bit M-1:
//     R <- O, S <- P
//     for i = 0 .. M-1: if k_i = 1 then R <- R + S;  S <- 2S
// For OP_ADD it performs the single ECC-ADD R <- P + Q.
// ECC-ADD and ECC-Double share the arithmetic units and are executed one
// after the other, each as the datapath steps DIV, MUL, WB (see
// ecc_datapath), waiting for the divider and multiplier to finish.
// Additions whose result needs no division are handled directly:
//     R = O          : R <- S              (first set bit of k)
//     x(R) = x(S), y(R) != y(S), or R = S with x = 0 : R <- O
//     R = S          : R <- 2R             (ECC-Double instead of ECC-ADD)
//
// Interface: start (one-clock pulse, with op) is accepted when idle. busy is
// high from the clock after start until done, which pulses for one clock when
// the result is in the datapath's R registers.
//
// Timing: a division takes at most 2M clocks and a product M clocks; a point
// operation costs the division plus M + 4 clocks, and each bit of k adds one
// clock for the bit test and one for the shift.
//
// The binary method, serial execution and LSB-first scan follow the
// document; the handling of O and of R = +-S is this design's addition.
module ecc_ctrl
  import ecc_pkg::*;
#(
  parameter int unsigned M = 163
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  op_e        op,
  input  dp_status_t status,
  output dp_ctrl_t   ctrl,
  output logic       busy,
  output logic       done
);

  localparam int unsigned CW = $clog2(M + 1);

  typedef enum logic [3:0] {
    S_IDLE,
    S_BIT,        // test k_i
    S_ADD,        // decide how to add S to R
    S_DBL,        // start doubling S
    S_DIV_WAIT,
    S_MUL_WAIT,
    S_NEXT,       // shift k, count the bit
    S_DONE
  } state_e;

  state_e   state_q, state_d;
  pt_kind_e kind_q, kind_d;
  op_e      op_q, op_d;
  logic [CW-1:0] bit_q, bit_d;

  always_comb begin
    state_d   = state_q;
    kind_d    = kind_q;
    op_d      = op_q;
    bit_d     = bit_q;
    ctrl.cmd  = CMD_NOP;
    ctrl.kind = kind_q;
    done      = 1'b0;

    unique case (state_q)
      S_IDLE: if (start) begin
        op_d = op;
        if (op == OP_KP) begin
          ctrl.cmd = CMD_INIT_KP;
          bit_d    = '0;
          state_d  = S_BIT;
        end else begin
          ctrl.cmd = CMD_INIT_ADD;
          state_d  = S_ADD;
        end
      end

      S_BIT: begin
        if (!status.k_lsb) state_d = S_DBL;
        else if (status.r_inf) begin
          ctrl.cmd = CMD_COPY_SR;
          state_d  = S_DBL;
        end else state_d = S_ADD;
      end

      S_ADD: begin
        if (status.x_eq && (!status.y_eq || status.x1_zero)) begin
          ctrl.cmd = CMD_SET_RINF;
          state_d  = (op_q == OP_ADD) ? S_DONE : S_DBL;
        end else begin
          kind_d    = status.x_eq ? PT_DBL_R : PT_ADD;
          ctrl.kind = kind_d;
          ctrl.cmd  = CMD_DIV;
          state_d   = S_DIV_WAIT;
        end
      end

      S_DBL: begin
        kind_d    = PT_DBL_S;
        ctrl.kind = PT_DBL_S;
        ctrl.cmd  = CMD_DIV;
        state_d   = S_DIV_WAIT;
      end

      S_DIV_WAIT: if (status.div_done) begin
        ctrl.cmd = CMD_MUL;
        state_d  = S_MUL_WAIT;
      end

      S_MUL_WAIT: if (status.mul_done) begin
        ctrl.cmd = CMD_WB;
        if (kind_q == PT_DBL_S) state_d = S_NEXT;
        else                    state_d = (op_q == OP_ADD) ? S_DONE : S_DBL;
      end

      S_NEXT: begin
        ctrl.cmd = CMD_SHIFT_K;
        bit_d    = bit_q + 1'b1;
        state_d  = (bit_q == CW'(M - 1)) ? S_DONE : S_BIT;
      end

      S_DONE: begin
        done    = 1'b1;
        state_d = S_IDLE;
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      kind_q  <= PT_ADD;
      op_q    <= OP_KP;
      bit_q   <= '0;
    end else begin
      state_q <= state_d;
      kind_q  <= kind_d;
      op_q    <= op_d;
      bit_q   <= bit_d;
    end
  end

  assign busy = (state_q != S_IDLE);

endmodule
