// ecc_coprocessor: elliptic-curve scalar multiplication co-processor over
// GF(2^m), polynomial basis, affine coordinates (top level).
//
// Computes R = kP by the binary method (k scanned from bit 0 upwards, one
// ECC-Double per bit and one ECC-ADD per set bit, executed one after the other
// on shared units) or, on request, a single ECC-ADD R = P + Q. The field size
// M and the field polynomial F are parameters: one instance serves one field,
// and a different security level is a different build of the same RTL (in the
// original system, a different partial configuration of the FPGA region that
// holds the co-processor).
//
// Blocks: ecc_io_regs (32-bit host port), ecc_ctrl (state machine),
// ecc_datapath (registers, multiplexers, divider, serial multiplier, squarer).
//
// Host port: write k, Px, Py (Qx, Qy for ECC-ADD) and a word by word, then
// write the control word to start; done rises when the result can be read.
// See ecc_io_regs for the address map.
//
// Timing at m = 163: about 106,000 clocks per kP for a scalar with m/2 set
// bits (about 1.06 ms at 100 MHz); see ecc_ctrl for the cost of each step.
module ecc_coprocessor
  import ecc_pkg::*;
#(
  parameter int unsigned M = 163,
  parameter logic [M:0]  F = {1'b1, {(M-8){1'b0}}, 8'hC9}   // x^163+x^7+x^6+x^3+1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WORD_W-1:0] wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WORD_W-1:0] rd_data,
  output logic              done
);

  logic         start, core_busy, core_done, r_inf;
  op_e          op;
  logic [M-1:0] k, px, py, qx, qy, a, rx, ry;
  dp_ctrl_t     ctrl;
  dp_status_t   status;

  ecc_io_regs #(.M(M)) u_io (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data, .done,
    .start, .op, .core_busy, .core_done,
    .k, .px, .py, .qx, .qy, .a, .rx, .ry, .r_inf
  );

  ecc_ctrl #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .op, .status, .ctrl, .busy(core_busy), .done(core_done)
  );

  ecc_datapath #(.M(M), .F(F)) u_dp (
    .clk, .rst_n, .ctrl, .status,
    .k, .px, .py, .qx, .qy, .a, .rx, .ry, .r_inf
  );

endmodule
