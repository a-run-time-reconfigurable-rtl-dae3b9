// ecc_io_regs: 32-bit host interface of the co-processor.
//
// The host writes the scalar k, the point P (and Q for ECC-ADD) and the curve
// coefficient a one 32-bit word at a time; word IDX of an operand holds its
// bits 32*IDX+31 .. 32*IDX, and bits above M are dropped. Writing the control
// word with bit 0 set starts an operation: bit 1 selects OP_KP (0) or OP_ADD
// (1). A start while the core is busy is ignored.
//
// Reads are combinational: the result x and y words, and a status word with
// bit 0 done (set when the core finishes, cleared by the next start), bit 1
// busy and bit 2 "result is the point at infinity". done is also a port, the
// signal with which the co-processor tells the host that it has finished.
//
// Address map (ecc_pkg): address = {SEL[2:0], IDX[4:0]}.
//
// Word-wise loading of k and P follows the document; the address map, the
// control word and the status word are this design's choice.
module ecc_io_regs
  import ecc_pkg::*;
#(
  parameter int unsigned M = 163
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WORD_W-1:0] wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WORD_W-1:0] rd_data,
  output logic              done,
  // core side
  output logic              start,
  output op_e               op,
  input  logic              core_busy,
  input  logic              core_done,
  output logic [M-1:0]      k,
  output logic [M-1:0]      px,
  output logic [M-1:0]      py,
  output logic [M-1:0]      qx,
  output logic [M-1:0]      qy,
  output logic [M-1:0]      a,
  input  logic [M-1:0]      rx,
  input  logic [M-1:0]      ry,
  input  logic              r_inf
);

  localparam int unsigned NW = (M + WORD_W - 1) / WORD_W;   // words per element
  localparam int unsigned FW = NW * WORD_W;

  logic [M-1:0]  k_q, px_q, py_q, qx_q, qy_q, a_q;
  logic [FW-1:0] rx_w, ry_w;
  logic          done_q;
  logic [SEL_W-1:0] wsel, rsel;
  logic [IDX_W-1:0] widx, ridx;

  // replace word idx of an M-bit operand; bits above M are dropped
  function automatic logic [M-1:0] put_word(input logic [M-1:0] v, input logic [IDX_W-1:0] idx,
                                            input logic [WORD_W-1:0] w);
    logic [FW-1:0] t;
    t = FW'(v);
    t[idx*WORD_W +: WORD_W] = w;
    return t[M-1:0];
  endfunction

  assign {wsel, widx} = wr_addr;
  assign {rsel, ridx} = rd_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_q  <= '0; px_q <= '0; py_q <= '0;
      qx_q <= '0; qy_q <= '0; a_q  <= '0;
      done_q <= 1'b0;
    end else begin
      if (wr_en && (widx < IDX_W'(NW))) begin
        unique case (wsel)
          WSEL_K:  k_q  <= put_word(k_q,  widx, wr_data);
          WSEL_PX: px_q <= put_word(px_q, widx, wr_data);
          WSEL_PY: py_q <= put_word(py_q, widx, wr_data);
          WSEL_QX: qx_q <= put_word(qx_q, widx, wr_data);
          WSEL_QY: qy_q <= put_word(qy_q, widx, wr_data);
          WSEL_A:  a_q  <= put_word(a_q,  widx, wr_data);
          default: ;
        endcase
      end
      if (start)          done_q <= 1'b0;
      else if (core_done) done_q <= 1'b1;
    end
  end

  assign start = wr_en && (wsel == WSEL_CTRL) && wr_data[0] && !core_busy;
  assign op    = op_e'(wr_data[1]);

  assign k  = k_q;
  assign px = px_q;
  assign py = py_q;
  assign qx = qx_q;
  assign qy = qy_q;
  assign a  = a_q;

  assign rx_w = FW'(rx);
  assign ry_w = FW'(ry);

  always_comb begin
    rd_data = '0;
    if (ridx < IDX_W'(NW)) begin
      unique case (rsel)
        RSEL_RX:     rd_data = rx_w[ridx*WORD_W +: WORD_W];
        RSEL_RY:     rd_data = ry_w[ridx*WORD_W +: WORD_W];
        RSEL_STATUS: rd_data = {{(WORD_W-3){1'b0}}, r_inf, core_busy, done_q};
        default:     rd_data = '0;
      endcase
    end
  end

  assign done = done_q;

endmodule
