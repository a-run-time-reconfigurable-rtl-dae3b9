// ecc_pkg: types and constants shared by the GF(2^m) elliptic-curve co-processor.
//
// The host talks to the co-processor through a 32-bit word port. An address is
// {SEL, IDX}: SEL picks an operand (or the control / status word) and IDX picks
// the 32-bit word inside it, word 0 holding bits 31:0. The word size follows
// the 32-bit transfers of the original system; the address split is this
// design's own choice.
//
// The controller drives the datapath with one dp_ctrl_t per clock: a step
// (dp_cmd_e) and the point operation it belongs to (pt_kind_e). The datapath
// answers with dp_status_t.
package ecc_pkg;

  localparam int unsigned WORD_W = 32;
  localparam int unsigned SEL_W  = 3;
  localparam int unsigned IDX_W  = 5;          // up to 32 words: m <= 1024
  localparam int unsigned ADDR_W = SEL_W + IDX_W;

  // Write selects
  localparam logic [SEL_W-1:0] WSEL_K    = 3'd0;  // scalar k
  localparam logic [SEL_W-1:0] WSEL_PX   = 3'd1;  // point P, x
  localparam logic [SEL_W-1:0] WSEL_PY   = 3'd2;  // point P, y
  localparam logic [SEL_W-1:0] WSEL_QX   = 3'd3;  // point Q, x (ECC-ADD only)
  localparam logic [SEL_W-1:0] WSEL_QY   = 3'd4;  // point Q, y (ECC-ADD only)
  localparam logic [SEL_W-1:0] WSEL_A    = 3'd5;  // curve coefficient a
  localparam logic [SEL_W-1:0] WSEL_CTRL = 3'd6;  // bit0 start, bit1 operation

  // Read selects
  localparam logic [SEL_W-1:0] RSEL_RX     = 3'd0;  // result x
  localparam logic [SEL_W-1:0] RSEL_RY     = 3'd1;  // result y
  localparam logic [SEL_W-1:0] RSEL_STATUS = 3'd7;  // bit0 done, bit1 busy, bit2 result is O

  // Operation requested by the host
  typedef enum logic {
    OP_KP  = 1'b0,   // R = kP, binary method
    OP_ADD = 1'b1    // R = P + Q, a single ECC-ADD
  } op_e;

  // One datapath step
  typedef enum logic [3:0] {
    CMD_NOP,
    CMD_INIT_KP,     // R <- O, S <- P, k shift register <- k
    CMD_INIT_ADD,    // R <- P, S <- Q
    CMD_COPY_SR,     // R <- S (adding S to R = O)
    CMD_SET_RINF,    // R <- O
    CMD_SHIFT_K,     // next bit of k
    CMD_DIV,         // start the divider on the slope quotient
    CMD_MUL,         // latch lambda and new x, start the multiplier
    CMD_WB           // write the new point back
  } dp_cmd_e;

  // Which point operation a step belongs to
  typedef enum logic [1:0] {
    PT_ADD,          // R <- R + S
    PT_DBL_S,        // S <- 2S
    PT_DBL_R         // R <- 2R (ECC-ADD with R = S)
  } pt_kind_e;

  typedef struct packed {
    dp_cmd_e  cmd;
    pt_kind_e kind;
  } dp_ctrl_t;

  typedef struct packed {
    logic k_lsb;     // current bit of k
    logic r_inf;     // R is the point at infinity
    logic x_eq;      // x(R) == x(S)
    logic y_eq;      // y(R) == y(S)
    logic x1_zero;   // x(R) == 0
    logic div_done;  // divider finished (one-cycle pulse)
    logic mul_done;  // multiplier finished (one-cycle pulse)
  } dp_status_t;

endpackage
