// tb_ecc_io_regs: checks the 32-bit host interface at m = 163: word-wise
// loading of every operand (including the dropped bits above M and writes to
// word indices beyond the operand), the start pulse and operation bit, the
// start being ignored while busy, the done flag, and reads of the result
// words and the status word.
module tb_ecc_io_regs;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned M  = 163;
  localparam int unsigned NW = (M + 31) / 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [WORD_W-1:0] wr_data = '0, rd_data;
  logic done, start, core_busy = 1'b0, core_done = 1'b0, r_inf = 1'b0;
  op_e  op;
  logic [M-1:0] k, px, py, qx, qy, a, rx = '0, ry = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_io_regs dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [SEL_W-1:0] sel, input int idx, input logic [31:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_addr = {sel, IDX_W'(idx)}; wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic load(input logic [SEL_W-1:0] sel, input fe_t v);
    for (int i = 0; i < NW; i++) wr(sel, i, v[32*i +: 32]);
    wr(sel, NW, 32'hFFFF_FFFF);      // beyond the operand: ignored
  endtask

  initial begin
    fe_t v[6];
    logic [SEL_W-1:0] sels[6];
    logic [M-1:0] got[6];
    sels = '{WSEL_K, WSEL_PX, WSEL_PY, WSEL_QX, WSEL_QY, WSEL_A};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 4; round++) begin
      for (int j = 0; j < 6; j++) begin
        v[j] = rand_fe(192);        // also sets the bits above M
        load(sels[j], v[j]);
      end
      got = '{k, px, py, qx, qy, a};
      for (int j = 0; j < 6; j++) check(got[j] == v[j][M-1:0], $sformatf("operand %0d", j));
    end

    // reads of the result and status
    rx = M'(rand_fe(M)); ry = M'(rand_fe(M)); r_inf = 1'b1;
    for (int i = 0; i < NW; i++) begin
      fe_t ex, ey;
      ex = fe_t'(rx); ey = fe_t'(ry);
      rd_addr = {RSEL_RX, IDX_W'(i)}; #1;
      check(rd_data == ex[32*i +: 32], "read rx");
      rd_addr = {RSEL_RY, IDX_W'(i)}; #1;
      check(rd_data == ey[32*i +: 32], "read ry");
    end
    rd_addr = {RSEL_STATUS, IDX_W'(0)}; #1;
    check(rd_data == 32'h4, "status idle, result O");

    // start and operation
    @(negedge clk);
    wr_en = 1'b1; wr_addr = {WSEL_CTRL, IDX_W'(0)}; wr_data = 32'h3; #1;
    check(start && op == OP_ADD, "start ADD");
    wr_data = 32'h1; #1;
    check(start && op == OP_KP, "start kP");
    wr_data = 32'h2; #1;
    check(!start, "no start without bit 0");
    core_busy = 1'b1; wr_data = 32'h1; #1;
    check(!start, "start ignored while busy");
    @(negedge clk);
    wr_en = 1'b0;
    rd_addr = {RSEL_STATUS, IDX_W'(0)}; #1;
    check(rd_data[1] == 1'b1 && rd_data[0] == 1'b0, "status busy");

    // done flag
    core_done = 1'b1;
    @(negedge clk);
    core_done = 1'b0; core_busy = 1'b0;
    check(done == 1'b1, "done set");
    repeat (3) @(negedge clk);
    check(done == 1'b1, "done held");
    wr(WSEL_CTRL, 0, 32'h1);
    check(done == 1'b0, "done cleared by start");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
