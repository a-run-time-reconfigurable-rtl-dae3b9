// tb_ecc_coprocessor: end-to-end test of the co-processor at its default
// parameters (m = 163, x^163+x^7+x^6+x^3+1), driven only through the 32-bit
// host port. A random point P on a random curve y^2 + xy = x^3 + ax^2 + b is
// loaded word by word, then:
//   * kP for random scalars with about m/2 set bits, for k = 0, 1, 2 and
//     2^(m-1), compared with a reference double-and-add model and checked to
//     lie on the curve;
//   * the clock count of each random kP, compared with 107,043 clocks (the
//     published figure for m = 163) within 10 %;
//   * single ECC-ADD: P + Q, P + P and P + (-P), and k1P + k2P = (k1+k2)P
//     using the co-processor's own results;
//   * a start written while busy, which must be ignored.
// Each mechanism of the controller (first set bit copying S into R, ECC-ADD,
// ECC-Double, ADD turned into a doubling, ADD giving O, the ignored start) is
// counted, and one that never happened is a failure.
module tb_ecc_coprocessor;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned M  = 163;
  localparam logic [M:0]  F  = {1'b1, {(M-8){1'b0}}, 8'hC9};
  localparam int unsigned NW = (M + 31) / 32;
  localparam int          PAPER_CYCLES = 107043;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [WORD_W-1:0] wr_data = '0, rd_data;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_coprocessor dut (.*);

  // ---- mechanism counters (observed on the controller's step bus)
  int n_copy = 0, n_add = 0, n_dbl = 0, n_dbl_r = 0, n_rinf = 0, n_ignored = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ctrl.cmd == CMD_COPY_SR) n_copy++;
    if (dut.ctrl.cmd == CMD_SET_RINF) n_rinf++;
    if (dut.ctrl.cmd == CMD_DIV && dut.ctrl.kind == PT_ADD) n_add++;
    if (dut.ctrl.cmd == CMD_DIV && dut.ctrl.kind == PT_DBL_S) n_dbl++;
    if (dut.ctrl.cmd == CMD_DIV && dut.ctrl.kind == PT_DBL_R) n_dbl_r++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
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
  endtask

  task automatic rd(input logic [SEL_W-1:0] sel, input int idx, output logic [31:0] d);
    rd_addr = {sel, IDX_W'(idx)};
    #1 d = rd_data;
  endtask

  task automatic read_result(output pt_t r);
    logic [31:0] w;
    r.x = '0; r.y = '0;
    for (int i = 0; i < NW; i++) begin
      rd(RSEL_RX, i, w); r.x[32*i +: 32] = w;
      rd(RSEL_RY, i, w); r.y[32*i +: 32] = w;
    end
    rd(RSEL_STATUS, 0, w);
    r.inf = w[2];
  endtask

  // start an operation and wait for done; returns clocks from start to done
  task automatic run(input op_e o, output int cyc, input bit poke = 1'b0);
    logic [31:0] w;
    wr(WSEL_CTRL, 0, {30'b0, o == OP_ADD, 1'b1});
    cyc = 1;
    rd(RSEL_STATUS, 0, w);
    check(w[1] && !w[0], "busy and not done after start");
    if (poke) begin
      // a second start while busy must be ignored
      wr(WSEL_CTRL, 0, 32'h3);
      cyc += 2;
      rd(RSEL_STATUS, 0, w);
      if (w[1]) n_ignored++;
    end
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  function automatic bit same(pt_t x, pt_t y);
    return x.inf == y.inf && (x.inf || (x.x == y.x && x.y == y.y));
  endfunction

  initial begin
    pt_t p, q, r, e, r1, r2;
    fe_t a, b, k, k1, k2;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    a = rand_fe(M);
    p.inf = 1'b0; p.x = rand_fe(M); p.y = rand_fe(M);
    b = curve_b(p.x, p.y, a, M, fe_t'(F));
    load(WSEL_A, a);
    load(WSEL_PX, p.x);
    load(WSEL_PY, p.y);

    // ---- kP with random scalars of about m/2 set bits
    for (int t = 0; t < 3; t++) begin
      do k = rand_fe(M); while (popcount(k) < 76 || popcount(k) > 87);
      load(WSEL_K, k);
      run(OP_KP, cyc, t == 0);
      read_result(r);
      e = pt_mul(k, p, a, M, fe_t'(F));
      check(same(r, e), $sformatf("kP, k=%h", k));
      check(on_curve(r, a, b, M, fe_t'(F)), "kP on curve");
      $display("kP m=%0d weight(k)=%0d: %0d clocks (published: %0d)", M, popcount(k), cyc, PAPER_CYCLES);
      check(cyc > PAPER_CYCLES * 9 / 10 && cyc < PAPER_CYCLES * 11 / 10, "kP clock count within 10 % of the published figure");
      if (t == 0) r1 = r;
      if (t == 0) k1 = k;
    end

    // ---- special scalars
    for (int t = 0; t < 4; t++) begin
      k = (t == 0) ? '0 : (t == 1) ? 256'd1 : (t == 2) ? 256'd2 : 256'd1 << (M-1);
      load(WSEL_K, k);
      run(OP_KP, cyc);
      read_result(r);
      e = pt_mul(k, p, a, M, fe_t'(F));
      check(same(r, e), $sformatf("kP, k=%h", k));
    end

    // ---- single ECC-ADD
    q = pt_mul(256'd5, p, a, M, fe_t'(F));
    load(WSEL_QX, q.x); load(WSEL_QY, q.y);
    run(OP_ADD, cyc);
    read_result(r);
    check(same(r, pt_add(p, q, a, M, fe_t'(F))), "P + Q");
    check(cyc < 3 * M, "single ECC-ADD takes one division and one product");

    load(WSEL_QX, p.x); load(WSEL_QY, p.y);
    run(OP_ADD, cyc);
    read_result(r);
    check(same(r, pt_dbl(p, a, M, fe_t'(F))), "P + P = 2P");

    load(WSEL_QX, p.x); load(WSEL_QY, p.x ^ p.y);
    run(OP_ADD, cyc);
    read_result(r);
    check(r.inf, "P + (-P) = O");

    // k1 P + k2 P = (k1 + k2) P, from the co-processor's own results
    k2 = rand_fe(M - 1);
    load(WSEL_K, k2);
    run(OP_KP, cyc);
    read_result(r2);
    load(WSEL_PX, r1.x); load(WSEL_PY, r1.y);
    load(WSEL_QX, r2.x); load(WSEL_QY, r2.y);
    run(OP_ADD, cyc);
    read_result(r);
    e = pt_mul((k1 + k2) & ((256'd1 << M) - 1), p, a, M, fe_t'(F));
    if ((k1 + k2) >> M == 0) check(same(r, e), "k1P + k2P = (k1+k2)P");

    // ---- every mechanism happened
    $display("mechanisms: copy %0d, add %0d, double %0d, add-as-double %0d, result O %0d, ignored start %0d",
             n_copy, n_add, n_dbl, n_dbl_r, n_rinf, n_ignored);
    check(n_copy > 0, "first set bit copied S into R");
    check(n_add > 0, "ECC-ADD");
    check(n_dbl > 0, "ECC-Double");
    check(n_dbl_r > 0, "ECC-ADD of equal points doubled");
    check(n_rinf > 0, "ECC-ADD gave O");
    check(n_ignored > 0, "start while busy ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
