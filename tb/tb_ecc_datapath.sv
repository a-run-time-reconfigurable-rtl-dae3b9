// tb_ecc_datapath: drives the datapath step by step at m = 163, as the
// controller would, and compares the result point R with the reference
// point arithmetic: ECC-ADD (R <- R+S), ECC-Double of R, ECC-Double of S
// followed by R <- S, plus the scalar shift register, the R = O flag and the
// point comparisons. Points are random points of random curves
// y^2 + xy = x^3 + ax^2 + b (b chosen so that the point lies on the curve);
// every result is also checked to lie on that curve.
module tb_ecc_datapath;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned M = 163;
  localparam logic [M:0]  F = {1'b1, {(M-8){1'b0}}, 8'hC9};

  logic clk = 1'b0, rst_n = 1'b0;
  dp_ctrl_t ctrl;
  dp_status_t status;
  logic [M-1:0] k, px, py, qx, qy, a, rx, ry;
  logic r_inf;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_datapath dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input dp_cmd_e c, input pt_kind_e kd);
    ctrl.cmd = c; ctrl.kind = kd;
    @(negedge clk);
    ctrl.cmd = CMD_NOP;
  endtask

  task automatic point_op(input pt_kind_e kd);
    int n;
    step(CMD_DIV, kd);
    n = 0;
    ctrl.kind = kd;
    while (!status.div_done && n < 1000) begin @(negedge clk); n++; end
    step(CMD_MUL, kd);
    n = 0;
    while (!status.mul_done && n < 1000) begin @(negedge clk); n++; end
    step(CMD_WB, kd);
  endtask

  task automatic check_r(input pt_t e, input fe_t b, input string what);
    pt_t got;
    got.inf = r_inf; got.x = fe_t'(rx); got.y = fe_t'(ry);
    check(got.inf == e.inf && (e.inf || (got.x == e.x && got.y == e.y)), what);
    check(on_curve(got, fe_t'(a), b, M, fe_t'(F)), {what, " on curve"});
  endtask

  initial begin
    pt_t p, q, e;
    fe_t b;
    ctrl.cmd = CMD_NOP; ctrl.kind = PT_ADD;
    k = '0; px = '0; py = '0; qx = '0; qy = '0; a = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(r_inf, "R = O after reset");

    for (int t = 0; t < 6; t++) begin
      a = (t == 0) ? M'(1) : M'(rand_fe(M));
      p.inf = 1'b0; p.x = rand_fe(M); p.y = rand_fe(M);
      b = curve_b(p.x, p.y, fe_t'(a), M, fe_t'(F));
      q = pt_mul(fe_t'(3 + t), p, fe_t'(a), M, fe_t'(F));
      px = M'(p.x); py = M'(p.y); qx = M'(q.x); qy = M'(q.y);

      // R <- P + Q
      step(CMD_INIT_ADD, PT_ADD);
      check(!r_inf && rx == px && ry == py, "INIT_ADD loads P into R");
      check(!status.x_eq && !status.y_eq, "P and Q differ");
      point_op(PT_ADD);
      check_r(pt_add(p, q, fe_t'(a), M, fe_t'(F)), b, $sformatf("ADD %0d", t));

      // R <- 2P
      step(CMD_INIT_ADD, PT_ADD);
      point_op(PT_DBL_R);
      check_r(pt_dbl(p, fe_t'(a), M, fe_t'(F)), b, $sformatf("DBL_R %0d", t));

      // S <- 2Q, then R <- S
      step(CMD_INIT_ADD, PT_ADD);
      point_op(PT_DBL_S);
      check(rx == px && ry == py, "DBL_S leaves R alone");
      step(CMD_COPY_SR, PT_ADD);
      check_r(pt_dbl(q, fe_t'(a), M, fe_t'(F)), b, $sformatf("DBL_S %0d", t));

      // comparisons with R = S = P
      qx = px; qy = py;
      step(CMD_INIT_ADD, PT_ADD);
      check(status.x_eq && status.y_eq && !status.x1_zero, "R = S flags");
      step(CMD_SET_RINF, PT_ADD);
      check(r_inf && status.x1_zero, "SET_RINF");
    end

    // scalar register and start of kP
    k = M'(rand_fe(M));
    step(CMD_INIT_KP, PT_ADD);
    check(r_inf && rx == '0, "INIT_KP sets R = O");
    for (int i = 0; i < 8; i++) begin
      check(status.k_lsb == k[i], $sformatf("k bit %0d", i));
      step(CMD_SHIFT_K, PT_ADD);
    end
    step(CMD_COPY_SR, PT_ADD);
    check(!r_inf && rx == px && ry == py, "INIT_KP loads P into S");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
