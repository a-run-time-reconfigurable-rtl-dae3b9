// tb_ecc_ctrl: checks the control state machine at M = 16 against a
// behavioural model of the datapath status (scalar shift register, R = O
// flag, point comparisons, divider and multiplier that finish after fixed
// delays). For each run the sequence of datapath steps issued is compared,
// step by step, with the sequence the binary method requires, and the number
// of clocks from start to done is compared with the count worked out from the
// state sequence. ECC-ADD runs cover the ordinary case, P = -Q, P = Q and
// P = Q with x = 0.
module tb_ecc_ctrl;
  import ecc_pkg::*;

  localparam int unsigned M  = 16;
  localparam int unsigned DD = 5;   // divider delay of the model
  localparam int unsigned MD = 3;   // multiplier delay of the model

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  op_e op = OP_KP;
  dp_status_t status;
  dp_ctrl_t ctrl;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_ctrl #(.M(M)) dut (.*);

  // ---- datapath model
  logic [M-1:0] k_val, k_sh;
  logic r_inf, x_eq, y_eq, x1_zero;
  int dtimer, mtimer;
  dp_ctrl_t trace[$];

  always_ff @(posedge clk) begin
    if (ctrl.cmd != CMD_NOP) trace.push_back(ctrl);
    unique case (ctrl.cmd)
      CMD_INIT_KP:  begin k_sh <= k_val; r_inf <= 1'b1; end
      CMD_INIT_ADD: r_inf <= 1'b0;
      CMD_COPY_SR:  r_inf <= 1'b0;
      CMD_SET_RINF: r_inf <= 1'b1;
      CMD_SHIFT_K:  k_sh <= k_sh >> 1;
      default: ;
    endcase
    if (ctrl.cmd == CMD_DIV) dtimer <= DD; else if (dtimer > 0) dtimer <= dtimer - 1;
    if (ctrl.cmd == CMD_MUL) mtimer <= MD; else if (mtimer > 0) mtimer <= mtimer - 1;
  end

  always_comb begin
    status.k_lsb    = k_sh[0];
    status.r_inf    = r_inf;
    status.x_eq     = x_eq;
    status.y_eq     = y_eq;
    status.x1_zero  = x1_zero;
    status.div_done = (dtimer == 1);
    status.mul_done = (mtimer == 1);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic dp_ctrl_t st(dp_cmd_e c, pt_kind_e kd);
    dp_ctrl_t s;
    s.cmd = c; s.kind = kd;
    return s;
  endfunction

  // one operation: returns clocks from the start clock to the done clock
  task automatic run(input op_e o, output int cyc);
    trace.delete();
    @(negedge clk);
    op = o; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    check(busy, "busy after start");
    while (!done) begin @(negedge clk); cyc++; end
    cyc++;
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  task automatic compare(input dp_ctrl_t exp[$], input string what);
    check(trace.size() == exp.size(), $sformatf("%s: %0d steps, expected %0d", what, trace.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < trace.size(); i++)
      check(trace[i].cmd == exp[i].cmd && (trace[i].kind == exp[i].kind ||
            !(exp[i].cmd inside {CMD_DIV, CMD_MUL, CMD_WB})),
            $sformatf("%s: step %0d is %s, expected %s", what, i, trace[i].cmd.name(), exp[i].cmd.name()));
  endtask

  task automatic point_op(ref dp_ctrl_t exp[$], input pt_kind_e kd);
    exp.push_back(st(CMD_DIV, kd));
    exp.push_back(st(CMD_MUL, kd));
    exp.push_back(st(CMD_WB, kd));
  endtask

  initial begin
    dp_ctrl_t exp[$];
    int cyc, ecyc, nadd;
    bit rinf_m;
    x_eq = 1'b0; y_eq = 1'b0; x1_zero = 1'b0;
    k_val = '0; k_sh = '0; r_inf = 1'b1; dtimer = 0; mtimer = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- scalar multiplications
    for (int t = 0; t < 12; t++) begin
      k_val = (t == 0) ? '0 : (t == 1) ? '1 : (t == 2) ? M'(1) : (t == 3) ? M'(1) << (M-1) : M'($urandom);
      run(OP_KP, cyc);
      exp.delete();
      exp.push_back(st(CMD_INIT_KP, PT_ADD));
      rinf_m = 1'b1; nadd = 0;
      for (int i = 0; i < M; i++) begin
        if (k_val[i]) begin
          if (rinf_m) begin exp.push_back(st(CMD_COPY_SR, PT_ADD)); rinf_m = 1'b0; end
          else begin point_op(exp, PT_ADD); nadd++; end
        end
        point_op(exp, PT_DBL_S);
        exp.push_back(st(CMD_SHIFT_K, PT_ADD));
      end
      compare(exp, $sformatf("kP k=%h", k_val));
      ecyc = 2 + M * (3 + DD + MD) + nadd * (1 + DD + MD);
      check(cyc == ecyc, $sformatf("kP k=%h: %0d clocks, expected %0d", k_val, cyc, ecyc));
    end

    // ---- single ECC-ADD
    for (int t = 0; t < 4; t++) begin
      x_eq = (t != 0); y_eq = (t >= 2); x1_zero = (t == 3);
      run(OP_ADD, cyc);
      exp.delete();
      exp.push_back(st(CMD_INIT_ADD, PT_ADD));
      unique case (t)
        0: point_op(exp, PT_ADD);
        1: exp.push_back(st(CMD_SET_RINF, PT_ADD));
        2: point_op(exp, PT_DBL_R);
        3: exp.push_back(st(CMD_SET_RINF, PT_ADD));
      endcase
      compare(exp, $sformatf("ADD case %0d", t));
      ecyc = (t == 0 || t == 2) ? 3 + DD + MD : 3;
      check(cyc == ecyc, $sformatf("ADD case %0d: %0d clocks, expected %0d", t, cyc, ecyc));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
