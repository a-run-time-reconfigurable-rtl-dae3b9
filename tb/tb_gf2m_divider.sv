// tb_gf2m_divider: checks q = y/x at m = 163 by multiplying back with the
// reference multiplier (q*x must equal y), checks inverses (y = 1) against
// the Fermat reference inverse, the x = 0 case, and that no division takes
// more than 2M clocks from start to done.
module tb_gf2m_divider;
  import gf_ref_pkg::*;

  localparam int unsigned M = 163;
  localparam logic [M:0]  F = {1'b1, {(M-8){1'b0}}, 8'hC9};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [M-1:0] x, y, q;
  logic busy, done;
  int checks = 0, failures = 0;
  int max_cyc = 0;
  longint sum_cyc = 0;
  int ndiv = 0;

  always #5 clk = ~clk;

  gf2m_divider dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [M-1:0] dx, input logic [M-1:0] dy, output logic [M-1:0] res, output int cyc);
    @(negedge clk);
    x = dx; y = dy; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    x = '1; y = '1;
    cyc = 1;
    while (!done && cyc < 4*M) begin @(negedge clk); cyc++; end
    res = q;
  endtask

  initial begin
    logic [M-1:0] dx, dy, r;
    fe_t chk;
    int cyc;
    x = '0; y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      dx = (i == 0) ? M'(1) : (i == 1) ? '1 : (i == 2) ? M'(1) << (M-1) : M'(rand_fe(M));
      if (dx == '0) dx = M'(1);
      dy = (i % 3 == 0) ? M'(1) : M'(rand_fe(M));
      run(dx, dy, r, cyc);
      chk = gf_mul(fe_t'(r), fe_t'(dx), M, fe_t'(F));
      checks++;
      if (chk[M-1:0] !== dy) begin
        failures++;
        $display("FAIL x=%h y=%h q=%h", dx, dy, r);
      end
      if (dy == M'(1)) begin
        chk = gf_inv(fe_t'(dx), M, fe_t'(F));
        checks++;
        if (chk[M-1:0] !== r) begin failures++; $display("FAIL inverse of %h", dx); end
      end
      checks++;
      if (cyc > 2*M) begin failures++; $display("FAIL %0d cycles", cyc); end
      if (cyc > max_cyc) max_cyc = cyc;
      sum_cyc += cyc; ndiv++;
    end
    run('0, M'(5), r, cyc);
    checks++;
    if (r !== '0 || cyc != 1) begin failures++; $display("FAIL x=0: q=%h cycles=%0d", r, cyc); end
    $display("division cycles: max %0d, mean %0d (M=%0d)", max_cyc, int'(sum_cyc / ndiv), M);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
