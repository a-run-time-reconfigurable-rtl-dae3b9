// tb_gf2m_serial_mult: checks the bit-serial multiplier at m = 163 against a
// full-product-then-reduce reference, including 0, 1 and all-ones operands,
// and checks that each product takes M+1 clocks from start to done (one load
// clock and M steps).
module tb_gf2m_serial_mult;
  import gf_ref_pkg::*;

  localparam int unsigned M = 163;
  localparam logic [M:0]  F = {1'b1, {(M-8){1'b0}}, 8'hC9};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [M-1:0] a, b, p;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gf2m_serial_mult dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [M-1:0] x, input logic [M-1:0] y);
    fe_t exp;
    int cyc;
    exp = gf_mul(fe_t'(x), fe_t'(y), M, fe_t'(F));
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = '1; b = '1;   // operands must have been latched
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (p !== exp[M-1:0]) begin
      failures++;
      $display("FAIL product a=%h b=%h got %h exp %h", x, y, p, exp[M-1:0]);
    end
    checks++;
    if (cyc != M + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, M + 1);
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run('0, '1);
    run('1, '0);
    run(M'(1), '1);
    run('1, M'(1));
    run('1, '1);
    run(M'(1) << (M-1), M'(1) << (M-1));
    for (int i = 0; i < 200; i++) run(M'(rand_fe(M)), M'(rand_fe(M)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
