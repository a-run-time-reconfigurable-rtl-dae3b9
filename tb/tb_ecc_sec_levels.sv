// tb_ecc_sec_levels: runs kP on co-processors built for the two smaller
// security levels, GF(2^113) with x^113+x^9+1 and GF(2^131) with
// x^131+x^8+x^3+x^2+1 (the SECG field polynomials), side by side. For each,
// two random scalars with about m/2 set bits are used with a random point on
// a random curve; results are compared with the reference model and the
// clock counts with the published figures (51,730 clocks for m = 113 and
// 68,887 for m = 131) within 10 %. The m = 163 level is covered by the
// top-level testbench.
module tb_ecc_sec_levels;
  import ecc_pkg::*;
  import gf_ref_pkg::*;

  localparam logic [113:0] F113 = (114'd1 << 113) | (114'd1 << 9) | 114'd1;
  localparam logic [131:0] F131 = (132'd1 << 131) | 132'h10D;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [WORD_W-1:0] rd113, rd131, wr_data = '0;
  logic done113, done131;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_coprocessor #(.M(113), .F(F113)) dut113 (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data(rd113), .done(done113));
  ecc_coprocessor #(.M(131), .F(F131)) dut131 (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data(rd131), .done(done131));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // both instances share the write port; words beyond an operand are ignored
  task automatic load(input logic [SEL_W-1:0] sel, input fe_t v);
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = {sel, IDX_W'(i)}; wr_data = v[32*i +: 32];
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  function automatic fe_t trunc(fe_t v, int m);
    return v & ((256'd1 << m) - 1);
  endfunction

  initial begin
    fe_t a, k, px, py, f, got_x, got_y;
    pt_t p, e;
    int m, c113, c131, cyc, paper;
    logic [31:0] st;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2; t++) begin
      a = rand_fe(131); px = rand_fe(131); py = rand_fe(131);
      do k = rand_fe(131); while (popcount(trunc(k, 113)) < 53 || popcount(trunc(k, 113)) > 60 ||
                                  popcount(k) < 62 || popcount(k) > 70);
      load(WSEL_A, a); load(WSEL_PX, px); load(WSEL_PY, py); load(WSEL_K, k);
      @(negedge clk);
      wr_en = 1'b1; wr_addr = {WSEL_CTRL, IDX_W'(0)}; wr_data = 32'h1;
      @(negedge clk);
      wr_en = 1'b0;
      cyc = 1; c113 = 0; c131 = 0;
      while (!(done113 && done131)) begin
        @(negedge clk); cyc++;
        if (done113 && c113 == 0) c113 = cyc;
        if (done131 && c131 == 0) c131 = cyc;
      end
      for (int lv = 0; lv < 2; lv++) begin
        m = lv ? 131 : 113;
        f = lv ? fe_t'(F131) : fe_t'(F113);
        p.inf = 1'b0; p.x = trunc(px, m); p.y = trunc(py, m);
        e = pt_mul(trunc(k, m), p, trunc(a, m), m, f);
        got_x = '0; got_y = '0;
        for (int i = 0; i < 5; i++) begin
          rd_addr = {RSEL_RX, IDX_W'(i)}; #1 got_x[32*i +: 32] = lv ? rd131 : rd113;
          rd_addr = {RSEL_RY, IDX_W'(i)}; #1 got_y[32*i +: 32] = lv ? rd131 : rd113;
        end
        rd_addr = {RSEL_STATUS, IDX_W'(0)}; #1 st = lv ? rd131 : rd113;
        check(!st[2] && got_x == e.x && got_y == e.y, $sformatf("kP m=%0d", m));
        cyc   = lv ? c131 : c113;
        paper = lv ? 68887 : 51730;
        $display("kP m=%0d weight(k)=%0d: %0d clocks (published: %0d)", m, popcount(trunc(k, m)), cyc, paper);
        check(cyc > paper * 9 / 10 && cyc < paper * 11 / 10, $sformatf("m=%0d clock count within 10 %%", m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
