// tb_gf2m_squarer: checks the combinational squarer against a reference
// multiplication a*a, at m = 163 (default polynomial) and at m = 113 and
// m = 131 with their own field polynomials.
module tb_gf2m_squarer;
  import gf_ref_pkg::*;

  localparam logic [163:0] F163 = {1'b1, 155'b0, 8'hC9};             // x^163+x^7+x^6+x^3+1
  localparam logic [113:0] F113 = (114'd1 << 113) | (114'd1 << 9) | 114'd1;
  localparam logic [131:0] F131 = (132'd1 << 131) | 132'h10D;       // x^131+x^8+x^3+x^2+1

  logic [162:0] a163, y163;
  logic [112:0] a113, y113;
  logic [130:0] a131, y131;
  int checks = 0, failures = 0;

  gf2m_squarer dut163 (.a(a163), .y(y163));
  gf2m_squarer #(.M(113), .F(F113)) dut113 (.a(a113), .y(y113));
  gf2m_squarer #(.M(131), .F(F131)) dut131 (.a(a131), .y(y131));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t e;
    for (int i = 0; i < 300; i++) begin
      a163 = (i == 0) ? '1 : (i == 1) ? 163'd1 << 162 : 163'(rand_fe(163));
      a113 = (i == 0) ? '1 : 113'(rand_fe(113));
      a131 = (i == 0) ? '1 : 131'(rand_fe(131));
      #1;
      e = gf_mul(fe_t'(a163), fe_t'(a163), 163, fe_t'(F163));
      checks++;
      if (y163 !== e[162:0]) begin failures++; $display("FAIL m=163 a=%h", a163); end
      e = gf_mul(fe_t'(a113), fe_t'(a113), 113, fe_t'(F113));
      checks++;
      if (y113 !== e[112:0]) begin failures++; $display("FAIL m=113 a=%h", a113); end
      e = gf_mul(fe_t'(a131), fe_t'(a131), 131, fe_t'(F131));
      checks++;
      if (y131 !== e[130:0]) begin failures++; $display("FAIL m=131 a=%h", a131); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
