// tb_gf_sqr: the combinational squarer against the reference multiplier
// (a*a) for random and corner-case inputs, at m = 163 and at m = 283.
module tb_gf_sqr;
  import gf_ref_pkg::*;
  localparam int M  = 163;
  localparam int M2 = 283;
  localparam logic [M:0]  F  = (M+1)'(gf_pkg::field_poly(M));
  localparam logic [M2:0] F2 = (M2+1)'(gf_pkg::field_poly(M2));

  logic [M-1:0]  a, c;
  logic [M2-1:0] a2, c2;
  int checks = 0, failures = 0;

  gf_sqr dut (.a, .c);
  gf_sqr #(.M(M2)) dut2 (.a(a2), .c(c2));

  task automatic check(input elem_t e, input elem_t e2);
    elem_t exp, exp2;
    a = e[M-1:0]; a2 = e2[M2-1:0];
    #1;
    exp  = ref_mul(M,  elem_t'(F),  e,  e);
    exp2 = ref_mul(M2, elem_t'(F2), e2, e2);
    checks += 2;
    if (c !== exp[M-1:0])    begin failures++; $display("FAIL m=163 a=%h got %h exp %h", a, c, exp[M-1:0]); end
    if (c2 !== exp2[M2-1:0]) begin failures++; $display("FAIL m=283 a=%h got %h exp %h", a2, c2, exp2[M2-1:0]); end
  endtask

  initial begin
    check('0, '0);
    check(1, 1);
    check(elem_t'(1) << (M - 1), elem_t'(1) << (M2 - 1));
    check((elem_t'(1) << M) - 1, (elem_t'(1) << M2) - 1);
    for (int i = 0; i < 100; i++) check(rand_elem(M), rand_elem(M2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
