// tb_gf_mul_serial: random and corner-case products of the bit-serial
// multiplier at m = 163 against the reference multiplier; also checks that
// the product arrives exactly m+1 clocks after start.
module tb_gf_mul_serial;
  import gf_ref_pkg::*;
  localparam int M = 163;
  localparam logic [M:0] F = (M+1)'(gf_pkg::field_poly(M));

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] a, b, c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gf_mul_serial dut (.*);

  task automatic run(input logic [M-1:0] ta, input logic [M-1:0] tb_);
    int cyc;
    elem_t exp;
    a = ta; b = tb_;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp = ref_mul(M, elem_t'(F), elem_t'(ta), elem_t'(tb_));
    checks += 2;
    if (c !== exp[M-1:0]) begin failures++; $display("FAIL product a=%h b=%h got %h exp %h", ta, tb_, c, exp[M-1:0]); end
    if (cyc != M + 1) begin failures++; $display("FAIL latency %0d, expected %0d", cyc, M + 1); end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run('0, '1);
    run(1, '1);
    run('1, '1);
    run({1'b1, {(M-1){1'b0}}}, {1'b1, {(M-1){1'b0}}});
    for (int i = 0; i < 60; i++) begin
      elem_t ra, rb;
      ra = rand_elem(M);
      rb = rand_elem(M);
      run(ra[M-1:0], rb[M-1:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
