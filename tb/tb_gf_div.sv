// tb_gf_div: the divider at m = 163. Each quotient q = y/x is checked by the
// reference multiplier (q*x must equal y), random cases are also compared
// with y * x^(2^m-2), and the latency is checked against the 2m-1 iteration
// bound of the algorithm (done at most 2m+1 clocks after start).
module tb_gf_div;
  import gf_ref_pkg::*;
  localparam int M = 163;
  localparam logic [M:0] F = (M+1)'(gf_pkg::field_poly(M));

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] x, y, q;
  int checks = 0, failures = 0, maxcyc = 0;

  always #5 clk = ~clk;

  gf_div dut (.*);

  task automatic run(input elem_t tx, input elem_t ty, input bit full);
    int cyc;
    elem_t back, exp;
    x = tx[M-1:0]; y = ty[M-1:0];
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (cyc > maxcyc) maxcyc = cyc;
    back = ref_mul(M, elem_t'(F), elem_t'(q), tx);
    checks += 2;
    if (back[M-1:0] !== ty[M-1:0]) begin failures++; $display("FAIL q*x != y: x=%h y=%h q=%h", x, y, q); end
    if (cyc > 2 * M + 1) begin failures++; $display("FAIL latency %0d", cyc); end
    if (full) begin
      exp = ref_div(M, elem_t'(F), ty, tx);
      checks++;
      if (q !== exp[M-1:0]) begin failures++; $display("FAIL q=%h exp %h", q, exp[M-1:0]); end
    end
  endtask

  initial begin
    x = '0; y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 1, 1'b0);
    run(1, elem_t'(123456), 1'b0);
    run(elem_t'(2), 1, 1'b0);
    run(elem_t'(1) << (M - 1), 1, 1'b0);
    run((elem_t'(1) << M) - 1, (elem_t'(1) << M) - 1, 1'b0);
    run(elem_t'(7), '0, 1'b0);
    for (int i = 0; i < 200; i++) begin
      elem_t rx, ry;
      rx = rand_elem(M);
      ry = rand_elem(M);
      if (rx == '0) rx = 1;
      run(rx, ry, i < 5);
    end
    $display("longest division: %0d clocks", maxcyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
