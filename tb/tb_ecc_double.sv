// tb_ecc_double: the doubling unit on the NIST B-163 curve (m = 163, a = 1).
// Starting from the base point G it doubles repeatedly, comparing every result
// with the reference group law and checking it lies on the curve. It also
// doubles the point at infinity (0,0) and a point with x = 0, both of which
// must give (0,0), and checks the latency bound (division + multiplication +
// a few control clocks).
module tb_ecc_double;
  import gf_ref_pkg::*;
  localparam int M = 163;
  localparam logic [M:0] F = (M+1)'(gf_pkg::field_poly(M));
  localparam elem_t CA  = 576'h1;
  localparam elem_t CB  = 576'h20a601907b8c953ca1481eb10512f78744a3205fd;
  localparam elem_t GX  = 576'h3f0eba16286a2d57ea0991168d4994637e8343e36;
  localparam elem_t GY  = 576'h0d51fbc6c71a0094fa2cdd545b11c5c0c797324f1;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] x1, y1, a, x3, y3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_double dut (.*);

  task automatic run(input point_t p, output point_t r, output int cyc);
    x1 = p.x[M-1:0]; y1 = p.y[M-1:0];
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r = '0;
    r.x = elem_t'(x3);
    r.y = elem_t'(y3);
  endtask

  initial begin
    point_t p, r, e;
    int cyc;
    a = CA[M-1:0];
    x1 = '0; y1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    p = '0; p.x = GX; p.y = GY;
    for (int i = 0; i < 8; i++) begin
      run(p, r, cyc);
      e = to_hw(ref_padd(M, elem_t'(F), CA, p, p));
      checks += 3;
      if (r.x != e.x || r.y != e.y) begin failures++; $display("FAIL 2P step %0d got %h,%h exp %h,%h", i, r.x[M-1:0], r.y[M-1:0], e.x[M-1:0], e.y[M-1:0]); end
      if (!on_curve(M, elem_t'(F), CA, CB, r)) begin failures++; $display("FAIL result off curve"); end
      if (cyc > (2 * M + 1) + ((M + 7) / 8 + 1) + 4) begin failures++; $display("FAIL latency %0d", cyc); end
      $display("double %0d: %0d clocks", i, cyc);
      p = r;
    end
    // point at infinity and a point of order two
    p = '0;
    run(p, r, cyc);
    checks++;
    if (r.x != '0 || r.y != '0) begin failures++; $display("FAIL 2*O != O"); end
    p.y = 576'h1234;
    run(p, r, cyc);
    checks++;
    if (r.x != '0 || r.y != '0) begin failures++; $display("FAIL 2*(0,y) != O"); end
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
