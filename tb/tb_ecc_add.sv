// tb_ecc_add: the addition unit on the NIST B-163 curve (m = 163, a = 1).
// It builds the points G, 2G, 3G, ... with the reference group law and asks
// the unit for G + jG and for sums of two unrelated points, comparing each
// result with the reference and checking it lies on the curve. The latency
// must stay within division + multiplication + a few control clocks.
module tb_ecc_add;
  import gf_ref_pkg::*;
  localparam int M = 163;
  localparam logic [M:0] F = (M+1)'(gf_pkg::field_poly(M));
  localparam elem_t CA  = 576'h1;
  localparam elem_t CB  = 576'h20a601907b8c953ca1481eb10512f78744a3205fd;
  localparam elem_t GX  = 576'h3f0eba16286a2d57ea0991168d4994637e8343e36;
  localparam elem_t GY  = 576'h0d51fbc6c71a0094fa2cdd545b11c5c0c797324f1;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] x1, y1, x2, y2, a, x3, y3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_add dut (.*);

  task automatic run(input point_t p, input point_t q);
    point_t r, e;
    int cyc;
    x1 = p.x[M-1:0]; y1 = p.y[M-1:0];
    x2 = q.x[M-1:0]; y2 = q.y[M-1:0];
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r = '0;
    r.x = elem_t'(x3);
    r.y = elem_t'(y3);
    e = to_hw(ref_padd(M, elem_t'(F), CA, p, q));
    checks += 3;
    if (r.x != e.x || r.y != e.y) begin failures++; $display("FAIL sum got %h,%h exp %h,%h", r.x[M-1:0], r.y[M-1:0], e.x[M-1:0], e.y[M-1:0]); end
    if (!on_curve(M, elem_t'(F), CA, CB, r)) begin failures++; $display("FAIL result off curve"); end
    if (cyc > (2 * M + 1) + ((M + 7) / 8 + 1) + 4) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    point_t g, jg[8];
    a = CA[M-1:0];
    x1 = '0; y1 = '0; x2 = '0; y2 = '0;
    g = '0; g.x = GX; g.y = GY;
    jg[0] = g;
    for (int j = 1; j < 8; j++) jg[j] = ref_padd(M, elem_t'(F), CA, jg[j-1], g);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 1; j < 8; j++) run(g, jg[j]);
    run(jg[3], jg[6]);
    run(jg[7], jg[4]);
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
