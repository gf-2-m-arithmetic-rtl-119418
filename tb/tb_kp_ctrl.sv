// tb_kp_ctrl: the control unit with its two point units on the NIST B-163
// curve (m = 163, a = 1, digit 8). Scalars with few significant bits keep the
// reference (left-to-right double-and-add) cheap; the hardware still scans all
// 163 bits. Each result is compared with the reference and checked to lie on
// the curve; k = 0 must give the point at infinity (0,0). The clock count of
// one kP is checked to be within 10% of 49360, the count reported for this
// architecture with a digit-8 multiplier at m = 163.
module tb_kp_ctrl;
  import gf_ref_pkg::*;
  localparam int M = 163;
  localparam logic [M:0] F = (M+1)'(gf_pkg::field_poly(M));
  localparam elem_t CA  = 576'h1;
  localparam elem_t CB  = 576'h20a601907b8c953ca1481eb10512f78744a3205fd;
  localparam elem_t GX  = 576'h3f0eba16286a2d57ea0991168d4994637e8343e36;
  localparam elem_t GY  = 576'h0d51fbc6c71a0094fa2cdd545b11c5c0c797324f1;
  localparam int REF_CYCLES = 49360;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [M-1:0] k, px, py, a, rx, ry;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kp_ctrl dut (.*);

  task automatic run(input elem_t tk);
    point_t g, r, e;
    int cyc;
    k = tk[M-1:0];
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    g = '0; g.x = GX; g.y = GY;
    r = '0; r.x = elem_t'(rx); r.y = elem_t'(ry);
    e = to_hw(ref_smul(M, elem_t'(F), CA, tk, g));
    checks += 3;
    if (r.x != e.x || r.y != e.y) begin failures++; $display("FAIL k=%h got %h,%h exp %h,%h", tk[M-1:0], rx, ry, e.x[M-1:0], e.y[M-1:0]); end
    if (!(r.x == '0 && r.y == '0) && !on_curve(M, elem_t'(F), CA, CB, r)) begin failures++; $display("FAIL result off curve"); end
    if (cyc < REF_CYCLES * 9 / 10 || cyc > REF_CYCLES * 11 / 10) begin failures++; $display("FAIL kP took %0d clocks", cyc); end
    $display("k=%h: %0d clocks", tk[M-1:0], cyc);
  endtask

  initial begin
    a = CA[M-1:0]; px = GX[M-1:0]; py = GY[M-1:0]; k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1);
    run(2);
    run(3);
    run(576'hb);
    run(576'ha5);
    run(576'h3ff);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
