// tb_kp_top_full: kp_top at its default parameters (m = 163, digit-8
// multiplier, NIST polynomial x^163 + x^7 + x^6 + x^3 + 1) on the NIST B-163
// curve, driven entirely through the 32-bit host port. Three scalar
// multiplications of the base point G:
//   k = (n-1), n the order of G   -> expect -G = (Gx, Gx + Gy)
//   k = n                         -> expect the point at infinity, (0,0)
//   a 163-bit k                   -> expect a precomputed point, which must
//                                    also satisfy the curve equation
// The clock count of each kP is checked to be within 10% of the 49360
// clocks reported for this architecture with the digit-8 multiplier.
module tb_kp_top_full;
  import gf_ref_pkg::*;
  localparam int M = 163;
  localparam logic [M:0] F = (M+1)'(gf_pkg::field_poly(M));
  localparam elem_t CA = 576'h1;
  localparam elem_t CB = 576'h20a601907b8c953ca1481eb10512f78744a3205fd;
  localparam elem_t GX = 576'h3f0eba16286a2d57ea0991168d4994637e8343e36;
  localparam elem_t GY = 576'h0d51fbc6c71a0094fa2cdd545b11c5c0c797324f1;
  localparam elem_t N  = 576'h40000000000000000000292fe77e70c12a4234c33;
  localparam elem_t K3 = 576'h5a3c0ffee1234567890abcdef0123456789abcdef;
  localparam elem_t X3 = 576'h72216402a334234cd93895f8b669c310584a32114;
  localparam elem_t Y3 = 576'h41aa7088fce1715b01642bc38edaf4d132ad0e55c;
  localparam int REF_CYCLES = 49360;

  logic clk = 0, rst_n = 0;
  logic host_wr = 0, host_rd = 0;
  logic [7:0] host_addr = '0;
  logic [31:0] host_wdata = '0;
  logic [31:0] host_rdata;
  logic kp_done, result_ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kp_top dut (.*);

  `include "kp_host_bfm.svh"

  task automatic kp_run(input elem_t kv, input elem_t ex, input elem_t ey, input string what);
    logic [31:0] st;
    logic [575:0] rx, ry;
    point_t r;
    int t0, cyc;
    host_load(2'd0, kv);
    host_load(2'd1, GX);
    host_load(2'd2, GY);
    host_load(2'd3, CA);
    host_write(8'h80, 32'h1);
    t0 = int'($time / 10);
    @(posedge kp_done);
    cyc = int'($time / 10) - t0;
    do host_read(8'h80, st); while (!st[1]);
    host_fetch(2'd0, rx);
    host_fetch(2'd1, ry);
    r = '0; r.x = rx; r.y = ry;
    checks += 3;
    if (rx != ex || ry != ey) begin
      failures++;
      $display("FAIL %s: got %h,%h exp %h,%h", what, rx[M-1:0], ry[M-1:0], ex[M-1:0], ey[M-1:0]);
    end
    if (!(rx == '0 && ry == '0) && !on_curve(M, elem_t'(F), CA, CB, r)) begin
      failures++; $display("FAIL %s: result off curve", what);
    end
    if (cyc < REF_CYCLES * 9 / 10 || cyc > REF_CYCLES * 11 / 10) begin
      failures++; $display("FAIL %s: %0d clocks", what, cyc);
    end
    $display("%s: %0d clocks", what, cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    kp_run(N - 1, GX, GX ^ GY, "(n-1)G");
    kp_run(N, '0, '0, "nG");
    kp_run(K3, X3, Y3, "kG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
