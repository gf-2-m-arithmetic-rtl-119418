// tb_kp_top: end-to-end test of the scalar multiplier through its 32-bit host
// port, on a small curve where every rule of the control unit can be reached:
// y^2 + xy = x^3 + 8 over GF(2^7) with F = x^7 + x + 1 (a cyclic group of
// 120 points). For a generator and for points of order 2, 3, 4 and 5, all
// 128 scalars are run through two instances, one with the bit-serial
// multiplier (DIGIT = 1) and one digit-serial (DIGIT = 3); the results are
// read back over the host port and compared with a left-to-right reference.
// The testbench counts how often each control rule fires (skip, copy, R = S
// doubling, R = -S cancellation, general addition), how often a doubling ends
// at infinity, how often the status word shows busy, and how often a write
// issued while the core is busy is ignored; each must happen at least once.
module tb_kp_top;
  import gf_ref_pkg::*;
  localparam int M = 7;
  localparam logic [M:0] F = 8'h83;
  localparam elem_t CA = 0;
  localparam elem_t CB = 8;

  logic clk = 0, rst_n = 0;
  logic host_wr = 0, host_rd = 0;
  logic [7:0] host_addr = '0;
  logic [31:0] host_wdata = '0;
  logic [31:0] host_rdata, rdata1, rdata3;
  logic done1, done3, ready1, ready3;
  int checks = 0, failures = 0;
  bit sel3 = 0;
  int cnt_skip = 0, cnt_copy = 0, cnt_dbl = 0, cnt_inf = 0, cnt_unit = 0;
  int cnt_dbl_inf = 0, cnt_busy_seen = 0, cnt_wr_ignored = 0;

  always #5 clk = ~clk;

  kp_top #(.M(M), .DIGIT(1), .F(F)) dut1 (.clk, .rst_n, .host_wr, .host_rd,
    .host_addr, .host_wdata, .host_rdata(rdata1), .kp_done(done1), .result_ready(ready1));
  kp_top #(.M(M), .DIGIT(3), .F(F)) dut3 (.clk, .rst_n, .host_wr, .host_rd,
    .host_addr, .host_wdata, .host_rdata(rdata3), .kp_done(done3), .result_ready(ready3));

  assign host_rdata = sel3 ? rdata3 : rdata1;

  `include "kp_host_bfm.svh"

  // Mechanism counters, taken from the first instance.
  always @(posedge clk) begin
    if (dut1.u_core.state_q.name() == "S_STEP") begin
      case (dut1.u_core.kind_c.name())
        "ADD_SKIP": cnt_skip++;
        "ADD_COPY": cnt_copy++;
        "ADD_DBL":  cnt_dbl++;
        "ADD_INF":  cnt_inf++;
        "ADD_UNIT": cnt_unit++;
        default: ;
      endcase
    end
    if (dut1.u_core.u_dbl.state_q.name() == "S_INF") cnt_dbl_inf++;
  end

  task automatic kp_run(input point_t p, input int kv);
    logic [31:0] st;
    logic [575:0] rx, ry;
    point_t e;
    host_load(2'd0, 576'(kv));
    host_load(2'd1, p.x);
    host_load(2'd2, p.y);
    host_load(2'd3, CA);
    host_write(8'h80, 32'h1);
    // A write while busy must not disturb the running operation.
    host_write({1'b0, 2'd0, 5'd0}, 32'h55);
    do begin
      host_read(8'h80, st);
      if (st[0]) cnt_busy_seen++;
    end while (!st[1]);
    e = to_hw(ref_smul(M, elem_t'(F), CA, elem_t'(kv), p));
    for (int inst = 0; inst < 2; inst++) begin
      sel3 = (inst == 1);
      if (sel3) begin
        do host_read(8'h80, st); while (!st[1]);
      end
      host_fetch(2'd0, rx);
      host_fetch(2'd1, ry);
      checks++;
      if (rx != e.x || ry != e.y) begin
        failures++;
        $display("FAIL DIGIT=%0d P=(%0d,%0d) k=%0d got (%0d,%0d) exp (%0d,%0d)", sel3 ? 3 : 1,
                 p.x[7:0], p.y[7:0], kv, rx[7:0], ry[7:0], e.x[7:0], e.y[7:0]);
      end
    end
    sel3 = 0;
    if (dut1.u_in.k[6:0] == 7'(kv)) cnt_wr_ignored++;
  endtask

  initial begin
    point_t pts[5];
    pts[0] = '0; pts[0].x = 5;   pts[0].y = 42;  // generator, order 120
    pts[1] = '0; pts[1].x = 0;   pts[1].y = 36;  // order 2
    pts[2] = '0; pts[2].x = 84;  pts[2].y = 59;  // order 3
    pts[3] = '0; pts[3].x = 74;  pts[3].y = 36;  // order 4
    pts[4] = '0; pts[4].x = 102; pts[4].y = 61;  // order 5
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (pts[i]) begin
      checks++;
      if (!on_curve(M, elem_t'(F), CA, CB, pts[i])) begin failures++; $display("FAIL test point %0d off curve", i); end
      for (int kv = 0; kv < 128; kv++) kp_run(pts[i], kv);
    end
    $display("rules: skip=%0d copy=%0d R=S=%0d R=-S=%0d add=%0d; doublings to infinity=%0d; busy polls=%0d; writes ignored=%0d",
             cnt_skip, cnt_copy, cnt_dbl, cnt_inf, cnt_unit, cnt_dbl_inf, cnt_busy_seen, cnt_wr_ignored);
    checks += 8;
    if (cnt_skip == 0)       begin failures++; $display("FAIL skip never happened"); end
    if (cnt_copy == 0)       begin failures++; $display("FAIL copy never happened"); end
    if (cnt_dbl == 0)        begin failures++; $display("FAIL R=S never happened"); end
    if (cnt_inf == 0)        begin failures++; $display("FAIL R=-S never happened"); end
    if (cnt_unit == 0)       begin failures++; $display("FAIL addition never happened"); end
    if (cnt_dbl_inf == 0)    begin failures++; $display("FAIL doubling to infinity never happened"); end
    if (cnt_busy_seen == 0)  begin failures++; $display("FAIL busy never seen"); end
    if (cnt_wr_ignored == 0) begin failures++; $display("FAIL busy write never ignored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
