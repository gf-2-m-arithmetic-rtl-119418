// tb_kp_fields: the scalar multiplier at the two larger field sizes the
// architecture targets, m = 233 and m = 283 (NIST B-233 and B-283 curves,
// digit-8 multiplier), one kp_top instance each on a shared host bus. For
// each curve: k = n-1 must give -G = (Gx, Gx + Gy), and a random k must give
// a precomputed point that also lies on the curve. The clock count of each
// kP is reported and checked against the cost model of this design:
// at most m steps of (2m+1 division + ceil(m/8)+1 multiplication + 5) clocks.
module tb_kp_fields;
  import gf_ref_pkg::*;
  localparam int M = 283;   // word count used by the bus tasks
  localparam int MA = 233;
  localparam int MB = 283;
  localparam logic [MA:0] FA = (MA+1)'(gf_pkg::field_poly(MA));
  localparam logic [MB:0] FB = (MB+1)'(gf_pkg::field_poly(MB));
  localparam elem_t CA  = 576'h1;
  localparam elem_t BA  = 576'h066647ede6c332c7f8c0923bb58213b333b20e9ce4281fe115f7d8f90ad;
  localparam elem_t GXA = 576'h0fac9dfcbac8313bb2139f1bb755fef65bc391f8b36f8f8eb7371fd558b;
  localparam elem_t GYA = 576'h1006a08a41903350678e58528bebf8a0beff867a7ca36716f7e01f81052;
  localparam elem_t NA  = 576'h1000000000000000000000000000013e974e72f8a6922031d2603cfe0d7;
  localparam elem_t KA  = 576'hd2128b2f330c5c7fd0a6a3a4506513270e269e0d37f2a74de452e6b438;
  localparam elem_t XA  = 576'h1dbb0f04d4c79db6c53c649345db514d226301fa159bb9bfd02fac4801e;
  localparam elem_t YA  = 576'h7581f533488f8d861656eb3d8dd18bcbabd09e36ffa4b1ff5d724a2028;
  localparam elem_t BB  = 576'h27b680ac8b8596da5a4af8a19a0303fca97fd7645309fa2a581485af6263e313b79a2f5;
  localparam elem_t GXB = 576'h5f939258db7dd90e1934f8c70b0dfec2eed25b8557eac9c80e2e198f8cdbecd86b12053;
  localparam elem_t GYB = 576'h3676854fe24141cb98fe6d4b20d02b4516ff702350eddb0826779c813f0df45be8112f4;
  localparam elem_t NB  = 576'h3ffffffffffffffffffffffffffffffffffef90399660fc938a90165b042a7cefadb307;
  localparam elem_t KB  = 576'h226654336f675cc81e74ef5e8e25d940ed904759531985d5d9dc9f81818e811892f902b;
  localparam elem_t XB  = 576'h4cfcd33ba0760f5f6d53898a63fef8d567f5f5d219511279e41a4fc31837345f7fd963c;
  localparam elem_t YB  = 576'h1daf887104658df5ce2944aec49e417ff47fff01973d2725ce837263debc76e90a9dc15;

  logic clk = 0, rst_n = 0;
  logic host_wr = 0, host_rd = 0;
  logic [7:0] host_addr = '0;
  logic [31:0] host_wdata = '0;
  logic [31:0] host_rdata, rdata_a, rdata_b;
  logic done_a, done_b, ready_a, ready_b;
  bit   sel_b = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kp_top #(.M(MA)) dut_a (.clk, .rst_n, .host_wr(host_wr && !sel_b), .host_rd(host_rd && !sel_b),
    .host_addr, .host_wdata, .host_rdata(rdata_a), .kp_done(done_a), .result_ready(ready_a));
  kp_top #(.M(MB)) dut_b (.clk, .rst_n, .host_wr(host_wr && sel_b), .host_rd(host_rd && sel_b),
    .host_addr, .host_wdata, .host_rdata(rdata_b), .kp_done(done_b), .result_ready(ready_b));

  assign host_rdata = sel_b ? rdata_b : rdata_a;

  `include "kp_host_bfm.svh"

  task automatic kp_run(input int m, input elem_t f, input elem_t b, input elem_t gx, input elem_t gy,
                        input elem_t kv, input elem_t ex, input elem_t ey, input string what);
    logic [31:0] st;
    logic [575:0] rx, ry;
    point_t r;
    int cyc, bound;
    sel_b = (m == MB);
    host_load(2'd0, kv);
    host_load(2'd1, gx);
    host_load(2'd2, gy);
    host_load(2'd3, CA);
    host_write(8'h80, 32'h1);
    cyc = 2;
    do begin host_read(8'h80, st); cyc += 2; end while (!st[1]);
    host_fetch(2'd0, rx);
    host_fetch(2'd1, ry);
    r = '0; r.x = rx; r.y = ry;
    bound = m * ((2 * m + 1) + ((m + 7) / 8 + 1) + 5) + 4;
    checks += 3;
    if (rx != ex || ry != ey) begin
      failures++;
      $display("FAIL %s: got %h,%h exp %h,%h", what, rx, ry, ex, ey);
    end
    if (!on_curve(m, f, CA, b, r)) begin failures++; $display("FAIL %s: result off curve", what); end
    if (cyc > bound) begin failures++; $display("FAIL %s: about %0d clocks, bound %0d", what, cyc, bound); end
    $display("%s: about %0d clocks", what, cyc);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    kp_run(MA, elem_t'(FA), BA, GXA, GYA, NA - 1, GXA, GXA ^ GYA, "B-233 (n-1)G");
    kp_run(MA, elem_t'(FA), BA, GXA, GYA, KA, XA, YA, "B-233 kG");
    kp_run(MB, elem_t'(FB), BB, GXB, GYB, NB - 1, GXB, GXB ^ GYB, "B-283 (n-1)G");
    kp_run(MB, elem_t'(FB), BB, GXB, GYB, KB, XB, YB, "B-283 kG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
