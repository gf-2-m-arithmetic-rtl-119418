// tb_kp_digits: the multiplier comparison at m = 163. Four kp_top instances
// with the bit-serial multiplier and digit sizes 4, 16 and 32 (the default
// digit 8 is covered by tb_kp_top_full) compute the same kG on the NIST B-163
// curve side by side. Each result is compared with a precomputed point and
// the clock count of each kP is checked to lie within 10% of the counts
// reported for this architecture: 72527 (serial), 52620 (D = 4),
// 47730 (D = 16) and 46915 (D = 32).
module tb_kp_digits;
  import gf_ref_pkg::*;
  localparam int M = 163;
  localparam elem_t CA = 576'h1;
  localparam elem_t GX = 576'h3f0eba16286a2d57ea0991168d4994637e8343e36;
  localparam elem_t GY = 576'h0d51fbc6c71a0094fa2cdd545b11c5c0c797324f1;
  localparam elem_t K3 = 576'h5a3c0ffee1234567890abcdef0123456789abcdef;
  localparam elem_t X3 = 576'h72216402a334234cd93895f8b669c310584a32114;
  localparam elem_t Y3 = 576'h41aa7088fce1715b01642bc38edaf4d132ad0e55c;
  localparam int NI = 4;
  localparam int DIGITS [NI]     = '{1, 4, 16, 32};
  localparam int REF_CYCLES [NI] = '{72527, 52620, 47730, 46915};

  logic clk = 0, rst_n = 0;
  logic host_wr = 0, host_rd = 0;
  logic [7:0] host_addr = '0;
  logic [31:0] host_wdata = '0;
  logic [31:0] host_rdata;
  logic [31:0] rdata [NI];
  logic [NI-1:0] done, ready;
  int sel = 0;
  int cycles [NI];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // The host bus is broadcast on writes; reads come from the selected instance.
  for (genvar i = 0; i < NI; i++) begin : g_dut
    kp_top #(.DIGIT(DIGITS[i])) dut (.clk, .rst_n, .host_wr, .host_rd,
      .host_addr, .host_wdata, .host_rdata(rdata[i]), .kp_done(done[i]), .result_ready(ready[i]));
    always @(posedge clk) if (rst_n && !ready[i]) cycles[i]++;
  end

  assign host_rdata = rdata[sel];

  `include "kp_host_bfm.svh"

  initial begin
    logic [575:0] rx, ry;
    repeat (3) @(negedge clk);
    rst_n = 1;
    host_load(2'd0, K3);
    host_load(2'd1, GX);
    host_load(2'd2, GY);
    host_load(2'd3, CA);
    foreach (cycles[i]) cycles[i] = 0;
    host_write(8'h80, 32'h1);
    wait (&ready);
    for (int i = 0; i < NI; i++) begin
      sel = i;
      host_fetch(2'd0, rx);
      host_fetch(2'd1, ry);
      checks += 2;
      if (rx != X3 || ry != Y3) begin failures++; $display("FAIL DIGIT=%0d wrong kG", DIGITS[i]); end
      // cycles counts from the command write until the result is buffered.
      if (cycles[i] < REF_CYCLES[i] * 9 / 10 || cycles[i] > REF_CYCLES[i] * 11 / 10) begin
        failures++; $display("FAIL DIGIT=%0d: %0d clocks", DIGITS[i], cycles[i]);
      end
      $display("DIGIT=%0d: %0d clocks per kP (reported %0d)", DIGITS[i], cycles[i], REF_CYCLES[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
