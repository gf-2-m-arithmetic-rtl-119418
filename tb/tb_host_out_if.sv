// tb_host_out_if: the 32-bit output interface at m = 163. It presents random
// results with a core_done pulse and reads every word of Rx and Ry back
// (registered, one clock after rd_en), checks that the buffer holds while the
// core's outputs change, that unused words read zero, and that the status word
// shows busy and the sticky ready flag, which start clears.
module tb_host_out_if;
  localparam int M  = 163;
  localparam int NW = (M + 31) / 32;

  logic clk = 0, rst_n = 0, core_start = 0, core_busy = 0, core_done = 0, rd_en = 0, ready;
  logic [M-1:0] rx = '0, ry = '0;
  logic [7:0] addr = '0;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  host_out_if dut (.*);

  task automatic rd(input logic [7:0] ad, output logic [31:0] d);
    @(negedge clk);
    rd_en = 1; addr = ad;
    @(negedge clk);
    rd_en = 0;
    d = rdata;
  endtask

  initial begin
    logic [31:0] d;
    logic [NW*32-1:0] ex, ey;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(8'h80, d);
    checks++;
    if (d !== 32'h0) begin failures++; $display("FAIL status after reset %h", d); end
    for (int r = 0; r < 4; r++) begin
      core_start = 1; core_busy = 1;
      @(negedge clk);
      core_start = 0;
      rd(8'h80, d);
      checks++;
      if (d !== 32'h1) begin failures++; $display("FAIL status while busy %h", d); end
      for (int w = 0; w < NW; w++) begin
        ex[w*32 +: 32] = $urandom;
        ey[w*32 +: 32] = $urandom;
      end
      ex[NW*32-1:M] = '0;
      ey[NW*32-1:M] = '0;
      rx = ex[M-1:0]; ry = ey[M-1:0];
      core_done = 1; core_busy = 0;
      @(negedge clk);
      core_done = 0;
      rx = ~rx; ry = ~ry;   // core moves on; the buffer must hold
      rd(8'h80, d);
      checks++;
      if (d !== 32'h2) begin failures++; $display("FAIL status when ready %h", d); end
      for (int w = 0; w < NW; w++) begin
        rd({1'b0, 2'd0, 5'(w)}, d);
        checks++;
        if (d !== ex[w*32 +: 32]) begin failures++; $display("FAIL Rx word %0d: %h exp %h", w, d, ex[w*32 +: 32]); end
        rd({1'b0, 2'd1, 5'(w)}, d);
        checks++;
        if (d !== ey[w*32 +: 32]) begin failures++; $display("FAIL Ry word %0d: %h exp %h", w, d, ey[w*32 +: 32]); end
      end
      rd({1'b0, 2'd0, 5'(NW)}, d);
      checks++;
      if (d !== 32'h0) begin failures++; $display("FAIL unused word reads %h", d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
