// tb_host_in_if: the 32-bit input interface at m = 163. It writes random
// words to every operand word address and checks the assembled k, Px, Py and
// a (bits above m-1 dropped), checks that writes while core_busy are ignored,
// that out-of-range word indexes change nothing, and that a command write
// produces exactly one start pulse one clock later (and none for a 0 write).
module tb_host_in_if;
  localparam int M  = 163;
  localparam int NW = (M + 31) / 32;

  logic clk = 0, rst_n = 0, wr_en = 0, core_busy = 0, start;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0;
  logic [M-1:0] k, px, py, a;
  logic [NW*32-1:0] exp_op [4];
  int checks = 0, failures = 0, starts = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && start) starts++;

  host_in_if dut (.*);

  task automatic wr(input logic [7:0] ad, input logic [31:0] d);
    @(negedge clk);
    wr_en = 1; addr = ad; wdata = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic compare(input string what);
    checks += 4;
    if (k  !== exp_op[0][M-1:0]) begin failures++; $display("FAIL %s: k",  what); end
    if (px !== exp_op[1][M-1:0]) begin failures++; $display("FAIL %s: px", what); end
    if (py !== exp_op[2][M-1:0]) begin failures++; $display("FAIL %s: py", what); end
    if (a  !== exp_op[3][M-1:0]) begin failures++; $display("FAIL %s: a",  what); end
  endtask

  initial begin
    foreach (exp_op[i]) exp_op[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    compare("after reset");
    for (int r = 0; r < 3; r++) begin
      for (int op = 0; op < 4; op++)
        for (int w = 0; w < NW; w++) begin
          logic [31:0] d;
          d = $urandom;
          wr({1'b0, 2'(op), 5'(w)}, d);
          exp_op[op][w*32 +: 32] = d;
        end
      compare("loaded");
    end
    // out-of-range word index and busy writes are ignored
    wr({1'b0, 2'd1, 5'(NW)}, 32'hdeadbeef);
    core_busy = 1;
    wr({1'b0, 2'd0, 5'd0}, ~exp_op[0][31:0]);
    wr(8'h80, 32'h1);
    core_busy = 0;
    compare("ignored writes");
    checks++;
    if (starts != 0) begin failures++; $display("FAIL start while busy"); end
    // command register
    wr(8'h80, 32'h0);
    checks++;
    if (starts != 0) begin failures++; $display("FAIL start on a zero command"); end
    @(negedge clk);
    wr_en = 1; addr = 8'h80; wdata = 32'h1;
    @(negedge clk);
    wr_en = 0;
    checks++;
    if (!start) begin failures++; $display("FAIL no start pulse the clock after the command"); end
    repeat (3) @(negedge clk);
    checks++;
    if (starts != 1) begin failures++; $display("FAIL %0d start pulses", starts); end
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
