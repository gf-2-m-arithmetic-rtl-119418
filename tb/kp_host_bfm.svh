// Host bus tasks shared by the kp_top testbenches. They expect, in the
// including module: clk, host_wr, host_rd, host_addr, host_wdata, host_rdata,
// and a localparam M (field degree). Writes and reads follow the address map
// of host_in_if / host_out_if: operand words at {op[1:0], word[4:0]},
// command and status at 8'h80.

task automatic host_write(input logic [7:0] ad, input logic [31:0] d);
  @(negedge clk);
  host_wr = 1'b1; host_addr = ad; host_wdata = d;
  @(negedge clk);
  host_wr = 1'b0;
endtask

task automatic host_read(input logic [7:0] ad, output logic [31:0] d);
  @(negedge clk);
  host_rd = 1'b1; host_addr = ad;
  @(negedge clk);
  host_rd = 1'b0;
  d = host_rdata;
endtask

task automatic host_load(input logic [1:0] op, input logic [575:0] v);
  for (int w = 0; w < (M + 31) / 32; w++)
    host_write({1'b0, op, 5'(w)}, v[w*32 +: 32]);
endtask

task automatic host_fetch(input logic [1:0] op, output logic [575:0] v);
  logic [31:0] d;
  v = '0;
  for (int w = 0; w < (M + 31) / 32; w++) begin
    host_read({1'b0, op, 5'(w)}, d);
    v[w*32 +: 32] = d;
  end
endtask
