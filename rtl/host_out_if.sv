// host_out_if: 32-bit host output interface of the kP unit.
//
// When the core signals done, the result point (Rx, Ry) is copied into an
// output buffer, so the host can read it word by word while the core already
// works on the next request. A sticky done flag tells the host a result is
// waiting; it is cleared when the next multiplication starts. Address map
// (8-bit word addresses, reads only):
//   addr[7] = 0 : result word; addr[6:5] = 0 selects Rx, 1 selects Ry;
//                 addr[4:0] is the word index, word 0 holding bits 31:0.
//                 Words above the operand return zero in their upper bits.
//   addr    = 8'h80 : status, bit 0 = core busy, bit 1 = result ready.
// Timing: rdata is registered and valid the clock after rd_en. The 32-bit
// width follows the architecture; the buffer, map and status word are this
// design's own. Reset is active-low, synchronous.
module host_out_if #(
  parameter int M = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         core_start,
  input  logic         core_busy,
  input  logic         core_done,
  input  logic [M-1:0] rx,
  input  logic [M-1:0] ry,
  input  logic         rd_en,
  input  logic [7:0]   addr,
  output logic [31:0]  rdata,
  output logic         ready
);

  localparam int NW = gf_pkg::host_words(M);
  localparam int PW = NW * 32;

  logic [PW-1:0] rx_q, ry_q;
  logic [4:0]    widx;

  assign widx = addr[4:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_q  <= '0;
      ry_q  <= '0;
      ready <= 1'b0;
      rdata <= '0;
    end else begin
      if (core_done) begin
        rx_q  <= PW'(rx);
        ry_q  <= PW'(ry);
        ready <= 1'b1;
      end else if (core_start) begin
        ready <= 1'b0;
      end
      if (rd_en) begin
        if (addr[7])
          rdata <= (addr[6:0] == 7'd0) ? {30'd0, ready, core_busy} : 32'd0;
        else if (int'(widx) >= NW || addr[6])
          rdata <= 32'd0;
        else if (addr[5])
          rdata <= ry_q[widx*32 +: 32];
        else
          rdata <= rx_q[widx*32 +: 32];
      end
    end
  end

endmodule
