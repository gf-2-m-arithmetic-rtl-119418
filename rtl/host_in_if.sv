// host_in_if: 32-bit host input interface of the kP unit.
//
// The host writes the m-bit operands k, Px, Py and the curve coefficient a one
// 32-bit word at a time into four operand registers, then writes the command
// register to start a scalar multiplication. Address map (byte-free word
// addresses, 8 bits):
//   addr[7] = 0 : operand word; addr[6:5] selects k (0), Px (1), Py (2),
//                 a (3); addr[4:0] is the word index, word 0 holding bits
//                 31:0. Bits at or above m are dropped.
//   addr    = 8'h80 : command; writing 1 in bit 0 pulses start.
// Writes to the operands while the core is busy are ignored so a running
// multiplication keeps stable inputs. Timing: a write lands on the clock edge
// where wr_en is high; start is a one-clock pulse one clock after the command
// write. Operand registers are whole words wide; the bits above m-1 of the
// last word are written but never read (synthesis removes them). The 32-bit width follows the architecture; the address map and
// protocol are this design's own. Reset (active-low, synchronous) clears all.
module host_in_if #(
  parameter int M = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [7:0]   addr,
  input  logic [31:0]  wdata,
  input  logic         core_busy,
  output logic         start,
  output logic [M-1:0] k,
  output logic [M-1:0] px,
  output logic [M-1:0] py,
  output logic [M-1:0] a
);

  localparam int NW = gf_pkg::host_words(M);
  localparam int PW = NW * 32;

  typedef enum logic [1:0] {OP_K, OP_PX, OP_PY, OP_A} operand_t;

  logic [PW-1:0] k_q, px_q, py_q, a_q;
  operand_t      op;
  logic [4:0]    widx;

  assign op   = operand_t'(addr[6:5]);
  assign widx = addr[4:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k_q   <= '0;
      px_q  <= '0;
      py_q  <= '0;
      a_q   <= '0;
      start <= 1'b0;
    end else begin
      start <= 1'b0;
      if (wr_en && !core_busy) begin
        if (addr[7]) begin
          if (addr[6:0] == 7'd0) start <= wdata[0];
        end else if (int'(widx) < NW) begin
          unique case (op)
            OP_K:  k_q [widx*32 +: 32] <= wdata;
            OP_PX: px_q[widx*32 +: 32] <= wdata;
            OP_PY: py_q[widx*32 +: 32] <= wdata;
            OP_A:  a_q [widx*32 +: 32] <= wdata;
          endcase
        end
      end
    end
  end

  assign k  = k_q[M-1:0];
  assign px = px_q[M-1:0];
  assign py = py_q[M-1:0];
  assign a  = a_q[M-1:0];

endmodule
