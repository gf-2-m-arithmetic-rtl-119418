// gf_mul_serial: bit-serial GF(2^m) multiplier in polynomial basis,
// C(x) = A(x)B(x) mod F(x).
//
// It walks the bits of B from b_{m-1} down to b_0, one bit per clock. Each
// clock the accumulator is multiplied by x, the bit that leaves position m-1
// is folded back with the low part of F(x), and A(x) is added when the current
// bit of B is one: C <- C*x + b_i*A + c_{m-1}*F. This is the most-significant-
// bit-first serial multiplier of the architecture, the smallest of the
// multipliers compared for it.
//
// Interface: pulse start for one clock with a and b valid (they are captured).
// done pulses one clock when c holds the product; c stays until the next start.
// A start while busy is ignored. Timing: done follows start by m+1 clocks
// (m shift steps plus the capture clock). Reset is active-low, synchronous to
// clk; the start/done handshake is this design's own choice.
module gf_mul_serial #(
  parameter int            M = 163,
  parameter logic [M:0]    F = (M+1)'(gf_pkg::field_poly(M))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);

  localparam int CW = $clog2(M + 1);

  logic [M-1:0]  a_q, b_q;
  logic [CW-1:0] cnt_q;
  logic [M-1:0]  c_next;

  // One serial step: shift, conditional reduction, conditional add of A.
  always_comb begin
    c_next = {c[M-2:0], 1'b0};
    if (c[M-1]) c_next = c_next ^ F[M-1:0];
    if (b_q[M-1]) c_next = c_next ^ a_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      c     <= '0;
      a_q   <= '0;
      b_q   <= '0;
      cnt_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q   <= a;
          b_q   <= b;
          c     <= '0;
          cnt_q <= CW'(M);
          busy  <= 1'b1;
        end
      end else begin
        c     <= c_next;
        b_q   <= {b_q[M-2:0], 1'b0};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
