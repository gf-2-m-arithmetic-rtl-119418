// gf_div: direct GF(2^m) division, q = Y(x)/X(x) mod F(x), X != 0.
//
// This is a binary extended-Euclid style division that computes the quotient
// directly instead of an inverse followed by a multiplication. Four registers
// hold A (starts at X), B (starts at F), U (starts at Y) and V (starts at 0);
// the loop keeps U*X = Y*A and V*X = Y*B (mod F). Every clock performs one
// loop iteration, chosen by the low bits of A and B and by their degrees:
//   - A even:            A <- A/x,        U <- U/x mod F
//   - else B even:       B <- B/x,        V <- V/x mod F
//   - else deg A > deg B: A <- (A+B)/x,   U <- (U+V)/x mod F
//   - else:              B <- (A+B)/x,    V <- (U+V)/x mod F
// where W/x mod F is W>>1 when W is even and (W+F)>>1 when it is odd. The loop
// ends when A = B (both then equal 1) and U holds the quotient. deg A + deg B
// drops every iteration, so at most 2m-1 iterations are needed.
//
// Interface: pulse start with x and y valid (captured). done pulses one clock
// when q is valid; q stays until the next start. A start while busy is
// ignored. Timing: done follows start by (iterations + 2) clocks, at most
// 2m+1. Division by zero is outside the algorithm; this design's own choice is
// to stop at once and return q = 0 (flagged by an assertion in simulation).
// Reset is active-low, synchronous.
module gf_div #(
  parameter int            M = 163,
  parameter logic [M:0]    F = (M+1)'(gf_pkg::field_poly(M))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] q
);

  localparam int DW = $clog2(M + 1);

  logic [M:0]   a_q, b_q;
  logic [M-1:0] u_q, v_q;
  logic [M:0]   a_n, b_n;
  logic [M-1:0] u_n, v_n;

  // Index of the leading one (0 for the zero polynomial).
  function automatic logic [DW-1:0] deg(input logic [M:0] p);
    logic [DW-1:0] d;
    d = '0;
    for (int i = 0; i <= M; i++) if (p[i]) d = DW'(i);
    return d;
  endfunction

  // W/x mod F for an m-bit residue W.
  function automatic logic [M-1:0] div_x(input logic [M-1:0] w);
    logic [M:0] t;
    t = {1'b0, w};
    if (w[0]) t = t ^ F;
    return t[M:1];
  endfunction

  always_comb begin
    a_n = a_q;
    b_n = b_q;
    u_n = u_q;
    v_n = v_q;
    if (!a_q[0]) begin
      a_n = a_q >> 1;
      u_n = div_x(u_q);
    end else if (!b_q[0]) begin
      b_n = b_q >> 1;
      v_n = div_x(v_q);
    end else if (deg(a_q) > deg(b_q)) begin
      a_n = (a_q ^ b_q) >> 1;
      u_n = div_x(u_q ^ v_q);
    end else begin
      b_n = (a_q ^ b_q) >> 1;
      v_n = div_x(u_q ^ v_q);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      a_q  <= '0;
      b_q  <= '0;
      u_q  <= '0;
      v_q  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q  <= {1'b0, x};
          b_q  <= F;
          u_q  <= y;
          v_q  <= '0;
          busy <= 1'b1;
        end
      end else if (a_q == b_q || a_q == '0) begin
        if (a_q == '0) u_q <= '0;
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        a_q <= a_n;
        b_q <= b_n;
        u_q <= u_n;
        v_q <= v_n;
      end
    end
  end

  assign q = u_q;

  // Division by zero is not a legal request.
  assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |-> (x != '0))
    else $error("gf_div: division by zero requested");

endmodule
