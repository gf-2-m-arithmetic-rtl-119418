// gf_sqr: combinational GF(2^m) squarer in polynomial basis, c = a^2 mod F(x).
//
// Squaring in characteristic two only spreads the coefficients: a_i moves to
// position 2i and the odd positions are zero. The (2m-1)-bit result is then
// reduced by folding every coefficient at or above x^m back with F(x), from
// the top down. With F a constant parameter the whole thing collapses into a
// network of XOR gates, so a square is available in the clock in which its
// operand is, as the architecture requires (one clock per squaring).
//
// Interface: a in, c out, no clock. F defaults to the NIST polynomial of M.
module gf_sqr #(
  parameter int            M = 163,
  parameter logic [M:0]    F = (M+1)'(gf_pkg::field_poly(M))
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] c
);

  always_comb begin
    logic [2*M-2:0] t;
    t = '0;
    for (int i = 0; i < M; i++) t[2*i] = a[i];
    for (int k = 2*M - 2; k >= M; k--) begin
      if (t[k]) t = t ^ ((2*M-1)'(F) << (k - M));
    end
    c = t[M-1:0];
  end

endmodule
