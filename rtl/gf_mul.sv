// gf_mul: the field multiplier slot of a point unit. The architecture lets
// the multiplier be swapped for a better one without touching the rest, so
// this wrapper picks, by the DIGIT parameter, the bit-serial multiplier
// (DIGIT = 1, m clocks) or the digit-serial one (DIGIT > 1, ceil(m/DIGIT)
// clocks). Both share the same start/busy/done interface; see those modules
// for the timing.
module gf_mul #(
  parameter int            M     = 163,
  parameter int            DIGIT = 8,
  parameter logic [M:0]    F     = (M+1)'(gf_pkg::field_poly(M))
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

  if (DIGIT <= 1) begin : g_serial
    gf_mul_serial #(.M(M), .F(F)) u_mul (
      .clk, .rst_n, .start, .a, .b, .busy, .done, .c
    );
  end else begin : g_digit
    gf_mul_digit #(.M(M), .D(DIGIT), .F(F)) u_mul (
      .clk, .rst_n, .start, .a, .b, .busy, .done, .c
    );
  end

endmodule
