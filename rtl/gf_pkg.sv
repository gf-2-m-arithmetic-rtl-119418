// gf_pkg: shared constants and helper functions for the GF(2^m) arithmetic
// modules. Field elements are held in polynomial basis, bit i being the
// coefficient of x^i. field_poly(m) returns the reduction polynomial F(x)
// (including the x^m term) of the NIST binary fields; every arithmetic module
// takes F as a parameter so other fields can be used by overriding it. The
// m = 163, 233 and 283 fields are the ones evaluated for this architecture; the
// 409 and 571 polynomials complete the NIST set. deg() is a leading-one
// detector used by the divider's degree comparison.
package gf_pkg;

  localparam int MAX_M = 571;

  // NIST reduction polynomials (FIPS 186); zero for an unsupported m.
  function automatic logic [MAX_M:0] field_poly(input int m);
    logic [MAX_M:0] p;
    p = '0;
    case (m)
      163: begin p[163] = 1'b1; p[7] = 1'b1; p[6] = 1'b1; p[3] = 1'b1; p[0] = 1'b1; end
      233: begin p[233] = 1'b1; p[74] = 1'b1; p[0] = 1'b1; end
      283: begin p[283] = 1'b1; p[12] = 1'b1; p[7] = 1'b1; p[5] = 1'b1; p[0] = 1'b1; end
      409: begin p[409] = 1'b1; p[87] = 1'b1; p[0] = 1'b1; end
      571: begin p[571] = 1'b1; p[10] = 1'b1; p[5] = 1'b1; p[2] = 1'b1; p[0] = 1'b1; end
      default: p = '0;
    endcase
    return p;
  endfunction

  // Number of 32-bit host words needed for an m-bit operand.
  function automatic int host_words(input int m);
    return (m + 31) / 32;
  endfunction

endpackage
