// gf_mul_digit: digit-serial GF(2^m) multiplier in polynomial basis,
// C(x) = A(x)B(x) mod F(x).
//
// B is cut into s = ceil(m/D) digits of D bits (the top digit zero-padded).
// Digits are consumed most significant first, one per clock:
// C <- (x^D * C + B_i(x) * A(x)) mod F(x). The first step starts from C = 0, so
// it yields B_{s-1}A mod F as in the digit-serial algorithm. Within a clock the
// D partial products A*b_{i,j}*x^j and the shifted accumulator are summed into
// an (m+D)-bit word whose top D coefficients are then folded back with F(x),
// highest first. D = 1 degenerates to the serial multiplier; a larger D cuts
// the cycle count to ceil(m/D) but lengthens the combinational path. D = 8 is
// the digit found to give the fastest scalar multiplication for m = 163.
//
// Interface: pulse start for one clock with a and b valid (captured). done
// pulses one clock when c holds the product; c stays until the next start. A
// start while busy is ignored. Timing: done follows start by ceil(m/D)+1
// clocks. Reset is active-low, synchronous; the handshake is this design's own.
module gf_mul_digit #(
  parameter int            M = 163,
  parameter int            D = 8,
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

  localparam int S  = (M + D - 1) / D;   // number of digits
  localparam int BW = S * D;             // zero-padded width of B
  localparam int CW = $clog2(S + 1);

  logic [M-1:0]   a_q;
  logic [BW-1:0]  b_q;
  logic [CW-1:0]  cnt_q;
  logic [M-1:0]   c_next;

  // One digit step: x^D*C + B_i*A, then reduce the D coefficients above m-1.
  always_comb begin
    logic [M+D-1:0] t;
    t = {c, {D{1'b0}}};
    for (int j = 0; j < D; j++) begin
      if (b_q[BW-D+j]) t = t ^ ((M+D)'(a_q) << j);
    end
    for (int k = M + D - 1; k >= M; k--) begin
      if (t[k]) t = t ^ ((M+D)'(F) << (k - M));
    end
    c_next = t[M-1:0];
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
          b_q   <= BW'(b);
          c     <= '0;
          cnt_q <= CW'(S);
          busy  <= 1'b1;
        end
      end else begin
        c     <= c_next;
        b_q   <= b_q << D;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
