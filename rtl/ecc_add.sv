// ecc_add: affine point addition unit, (x3, y3) = (x1, y1) + (x2, y2) for two
// points with x1 != x2 on y^2 + xy = x^3 + a x^2 + b over GF(2^m).
//
// It evaluates
//   lambda = (y1 + y2)/(x1 + x2),  x3 = lambda^2 + lambda + x1 + x2 + a,
//   y3 = lambda*(x1 + x3) + x3 + y1
// with its own divider, multiplier and combinational squarer:
//   DIV (divider busy) -> SQR (one clock: x3 formed, lambda*(x1+x3) started)
//   -> MUL (multiplier busy) -> result.
// The cases the formula does not cover (either operand the point at infinity,
// x1 = x2) are resolved by the control unit before it starts this unit.
//
// Interface: pulse start with x1, y1, x2, y2, a valid (captured). done pulses
// one clock when x3/y3 are valid; they stay until the next start. Timing:
// division + multiplication + 3 clocks. Reset is active-low, synchronous. The
// formulas follow the affine addition rule; the sequencing and handshake are
// this design's own.
module ecc_add #(
  parameter int            M     = 163,
  parameter int            DIGIT = 8,
  parameter logic [M:0]    F     = (M+1)'(gf_pkg::field_poly(M))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] x1,
  input  logic [M-1:0] y1,
  input  logic [M-1:0] x2,
  input  logic [M-1:0] y2,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] x3,
  output logic [M-1:0] y3
);

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_SQR, S_MUL} state_t;
  state_t state_q;

  logic [M-1:0] x1_q, y1_q, xs_q, a_q, lam_q;
  logic [M-1:0] sq_out, x3_c;
  logic         div_start, div_done, div_busy, mul_done, mul_busy;
  logic [M-1:0] div_q, mul_c;

  gf_div #(.M(M), .F(F)) u_div (
    .clk, .rst_n, .start(div_start), .x(x1 ^ x2), .y(y1 ^ y2),
    .busy(div_busy), .done(div_done), .q(div_q)
  );

  gf_mul #(.M(M), .DIGIT(DIGIT), .F(F)) u_mul (
    .clk, .rst_n, .start(state_q == S_SQR), .a(lam_q), .b(x1_q ^ x3_c),
    .busy(mul_busy), .done(mul_done), .c(mul_c)
  );

  gf_sqr #(.M(M), .F(F)) u_sqr (.a(lam_q), .c(sq_out));

  assign x3_c      = sq_out ^ lam_q ^ xs_q ^ a_q;
  assign div_start = (state_q == S_IDLE) && start;
  assign busy      = (state_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
      x1_q    <= '0;
      y1_q    <= '0;
      xs_q    <= '0;
      a_q     <= '0;
      lam_q   <= '0;
      x3      <= '0;
      y3      <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          x1_q    <= x1;
          y1_q    <= y1;
          xs_q    <= x1 ^ x2;
          a_q     <= a;
          state_q <= S_DIV;
        end
        S_DIV: if (div_done) begin
          lam_q   <= div_q;
          state_q <= S_SQR;
        end
        S_SQR: begin
          x3      <= x3_c;
          state_q <= S_MUL;
        end
        S_MUL: if (mul_done) begin
          y3      <= mul_c ^ x3 ^ y1_q;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The arithmetic modules are only started when idle.
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
  assert property (@(posedge clk) disable iff (!rst_n) (state_q == S_SQR) |-> !mul_busy);

  assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |-> (x1 != x2))
    else $error("ecc_add: operands with equal x are handled by the control unit");

endmodule
