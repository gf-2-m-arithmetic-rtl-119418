// ecc_double: affine point doubling unit, (x3, y3) = 2(x1, y1) on the binary
// curve y^2 + xy = x^3 + a x^2 + b over GF(2^m).
//
// It evaluates
//   lambda = x1 + y1/x1,  x3 = lambda^2 + lambda + a,  y3 = x1^2 + lambda*x3 + x3
// with its own divider, multiplier and a single combinational squarer that is
// shared in time: while the division runs it squares x1, afterwards it
// squares lambda. The sequence is
//   DIV  (divider busy, x1^2 latched)   ->
//   SQR  (one clock: x3 formed, multiplication lambda*x3 started) ->
//   MUL  (multiplier busy)              -> result.
// A point with x1 = 0 (the point at infinity, coded as (0,0), or a point of
// order two) doubles to the point at infinity, returned as (0,0) two clocks
// after start without using the datapath.
//
// Interface: pulse start with x1, y1, a valid (captured). done pulses one
// clock when x3/y3 are valid; they stay until the next start. Timing: about
// division + multiplication + 3 clocks. Reset is active-low, synchronous.
// The formulas follow the affine doubling rule; the squarer sharing, the
// handshake and the handling of x1 = 0 are this design's own.
module ecc_double #(
  parameter int            M     = 163,
  parameter int            DIGIT = 8,
  parameter logic [M:0]    F     = (M+1)'(gf_pkg::field_poly(M))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] x1,
  input  logic [M-1:0] y1,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] x3,
  output logic [M-1:0] y3
);

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_SQR, S_MUL, S_INF} state_t;
  state_t state_q;

  logic [M-1:0] x1_q, a_q, x1sq_q, lam_q;
  logic [M-1:0] sq_in, sq_out, x3_c;
  logic         div_start, div_done, mul_start, mul_done;
  logic         div_busy, mul_busy;
  logic [M-1:0] div_q, mul_c;

  gf_div #(.M(M), .F(F)) u_div (
    .clk, .rst_n, .start(div_start), .x(x1), .y(y1),
    .busy(div_busy), .done(div_done), .q(div_q)
  );

  gf_mul #(.M(M), .DIGIT(DIGIT), .F(F)) u_mul (
    .clk, .rst_n, .start(mul_start), .a(lam_q), .b(x3_c),
    .busy(mul_busy), .done(mul_done), .c(mul_c)
  );

  gf_sqr #(.M(M), .F(F)) u_sqr (.a(sq_in), .c(sq_out));

  assign sq_in     = (state_q == S_SQR) ? lam_q : x1_q;
  assign x3_c      = sq_out ^ lam_q ^ a_q;
  assign div_start = (state_q == S_IDLE) && start && (x1 != '0);
  assign mul_start = (state_q == S_SQR);
  assign busy      = (state_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
      x1_q    <= '0;
      a_q     <= '0;
      x1sq_q  <= '0;
      lam_q   <= '0;
      x3      <= '0;
      y3      <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          x1_q    <= x1;
          a_q     <= a;
          state_q <= (x1 == '0) ? S_INF : S_DIV;
        end
        S_DIV: begin
          x1sq_q <= sq_out;
          if (div_done) begin
            lam_q   <= x1_q ^ div_q;
            state_q <= S_SQR;
          end
        end
        S_SQR: begin
          x3      <= x3_c;
          state_q <= S_MUL;
        end
        S_MUL: if (mul_done) begin
          y3      <= x1sq_q ^ mul_c ^ x3;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        S_INF: begin
          x3      <= '0;
          y3      <= '0;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The arithmetic modules are only started when idle.
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
  assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> !mul_busy);

endmodule
