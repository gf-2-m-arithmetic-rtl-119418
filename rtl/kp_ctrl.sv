// kp_ctrl: scalar multiplication R = kP by the right-to-left binary method,
// with one ECC-ADD and one ECC-DOUBLE unit working side by side.
//
// The control unit holds R (starts at the point at infinity, coded (0,0)) and
// S (starts at P) and scans k from bit 0 to bit m-1. In every step it starts
// the doubling unit on S and, when k_i = 1, the addition unit on R and S; the
// two units run concurrently because R + S and 2S depend only on the old R and
// S. When both are finished, R <- R + S (if k_i = 1) and S <- 2S. The special
// cases of the group law that the affine addition formula does not cover are
// settled here, without the addition unit (add_kind_t):
//   ADD_SKIP  k_i = 0, or S is the point at infinity: R unchanged
//   ADD_COPY  R is the point at infinity: R <- S
//   ADD_DBL   R = S: R <- 2S, taken from the doubling unit's result
//   ADD_INF   R = -S (same x, other y): R <- infinity
//   ADD_UNIT  general case: R <- ECC-ADD(R, S)
// The scan always runs all m bits, as the binary method does.
//
// Interface: pulse start with k, px, py, a valid (captured). done pulses one
// clock when rx/ry hold kP ((0,0) for the point at infinity); busy is high in
// between. Timing: m steps, each 2 clocks plus the longer of the two units.
// Reset is active-low, synchronous. The binary method and the two-unit
// organisation follow the architecture; the special-case handling, the
// infinity coding (the method's R <- (0,0)) and the handshake are this
// design's own.
module kp_ctrl #(
  parameter int            M     = 163,
  parameter int            DIGIT = 8,
  parameter logic [M:0]    F     = (M+1)'(gf_pkg::field_poly(M))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic [M-1:0] px,
  input  logic [M-1:0] py,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] rx,
  output logic [M-1:0] ry
);

  typedef enum logic [2:0] {ADD_SKIP, ADD_COPY, ADD_DBL, ADD_INF, ADD_UNIT} add_kind_t;
  typedef enum logic [1:0] {S_IDLE, S_STEP, S_WAIT, S_DONE} state_t;

  localparam int IW = $clog2(M + 1);

  state_t        state_q;
  add_kind_t     kind_q, kind_c;
  logic [M-1:0]  k_q, a_q, sx_q, sy_q;
  logic [IW-1:0] i_q;
  logic          add_pend_q, dbl_pend_q;
  logic          r_inf, s_inf;

  logic          add_start, add_busy, add_done;
  logic          dbl_start, dbl_busy, dbl_done;
  logic [M-1:0]  add_x, add_y, dbl_x, dbl_y;

  ecc_add #(.M(M), .DIGIT(DIGIT), .F(F)) u_add (
    .clk, .rst_n, .start(add_start),
    .x1(rx), .y1(ry), .x2(sx_q), .y2(sy_q), .a(a_q),
    .busy(add_busy), .done(add_done), .x3(add_x), .y3(add_y)
  );

  ecc_double #(.M(M), .DIGIT(DIGIT), .F(F)) u_dbl (
    .clk, .rst_n, .start(dbl_start),
    .x1(sx_q), .y1(sy_q), .a(a_q),
    .busy(dbl_busy), .done(dbl_done), .x3(dbl_x), .y3(dbl_y)
  );

  assign r_inf = (rx == '0) && (ry == '0);
  assign s_inf = (sx_q == '0) && (sy_q == '0);

  // Which rule the current key bit calls for.
  always_comb begin
    if (!k_q[0] || s_inf)  kind_c = ADD_SKIP;
    else if (r_inf)        kind_c = ADD_COPY;
    else if (rx == sx_q)   kind_c = (ry == sy_q) ? ADD_DBL : ADD_INF;
    else                   kind_c = ADD_UNIT;
  end

  assign dbl_start = (state_q == S_STEP);
  assign add_start = (state_q == S_STEP) && (kind_c == ADD_UNIT);
  assign busy      = (state_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      kind_q     <= ADD_SKIP;
      done       <= 1'b0;
      k_q        <= '0;
      a_q        <= '0;
      sx_q       <= '0;
      sy_q       <= '0;
      rx         <= '0;
      ry         <= '0;
      i_q        <= '0;
      add_pend_q <= 1'b0;
      dbl_pend_q <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          k_q     <= k;
          a_q     <= a;
          sx_q    <= px;
          sy_q    <= py;
          rx      <= '0;
          ry      <= '0;
          i_q     <= '0;
          state_q <= S_STEP;
        end
        S_STEP: begin
          kind_q     <= kind_c;
          add_pend_q <= (kind_c == ADD_UNIT);
          dbl_pend_q <= 1'b1;
          state_q    <= S_WAIT;
        end
        S_WAIT: begin
          if (add_done) add_pend_q <= 1'b0;
          if (dbl_done) dbl_pend_q <= 1'b0;
          if ((!add_pend_q || add_done) && (!dbl_pend_q || dbl_done)) begin
            unique case (kind_q)
              ADD_COPY: begin rx <= sx_q;  ry <= sy_q;  end
              ADD_DBL:  begin rx <= dbl_x; ry <= dbl_y; end
              ADD_INF:  begin rx <= '0;    ry <= '0;    end
              ADD_UNIT: begin rx <= add_x; ry <= add_y; end
              default:  ;
            endcase
            sx_q <= dbl_x;
            sy_q <= dbl_y;
            k_q  <= k_q >> 1;
            i_q  <= i_q + 1'b1;
            state_q <= (i_q == IW'(M - 1)) ? S_DONE : S_STEP;
          end
        end
        S_DONE: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A unit is only started when it is idle.
  assert property (@(posedge clk) disable iff (!rst_n) add_start |-> !add_busy)
    else $error("kp_ctrl: ECC-ADD started while busy");
  assert property (@(posedge clk) disable iff (!rst_n) dbl_start |-> !dbl_busy)
    else $error("kp_ctrl: ECC-DOUBLE started while busy");

endmodule
