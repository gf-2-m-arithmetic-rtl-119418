// kp_top: GF(2^m) elliptic curve scalar multiplier with a 32-bit host port.
//
// The host loads the scalar k, the base point P = (Px, Py) and the curve
// coefficient a through the input interface, starts the operation, polls the
// status word and reads back R = kP through the output interface. Inside,
// the control unit runs the binary method over the ECC-ADD and ECC-DOUBLE
// units, each of which owns a divider, a multiplier (bit-serial for
// DIGIT = 1, digit-serial otherwise) and a combinational squarer.
//
// Parameters: M, the field degree (163 by default; 233 and 283 are the other
// fields the design targets), DIGIT, the multiplier digit size (8, the
// fastest choice found for m = 163), and F, the reduction polynomial (NIST
// polynomial of M by default). Ports: host_wr/host_addr/host_wdata write,
// host_rd/host_addr read with host_rdata valid one clock later (address map
// in host_in_if and host_out_if); kp_done pulses when a result is buffered and result_ready stays high
// until the next start.
// Reset is active-low, synchronous.
module kp_top #(
  parameter int            M     = 163,
  parameter int            DIGIT = 8,
  parameter logic [M:0]    F     = (M+1)'(gf_pkg::field_poly(M))
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_wr,
  input  logic        host_rd,
  input  logic [7:0]  host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        kp_done,
  output logic        result_ready
);

  logic         start, busy;
  logic [M-1:0] k, px, py, a, rx, ry;

  host_in_if #(.M(M)) u_in (
    .clk, .rst_n, .wr_en(host_wr), .addr(host_addr), .wdata(host_wdata),
    .core_busy(busy), .start, .k, .px, .py, .a
  );

  kp_ctrl #(.M(M), .DIGIT(DIGIT), .F(F)) u_core (
    .clk, .rst_n, .start, .k, .px, .py, .a,
    .busy, .done(kp_done), .rx, .ry
  );

  host_out_if #(.M(M)) u_out (
    .clk, .rst_n, .core_start(start), .core_busy(busy), .core_done(kp_done),
    .rx, .ry, .rd_en(host_rd), .addr(host_addr), .rdata(host_rdata), .ready(result_ready)
  );

endmodule
