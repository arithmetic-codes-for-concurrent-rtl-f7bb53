// neuron_ldawai: local detection, associated-coded weights and inputs
// (both AN+B).
//
// Products (A*w + B)(A*x + B) sum to
//   A^2*sigma + A*B*sum(w) + A*B*sum(x) + k*B^2      (k = N_IN synapses).
// The main adder also takes the constant -k*B^2, leaving S, which is checked
// against A (error e1). A second adder sums the coded inputs together with
// the per-neuron constant corr = A*sum(w) - k*B, giving A*sum(x) + A*sum(w);
// multiplied by B this is the correction, subtracted from S. The result is
// checked against A^2 (error e2) and its quotient feeds the staircase
// evaluator, whose output is coded A*y + B. e = e1 | e2, e_out = e_in | e.
// Combinational.
module neuron_ldawai #(
  parameter int          A     = ced_pkg::CODE_A,
  parameter int          B     = ced_pkg::CODE_B,
  parameter int unsigned DW    = ced_pkg::DW,
  parameter int unsigned N_IN  = ced_pkg::N_IN,
  parameter int unsigned STEPS = ced_pkg::STEPS,
  localparam int unsigned CDW  = ced_pkg::coded_w(DW, A),
  localparam int unsigned SW   = ced_pkg::sum_w(DW, A, N_IN)
) (
  input  logic signed [CDW-1:0] x_c   [N_IN],   // inputs, A*x + B
  input  logic signed [CDW-1:0] w_c   [N_IN],   // weights, A*w + B
  input  logic signed [SW-1:0]  corr,           // A*sum(w) - k*B
  input  logic signed [SW-1:0]  thr   [STEPS],
  input  logic                  e_in,
  output logic signed [CDW-1:0] y_c,            // A*y + B
  output logic                  e,
  output logic                  e_out
);
  localparam logic signed [SW-1:0] KB2 = SW'(int'(N_IN) * B * B);
  localparam logic signed [SW-1:0] BC  = SW'(B);

  logic signed [SW-1:0] s, sx, cterm, sc, q1, sigma;
  logic                 e1, e2;

  // main adder (products and -k*B^2)
  function automatic logic signed [SW-1:0] dot(
      input logic signed [CDW-1:0] xv [N_IN], input logic signed [CDW-1:0] wv [N_IN]);
    logic signed [SW-1:0] acc;
    acc = -KB2;
    for (int j = 0; j < int'(N_IN); j++)
      acc = acc + SW'(xv[j]) * SW'(wv[j]);
    return acc;
  endfunction

  // correction adder (coded inputs and corr)
  function automatic logic signed [SW-1:0] isum(
      input logic signed [CDW-1:0] xv [N_IN], input logic signed [SW-1:0] c);
    logic signed [SW-1:0] acc;
    acc = c;
    for (int j = 0; j < int'(N_IN); j++)
      acc = acc + SW'(xv[j]);
    return acc;
  endfunction

  assign s  = dot(x_c, w_c);
  assign sx = isum(x_c, corr);

  always_comb begin
    cterm = sx * BC;
    sc    = s - cterm;
  end

  an_checker #(.D(A), .OFF(0), .IW(SW), .OW(SW)) u_chk1 (
    .v(s), .q(q1), .err(e1));

  an_checker #(.D(A * A), .OFF(0), .IW(SW), .OW(SW)) u_chk2 (
    .v(sc), .q(sigma), .err(e2));

  step_eval #(.A(A), .B(B), .STEPS(STEPS), .SW(SW), .OW(CDW)) u_f (
    .sigma(sigma), .thr(thr), .y_c(y_c));

  assign e     = e1 | e2;
  assign e_out = e_in | e;
endmodule
