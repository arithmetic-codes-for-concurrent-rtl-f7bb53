// neuron_ldcwai: local detection, coded weights (AN), associated-coded
// inputs (AN+B).
//
// Each product (A*w)(A*x + B) = A^2*w*x + A*B*w. The adder also takes the
// per-neuron constant corr = -A*B*sum(w), fixed while the weights are, so a
// correct sum is A^2*sigma. The checker divides by A^2: the quotient goes to
// the staircase evaluator, whose output is coded A*y + B for the receiving
// neurons, and a non-null residue raises the local error e. An error of
// +-2^k in a stored weight always leaves a non-codeword, because 2^k*B is not
// a multiple of A^2, so weight-memory errors are seen without latency.
// Combinational; e_out = e_in | e.
module neuron_ldcwai #(
  parameter int          A     = ced_pkg::CODE_A,
  parameter int          B     = ced_pkg::CODE_B,
  parameter int unsigned DW    = ced_pkg::DW,
  parameter int unsigned N_IN  = ced_pkg::N_IN,
  parameter int unsigned STEPS = ced_pkg::STEPS,
  localparam int unsigned CDW  = ced_pkg::coded_w(DW, A),
  localparam int unsigned SW   = ced_pkg::sum_w(DW, A, N_IN)
) (
  input  logic signed [CDW-1:0] x_c   [N_IN],   // inputs, A*x + B
  input  logic signed [CDW-1:0] w_c   [N_IN],   // weights, A*w
  input  logic signed [SW-1:0]  corr,           // -A*B*sum(w)
  input  logic signed [SW-1:0]  thr   [STEPS],
  input  logic                  e_in,
  output logic signed [CDW-1:0] y_c,            // A*y + B
  output logic                  e,
  output logic                  e_out
);
  logic signed [SW-1:0] s, sigma;

  // adder of the synaptic products
  function automatic logic signed [SW-1:0] dot(
      input logic signed [CDW-1:0] xv [N_IN], input logic signed [CDW-1:0] wv [N_IN],
      input logic signed [SW-1:0] init);
    logic signed [SW-1:0] acc;
    acc = init;
    for (int j = 0; j < int'(N_IN); j++)
      acc = acc + SW'(xv[j]) * SW'(wv[j]);
    return acc;
  endfunction

  assign s = dot(x_c, w_c, corr);

  an_checker #(.D(A * A), .OFF(0), .IW(SW), .OW(SW)) u_chk (
    .v(s), .q(sigma), .err(e));

  step_eval #(.A(A), .B(B), .STEPS(STEPS), .SW(SW), .OW(CDW)) u_f (
    .sigma(sigma), .thr(thr), .y_c(y_c));

  assign e_out = e_in | e;
endmodule
