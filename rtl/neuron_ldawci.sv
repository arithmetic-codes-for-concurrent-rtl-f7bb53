// neuron_ldawci: local detection, associated-coded weights (AN+B), coded
// inputs (AN).
//
// Products (A*w + B)(A*x) sum to S = A^2*sigma + A*B*sum(x). S is first
// checked for membership of the AN code (divide by A: error e1), which
// catches errors on the interconnections that the later subtraction would
// cancel. The layer's correction A*B*sum(x), from ldawci_layer_corr, is then
// subtracted and the result checked against A^2 (error e2); its quotient
// feeds the staircase evaluator, whose output is coded A*y. e = e1 | e2,
// e_out = e_in | e. Combinational.
module neuron_ldawci #(
  parameter int          A     = ced_pkg::CODE_A,
  parameter int          B     = ced_pkg::CODE_B,
  parameter int unsigned DW    = ced_pkg::DW,
  parameter int unsigned N_IN  = ced_pkg::N_IN,
  parameter int unsigned STEPS = ced_pkg::STEPS,
  localparam int unsigned CDW  = ced_pkg::coded_w(DW, A),
  localparam int unsigned SW   = ced_pkg::sum_w(DW, A, N_IN)
) (
  input  logic signed [CDW-1:0] x_c   [N_IN],   // inputs, A*x
  input  logic signed [CDW-1:0] w_c   [N_IN],   // weights, A*w + B
  input  logic signed [SW-1:0]  lcorr,          // A*B*sum(x) of the layer
  input  logic signed [SW-1:0]  thr   [STEPS],
  input  logic                  e_in,
  output logic signed [CDW-1:0] y_c,            // A*y
  output logic                  e,
  output logic                  e_out
);
  logic signed [SW-1:0] s, sc, q1, sigma;
  logic                 e1, e2;

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

  assign s = dot(x_c, w_c, '0);

  // correcting subtractor
  always_comb sc = s - lcorr;

  an_checker #(.D(A), .OFF(0), .IW(SW), .OW(SW)) u_chk1 (
    .v(s), .q(q1), .err(e1));

  an_checker #(.D(A * A), .OFF(0), .IW(SW), .OW(SW)) u_chk2 (
    .v(sc), .q(sigma), .err(e2));

  step_eval #(.A(A), .B(0), .STEPS(STEPS), .SW(SW), .OW(CDW)) u_f (
    .sigma(sigma), .thr(thr), .y_c(y_c));

  assign e     = e1 | e2;
  assign e_out = e_in | e;
endmodule
