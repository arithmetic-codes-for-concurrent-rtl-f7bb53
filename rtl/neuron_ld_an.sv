// neuron_ld_an: local-detection neuron with AN codes (LDCW, LDCI, LDCWI).
//
// One general structure covers three architectures by the choice of the
// input code generator A1 and the weight code generator A2:
//   A1 = 1, A2 = A  coded weights, plain inputs (LDCW), output plain;
//   A1 = A, A2 = 1  coded inputs, plain weights (LDCI), output coded A*y;
//   A1 = A2 = A     both coded (LDCWI), output coded A*y.
// The synaptic multipliers and the adder work on coded operands, so the sum
// is (A1*A2)*sigma when nothing is wrong. The decoder/checker divides by
// A1*A2: its quotient feeds the staircase evaluator, whose result is coded
// with A1 for the receiving neurons, and a non-null residue raises the local
// error e, which is OR-ed into the error chain (e_out = e_in | e).
// Combinational. The structure follows the general local-detection neuron;
// widths and the staircase evaluator are this design's choices.
module neuron_ld_an #(
  parameter int          A     = ced_pkg::CODE_A,
  parameter int          A1    = ced_pkg::CODE_A,
  parameter int          A2    = ced_pkg::CODE_A,
  parameter int unsigned DW    = ced_pkg::DW,
  parameter int unsigned N_IN  = ced_pkg::N_IN,
  parameter int unsigned STEPS = ced_pkg::STEPS,
  localparam int unsigned CDW  = ced_pkg::coded_w(DW, A),
  localparam int unsigned SW   = ced_pkg::sum_w(DW, A, N_IN)
) (
  input  logic signed [CDW-1:0] x_c   [N_IN],   // inputs, code A1
  input  logic signed [CDW-1:0] w_c   [N_IN],   // weights, code A2
  input  logic signed [SW-1:0]  thr   [STEPS],  // evaluator thresholds
  input  logic                  e_in,           // error chain in
  output logic signed [CDW-1:0] y_c,            // output, code A1
  output logic                  e,              // local error
  output logic                  e_out           // error chain out
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

  assign s = dot(x_c, w_c, '0);

  an_checker #(.D(A1 * A2), .OFF(0), .IW(SW), .OW(SW)) u_chk (
    .v(s), .q(sigma), .err(e));

  step_eval #(.A(A1), .B(0), .STEPS(STEPS), .SW(SW), .OW(CDW)) u_f (
    .sigma(sigma), .thr(thr), .y_c(y_c));

  assign e_out = e_in | e;
endmodule
