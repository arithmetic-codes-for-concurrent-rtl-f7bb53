// neuron_lpci: local propagation with coded inputs.
//
// Same datapath as the LDCI neuron (inputs A*x, plain weights, check of the
// sum against A, staircase evaluator coding A*y), but there is no separate
// error line: the local error bit is added to the coded output, so a faulty
// computation hands the receiving neurons the non-codeword A*y + 1, which
// keeps travelling through the network until the output checker.
// Combinational.
module neuron_lpci #(
  parameter int          A     = ced_pkg::CODE_A,
  parameter int unsigned DW    = ced_pkg::DW,
  parameter int unsigned N_IN  = ced_pkg::N_IN,
  parameter int unsigned STEPS = ced_pkg::STEPS,
  localparam int unsigned CDW  = ced_pkg::coded_w(DW, A),
  localparam int unsigned SW   = ced_pkg::sum_w(DW, A, N_IN)
) (
  input  logic signed [CDW-1:0] x_c   [N_IN],   // inputs, A*x
  input  logic signed [CDW-1:0] w_c   [N_IN],   // plain weights
  input  logic signed [SW-1:0]  thr   [STEPS],
  output logic signed [CDW-1:0] y_c             // A*y, or A*y + 1 on error
);
  logic signed [SW-1:0]  s, sigma;
  logic signed [CDW-1:0] ay;
  logic                  e;

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

  an_checker #(.D(A), .OFF(0), .IW(SW), .OW(SW)) u_chk (
    .v(s), .q(sigma), .err(e));

  step_eval #(.A(A), .B(0), .STEPS(STEPS), .SW(SW), .OW(CDW)) u_f (
    .sigma(sigma), .thr(thr), .y_c(ay));

  assign y_c = ay + CDW'(e);
endmodule
