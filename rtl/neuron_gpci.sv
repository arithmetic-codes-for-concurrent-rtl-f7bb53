// neuron_gpci: global propagation with coded inputs.
//
// Inputs are coded A*x, weights are plain, so the adder delivers A*sigma.
// Nothing is checked here: the modified function g gives
// A*f(sigma) - A*sigma and a final adder adds the coded sum back, so the
// output is the codeword A*f(sigma) when everything is right and keeps the
// residue of a wrong sum otherwise. Errors are detected by the checker at
// the outputs of the network. Combinational.
module neuron_gpci #(
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
  output logic signed [CDW-1:0] y_c             // A*f(sigma) (+ residue)
);
  logic signed [SW-1:0] s, g, o;

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

  g_eval #(.A(A), .STEPS(STEPS), .SW(SW)) u_g (.v(s), .thr(thr), .g(g));

  always_comb begin
    o   = g + s;
    y_c = CDW'(o);
  end
endmodule
