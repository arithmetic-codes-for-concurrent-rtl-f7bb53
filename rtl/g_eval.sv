// g_eval: modified evaluation function g of the global-propagation neuron.
//
// For a codeword v = A*sigma it returns g(v) = A*f(sigma) - A*sigma, so that
// v + g(v) = A*f(sigma). For any v it takes q = floor(v / A) and
// r = v - A*q (0 <= r < A) and returns A*f(q) - A*q; the output adder then
// yields A*f(q) + r, which keeps the residue r of a wrong sum. f is the same
// staircase as in step_eval. Combinational.
module g_eval #(
  parameter int          A     = ced_pkg::CODE_A,
  parameter int unsigned STEPS = ced_pkg::STEPS,
  parameter int unsigned SW    = ced_pkg::sum_w(ced_pkg::DW, ced_pkg::CODE_A, ced_pkg::N_IN)
) (
  input  logic signed [SW-1:0] v,
  input  logic signed [SW-1:0] thr [STEPS],
  output logic signed [SW-1:0] g
);
  localparam logic signed [SW-1:0] AC = SW'(A);

  logic signed [SW-1:0] r, q, fq;

  always_comb begin
    r = v % AC;
    if (r < 0) r = r + AC;
    q = (v - r) / AC;
  end

  step_eval #(.A(1), .B(0), .STEPS(STEPS), .SW(SW), .OW(SW)) u_f (
    .sigma(q), .thr(thr), .y_c(fq));

  always_comb g = AC * fq - AC * q;
endmodule
