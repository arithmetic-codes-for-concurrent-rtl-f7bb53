// step_eval: evaluation function f compacted with the output encoder.
//
// f is a staircase built from STEPS step functions: y is the number of
// thresholds thr[t] that the input sum sigma reaches (sigma >= thr[t]), so
// y runs from 0 to STEPS and STEPS = 1 is a single comparator. The output is
// delivered already coded, y_c = A*y + B, so that evaluation and coding are
// one operation (A = 1, B = 0 gives the plain value). The thresholds come
// from the neuron's storage. Combinational.
module step_eval #(
  parameter int          A     = ced_pkg::CODE_A,
  parameter int          B     = ced_pkg::CODE_B,
  parameter int unsigned STEPS = ced_pkg::STEPS,
  parameter int unsigned SW    = ced_pkg::sum_w(ced_pkg::DW, ced_pkg::CODE_A, ced_pkg::N_IN),
  parameter int unsigned OW    = ced_pkg::coded_w(ced_pkg::DW, ced_pkg::CODE_A)
) (
  input  logic signed [SW-1:0] sigma,
  input  logic signed [SW-1:0] thr [STEPS],
  output logic signed [OW-1:0] y_c
);
  localparam logic signed [OW-1:0] AC = OW'(A);
  localparam logic signed [OW-1:0] BC = OW'(B);

  logic signed [OW-1:0] y;

  always_comb begin
    y = '0;
    for (int t = 0; t < int'(STEPS); t++)
      if (sigma >= thr[t]) y = y + OW'(1);
    y_c = y * AC + BC;
  end
endmodule
