// an_encoder: arithmetic coder C(N) = A*N + B.
//
// Multiplies the signed nominal value by the constant code generator A and
// adds the displacement B (B = 0 gives a plain AN code, A = 1 and B = 0 leave
// the value uncoded). Because A is a constant the multiplier reduces to
// shifts and adds after synthesis. Purely combinational; IW is the nominal
// width, OW the coded width, which must hold A*N + B.
module an_encoder #(
  parameter int          A  = ced_pkg::CODE_A,
  parameter int          B  = ced_pkg::CODE_B,
  parameter int unsigned IW = ced_pkg::DW,
  parameter int unsigned OW = ced_pkg::coded_w(ced_pkg::DW, ced_pkg::CODE_A)
) (
  input  logic signed [IW-1:0] n,
  output logic signed [OW-1:0] c
);
  localparam logic signed [OW-1:0] AC = OW'(A);
  localparam logic signed [OW-1:0] BC = OW'(B);

  always_comb c = OW'(n) * AC + BC;
endmodule
