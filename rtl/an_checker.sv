// an_checker: decoder/checker of an arithmetic code.
//
// Subtracts the constant offset OFF from the coded value v and divides the
// result by the constant D (A for an AN operand, A*A for a product of two AN
// operands). The quotient q is the nominal value; a non-null residue means
// that v is not a codeword and raises err. Combinational, signed. When err is
// set q is the truncated quotient and carries no meaning. The checker is
// written behaviourally; the fail-safe gate-level structure a hard core would
// need is left to the implementation.
module an_checker #(
  parameter int          D   = ced_pkg::CODE_A,
  parameter int          OFF = 0,
  parameter int unsigned IW  = ced_pkg::sum_w(ced_pkg::DW, ced_pkg::CODE_A, ced_pkg::N_IN),
  parameter int unsigned OW  = ced_pkg::sum_w(ced_pkg::DW, ced_pkg::CODE_A, ced_pkg::N_IN)
) (
  input  logic signed [IW-1:0] v,
  output logic signed [OW-1:0] q,
  output logic                 err
);
  localparam logic signed [IW-1:0] DC   = IW'(D);
  localparam logic signed [IW-1:0] OFFC = IW'(OFF);

  logic signed [IW-1:0] t, r, qw;

  always_comb begin
    t   = v - OFFC;
    r   = t % DC;
    qw  = t / DC;
    err = (r != '0);
    q   = OW'(qw);
  end
endmodule
