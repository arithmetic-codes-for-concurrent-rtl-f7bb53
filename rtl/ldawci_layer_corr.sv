// ldawci_layer_corr: correction generator of one LDAWCI layer.
//
// With weights A*w + B and inputs A*x, every neuron's coded sum carries the
// term A*B*sum(x), which depends only on the inputs of the layer. This unit
// adds the coded inputs (giving A*sum(x)) and multiplies by the constant B;
// its result is shared by all neurons of the layer, which subtract it.
// Combinational.
module ldawci_layer_corr #(
  parameter int          A     = ced_pkg::CODE_A,
  parameter int          B     = ced_pkg::CODE_B,
  parameter int unsigned DW    = ced_pkg::DW,
  parameter int unsigned N_IN  = ced_pkg::N_IN,
  localparam int unsigned CDW  = ced_pkg::coded_w(DW, A),
  localparam int unsigned SW   = ced_pkg::sum_w(DW, A, N_IN)
) (
  input  logic signed [CDW-1:0] x_c [N_IN],   // layer inputs, A*x
  output logic signed [SW-1:0]  lcorr         // A*B*sum(x)
);
  localparam logic signed [SW-1:0] BC = SW'(B);
  logic signed [SW-1:0] sx;

  always_comb begin
    sx = '0;
    for (int j = 0; j < int'(N_IN); j++)
      sx = sx + SW'(x_c[j]);
    lcorr = sx * BC;
  end
endmodule
