// fault_loc_uncoded: error location network for neurons with plain inputs.
//
// The neurons sit on a rectangular array, one column per layer and one row
// per position in the layer. Each local error is propagated along two OR
// chains: the vertical (intra-layer) line of its layer and the horizontal
// (inter-layer) line of its row. With plain inputs a faulty neuron does not
// make its receivers flag errors, so under the single-fault assumption the
// faulty neuron is at the crossing of the leftmost active vertical line and
// the uppermost active horizontal line; loc_layer and loc_row decode that
// crossing (loc_valid when any line is active). Combinational.
module fault_loc_uncoded #(
  parameter int unsigned LAYERS  = ced_pkg::LAYERS,
  parameter int unsigned NEURONS = ced_pkg::NEURONS,
  localparam int unsigned LW = (LAYERS  > 1) ? $clog2(LAYERS)  : 1,
  localparam int unsigned NW = (NEURONS > 1) ? $clog2(NEURONS) : 1
) (
  input  logic [LAYERS-1:0][NEURONS-1:0] err,    // local error of neuron [layer][row]
  output logic [LAYERS-1:0]              vline,  // intra-layer error lines
  output logic [NEURONS-1:0]             hline,  // inter-layer error lines
  output logic                           loc_valid,
  output logic [LW-1:0]                  loc_layer,
  output logic [NW-1:0]                  loc_row
);
  always_comb begin
    vline = '0;
    hline = '0;
    for (int l = 0; l < int'(LAYERS); l++)
      for (int m = 0; m < int'(NEURONS); m++) begin
        vline[l] = vline[l] | err[l][m];
        hline[m] = hline[m] | err[l][m];
      end
  end

  always_comb begin
    loc_valid = |vline;
    loc_layer = '0;
    loc_row   = '0;
    for (int l = int'(LAYERS) - 1; l >= 0; l--)
      if (vline[l]) loc_layer = LW'(l);
    for (int m = int'(NEURONS) - 1; m >= 0; m--)
      if (hline[m]) loc_row = NW'(m);
  end
endmodule
