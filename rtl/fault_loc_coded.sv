// fault_loc_coded: error location network for neurons with coded inputs.
//
// With coded inputs a wrong output of one neuron also makes every neuron
// that receives it flag an error, so the plain row/column scheme would light
// all horizontal lines. Here each layer l has a vertical (intra-layer) line
// vline[l] = OR of its local errors and a cumulative line
// ec[l] = ec[l-1] | vline[l]. The cumulative line of the layers to the left
// inhibits the local errors of a neuron before they enter its horizontal
// (inter-layer) line, so only the errors of the leftmost faulty layer reach
// the horizontal lines. The faulty neuron is decoded as in the plain-input
// network: leftmost active vertical line, uppermost active horizontal line.
// With LATCH_EC = 1 the inhibiting lines are taken from a register (one
// clock of latency) to cut the skew of the vertical chains in large arrays;
// with LATCH_EC = 0, the default, the network is combinational.
module fault_loc_coded #(
  parameter int unsigned LAYERS   = ced_pkg::LAYERS,
  parameter int unsigned NEURONS  = ced_pkg::NEURONS,
  parameter bit          LATCH_EC = 1'b0,
  localparam int unsigned LW = (LAYERS  > 1) ? $clog2(LAYERS)  : 1,
  localparam int unsigned NW = (NEURONS > 1) ? $clog2(NEURONS) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [LAYERS-1:0][NEURONS-1:0] err,
  output logic [LAYERS-1:0]              vline,
  output logic [LAYERS-1:0]              ec,     // cumulative intra-layer lines
  output logic [NEURONS-1:0]             hline,
  output logic                           loc_valid,
  output logic [LW-1:0]                  loc_layer,
  output logic [NW-1:0]                  loc_row
);
  logic [LAYERS-1:0] ec_q, ec_use;

  always_comb begin
    vline = '0;
    for (int l = 0; l < int'(LAYERS); l++)
      for (int m = 0; m < int'(NEURONS); m++)
        vline[l] = vline[l] | err[l][m];
  end

  // cumulative chain: ec[l] = vline[0] | ... | vline[l]
  for (genvar l = 0; l < int'(LAYERS); l++) begin : g_ec
    assign ec[l] = |vline[l:0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ec_q <= '0;
    else        ec_q <= ec;

  assign ec_use = LATCH_EC ? ec_q : ec;

  always_comb begin
    hline = '0;
    for (int l = 0; l < int'(LAYERS); l++)
      for (int m = 0; m < int'(NEURONS); m++)
        hline[m] = hline[m] | (err[l][m] & ((l == 0) ? 1'b1 : !ec_use[(l == 0) ? 0 : l-1]));
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
