// ced_top: the eight self-checking neuron architectures side by side.
//
// One ced_network per architecture (index = ced_pkg::arch_e value: LDCW,
// LDCI, LDCWI, LDCWAI, LDAWCI, LDAWAI, LPCI, GPCI), all fed with the same
// nominal inputs and the same weight/threshold load port, so the same neural
// computation runs under every coding scheme at once. Each network brings out
// its decoded outputs, its error chain, its output check and its fault
// location. Timing: one clock from x to every output; one load word per
// clock. Putting the variants next to each other is this design's choice;
// each one can also be used alone as a ced_network.
module ced_top #(
  parameter int unsigned DW      = ced_pkg::DW,
  parameter int unsigned STEPS   = ced_pkg::STEPS,
  parameter int unsigned LAYERS  = ced_pkg::LAYERS,
  parameter int unsigned NEURONS = ced_pkg::NEURONS,
  localparam int unsigned NA   = ced_pkg::N_ARCH,
  localparam int unsigned SW   = ced_pkg::sum_w(DW, ced_pkg::CODE_A, NEURONS),
  localparam int unsigned AW   = $clog2(NEURONS + STEPS),
  localparam int unsigned LW   = (LAYERS  > 1) ? $clog2(LAYERS)  : 1,
  localparam int unsigned NW   = (NEURONS > 1) ? $clog2(NEURONS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [LW-1:0]        wlayer,
  input  logic [NW-1:0]        wneuron,
  input  logic [AW-1:0]        waddr,
  input  logic signed [SW-1:0] wdata,
  input  logic signed [DW-1:0] x [NEURONS],
  output logic signed [DW-1:0] y [NA][NEURONS],
  output logic [NA-1:0]        err,
  output logic [NA-1:0]        out_err,
  output logic [NA-1:0]        loc_valid,
  output logic [NA-1:0][LW-1:0] loc_layer,
  output logic [NA-1:0][NW-1:0] loc_row
);
  for (genvar a = 0; a < int'(NA); a++) begin : g_arch
    ced_network #(
      .ARCH(ced_pkg::arch_e'(a)), .DW(DW), .STEPS(STEPS),
      .LAYERS(LAYERS), .NEURONS(NEURONS)
    ) u_net (
      .clk, .rst_n, .we, .wlayer, .wneuron, .waddr, .wdata, .x,
      .y(y[a]), .err(err[a]), .out_err(out_err[a]),
      .loc_valid(loc_valid[a]), .loc_layer(loc_layer[a]), .loc_row(loc_row[a]));
  end
endmodule
