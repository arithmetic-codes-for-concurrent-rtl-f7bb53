// ced_network: multi-layer feed-forward network of self-checking neurons of
// one architecture (ARCH), mapped one-to-one onto hardware.
//
// LAYERS layers of NEURONS neurons, fully connected; every neuron has
// NEURONS synapses (the primary inputs feed layer 0). The primary inputs x
// are coded with the input code of the architecture, every neuron has its own
// neuron_mem holding its coded weights, correction constant and thresholds,
// and the coded outputs of one layer are the coded inputs of the next. LDAWCI
// layers share one ldawci_layer_corr. Local errors of the local-detection
// architectures are OR-ed along one chain through all neurons (err) and also
// drive the fault location network: fault_loc_uncoded for LDCW (plain
// inputs), fault_loc_coded for the other local-detection architectures. The
// outputs of the last layer are decoded and checked (out_err); for LPCI and
// GPCI this is the only check.
// Timing: the neurons are combinational; x to y, err, out_err and the
// location outputs takes one clock (registered outputs). Weight loading:
// one word per clock, selected by wlayer, wneuron, waddr (see neuron_mem).
// The array shape and the output registers are this design's choices.
module ced_network #(
  parameter ced_pkg::arch_e ARCH = ced_pkg::ARCH_LDAWAI,
  parameter int          A        = ced_pkg::CODE_A,
  parameter int          B        = ced_pkg::CODE_B,
  parameter int unsigned DW       = ced_pkg::DW,
  parameter int unsigned STEPS    = ced_pkg::STEPS,
  parameter int unsigned LAYERS   = ced_pkg::LAYERS,
  parameter int unsigned NEURONS  = ced_pkg::NEURONS,
  parameter bit          LATCH_EC = 1'b0,
  localparam int unsigned N_IN = NEURONS,
  localparam int unsigned CDW  = ced_pkg::coded_w(DW, A),
  localparam int unsigned SW   = ced_pkg::sum_w(DW, A, N_IN),
  localparam int unsigned AW   = $clog2(N_IN + STEPS),
  localparam int unsigned LW   = (LAYERS  > 1) ? $clog2(LAYERS)  : 1,
  localparam int unsigned NW   = (NEURONS > 1) ? $clog2(NEURONS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // weight / threshold load port
  input  logic                 we,
  input  logic [LW-1:0]        wlayer,
  input  logic [NW-1:0]        wneuron,
  input  logic [AW-1:0]        waddr,
  input  logic signed [SW-1:0] wdata,
  // data
  input  logic signed [DW-1:0] x [NEURONS],
  output logic signed [DW-1:0] y [NEURONS],
  output logic                 err,        // OR of all local errors
  output logic                 out_err,    // non-codeword at the outputs
  output logic                 loc_valid,
  output logic [LW-1:0]        loc_layer,
  output logic [NW-1:0]        loc_row
);
  import ced_pkg::*;

  localparam int AI = code_a_in(ARCH, A);
  localparam int BI = code_b_in(ARCH, B);
  localparam int AWT = code_a_w(ARCH, A);

  logic signed [CDW-1:0] xin0 [NEURONS];   // coded primary inputs
  logic [LAYERS*NEURONS:0] echain;
  logic [LAYERS-1:0][NEURONS-1:0] lerr;

  assign echain[0] = 1'b0;

  for (genvar n = 0; n < int'(NEURONS); n++) begin : g_in
    an_encoder #(.A(AI), .B(BI), .IW(DW), .OW(CDW)) u_enc (.n(x[n]), .c(xin0[n]));
  end

  for (genvar l = 0; l < int'(LAYERS); l++) begin : g_layer
    logic signed [SW-1:0]  lcorr;
    logic signed [CDW-1:0] xin  [NEURONS];   // coded inputs of this layer
    logic signed [CDW-1:0] yout [NEURONS];   // coded outputs of this layer

    if (l == 0) begin : g_first
      assign xin = xin0;
    end else begin : g_next
      assign xin = g_layer[l-1].yout;
    end

    if (ARCH == ARCH_LDAWCI) begin : g_corr
      ldawci_layer_corr #(.A(A), .B(B), .DW(DW), .N_IN(N_IN)) u_corr (
        .x_c(xin), .lcorr(lcorr));
    end else begin : g_nocorr
      assign lcorr = '0;
    end

    for (genvar n = 0; n < int'(NEURONS); n++) begin : g_n
      localparam int unsigned K = l * NEURONS + n;
      logic signed [CDW-1:0] w_c [N_IN];
      logic signed [SW-1:0]  corr;
      logic signed [SW-1:0]  thr [STEPS];

      neuron_mem #(.ARCH(ARCH), .A(A), .B(B), .DW(DW), .N_IN(N_IN), .STEPS(STEPS)) u_mem (
        .clk, .rst_n,
        .we(we && wlayer == LW'(l) && wneuron == NW'(n)),
        .waddr, .wdata, .w_c, .corr, .thr);

      case (ARCH)
        ARCH_LDCW, ARCH_LDCI, ARCH_LDCWI: begin : g_ld
          neuron_ld_an #(.A(A), .A1(AI), .A2(AWT), .DW(DW), .N_IN(N_IN), .STEPS(STEPS)) u_neuron (
            .x_c(xin), .w_c, .thr, .e_in(echain[K]),
            .y_c(yout[n]), .e(lerr[l][n]), .e_out(echain[K+1]));
        end
        ARCH_LDCWAI: begin : g_ldcwai
          neuron_ldcwai #(.A(A), .B(B), .DW(DW), .N_IN(N_IN), .STEPS(STEPS)) u_neuron (
            .x_c(xin), .w_c, .corr, .thr, .e_in(echain[K]),
            .y_c(yout[n]), .e(lerr[l][n]), .e_out(echain[K+1]));
        end
        ARCH_LDAWCI: begin : g_ldawci
          neuron_ldawci #(.A(A), .B(B), .DW(DW), .N_IN(N_IN), .STEPS(STEPS)) u_neuron (
            .x_c(xin), .w_c, .lcorr, .thr, .e_in(echain[K]),
            .y_c(yout[n]), .e(lerr[l][n]), .e_out(echain[K+1]));
        end
        ARCH_LDAWAI: begin : g_ldawai
          neuron_ldawai #(.A(A), .B(B), .DW(DW), .N_IN(N_IN), .STEPS(STEPS)) u_neuron (
            .x_c(xin), .w_c, .corr, .thr, .e_in(echain[K]),
            .y_c(yout[n]), .e(lerr[l][n]), .e_out(echain[K+1]));
        end
        ARCH_LPCI: begin : g_lpci
          neuron_lpci #(.A(A), .DW(DW), .N_IN(N_IN), .STEPS(STEPS)) u_neuron (
            .x_c(xin), .w_c, .thr, .y_c(yout[n]));
          assign lerr[l][n]    = 1'b0;
          assign echain[K+1]   = echain[K];
        end
        default: begin : g_gpci
          neuron_gpci #(.A(A), .DW(DW), .N_IN(N_IN), .STEPS(STEPS)) u_neuron (
            .x_c(xin), .w_c, .thr, .y_c(yout[n]));
          assign lerr[l][n]    = 1'b0;
          assign echain[K+1]   = echain[K];
        end
      endcase
    end
  end

  // fault location
  logic              lv;
  logic [LW-1:0]     ll;
  logic [NW-1:0]     lr;
  logic [LAYERS-1:0] vline, ec;
  logic [NEURONS-1:0] hline;

  if (ARCH == ARCH_LDCW) begin : g_loc_plain
    fault_loc_uncoded #(.LAYERS(LAYERS), .NEURONS(NEURONS)) u_loc (
      .err(lerr), .vline, .hline, .loc_valid(lv), .loc_layer(ll), .loc_row(lr));
    assign ec = '0;
  end else if (local_detect(ARCH)) begin : g_loc_coded
    fault_loc_coded #(.LAYERS(LAYERS), .NEURONS(NEURONS), .LATCH_EC(LATCH_EC)) u_loc (
      .clk, .rst_n, .err(lerr), .vline, .ec, .hline,
      .loc_valid(lv), .loc_layer(ll), .loc_row(lr));
  end else begin : g_loc_none
    assign vline = '0;
    assign ec    = '0;
    assign hline = '0;
    assign lv    = 1'b0;
    assign ll    = '0;
    assign lr    = '0;
  end

  // output decoder / checker
  logic signed [DW-1:0]  yd [NEURONS];
  logic [NEURONS-1:0]    oerr;

  for (genvar n = 0; n < int'(NEURONS); n++) begin : g_out
    an_checker #(.D(AI), .OFF(BI), .IW(CDW), .OW(DW)) u_chk (
      .v(g_layer[LAYERS-1].yout[n]), .q(yd[n]), .err(oerr[n]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < int'(NEURONS); n++) y[n] <= '0;
      err       <= 1'b0;
      out_err   <= 1'b0;
      loc_valid <= 1'b0;
      loc_layer <= '0;
      loc_row   <= '0;
    end else begin
      for (int n = 0; n < int'(NEURONS); n++) y[n] <= yd[n];
      err       <= echain[LAYERS*NEURONS];
      out_err   <= |oerr;
      loc_valid <= lv;
      loc_layer <= ll;
      loc_row   <= lr;
    end
  end
endmodule
