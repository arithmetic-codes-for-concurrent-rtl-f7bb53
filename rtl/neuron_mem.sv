// neuron_mem: storage of one neuron's synaptic weights, correction constant
// and evaluator thresholds.
//
// Weights are written in nominal form and coded on the way in with the
// weight code of the architecture (A2*w + B2), so the stored words are
// codewords and an error in the storage shows at the neuron's checker.
// For LDCWAI and LDAWAI the per-neuron correction constant (-A*B*sum(w) and
// A*sum(w) - k*B respectively) is accumulated while the weights are
// written: word 0 restarts it, so a neuron's weights must be written as a
// complete set starting with word 0. Words N_IN .. N_IN+STEPS-1 hold the
// thresholds of the staircase evaluator, stored uncoded.
// Timing: one write per clock when we is high; outputs are the register
// contents. Asynchronous active-low reset clears everything.
module neuron_mem #(
  parameter ced_pkg::arch_e ARCH = ced_pkg::ARCH_LDAWAI,
  parameter int          A     = ced_pkg::CODE_A,
  parameter int          B     = ced_pkg::CODE_B,
  parameter int unsigned DW    = ced_pkg::DW,
  parameter int unsigned N_IN  = ced_pkg::N_IN,
  parameter int unsigned STEPS = ced_pkg::STEPS,
  localparam int unsigned CDW  = ced_pkg::coded_w(DW, A),
  localparam int unsigned SW   = ced_pkg::sum_w(DW, A, N_IN),
  localparam int unsigned AW   = $clog2(N_IN + STEPS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  we,
  input  logic [AW-1:0]         waddr,
  input  logic signed [SW-1:0]  wdata,   // weight in its low DW bits, or threshold
  output logic signed [CDW-1:0] w_c  [N_IN],
  output logic signed [SW-1:0]  corr,
  output logic signed [SW-1:0]  thr  [STEPS]
);
  localparam int WA = ced_pkg::code_a_w(ARCH, A);
  localparam int WB = ced_pkg::code_b_w(ARCH, B);
  localparam logic signed [SW-1:0] AC = SW'(A);
  localparam logic signed [SW-1:0] BC = SW'(B);

  logic signed [DW-1:0]  w_nom;
  logic signed [CDW-1:0] w_enc;
  logic signed [SW-1:0]  contrib;

  assign w_nom = wdata[DW-1:0];

  an_encoder #(.A(WA), .B(WB), .IW(DW), .OW(CDW)) u_enc (.n(w_nom), .c(w_enc));

  always_comb begin
    unique case (ARCH)
      ced_pkg::ARCH_LDCWAI: contrib = -(AC * BC * SW'(w_nom));
      ced_pkg::ARCH_LDAWAI: contrib = AC * SW'(w_nom) - BC;
      default:              contrib = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(N_IN); j++) w_c[j] <= '0;
      for (int t = 0; t < int'(STEPS); t++) thr[t] <= '0;
      corr <= '0;
    end else if (we) begin
      if (int'(waddr) < int'(N_IN)) begin
        w_c[int'(waddr)] <= w_enc;
        corr       <= (waddr == '0) ? contrib : corr + contrib;
      end else if (int'(waddr) < int'(N_IN + STEPS)) begin
        thr[int'(waddr) - int'(N_IN)] <= wdata;
      end
    end
  end
endmodule
