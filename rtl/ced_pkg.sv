// ced_pkg: shared constants, types and helpers for the arithmetic-coded
// (AN and AN+B) self-checking neural network.
//
// A neuron computes y = f(sum_j w_j * x_j) on fixed-point integers. Its
// operands are carried in an arithmetic code C(N) = A*N + B so that the
// multipliers and adders work unchanged on coded data and an error shows up
// as a non-null residue when the result is divided by the code generator.
// Eight neuron architectures differ in which operands are coded and how the
// error information travels; arch_e names them and the code_* functions give,
// for each one, the code generator and displacement of the inputs and of the
// weights. A = 3 and B = 1 follow the code choice argued for the design; the
// nominal data width, the number of synapses, the number of steps of the
// evaluation function and the network size are this design's own defaults.
package ced_pkg;

  typedef enum logic [2:0] {
    ARCH_LDCW   = 3'd0,  // local detection, coded weights (AN), plain inputs
    ARCH_LDCI   = 3'd1,  // local detection, coded inputs (AN), plain weights
    ARCH_LDCWI  = 3'd2,  // local detection, AN weights and AN inputs
    ARCH_LDCWAI = 3'd3,  // AN weights, AN+B inputs
    ARCH_LDAWCI = 3'd4,  // AN+B weights, AN inputs
    ARCH_LDAWAI = 3'd5,  // AN+B weights, AN+B inputs
    ARCH_LPCI   = 3'd6,  // local propagation: error added to the coded output
    ARCH_GPCI   = 3'd7   // global propagation: no local check
  } arch_e;

  localparam int unsigned N_ARCH  = 8;

  localparam int CODE_A  = 3;   // code generator
  localparam int CODE_B  = 1;   // code displacement (odd, prime to A)
  localparam int unsigned DW      = 8;   // nominal data width (signed)
  localparam int unsigned N_IN    = 3;   // synapses per neuron
  localparam int unsigned STEPS   = 3;   // steps of the evaluation function
  localparam int unsigned LAYERS  = 2;   // layers of the network
  localparam int unsigned NEURONS = 3;   // neurons per layer

  // Width of a coded operand: room for A*N + B with N signed on dw bits.
  function automatic int unsigned coded_w(int unsigned dw, int a);
    return dw + $clog2(a + 1) + 1;
  endfunction

  // Width of a coded weighted sum of n products of two coded operands,
  // plus the correction terms.
  function automatic int unsigned sum_w(int unsigned dw, int a, int unsigned n);
    return 2 * coded_w(dw, a) + $clog2(n + 2) + 2;
  endfunction

  // Code generator / displacement of the neuron inputs (A1, B1) and of the
  // weights (A2, B2) for each architecture.
  function automatic int code_a_in(arch_e arch, int a);
    return (arch == ARCH_LDCW) ? 1 : a;
  endfunction
  function automatic int code_b_in(arch_e arch, int b);
    return (arch == ARCH_LDCWAI || arch == ARCH_LDAWAI) ? b : 0;
  endfunction
  function automatic int code_a_w(arch_e arch, int a);
    return (arch == ARCH_LDCI || arch == ARCH_LPCI || arch == ARCH_GPCI) ? 1 : a;
  endfunction
  function automatic int code_b_w(arch_e arch, int b);
    return (arch == ARCH_LDAWCI || arch == ARCH_LDAWAI) ? b : 0;
  endfunction

  // Architectures that check locally and drive an error network.
  function automatic bit local_detect(arch_e arch);
    return !(arch == ARCH_LPCI || arch == ARCH_GPCI);
  endfunction

endpackage
