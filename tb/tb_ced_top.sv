// tb_ced_top: end-to-end test of the eight self-checking networks at their
// default size (2 layers of 3 neurons, A = 3, B = 1).
//
// Each iteration loads random weights and thresholds through the shared load
// port, runs random input vectors and checks every network's decoded outputs
// against a plain integer model of the feed-forward network, with one clock
// of latency. It then injects single faults by forcing internal signals and
// checks each architecture's reaction against the detection rules of its
// code:
//   weight   +-2^k on a stored weight of neuron (0,1);
//   line     +-2^k on the coded output line of neuron (0,0) into layer 1;
//   add0     +-2^k on the adder output of neuron (0,2);
//   add1     +-2^k on the adder output of neuron (1,1);
//   combo    add0 together with an error on the output line of (0,2),
//            so that layer-1 neurons flag too and inhibition is needed.
// For the local-detection networks the error chain and the fault location
// are checked; for LPCI and GPCI the output checker. Every mechanism must
// occur at least once.
module tb_ced_top;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_load = 0, n_vec = 0, n_latent = 0, n_wdet = 0, n_wundet_plain = 0;
  int n_line_det = 0, n_line_mask = 0, n_loc = 0, n_inhibit = 0;
  int n_lpci_prop = 0, n_gpci_prop = 0, n_add_det = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               we;
  logic [0:0]         wlayer;
  logic [1:0]         wneuron;
  logic [2:0]         waddr;
  logic signed [26:0] wdata;
  logic signed [7:0]  x [3];
  logic signed [7:0]  y [8][3];
  logic [7:0]         err, out_err, loc_valid;
  logic [7:0][0:0]    loc_layer;
  logic [7:0][1:0]    loc_row;

  ced_top dut (.clk, .rst_n, .we, .wlayer, .wneuron, .waddr, .wdata, .x, .y,
               .err, .out_err, .loc_valid, .loc_layer, .loc_row);

  // network model
  int w [2][3][3];
  int t [2][3][3];
  int xn [3];
  int y0 [3], y1 [3];

  function automatic void model();
    longint s;
    for (int n = 0; n < 3; n++) begin
      s = 0;
      for (int j = 0; j < 3; j++) s += longint'(w[0][n][j]) * xn[j];
      y0[n] = int'(stair(s, t[0][n][0], t[0][n][1], t[0][n][2]));
    end
    for (int n = 0; n < 3; n++) begin
      s = 0;
      for (int j = 0; j < 3; j++) s += longint'(w[1][n][j]) * y0[j];
      y1[n] = int'(stair(s, t[1][n][0], t[1][n][1], t[1][n][2]));
    end
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // fault injection, one generate branch per architecture
  typedef enum int {FI_WEIGHT, FI_LINE, FI_ADD0, FI_ADD1, FI_COMBO} fi_e;
  fi_e    fi_mode;
  longint fi_d;
  event   fi_apply, fi_release;

`define FI_SUM(BLK) \
    always @(fi_apply) begin \
      cs0 = dut.g_arch[a].u_net.g_layer[0].g_n[2].BLK.u_neuron.s + 27'(fi_d); \
      cs1 = dut.g_arch[a].u_net.g_layer[1].g_n[1].BLK.u_neuron.s + 27'(fi_d); \
      if (fi_mode == FI_ADD0 || fi_mode == FI_COMBO) \
        force dut.g_arch[a].u_net.g_layer[0].g_n[2].BLK.u_neuron.s = cs0; \
      if (fi_mode == FI_ADD1) \
        force dut.g_arch[a].u_net.g_layer[1].g_n[1].BLK.u_neuron.s = cs1; \
    end \
    always @(fi_release) begin \
      release dut.g_arch[a].u_net.g_layer[0].g_n[2].BLK.u_neuron.s; \
      release dut.g_arch[a].u_net.g_layer[1].g_n[1].BLK.u_neuron.s; \
    end

  for (genvar a = 0; a < 8; a++) begin : g_fi
    logic signed [10:0] cw, cy0, cy2;
    logic signed [26:0] cs0, cs1;
    always @(fi_apply) begin
      cw  = dut.g_arch[a].u_net.g_layer[0].g_n[1].u_mem.w_c[2] + 11'(fi_d);
      cy0 = dut.g_arch[a].u_net.g_layer[0].yout[0] + 11'(fi_d);
      cy2 = dut.g_arch[a].u_net.g_layer[0].yout[2] + 11'(fi_d);
      if (fi_mode == FI_WEIGHT) force dut.g_arch[a].u_net.g_layer[0].g_n[1].u_mem.w_c[2] = cw;
      if (fi_mode == FI_LINE)   force dut.g_arch[a].u_net.g_layer[0].yout[0] = cy0;
      if (fi_mode == FI_COMBO)  force dut.g_arch[a].u_net.g_layer[0].yout[2] = cy2;
    end
    always @(fi_release) begin
      release dut.g_arch[a].u_net.g_layer[0].g_n[1].u_mem.w_c[2];
      release dut.g_arch[a].u_net.g_layer[0].yout[0];
      release dut.g_arch[a].u_net.g_layer[0].yout[2];
    end
    if (a <= 2) begin : g_s
      `FI_SUM(g_ld)
    end else if (a == 3) begin : g_s
      `FI_SUM(g_ldcwai)
    end else if (a == 4) begin : g_s
      `FI_SUM(g_ldawci)
    end else if (a == 5) begin : g_s
      `FI_SUM(g_ldawai)
    end else if (a == 6) begin : g_s
      `FI_SUM(g_lpci)
    end else begin : g_s
      `FI_SUM(g_gpci)
    end
  end

  // layer-1 local errors of every network, to see the inhibition at work
  logic [7:0] l1_err;
  for (genvar a = 0; a < 8; a++) begin : g_l1
    assign l1_err[a] = |dut.g_arch[a].u_net.lerr[1];
  end

  task automatic wr(int l, int n, int a, longint d);
    we = 1'b1; wlayer = 1'(l); wneuron = 2'(n); waddr = 3'(a); wdata = 27'(d);
    @(posedge clk);
    #1 we = 1'b0;
    n_load++;
  endtask

  task automatic load(bit mult3);
    int base, span;
    for (int l = 0; l < 2; l++)
      for (int n = 0; n < 3; n++) begin
        for (int j = 0; j < 3; j++) begin
          w[l][n][j] = rnd(-128, 127);
          if (mult3 && l == 1) w[l][n][j] = 3 * rnd(-42, 42);
          wr(l, n, j, w[l][n][j]);
        end
        span = (l == 0) ? 8000 : 300;
        base = rnd(-span, 0);
        for (int s = 0; s < 3; s++) begin
          t[l][n][s] = base;
          base += rnd(0, span);
          wr(l, n, 3 + s, t[l][n][s]);
        end
      end
  endtask

  task automatic apply_x();
    for (int j = 0; j < 3; j++) begin
      xn[j] = rnd(-128, 127);
      x[j] = 8'(xn[j]);
    end
    model();
  endtask

  // run one injection with the current x; returns after the checks
  task automatic inject(fi_e mode);
    fi_mode = mode;
    fi_d = ($urandom % 2) ? (longint'(1) << rnd(0, 7)) : -(longint'(1) << rnd(0, 7));
    @(posedge clk); #1;         // x settled and sampled once
    ->fi_apply;
    #1;
    @(posedge clk); #1;         // faulty values registered
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pr [3];
    bit any, det, c [3];
    int first;
    we = 0; wlayer = 0; wneuron = 0; waddr = 0; wdata = 0;
    for (int j = 0; j < 3; j++) x[j] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 120; it++) begin
      load(it % 4 == 3);
      // normal operation, new vector every clock, one clock of latency
      apply_x();
      @(posedge clk); #1;
      for (int v = 0; v < 12; v++) begin
        pr = y1;
        apply_x();
        for (int a = 0; a < 8; a++)
          for (int n = 0; n < 3; n++)
            chk(int'(y[a][n]) == pr[n], $sformatf("arch%0d y%0d holds until the clock", a, n));
        @(posedge clk); #1;
        n_vec++;
        for (int a = 0; a < 8; a++) begin
          for (int n = 0; n < 3; n++)
            chk(int'(y[a][n]) == y1[n], $sformatf("arch%0d output %0d", a, n));
          chk(!err[a] && !out_err[a] && !loc_valid[a], $sformatf("arch%0d no false error", a));
        end
      end

      // weight-memory error on w[0][1][2]
      inject(FI_WEIGHT);
      for (int a = 0; a < 8; a++) begin
        case (a)
          0, 2, 4: det = (fmod(xn[2], 3) != 0);
          3, 5:    det = 1'b1;
          default: det = 1'b0;
        endcase
        if (a <= 5) begin
          chk(err[a] == det && loc_valid[a] == det, $sformatf("arch%0d weight error flag", a));
          if (det) begin
            chk(loc_layer[a] == 1'b0 && loc_row[a] == 2'd1, $sformatf("arch%0d weight error location", a));
            n_loc++; n_wdet++;
          end else if (a == 0 || a == 2 || a == 4) n_latent++;
          else n_wundet_plain++;
        end
        chk(!out_err[a], $sformatf("arch%0d weight error: outputs are codewords", a));
      end
      ->fi_release; #1;
      // a released register keeps the forced value: write the weights again
      for (int j = 0; j < 3; j++) wr(0, 1, j, w[0][1][j]);

      // error on the coded line from neuron (0,0) to layer 1
      inject(FI_LINE);
      for (int a = 0; a < 8; a++) begin
        any = 1'b0; first = -1;
        for (int n = 0; n < 3; n++) begin
          case (a)
            0:       c[n] = 1'b0;
            4, 5:    c[n] = 1'b1;
            default: c[n] = (fmod(w[1][n][0], 3) != 0);
          endcase
          if (c[n] && first < 0) first = n;
          any |= c[n];
        end
        if (a <= 5) begin
          chk(err[a] == any && loc_valid[a] == any, $sformatf("arch%0d line error flag", a));
          if (any) begin
            chk(loc_layer[a] == 1'b1 && int'(loc_row[a]) == first, $sformatf("arch%0d line error location", a));
            n_loc++;
          end
          chk(!out_err[a], $sformatf("arch%0d line error: outputs are codewords", a));
        end else begin
          chk(out_err[a] == any && !err[a], $sformatf("arch%0d line error reaches the outputs", a));
        end
        if (a >= 1) begin if (any) n_line_det++; else n_line_mask++; end
      end
      ->fi_release; #1;

      // adder error in neuron (1,1)
      inject(FI_ADD1);
      for (int a = 0; a < 8; a++) begin
        if (a <= 5) begin
          chk(err[a] && loc_valid[a] && loc_layer[a] == 1'b1 && loc_row[a] == 2'd1,
              $sformatf("arch%0d adder (1,1) error located", a));
          chk(!out_err[a], $sformatf("arch%0d adder (1,1): outputs are codewords", a));
          n_add_det++; n_loc++;
        end else
          chk(out_err[a], $sformatf("arch%0d adder (1,1) error at the outputs", a));
      end
      ->fi_release; #1;

      // adder error in neuron (0,2)
      inject(FI_ADD0);
      any = 1'b0;
      for (int n = 0; n < 3; n++) any |= (fmod(w[1][n][2], 3) != 0);
      for (int a = 0; a < 8; a++) begin
        if (a <= 5) begin
          chk(err[a] && loc_valid[a] && loc_layer[a] == 1'b0 && loc_row[a] == 2'd2,
              $sformatf("arch%0d adder (0,2) error located", a));
          n_add_det++; n_loc++;
        end else begin
          chk(out_err[a] == any, $sformatf("arch%0d adder (0,2) error propagated", a));
          if (any && a == 6) n_lpci_prop++;
          if (any && a == 7) n_gpci_prop++;
        end
      end
      ->fi_release; #1;

      // fault in neuron (0,2) that corrupts its sum and its output line
      inject(FI_COMBO);
      for (int a = 0; a <= 5; a++) begin
        chk(err[a] && loc_valid[a] && loc_layer[a] == 1'b0 && loc_row[a] == 2'd2,
            $sformatf("arch%0d compound fault located at (0,2)", a));
        if (a >= 1 && l1_err[a]) n_inhibit++;
      end
      ->fi_release; #1;
    end

    chk(n_load > 0,        "weights were loaded");
    chk(n_vec > 0,         "normal vectors ran");
    chk(n_wdet > 0,        "weight errors detected");
    chk(n_latent > 0,      "latent weight errors (input multiple of A)");
    chk(n_wundet_plain > 0, "unprotected plain weights");
    chk(n_line_det > 0,    "line errors detected");
    chk(n_line_mask > 0,   "line errors masked by weights multiple of A");
    chk(n_add_det > 0,     "adder errors detected locally");
    chk(n_loc > 0,         "faults located");
    chk(n_inhibit > 0,     "later-layer errors inhibited");
    chk(n_lpci_prop > 0,   "LPCI error propagated to the outputs");
    chk(n_gpci_prop > 0,   "GPCI error propagated to the outputs");
    $display("loads=%0d vectors=%0d weight det=%0d latent=%0d plain=%0d line det=%0d masked=%0d add=%0d located=%0d inhibited=%0d lpci=%0d gpci=%0d",
             n_load, n_vec, n_wdet, n_latent, n_wundet_plain, n_line_det, n_line_mask, n_add_det,
             n_loc, n_inhibit, n_lpci_prop, n_gpci_prop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
