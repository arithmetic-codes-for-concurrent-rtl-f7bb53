// tb_neuron_ldawci: self-checking test of the LDAWCI neuron (weights
// A*w + B, inputs A*x) together with its layer correction generator.
// Checks the coded output A*y against a plain model; that an error of +-2^k
// on an input line, seen by both the neuron and the correction generator, is
// always detected (by the check of the sum against A, also when the weight is
// a multiple of A); that a weight-memory error is latent exactly when the
// input is a multiple of A; that errors in the correction and on the adder
// are detected; and the error chain.
module tb_neuron_ldawci;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_wmult = 0, n_latent = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [10:0] xc [3], wc [3];
  logic signed [26:0] lcorr, lcorr_in;
  logic signed [26:0] thr [3];
  logic               e_in, e, eo;
  logic signed [10:0] yc;
  longint             cerr = 0;

  ldawci_layer_corr u_corr (.x_c(xc), .lcorr);
  assign lcorr_in = lcorr + 27'(cerr);
  neuron_ldawci u_dut (.x_c(xc), .w_c(wc), .lcorr(lcorr_in), .thr, .e_in, .y_c(yc), .e, .e_out(eo));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [3], w [3];
    longint sigma, sx, y, d;
    int j, k;
    for (int it = 0; it < 1500; it++) begin
      sigma = 0; sx = 0;
      for (int i = 0; i < 3; i++) begin
        x[i] = (it % 3 == 1) ? 3 * rnd(-42, 42) : rnd(-128, 127);
        w[i] = (it % 3 == 2) ? 3 * rnd(-42, 42) : rnd(-128, 127);
        sigma += longint'(w[i]) * x[i];
        sx += x[i];
        xc[i] = 11'(3 * x[i]);
        wc[i] = 11'(3 * w[i] + 1);
      end
      thr[0] = 27'(rnd(-6000, 0));
      thr[1] = thr[0] + 27'(rnd(0, 6000));
      thr[2] = thr[1] + 27'(rnd(0, 6000));
      y = stair(sigma, thr[0], thr[1], thr[2]);
      e_in = 1'($urandom);
      @(posedge clk);
      chk(longint'(yc) == 3 * y, "output");
      chk(e == 1'b0, "no false error");
      chk(eo == e_in, "chain");
      chk(longint'(lcorr) == 3 * sx, "layer correction");
      j = rnd(0, 2); k = rnd(0, 8);
      d = ($urandom % 2) ? (longint'(1) << k) : -(longint'(1) << k);
      // interconnection error
      xc[j] = xc[j] + 11'(d);
      @(posedge clk);
      chk(e == 1'b1, "input line error detected");
      if (fmod(w[j], 3) == 0) n_wmult++;
      xc[j] = xc[j] - 11'(d);
      // weight memory error
      wc[j] = wc[j] + 11'(d);
      @(posedge clk);
      chk(e == (fmod(x[j], 3) != 0), "weight error rule");
      if (fmod(x[j], 3) == 0) n_latent++;
      wc[j] = wc[j] - 11'(d);
      // correction generator error
      cerr = d;
      @(posedge clk);
      chk(e == 1'b1, "correction error detected");
      cerr = 0;
      // adder error
      force u_dut.s = 27'(9 * sigma + 3 * sx + d);
      @(posedge clk);
      chk(e == 1'b1, "adder error detected");
      release u_dut.s;
    end
    chk(n_wmult > 0 && n_latent > 0, "corner cases occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
