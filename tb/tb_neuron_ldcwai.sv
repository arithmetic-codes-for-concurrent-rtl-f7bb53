// tb_neuron_ldcwai: self-checking test of the LDCWAI neuron (weights A*w,
// inputs A*x + B, per-neuron constant -A*B*sum(w)). Checks the coded output
// A*y + B against a plain model, that an error of +-2^k in a stored weight is
// always detected (also when the input is a multiple of A, where plain AN
// coding would leave it latent), that errors in the correction constant and
// on the adder output are detected, and the error chain.
module tb_neuron_ldcwai;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_mult = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [10:0] xc [3], wc [3];
  logic signed [26:0] corr;
  logic signed [26:0] thr [3];
  logic               e_in, e, eo;
  logic signed [10:0] yc;

  neuron_ldcwai u_dut (.x_c(xc), .w_c(wc), .corr, .thr, .e_in, .y_c(yc), .e, .e_out(eo));

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
    longint sigma, sw, y, d, s_nom;
    int j, k;
    for (int it = 0; it < 1500; it++) begin
      sigma = 0; sw = 0;
      for (int i = 0; i < 3; i++) begin
        x[i] = (it % 2) ? 3 * rnd(-42, 42) : rnd(-128, 127);
        w[i] = rnd(-128, 127);
        sigma += longint'(w[i]) * x[i];
        sw += w[i];
        xc[i] = 11'(3 * x[i] + 1);
        wc[i] = 11'(3 * w[i]);
      end
      corr = 27'(-3 * 1 * sw);
      thr[0] = 27'(rnd(-6000, 0));
      thr[1] = thr[0] + 27'(rnd(0, 6000));
      thr[2] = thr[1] + 27'(rnd(0, 6000));
      y = stair(sigma, thr[0], thr[1], thr[2]);
      e_in = 1'($urandom);
      @(posedge clk);
      chk(longint'(yc) == 3 * y + 1, "output");
      chk(e == 1'b0, "no false error");
      chk(eo == e_in, "chain");
      j = rnd(0, 2); k = rnd(0, 8);
      d = ($urandom % 2) ? (longint'(1) << k) : -(longint'(1) << k);
      wc[j] = wc[j] + 11'(d);
      @(posedge clk);
      chk(e == 1'b1, "weight memory error detected");
      chk(eo == 1'b1, "chain on error");
      if (fmod(x[j], 3) == 0) n_mult++;
      wc[j] = wc[j] - 11'(d);
      corr = corr + 27'(d);
      @(posedge clk);
      chk(e == 1'b1, "correction constant error detected");
      corr = corr - 27'(d);
      s_nom = 9 * sigma;
      force u_dut.s = 27'(s_nom + d);
      @(posedge clk);
      chk(e == 1'b1, "adder error detected");
      release u_dut.s;
    end
    chk(n_mult > 0, "weight errors with inputs multiple of A occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
