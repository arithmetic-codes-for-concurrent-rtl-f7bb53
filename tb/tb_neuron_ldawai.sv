// tb_neuron_ldawai: self-checking test of the LDAWAI neuron (weights and
// inputs both A*x + B, constant -k*B^2 in the main adder, per-neuron
// constant A*sum(w) - k*B in the correction adder). Checks the coded output
// A*y + B against a plain model and that every single error of +-2^k is
// detected without latency: on a stored weight, on an input line, on the
// correction constant and on the main adder output. Also the error chain.
module tb_neuron_ldawai;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [10:0] xc [3], wc [3];
  logic signed [26:0] corr;
  logic signed [26:0] thr [3];
  logic               e_in, e, eo;
  logic signed [10:0] yc;

  neuron_ldawai u_dut (.x_c(xc), .w_c(wc), .corr, .thr, .e_in, .y_c(yc), .e, .e_out(eo));

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
    longint sigma, sw, sx, y, d;
    int j, k;
    for (int it = 0; it < 1500; it++) begin
      sigma = 0; sw = 0; sx = 0;
      for (int i = 0; i < 3; i++) begin
        x[i] = (it % 3 == 1) ? 3 * rnd(-42, 42) : rnd(-128, 127);
        w[i] = (it % 3 == 2) ? 3 * rnd(-42, 42) : rnd(-128, 127);
        sigma += longint'(w[i]) * x[i];
        sw += w[i]; sx += x[i];
        xc[i] = 11'(3 * x[i] + 1);
        wc[i] = 11'(3 * w[i] + 1);
      end
      corr = 27'(3 * sw - 3);
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
      chk(e == 1'b1, "weight error detected");
      chk(eo == 1'b1, "chain on error");
      wc[j] = wc[j] - 11'(d);
      xc[j] = xc[j] + 11'(d);
      @(posedge clk);
      chk(e == 1'b1, "input line error detected");
      xc[j] = xc[j] - 11'(d);
      corr = corr + 27'(d);
      @(posedge clk);
      chk(e == 1'b1, "correction constant error detected");
      corr = corr - 27'(d);
      force u_dut.s = 27'(9 * sigma + 3 * sw + 3 * sx + d);
      @(posedge clk);
      chk(e == 1'b1, "adder error detected");
      release u_dut.s;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
