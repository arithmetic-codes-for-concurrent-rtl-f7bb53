// tb_neuron_lpci: self-checking test of the local-propagation neuron.
// Without errors the output must be the codeword A*y. With an error of
// +-2^k on an input line the local check fires exactly when the weight is not
// a multiple of A, and then the output must be the non-codeword
// A*f(sigma') + 1; with a multiple-of-A weight the error is masked and the
// output stays a codeword. An adder error always yields a non-codeword.
module tb_neuron_lpci;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_prop = 0, n_mask = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [10:0] xc [3], wc [3];
  logic signed [26:0] thr [3];
  logic signed [10:0] yc;

  neuron_lpci u_dut (.x_c(xc), .w_c(wc), .thr, .y_c(yc));

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
    longint sigma, y, d, s2;
    int j, k;
    for (int it = 0; it < 1500; it++) begin
      sigma = 0;
      for (int i = 0; i < 3; i++) begin
        x[i] = rnd(-128, 127);
        w[i] = (it % 2) ? 3 * rnd(-42, 42) : rnd(-128, 127);
        sigma += longint'(w[i]) * x[i];
        xc[i] = 11'(3 * x[i]);
        wc[i] = 11'(w[i]);
      end
      thr[0] = 27'(rnd(-3000, 0));
      thr[1] = thr[0] + 27'(rnd(0, 3000));
      thr[2] = thr[1] + 27'(rnd(0, 3000));
      y = stair(sigma, thr[0], thr[1], thr[2]);
      @(posedge clk);
      chk(longint'(yc) == 3 * y, "codeword output");
      j = rnd(0, 2); k = rnd(0, 8);
      d = ($urandom % 2) ? (longint'(1) << k) : -(longint'(1) << k);
      xc[j] = xc[j] + 11'(d);
      s2 = 3 * sigma + d * w[j];
      @(posedge clk);
      if (fmod(w[j], 3) != 0) begin
        chk(longint'(yc) == 3 * stair(s2 / 3, thr[0], thr[1], thr[2]) + 1, "error added to output");
        chk(fmod(longint'(yc), 3) == 1, "output is a non-codeword");
        n_prop++;
      end else begin
        chk(longint'(yc) == 3 * stair(s2 / 3, thr[0], thr[1], thr[2]), "masked error");
        n_mask++;
      end
      xc[j] = xc[j] - 11'(d);
      force u_dut.s = 27'(3 * sigma + d);
      @(posedge clk);
      chk(fmod(longint'(yc), 3) == 1, "adder error gives non-codeword");
      release u_dut.s;
    end
    chk(n_prop > 0 && n_mask > 0, "propagated and masked cases occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
