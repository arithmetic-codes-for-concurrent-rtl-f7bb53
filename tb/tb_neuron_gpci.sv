// tb_neuron_gpci: self-checking test of the global-propagation neuron.
// Without errors the output is the codeword A*f(sigma). With an error of
// +-2^k on an input line or on the adder output the output must be
// A*f(floor(S/A)) + (S mod A), i.e. keep the residue of the wrong sum S, so
// that the error reaches the network outputs.
module tb_neuron_gpci;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [10:0] xc [3], wc [3];
  logic signed [26:0] thr [3];
  logic signed [10:0] yc;

  neuron_gpci u_dut (.x_c(xc), .w_c(wc), .thr, .y_c(yc));

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

  function automatic longint expect_out(longint s, longint t0, longint t1, longint t2);
    return 3 * stair(fdiv(s, 3), t0, t1, t2) + fmod(s, 3);
  endfunction

  initial begin
    int x [3], w [3];
    longint sigma, y, d, s2;
    int j, k;
    for (int it = 0; it < 1500; it++) begin
      sigma = 0;
      for (int i = 0; i < 3; i++) begin
        x[i] = rnd(-128, 127);
        w[i] = rnd(-128, 127);
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
      chk(longint'(yc) == expect_out(s2, thr[0], thr[1], thr[2]), "input error propagated");
      xc[j] = xc[j] - 11'(d);
      force u_dut.s = 27'(3 * sigma + d);
      @(posedge clk);
      chk(longint'(yc) == expect_out(3 * sigma + d, thr[0], thr[1], thr[2]), "adder error propagated");
      chk(fmod(longint'(yc), 3) != 0, "adder error gives non-codeword");
      release u_dut.s;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
