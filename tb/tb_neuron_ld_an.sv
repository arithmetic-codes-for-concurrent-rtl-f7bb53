// tb_neuron_ld_an: self-checking test of the AN-code local-detection neuron
// in its three configurations, LDCW (A1=1, A2=3), LDCI (A1=3, A2=1) and
// LDCWI (A1=A2=3). For random weights, inputs and thresholds it checks the
// coded output against a plain integer model, then injects single additive
// errors of +-2^k on a stored weight, on an input line and on the adder
// output and checks the error flag against the code's detection rule:
// weight errors are latent exactly when the input is a multiple of A,
// input-line errors exactly when the weight is a multiple of A, and
// arithmetic errors are always seen. It also checks the error chain.
module tb_neuron_ld_an;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_latent_w = 0, n_latent_x = 0, n_det = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int A = 3;
  logic signed [10:0] xc [3][3];   // [config][input]
  logic signed [10:0] wc [3][3];
  logic signed [26:0] thr [3];
  logic               e_in;
  logic signed [10:0] yc [3];
  logic               e [3], eo [3];

  neuron_ld_an #(.A1(1), .A2(3)) u_ldcw  (.x_c(xc[0]), .w_c(wc[0]), .thr, .e_in, .y_c(yc[0]), .e(e[0]), .e_out(eo[0]));
  neuron_ld_an #(.A1(3), .A2(1)) u_ldci  (.x_c(xc[1]), .w_c(wc[1]), .thr, .e_in, .y_c(yc[1]), .e(e[1]), .e_out(eo[1]));
  neuron_ld_an #(.A1(3), .A2(3)) u_ldcwi (.x_c(xc[2]), .w_c(wc[2]), .thr, .e_in, .y_c(yc[2]), .e(e[2]), .e_out(eo[2]));

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

  int a1 [3] = '{1, 3, 3};
  int a2 [3] = '{3, 1, 3};

  initial begin
    int x [3], w [3];
    longint sigma, y, d;
    int j, k, c, sgn;
    for (int it = 0; it < 1500; it++) begin
      for (int i = 0; i < 3; i++) begin
        x[i] = rnd(-128, 127);
        w[i] = rnd(-128, 127);
        if (it % 3 == 1) x[i] = 3 * rnd(-42, 42);   // inputs multiple of A
        if (it % 3 == 2) w[i] = 3 * rnd(-42, 42);   // weights multiple of A
      end
      sigma = 0;
      for (int i = 0; i < 3; i++) sigma += longint'(w[i]) * x[i];
      thr[0] = 27'(rnd(-6000, 0));
      thr[1] = thr[0] + 27'(rnd(0, 6000));
      thr[2] = thr[1] + 27'(rnd(0, 6000));
      y = stair(sigma, thr[0], thr[1], thr[2]);
      e_in = 1'($urandom);
      for (c = 0; c < 3; c++)
        for (int i = 0; i < 3; i++) begin
          xc[c][i] = 11'(a1[c] * x[i]);
          wc[c][i] = 11'(a2[c] * w[i]);
        end
      @(posedge clk);
      for (c = 0; c < 3; c++) begin
        chk(longint'(yc[c]) == a1[c] * y, $sformatf("cfg%0d output", c));
        chk(e[c] == 1'b0, $sformatf("cfg%0d no false error", c));
        chk(eo[c] == e_in, $sformatf("cfg%0d chain", c));
      end
      // single error on a stored weight
      j = rnd(0, 2); k = rnd(0, 8); sgn = ($urandom % 2) ? 1 : -1;
      d = sgn * (longint'(1) << k);
      for (c = 0; c < 3; c++) wc[c][j] = wc[c][j] + 11'(d);
      @(posedge clk);
      for (c = 0; c < 3; c++) begin
        if (a2[c] != 1) begin
          chk(e[c] == (fmod(x[j], 3) != 0), $sformatf("cfg%0d weight error rule", c));
          if (fmod(x[j], 3) == 0) n_latent_w++; else n_det++;
        end
        chk(eo[c] == (e_in | e[c]), $sformatf("cfg%0d chain on error", c));
      end
      for (c = 0; c < 3; c++) wc[c][j] = wc[c][j] - 11'(d);
      // single error on an input line
      for (c = 0; c < 3; c++) xc[c][j] = xc[c][j] + 11'(d);
      @(posedge clk);
      for (c = 0; c < 3; c++)
        if (a1[c] != 1) begin
          chk(e[c] == (fmod(w[j], 3) != 0), $sformatf("cfg%0d input error rule", c));
          if (fmod(w[j], 3) == 0) n_latent_x++;
        end
      for (c = 0; c < 3; c++) xc[c][j] = xc[c][j] - 11'(d);
      // single arithmetic error on the adder output
      force u_ldcw.s  = 27'(3 * sigma + d);
      force u_ldci.s  = 27'(3 * sigma + d);
      force u_ldcwi.s = 27'(9 * sigma + d);
      @(posedge clk);
      for (c = 0; c < 3; c++) chk(e[c] == 1'b1, $sformatf("cfg%0d adder error", c));
      release u_ldcw.s;
      release u_ldci.s;
      release u_ldcwi.s;
    end
    chk(n_latent_w > 0 && n_latent_x > 0 && n_det > 0, "latent and detected cases occurred");
    $display("weight errors detected %0d, latent %0d; latent input errors %0d", n_det, n_latent_w, n_latent_x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
