// tb_g_eval: self-checking test of the modified evaluation function g.
// For every v (codeword or not, positive or negative) g(v) must equal
// A*f(q) - A*q with q = floor(v/A), so that v + g(v) = A*f(q) + (v mod A).
module tb_g_eval;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [26:0] v, g;
  logic signed [26:0] thr [3];

  g_eval u_dut (.v, .thr, .g);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s v=%0d g=%0d", what, v, g); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint q, r;
    for (int it = 0; it < 2000; it++) begin
      thr[0] = 27'(rnd(-3000, 0));
      thr[1] = thr[0] + 27'(rnd(0, 3000));
      thr[2] = thr[1] + 27'(rnd(0, 3000));
      v = 27'(rnd(-12000, 12000));
      if (it % 2 == 0) v = 27'(3 * (longint'(v) / 3));
      @(posedge clk);
      q = fdiv(longint'(v), 3);
      r = fmod(longint'(v), 3);
      chk(longint'(g) == 3 * stair(q, thr[0], thr[1], thr[2]) - 3 * q, "g value");
      chk(fmod(longint'(v) + longint'(g), 3) == r, "residue kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
