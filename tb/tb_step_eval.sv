// tb_step_eval: self-checking test of the staircase evaluator with its
// output encoder (A*y + B and plain), including sums that fall exactly on a
// threshold.
module tb_step_eval;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [26:0] sigma;
  logic signed [26:0] thr [3];
  logic signed [10:0] yc, yp;

  step_eval #(.A(3), .B(1), .STEPS(3), .SW(27), .OW(11)) u_c (.sigma, .thr, .y_c(yc));
  step_eval #(.A(1), .B(0), .STEPS(3), .SW(27), .OW(11)) u_p (.sigma, .thr, .y_c(yp));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sigma=%0d", what, sigma); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint y;
    for (int i = 0; i < 1000; i++) begin
      thr[0] = 27'(rnd(-5000, 0));
      thr[1] = thr[0] + 27'(rnd(0, 5000));
      thr[2] = thr[1] + 27'(rnd(0, 5000));
      if (i % 4 == 0) sigma = thr[rnd(0, 2)] - 27'(rnd(0, 1));
      else            sigma = 27'(rnd(-8000, 12000));
      @(posedge clk);
      y = stair(sigma, thr[0], thr[1], thr[2]);
      chk(longint'(yc) == 3 * y + 1, "coded output");
      chk(longint'(yp) == y, "plain output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
