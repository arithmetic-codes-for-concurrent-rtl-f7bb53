// tb_an_checker: self-checking test of the decoder/checker. Codewords
// D*q + OFF must decode to q with no error; every value with a non-null
// residue, positive or negative, must raise the error. Instances: D = 3 with
// offset 1 (AN+B output code) and D = 9 (product of two AN operands).
module tb_an_checker;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [15:0] v3, v9;
  logic signed [15:0] q3, q9;
  logic               e3, e9;

  an_checker #(.D(3), .OFF(1), .IW(16), .OW(16)) u_c3 (.v(v3), .q(q3), .err(e3));
  an_checker #(.D(9), .OFF(0), .IW(16), .OW(16)) u_c9 (.v(v9), .q(q9), .err(e9));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s v3=%0d v9=%0d", what, v3, v9); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q, r;
    for (int i = 0; i < 2000; i++) begin
      q = rnd(-3000, 3000);
      r = (i % 2 == 0) ? 0 : rnd(-8, 8);
      v3 = 16'(3 * q + 1 + r);
      v9 = 16'(9 * q + r);
      @(posedge clk);
      chk(e3 == (fmod(longint'(r), 3) != 0), "D=3 error flag");
      chk(e9 == (fmod(longint'(r), 9) != 0), "D=9 error flag");
      if (r == 0) begin
        chk(longint'(q3) == q, "D=3 quotient");
        chk(longint'(q9) == q, "D=9 quotient");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
