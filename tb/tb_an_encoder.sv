// tb_an_encoder: self-checking test of the arithmetic coder for the AN+B,
// AN and identity codes, over random and boundary nominal values.
module tb_an_encoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [7:0]  n;
  logic signed [10:0] c_anb, c_an, c_id;

  an_encoder #(.A(3), .B(1), .IW(8), .OW(11)) u_anb (.n, .c(c_anb));
  an_encoder #(.A(3), .B(0), .IW(8), .OW(11)) u_an  (.n, .c(c_an));
  an_encoder #(.A(1), .B(0), .IW(8), .OW(11)) u_id  (.n, .c(c_id));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s n=%0d", what, n); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      n = (i < 256) ? 8'(i - 128) : 8'($urandom);
      @(posedge clk);
      chk(longint'(c_anb) == 3 * longint'(n) + 1, "AN+B");
      chk(longint'(c_an)  == 3 * longint'(n),     "AN");
      chk(longint'(c_id)  == longint'(n),         "identity");
      chk(fmod(longint'(c_anb) - 1, 3) == 0,      "AN+B is a codeword");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
