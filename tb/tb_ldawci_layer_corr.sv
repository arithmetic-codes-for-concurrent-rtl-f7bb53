// tb_ldawci_layer_corr: self-checking test of the LDAWCI layer correction
// generator: for random coded inputs A*x it must return A*B*sum(x).
module tb_ldawci_layer_corr;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [10:0] xc [3];
  logic signed [26:0] lcorr;
  logic signed [26:0] lcorr_b3;

  ldawci_layer_corr u_dut (.x_c(xc), .lcorr);
  ldawci_layer_corr #(.B(3)) u_b3 (.x_c(xc), .lcorr(lcorr_b3));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sx;
    for (int it = 0; it < 1000; it++) begin
      sx = 0;
      for (int i = 0; i < 3; i++) begin
        xc[i] = 11'(3 * rnd(-128, 127));
        sx += xc[i];
      end
      @(posedge clk);
      chk(longint'(lcorr) == sx, "B=1 correction");
      chk(longint'(lcorr_b3) == 3 * sx, "B=3 correction");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
