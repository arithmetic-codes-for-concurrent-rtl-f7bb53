// tb_neuron_mem: self-checking test of the per-neuron storage for the
// LDAWAI (weights A*w + B, constant A*sum(w) - k*B), LDCWAI (weights A*w,
// constant -A*B*sum(w)) and LDCI (plain weights, no constant) codings:
// coded weights, accumulated constant (restarted by word 0), thresholds,
// hold when not written, and reset.
module tb_neuron_mem;
  import tb_ref_pkg::*;
  import ced_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               we;
  logic [2:0]         waddr;
  logic signed [26:0] wdata;
  logic signed [10:0] w_a [3], w_b [3], w_c [3];
  logic signed [26:0] c_a, c_b, c_c;
  logic signed [26:0] t_a [3], t_b [3], t_c [3];

  neuron_mem #(.ARCH(ARCH_LDAWAI)) u_a (.clk, .rst_n, .we, .waddr, .wdata, .w_c(w_a), .corr(c_a), .thr(t_a));
  neuron_mem #(.ARCH(ARCH_LDCWAI)) u_b (.clk, .rst_n, .we, .waddr, .wdata, .w_c(w_b), .corr(c_b), .thr(t_b));
  neuron_mem #(.ARCH(ARCH_LDCI))   u_c (.clk, .rst_n, .we, .waddr, .wdata, .w_c(w_c), .corr(c_c), .thr(t_c));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, longint d);
    we = 1'b1; waddr = 3'(a); wdata = 27'(d);
    @(posedge clk);
    #1 we = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w [3], t [3];
    longint sw;
    we = 0; waddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    #1;
    chk(w_a[0] == 0 && c_a == 0 && t_b[2] == 0, "reset");
    rst_n = 1'b1;
    for (int it = 0; it < 300; it++) begin
      sw = 0;
      for (int j = 0; j < 3; j++) begin
        w[j] = rnd(-128, 127); sw += w[j];
        wr(j, w[j]);
      end
      for (int s = 0; s < 3; s++) begin
        t[s] = rnd(-50000, 50000);
        wr(3 + s, t[s]);
      end
      we = 1'b0; wdata = 27'($urandom);
      repeat (2) @(posedge clk);
      for (int j = 0; j < 3; j++) begin
        chk(longint'(w_a[j]) == 3 * w[j] + 1, "AN+B weight");
        chk(longint'(w_b[j]) == 3 * w[j],     "AN weight");
        chk(longint'(w_c[j]) == w[j],         "plain weight");
      end
      chk(longint'(c_a) == 3 * sw - 3, "LDAWAI constant");
      chk(longint'(c_b) == -3 * sw,    "LDCWAI constant");
      chk(c_c == 0, "no constant");
      for (int s = 0; s < 3; s++) chk(longint'(t_a[s]) == t[s] && longint'(t_c[s]) == t[s], "thresholds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
