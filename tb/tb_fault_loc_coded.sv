// tb_fault_loc_coded: self-checking test of the coded-input error location
// network. A faulty neuron in layer l, row m, makes random neurons of the
// later layers flag errors too (they receive its non-codeword). The
// horizontal lines must still show only row m, the location must decode
// (l, m), and the cumulative lines ec[i] must be set for i >= l. Tested
// combinational (2x3 and 4x5) and with latched inhibiting lines (4x5, read
// one clock after the error pattern settles).
module tb_fault_loc_coded;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_inhibit = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0][2:0] err_s;
  logic [1:0]      v_s, ec_s;
  logic [2:0]      h_s;
  logic            lv_s;
  logic [0:0]      ll_s;
  logic [1:0]      lr_s;

  logic [3:0][4:0] err_b;
  logic [3:0]      v_b, ec_b, v_q, ec_q;
  logic [4:0]      h_b, h_q;
  logic            lv_b, lv_q;
  logic [1:0]      ll_b, ll_q;
  logic [2:0]      lr_b, lr_q;

  fault_loc_coded u_s (.clk, .rst_n, .err(err_s), .vline(v_s), .ec(ec_s), .hline(h_s),
                       .loc_valid(lv_s), .loc_layer(ll_s), .loc_row(lr_s));
  fault_loc_coded #(.LAYERS(4), .NEURONS(5)) u_b (.clk, .rst_n, .err(err_b), .vline(v_b), .ec(ec_b),
                       .hline(h_b), .loc_valid(lv_b), .loc_layer(ll_b), .loc_row(lr_b));
  fault_loc_coded #(.LAYERS(4), .NEURONS(5), .LATCH_EC(1'b1)) u_q (.clk, .rst_n, .err(err_b), .vline(v_q),
                       .ec(ec_q), .hline(h_q), .loc_valid(lv_q), .loc_layer(ll_q), .loc_row(lr_q));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l, m, fl, fm;
    err_s = '0; err_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    chk(!lv_s && !lv_b && !lv_q && h_b == 0 && ec_b == 0, "idle");
    for (int it = 0; it < 400; it++) begin
      l = rnd(0, 1); m = rnd(0, 2);
      err_s = '0; err_s[l][m] = 1'b1;
      if (l == 0) err_s[1] = 3'($urandom);
      fl = rnd(0, 3); fm = rnd(0, 4);
      err_b = '0; err_b[fl][fm] = 1'b1;
      for (int i = fl + 1; i < 4; i++) err_b[i] = 5'($urandom);
      if (fl < 3 && err_b[3] != 0) n_inhibit++;
      @(posedge clk);
      chk(h_s == 3'(1 << m), "2x3: only the faulty row");
      chk(lv_s && ll_s == 1'(l) && lr_s == 2'(m), "2x3: location");
      chk(ec_s == ((l == 0) ? 2'b11 : 2'b10), "2x3: cumulative lines");
      chk(h_b == 5'(1 << fm), "4x5: only the faulty row");
      chk(lv_b && ll_b == 2'(fl) && lr_b == 3'(fm), "4x5: location");
      for (int i = 0; i < 4; i++) chk(ec_b[i] == (i >= fl), "4x5: cumulative line");
      @(posedge clk);
      chk(h_q == 5'(1 << fm), "latched: only the faulty row");
      chk(lv_q && ll_q == 2'(fl) && lr_q == 3'(fm), "latched: location");
      err_s = '0; err_b = '0;
      repeat (2) @(posedge clk);
      chk(!lv_b && !lv_q && h_q == 0, "errors cleared");
    end
    chk(n_inhibit > 0, "inhibition exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
