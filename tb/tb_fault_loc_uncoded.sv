// tb_fault_loc_uncoded: self-checking test of the plain-input error location
// network on the default 2x3 array and on a 4x5 array. A single faulty neuron
// must light exactly its layer's vertical line and its row's horizontal line
// and be decoded at that crossing; for arbitrary error patterns the lines
// must be the OR of their neurons and the decoder must pick the leftmost
// vertical and uppermost horizontal line.
module tb_fault_loc_uncoded;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0][2:0] err_s;
  logic [1:0]      v_s;
  logic [2:0]      h_s;
  logic            lv_s;
  logic [0:0]      ll_s;
  logic [1:0]      lr_s;

  logic [3:0][4:0] err_b;
  logic [3:0]      v_b;
  logic [4:0]      h_b;
  logic            lv_b;
  logic [1:0]      ll_b;
  logic [2:0]      lr_b;

  fault_loc_uncoded u_s (.err(err_s), .vline(v_s), .hline(h_s), .loc_valid(lv_s), .loc_layer(ll_s), .loc_row(lr_s));
  fault_loc_uncoded #(.LAYERS(4), .NEURONS(5)) u_b (
    .err(err_b), .vline(v_b), .hline(h_b), .loc_valid(lv_b), .loc_layer(ll_b), .loc_row(lr_b));

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
    int l, m, fl, fm;
    logic [3:0] ve;
    logic [4:0] he;
    err_s = '0; err_b = '0;
    @(posedge clk);
    chk(!lv_s && !lv_b && v_s == 0 && h_b == 0, "idle");
    for (int it = 0; it < 400; it++) begin
      // single faulty neuron
      l = rnd(0, 1); m = rnd(0, 2);
      err_s = '0; err_s[l][m] = 1'b1;
      fl = rnd(0, 3); fm = rnd(0, 4);
      err_b = '0; err_b[fl][fm] = 1'b1;
      @(posedge clk);
      chk(v_s == 2'(1 << l) && h_s == 3'(1 << m), "single: lines 2x3");
      chk(lv_s && ll_s == 1'(l) && lr_s == 2'(m), "single: location 2x3");
      chk(v_b == 4'(1 << fl) && h_b == 5'(1 << fm), "single: lines 4x5");
      chk(lv_b && ll_b == 2'(fl) && lr_b == 3'(fm), "single: location 4x5");
      // arbitrary pattern
      err_b = 20'($urandom);
      @(posedge clk);
      ve = '0; he = '0;
      for (l = 0; l < 4; l++) for (m = 0; m < 5; m++)
        if (err_b[l][m]) begin ve[l] = 1'b1; he[m] = 1'b1; end
      chk(v_b == ve && h_b == he, "pattern: lines");
      chk(lv_b == (ve != 0), "pattern: valid");
      fl = 0; for (l = 3; l >= 0; l--) if (ve[l]) fl = l;
      fm = 0; for (m = 4; m >= 0; m--) if (he[m]) fm = m;
      if (ve != 0) chk(ll_b == 2'(fl) && lr_b == 3'(fm), "pattern: leftmost/uppermost");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
