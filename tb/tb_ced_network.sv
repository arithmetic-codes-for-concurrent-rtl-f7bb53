// tb_ced_network: test of one network on its own, at a size other than the
// default: 3 layers of 3 neurons, LDAWCI coding with latched inhibiting
// lines and LDCI coding. Loads random weights and thresholds, checks the
// decoded outputs against a plain model of the three-layer network with one
// clock of latency, then corrupts a stored weight of neuron (0,0) and checks
// the error flag and its location: LDAWCI sees it exactly when the input
// feeding that synapse is not a multiple of A, LDCI (plain weights) never.
module tb_ced_network;
  import tb_ref_pkg::*;
  import ced_pkg::*;
  int checks = 0, failures = 0;
  int n_det = 0, n_latent = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               we;
  logic [1:0]         wlayer;
  logic [1:0]         wneuron;
  logic [2:0]         waddr;
  logic signed [26:0] wdata;
  logic signed [7:0]  x [3];
  logic signed [7:0]  ya [3], yb [3];
  logic               erra, errb, oea, oeb, lva, lvb;
  logic [1:0]         lla, llb, lra, lrb;

  ced_network #(.ARCH(ARCH_LDAWCI), .LAYERS(3), .LATCH_EC(1'b1)) u_a (
    .clk, .rst_n, .we, .wlayer, .wneuron, .waddr, .wdata, .x, .y(ya),
    .err(erra), .out_err(oea), .loc_valid(lva), .loc_layer(lla), .loc_row(lra));
  ced_network #(.ARCH(ARCH_LDCI), .LAYERS(3)) u_b (
    .clk, .rst_n, .we, .wlayer, .wneuron, .waddr, .wdata, .x, .y(yb),
    .err(errb), .out_err(oeb), .loc_valid(lvb), .loc_layer(llb), .loc_row(lrb));

  int w [3][3][3];
  int t [3][3][3];
  int act [4][3];

  function automatic void model();
    longint s;
    for (int l = 0; l < 3; l++)
      for (int n = 0; n < 3; n++) begin
        s = 0;
        for (int j = 0; j < 3; j++) s += longint'(w[l][n][j]) * act[l][j];
        act[l+1][n] = int'(stair(s, t[l][n][0], t[l][n][1], t[l][n][2]));
      end
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int l, int n, int a, longint d);
    we = 1'b1; wlayer = 2'(l); wneuron = 2'(n); waddr = 3'(a); wdata = 27'(d);
    @(posedge clk);
    #1 we = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [10:0] cw;

  initial begin
    int base, span;
    bit det;
    we = 0; wlayer = 0; wneuron = 0; waddr = 0; wdata = 0;
    for (int j = 0; j < 3; j++) x[j] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 80; it++) begin
      for (int l = 0; l < 3; l++)
        for (int n = 0; n < 3; n++) begin
          for (int j = 0; j < 3; j++) begin
            w[l][n][j] = rnd(-128, 127);
            wr(l, n, j, w[l][n][j]);
          end
          span = (l == 0) ? 8000 : 300;
          base = rnd(-span, 0);
          for (int s = 0; s < 3; s++) begin
            t[l][n][s] = base;
            base += rnd(0, span);
            wr(l, n, 3 + s, t[l][n][s]);
          end
        end
      for (int v = 0; v < 10; v++) begin
        for (int j = 0; j < 3; j++) begin
          act[0][j] = ((v + it) % 2) ? 3 * rnd(-42, 42) : rnd(-128, 127);
          x[j] = 8'(act[0][j]);
        end
        model();
        @(posedge clk); #1;
        for (int n = 0; n < 3; n++) begin
          chk(int'(ya[n]) == act[3][n], "LDAWCI output");
          chk(int'(yb[n]) == act[3][n], "LDCI output");
        end
        chk(!erra && !errb && !oea && !oeb && !lva && !lvb, "no false error");
      end
      // weight error on synapse 0 of neuron (0,0)
      cw = u_a.g_layer[0].g_n[0].u_mem.w_c[0] + 11'(1 << rnd(0, 7));
      force u_a.g_layer[0].g_n[0].u_mem.w_c[0] = cw;
      force u_b.g_layer[0].g_n[0].u_mem.w_c[0] = u_b.g_layer[0].g_n[0].u_mem.w_c[0] + 11'(1);
      repeat (2) @(posedge clk); #1;
      det = (fmod(act[0][0], 3) != 0);
      chk(erra == det && lva == det, "LDAWCI weight error flag");
      if (det) begin
        chk(lla == 2'd0 && lra == 2'd0, "LDAWCI weight error location");
        n_det++;
      end else n_latent++;
      chk(!errb && !lvb, "LDCI plain weights unprotected");
      release u_a.g_layer[0].g_n[0].u_mem.w_c[0];
      release u_b.g_layer[0].g_n[0].u_mem.w_c[0];
    end
    chk(n_det > 0 && n_latent > 0, "detected and latent weight errors occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
