// tb_tf_fitter: loads random fit constants, sends random combinations and
// compares the three parameters and three chi components with the linear
// fit p = W(x - x0) + p0, chi = V(x - x0) + b computed here with 64-bit
// integers (shift right by FRAC rounding down, saturation to 16 bits). One
// combination is accepted per cycle and its result appears one cycle later;
// End Event markers pass unchanged.
module tb_tf_fitter;
  import svt_pkg::*;
  localparam int FRAC = 10;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic in_valid, in_ready, out_valid, out_ready, out_ee;
  comb_t in_comb;
  logic [ROAD_W-1:0] out_road;
  logic signed [PAR_W-1:0] out_par [3], out_chi [3];
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  tf_fitter dut (.clk, .rst_n, .cfg, .in_valid, .in_ready, .in_comb, .out_valid, .out_ready, .out_ee,
    .out_road, .out_par, .out_chi);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint w [3][6], v [3][6], x0 [6], p0 [3], b [3];

  function automatic longint sat(longint a);
    if (a > 32767) return 32767;
    if (a < -32768) return -32768;
    return a;
  endfunction

  task automatic wr(int a, longint d);
    @(negedge clk); cfg.we = 1; cfg.target = CFG_TF; cfg.addr = 20'(a); cfg.data = 32'(d);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; in_valid = 0; in_comb = '0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++)
      for (int j = 0; j < 6; j++) begin
        w[k][j] = longint'($urandom % 8192) - 4096; wr(k * 6 + j, w[k][j]);
        v[k][j] = longint'($urandom % 2048) - 1024; wr(18 + k * 6 + j, v[k][j]);
      end
    for (int j = 0; j < 6; j++) begin x0[j] = $urandom % 4096; wr(36 + j, x0[j]); end
    for (int k = 0; k < 3; k++) begin
      p0[k] = longint'($urandom % 2000) - 1000; wr(42 + k, p0[k]);
      b[k]  = longint'($urandom % 200) - 100;   wr(45 + k, b[k]);
    end
    @(negedge clk); cfg.we = 0;
    for (int t = 0; t < 200; t++) begin
      longint x [6];
      longint ep [3], ec [3];
      bit is_ee;
      is_ee = (t % 50) == 49;
      for (int j = 0; j < 6; j++) begin
        // mostly near x0, sometimes far to reach saturation
        x[j] = (t % 7 == 3) ? longint'($urandom % 262144) : x0[j] + longint'($urandom % 64) - 32;
        if (x[j] < 0) x[j] = 0;
      end
      for (int k = 0; k < 3; k++) begin
        longint ap, ac;
        ap = 0; ac = 0;
        for (int j = 0; j < 6; j++) begin ap += w[k][j] * (x[j] - x0[j]); ac += v[k][j] * (x[j] - x0[j]); end
        ep[k] = sat((ap >>> FRAC) + p0[k]);
        ec[k] = sat((ac >>> FRAC) + b[k]);
      end
      @(negedge clk);
      in_valid = 1; in_comb.ee = is_ee; in_comb.road = 15'(t);
      for (int j = 0; j < 6; j++) in_comb.x[j] = 18'(x[j]);
      @(negedge clk);
      in_valid = 0;
      chk(out_valid && out_road == 15'(t) && out_ee == is_ee, $sformatf("result %0d one cycle after input", t));
      if (!is_ee)
        for (int k = 0; k < 3; k++) begin
          chk(longint'(out_par[k]) == ep[k], $sformatf("t=%0d par%0d %0d expected %0d", t, k, out_par[k], ep[k]));
          chk(longint'(out_chi[k]) == ec[k], $sformatf("t=%0d chi%0d %0d expected %0d", t, k, out_chi[k], ec[k]));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
