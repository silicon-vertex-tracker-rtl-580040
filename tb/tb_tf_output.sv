// tb_tf_output: sends fits with random chi components and checks the total
// chi-square sum(chi_k^2), the cut (nothing is cut before it is written,
// then chi2 <= cut passes), the rejected pulse, End Event pass-through, the
// copied parameters and a one-cycle latency.
module tb_tf_output;
  import svt_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic in_valid, in_ready, in_ee, out_valid, out_ready, rejected;
  logic [ROAD_W-1:0] in_road;
  logic signed [PAR_W-1:0] in_par [3], in_chi [3];
  track_t out_track;
  int checks = 0, failures = 0, nrej = 0, npass = 0;
  always #5 clk = ~clk;

  tf_output dut (.clk, .rst_n, .cfg, .in_valid, .in_ready, .in_ee, .in_road, .in_par, .in_chi,
    .out_valid, .out_ready, .out_track, .rejected);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cut;
    cfg = '0; in_valid = 0; in_ee = 0; in_road = '0; out_ready = 1;
    for (int k = 0; k < 3; k++) begin in_par[k] = '0; in_chi[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    cut = 64'hFFFF_FFFF;
    for (int t = 0; t < 300; t++) begin
      longint c2;
      if (t == 50) begin
        cut = 5000;
        @(negedge clk); cfg.we = 1; cfg.target = CFG_TF; cfg.addr = 20'd48; cfg.data = 32'(cut);
        @(negedge clk); cfg.we = 0;
      end
      @(negedge clk);
      in_valid = 1; in_ee = (t % 40) == 39; in_road = 15'(t);
      c2 = 0;
      for (int k = 0; k < 3; k++) begin
        in_par[k] = 16'($urandom);
        in_chi[k] = (t % 9 == 0) ? 16'($urandom) : 16'(int'($urandom % 100) - 50);
        c2 += longint'(in_chi[k]) * longint'(in_chi[k]);
      end
      @(negedge clk);
      in_valid = 0;
      if (in_ee || c2 <= cut) begin
        npass++;
        chk(out_valid && !rejected, $sformatf("t=%0d passes (chi2 %0d)", t, c2));
        chk(out_track.road == 15'(t) && out_track.ee == in_ee, "road and End Event flag");
        if (!in_ee) begin
          chk(longint'(out_track.chi2) == c2, $sformatf("chi2 %0d expected %0d", out_track.chi2, c2));
          chk(out_track.crv == in_par[0] && out_track.phi == in_par[1] && out_track.d == in_par[2], "parameters");
        end
      end else begin
        nrej++;
        chk(!out_valid && rejected, $sformatf("t=%0d rejected (chi2 %0d)", t, c2));
      end
    end
    chk(nrej > 10 && npass > 10, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
