// tb_track_fitter: the whole Track Fitter board. Constants make the fit easy
// to predict (W and V pick differences of measurements, scale 1.0); roads
// with several hits per layer are sent, and the tracks out must be, in
// order, every combination whose chi-square passes the cut, with the
// expected parameters, followed by the End Event marker. A road with too many
// hits on one layer sets the overflow bit in the End Event marker.
module tb_track_fitter;
  import svt_pkg::*;
  localparam int ONE = 1024;  // 1.0 with FRAC = 10
  localparam longint CUT = 400;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic in_valid, in_ready, out_valid, out_ready, rejected;
  word_t in_word;
  track_t out_track;
  logic [ERR_W-1:0] err_out;
  int checks = 0, failures = 0, nrej = 0;
  always #5 clk = ~clk;

  track_fitter dut (.clk, .rst_n, .cfg, .in_valid, .in_ready, .in_word, .out_valid, .out_ready,
    .out_track, .rejected, .ee_mask(4'hF), .err_out);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send(word_t w);
    bit r;
    @(negedge clk); in_valid = 1; in_word = w;
    do begin #4 r = in_ready; @(posedge clk); end while (!r);
    #1 in_valid = 0;
  endtask
  task automatic wr(int a, int d);
    @(negedge clk); cfg.we = 1; cfg.target = CFG_TF; cfg.addr = 20'(a); cfg.data = 32'(d);
    @(negedge clk); cfg.we = 0;
  endtask

  track_t got[$];
  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_track);
    if (rst_n && rejected) nrej++;
  end
  always @(posedge clk) out_ready <= #1 ($urandom % 4) != 0;

  // W: crv = x4, phi = x5, d = x0 - x1;  V: chi_k = x_k - x_(k+1), k = 0..2
  function automatic track_t fit(int road, longint x [6]);
    track_t t;
    longint c [3];
    t.ee = 0; t.road = 15'(road);
    t.crv = 16'(x[4]); t.phi = 16'(x[5]); t.d = 16'(x[0] - x[1]);
    for (int k = 0; k < 3; k++) c[k] = x[k] - x[k + 1];
    t.chi2 = 32'(c[0] * c[0] + c[1] * c[1] + c[2] * c[2]);
    return t;
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ntr = 0;
    cfg = '0; in_valid = 0; in_word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(0 * 6 + 4, ONE); wr(1 * 6 + 5, ONE); wr(2 * 6 + 0, ONE); wr(2 * 6 + 1, -ONE);
    for (int k = 0; k < 3; k++) begin wr(18 + k * 6 + k, ONE); wr(18 + k * 6 + k + 1, -ONE); end
    wr(48, int'(CUT));
    for (int ev = 0; ev < 3; ev++) begin
      track_t exp[$];
      exp.delete(); got.delete();
      for (int rd = 0; rd < 3; rd++) begin
        longint hv [6][$];
        int road, n [6];
        road = $urandom % 32768;
        send('{ee: 1'b0, data: {ROAD_TAG, 18'(road)}});
        for (int l = 0; l < 6; l++) begin
          hv[l].delete();
          n[l] = (l == 4) ? 0 : 1 + $urandom % 2;
          if (ev == 2 && rd == 0 && l == 1) n[l] = 6;     // more than MAXH = 4
          for (int i = 0; i < n[l]; i++) begin
            longint c;
            c = (l == 5) ? longint'({7'($urandom % 100), 11'($urandom % 2000)}) : 1000 + $urandom % 40;
            if (i < 4) hv[l].push_back(c);
            send(mk_hit(3'(l), 18'(c)));
          end
        end
        for (int i5 = 0; i5 < hv[5].size(); i5++)
          for (int i3 = 0; i3 < hv[3].size(); i3++)
            for (int i2 = 0; i2 < hv[2].size(); i2++)
              for (int i1 = 0; i1 < hv[1].size(); i1++)
                for (int i0 = 0; i0 < hv[0].size(); i0++) begin
                  longint x [6];
                  track_t t;
                  x[0] = hv[0][i0]; x[1] = hv[1][i1]; x[2] = hv[2][i2]; x[3] = hv[3][i3];
                  x[4] = hv[5][i5] >> 11; x[5] = hv[5][i5] & 2047;
                  t = fit(road, x);
                  if (t.chi2 <= 32'(CUT)) exp.push_back(t);
                end
      end
      send(mk_ee(8'(ev), 4'd0));
      wait (got.size() > 0 && got[got.size() - 1].ee);
      @(negedge clk);
      ntr += exp.size();
      chk(got.size() == exp.size() + 1, $sformatf("event %0d: %0d tracks, %0d expected", ev, got.size() - 1, exp.size()));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        chk(got[i] == exp[i], $sformatf("event %0d track %0d: %p expected %p", ev, i, got[i], exp[i]));
      chk(got[got.size() - 1].road == 15'({(ev == 2) ? 4'b1000 : 4'b0000, 8'(ev)}), "End Event marker tag and overflow bit");
    end
    chk(ntr > 5 && nrej > 5, $sformatf("tracks kept %0d and rejected %0d", ntr, nrej));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
