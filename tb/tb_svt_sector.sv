// tb_svt_sector: one sector end to end, with small AM boards (2 plugs x 2
// chips x 4 patterns per board, 32 roads). Patterns and road map are loaded
// so that road r has its own super-strip on every layer. Each event places
// tracks on random roads: one strip per silicon layer in Hit Finder 0 and one
// XFT track. The fit constants make the parameters simple to predict
// (curvature and phi from XFT, d = x0 - x1, chi = 0), so the track stream
// must hold exactly one track per road, in road order, then the End Event
// marker with the event's tag. A spy buffer is read back at the end.
module tb_svt_sector;
  import svt_pkg::*;
  localparam int ONE = 1024, NR = 32;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic [2:0] hf_valid, hf_ready;
  raw_t hf_raw [3];
  logic xft_valid, xft_ready, trk_valid, trk_ready, trk_rejected, spy_freeze, svt_error, cdf_error;
  word_t xft_word;
  track_t trk;
  logic [$bits(track_t)-1:0] spy_rdata;
  logic [27:0] err_regs;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  svt_sector #(.NPLUGS(2), .NCHIPS(2), .NPATT(4), .HIT_DEPTH(64), .SPY_D(64)) dut (
    .clk, .rst_n, .cfg, .hf_valid, .hf_ready, .hf_raw, .xft_valid, .xft_ready, .xft_word,
    .trk_valid, .trk_ready, .trk, .trk_rejected, .spy_freeze, .spy_rdata, .err_regs,
    .svt_error, .cdf_error);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(cfg_target_e t, int a, int d);
    @(negedge clk); cfg.we = 1; cfg.target = t; cfg.addr = 20'(a); cfg.data = 32'(d);
    @(negedge clk); cfg.we = 0;
  endtask

  // senders: Hit Finder 0..2 raw streams and XFT
  raw_t  hq [3][$];
  word_t xq[$];
  for (genvar i = 0; i < 3; i++) begin : g_hs
    initial begin
      hf_valid[i] = 0; hf_raw[i] = '0;
      wait (rst_n);
      forever begin
        bit r;
        @(negedge clk);
        if (hq[i].size() == 0) begin hf_valid[i] = 0; continue; end
        hf_valid[i] = 1; hf_raw[i] = hq[i][0];
        do begin #4 r = hf_ready[i]; @(posedge clk); end while (!r);
        void'(hq[i].pop_front());
        #1 hf_valid[i] = 0;
      end
    end
  end
  initial begin
    xft_valid = 0; xft_word = '0;
    wait (rst_n);
    forever begin
      bit r;
      @(negedge clk);
      if (xq.size() == 0) begin xft_valid = 0; continue; end
      xft_valid = 1; xft_word = xq[0];
      do begin #4 r = xft_ready; @(posedge clk); end while (!r);
      void'(xq.pop_front());
      #1 xft_valid = 0;
    end
  end

  track_t got[$];
  track_t first_trk;
  word_t  first_xft;
  bit     have_first = 0, have_xft = 0;
  always @(posedge clk) begin
    if (trk_valid && trk_ready) begin
      got.push_back(trk);
      if (!have_first) begin first_trk = trk; have_first = 1; end
    end
    if (xft_valid && xft_ready && !have_xft) begin first_xft = xft_word; have_xft = 1; end
  end
  always @(posedge clk) trk_ready <= #1 ($urandom % 3) != 0;

  // road r, silicon layer l: super-strip {HF 0, zone 0, 9'(r*5 + l)}
  function automatic logic [11:0] ss_sil(int r, int l); return {2'd0, 1'b0, 9'(r * 5 + l)}; endfunction
  function automatic logic [11:0] ss_xft(int r); return {7'(r + 10), 5'(r)}; endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ntr = 0;
    cfg = '0; spy_freeze = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // pedestals 0 for HF0 streams 0..4, strips 0..659
    for (int s = 0; s < 5; s++)
      for (int st = 0; st < 660; st++) begin
        @(negedge clk); cfg.we = 1; cfg.target = CFG_HF0; cfg.addr = 20'({4'(s), 11'(st)}); cfg.data = 0;
      end
    @(negedge clk); cfg.we = 0;
    for (int r = 0; r < NR; r++)
      for (int l = 0; l < 6; l++) begin
        wr(CFG_AM, {15'(r), 3'(l)}, l < 5 ? ss_sil(r, l) : ss_xft(r));
        wr(CFG_HB, {15'(r), 3'(l)}, l < 5 ? ss_sil(r, l) : ss_xft(r));
      end
    // crv = x4, phi = x5, d = x0 - x1, V = 0, b = 0
    wr(CFG_TF, 0 * 6 + 4, ONE); wr(CFG_TF, 1 * 6 + 5, ONE); wr(CFG_TF, 2 * 6 + 0, ONE); wr(CFG_TF, 2 * 6 + 1, -ONE);
    for (int ev = 0; ev < 4; ev++) begin
      track_t exp[$];
      int roads[$];
      int st [5][$];   // strips per stream
      exp.delete(); got.delete(); roads.delete();
      for (int l = 0; l < 5; l++) st[l].delete();
      // pick 1..4 distinct roads, ascending
      for (int r = 0; r < NR; r++) if ($urandom % 8 == 0 && roads.size() < 4) roads.push_back(r);
      if (roads.size() == 0) roads.push_back(ev + 3);
      foreach (roads[i]) begin
        int r, x [6], crv, phi;
        track_t t;
        r = roads[i];
        for (int l = 0; l < 5; l++) begin
          int s;
          s = 4 * (r * 5 + l) + $urandom % 4;
          st[l].push_back(s);
          x[l] = s * 16;
        end
        crv = r + 10; phi = r * 64 + $urandom % 64;
        xq.push_back(mk_hit(XFT_LAYER, {7'(crv), 11'(phi)}));
        t.ee = 0; t.road = 15'(r); t.crv = 16'(crv); t.phi = 16'(phi); t.d = 16'(x[0] - x[1]); t.chi2 = 0;
        exp.push_back(t);
      end
      // Hit Finder 0: streams 0..4 in interleaved order, strips increasing
      for (int k = 0; k < roads.size(); k++)
        for (int l = 0; l < 5; l++)
          hq[0].push_back('{ee: 1'b0, stream: 4'(l), strip: 11'(st[l][k]), ph: 8'd40});
      for (int h = 0; h < 3; h++) hq[h].push_back('{ee: 1'b1, stream: 4'd0, strip: 11'd0, ph: 8'(ev + 1)});
      xq.push_back(mk_ee(8'(ev + 1), 4'd0));
      begin
        track_t e;
        e = '0; e.ee = 1; e.road = 15'(ev + 1);
        exp.push_back(e);
      end
      wait (got.size() > 0 && got[got.size() - 1].ee);
      @(negedge clk);
      ntr += exp.size() - 1;
      chk(got.size() == exp.size(), $sformatf("event %0d: %0d tracks, %0d expected", ev, got.size() - 1, exp.size() - 1));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        chk(got[i] == exp[i], $sformatf("event %0d track %0d: %p expected %p", ev, i, got[i], exp[i]));
    end
    chk(ntr >= 4, "tracks exercised");
    chk(!svt_error && err_regs == '0, "no error in a clean run");
    // spy buffer 10 (Track Fitter output), entry 0 = first track of the run
    spy_freeze = 1;
    wr(CFG_SPY, {4'd10, 6'd0}, 0);
    repeat (3) @(negedge clk);
    begin
      track_t st0;
      word_t  sw0;
      st0 = spy_rdata;
      chk(st0 == first_trk, "spy buffer 10 holds the first track");
      wr(CFG_SPY, {4'd6, 6'd0}, 0);
      repeat (3) @(negedge clk);
      sw0 = spy_rdata[$bits(word_t)-1:0];
      chk(sw0 == first_xft, "spy buffer 6 holds the first XFT word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
