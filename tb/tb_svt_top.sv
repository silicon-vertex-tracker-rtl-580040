// tb_svt_top: the SVT end to end with two sectors and small AM boards
// (2 plugs x 2 chips x 4 patterns per board). Both sectors run events at
// the same time. Every event places tracks on random roads; the test builds
// the expected tracks itself (centroids, combinations, linear fit,
// chi-square cut) and compares them, in any order, with each sector's track
// stream. It makes each mechanism of the design happen and counts it:
//   clusters of two strips (charge centroid), roads with two hits on a
//   layer (several combinations per road), tracks cut by the chi-square,
//   roads found only with the 5-of-6 majority, back-pressure on the track
//   output, a freeze from the master Spy Control reaching every sector, and
//   an invalid word reported in the End Event marker and on SVT_ERROR.
// A mechanism that never happened counts as a failure.
module tb_svt_top;
  import svt_pkg::*;
  localparam int NS = 2, ONE = 1024, NR = 32;
  localparam longint CUT = 1000;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic [3:0] cfg_sector;
  logic [2:0] hf_valid [NS], hf_ready [NS];
  raw_t hf_raw [NS][3];
  logic [NS-1:0] xft_valid, xft_ready, trk_valid, trk_ready, trk_rejected, svt_error;
  logic [NS-1:0] spy_cmd_freeze, spy_cmd_release, spy_frozen;
  logic auto_freeze_en, cdf_error;
  word_t xft_word [NS];
  track_t trk [NS];
  logic [$bits(track_t)-1:0] spy_rdata [NS];
  logic [27:0] err_regs [NS];
  int checks = 0, failures = 0;
  int n_cluster2 = 0, n_multi = 0, n_chi_cut = 0, n_majority = 0, n_stall = 0, n_freeze = 0, n_error = 0;
  always #5 clk = ~clk;

  svt_top #(.NSECTORS(NS), .NPLUGS(2), .NCHIPS(2), .NPATT(4), .HIT_DEPTH(64), .SPY_D(64)) dut (
    .clk, .rst_n, .cfg, .cfg_sector, .hf_valid, .hf_ready, .hf_raw, .xft_valid, .xft_ready, .xft_word,
    .trk_valid, .trk_ready, .trk, .trk_rejected, .spy_cmd_freeze, .spy_cmd_release, .auto_freeze_en,
    .spy_frozen, .spy_rdata, .err_regs, .svt_error, .cdf_error);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(int sec, cfg_target_e t, int a, int d);
    @(negedge clk); cfg_sector = 4'(sec); cfg.we = 1; cfg.target = t; cfg.addr = 20'(a); cfg.data = 32'(d);
    @(negedge clk); cfg.we = 0;
  endtask

  // input senders
  raw_t  hq [NS][3][$];
  word_t xq [NS][$];
  for (genvar s = 0; s < NS; s++) begin : g_s
    for (genvar i = 0; i < 3; i++) begin : g_h
      initial begin
        hf_valid[s][i] = 0; hf_raw[s][i] = '0;
        wait (rst_n);
        forever begin
          bit r;
          @(negedge clk);
          if (hq[s][i].size() == 0) begin hf_valid[s][i] = 0; continue; end
          hf_valid[s][i] = 1; hf_raw[s][i] = hq[s][i][0];
          do begin #4 r = hf_ready[s][i]; @(posedge clk); end while (!r);
          void'(hq[s][i].pop_front());
          #1 hf_valid[s][i] = 0;
        end
      end
    end
    initial begin
      xft_valid[s] = 0; xft_word[s] = '0;
      wait (rst_n);
      forever begin
        bit r;
        @(negedge clk);
        if (xq[s].size() == 0) begin xft_valid[s] = 0; continue; end
        xft_valid[s] = 1; xft_word[s] = xq[s][0];
        do begin #4 r = xft_ready[s]; @(posedge clk); end while (!r);
        void'(xq[s].pop_front());
        #1 xft_valid[s] = 0;
      end
    end
  end

  track_t got [NS][$];
  always @(posedge clk) begin
    for (int s = 0; s < NS; s++) begin
      if (trk_valid[s] && trk_ready[s]) got[s].push_back(trk[s]);
      if (trk_valid[s] && !trk_ready[s]) n_stall++;
    end
  end
  always @(posedge clk) trk_ready <= #1 NS'($urandom);

  function automatic logic [11:0] ss_sil(int r, int l); return {2'd0, 1'b0, 9'(r * 5 + l)}; endfunction
  function automatic logic [11:0] ss_xft(int r); return {7'(r + 10), 5'(r)}; endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build one event for sector s; expected tracks go to expq[s] (End Event marker last)
  track_t expq [NS][$];
  task automatic make_event(int s, int ev, bit majority, bit bad_word);
    int roads[$];
    int st [5][$], ph [5][$];
    track_t e;
    expq[s].delete();
    for (int l = 0; l < 5; l++) begin st[l].delete(); ph[l].delete(); end
    for (int r = 0; r < NR; r++) if ($urandom % 6 == 0 && roads.size() < 5) roads.push_back(r);
    if (roads.size() == 0) roads.push_back(ev % NR);
    foreach (roads[i]) begin
      int r, crv, phi, nh1;
      longint x0s [$], x1s [$], x2, x3;
      bit drop4;
      r = roads[i];
      drop4 = majority && (i == 0);          // layer 4 missing: found only with 5 of 6
      if (drop4) n_majority++;
      nh1 = ($urandom % 3 == 0) ? 2 : 1;     // two hits on layer 1
      if (nh1 == 2) n_multi++;
      for (int l = 0; l < 5; l++) begin
        int a;
        if (l == 4 && drop4) continue;
        if (l == 1 && nh1 == 2) begin
          // two separate strips in the same super-strip: positions 0 and 2
          st[l].push_back(4 * (r * 5 + l)); ph[l].push_back(40);
          st[l].push_back(4 * (r * 5 + l) + 2); ph[l].push_back(40);
          x1s.push_back(16 * (4 * (r * 5 + l)));
          x1s.push_back(16 * (4 * (r * 5 + l) + 2));
          continue;
        end
        a = $urandom % 3;
        if (l == 0 && ($urandom % 2)) begin
          // a two-strip cluster, charges 30 and 50: centroid +10/16 strip
          st[l].push_back(4 * (r * 5 + l) + a); ph[l].push_back(30);
          st[l].push_back(4 * (r * 5 + l) + a + 1); ph[l].push_back(50);
          x0s.push_back(16 * (4 * (r * 5 + l) + a) + 10);
          n_cluster2++;
        end else begin
          st[l].push_back(4 * (r * 5 + l) + a); ph[l].push_back(40);
          case (l)
            0: x0s.push_back(16 * (4 * (r * 5 + l) + a));
            1: x1s.push_back(16 * (4 * (r * 5 + l) + a));
            2: x2 = 16 * (4 * (r * 5 + l) + a);
            3: x3 = 16 * (4 * (r * 5 + l) + a);
            default: ;
          endcase
        end
      end
      crv = r + 10; phi = r * 64 + $urandom % 64;
      xq[s].push_back(mk_hit(XFT_LAYER, {7'(crv), 11'(phi)}));
      foreach (x1s[k]) begin
        track_t t;
        longint c0;
        c0 = x1s[k] - x0s[0] - 64;            // chi0 = x1 - x0 - 64
        t.ee = 0; t.road = 15'(r); t.crv = 16'(crv); t.phi = 16'(phi); t.d = 16'(x0s[0] - x1s[k]);
        t.chi2 = 32'(c0 * c0);
        if (c0 * c0 <= CUT) expq[s].push_back(t);
        else n_chi_cut++;
      end
    end
    for (int l = 0; l < 5; l++)
      foreach (st[l][k]) hq[s][0].push_back('{ee: 1'b0, stream: 4'(l), strip: 11'(st[l][k]), ph: 8'(ph[l][k])});
    if (bad_word) hq[s][1].push_back('{ee: 1'b0, stream: 4'd13, strip: 11'd0, ph: 8'd40});
    for (int h = 0; h < 3; h++) hq[s][h].push_back('{ee: 1'b1, stream: 4'd0, strip: 11'd0, ph: 8'(ev + 1)});
    xq[s].push_back(mk_ee(8'(ev + 1), 4'd0));
    e = '0; e.ee = 1; e.road = 15'({bad_word ? 4'b0100 : 4'b0000, 8'(ev + 1)});
    expq[s].push_back(e);
  endtask

  initial begin
    cfg = '0; cfg_sector = '0; spy_cmd_freeze = '0; spy_cmd_release = '0; auto_freeze_en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++) begin
      for (int l = 0; l < 5; l++)
        for (int stp = 0; stp < 660; stp++) begin
          @(negedge clk); cfg_sector = 4'(s); cfg.we = 1; cfg.target = CFG_HF0;
          cfg.addr = 20'({4'(l), 11'(stp)}); cfg.data = 0;
        end
      @(negedge clk); cfg.we = 0;
      for (int r = 0; r < NR; r++)
        for (int l = 0; l < 6; l++) begin
          wr(s, CFG_AM, {15'(r), 3'(l)}, l < 5 ? ss_sil(r, l) : ss_xft(r));
          wr(s, CFG_HB, {15'(r), 3'(l)}, l < 5 ? ss_sil(r, l) : ss_xft(r));
        end
      wr(s, CFG_TF, 0 * 6 + 4, ONE); wr(s, CFG_TF, 1 * 6 + 5, ONE);
      wr(s, CFG_TF, 2 * 6 + 0, ONE); wr(s, CFG_TF, 2 * 6 + 1, -ONE);
      wr(s, CFG_TF, 18 + 0, -ONE); wr(s, CFG_TF, 18 + 1, ONE); wr(s, CFG_TF, 45, -64);
      wr(s, CFG_TF, 48, int'(CUT));
    end
    for (int ev = 0; ev < 6; ev++) begin
      bit maj;
      maj = (ev >= 4);
      if (ev == 4) for (int s = 0; s < NS; s++) wr(s, CFG_AMCTL, 0, 5);
      for (int s = 0; s < NS; s++) begin
        got[s].delete();
        make_event(s, ev, maj, (ev == 2 && s == 1));
      end
      for (int s = 0; s < NS; s++) begin
        wait (got[s].size() > 0 && got[s][got[s].size() - 1].ee);
      end
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        chk(got[s].size() == expq[s].size(), $sformatf("sector %0d event %0d: %0d words, %0d expected",
                                                      s, ev, got[s].size(), expq[s].size()));
        chk(got[s][got[s].size() - 1] == expq[s][expq[s].size() - 1], $sformatf("sector %0d event %0d End Event marker", s, ev));
        foreach (expq[s][i]) begin
          int k[$];
          k = got[s].find_first_index(x) with (x == expq[s][i]);
          chk(k.size() == 1, $sformatf("sector %0d event %0d track %p", s, ev, expq[s][i]));
          if (k.size() == 1) got[s].delete(k[0]);
        end
      end
      if (ev == 2) begin
        chk(svt_error[1] && !svt_error[0], "SVT_ERROR from sector 1 only");
        if (svt_error[1]) n_error++;
      end
    end
    // master freeze reaches every sector
    @(negedge clk); spy_cmd_freeze[0] = 1;
    @(negedge clk); spy_cmd_freeze[0] = 0;
    @(negedge clk);
    chk(&spy_frozen, "global freeze from the master");
    if (&spy_frozen) n_freeze++;
    @(negedge clk); spy_cmd_release = '1;
    @(negedge clk); spy_cmd_release = '0;
    @(negedge clk);
    chk(spy_frozen == '0, "released");
    $display("mechanisms: cluster2=%0d multi_hit=%0d chi2_cut=%0d majority5of6=%0d stall=%0d freeze=%0d error=%0d",
             n_cluster2, n_multi, n_chi_cut, n_majority, n_stall, n_freeze, n_error);
    chk(n_cluster2 > 0, "two-strip cluster happened");
    chk(n_multi > 0, "road with several combinations happened");
    chk(n_chi_cut > 0, "chi-square cut happened");
    chk(n_majority > 0, "5-of-6 road happened");
    chk(n_stall > 0, "track back-pressure happened");
    chk(n_freeze > 0, "global freeze happened");
    chk(n_error > 0, "error report happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
