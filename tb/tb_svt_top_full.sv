// tb_svt_top_full: the SVT at its full size (12 sectors, 2 AM boards of 128
// chips of 128 patterns per sector, 32k roads per sector, 1024-entry hit
// memories and spy buffers), with no parameter changed. Sector 5 gets one
// complete event: two roads, one on each AM board, with hits on all layers,
// plus an unrelated stray hit. The test checks that exactly the two fitted
// tracks and the End Event marker leave sector 5, that the other sectors
// stay silent, and how many cycles the event took from its last input word
// to its End Event marker.
module tb_svt_top_full;
  import svt_pkg::*;
  localparam int NS = 12, ONE = 1024, SEC = 5;
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
  int checks = 0, failures = 0, cyc = 0, other = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  svt_top dut (
    .clk, .rst_n, .cfg, .cfg_sector, .hf_valid, .hf_ready, .hf_raw, .xft_valid, .xft_ready, .xft_word,
    .trk_valid, .trk_ready, .trk, .trk_rejected, .spy_cmd_freeze, .spy_cmd_release, .auto_freeze_en,
    .spy_frozen, .spy_rdata, .err_regs, .svt_error, .cdf_error);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(cfg_target_e t, int a, int d);
    @(negedge clk); cfg_sector = 4'(SEC); cfg.we = 1; cfg.target = t; cfg.addr = 20'(a); cfg.data = 32'(d);
    @(negedge clk); cfg.we = 0;
  endtask
  task automatic send_hf(int h, raw_t w);
    bit r;
    @(negedge clk); hf_valid[SEC][h] = 1; hf_raw[SEC][h] = w;
    do begin #4 r = hf_ready[SEC][h]; @(posedge clk); end while (!r);
    #1 hf_valid[SEC][h] = 0;
  endtask
  task automatic send_xft(word_t w);
    bit r;
    @(negedge clk); xft_valid[SEC] = 1; xft_word[SEC] = w;
    do begin #4 r = xft_ready[SEC]; @(posedge clk); end while (!r);
    #1 xft_valid[SEC] = 0;
  endtask

  track_t got[$];
  int ee_cyc;
  always @(posedge clk) begin
    for (int s = 0; s < NS; s++) if (rst_n && trk_valid[s]) begin
      if (s == SEC) begin
        got.push_back(trk[s]);
        if (trk[s].ee) ee_cyc = cyc;
      end else other++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int roads [2], strips [2][5], crv [2], phi [2], last_in;
    track_t exp [2];
    cfg = '0; cfg_sector = '0; spy_cmd_freeze = '0; spy_cmd_release = '0; auto_freeze_en = 0;
    trk_ready = '1; xft_valid = '0;
    for (int s = 0; s < NS; s++) begin
      hf_valid[s] = '0; xft_word[s] = '0;
      for (int h = 0; h < 3; h++) hf_raw[s][h] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    roads[0] = 1234;            // AM board 0
    roads[1] = 16384 + 777;     // AM board 1
    for (int t = 0; t < 2; t++) begin
      crv[t] = 20 + t; phi[t] = 300 + 700 * t;
      for (int l = 0; l < 5; l++) begin
        strips[t][l] = 100 + 400 * t + 8 * l;
        // Hit Finder 1, stream l: pedestal 5 on the strip used
        wr(CFG_HF1, {4'(l), 11'(strips[t][l])}, 5);
        wr(CFG_AM, {15'(roads[t]), 3'(l)}, {2'd1, 1'b0, 9'(strips[t][l] >> 2)});
        wr(CFG_HB, {15'(roads[t]), 3'(l)}, {2'd1, 1'b0, 9'(strips[t][l] >> 2)});
      end
      wr(CFG_AM, {15'(roads[t]), 3'd5}, {7'(crv[t]), 5'(phi[t] >> 6)});
      wr(CFG_HB, {15'(roads[t]), 3'd5}, {7'(crv[t]), 5'(phi[t] >> 6)});
      exp[t].ee = 0; exp[t].road = 15'(roads[t]); exp[t].crv = 16'(crv[t]); exp[t].phi = 16'(phi[t]);
      exp[t].d = 16'(16 * (strips[t][0] - strips[t][1])); exp[t].chi2 = 0;
    end
    wr(CFG_HF1, {4'd7, 11'd50}, 5);
    wr(CFG_TF, 0 * 6 + 4, ONE); wr(CFG_TF, 1 * 6 + 5, ONE); wr(CFG_TF, 2 * 6 + 0, ONE); wr(CFG_TF, 2 * 6 + 1, -ONE);
    // the event
    for (int l = 0; l < 5; l++)
      for (int t = 0; t < 2; t++) send_hf(1, '{ee: 1'b0, stream: 4'(l), strip: 11'(strips[t][l]), ph: 8'd45});
    send_hf(1, '{ee: 1'b0, stream: 4'd7, strip: 11'd50, ph: 8'd45});   // stray hit, no road
    for (int t = 0; t < 2; t++) send_xft(mk_hit(XFT_LAYER, {7'(crv[t]), 11'(phi[t])}));
    for (int h = 0; h < 3; h++) send_hf(h, '{ee: 1'b1, stream: 4'd0, strip: 11'd0, ph: 8'h77});
    send_xft(mk_ee(8'h77, 4'd0));
    last_in = cyc;
    wait (got.size() > 0 && got[got.size() - 1].ee);
    @(negedge clk);
    chk(got.size() == 3, $sformatf("%0d words from the sector, 3 expected", got.size()));
    if (got.size() == 3) begin
      chk(got[0] == exp[0], $sformatf("track 0 %p expected %p", got[0], exp[0]));
      chk(got[1] == exp[1], $sformatf("track 1 %p expected %p", got[1], exp[1]));
      chk(got[2].road == 15'h77, "End Event marker tag, no error");
    end
    chk(other == 0, "other sectors silent");
    chk(!(|svt_error) && !cdf_error, "no error line");
    $display("event latency: %0d cycles from the last input word to the End Event marker", ee_cyc - last_in);
    chk(ee_cyc - last_in < 100, "event completes within 100 cycles of its last input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
