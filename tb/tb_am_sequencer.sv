// tb_am_sequencer: an AM Sequencer driving two small AM boards (2 plugs x
// 2 chips x 4 patterns each, 32 patterns). Patterns are downloaded through
// the sequencer, events of hits are sent, and the road stream must list
// exactly the patterns with all 6 layers hit (then 5 of 6 after the
// threshold is changed), lowest road ID first, each as a road header,
// followed by the event's End Event word. Without back-pressure roads must
// leave one per cycle. A hit on layer 6 is flagged invalid.
module tb_am_sequencer;
  import svt_pkg::*;
  localparam int BAW = 4, NP = 32;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic in_valid, in_ready, out_valid, out_ready;
  word_t in_word, out_word;
  am_op_e am_op;
  logic [2:0] am_layer, am_thresh, pat_layer;
  logic [11:0] am_ss, pat_data;
  logic [1:0] am_rd_sel, pat_we, road_valid;
  logic [BAW-1:0] pat_addr;
  logic [BAW-1:0] road_id [2];
  logic [ERR_W-1:0] err_out;
  int checks = 0, failures = 0, cyc = 0, n_inval = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  am_sequencer #(.NBOARDS(2), .BAW(BAW)) dut (.clk, .rst_n, .cfg, .in_valid, .in_ready, .in_word,
    .out_valid, .out_ready, .out_word, .am_op, .am_layer, .am_ss, .am_rd_sel, .am_thresh,
    .pat_we, .pat_addr, .pat_layer, .pat_data, .road_valid, .road_id, .ee_mask(4'hF), .err_out);
  for (genvar b = 0; b < 2; b++) begin : g_b
    am_board #(.NPLUGS(2), .NCHIPS(2), .NPATT(4)) u_b (.clk, .rst_n, .pat_we(pat_we[b]), .pat_addr,
      .pat_layer, .pat_data, .thresh(am_thresh), .op(am_op), .op_layer(am_layer), .op_ss(am_ss),
      .rd_sel(am_rd_sel[b]), .road_valid(road_valid[b]), .road_id(road_id[b]));
  end

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

  word_t got[$];
  int first_road_cyc, ee_cyc;
  bit bp;
  always @(posedge clk) begin
    if (rst_n && err_out[ERR_INVALID]) n_inval++;
    if (out_valid && out_ready) begin
      if (got.size() == 0) first_road_cyc = cyc;
      got.push_back(out_word);
      if (out_word.ee) ee_cyc = cyc;
    end
  end
  always @(posedge clk) out_ready <= #1 bp ? (($urandom % 2) == 1) : 1'b1;

  logic [11:0] patt [NP][6];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total = 0;
    in_valid = 0; in_word = '0; cfg = '0; bp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++)
      for (int l = 0; l < 6; l++) begin
        patt[p][l] = 12'($urandom % 2);
        @(negedge clk); cfg.we = 1; cfg.target = CFG_AM; cfg.addr = 20'({15'(p), 3'(l)});
        cfg.data = 32'(patt[p][l]);
      end
    @(negedge clk); cfg.we = 0;
    for (int ev = 0; ev < 6; ev++) begin
      bit seen [6][2];
      int exp[$], thr;
      exp.delete(); got.delete();
      thr = (ev >= 3) ? 5 : 6;
      if (ev == 3) begin
        @(negedge clk); cfg.we = 1; cfg.target = CFG_AMCTL; cfg.data = 32'd5;
        @(negedge clk); cfg.we = 0;
      end
      bp = (ev == 2);
      foreach (seen[l, v]) seen[l][v] = 0;
      for (int l = 0; l < 6; l++) begin
        int n;
        n = 1 + $urandom % 2;
        for (int k = 0; k < n; k++) begin
          int v;
          v = $urandom % 3;
          if (v < 2) seen[l][v] = 1;
          send(mk_hit(3'(l), {12'(v), 6'($urandom)}));
        end
      end
      if (ev == 1) send(mk_hit(3'd6, 18'd0));
      send(mk_ee(8'(ev), 4'd0));
      for (int p = 0; p < NP; p++) begin
        int m;
        m = 0;
        for (int l = 0; l < 6; l++) if (seen[l][patt[p][l]]) m++;
        if (m >= thr) exp.push_back(p);
      end
      wait (got.size() > 0 && got[got.size() - 1].ee);
      @(negedge clk);
      total += exp.size();
      chk(got.size() == exp.size() + 1, $sformatf("event %0d: %0d words, %0d roads expected", ev, got.size(), exp.size()));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        chk(got[i] == '{ee: 1'b0, data: {ROAD_TAG, 18'(exp[i])}}, $sformatf("road %0d = %h, expected %0d", i, got[i], exp[i]));
      begin
        ee_t e;
        e = got[got.size() - 1].data;
        chk(e.tag == 8'(ev), "End Event tag");
        chk(e.err[ERR_INVALID] == (ev == 1), "End Event invalid bit");
      end
      if (!bp) chk(ee_cyc - first_road_cyc == exp.size(), "one road per cycle");
    end
    chk(total > 3, $sformatf("roads exercised: %0d", total));
    chk(n_inval == 1, "one invalid pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
