// tb_hit_buffer: a Hit Buffer with a 64-road map and a 16-entry hit memory.
// Each event sends random hits, then road headers; every Road-Info Package
// must hold the header and, layer by layer, exactly the hits of the road's
// super-strips (newest first within a super-strip), and the End Event must
// carry the tag and the OR of both inputs' error bits. The third event sends
// more hits than the memory holds: the extra hits are dropped and the
// overflow bit is set. Output back-pressure is random in one event.
module tb_hit_buffer;
  import svt_pkg::*;
  localparam int NR = 64, HD = 16;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic hit_valid, hit_ready, road_valid, road_ready, out_valid, out_ready;
  word_t hit_word, road_word, out_word;
  logic [ERR_W-1:0] err_out;
  int checks = 0, failures = 0;
  bit bp;
  always #5 clk = ~clk;

  hit_buffer #(.NROADS(NR), .HIT_DEPTH(HD)) dut (.clk, .rst_n, .cfg, .hit_valid, .hit_ready, .hit_word,
    .road_valid, .road_ready, .road_word, .out_valid, .out_ready, .out_word, .ee_mask(4'hF), .err_out);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send_hit(word_t w);
    bit r;
    @(negedge clk); hit_valid = 1; hit_word = w;
    do begin #4 r = hit_ready; @(posedge clk); end while (!r);
    #1 hit_valid = 0;
  endtask
  task automatic send_road(word_t w);
    bit r;
    @(negedge clk); road_valid = 1; road_word = w;
    do begin #4 r = road_ready; @(posedge clk); end while (!r);
    #1 road_valid = 0;
  endtask

  word_t got[$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_word);
  always @(posedge clk) out_ready <= #1 bp ? (($urandom % 2) == 1) : 1'b1;

  logic [11:0] map [NR][6];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npk = 0;
    hit_valid = 0; road_valid = 0; hit_word = '0; road_word = '0; cfg = '0; bp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NR; r++)
      for (int l = 0; l < 6; l++) begin
        map[r][l] = 12'($urandom % 3);
        @(negedge clk); cfg.we = 1; cfg.target = CFG_HB; cfg.addr = 20'({15'(r), 3'(l)});
        cfg.data = 32'(map[r][l]);
      end
    @(negedge clk); cfg.we = 0;
    for (int ev = 0; ev < 4; ev++) begin
      hit_t hits[$];
      word_t exp[$];
      int nh, nr;
      hits.delete(); exp.delete(); got.delete();
      bp = (ev == 1);
      nh = (ev == 2) ? HD + 4 : 4 + $urandom % 10;
      for (int i = 0; i < nh; i++) begin
        hit_t h;
        h.layer = 3'($urandom % 6);
        h.coord = {12'($urandom % 3), 6'($urandom)};
        send_hit(mk_hit(h.layer, h.coord));
        if (i < HD) hits.push_back(h);
      end
      send_hit(mk_ee(8'(ev + 10), ev == 3 ? 4'b0010 : 4'b0000));
      nr = 1 + $urandom % 5;
      for (int k = 0; k < nr; k++) begin
        int r;
        r = $urandom % NR;
        send_road('{ee: 1'b0, data: {ROAD_TAG, 18'(r)}});
        exp.push_back('{ee: 1'b0, data: {ROAD_TAG, 18'(r)}});
        for (int l = 0; l < 6; l++)
          for (int i = hits.size() - 1; i >= 0; i--)
            if (hits[i].layer == 3'(l) && hits[i].coord[17:6] == map[r][l])
              exp.push_back(mk_hit(hits[i].layer, hits[i].coord));
      end
      send_road(mk_ee(8'd0, ev == 1 ? 4'b0001 : 4'b0000));
      exp.push_back(mk_ee(8'(ev + 10), (ev == 1 ? 4'b0001 : 4'b0000) | (ev == 3 ? 4'b0010 : 4'b0000) |
                                       (ev == 2 ? 4'b1000 : 4'b0000)));
      wait (got.size() > 0 && got[got.size() - 1].ee);
      @(negedge clk);
      npk += nr;
      chk(got.size() == exp.size(), $sformatf("event %0d: %0d words, %0d expected", ev, got.size(), exp.size()));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        chk(got[i] == exp[i], $sformatf("event %0d word %0d: %h expected %h", ev, i, got[i], exp[i]));
    end
    chk(npk > 4, "packages exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
