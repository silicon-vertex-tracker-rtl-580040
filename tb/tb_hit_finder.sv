// tb_hit_finder: sends strips of all 10 layer streams, interleaved, into one
// Hit Finder and checks that every isolated strip comes out as one hit with
// the right layer and coordinate, that the End Event closes the merged
// stream with the input tag, that an unknown stream id is flagged and
// reported in the End Event word, and that the merged stream keeps up with
// the input (End Event out at most one cycle per stream plus 5 after the
// last input word, i.e. about one cycle per hit). The second event is read
// out under random back-pressure, and its hits must still all come out
// before its End Event.
module tb_hit_finder;
  import svt_pkg::*;
  localparam logic [1:0] HFID = 2'd1;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic in_valid, in_ready, out_valid, out_ready;
  raw_t in_raw;
  word_t out_word;
  logic [ERR_W-1:0] err_out;
  int checks = 0, failures = 0, n_inval = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  hit_finder #(.HF_ID(HFID)) dut (.clk, .rst_n, .cfg, .in_valid, .in_ready, .in_raw,
    .out_valid, .out_ready, .out_word, .ee_mask(4'hF), .err_out);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send(raw_t w);
    bit r;
    @(negedge clk); in_valid = 1; in_raw = w;
    do begin #4 r = in_ready; @(posedge clk); end while (!r);
    #1 in_valid = 0;
  endtask

  word_t got[$];
  int ee_cycle;
  bit bp = 0;   // random back-pressure on the output
  always @(posedge clk) out_ready <= #1 (!bp || ($urandom % 3 != 0));
  always @(posedge clk) begin
    if (rst_n && err_out[ERR_INVALID]) n_inval++;
    if (out_valid && out_ready) begin
      got.push_back(out_word);
      if (out_word.ee) ee_cycle = cyc;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp[$];
    int last_in;
    int next_strip [10];
    in_valid = 0; in_raw = '0; cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 10; s++)
      for (int st = 0; st < 64; st++) begin
        @(negedge clk);
        cfg.we = 1; cfg.target = CFG_HF1; cfg.addr = 20'({4'(s), STRIP_W'(st)}); cfg.data = 32'd0;
      end
    @(negedge clk); cfg.we = 0;
    for (int ev = 0; ev < 3; ev++) begin
      exp.delete(); got.delete();
      bp = (ev == 1);
      foreach (next_strip[s]) next_strip[s] = $urandom % 3;
      // 60 random isolated strips across streams, increasing per stream
      for (int n = 0; n < 60; n++) begin
        int s;
        raw_t r;
        s = $urandom % 10;
        if (next_strip[s] > 60) continue;
        r = '{ee: 1'b0, stream: 4'(s), strip: STRIP_W'(next_strip[s]), ph: PH_W'(20 + $urandom % 100)};
        send(r);
        exp.push_back(mk_hit(LAYER_W'(s % 5), {HFID, 1'(s / 5), STRIP_W'(next_strip[s]), 4'd0}));
        next_strip[s] += 2 + $urandom % 3;
      end
      if (ev == 2) send('{ee: 1'b0, stream: 4'd12, strip: '0, ph: 8'd50});   // unknown stream
      send('{ee: 1'b1, stream: 4'd0, strip: '0, ph: PH_W'(8'h30 + ev)});
      last_in = cyc;
      repeat (bp ? 100 : 30) @(posedge clk);
      chk(got.size() == exp.size() + 1, $sformatf("event %0d: %0d words out, %0d expected", ev, got.size(), exp.size() + 1));
      chk(got.size() > 0 && got[got.size() - 1].ee, "End Event is last");
      if (got.size() > 0) begin
        ee_t e;
        e = got[got.size() - 1].data;
        chk(e.tag == 8'(8'h30 + ev), "End Event tag");
        chk(e.err[ERR_INVALID] == (ev == 2), "End Event invalid-data bit");
      end
      // the last cluster of each stream closes at End Event, so up to one
      // hit per stream is still to be merged then: at most 10 + 5 cycles
      if (!bp) chk(ee_cycle - last_in <= 15, $sformatf("End Event latency %0d cycles", ee_cycle - last_in));
      foreach (exp[i]) begin
        int k[$];
        k = got.find_first_index(x) with (x == exp[i]);
        chk(k.size() == 1, $sformatf("event %0d hit %h found", ev, exp[i]));
        if (k.size() == 1) got.delete(k[0]);
      end
    end
    chk(n_inval == 1, "one invalid-data pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
