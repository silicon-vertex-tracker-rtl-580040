// tb_merger: three Hit Finder streams and one XFT stream, sent with random
// gaps, must come out as one stream holding every data word once, followed
// by a single End Event carrying input 0's tag and the OR of all input error
// bits. Both destinations apply random back-pressure; a word may only move
// when both are ready. A Hit Finder word on the XFT layer is flagged.
module tb_merger;
  import svt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] in_valid, in_ready;
  word_t in_word [4];
  logic out_valid, ra, rb;
  word_t out_word;
  logic [ERR_W-1:0] err_out;
  int checks = 0, failures = 0, n_inval = 0, stalls = 0;
  always #5 clk = ~clk;

  merger dut (.clk, .rst_n, .in_valid, .in_ready, .in_word, .out_valid, .out_ready_a(ra),
    .out_ready_b(rb), .out_word, .ee_mask(4'hF), .err_out);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t got[$];
  always @(posedge clk) begin
    if (rst_n && err_out[ERR_INVALID]) n_inval++;
    if (out_valid && ra && rb) got.push_back(out_word);
    if (out_valid && (ra != rb)) stalls++;
  end
  always @(posedge clk) begin ra <= #1 ($urandom % 3) != 0; rb <= #1 ($urandom % 3) != 0; end

  // one sender per input
  word_t src [4][$];
  for (genvar i = 0; i < 4; i++) begin : g_src
    initial begin
      in_valid[i] = 0; in_word[i] = '0;
      wait (rst_n);
      forever begin
        bit r;
        @(negedge clk);
        if (src[i].size() == 0) begin in_valid[i] = 0; continue; end
        if ($urandom % 2) begin in_valid[i] = 0; continue; end
        in_valid[i] = 1; in_word[i] = src[i][0];
        do begin #4 r = in_ready[i]; @(posedge clk); end while (!r);
        void'(src[i].pop_front());
        #1 in_valid[i] = 0;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 3; ev++) begin
      exp.delete(); got.delete();
      for (int i = 0; i < 4; i++) begin
        int n;
        n = $urandom % 12;
        for (int k = 0; k < n; k++) begin
          word_t w;
          w = mk_hit(i == 3 ? XFT_LAYER : LAYER_W'($urandom % 5), COORD_W'($urandom));
          src[i].push_back(w); exp.push_back(w);
        end
        src[i].push_back(mk_ee(8'(ev + 1), (ev == 1 && i == 2) ? 4'b0010 : 4'b0000));
      end
      if (ev == 2) begin
        word_t w;
        w = mk_hit(XFT_LAYER, 18'd7);
        src[0].push_front(w); exp.push_back(w);   // Hit Finder word on the XFT layer
      end
      wait (got.size() == exp.size() + 1);
      repeat (5) @(posedge clk);
      chk(got.size() == exp.size() + 1, $sformatf("event %0d word count", ev));
      chk(got[got.size() - 1].ee, "End Event last");
      begin
        ee_t e;
        e = got[got.size() - 1].data;
        chk(e.tag == 8'(ev + 1), "tag of input 0");
        chk(e.err[1] == (ev == 1), "input error bits ORed");
        chk(e.err[ERR_INVALID] == (ev == 2), "own invalid-data bit");
      end
      foreach (exp[i]) begin
        int k[$];
        k = got.find_first_index(x) with (x == exp[i]);
        chk(k.size() == 1, $sformatf("word %h present", exp[i]));
        if (k.size() == 1) got.delete(k[0]);
      end
    end
    chk(n_inval == 1, "one invalid-data pulse");
    chk(stalls > 0, "one destination stalled the other at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
