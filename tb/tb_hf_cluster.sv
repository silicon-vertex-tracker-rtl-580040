// tb_hf_cluster: feeds strip data to one clustering stream and compares the
// hits with centroids computed here in floating point: pedestal subtraction,
// threshold, hot channel mask, cluster length limit, End Event ordering,
// output back-pressure and the out-of-order check. Also checks that a
// cluster leaves one cycle after the strip that closes it.
module tb_hf_cluster;
  import svt_pkg::*;
  localparam int PED = 10, THR = 2, MAXLEN = 8;
  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [STRIP_W-1:0] cfg_addr;
  logic [PH_W:0] cfg_data;
  logic in_valid, in_ready, out_valid, out_ready, err_invalid;
  word_t in_word, out_word;
  int checks = 0, failures = 0, n_err = 0;
  always #5 clk = ~clk;

  hf_cluster #(.MAXLEN(MAXLEN), .THRESH(THR)) dut (.clk, .rst_n, .layer(3'd2), .coord_hi(3'b101),
    .cfg_we, .cfg_addr, .cfg_data, .in_valid, .in_ready, .in_word, .out_valid, .out_ready, .out_word,
    .err_invalid);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected output queue
  word_t exp_q[$];
  int strips[$], phs[$];

  // cluster model: list of (strip, q) in one cluster -> hit word
  function automatic word_t cl_hit(int first, real qs[$]);
    real sq = 0, sqi = 0;
    int c;
    foreach (qs[i]) begin sq += qs[i]; sqi += qs[i] * i; end
    c = first * 16 + $rtoi(16.0 * sqi / sq + 0.5);
    return mk_hit(3'd2, {3'b101, 15'(c)});
  endfunction

  function automatic bit masked(int s); return s == 30; endfunction

  // reference clustering of one event
  task automatic model(int ss[$], int pp[$], logic [7:0] tag);
    real qs[$];
    int first = -10, last = -10;
    for (int i = 0; i < ss.size(); i++) begin
      int q = pp[i] - PED;
      bit on = !masked(ss[i]) && q > THR;
      if (!on) continue;
      if (qs.size() > 0 && ss[i] == last + 1 && qs.size() < MAXLEN) begin
        qs.push_back(q); last = ss[i];
      end else begin
        if (qs.size() > 0) exp_q.push_back(cl_hit(first, qs));
        qs.delete(); qs.push_back(q); first = ss[i]; last = ss[i];
      end
    end
    if (qs.size() > 0) exp_q.push_back(cl_hit(first, qs));
    exp_q.push_back(mk_ee(tag, 4'd0));
  endtask

  // present a word from a negative edge until a rising edge where it is taken
  task automatic send(word_t w);
    bit r;
    @(negedge clk); in_valid = 1; in_word = w;
    do begin #4 r = in_ready; @(posedge clk); end while (!r);
    #1 in_valid = 0;
  endtask

  // check outputs in order
  int got = 0, last_out_cycle = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && err_invalid) n_err++;
    if (out_valid && out_ready) begin
      got++;
      if (exp_q.size() == 0) chk(0, "unexpected output");
      else begin
        word_t e;
        e = exp_q.pop_front();
        chk(out_word == e, $sformatf("output %0d: got %h expected %h", got, out_word, e));
      end
    end
  end

  // random back-pressure
  always @(posedge clk) out_ready <= #1 (($urandom % 4) != 0);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s1[$], p1[$], s2[$], p2[$];
    in_valid = 0; in_word = '0; cfg_we = 0; cfg_addr = '0; cfg_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 64; s++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = STRIP_W'(s); cfg_data = {masked(s), PH_W'(PED)};
    end
    @(negedge clk); cfg_we = 0;
    s1 = '{5, 6, 7, 10, 11, 29, 30, 31, 40, 41, 42, 43, 44, 45, 46, 47, 48, 49, 55};
    p1 = '{40, 60, 20, 11, 50, 30, 100, 40, 20, 25, 30, 35, 40, 45, 50, 55, 60, 65, 200};
    model(s1, p1, 8'h5A);
    for (int i = 0; i < s1.size(); i++) send('{ee: 1'b0, data: DATA_W'({STRIP_W'(s1[i]), PH_W'(p1[i])})});
    send(mk_ee(8'h5A, 4'd0));
    // second event with random clusters
    begin
      int s = 0;
      while (s < 60) begin
        s += 1 + $urandom % 3;
        if (s < 64) begin s2.push_back(s); p2.push_back(PED + $urandom % 120); end
      end
    end
    model(s2, p2, 8'h21);
    for (int i = 0; i < s2.size(); i++) send('{ee: 1'b0, data: DATA_W'({STRIP_W'(s2[i]), PH_W'(p2[i])})});
    send(mk_ee(8'h21, 4'd0));
    repeat (20) @(posedge clk);
    chk(exp_q.size() == 0, "all expected outputs seen");
    chk(n_err == 0, "no out-of-order error for ordered strips");
    // out of order: strip 20 after 25
    send('{ee: 1'b0, data: DATA_W'({STRIP_W'(25), PH_W'(50)})});
    send('{ee: 1'b0, data: DATA_W'({STRIP_W'(20), PH_W'(50)})});
    exp_q.push_back(mk_hit(3'd2, {3'b101, 15'(25 * 16)}));
    exp_q.push_back(mk_hit(3'd2, {3'b101, 15'(20 * 16)}));
    exp_q.push_back(mk_ee(8'h01, 4'd0));
    send(mk_ee(8'h01, 4'd0));
    repeat (10) @(posedge clk);
    chk(n_err == 1, "out-of-order strip flagged once");
    chk(exp_q.size() == 0, "all outputs of event 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
