// tb_tf_front_end: sends Road-Info Packages with 1-3 hits on each used
// layer (plus hits on the unused silicon layer 4 and roads missing a layer)
// and checks that the combination FIFO receives every combination of one hit
// per used layer and one XFT track, in counting order (layer 0 fastest),
// with the XFT word split into curvature and phi, followed by the End Event
// marker.
module tb_tf_front_end;
  import svt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  word_t in_word;
  comb_t out_comb;
  logic [ERR_W-1:0] err_out;
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  tf_front_end dut (.clk, .rst_n, .in_valid, .in_ready, .in_word, .out_valid, .out_ready, .out_comb, .err_out);

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

  comb_t got[$];
  int first_c, last_c;
  always @(posedge clk) if (out_valid && out_ready) begin
    if (!out_comb.ee) begin
      if (got.size() == 0) first_c = cyc;
      last_c = cyc;
    end
    got.push_back(out_comb);
  end
  initial out_ready = 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ntot = 0;
    in_valid = 0; in_word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 4; ev++) begin
      comb_t exp[$];
      exp.delete(); got.delete();
      for (int rd = 0; rd < 3; rd++) begin
        logic [17:0] hv [6][$];
        int n [6];
        int road;
        road = $urandom % 32768;
        for (int l = 0; l < 6; l++) begin
          hv[l].delete();
          n[l] = 1 + $urandom % 3;
          if (ev == 1 && rd == 1 && l == 2) n[l] = 0;      // road without layer 2
        end
        send('{ee: 1'b0, data: {ROAD_TAG, 18'(road)}});
        // hits arrive layer-interleaved in random order
        for (int k = 0; k < 9; k++)
          for (int l = 0; l < 6; l++)
            if (hv[l].size() < n[l] && ($urandom % 2)) begin
              logic [17:0] c;
              c = 18'($urandom);
              hv[l].push_back(c);
              send(mk_hit(3'(l), c));
            end
        for (int l = 0; l < 6; l++) n[l] = hv[l].size();
        if (n[0] && n[1] && n[2] && n[3] && n[5])
          for (int i5 = 0; i5 < n[5]; i5++)
            for (int i3 = 0; i3 < n[3]; i3++)
              for (int i2 = 0; i2 < n[2]; i2++)
                for (int i1 = 0; i1 < n[1]; i1++)
                  for (int i0 = 0; i0 < n[0]; i0++) begin
                    comb_t c;
                    c.ee = 0; c.road = 15'(road);
                    c.x[0] = hv[0][i0]; c.x[1] = hv[1][i1]; c.x[2] = hv[2][i2]; c.x[3] = hv[3][i3];
                    c.x[4] = 18'(hv[5][i5][17:11]); c.x[5] = 18'(hv[5][i5][10:0]);
                    exp.push_back(c);
                  end
      end
      send(mk_ee(8'(ev), 4'd0));
      begin
        comb_t e;
        e = '0; e.ee = 1; e.road = 15'({4'd0, 8'(ev)});
        exp.push_back(e);
      end
      wait (got.size() > 0 && got[got.size() - 1].ee);
      @(negedge clk);
      ntot += exp.size();
      chk(got.size() == exp.size(), $sformatf("event %0d: %0d entries, %0d expected", ev, got.size(), exp.size()));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        chk(got[i] == exp[i], $sformatf("event %0d entry %0d", ev, i));
    end
    chk(ntot > 20, "combinations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
