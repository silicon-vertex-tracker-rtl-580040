// tb_am_plug: loads random patterns into an AM plug of 4 chips of 4
// patterns (16 in all, to keep the run short), sends random super-strips
// and checks that the roads read
// out are exactly the loaded patterns with at least 'thresh' matched
// layers, lowest {chip, pattern} first, one per cycle, through the plug's readout
// tree, for 6-of-6 and 5-of-6 majority.
// Also checks that INIT clears the event and that unloaded slots never fire.
module tb_am_plug;
  import svt_pkg::*;
  localparam int NP = 16;
  logic clk = 0, rst_n = 0;
  logic pat_we, rd_sel, road_valid;
  logic [3:0] pat_addr, road_id;
  logic [2:0] pat_layer, thresh, op_layer;
  logic [11:0] pat_data, op_ss;
  am_op_e op;
  int checks = 0, failures = 0, nroads = 0;
  always #5 clk = ~clk;

  am_plug #(.NCHIPS(4), .NPATT(4)) dut (.clk, .rst_n, .pat_we, .pat_addr, .pat_layer, .pat_data, .thresh,
    .op, .op_layer, .op_ss, .rd_sel, .road_valid, .road_id);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [11:0] patt [NP][6];
  bit loaded [NP];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pat_we = 0; rd_sel = 0; op = AM_NOP; op_layer = 0; op_ss = 0; thresh = 3'd6;
    pat_addr = 0; pat_layer = 0; pat_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load 14 of 16 slots with words from a small range so events match
    for (int p = 0; p < NP; p++) begin
      loaded[p] = (p != 3 && p != 9);
      for (int l = 0; l < 6; l++) begin
        patt[p][l] = 12'($urandom % 2);
        if (loaded[p]) begin
          @(negedge clk); pat_we = 1; pat_addr = 4'(p); pat_layer = 3'(l); pat_data = patt[p][l];
        end
      end
    end
    @(negedge clk); pat_we = 0;
    for (int ev = 0; ev < 8; ev++) begin
      bit seen [6][4];
      int exp[$], got[$], t0;
      exp.delete(); got.delete();
      @(negedge clk); op = AM_INIT; thresh = (ev % 2) ? 3'd5 : 3'd6;
      foreach (seen[l, v]) seen[l][v] = 0;
      // each layer gets 1..3 random super-strips (some out of range)
      for (int l = 0; l < 6; l++) begin
        int n;
        n = 1 + $urandom % 3;
        for (int k = 0; k < n; k++) begin
          int v;
          v = $urandom % 3;
          if (v < 4) seen[l][v] = 1;
          @(negedge clk); op = AM_DATA; op_layer = 3'(l); op_ss = 12'(v);
        end
      end
      @(negedge clk); op = AM_NOP;
      for (int p = 0; p < NP; p++) begin
        int m;
        m = 0;
        for (int l = 0; l < 6; l++) if (seen[l][patt[p][l]]) m++;
        if (loaded[p] && m >= int'(thresh)) exp.push_back(p);
      end
      // read out: one road per cycle
      t0 = 0;
      while (road_valid && t0 < 40) begin
        got.push_back(int'(road_id));
        op = AM_READ; rd_sel = 1;
        @(negedge clk); op = AM_NOP; rd_sel = 0;
        t0++;
      end
      nroads += got.size();
      chk(got == exp, $sformatf("event %0d thresh %0d: roads %p expected %p", ev, thresh, got, exp));
      chk(!road_valid, "no road left after readout");
    end
    chk(nroads > 5, $sformatf("enough roads exercised (%0d)", nroads));
    // INIT clears
    @(negedge clk); op = AM_INIT;
    @(negedge clk); op = AM_NOP;
    chk(!road_valid, "INIT clears all roads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
