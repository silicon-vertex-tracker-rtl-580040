// tb_spy_buffer: checks that the spy buffer copies only transferred link
// words, wraps around, reads back without disturbing anything and stops
// copying while frozen.
module tb_spy_buffer;
  localparam int W = 22, D = 8;
  logic clk = 0, rst_n = 0;
  logic v, r, fr;
  logic [W-1:0] dat, rd;
  logic [2:0] ra, wp;
  logic wrapped, frozen;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spy_buffer #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .link_valid(v), .link_ready(r), .link_data(dat),
    .freeze(fr), .rd_addr(ra), .rd_data(rd), .wr_ptr(wp), .wrapped, .frozen);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = 0; r = 0; fr = 0; dat = '0; ra = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 12 transfers with data 100+i, interleaved with non-transfers
    for (int i = 0; i < 12; i++) begin
      @(negedge clk); v = 1; r = 1; dat = W'(100 + i);
      @(negedge clk); v = 1; r = 0; dat = W'(999);   // not a transfer
    end
    @(negedge clk); v = 0;
    chk(wp == 3'(12 % D), "write pointer after 12 transfers");
    chk(wrapped, "wrapped flag");
    // entries hold the last 8 transfers: 104..111 at addresses 4..7,0..3
    for (int a = 0; a < D; a++) begin
      @(negedge clk); ra = 3'(a);
      @(negedge clk);
      chk(rd == W'(a < 4 ? 108 + a : 100 + a), $sformatf("readback addr %0d = %0d", a, rd));
    end
    // freeze: further transfers are not copied
    @(negedge clk); fr = 1;
    @(negedge clk); chk(frozen, "frozen flag");
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); v = 1; r = 1; dat = W'(500 + i);
    end
    @(negedge clk); v = 0; ra = 3'd4;
    @(negedge clk);
    chk(wp == 3'd4, "pointer held while frozen");
    chk(rd == W'(104), "content held while frozen");
    fr = 0;
    @(negedge clk); v = 1; r = 1; dat = W'(777);
    @(negedge clk); v = 0;
    @(negedge clk);
    @(negedge clk);
    chk(rd == W'(777), "copying resumes after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
