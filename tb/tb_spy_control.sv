// tb_spy_control: a master and a slave Spy Control board wired through the
// global freeze line: command freeze, global propagation, release,
// auto-freeze on SVT_ERROR and the CDF_ERROR line.
module tb_spy_control;
  logic clk = 0, rst_n = 0;
  logic cf [2], cr [2], sv [2], fo [2], go [2], ce [2];
  logic afe, gline;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  assign gline = go[0] | go[1];
  spy_control #(.MASTER(1'b1)) u_m (.clk, .rst_n, .cmd_freeze(cf[0]), .cmd_release(cr[0]),
    .auto_freeze_en(afe), .svt_error(sv[0]), .global_freeze_in(gline),
    .freeze_out(fo[0]), .global_freeze_out(go[0]), .cdf_error_out(ce[0]));
  spy_control #(.MASTER(1'b0)) u_s (.clk, .rst_n, .cmd_freeze(cf[1]), .cmd_release(cr[1]),
    .auto_freeze_en(afe), .svt_error(sv[1]), .global_freeze_in(gline),
    .freeze_out(fo[1]), .global_freeze_out(go[1]), .cdf_error_out(ce[1]));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic release_all();
    @(negedge clk); cr[0] = 1; cr[1] = 1;
    @(negedge clk); cr[0] = 0; cr[1] = 0;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin cf[i] = 0; cr[i] = 0; sv[i] = 0; end
    afe = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!fo[0] && !fo[1], "not frozen after reset");
    // slave local freeze stays local
    cf[1] = 1; @(negedge clk); cf[1] = 0;
    chk(fo[1] && !fo[0], "slave freezes its own crate only");
    chk(!go[1], "slave does not drive global line");
    release_all();
    chk(!fo[1], "released");
    // master freeze propagates
    cf[0] = 1; @(negedge clk); cf[0] = 0;
    chk(fo[0] && go[0], "master frozen and drives global line");
    @(negedge clk);
    chk(fo[1], "slave follows global freeze");
    release_all();
    @(negedge clk);
    chk(!fo[0] && !fo[1], "both released");
    // error without auto freeze: CDF_ERROR only
    sv[1] = 1; @(negedge clk);
    chk(ce[1] && !fo[1], "CDF_ERROR from SVT_ERROR, no freeze");
    sv[1] = 0; @(negedge clk);
    // auto freeze in master crate freezes everything
    afe = 1; sv[0] = 1; @(negedge clk); sv[0] = 0;
    @(negedge clk);
    chk(fo[0] && fo[1], "auto-freeze in master crate freezes all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
