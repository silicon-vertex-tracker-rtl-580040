// tb_err_monitor: checks the four error actions of a board: the latched
// register, the End Event mask, the SVT_ERROR and CDF_ERROR lines, their
// enables, and clearing.
module tb_err_monitor;
  import svt_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic [ERR_W-1:0] err_in, err_reg, ee_mask;
  logic svt_error, cdf_error;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  err_monitor #(.BOARD_ID(4'd5)) dut (.clk, .rst_n, .cfg, .err_in, .err_reg, .ee_mask, .svt_error, .cdf_error);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [3:0] board, input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); cfg.we = 1; cfg.target = CFG_ERR; cfg.addr = {12'd0, board, 1'b0, a}; cfg.data = d;
    @(negedge clk); cfg.we = 0;
  endtask
  task automatic pulse(input logic [ERR_W-1:0] e);
    @(negedge clk); err_in = e;
    @(negedge clk); err_in = '0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; err_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!svt_error && !cdf_error && err_reg == 0, "quiet after reset");
    chk(ee_mask == 4'hF, "End Event mask reset value");
    pulse(4'b0100);
    chk(err_reg == 4'b0100, "error latched in register");
    chk(svt_error, "SVT_ERROR raised");
    chk(!cdf_error, "CDF_ERROR off by default");
    pulse(4'b0001);
    chk(err_reg == 4'b0101, "second error accumulates");
    // clear
    wr(4'd5, 3'd4, 0);
    chk(err_reg == 0 && !svt_error, "cleared");
    // another board's id is ignored
    wr(4'd2, 3'd3, 32'hF);
    pulse(4'b1000);
    chk(!cdf_error, "write to another board ignored");
    wr(4'd5, 3'd4, 0);
    // enable CDF_ERROR for bit 1 only, SVT_ERROR off for bit 1
    wr(4'd5, 3'd3, 32'h2);
    wr(4'd5, 3'd2, 32'hD);
    wr(4'd5, 3'd1, 32'h6);
    chk(ee_mask == 4'h6, "End Event mask written");
    pulse(4'b0010);
    chk(cdf_error, "CDF_ERROR for enabled bit");
    chk(!svt_error, "SVT_ERROR masked");
    wr(4'd5, 3'd4, 0);
    wr(4'd5, 3'd0, 32'h1);
    pulse(4'b0110);
    chk(err_reg == 4'b0000, "register mask hides bits 1,2");
    pulse(4'b0001);
    chk(err_reg == 4'b0001 && svt_error, "register and SVT_ERROR for bit 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
