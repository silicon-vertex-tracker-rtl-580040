// err_monitor: error handling of one SVT board. Each board reports error
// conditions (FIFO full, parity error, invalid data, overflow) as one-cycle
// pulses on err_in. Following the four actions the document lists, the
// monitor can (1) latch them in a register read over the slow-control port,
// (2) ask the board to set them in the End Event word it sends, (3) pull the
// local SVT_ERROR line and (4) pull the global CDF_ERROR line. Which action is
// taken for which error bit is set by four enable masks written over the
// configuration bus (target CFG_ERR, addr[7:4] = BOARD_ID, addr[2:0] 0..3 = register, End Event,
// SVT_ERROR, CDF_ERROR masks; addr 4 clears the latched errors and releases
// the lines). The enables and the release-by-clear policy are this design's
// choices. Lines are registered: they rise one cycle after the error pulse
// and stay up until cleared.
module err_monitor
  import svt_pkg::*;
#(
  parameter logic [3:0] BOARD_ID = 4'd0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_t             cfg,
  input  logic [ERR_W-1:0] err_in,
  output logic [ERR_W-1:0] err_reg,     // VME-readable latched errors
  output logic [ERR_W-1:0] ee_mask,     // errors the board may write in End Event words
  output logic             svt_error,
  output logic             cdf_error
);
  logic [ERR_W-1:0] en_reg, en_ee, en_svt, en_cdf;

  wire sel = cfg.we && cfg.target == CFG_ERR && cfg.addr[7:4] == BOARD_ID;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_reg <= '1; en_ee <= '1; en_svt <= '1; en_cdf <= '0;
      err_reg <= '0; svt_error <= 1'b0; cdf_error <= 1'b0;
    end else begin
      if (sel && cfg.addr[2:0] == 3'd4) begin
        err_reg <= '0; svt_error <= 1'b0; cdf_error <= 1'b0;
      end else begin
        err_reg <= err_reg | (err_in & en_reg);
        if (|(err_in & en_svt)) svt_error <= 1'b1;
        if (|(err_in & en_cdf)) cdf_error <= 1'b1;
      end
      if (sel) begin
        unique case (cfg.addr[2:0])
          3'd0: en_reg <= cfg.data[ERR_W-1:0];
          3'd1: en_ee  <= cfg.data[ERR_W-1:0];
          3'd2: en_svt <= cfg.data[ERR_W-1:0];
          3'd3: en_cdf <= cfg.data[ERR_W-1:0];
          default: ;
        endcase
      end
    end
  end

  assign ee_mask = en_ee;
endmodule
