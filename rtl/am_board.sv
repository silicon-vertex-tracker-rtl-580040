// am_board: AM board. It houses NPLUGS AM plugs (16 in the document) of
// NCHIPS chips each (8), i.e. 128 AM chips and 16k patterns; two boards form
// the 32k-pattern memory of a sector. The board receives opcodes and
// super-strips from the AM Sequencer over the backplane every cycle
// (synchronous, no FIFO) and broadcasts them to all plugs. Its road output
// is the next level of the readout tree: the road of the lowest-numbered
// plug that has one, as {plug, chip, pattern}; READ goes to that plug only.
// Pattern writes use a board-local address {plug, chip, pattern}. Road
// readout is combinational through the tree, so one road can be retired per
// cycle; the tree order is this design's choice.
module am_board
  import svt_pkg::*;
#(
  parameter int NPLUGS = 16,
  parameter int NCHIPS = 8,
  parameter int NPATT  = 128,
  localparam int AW = $clog2(NPLUGS) + $clog2(NCHIPS) + $clog2(NPATT)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pat_we,
  input  logic [AW-1:0]      pat_addr,
  input  logic [LAYER_W-1:0] pat_layer,
  input  logic [SS_W-1:0]    pat_data,
  input  logic [LAYER_W-1:0] thresh,
  input  am_op_e             op,
  input  logic [LAYER_W-1:0] op_layer,
  input  logic [SS_W-1:0]    op_ss,
  input  logic               rd_sel,
  output logic               road_valid,
  output logic [AW-1:0]      road_id
);
  localparam int GW = $clog2(NPLUGS);
  localparam int LW = AW - GW;

  logic [NPLUGS-1:0] g_valid, g_sel;
  logic [LW-1:0]     g_id [NPLUGS];
  logic [GW-1:0]     win;

  for (genvar g = 0; g < NPLUGS; g++) begin : g_plug
    am_plug #(.NCHIPS(NCHIPS), .NPATT(NPATT)) u_plug (
      .clk, .rst_n,
      .pat_we(pat_we && pat_addr[AW-1:LW] == GW'(g)), .pat_addr(pat_addr[LW-1:0]),
      .pat_layer, .pat_data, .thresh,
      .op, .op_layer, .op_ss,
      .rd_sel(g_sel[g]), .road_valid(g_valid[g]), .road_id(g_id[g]));
  end

  always_comb begin
    road_valid = 1'b0;
    win        = '0;
    for (int g = NPLUGS - 1; g >= 0; g--) begin
      if (g_valid[g]) begin
        road_valid = 1'b1;
        win        = GW'(g);
      end
    end
  end

  assign road_id = {win, g_id[win]};

  always_comb begin
    g_sel      = '0;
    g_sel[win] = rd_sel && road_valid;
  end
endmodule
