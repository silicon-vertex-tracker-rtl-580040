// am_plug: AM plug mezzanine card carrying NCHIPS Associative Memory chips
// (8 in the document: 128 chips on 16 plugs per board). Opcodes and
// super-strips are broadcast to all chips. For the readout the plug is one
// node of the board's road tree: it shows the road of its lowest-numbered
// chip that has one, as {chip, pattern}, and forwards a READ only to that
// chip. Patterns are written with a plug-local address {chip, pattern}.
// Everything here is combinational apart from the chips; the priority order
// of the tree is this design's choice.
module am_plug
  import svt_pkg::*;
#(
  parameter int NCHIPS = 8,
  parameter int NPATT  = 128
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    pat_we,
  input  logic [$clog2(NCHIPS)+$clog2(NPATT)-1:0] pat_addr,
  input  logic [LAYER_W-1:0]                      pat_layer,
  input  logic [SS_W-1:0]                         pat_data,
  input  logic [LAYER_W-1:0]                      thresh,
  input  am_op_e                                  op,
  input  logic [LAYER_W-1:0]                      op_layer,
  input  logic [SS_W-1:0]                         op_ss,
  input  logic                                    rd_sel,
  output logic                                    road_valid,
  output logic [$clog2(NCHIPS)+$clog2(NPATT)-1:0] road_id
);
  localparam int CW = $clog2(NCHIPS);
  localparam int PW = $clog2(NPATT);

  logic [NCHIPS-1:0] c_valid, c_sel;
  logic [PW-1:0]     c_id [NCHIPS];
  logic [CW-1:0]     win;

  for (genvar c = 0; c < NCHIPS; c++) begin : g_chip
    am_chip #(.NPATT(NPATT)) u_chip (
      .clk, .rst_n,
      .pat_we(pat_we && pat_addr[CW+PW-1:PW] == CW'(c)), .pat_addr(pat_addr[PW-1:0]),
      .pat_layer, .pat_data, .thresh,
      .op, .op_layer, .op_ss,
      .rd_sel(c_sel[c]), .road_valid(c_valid[c]), .road_id(c_id[c]));
  end

  always_comb begin
    road_valid = 1'b0;
    win        = '0;
    for (int c = NCHIPS - 1; c >= 0; c--) begin
      if (c_valid[c]) begin
        road_valid = 1'b1;
        win        = CW'(c);
      end
    end
  end

  assign road_id = {win, c_id[win]};

  always_comb begin
    c_sel      = '0;
    c_sel[win] = rd_sel && road_valid;
  end
endmodule
