// am_chip: one Associative Memory chip. It stores NPATT patterns of NLAYERS
// words (128 patterns of 6 12-bit words in the document; 5 silicon layers
// and the XFT layer). Every super-strip sent to the chip is compared with
// the word of its layer in all patterns at once; a pattern remembers which
// layers have matched during the event. A pattern whose number of matched
// layers reaches 'thresh' is a road (thresh = 6 asks for 6 of 6 layers,
// thresh = 5 for 5 of 6, the chip's tunable majority). Pattern recognition
// is therefore complete one cycle after the last super-strip.
//
// Opcodes (am_op_e): INIT clears the layer flags and read flags; DATA
// compares op_ss with layer op_layer; READ, when this chip is selected
// (rd_sel), retires the road shown on road_id. road_valid/road_id show the
// lowest-numbered unread road, combinationally from the flags. Patterns are
// written one word at a time through pat_*; a pattern slot takes part in
// matching once a word has been written to it after reset. The full-custom circuit of the
// document is modelled here by its logic function; the opcode set, the
// lowest-first readout order and the pattern write port are this design's
// choices.
module am_chip
  import svt_pkg::*;
#(
  parameter int NPATT = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pat_we,
  input  logic [$clog2(NPATT)-1:0] pat_addr,
  input  logic [LAYER_W-1:0]       pat_layer,
  input  logic [SS_W-1:0]          pat_data,
  input  logic [LAYER_W-1:0]       thresh,
  input  am_op_e                   op,
  input  logic [LAYER_W-1:0]       op_layer,
  input  logic [SS_W-1:0]          op_ss,
  input  logic                     rd_sel,
  output logic                     road_valid,
  output logic [$clog2(NPATT)-1:0] road_id
);
  localparam int AW = $clog2(NPATT);

  logic [SS_W-1:0]    patt  [NPATT][NLAYERS];
  logic [NLAYERS-1:0] lflag [NPATT];
  logic [NPATT-1:0]   done;
  logic [NPATT-1:0]   loaded;  // pattern holds downloaded words; empty slots never match
  logic [NPATT-1:0]   match;

  always_ff @(posedge clk) begin
    if (pat_we && int'(pat_layer) < NLAYERS) patt[pat_addr][pat_layer] <= pat_data;
  end

  always_comb begin
    for (int p = 0; p < NPATT; p++)
      match[p] = loaded[p] && ($countones(lflag[p]) >= int'(thresh)) && !done[p];
  end

  always_comb begin
    road_valid = 1'b0;
    road_id    = '0;
    for (int p = NPATT - 1; p >= 0; p--) begin
      if (match[p]) begin
        road_valid = 1'b1;
        road_id    = AW'(p);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPATT; p++) lflag[p] <= '0;
      done   <= '0;
      loaded <= '0;
    end else begin
      if (pat_we) loaded[pat_addr] <= 1'b1;
      unique case (op)
        AM_INIT: begin
          for (int p = 0; p < NPATT; p++) lflag[p] <= '0;
          done <= '0;
        end
        AM_DATA: begin
          for (int p = 0; p < NPATT; p++)
            for (int l = 0; l < NLAYERS; l++)
              if (int'(op_layer) == l && patt[p][l] == op_ss) lflag[p][l] <= 1'b1;
        end
        AM_READ: if (rd_sel && road_valid) done[road_id] <= 1'b1;
        default: ;
      endcase
    end
  end
endmodule
