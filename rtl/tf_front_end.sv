// tf_front_end: Front End processor of the Track Fitter. It receives
// Road-Info Packages (road header, then the road's hits) and turns each road
// into the six measurements a fit needs: four silicon coordinates, taken
// from the silicon layers listed in FIT_LAYERS, and the XFT curvature and
// phi. When a layer holds more than one hit, every combination (one hit per
// used layer, one XFT track) is written, one per cycle, into the combination
// FIFO that feeds the Fitter, as the document describes. A road lacking a
// hit on a used layer yields no combination. End Event words go through the
// same FIFO as marker entries, so the Fitter sees events in order.
//
// Up to MAXH hits per layer are kept; further hits are dropped and flagged
// (overflow). The XFT word's coordinate is read as {curvature[6:0],
// phi[10:0]}. Timing: one input word per cycle while collecting; a road is
// closed when the next header or the End Event arrives, then its
// combinations are queued one per cycle before the next word is taken.
// MAXH, the FIFO depth, the layer choice and the XFT field split are this
// design's choices.
module tf_front_end
  import svt_pkg::*;
#(
  parameter int                  MAXH       = 4,
  parameter int                  COMB_D     = 32,
  parameter logic [3:0][2:0]     FIT_LAYERS = {3'd3, 3'd2, 3'd1, 3'd0}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  word_t            in_word,
  output logic             out_valid,
  input  logic             out_ready,
  output comb_t            out_comb,
  output logic [ERR_W-1:0] err_out
);
  localparam int NL = 5;                 // 4 silicon layers + XFT
  localparam int CW = $clog2(MAXH + 1);
  localparam int IW = (MAXH > 1) ? $clog2(MAXH) : 1;

  logic [COORD_W-1:0] buf_x [NL][MAXH];
  logic [CW-1:0]      cnt   [NL];
  logic [IW-1:0]      idx   [NL];
  logic               open_road, enum_on;
  logic [ROAD_W-1:0]  road;

  // combination FIFO
  logic  f_valid, f_ready, f_full;
  comb_t f_comb;
  svt_fifo #(.W($bits(comb_t)), .DEPTH(COMB_D)) u_comb_fifo (
    .clk, .rst_n, .in_valid(f_valid), .in_ready(f_ready), .in_data(f_comb),
    .out_valid, .out_ready, .out_data(out_comb), .full(f_full));

  hit_t h;
  ee_t  e;
  assign h = in_word.data;
  assign e = in_word.data;

  // which buffer a hit goes to (NL = not used)
  int slot;
  always_comb begin
    slot = NL;
    if (h.layer == XFT_LAYER) slot = NL - 1;
    else for (int k = 0; k < 4; k++) if (h.layer == FIT_LAYERS[k]) slot = k;
  end

  logic all_have;
  always_comb begin
    all_have = 1'b1;
    for (int k = 0; k < NL; k++) if (cnt[k] == '0) all_have = 1'b0;
  end

  wire is_hdr  = !in_word.ee && h.layer == ROAD_TAG;
  wire closing = in_valid && (in_word.ee || is_hdr) && open_road;
  assign in_ready = !enum_on && !closing && (!in_word.ee || f_ready);

  // the combination being queued, or the End Event marker
  always_comb begin
    f_comb = '0;
    f_valid = 1'b0;
    if (enum_on) begin
      f_valid   = 1'b1;
      f_comb.road = road;
      for (int k = 0; k < 4; k++) f_comb.x[k] = buf_x[k][idx[k]];
      f_comb.x[4] = COORD_W'(buf_x[4][idx[4]][COORD_W-1:11]);  // curvature
      f_comb.x[5] = COORD_W'(buf_x[4][idx[4]][10:0]);           // phi
    end else if (in_valid && in_word.ee && !open_road) begin
      f_valid     = 1'b1;
      f_comb.ee   = 1'b1;
      f_comb.road = ROAD_W'({e.err, e.tag});
    end
  end

  // last combination of the mixed-radix count?
  logic last_comb;
  always_comb begin
    last_comb = 1'b1;
    for (int k = 0; k < NL; k++) if ((CW)'(idx[k]) != cnt[k] - 1'b1) last_comb = 1'b0;
  end

  always_comb begin
    err_out = '0;
    err_out[ERR_OVERFLOW]  = in_valid && in_ready && !in_word.ee && !is_hdr && slot < NL &&
                             cnt[slot] == CW'(MAXH);
    err_out[ERR_FIFO_FULL] = f_valid && f_full;
    err_out[ERR_INVALID]   = in_valid && in_ready && !in_word.ee && !is_hdr && !open_road;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready && !in_word.ee && !is_hdr && open_road && slot < NL &&
        cnt[slot] < CW'(MAXH))
      buf_x[slot][cnt[slot][IW-1:0]] <= h.coord;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_road <= 1'b0; enum_on <= 1'b0; road <= '0;
      for (int k = 0; k < NL; k++) begin cnt[k] <= '0; idx[k] <= '0; end
    end else if (enum_on) begin
      if (f_ready) begin
        if (last_comb) begin
          enum_on   <= 1'b0;
          open_road <= 1'b0;
          for (int k = 0; k < NL; k++) begin cnt[k] <= '0; idx[k] <= '0; end
        end else begin
          // increment the mixed-radix index, digit 0 fastest
          logic carry;
          carry = 1'b1;
          for (int k = 0; k < NL; k++) begin
            if (carry) begin
              if (CW'(idx[k]) == cnt[k] - 1'b1) idx[k] <= '0;
              else begin idx[k] <= idx[k] + 1'b1; carry = 1'b0; end
            end
          end
        end
      end
    end else if (closing) begin
      if (all_have) enum_on <= 1'b1;
      else begin
        open_road <= 1'b0;
        for (int k = 0; k < NL; k++) cnt[k] <= '0;
      end
    end else if (in_valid && in_ready) begin
      if (is_hdr) begin
        open_road <= 1'b1;
        road      <= h.coord[ROAD_W-1:0];
      end else if (!in_word.ee && open_road && slot < NL && cnt[slot] < CW'(MAXH)) begin
        cnt[slot] <= cnt[slot] + 1'b1;
      end
    end
  end
endmodule
