// hf_cluster: clustering of one Hit Finder stream (the strips of one
// silicon layer). Following the document, each strip first has its pedestal
// subtracted and hot channels are suppressed; adjacent strips that remain
// form a cluster whose hit coordinate is the charge centre of gravity
// x = sum(Q_i x_i) / sum(Q_i), with a granularity of 1/16 of a strip
// (about 4 um at the 60 um pitch).
//
// Input words (widths from svt_pkg): {strip[STRIP_W-1:0], pulse height[PH_W-1:0]} in increasing
// strip order, closed by an End Event word. Output words: hits
// {layer, coord_hi, centroid[STRIP_W+3:0]}, then the End Event word passed
// through. A strip is kept when it is not masked and ph - pedestal > THRESH.
// A cluster closes on a gap, on a masked or dropped neighbour, after MAXLEN
// strips, or at End Event. One input word per cycle; a cluster leaves one
// cycle after the strip that closes it, and an End Event that closes a
// cluster is held one extra cycle. Pedestal and mask tables are written
// through cfg_*. Table layout, threshold, cluster length limit and the
// out-of-order check (err_invalid) are this design's choices.
module hf_cluster
  import svt_pkg::*;
#(
  parameter int MAXLEN  = 8,
  parameter int THRESH  = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [LAYER_W-1:0]        layer,
  input  logic [COORD_W-STRIP_W-5:0] coord_hi,
  input  logic                      cfg_we,
  input  logic [STRIP_W-1:0]        cfg_addr,
  input  logic [PH_W:0]             cfg_data,  // {hot-channel mask, pedestal}
  input  logic                      in_valid,
  output logic                      in_ready,
  input  word_t                     in_word,
  output logic                      out_valid,
  input  logic                      out_ready,
  output word_t                     out_word,
  output logic                      err_invalid
);
  localparam int LEN_W = $clog2(MAXLEN + 1);
  localparam int QS_W  = PH_W + LEN_W;          // sum of charges
  localparam int QI_W  = PH_W + 2 * LEN_W;      // sum of charge * offset
  localparam int NUM_W = QI_W + 4;

  logic [PH_W-1:0] ped  [2**STRIP_W];
  logic            mask [2**STRIP_W];

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      ped[cfg_addr]  <= cfg_data[PH_W-1:0];
      mask[cfg_addr] <= cfg_data[PH_W];
    end
  end

  // current input strip
  logic [STRIP_W-1:0] strip;
  logic [PH_W-1:0]    ph, q;
  logic               on;
  assign strip = in_word.data[STRIP_W+PH_W-1:PH_W];
  assign ph    = in_word.data[PH_W-1:0];
  assign q     = ph - ped[strip];
  assign on    = !mask[strip] && (ph > ped[strip]) && (q > PH_W'(THRESH));

  // open cluster
  logic               have_cl, seen_strip;
  logic [STRIP_W-1:0] first, last, prev;
  logic [LEN_W-1:0]   len;
  logic [QS_W-1:0]    sum_q;
  logic [QI_W-1:0]    sum_qi;

  logic [NUM_W-1:0]   num;
  logic [4+STRIP_W-1:0] centroid;
  assign num      = {sum_qi, 4'b0} + NUM_W'(sum_q >> 1);   // rounded
  assign centroid = {first, 4'b0} + (4+STRIP_W)'(num / NUM_W'(sum_q));

  wire can_out  = !out_valid || out_ready;
  wire hold_ee  = in_word.ee && have_cl;
  assign in_ready = can_out && !hold_ee;
  wire take     = in_valid && can_out;
  wire adjacent = have_cl && (strip == last + 1'b1) && (len < LEN_W'(MAXLEN));
  wire [COORD_W-1:0] hit_coord = {coord_hi, centroid};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_cl <= 1'b0; seen_strip <= 1'b0;
      first <= '0; last <= '0; prev <= '0; len <= '0; sum_q <= '0; sum_qi <= '0;
      out_valid <= 1'b0; out_word <= '0; err_invalid <= 1'b0;
    end else begin
      err_invalid <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        if (in_word.ee) begin
          out_valid <= 1'b1;
          if (have_cl) begin
            out_word <= mk_hit(layer, hit_coord);
            have_cl  <= 1'b0;
          end else begin
            out_word   <= in_word;
            seen_strip <= 1'b0;
          end
        end else begin
          if (seen_strip && strip <= prev) err_invalid <= 1'b1;
          seen_strip <= 1'b1;
          prev       <= strip;
          if (on) begin
            if (adjacent) begin
              last   <= strip;
              len    <= len + 1'b1;
              sum_q  <= sum_q + QS_W'(q);
              sum_qi <= sum_qi + QI_W'(q) * QI_W'(len);
            end else begin
              if (have_cl) begin
                out_valid <= 1'b1;
                out_word  <= mk_hit(layer, hit_coord);
              end
              have_cl <= 1'b1;
              first   <= strip;
              last    <= strip;
              len     <= LEN_W'(1);
              sum_q   <= QS_W'(q);
              sum_qi  <= '0;
            end
          end
        end
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_word));
endmodule
