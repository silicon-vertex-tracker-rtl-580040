// track_fitter: Track Fitter board. It turns each Road-Info Package into
// fitted tracks: the Front End processor (tf_front_end) builds the hit
// combinations of the road and queues them in a FIFO, the Fitter
// (tf_fitter) computes the three track parameters and three chi components
// of one combination per cycle with six parallel scalar products, and the
// Output processor (tf_output) forms the total chi-square and drops tracks
// that fail the cut. Surviving tracks and one End Event marker per event go
// to the Level 2 decision logic. The board's own errors (FIFO full,
// overflow, invalid data), masked by ee_mask, are added to the error bits of
// the End Event marker. Latency from the end of a road to its first track:
// the combination FIFO plus two register stages.
module track_fitter
  import svt_pkg::*;
#(
  parameter int MAXH   = 4,
  parameter int COMB_D = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_t             cfg,
  input  logic             in_valid,
  output logic             in_ready,
  input  word_t            in_word,
  output logic             out_valid,
  input  logic             out_ready,
  output track_t           out_track,
  output logic             rejected,
  input  logic [ERR_W-1:0] ee_mask,
  output logic [ERR_W-1:0] err_out
);
  logic  c_valid, c_ready;
  comb_t c_comb;
  logic  f_valid, f_ready, f_ee;
  logic [ROAD_W-1:0] f_road;
  logic signed [PAR_W-1:0] f_par [3], f_chi [3];
  track_t t;
  logic [ERR_W-1:0] ev_err;
  ee_t e;

  tf_front_end #(.MAXH(MAXH), .COMB_D(COMB_D)) u_fe (
    .clk, .rst_n, .in_valid, .in_ready, .in_word,
    .out_valid(c_valid), .out_ready(c_ready), .out_comb(c_comb), .err_out);

  tf_fitter u_fit (
    .clk, .rst_n, .cfg,
    .in_valid(c_valid), .in_ready(c_ready), .in_comb(c_comb),
    .out_valid(f_valid), .out_ready(f_ready), .out_ee(f_ee), .out_road(f_road),
    .out_par(f_par), .out_chi(f_chi));

  tf_output u_out (
    .clk, .rst_n, .cfg,
    .in_valid(f_valid), .in_ready(f_ready), .in_ee(f_ee), .in_road(f_road),
    .in_par(f_par), .in_chi(f_chi),
    .out_valid, .out_ready, .out_track(t), .rejected);

  // add this board's errors to the End Event marker
  always_comb begin
    out_track = t;
    e = '0;
    e.tag = t.road[TAG_W-1:0];
    e.err = t.road[TAG_W+ERR_W-1:TAG_W] | ((ev_err | err_out) & ee_mask);
    if (t.ee) out_track.road = ROAD_W'({e.err, e.tag});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ev_err <= '0;
    else if (out_valid && out_ready && t.ee) ev_err <= '0;
    else ev_err <= ev_err | err_out;
  end
endmodule
