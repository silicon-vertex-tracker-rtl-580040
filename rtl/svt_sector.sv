// svt_sector: one SVT sector, the tracking of one 30 degree phi wedge. The
// boards are chained as in the document's system diagram:
//
//   3 x hit_finder --+
//   XFT tracks ------+--> merger --+--> am_sequencer <--> 2 x am_board
//                                  |          | roads
//                                  +--> hit_buffer --> track_fitter --> tracks
//
// The Merger sends one copy of each event to the AM Sequencer and one to the
// Hit Buffer; the AM system finds roads, the Hit Buffer attaches the
// full-resolution hits of each road, and the Track Fitter fits them. Boards
// talk over the uniform valid/ready link of svt_pkg, so the sector is data
// driven: every board works as soon as its input words arrive.
//
// Every board except the AM boards has spy buffers on its links (the AM
// boards talk synchronously to the sequencer); all are frozen by spy_freeze.
// Spy readback: a CFG_SPY write selects buffer addr[13:10] and entry
// addr[9:0] (SPY_D = 1024); spy_rdata shows it two cycles later. Buffers:
// 0-2 Hit Finder inputs, 3-5 Hit Finder outputs, 6 XFT input, 7 Merger
// output, 8 AM Sequencer output, 9 Hit Buffer output, 10 Track Fitter
// output. Each board has an err_monitor (board ids 0-2 Hit Finders, 3
// Merger, 4 AM Sequencer, 5 Hit Buffer, 6 Track Fitter); their SVT_ERROR
// and CDF_ERROR lines are ORed to svt_error and cdf_error and their
// registers read on err_regs. The spy depth and readback map are this
// design's choices.
module svt_sector
  import svt_pkg::*;
#(
  parameter int NHF       = 3,
  parameter int NBOARDS   = 2,
  parameter int NPLUGS    = 16,
  parameter int NCHIPS    = 8,
  parameter int NPATT     = 128,
  parameter int HIT_DEPTH = 1024,
  parameter int SPY_D     = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  cfg_t                  cfg,
  input  logic [NHF-1:0]        hf_valid,
  output logic [NHF-1:0]        hf_ready,
  input  raw_t                  hf_raw [NHF],
  input  logic                  xft_valid,
  output logic                  xft_ready,
  input  word_t                 xft_word,
  output logic                  trk_valid,
  input  logic                  trk_ready,
  output track_t                trk,
  output logic                  trk_rejected,
  input  logic                  spy_freeze,
  output logic [$bits(track_t)-1:0] spy_rdata,
  output logic [7*ERR_W-1:0]    err_regs,
  output logic                  svt_error,
  output logic                  cdf_error
);
  localparam int BAW    = $clog2(NPLUGS) + $clog2(NCHIPS) + $clog2(NPATT);
  localparam int NROADS = NBOARDS * (2 ** BAW);
  localparam int NB     = 7;      // boards with an error monitor
  localparam int SW     = $bits(track_t);
  localparam int NSPY   = 11;
  localparam int SAW    = $clog2(SPY_D);

  logic [ERR_W-1:0] b_err [NB], b_mask [NB];
  logic [NB-1:0]    b_svt, b_cdf;

  // ---------------- Hit Finders ----------------
  logic [NHF-1:0] hfo_valid, hfo_ready;
  word_t          hfo_word [NHF];
  for (genvar i = 0; i < NHF; i++) begin : g_hf
    hit_finder #(.HF_ID(2'(i))) u_hf (
      .clk, .rst_n, .cfg,
      .in_valid(hf_valid[i]), .in_ready(hf_ready[i]), .in_raw(hf_raw[i]),
      .out_valid(hfo_valid[i]), .out_ready(hfo_ready[i]), .out_word(hfo_word[i]),
      .ee_mask(b_mask[i]), .err_out(b_err[i]));
  end

  // ---------------- Merger ----------------
  logic [NHF:0] m_in_valid, m_in_ready;
  word_t        m_in_word [NHF+1];
  logic         m_valid, ams_in_ready, hb_hit_ready;
  word_t        m_word;
  always_comb begin
    for (int i = 0; i < NHF; i++) begin
      m_in_valid[i] = hfo_valid[i];
      m_in_word[i]  = hfo_word[i];
      hfo_ready[i]  = m_in_ready[i];
    end
    m_in_valid[NHF] = xft_valid;
    m_in_word[NHF]  = xft_word;
    xft_ready       = m_in_ready[NHF];
  end

  merger #(.NIN(NHF)) u_merger (
    .clk, .rst_n, .in_valid(m_in_valid), .in_ready(m_in_ready), .in_word(m_in_word),
    .out_valid(m_valid), .out_ready_a(ams_in_ready), .out_ready_b(hb_hit_ready), .out_word(m_word),
    .ee_mask(b_mask[3]), .err_out(b_err[3]));

  // ---------------- AM system ----------------
  am_op_e             am_op;
  logic [LAYER_W-1:0] am_layer, am_thresh, pat_layer;
  logic [SS_W-1:0]    am_ss, pat_data;
  logic [NBOARDS-1:0] am_rd_sel, pat_we, road_v;
  logic [BAW-1:0]     pat_addr;
  logic [BAW-1:0]     road_id [NBOARDS];
  logic               r_valid, r_ready;
  word_t              r_word;

  am_sequencer #(.NBOARDS(NBOARDS), .BAW(BAW)) u_ams (
    .clk, .rst_n, .cfg,
    .in_valid(m_valid && hb_hit_ready), .in_ready(ams_in_ready), .in_word(m_word),
    .out_valid(r_valid), .out_ready(r_ready), .out_word(r_word),
    .am_op, .am_layer, .am_ss, .am_rd_sel, .am_thresh,
    .pat_we, .pat_addr, .pat_layer, .pat_data,
    .road_valid(road_v), .road_id,
    .ee_mask(b_mask[4]), .err_out(b_err[4]));

  for (genvar b = 0; b < NBOARDS; b++) begin : g_amb
    am_board #(.NPLUGS(NPLUGS), .NCHIPS(NCHIPS), .NPATT(NPATT)) u_amb (
      .clk, .rst_n,
      .pat_we(pat_we[b]), .pat_addr, .pat_layer, .pat_data, .thresh(am_thresh),
      .op(am_op), .op_layer(am_layer), .op_ss(am_ss),
      .rd_sel(am_rd_sel[b]), .road_valid(road_v[b]), .road_id(road_id[b]));
  end

  // ---------------- Hit Buffer ----------------
  logic  hb_valid, hb_ready;
  word_t hb_word;
  hit_buffer #(.NROADS(NROADS), .HIT_DEPTH(HIT_DEPTH)) u_hb (
    .clk, .rst_n, .cfg,
    .hit_valid(m_valid && ams_in_ready), .hit_ready(hb_hit_ready), .hit_word(m_word),
    .road_valid(r_valid), .road_ready(r_ready), .road_word(r_word),
    .out_valid(hb_valid), .out_ready(hb_ready), .out_word(hb_word),
    .ee_mask(b_mask[5]), .err_out(b_err[5]));

  // ---------------- Track Fitter ----------------
  track_fitter u_tf (
    .clk, .rst_n, .cfg,
    .in_valid(hb_valid), .in_ready(hb_ready), .in_word(hb_word),
    .out_valid(trk_valid), .out_ready(trk_ready), .out_track(trk), .rejected(trk_rejected),
    .ee_mask(b_mask[6]), .err_out(b_err[6]));

  // ---------------- error monitors ----------------
  for (genvar b = 0; b < NB; b++) begin : g_err
    err_monitor #(.BOARD_ID(4'(b))) u_err (
      .clk, .rst_n, .cfg, .err_in(b_err[b]),
      .err_reg(err_regs[b*ERR_W +: ERR_W]), .ee_mask(b_mask[b]),
      .svt_error(b_svt[b]), .cdf_error(b_cdf[b]));
  end
  assign svt_error = |b_svt;
  assign cdf_error = |b_cdf;

  // ---------------- spy buffers ----------------
  logic [NSPY-1:0] s_valid, s_ready;
  logic [SW-1:0]   s_data [NSPY];
  logic [SW-1:0]   s_rd   [NSPY];
  logic [3:0]      spy_sel, spy_sel_q;
  logic [SAW-1:0]  spy_addr;

  always_comb begin
    for (int i = 0; i < NHF; i++) begin
      s_valid[i] = hf_valid[i];    s_ready[i] = hf_ready[i];    s_data[i] = SW'(hf_raw[i]);
      s_valid[3+i] = hfo_valid[i]; s_ready[3+i] = hfo_ready[i]; s_data[3+i] = SW'(hfo_word[i]);
    end
    s_valid[6] = xft_valid; s_ready[6] = xft_ready;  s_data[6] = SW'(xft_word);
    s_valid[7] = m_valid;   s_ready[7] = ams_in_ready && hb_hit_ready; s_data[7] = SW'(m_word);
    s_valid[8] = r_valid;   s_ready[8] = r_ready;    s_data[8] = SW'(r_word);
    s_valid[9] = hb_valid;  s_ready[9] = hb_ready;   s_data[9] = SW'(hb_word);
    s_valid[10] = trk_valid; s_ready[10] = trk_ready; s_data[10] = trk;
  end

  for (genvar i = 0; i < NSPY; i++) begin : g_spy
    spy_buffer #(.W(SW), .DEPTH(SPY_D)) u_spy (
      .clk, .rst_n,
      .link_valid(s_valid[i]), .link_ready(s_ready[i]), .link_data(s_data[i]),
      .freeze(spy_freeze), .rd_addr(spy_addr), .rd_data(s_rd[i]),
      .wr_ptr(), .wrapped(), .frozen());
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spy_sel <= '0; spy_sel_q <= '0; spy_addr <= '0;
    end else begin
      if (cfg.we && cfg.target == CFG_SPY) begin
        spy_sel  <= cfg.addr[SAW+3:SAW];
        spy_addr <= cfg.addr[SAW-1:0];
      end
      spy_sel_q <= spy_sel;
    end
  end
  assign spy_rdata = (int'(spy_sel_q) < NSPY) ? s_rd[spy_sel_q] : '0;
endmodule
