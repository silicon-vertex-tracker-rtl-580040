// hit_finder: one Hit Finder board. It receives the sparsified strip data of
// its part of a 30 degree sector from the optical link receiver, rearranges
// them into NSTREAMS parallel streams (one per layer stream), clusters all
// streams in parallel (hf_cluster: pedestal subtraction, hot channel
// suppression, charge centroid) and merges the hits found into a single
// output stream closed by one End Event word, as the document describes.
//
// Input: raw_t words {stream, strip, pulse height}; an End Event raw word is
// copied to every stream. Stream s maps to silicon layer s % 5 and z-zone
// s / 5, and the hit coordinate is {HF_ID, zone, centroid} (this mapping is
// this design's choice). The merge takes hits round-robin, one per cycle,
// and emits the End Event only when every stream has reached it; the End
// Event carries the tag of the input End Event and the board's error bits
// seen in this event, masked by ee_mask. err_out pulses FIFO-full (input
// word refused, reported when the target stream FIFO is full) and invalid-data (unknown stream, strips out of order).
module hit_finder
  import svt_pkg::*;
#(
  parameter logic [1:0] HF_ID    = 2'd0,
  parameter int         NSTREAMS = 10,
  parameter int         FIFO_D   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_t             cfg,       // target CFG_HF0 + HF_ID, addr = {stream[3:0], strip}, data = {mask, pedestal}
  input  logic             in_valid,
  output logic             in_ready,
  input  raw_t             in_raw,
  output logic             out_valid,
  input  logic             out_ready,
  output word_t            out_word,
  input  logic [ERR_W-1:0] ee_mask,
  output logic [ERR_W-1:0] err_out
);
  localparam int NZONE = (NSTREAMS + NSIL - 1) / NSIL;
  localparam int ZW    = COORD_W - STRIP_W - 4 - 2;

  // ---------------- demultiplex into stream FIFOs ----------------
  logic [NSTREAMS-1:0] f_in_valid, f_in_ready, c_in_valid, c_in_ready;
  word_t               f_out [NSTREAMS];
  word_t               in_w;
  logic [NSTREAMS-1:0] f_full;  // refused words are flagged from in_ready below
  logic                bad_stream;

  assign in_w.ee   = in_raw.ee;
  assign in_w.data = DATA_W'({in_raw.strip, in_raw.ph});
  assign bad_stream = !in_raw.ee && (int'(in_raw.stream) >= NSTREAMS);

  always_comb begin
    in_ready   = 1'b1;
    f_in_valid = '0;
    if (in_raw.ee) begin
      in_ready   = &f_in_ready;
      f_in_valid = in_valid && in_ready ? '1 : '0;
    end else if (!bad_stream) begin
      in_ready = f_in_ready[in_raw.stream];
      f_in_valid[in_raw.stream] = in_valid;
    end
  end

  // ---------------- parallel clustering ----------------
  logic [NSTREAMS-1:0] c_out_valid, c_out_ready, c_err;
  word_t               c_out [NSTREAMS];

  for (genvar s = 0; s < NSTREAMS; s++) begin : g_stream
    localparam logic [LAYER_W-1:0] LAYER = LAYER_W'(s % NSIL);
    localparam logic [ZW-1:0]      ZONE  = ZW'(s / NSIL);
    wire ped_we = cfg.we && cfg.target == cfg_target_e'(int'(CFG_HF0) + int'(HF_ID))
                  && cfg.addr[STRIP_W+3:STRIP_W] == 4'(s);

    svt_fifo #(.W($bits(word_t)), .DEPTH(FIFO_D)) u_fifo (
      .clk, .rst_n,
      .in_valid(f_in_valid[s]), .in_ready(f_in_ready[s]), .in_data(in_w),
      .out_valid(c_in_valid[s]), .out_ready(c_in_ready[s]), .out_data(f_out[s]),
      .full(f_full[s]));

    hf_cluster u_cl (
      .clk, .rst_n,
      .layer(LAYER), .coord_hi({HF_ID, ZONE}),
      .cfg_we(ped_we), .cfg_addr(cfg.addr[STRIP_W-1:0]), .cfg_data(cfg.data[PH_W:0]),
      .in_valid(c_in_valid[s]), .in_ready(c_in_ready[s]), .in_word(f_out[s]),
      .out_valid(c_out_valid[s]), .out_ready(c_out_ready[s]), .out_word(c_out[s]),
      .err_invalid(c_err[s]));
  end

  // ---------------- merge ----------------
  logic [NSTREAMS-1:0] is_hit, at_ee;
  logic [$clog2(NSTREAMS)-1:0] rr, pick;
  logic                any_hit, all_ee;
  logic [ERR_W-1:0]    ev_err, ee_err_in;
  logic [TAG_W-1:0]    ee_tag;
  ee_t                 ee_x;
  wire  can_out = !out_valid || out_ready;

  always_comb begin
    any_hit = 1'b0;
    pick    = rr;
    ee_err_in = '0;
    for (int i = 0; i < NSTREAMS; i++) begin
      is_hit[i] = c_out_valid[i] && !c_out[i].ee;
      at_ee[i]  = c_out_valid[i] && c_out[i].ee;
      ee_x      = c_out[i].data;
      ee_err_in = ee_err_in | (c_out[i].ee ? ee_x.err : '0);
    end
    // round-robin: first hit stream at or after rr
    for (int k = NSTREAMS - 1; k >= 0; k--) begin
      int idx;
      idx = (int'(rr) + k) % NSTREAMS;
      if (is_hit[idx]) begin
        any_hit = 1'b1;
        pick    = $clog2(NSTREAMS)'(idx);
      end
    end
    all_ee = &at_ee;
    ee_x   = c_out[0].data;
    ee_tag = ee_x.tag;
    c_out_ready = '0;
    if (can_out) begin
      if (any_hit) c_out_ready[pick] = 1'b1;
      else if (all_ee) c_out_ready = '1;
    end
  end

  // errors of this board
  logic [ERR_W-1:0] err_now;
  always_comb begin
    err_now = '0;
    err_now[ERR_FIFO_FULL] = in_valid && !in_ready && !bad_stream && (|f_full);
    err_now[ERR_INVALID]   = (in_valid && bad_stream) || (|c_err);
  end
  assign err_out = err_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_word <= '0; rr <= '0; ev_err <= '0;
    end else begin
      ev_err <= ev_err | err_now;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (can_out) begin
        if (any_hit) begin
          out_valid <= 1'b1;
          out_word  <= c_out[pick];
          rr        <= (int'(pick) == NSTREAMS - 1) ? '0 : pick + 1'b1;
        end else if (all_ee) begin
          out_valid <= 1'b1;
          out_word  <= mk_ee(ee_tag, ee_err_in | ((ev_err | err_now) & ee_mask));
          ev_err    <= '0;
        end
      end
    end
  end
endmodule
