// hit_buffer: Hit Buffer board. It has two inputs: the full-resolution hits
// of an event (from the Merger) and the roads found by the AM (from the AM
// Sequencer). As the document describes, hits arrive first and are stored
// in a Hit List Memory organised by super-strip, so that all hits of one
// super-strip can be fetched together; when roads arrive, each road ID is
// looked up in a map giving its super-strip on every layer, the hits of
// those super-strips are fetched, and road ID plus hits leave as one
// Road-Info Package: a road header {ROAD_TAG, road ID} followed by its hits
// in layer order. The End Event word closes the event.
//
// How the lists are kept is this design's choice: hit memory entry i holds
// the hit and a link to the previous hit of the same super-strip, and a head
// table per (layer, super-strip) points to the newest one. The hit memory is
// refilled from entry 0 every event, so a head or link is trusted only if it
// points below the fill level and the entry really holds a hit of that
// super-strip; no table has to be cleared between events. Hits beyond
// HIT_DEPTH are dropped and flagged (overflow). Timing: one hit stored per
// cycle; per road, one header cycle, one lookup cycle per layer and one
// cycle per hit sent. The road map is written through the configuration bus
// (target CFG_HB, addr = {road ID, layer}, data = super-strip).
module hit_buffer
  import svt_pkg::*;
#(
  parameter int NROADS    = 32768,
  parameter int HIT_DEPTH = 1024,
  parameter int FIFO_D    = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_t             cfg,
  input  logic             hit_valid,
  output logic             hit_ready,
  input  word_t            hit_word,
  input  logic             road_valid,
  output logic             road_ready,
  input  word_t            road_word,
  output logic             out_valid,
  input  logic             out_ready,
  output word_t            out_word,
  input  logic [ERR_W-1:0] ee_mask,
  output logic [ERR_W-1:0] err_out
);
  localparam int RW = $clog2(NROADS);
  localparam int HW = $clog2(HIT_DEPTH);
  localparam int NSS = 2 ** SS_W;

  typedef struct packed {
    hit_t          hit;
    logic          has_prev;
    logic [HW-1:0] prev;
  } entry_t;

  logic [SS_W-1:0] road_map [NROADS][NLAYERS];
  logic [HW-1:0]   head     [NLAYERS][NSS];
  entry_t          hmem     [HIT_DEPTH];

  // ---------------- input FIFOs ----------------
  logic  hq_valid, hq_ready, hq_full, rq_valid, rq_ready, rq_full;
  word_t hq_word, rq_word;
  svt_fifo #(.W($bits(word_t)), .DEPTH(FIFO_D)) u_hfifo (
    .clk, .rst_n, .in_valid(hit_valid), .in_ready(hit_ready), .in_data(hit_word),
    .out_valid(hq_valid), .out_ready(hq_ready), .out_data(hq_word), .full(hq_full));
  svt_fifo #(.W($bits(word_t)), .DEPTH(FIFO_D)) u_rfifo (
    .clk, .rst_n, .in_valid(road_valid), .in_ready(road_ready), .in_data(road_word),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_data(rq_word), .full(rq_full));

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.target == CFG_HB && int'(cfg.addr[LAYER_W-1:0]) < NLAYERS)
      road_map[cfg.addr[RW+LAYER_W-1:LAYER_W]][cfg.addr[LAYER_W-1:0]] <= cfg.data[SS_W-1:0];
  end

  // is entry p a live hit of super-strip (l, s) in this event?
  logic [HW:0] fill;   // entries written this event
  function automatic logic live(logic [HW-1:0] p, logic [LAYER_W-1:0] l, logic [SS_W-1:0] s,
                                logic [HW:0] n, entry_t e);
    return ((HW+1)'(p) < n) && e.hit.layer == l && e.hit.coord[COORD_W-1:SS_SHIFT] == s;
  endfunction

  typedef enum logic [2:0] {S_HITS, S_ROAD, S_HDR, S_LOOK, S_SEND, S_EE} state_e;
  state_e state;

  // ---------------- hit storage ----------------
  hit_t            in_h;
  logic [SS_W-1:0] in_ss;
  logic [HW-1:0]   in_head;
  logic            in_head_live;
  assign in_h         = hq_word.data;
  assign in_ss        = in_h.coord[COORD_W-1:SS_SHIFT];
  assign in_head      = head[in_h.layer < LAYER_W'(NLAYERS) ? in_h.layer : '0][in_ss];
  assign in_head_live = live(in_head, in_h.layer, in_ss, fill, hmem[in_head]);
  wire   store        = state == S_HITS && hq_valid && !hq_word.ee &&
                        int'(in_h.layer) < NLAYERS && fill < (HW+1)'(HIT_DEPTH);
  assign hq_ready     = state == S_HITS && hq_valid;

  // ---------------- road processing ----------------
  logic [RW-1:0]      road;
  logic [LAYER_W-1:0] lay;
  logic [HW-1:0]      ptr;
  logic               ptr_ok;
  logic [SS_W-1:0]    cur_ss;
  logic [TAG_W-1:0]   tag;
  logic [ERR_W-1:0]   err_up, ev_err, err_now;
  ee_t                ee_hq, ee_rq;
  assign ee_hq = hq_word.data;
  assign ee_rq = rq_word.data;
  wire                can_out = !out_valid || out_ready;

  assign cur_ss = road_map[road][lay < LAYER_W'(NLAYERS) ? lay : '0];
  assign rq_ready = (state == S_ROAD) && rq_valid && can_out;

  always_comb begin
    err_now = '0;
    err_now[ERR_FIFO_FULL] = (hit_valid && hq_full) || (road_valid && rq_full);
    err_now[ERR_OVERFLOW]  = state == S_HITS && hq_valid && !hq_word.ee && fill >= (HW+1)'(HIT_DEPTH);
    err_now[ERR_INVALID]   = (state == S_HITS && hq_valid && !hq_word.ee && int'(in_h.layer) >= NLAYERS) ||
                             (rq_ready && !rq_word.ee && rq_word.data[DATA_W-1 -: LAYER_W] != ROAD_TAG);
  end
  assign err_out = err_now;

  always_ff @(posedge clk) begin
    if (store) begin
      hmem[fill[HW-1:0]] <= '{hit: in_h, has_prev: in_head_live, prev: in_head};
      head[in_h.layer][in_ss] <= fill[HW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HITS; fill <= '0; road <= '0; lay <= '0; ptr <= '0; ptr_ok <= 1'b0;
      tag <= '0; err_up <= '0; ev_err <= '0; out_valid <= 1'b0; out_word <= '0;
    end else begin
      ev_err <= ev_err | err_now;
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_HITS: if (hq_valid) begin
          if (hq_word.ee) begin
            tag    <= ee_hq.tag;
            err_up <= ee_hq.err;
            state  <= S_ROAD;
          end else if (store) begin
            fill <= fill + 1'b1;
          end
        end
        S_ROAD: if (rq_ready) begin
          if (rq_word.ee) begin
            out_valid <= 1'b1;
            out_word  <= mk_ee(tag, err_up | ee_rq.err | ((ev_err | err_now) & ee_mask));
            ev_err    <= '0;
            fill      <= '0;
            state     <= S_HITS;
          end else if (rq_word.data[DATA_W-1 -: LAYER_W] == ROAD_TAG) begin
            road      <= rq_word.data[RW-1:0];
            out_valid <= 1'b1;
            out_word  <= rq_word;
            lay       <= '0;
            state     <= S_LOOK;
          end
        end
        S_LOOK: begin
          // head of the list of this layer's super-strip
          ptr    <= head[lay][cur_ss];
          ptr_ok <= live(head[lay][cur_ss], lay, cur_ss, fill, hmem[head[lay][cur_ss]]);
          state  <= S_SEND;
        end
        S_SEND: if (can_out) begin
          if (ptr_ok) begin
            out_valid <= 1'b1;
            out_word  <= mk_hit(hmem[ptr].hit.layer, hmem[ptr].hit.coord);
            ptr       <= hmem[ptr].prev;
            ptr_ok    <= hmem[ptr].has_prev &&
                         live(hmem[ptr].prev, lay, cur_ss, fill, hmem[hmem[ptr].prev]);
          end else if (int'(lay) == NLAYERS - 1) begin
            state <= S_ROAD;
          end else begin
            lay   <= lay + 1'b1;
            state <= S_LOOK;
          end
        end
        default: state <= S_HITS;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_word));
endmodule
