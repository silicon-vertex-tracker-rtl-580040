// merger: Merger board. It merges the hit streams of the NIN Hit Finders of
// a sector with the XFT track stream into one event stream and sends
// identical copies to the AM Sequencer (port a) and to the Hit Buffer
// (port b), as the document describes.
//
// Every input has an input FIFO. Data words are forwarded round-robin, one
// per cycle, as soon as they arrive; an input that has reached its End Event
// waits until all inputs have, then one End Event leaves carrying the tag of
// input 0 and the OR of all input error bits plus this board's own errors
// (masked by ee_mask). The two outputs share one valid: a word moves only
// when both destinations are ready. err_out pulses FIFO-full (an input word
// refused) and invalid data (an XFT word that is not on the XFT layer, or a
// Hit Finder word on the XFT layer or above). The FIFO depth and the
// ordering policy are this design's choices.
module merger
  import svt_pkg::*;
#(
  parameter int NIN    = 3,
  parameter int FIFO_D = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NIN:0]     in_valid,   // NIN Hit Finders, then XFT (index NIN)
  output logic [NIN:0]     in_ready,
  input  word_t            in_word [NIN+1],
  output logic             out_valid,
  input  logic             out_ready_a,
  input  logic             out_ready_b,
  output word_t            out_word,
  input  logic [ERR_W-1:0] ee_mask,
  output logic [ERR_W-1:0] err_out
);
  localparam int N  = NIN + 1;
  localparam int PW = $clog2(N);

  logic [N-1:0] q_valid, q_ready, q_full;
  word_t        q_word [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    svt_fifo #(.W($bits(word_t)), .DEPTH(FIFO_D)) u_fifo (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_data(in_word[i]),
      .out_valid(q_valid[i]), .out_ready(q_ready[i]), .out_data(q_word[i]),
      .full(q_full[i]));
  end

  logic [N-1:0]     is_hit, at_ee;
  logic [PW-1:0]    rr, pick;
  logic             any_hit, all_ee;
  logic [ERR_W-1:0] ev_err, ee_err_in, err_now;
  ee_t              ee_x;
  logic [TAG_W-1:0] ee_tag;
  hit_t             h;
  wire  out_ready = out_ready_a && out_ready_b;
  wire  can_out   = !out_valid || out_ready;

  always_comb begin
    any_hit   = 1'b0;
    pick      = rr;
    ee_err_in = '0;
    for (int i = 0; i < N; i++) begin
      is_hit[i] = q_valid[i] && !q_word[i].ee;
      at_ee[i]  = q_valid[i] && q_word[i].ee;
      ee_x      = q_word[i].data;
      ee_err_in = ee_err_in | (q_word[i].ee ? ee_x.err : '0);
    end
    for (int k = N - 1; k >= 0; k--) begin
      if (is_hit[(int'(rr) + k) % N]) begin
        any_hit = 1'b1;
        pick    = PW'((int'(rr) + k) % N);
      end
    end
    all_ee = &at_ee;
    ee_x   = q_word[0].data;
    ee_tag = ee_x.tag;
    q_ready = '0;
    if (can_out) begin
      if (any_hit) q_ready[pick] = 1'b1;
      else if (all_ee) q_ready = '1;
    end
  end

  always_comb begin
    h = q_word[pick].data;
    err_now = '0;
    err_now[ERR_FIFO_FULL] = |(in_valid & ~in_ready);
    err_now[ERR_INVALID]   = can_out && any_hit &&
                             ((int'(pick) == NIN) ? (h.layer != XFT_LAYER) : (h.layer >= XFT_LAYER));
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
          out_word  <= q_word[pick];
          rr        <= (int'(pick) == N - 1) ? '0 : pick + 1'b1;
        end else if (all_ee) begin
          out_valid <= 1'b1;
          out_word  <= mk_ee(ee_tag, ee_err_in | ((ev_err | err_now) & ee_mask));
          ev_err    <= '0;
        end
      end
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_word));
endmodule
