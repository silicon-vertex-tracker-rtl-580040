// am_sequencer: AM Sequencer, the interface and manager of the pattern
// recognition of one sector. It receives the merged hit stream, converts each
// hit to a coarse super-strip (coordinate >> SS_SHIFT, 4 strips or about
// 250 um, 12 bits) and sends it with the DATA opcode to the NBOARDS AM
// boards over the backplane. When the End Event word arrives all super-strips
// have been sent, and the sequencer reads the roads out of the boards, one
// per cycle (READ opcode to the board whose road is shown), sending each as
// a road header {ROAD_TAG, road ID} to the Hit Buffer, followed by the End
// Event word. It then issues INIT to clear the boards for the next event.
//
// It also downloads patterns (configuration target CFG_AM, addr =
// {road ID, layer}, data = super-strip) and holds the majority threshold
// (CFG_AMCTL, reset value 6 = all layers). Road ID = {board, plug, chip,
// pattern}. Timing: one hit per cycle in, roads one per cycle out, one INIT
// cycle between events. The opcode encoding, the order of readout and the
// INIT placement are this design's choices.
module am_sequencer
  import svt_pkg::*;
#(
  parameter int NBOARDS = 2,
  parameter int BAW     = 14,   // board-local road address bits
  parameter int FIFO_D  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_t               cfg,
  input  logic               in_valid,
  output logic               in_ready,
  input  word_t              in_word,
  output logic               out_valid,
  input  logic               out_ready,
  output word_t              out_word,
  // backplane to the AM boards
  output am_op_e             am_op,
  output logic [LAYER_W-1:0] am_layer,
  output logic [SS_W-1:0]    am_ss,
  output logic [NBOARDS-1:0] am_rd_sel,
  output logic [LAYER_W-1:0] am_thresh,
  output logic [NBOARDS-1:0] pat_we,
  output logic [BAW-1:0]     pat_addr,
  output logic [LAYER_W-1:0] pat_layer,
  output logic [SS_W-1:0]    pat_data,
  input  logic [NBOARDS-1:0] road_valid,
  input  logic [BAW-1:0]     road_id [NBOARDS],
  input  logic [ERR_W-1:0]   ee_mask,
  output logic [ERR_W-1:0]   err_out
);
  localparam int BW = (NBOARDS > 1) ? $clog2(NBOARDS) : 1;

  typedef enum logic [1:0] {S_INIT, S_DATA, S_READ} state_e;
  state_e state;

  logic  q_valid, q_ready, q_full;
  word_t q_word;
  hit_t  h;
  ee_t   ee_in;
  logic [ERR_W-1:0] ev_err, err_now;
  logic [BW-1:0]    win;
  logic             any_road;

  svt_fifo #(.W($bits(word_t)), .DEPTH(FIFO_D)) u_fifo (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_word),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_word), .full(q_full));

  assign h     = q_word.data;
  assign ee_in = q_word.data;

  // pattern download
  wire [ROAD_W-1:0] cfg_road = cfg.addr[ROAD_W+LAYER_W-1:LAYER_W];
  always_comb begin
    pat_we    = '0;
    if (cfg.we && cfg.target == CFG_AM)
      pat_we[BW'(cfg_road >> BAW)] = 1'b1;
    pat_addr  = cfg_road[BAW-1:0];
    pat_layer = cfg.addr[LAYER_W-1:0];
    pat_data  = cfg.data[SS_W-1:0];
  end

  always_comb begin
    any_road = 1'b0;
    win      = '0;
    for (int b = NBOARDS - 1; b >= 0; b--) begin
      if (road_valid[b]) begin
        any_road = 1'b1;
        win      = BW'(b);
      end
    end
  end

  wire can_out = !out_valid || out_ready;

  always_comb begin
    am_op     = AM_NOP;
    am_layer  = h.layer;
    am_ss     = h.coord[COORD_W-1:SS_SHIFT];
    am_rd_sel = '0;
    q_ready   = 1'b0;
    unique case (state)
      S_INIT: am_op = AM_INIT;
      S_DATA: if (q_valid) begin
        if (!q_word.ee) begin
          q_ready = 1'b1;
          if (int'(h.layer) < NLAYERS) am_op = AM_DATA;
        end else begin
          q_ready = 1'b1;
        end
      end
      S_READ: if (can_out && any_road) begin
        am_op          = AM_READ;
        am_rd_sel[win] = 1'b1;
      end
      default: ;
    endcase
  end

  always_comb begin
    err_now = '0;
    err_now[ERR_FIFO_FULL] = in_valid && q_full;
    err_now[ERR_INVALID]   = state == S_DATA && q_valid && !q_word.ee && int'(h.layer) >= NLAYERS;
  end
  assign err_out = err_now;

  logic [TAG_W-1:0] tag;
  logic [ERR_W-1:0] err_up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; out_valid <= 1'b0; out_word <= '0;
      tag <= '0; err_up <= '0; ev_err <= '0; am_thresh <= LAYER_W'(NLAYERS);
    end else begin
      ev_err <= ev_err | err_now;
      if (cfg.we && cfg.target == CFG_AMCTL) am_thresh <= cfg.data[LAYER_W-1:0];
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_INIT: state <= S_DATA;
        S_DATA: if (q_valid && q_word.ee) begin
          tag    <= ee_in.tag;
          err_up <= ee_in.err;
          state  <= S_READ;
        end
        S_READ: if (can_out) begin
          out_valid <= 1'b1;
          if (any_road) begin
            out_word.ee   <= 1'b0;
            out_word.data <= {ROAD_TAG, COORD_W'({win, road_id[win]})};
          end else begin
            out_word <= mk_ee(tag, err_up | ((ev_err | err_now) & ee_mask));
            ev_err   <= '0;
            state    <= S_INIT;
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_word));
endmodule
