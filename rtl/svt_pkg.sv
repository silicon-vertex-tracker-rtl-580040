// svt_pkg: word formats and constants shared by every board of the Silicon
// Vertex Tracker (SVT) sector.
//
// All boards exchange 22-bit words over one uniform point-to-point link: a
// 21-bit data field and an End Event (EE) flag, moved with a valid/ready
// handshake. Data words are hits {layer, coordinate}; a Road-Info Package
// opens with a road header (layer code ROAD_TAG) and the road ID; the End
// Event word carries the event tag and the error bits of the boards it
// passed. The word widths, the field layout and the handshake are this
// design's own choices; the document fixes the AM word (12 bits), the six AM
// layers (5 silicon + XFT) and the 6 measurements of a fit.
package svt_pkg;

  localparam int DATA_W   = 21;  // payload bits of a link word
  localparam int LAYER_W  = 3;
  localparam int COORD_W  = 18;  // hit coordinate, 1/16 strip units
  localparam int SS_W     = 12;  // AM word = super-strip number
  localparam int SS_SHIFT = COORD_W - SS_W;  // 64 centroid units = 4 strips (~250 um)
  localparam int NLAYERS  = 6;   // AM layers: 5 silicon + XFT
  localparam int NSIL     = 5;
  localparam int ROAD_W   = 15;  // 32k patterns per sector
  localparam int ERR_W    = 4;
  localparam int TAG_W    = 8;

  localparam logic [LAYER_W-1:0] XFT_LAYER = 3'd5;
  localparam logic [LAYER_W-1:0] ROAD_TAG  = 3'd7;

  // error bit positions (End Event word, VME register)
  localparam int ERR_FIFO_FULL = 0;
  localparam int ERR_PARITY    = 1;
  localparam int ERR_INVALID   = 2;
  localparam int ERR_OVERFLOW  = 3;  // a table or list ran out of room

  typedef struct packed {
    logic              ee;
    logic [DATA_W-1:0] data;
  } word_t;

  typedef struct packed {
    logic [LAYER_W-1:0] layer;
    logic [COORD_W-1:0] coord;
  } hit_t;

  // raw Hit Finder input word, as delivered by the G-link receiver:
  // one digitised strip of one of the 10 layer streams
  localparam int STRIP_W = 11;
  localparam int PH_W    = 8;
  typedef struct packed {
    logic               ee;
    logic [3:0]         stream;
    logic [STRIP_W-1:0] strip;
    logic [PH_W-1:0]    ph;
  } raw_t;

  // End Event payload
  typedef struct packed {
    logic [DATA_W-ERR_W-TAG_W-1:0] spare;
    logic [ERR_W-1:0]              err;
    logic [TAG_W-1:0]              tag;
  } ee_t;

  // configuration / readback bus (stands in for each board's VME slave)
  typedef enum logic [3:0] {
    CFG_HF0  = 4'd0, CFG_HF1 = 4'd1, CFG_HF2 = 4'd2,
    CFG_AM   = 4'd3,   // pattern word: addr = {road, layer}, data = super-strip
    CFG_AMCTL= 4'd4,   // data[2:0] = majority threshold (layers to match)
    CFG_HB   = 4'd5,   // road map: addr = {road, layer}, data = super-strip
    CFG_TF   = 4'd6,   // fit constants, see track_fitter
    CFG_SPY  = 4'd7,   // spy buffer readback select
    CFG_ERR  = 4'd8    // error action enables / clear
  } cfg_target_e;

  typedef struct packed {
    logic        we;
    cfg_target_e target;
    logic [19:0] addr;
    logic [31:0] data;
  } cfg_t;

  // AM board opcodes sent by the AM Sequencer
  typedef enum logic [1:0] {
    AM_NOP  = 2'd0,
    AM_INIT = 2'd1,  // clear the hit flags of all patterns (new event)
    AM_DATA = 2'd2,  // one super-strip on one layer
    AM_READ = 2'd3   // retire the road presently at the tree output
  } am_op_e;

  // one hit combination of a road, as queued in the Track Fitter:
  // x[0..3] silicon coordinates, x[4] XFT curvature, x[5] XFT phi.
  // For an End Event entry (ee = 1) road holds {err, tag}.
  localparam int NMEAS = 6;
  typedef struct packed {
    logic                          ee;
    logic [ROAD_W-1:0]             road;
    logic [NMEAS-1:0][COORD_W-1:0] x;
  } comb_t;

  // fitted track sent to Level 2
  localparam int PAR_W = 16;
  localparam int CHI2_W = 32;
  typedef struct packed {
    logic                    ee;    // End Event marker: road holds {err, tag}
    logic [ROAD_W-1:0]       road;
    logic signed [PAR_W-1:0] crv;   // curvature (1/pT)
    logic signed [PAR_W-1:0] phi;
    logic signed [PAR_W-1:0] d;     // impact parameter
    logic [CHI2_W-1:0]       chi2;
  } track_t;

  function automatic word_t mk_hit(logic [LAYER_W-1:0] layer, logic [COORD_W-1:0] coord);
    word_t w;
    w.ee   = 1'b0;
    w.data = {layer, coord};
    return w;
  endfunction

  function automatic word_t mk_ee(logic [TAG_W-1:0] tag, logic [ERR_W-1:0] err);
    word_t w;
    ee_t   e;
    e = '0;
    e.tag = tag;
    e.err = err;
    w.ee   = 1'b1;
    w.data = e;
    return w;
  endfunction

endpackage
